// tb_controller: self-checking testbench of controller. Random microinstructions of every type during runs of random length, against a reference model of decoding, branch targets with clamping, latched module status, the end of the program and the logical-time limit (MAX_TIME = 40 here).
module tb_controller;
  import mp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  localparam int MT = 40;
  logic rst_n = 0, start = 0;
  logic [3:0] prog_len = 0, pc = 0;
  header_t hdr;
  word_t cst, opnd0, opnd1, in_head;
  sel_t b0, b1;
  logic in_head_valid;
  logic [MAXMOD-1:0] ran, mod_status, mod_en;
  logic busy, done, timeout, clear, pc_step, pc_load, ctl_we, ctl_pop, out_valid;
  logic [5:0] ltime;
  logic [3:0] pc_target;
  logic [7:0] ctl_idx;
  word_t ctl_data, out_data;
  controller #(.PW(4), .MAX_TIME(MT), .NREG(16)) dut (.*);
  logic [MAXMOD-1:0] st_ref;
  int n_taken = 0, n_to = 0, n_end = 0;
  initial begin
    hdr = '0; cst = 0; b0 = '0; b1 = '0; opnd0 = 0; opnd1 = 0; in_head = 0;
    in_head_valid = 0; ran = 0; mod_status = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      int t;
      @(negedge clk);
      prog_len = 4'($urandom_range(1, 10));
      start = 1; pc = 0;
      @(negedge clk);
      start = 0; st_ref = 0; t = 0;
      check("busy", busy, 1);
      while (busy) begin
        int p, exp_tgt, typ;
        logic fin, take;
        hdr = header_t'($urandom);
        typ = $urandom_range(0, 4);
        if (typ != 0) hdr.jmp = 0;
        if (typ > 1) hdr.mov = 0;
        if (typ > 2) hdr.load = 4'($urandom_range(0, 2));
        if (typ > 3) hdr.load = 0;
        cst = word_t'($urandom_range(0, 30)) - 15;
        b0 = sel_t'($urandom); b1 = sel_t'($urandom);
        if ($urandom_range(0, 1)) b0.idx = 7'($urandom_range(0, 24));
        opnd0 = word_t'($urandom); opnd1 = word_t'($urandom); in_head = word_t'($urandom);
        in_head_valid = $urandom_range(0, 1);
        if (run % 4 == 0) begin   // a jump to itself: only the time limit ends the run
          hdr = '0; hdr.jmp = 1; cst = 0;
        end
        ran = MAXMOD'($urandom); mod_status = MAXMOD'($urandom);
        #1;
        p = int'(pc);
        fin = (p >= int'(prog_len)) || (t >= MT);
        check("step", pc_step, !fin);
        take = 0;
        if (hdr.jmp == 1) take = 1;
        if (hdr.jmp == 2) take = (b0.idx < 25) && st_ref[b0.idx];
        if (hdr.jmp == 3) take = !((b0.idx < 25) && st_ref[b0.idx]);
        exp_tgt = p + int'(cst);
        if (exp_tgt < 0) exp_tgt = 0;
        if (exp_tgt > int'(prog_len) - 1) exp_tgt = int'(prog_len) - 1;
        if (!fin) begin
          check("load", pc_load, take);
          if (take) begin check("target", pc_target, exp_tgt); n_taken++; end
          if (hdr.jmp == 0 && hdr.mov) begin
            check("mov we", ctl_we, !b0.cflag && b0.idx < 16);
            check("mov data", ctl_data, b1.cflag ? cst : opnd1);
          end else if (hdr.jmp == 0 && hdr.load == 1) begin
            check("in we", ctl_we, !b0.cflag && b0.idx < 16);
            check("in data", ctl_data, in_head_valid ? in_head : 0);
            check("in pop", ctl_pop, in_head_valid);
          end else check("no ctl write", ctl_we, 0);
          check("out valid", out_valid, hdr.jmp == 0 && !hdr.mov && hdr.load == 2);
          if (out_valid) check("out data", out_data, b0.cflag ? cst : opnd0);
          check("mod_en", mod_en, (hdr.jmp == 0 && !hdr.mov && hdr.load == 0) ? hdr.modules : 0);
          check("ltime", ltime, t);
        end
        @(posedge clk); #1;
        if (fin) begin
          check("done", done, 1);
          check("timeout", timeout, p < int'(prog_len));
          if (timeout) n_to++; else n_end++;
        end else begin
          st_ref = (st_ref & ~ran) | (mod_status & ran);
          pc = take ? 4'(exp_tgt) : pc + 1;
          t++;
        end
        @(negedge clk);
      end
    end
    check("runs ended by the program end", n_end > 0, 1);
    check("runs ended by the time limit", n_to > 0, 1);
    check("branches taken", n_taken > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
