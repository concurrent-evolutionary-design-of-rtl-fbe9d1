// tb_mp_core: self-checking testbench of mp_core with register widths set as
// in the document's optimal Fibonacci solution (r0 7 bits, r1 6 bits).
//
// Runs: Fibonacci (MOV, OUT, ALU, unconditional jump, width masks, timeout at
// MAX_TIME), maximum of 8 samples (JSMOD loop, chained comparators, two input
// modules per block), an IN/MOV/OUT program, and a clamped out-of-range jump.
// Expected outputs and cycle counts are computed here from the programs'
// meaning, not from the core.
module tb_mp_core;
  import mp_pkg::*;
  import mp_asm_pkg::*;
  import mp_progs_pkg::*;

  localparam int unsigned NWIN = 8;
  localparam int unsigned RW [16] = '{7, 6, 32, 32, 32, 32, 32, 32,
                                      32, 32, 32, 32, 32, 32, 32, 32};

  logic clk = 1'b0, rst_n = 1'b0;
  logic pm_we = 1'b0, start = 1'b0;
  logic [3:0] pm_addr = '0, prog_len = '0, pc;
  uword_t pm_wdata = '0;
  logic busy, done, timeout, out_valid;
  logic [8:0] ltime;
  logic [MAXMOD-1:0] mod_ran;
  word_t in_win [NWIN];
  logic [NWIN-1:0] in_valid;
  logic [3:0] in_pop;
  word_t out_data;

  mp_core #(.REG_W(RW)) dut (
    .clk, .rst_n, .pm_we, .pm_addr, .pm_wdata, .prog_len, .start, .busy, .done,
    .timeout, .ltime, .pc, .mod_ran, .in_win, .in_valid, .in_pop, .out_valid, .out_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t stream [64];
  int slen = 0, sptr = 0;
  word_t outs [400];
  int nout = 0;

  always_comb
    for (int w = 0; w < NWIN; w++) begin
      in_valid[w] = (sptr + w < slen);
      in_win[w]   = (sptr + w < slen) ? stream[sptr + w] : '0;
    end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic uword_t prog_word(int id, int i);
    uword_t w;
    case (id)
      0: return prog_fib(i);
      1: return prog_max(i);
      2: begin   // IN r5 ; IN r6 ; MOV r7 <- r5 ; OUT r7 ; OUT r6 ; OUT #99
        case (i)
          0: return op_in(5);
          1: return op_in(6);
          2: begin
            w = set_hdr(blank(), 1'b1, JMP_NONE, IO_NONE, '0);
            w = set_byte(w, 0, rg(7));
            return set_byte(w, 1, rg(5));
          end
          3: return op_out_reg(7);
          4: return op_out_reg(6);
          default: return set_const(set_byte(set_hdr(blank(), 1'b0, JMP_NONE, IO_OUT, '0), 0, kc(0)), 99);
        endcase
      end
      default: begin   // JMP +100 (clamped to the last block) ; OUT #1 ; OUT #2
        case (i)
          0: return op_jmp(100);
          1: return set_const(set_byte(set_hdr(blank(), 1'b0, JMP_NONE, IO_OUT, '0), 0, kc(0)), 1);
          default: return set_const(set_byte(set_hdr(blank(), 1'b0, JMP_NONE, IO_OUT, '0), 0, kc(0)), 2);
        endcase
      end
    endcase
  endfunction

  task automatic run(int id, int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      pm_we = 1'b1; pm_addr = 4'(i); pm_wdata = prog_word(id, i);
    end
    @(negedge clk);
    pm_we = 1'b0; prog_len = 4'(len); sptr = 0; nout = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      int pop;
      if (out_valid) outs[nout++] = out_data;
      pop = int'(in_pop);
      @(posedge clk);
      #1 sptr += pop;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Fibonacci with masked registers
    slen = 0;
    run(0, FIB_LEN);
    begin
      int exp [12];
      exp[0] = 1; exp[1] = 1;
      for (int k = 2; k < 11; k++) exp[k] = exp[k-1] + exp[k-2];
      for (int k = 0; k < 11; k++) check($sformatf("fib[%0d]", k), outs[k], exp[k]);
      // r1 = 55 + 89 = 144 keeps 6 bits
      check("fib masked r1", outs[11], 144 % 64);
    end
    check("fib timeout", timeout, 1);
    check("fib logical time", ltime, 300);
    // 2 MOV, then 5-block loop: one pair of outputs per loop
    check("fib output count", nout, 2 * ((300 - 2) / 5) + (((300 - 2) % 5) >= 3 ? 2 : (((300 - 2) % 5) >= 1 ? 1 : 0)));

    // Maximum of 8 samples: 4 loop passes with data, a fifth that finds none
    // (values below 128 so that they fit the 7-bit r0)
    for (int t = 0; t < 4; t++) begin
      int mx;
      mx = 0;
      slen = 8;
      for (int k = 0; k < 8; k++) begin
        stream[k] = word_t'($urandom_range(0, 127));
        if (stream[k] > mx) mx = stream[k];
      end
      run(1, MAX_LEN);
      check("max result", outs[0], mx);
      check("max outputs", nout, 1);
      check("max cycles", ltime, 5 * 2 + 1);
      check("max no timeout", timeout, 0);
      check("max consumed", sptr, 8);
    end

    // IN / MOV / OUT
    slen = 2; stream[0] = 1234; stream[1] = -7;
    run(2, 6);
    check("io outs", nout, 3);
    check("io mov", outs[0], 1234);
    check("io in", outs[1], -7);
    check("io const", outs[2], 99);
    check("io consumed", sptr, 2);
    check("io cycles", ltime, 6);

    // Jump beyond the program is clamped to the last block
    slen = 0;
    run(3, 3);
    check("clamp outs", nout, 1);
    check("clamp value", outs[0], 2);
    check("clamp cycles", ltime, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
