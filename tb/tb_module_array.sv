// tb_module_array: self-checking testbench of module_array. Default configuration. Random register contents and input windows; blocks that chain input modules into comparators and an ALU, forward references that must read 0, disabled modules, partly filled input windows and output bytes that write registers or nothing.
module tb_module_array;
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

  localparam int NB = n_bytes(KINDS_DEF);
  localparam int NW = MAXMOD * MAXOUT;
  logic [MAXMOD-1:0] en, ran, status;
  sel_t bytes [NB];
  word_t regs [16];
  word_t win [8];
  logic [7:0] win_valid;
  word_t mod_out [MAXMOD][MAXOUT];
  logic [NW-1:0] wr_en;
  logic [7:0] wr_idx [NW];
  word_t wr_data [NW];
  logic [3:0] in_pop;
  module_array dut (.en, .bytes, .regs, .win, .win_valid, .mod_out, .ran, .status,
                    .wr_en, .wr_idx, .wr_data, .in_pop);
  function automatic int ib(int s, int i); return byte_off(KINDS_DEF, s) + i; endfunction
  function automatic int ob(int s, int o); return byte_off(KINDS_DEF, s) + n_in(KINDS_DEF[s]) + o; endfunction
  function automatic sel_t m(int s, int o); return '{cflag: 1'b0, idx: 7'(16 + 2*s + o)}; endfunction
  function automatic sel_t r(int k); return '{cflag: 1'b0, idx: 7'(k)}; endfunction
  function automatic sel_t k(int c); return '{cflag: 1'b1, idx: 7'(c)}; endfunction
  initial begin
    for (int t = 0; t < 200; t++) begin
      int nv, a_i, b_i, av, bv, lo, hi, s10, exp_pop;
      for (int i = 0; i < 16; i++) regs[i] = word_t'($urandom_range(0, 1000));
      nv = $urandom_range(0, 8);
      for (int i = 0; i < 8; i++) begin
        win[i] = word_t'($urandom_range(0, 1000));
        win_valid[i] = (i < nv);
      end
      for (int i = 0; i < NB; i++) bytes[i] = k(0);
      // IN2 and IN5 run: they take window samples 0 and 1
      en = (MAXMOD'(1) << 2) | (MAXMOD'(1) << 5) | (MAXMOD'(1) << 12) | (MAXMOD'(1) << 13) | (MAXMOD'(1) << 24);
      bytes[ib(12, 0)] = m(2, 0);
      bytes[ib(12, 1)] = m(5, 0);
      bytes[ob(12, 0)] = r(4);          // min -> r4
      bytes[ib(13, 0)] = m(12, 1);      // max of the two samples
      bytes[ib(13, 1)] = r(7);
      bytes[ob(13, 1)] = r(9);          // max(max, r7) -> r9
      bytes[ib(24, 0)] = m(13, 1);
      bytes[ib(24, 1)] = m(10, 0);      // ALU 10 is disabled: reads 0
      bytes[ib(24, 2)] = k(2);          // INC
      bytes[ob(24, 0)] = r(15);
      bytes[ib(12, 1)] = (t % 10 == 9) ? m(13, 0) : m(5, 0);   // forward reference
      #1;
      av = (nv > 0) ? win[0] : 0;
      bv = (t % 10 == 9) ? 0 : ((nv > 1) ? win[1] : 0);
      lo = (av < bv) ? av : bv;
      hi = (av < bv) ? bv : av;
      exp_pop = (nv > 2) ? 2 : nv;
      check("pop", in_pop, exp_pop);
      check("ran", ran, en);
      check("in2 value", mod_out[2][0], av);
      check("in2 avail", status[2], nv > 0);
      check("cmp lo", mod_out[12][0], lo);
      check("cmp hi", mod_out[12][1], hi);
      check("cmp2 hi", mod_out[13][1], (hi > regs[7]) ? hi : regs[7]);
      check("alu", mod_out[24][0], ((hi > regs[7]) ? hi : regs[7]) + 1);
      check("disabled out", mod_out[10][0], 0);
      check("wr lo", wr_en[2*12+0], 1);
      check("wr lo idx", wr_idx[2*12+0], 4);
      check("wr lo data", wr_data[2*12+0], lo);
      check("no wr cmp hi", wr_en[2*12+1], 0);
      check("wr r9", wr_en[2*13+1] && wr_idx[2*13+1] == 9, 1);
      check("wr r15", wr_en[2*24] && wr_idx[2*24] == 15, 1);
      check("no wr disabled", wr_en[2*10], 0);
      check("no wr in", wr_en[2*2], 0);
      check("number of writes", $countones(wr_en), 3);
    end
    // nothing enabled
    en = '0; #1;
    check("idle pop", in_pop, 0);
    check("idle writes", $countones(wr_en), 0);
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
