// tb_hwsw_top: end-to-end testbench of hwsw_top at its default configuration.
//
// Runs every program of mp_progs_pkg on the platform and checks outputs and
// logical time against values computed here:
//   max     random 8-tuples, expected = largest value, 11 cycles
//   par_par random bits, one block of 8 input modules and 7 chained XORs, 2 cycles
//   par_seq random bits, loop of 9 passes, 19 cycles
//   sig     all 256 inputs x in [0,4) with 6 fractional bits; exact formula
//           1 - (1 - x/4)^2 / 2 in integer steps, and |y - sigmoid(x)| < 0.04
//           (approximation error plus the truncation of each step)
//   sextic  x in [-12, 12], x^6 - 2x^4 + x^2, 4 cycles
//   fib     first 11 Fibonacci numbers, run ended by the logical-time limit
// and the combinational sigmoid bit for all 32 inputs against sigmoid(x) >= 0.75.
// It counts how often each mechanism occurred and fails if one never did:
// module chaining without a register, a block with only some modules enabled,
// several input modules taking samples in one cycle, a JSMOD branch taken and
// not taken, an unconditional jump, MOV, OUT, and a run ended by timeout.
module tb_hwsw_top;
  import mp_pkg::*;
  import mp_asm_pkg::*;
  import mp_progs_pkg::*;

  localparam int unsigned NWIN = 8;

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
  logic [4:0] sig_x = '0;
  logic sig_bit2;

  hwsw_top dut (
    .clk, .rst_n, .pm_we, .pm_addr, .pm_wdata, .prog_len, .start, .busy, .done,
    .timeout, .ltime, .pc, .mod_ran, .in_win, .in_valid, .in_pop, .out_valid, .out_data,
    .sig_x, .sig_bit2);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t stream [64];
  int slen = 0, sptr = 0;
  word_t outs [400];
  int nout = 0;

  // mechanism counters
  int n_chain = 0, n_partial = 0, n_multipop = 0, n_jsmod_taken = 0,
      n_jsmod_fall = 0, n_jmp = 0, n_mov = 0, n_out = 0, n_timeout = 0;

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
    case (id)
      0: return prog_max(i);
      1: return prog_par_par(i);
      2: return prog_par_seq(i);
      3: return prog_sig(i);
      4: return prog_sextic(i);
      default: return prog_fib(i);
    endcase
  endfunction

  // Count mechanisms from the microinstruction being executed.
  task automatic observe(uword_t w);
    header_t h;
    int nmods;
    h = header_t'(w[IW-1 -: HDR_W]);
    nmods = $countones(mod_ran);
    if (nmods > 0 && nmods < MAXMOD) n_partial++;
    if (in_pop > 1) n_multipop++;
    if (h.jmp == JMP_ALWAYS) n_jmp++;
    if (h.mov && h.jmp == JMP_NONE) n_mov++;
    if (out_valid) n_out++;
    // a module input taken from another module's output in the same block
    if (nmods > 1)
      for (int s = 0; s < MAXMOD; s++)
        if (mod_ran[s])
          for (int i = 0; i < n_in(KINDS_DEF[s]); i++) begin
            sel_t b;
            b = sel_t'(w[IW-HDR_W-CONST_W-1-8*(byte_off(KINDS_DEF, s) + i) -: 8]);
            if (!b.cflag && b.idx >= NREG) n_chain++;
          end
  endtask

  task automatic run(int id, int len);
    uword_t cur;
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
      logic [3:0] pc_before;
      header_t h;
      if (out_valid) outs[nout++] = out_data;
      cur = prog_word(id, int'(pc));
      h = header_t'(cur[IW-1 -: HDR_W]);
      if (busy && pc < prog_len) observe(cur);
      pc_before = pc;
      pop = int'(in_pop);
      @(posedge clk);
      #1 sptr += pop;
      if (h.jmp == JMP_SMOD && busy) begin
        if (pc == pc_before + 1) n_jsmod_fall++;
        else                     n_jsmod_taken++;
      end
      @(negedge clk);
    end
    if (timeout) n_timeout++;
  endtask

  function automatic real sigmoid(real x);
    return 1.0 / (1.0 + $exp(-x));
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // maximum
    for (int t = 0; t < 8; t++) begin
      int mx;
      mx = 0;
      slen = 8;
      for (int k = 0; k < 8; k++) begin
        stream[k] = word_t'($urandom_range(0, 100000));
        if (stream[k] > mx) mx = stream[k];
      end
      run(0, MAX_LEN);
      check("max result", outs[0], mx);
      check("max cycles", ltime, 11);
    end

    // parity, parallel and sequential
    for (int t = 0; t < 8; t++) begin
      int p;
      p = 0;
      slen = 8;
      for (int k = 0; k < 8; k++) begin
        stream[k] = word_t'($urandom_range(0, 1));
        p ^= stream[k];
      end
      run(1, PAR_PAR_LEN);
      check("parity parallel", outs[0], p);
      check("parity parallel cycles", ltime, 2);
      check("parity parallel consumed", sptr, 8);
      run(2, PAR_SEQ_LEN);
      check("parity sequential", outs[0], p);
      check("parity sequential cycles", ltime, 19);
    end

    // sigmoid, second-order approximation, every 8-bit input
    begin
      real maxerr;
      maxerr = 0.0;
      for (int x = 0; x < 256; x++) begin
        int t1, e;
        real err;
        slen = 1;
        stream[0] = word_t'(x);
        run(3, SIG_LEN);
        t1 = 64 - (x >> 2);
        e  = 64 - (((t1 * t1) >> 6) >> 1);
        check($sformatf("sig(%0d)", x), outs[0], e);
        check("sig cycles", ltime, 4);
        err = $itor(outs[0]) / 64.0 - sigmoid($itor(x) / 64.0);
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
      end
      check("sig max error below 0.04", (maxerr < 0.04) ? 1 : 0, 1);
      $display("second-order sigmoid: max error %f", maxerr);
    end

    // sextic polynomial
    for (int x = -12; x <= 12; x++) begin
      longint e;
      slen = 1;
      stream[0] = word_t'(x);
      run(4, SEXTIC_LEN);
      e = longint'(x) ** 6 - 2 * longint'(x) ** 4 + longint'(x) ** 2;
      check($sformatf("sextic(%0d)", x), outs[0], int'(e));
      check("sextic cycles", ltime, 4);
    end

    // Fibonacci, stopped by the logical-time limit
    slen = 0;
    run(5, FIB_LEN);
    begin
      int f [11];
      f[0] = 1; f[1] = 1;
      for (int k = 2; k < 11; k++) f[k] = f[k-1] + f[k-2];
      for (int k = 0; k < 11; k++) check($sformatf("fib[%0d]", k), outs[k], f[k]);
    end
    check("fib timeout", timeout, 1);
    check("fib logical time", ltime, 300);

    // combinational sigmoid bit 2^-2
    for (int v = 0; v < 32; v++) begin
      sig_x = 5'(v);
      #1;
      check($sformatf("sig_bit2(%0d)", v), sig_bit2, (sigmoid($itor(v) / 8.0) >= 0.75) ? 1 : 0);
    end

    $display("mechanisms: chain=%0d partial_enable=%0d multi_sample=%0d jsmod_taken=%0d jsmod_fall=%0d jmp=%0d mov=%0d out=%0d timeout=%0d",
             n_chain, n_partial, n_multipop, n_jsmod_taken, n_jsmod_fall, n_jmp, n_mov, n_out, n_timeout);
    check("mechanism chain",        n_chain > 0, 1);
    check("mechanism partial",      n_partial > 0, 1);
    check("mechanism multi sample", n_multipop > 0, 1);
    check("mechanism jsmod taken",  n_jsmod_taken > 0, 1);
    check("mechanism jsmod fall",   n_jsmod_fall > 0, 1);
    check("mechanism jmp",          n_jmp > 0, 1);
    check("mechanism mov",          n_mov > 0, 1);
    check("mechanism out",          n_out > 0, 1);
    check("mechanism timeout",      n_timeout > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
