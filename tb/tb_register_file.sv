// tb_register_file: self-checking testbench of register_file. Widths 0, 1, 6, 7 and 32 bits; random writes checked against masked reference values; clear and reset.
module tb_register_file;
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

  localparam int unsigned RW [8] = '{32, 0, 1, 6, 7, 32, 12, 3};
  logic rst_n = 1'b0, clear = 1'b0;
  logic [7:0] we = '0;
  word_t wd [8];
  word_t q [8];
  word_t ref_q [8];
  register_file #(.NREG(8), .REG_W(RW)) dut (.clk, .rst_n, .clear, .we, .wd, .q);
  initial begin
    for (int i = 0; i < 8; i++) begin wd[i] = 0; ref_q[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) check("reset", q[i], 0);
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      clear = (t % 37 == 36);
      for (int i = 0; i < 8; i++) begin
        we[i] = $urandom_range(0, 1);
        wd[i] = word_t'($urandom);
      end
      @(posedge clk); #1;
      for (int i = 0; i < 8; i++) begin
        if (clear) ref_q[i] = 0;
        else if (we[i]) ref_q[i] = (RW[i] >= 32) ? wd[i] : (wd[i] & ((32'(1) << RW[i]) - 1));
        check($sformatf("r%0d", i), q[i], ref_q[i]);
      end
    end
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
