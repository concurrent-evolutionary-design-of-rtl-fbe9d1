// tb_xor_module: self-checking testbench of xor_module. Random words against a bit-by-bit exclusive OR.
module tb_xor_module;
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

  word_t a, b, y;
  xor_module dut (.a, .b, .y);
  initial begin
    for (int t = 0; t < 200; t++) begin
      word_t e;
      a = word_t'($urandom); b = word_t'($urandom);
      #1;
      for (int i = 0; i < DW; i++) e[i] = (a[i] != b[i]);
      check("xor", y, e);
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
