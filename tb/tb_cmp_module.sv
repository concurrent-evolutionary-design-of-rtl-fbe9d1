// tb_cmp_module: self-checking testbench of cmp_module. Random signed pairs: smaller value on the first output, greater on the second.
module tb_cmp_module;
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

  word_t a, b, lo, hi;
  cmp_module dut (.a, .b, .lo, .hi);
  initial begin
    for (int t = 0; t < 300; t++) begin
      a = word_t'($urandom); b = (t % 10 == 0) ? a : word_t'($urandom);
      #1;
      check("lo", lo, (a < b) ? a : b);
      check("hi", hi, (a < b) ? b : a);
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
