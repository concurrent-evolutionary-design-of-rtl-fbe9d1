// tb_shift_module: self-checking testbench of shift_module. Random values and amounts, including negative and large amounts, against division by powers of two rounded toward minus infinity.
module tb_shift_module;
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
  shift_module dut (.a, .b, .y);
  initial begin
    for (int t = 0; t < 300; t++) begin
      longint e, p;
      int sh;
      a = word_t'($urandom);
      b = word_t'($urandom_range(0, 40));
      if (t % 25 == 0) b = -3;
      #1;
      sh = (b < 0) ? 0 : ((b > 31) ? 31 : int'(b));
      p = longint'(1) << sh;
      e = longint'(a) / p;
      if (longint'(a) < 0 && (longint'(a) % p) != 0) e = e - 1;
      check($sformatf("shr a=%0d b=%0d", a, b), y, e);
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
