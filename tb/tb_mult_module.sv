// tb_mult_module: self-checking testbench of mult_module. Random fixed-point products with 6 fractional bits, checked by real arithmetic rounded toward minus infinity.
module tb_mult_module;
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
  mult_module #(.FRAC(6)) dut (.a, .b, .y);
  initial begin
    for (int t = 0; t < 300; t++) begin
      real r;
      a = word_t'($urandom_range(0, 20000)) - 10000;
      b = word_t'($urandom_range(0, 20000)) - 10000;
      #1;
      r = $itor(a) * $itor(b) / 64.0;
      check($sformatf("mul %0d*%0d", a, b), y, longint'($floor(r)));
    end
    a = 64; b = 64; #1; check("1.0*1.0", y, 64);
    a = 48; b = 48; #1; check("0.75*0.75", y, 36);
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
