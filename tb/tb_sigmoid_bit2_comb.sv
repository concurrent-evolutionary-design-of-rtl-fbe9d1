// tb_sigmoid_bit2_comb: self-checking testbench of sigmoid_bit2_comb. All 32 inputs against bit 2^-2 of the sigmoid (sigmoid(x) >= 0.75) and the evolved expression.
module tb_sigmoid_bit2_comb;
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

  logic [4:0] x;
  logic y;
  sigmoid_bit2_comb dut (.x, .y);
  initial begin
    for (int v = 0; v < 32; v++) begin
      real s;
      x = 5'(v); #1;
      s = 1.0 / (1.0 + $exp(-$itor(v) / 8.0));
      check($sformatf("x=%0d", v), y, (s >= 0.75) ? 1 : 0);
      check($sformatf("expr x=%0d", v), y, x[4] | (x[3] & (x[2] | x[1] | x[0])));
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
