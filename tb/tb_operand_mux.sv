// tb_operand_mux: self-checking testbench of operand_mux. Constants, every visible source index and indices beyond the visible limit.
module tb_operand_mux;
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

  sel_t sel;
  word_t src [20];
  word_t y;
  operand_mux #(.NSRC(20), .LIMIT(18)) dut (.sel, .src, .y);
  initial begin
    for (int i = 0; i < 20; i++) src[i] = word_t'($urandom);
    for (int t = 0; t < 128; t++) begin
      sel = '{cflag: 1'b0, idx: 7'(t)}; #1;
      check($sformatf("src %0d", t), y, (t < 18) ? src[t] : 0);
      sel = '{cflag: 1'b1, idx: 7'(t)}; #1;
      check($sformatf("const %0d", t), y, t);
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
