// tb_alu_module: self-checking testbench of alu_module. Random operands, every operation, against 32-bit wrap-around arithmetic.
module tb_alu_module;
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
  logic [1:0] op;
  alu_module dut (.a, .b, .op, .y);
  initial begin
    for (int t = 0; t < 400; t++) begin
      longint e;
      a = word_t'($urandom); b = word_t'($urandom); op = 2'(t % 4);
      if (t < 8) a = 32'h7FFF_FFFF;
      #1;
      case (op)
        0: e = longint'(a) + longint'(b);
        1: e = longint'(a) - longint'(b);
        2: e = longint'(a) + 1;
        default: e = longint'(a) - 1;
      endcase
      check($sformatf("op%0d", op), y, longint'(int'(e)));
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
