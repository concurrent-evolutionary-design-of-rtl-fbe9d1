// tb_bool_module: self-checking testbench of bool_module. Random words for the four operations, with the rule that all-zero inputs are neutral under AND/NAND and all-one inputs under OR/NOR.
module tb_bool_module;
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

  word_t x [4];
  logic [1:0] op;
  word_t y;
  bool_module dut (.x, .op, .y);
  initial begin
    for (int t = 0; t < 400; t++) begin
      word_t e;
      op = 2'(t % 4);
      for (int i = 0; i < 4; i++) begin
        x[i] = word_t'($urandom);
        if ($urandom_range(0, 3) == 0) x[i] = ($urandom_range(0, 1) == 1) ? '1 : '0;
      end
      #1;
      for (int bt = 0; bt < DW; bt++) begin
        logic acc;
        acc = (op == 0 || op == 2);
        for (int i = 0; i < 4; i++) begin
          if (op == 0 || op == 2) begin
            if (x[i] != 0) acc = acc & x[i][bt];
          end else begin
            if (x[i] != -1) acc = acc | x[i][bt];
          end
        end
        e[bt] = (op >= 2) ? !acc : acc;
      end
      check($sformatf("bool op%0d", op), y, e);
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
