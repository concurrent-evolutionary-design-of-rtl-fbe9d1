// tb_md_module: self-checking testbench of md_module. Random signed operands for MUL and DIV, division by zero and the overflow case.
module tb_md_module;
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
  logic op;
  md_module dut (.a, .b, .op, .y);
  initial begin
    for (int t = 0; t < 400; t++) begin
      longint e;
      a = word_t'($urandom); b = word_t'(int'($urandom) >>> ($urandom_range(0, 28)));
      if (t % 50 == 0) b = 0;
      op = t[0];
      #1;
      if (!op) e = longint'(int'(longint'(a) * longint'(b)));
      else if (b == 0) e = 0;
      else begin
        longint q;
        q = longint'(a) / longint'(b);
        e = longint'(int'(q));
      end
      check($sformatf("op%0d a=%0d b=%0d", op, a, b), y, e);
    end
    a = 32'h8000_0000; b = -1; op = 1; #1;
    check("min/-1", y, longint'(int'(32'h8000_0000)));
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
