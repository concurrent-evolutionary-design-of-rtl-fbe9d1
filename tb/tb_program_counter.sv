// tb_program_counter: self-checking testbench of program_counter. Random sequences of start, step, increment and load compared with a reference counter.
module tb_program_counter;
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

  logic rst_n = 1'b0, start = 0, step = 0, load = 0;
  logic [4:0] target = '0, pc;
  int ref_pc = 0;
  program_counter #(.PW(5)) dut (.clk, .rst_n, .start, .step, .load, .target, .pc);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("reset", pc, 0);
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      start = ($urandom_range(0, 19) == 0);
      step = $urandom_range(0, 3) != 0;
      load = $urandom_range(0, 3) == 0;
      target = 5'($urandom);
      @(posedge clk); #1;
      if (start) ref_pc = 0;
      else if (step) ref_pc = load ? int'(target) : (ref_pc + 1) % 32;
      check("pc", pc, ref_pc);
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
