// tb_input_module: self-checking testbench of input_module. Samples with and without valid data; the extreme flag for 0 and 255.
module tb_input_module;
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

  word_t sample, value, extreme;
  logic sample_valid, avail;
  input_module #(.EXT_MAX(255)) dut (.sample, .sample_valid, .value, .extreme, .avail);
  initial begin
    for (int t = 0; t < 300; t++) begin
      sample = word_t'($urandom_range(0, 255));
      if (t % 7 == 0) sample = 0;
      if (t % 7 == 1) sample = 255;
      sample_valid = (t % 5 != 0);
      #1;
      check("value", value, sample_valid ? sample : 0);
      check("avail", avail, sample_valid);
      check("extreme", extreme, (!sample_valid || sample == 0 || sample == 255) ? 1 : 0);
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
