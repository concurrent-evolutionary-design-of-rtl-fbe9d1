// tb_program_memory: self-checking testbench of program_memory. Writes random words to every address and reads them back; writes beyond the depth must not disturb stored words; read of an address beyond the depth gives 0.
module tb_program_memory;
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

  logic we = 1'b0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [99:0] wdata = '0, rdata;
  logic [99:0] ref_m [10];
  program_memory #(.DEPTH(10), .IW(100)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int a = 0; a < 12; a++) begin
        @(negedge clk);
        we = 1; waddr = 4'(a);
        wdata = {$urandom, $urandom, $urandom, 4'(a)};
        if (a < 10) ref_m[a] = wdata;
      end
      @(negedge clk); we = 0;
      for (int a = 0; a < 12; a++) begin
        raddr = 4'(a); #1;
        checks++;
        if (rdata !== ((a < 10) ? ref_m[a] : {100{1'b0}})) begin
          failures++;
          $display("FAIL read %0d", a);
        end
      end
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
