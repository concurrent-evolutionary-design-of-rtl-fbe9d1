// tb_reg_write_decoder: self-checking testbench of reg_write_decoder. Random sets of write requests, including collisions where the last request must win.
module tb_reg_write_decoder;
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

  localparam int NREQ = 51;
  logic [NREQ-1:0] req_en;
  logic [7:0] req_idx [NREQ];
  word_t req_data [NREQ];
  logic [15:0] we;
  word_t wd [16];
  reg_write_decoder #(.NREQ(NREQ), .NREG(16)) dut (.req_en, .req_idx, .req_data, .we, .wd);
  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [15:0] ewe;
      word_t ewd [16];
      ewe = '0;
      for (int i = 0; i < 16; i++) ewd[i] = 0;
      for (int q = 0; q < NREQ; q++) begin
        req_en[q] = ($urandom_range(0, 9) == 0);
        req_idx[q] = 8'($urandom_range(0, 19));
        req_data[q] = word_t'($urandom);
        if (req_en[q] && req_idx[q] < 16) begin
          ewe[req_idx[q]] = 1;
          ewd[req_idx[q]] = req_data[q];
        end
      end
      #1;
      check("we", we, ewe);
      for (int i = 0; i < 16; i++) if (ewe[i]) check($sformatf("wd%0d", i), wd[i], ewd[i]);
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
