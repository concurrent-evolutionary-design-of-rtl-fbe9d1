// program_memory: holds the microprogram, one instruction block (one
// microinstruction word of IW bits) per address.
//
// Written one word per cycle through the load port (synchronous write); read
// combinationally at the program counter so that a fetched microinstruction
// executes in the same cycle. The contents are not reset; a program must be
// loaded before it is started. Depth 10 is the document's maximum program
// length for its later experiments.
module program_memory #(
  parameter int unsigned DEPTH = 10,
  parameter int unsigned IW    = 688,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;
endmodule
