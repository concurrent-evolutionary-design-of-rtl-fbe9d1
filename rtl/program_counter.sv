// program_counter: the "Counter" of the platform diagram, the address of the
// instruction block being executed.
//
// On `start` it returns to 0 (execution always begins at the first block).
// While `step` is set it either loads `target` (a taken branch, `load`) or
// increments by one. It counts one position past the last address so the
// controller can see the end of the program. Reset sets it to 0.
module program_counter #(
  parameter int unsigned PW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          step,
  input  logic          load,
  input  logic [PW-1:0] target,
  output logic [PW-1:0] pc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     pc <= '0;
    else if (start) pc <= '0;
    else if (step)  pc <= load ? target : pc + 1'b1;
  end
endmodule
