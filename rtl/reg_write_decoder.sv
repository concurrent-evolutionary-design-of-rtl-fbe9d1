// reg_write_decoder: the "Decoder" in front of the registers in the platform
// diagram. It turns the write requests of one microinstruction (every module
// output that names a register, plus one request from the controller for IN
// and MOV) into one write enable and one data word per register.
//
// Requests are scanned in order; when several target the same register the
// last one wins, i.e. the module latest in topology order, and the controller
// request after all modules. That priority is this design's choice; the
// document does not say what happens on such a collision. Combinational.
module reg_write_decoder
  import mp_pkg::*;
#(
  parameter int unsigned NREQ = 51,
  parameter int unsigned NREG = NREG_DEF
) (
  input  logic [NREQ-1:0] req_en,
  input  logic [7:0]      req_idx  [NREQ],
  input  word_t           req_data [NREQ],
  output logic [NREG-1:0] we,
  output word_t           wd       [NREG]
);
  always_comb begin
    we = '0;
    for (int unsigned r = 0; r < NREG; r++) wd[r] = '0;
    for (int unsigned q = 0; q < NREQ; q++)
      for (int unsigned r = 0; r < NREG; r++)
        if (req_en[q] && 32'(req_idx[q]) == r) begin
          we[r] = 1'b1;
          wd[r] = req_data[q];
        end
  end
endmodule
