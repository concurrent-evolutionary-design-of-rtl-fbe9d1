// register_file: the platform's registers Reg_1..Reg_n with per-register bit
// widths.
//
// Each register keeps only the low REG_W[r] bits of what is written, sign
// ignored (the document implements register widths as masks). A width of 0
// removes the register: it always reads 0 but programs that name it still
// run. All registers are written in parallel on the rising clock edge where
// their enable is set; `clear` (start of a program run) and reset set them to
// 0. Reads are combinational.
module register_file
  import mp_pkg::*;
#(
  parameter int unsigned NREG = NREG_DEF,
  parameter int unsigned REG_W [NREG] = '{default: DW}
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [NREG-1:0] we,
  input  word_t           wd [NREG],
  output word_t           q  [NREG]
);
  function automatic word_t mask_of(int unsigned w);
    word_t m;
    m = '0;
    for (int unsigned b = 0; b < DW; b++)
      if (b < w) m[b] = 1'b1;
    return m;
  endfunction

  for (genvar r = 0; r < NREG; r++) begin : g_reg
    localparam word_t MASK = mask_of(REG_W[r]);
    word_t val;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     val <= '0;
      else if (clear) val <= '0;
      else if (we[r]) val <= wd[r] & MASK;
    end
    assign q[r] = val;
  end
endmodule
