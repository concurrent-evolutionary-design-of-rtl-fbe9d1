// hwsw_top: top level. It holds the microprogrammed platform in its default
// hardware configuration and, beside it with its own ports, the evolved
// combinational circuit for the second fractional bit of the sigmoid.
//
// Default platform configuration: 16 registers of 32 bits, program memory of
// 10 instruction blocks, a logical-time limit of 300 cycles and 25 modules in
// topology order: 8 input modules, a fixed-point multiplier (6 fractional
// bits), a shifter, an ALU, an MD module, 2 comparators, 7 XOR modules,
// 2 Boolean modules, a second shifter and a second ALU. Programs for all the
// evolved solutions the document shows for maximum, parity and sigmoid run on
// this one configuration. Port meaning and timing are those of mp_core and
// sigmoid_bit2_comb.
module hwsw_top
  import mp_pkg::*;
#(
  localparam int unsigned IW   = instr_w(KINDS_DEF),
  localparam int unsigned NWIN = n_inmods(KINDS_DEF),
  localparam int unsigned DEPTH = 10,
  localparam int unsigned MAX_TIME = 300,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned PW   = $clog2(DEPTH + 1),
  localparam int unsigned TW   = $clog2(MAX_TIME + 1),
  localparam int unsigned POPW = $clog2(NWIN + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pm_we,
  input  logic [AW-1:0]     pm_addr,
  input  logic [IW-1:0]     pm_wdata,
  input  logic [PW-1:0]     prog_len,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              timeout,
  output logic [TW-1:0]     ltime,
  output logic [PW-1:0]     pc,
  output logic [MAXMOD-1:0] mod_ran,
  input  word_t             in_win   [NWIN],
  input  logic [NWIN-1:0]   in_valid,
  output logic [POPW-1:0]   in_pop,
  output logic              out_valid,
  output word_t             out_data,
  // evolved combinational sigmoid bit
  input  logic [4:0]        sig_x,
  output logic              sig_bit2
);
  mp_core #(.DEPTH(DEPTH), .MAX_TIME(MAX_TIME)) u_core (
    .clk(clk), .rst_n(rst_n), .pm_we(pm_we), .pm_addr(pm_addr), .pm_wdata(pm_wdata),
    .prog_len(prog_len), .start(start), .busy(busy), .done(done), .timeout(timeout),
    .ltime(ltime), .pc(pc), .mod_ran(mod_ran), .in_win(in_win), .in_valid(in_valid),
    .in_pop(in_pop), .out_valid(out_valid), .out_data(out_data));

  sigmoid_bit2_comb u_sig (.x(sig_x), .y(sig_bit2));
endmodule
