// mp_core: the application-specific microprogrammed HW/SW platform: program
// memory, program counter, microinstruction decoder and controller, register
// write decoder, registers, input multiplexers and the ordered module array.
//
// A host loads a program through the pm_* port (one instruction block per
// word), sets prog_len and pulses `start`. The core clears its registers and
// module status bits and executes one microinstruction per cycle from block 0
// on. Inputs come from the environment as a stream: in_win[0..NWIN-1] are the
// next NWIN samples and in_valid marks which exist (a valid prefix); each cycle
// the core reports in in_pop how many it consumed (IN instruction or enabled
// input modules). OUT raises out_valid for one cycle with out_data. The run
// ends with `done` when the program counter passes prog_len, or with `done`
// and `timeout` after MAX_TIME cycles.
//
// The block structure, the microinstruction format, the ordered modules with
// direct connections, input modules and per-microinstruction module enables
// follow the document. Single-cycle execution, the stream window and the
// register count of 16 are this design's choices.
module mp_core
  import mp_pkg::*;
#(
  parameter kinds_t            KINDS    = KINDS_DEF,
  parameter logic [MAXMOD-1:0] USED     = '1,
  parameter int unsigned       NREG     = NREG_DEF,
  parameter int unsigned       REG_W [NREG] = '{default: DW},
  parameter int unsigned       DEPTH    = 10,
  parameter int unsigned       MAX_TIME = 300,
  parameter int unsigned       FRAC     = 6,
  parameter int                EXT_MAX  = 255,
  localparam int unsigned      IW       = instr_w(KINDS),
  localparam int unsigned      NB       = n_bytes(KINDS),
  localparam int unsigned      NWIN     = (n_inmods(KINDS) > 0) ? n_inmods(KINDS) : 1,
  localparam int unsigned      AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned      PW       = $clog2(DEPTH + 1),
  localparam int unsigned      TW       = $clog2(MAX_TIME + 1),
  localparam int unsigned      POPW     = $clog2(NWIN + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load
  input  logic              pm_we,
  input  logic [AW-1:0]     pm_addr,
  input  logic [IW-1:0]     pm_wdata,
  input  logic [PW-1:0]     prog_len,
  // run control
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              timeout,
  output logic [TW-1:0]     ltime,
  output logic [PW-1:0]     pc,
  output logic [MAXMOD-1:0] mod_ran,
  // environment
  input  word_t             in_win   [NWIN],
  input  logic [NWIN-1:0]   in_valid,
  output logic [POPW-1:0]   in_pop,
  output logic              out_valid,
  output word_t             out_data
);
  localparam int unsigned NW   = MAXMOD * MAXOUT;
  localparam int unsigned NREQ = NW + 1;

  logic [IW-1:0] instr;
  header_t       hdr;
  word_t         cst;
  sel_t          bytes [NB];
  sel_t          b0, b1;

  program_memory #(.DEPTH(DEPTH), .IW(IW)) u_pm (
    .clk(clk), .we(pm_we), .waddr(pm_addr), .wdata(pm_wdata),
    .raddr(pc[AW-1:0]), .rdata(instr));

  assign hdr = header_t'(instr[IW-1 -: HDR_W]);
  assign cst = word_t'(instr[IW-HDR_W-1 -: CONST_W]);
  for (genvar b = 0; b < NB; b++) begin : g_b
    assign bytes[b] = sel_t'(instr[IW-HDR_W-CONST_W-1-8*b -: 8]);
  end
  assign b0 = (NB > 0) ? bytes[0] : '0;
  assign b1 = (NB > 1) ? bytes[1] : '0;

  // registers
  word_t           regs [NREG];
  logic [NREG-1:0] we;
  word_t           wd   [NREG];
  logic            clear;

  register_file #(.NREG(NREG), .REG_W(REG_W)) u_rf (
    .clk(clk), .rst_n(rst_n), .clear(clear), .we(we), .wd(wd), .q(regs));

  // operands of controller microinstructions (MOV source, OUT source)
  word_t opnd0, opnd1;
  operand_mux #(.NSRC(NREG)) u_mux0 (.sel(b0), .src(regs), .y(opnd0));
  operand_mux #(.NSRC(NREG)) u_mux1 (.sel(b1), .src(regs), .y(opnd1));

  // modules
  logic [MAXMOD-1:0] mod_en, mod_status;
  word_t             mod_out [MAXMOD][MAXOUT];
  logic [NW-1:0]     m_wr_en;
  logic [7:0]        m_wr_idx  [NW];
  word_t             m_wr_data [NW];
  logic [POPW-1:0]   m_pop;

  module_array #(.KINDS(KINDS), .USED(USED), .NREG(NREG), .FRAC(FRAC), .EXT_MAX(EXT_MAX)) u_ma (
    .en(mod_en), .bytes(bytes), .regs(regs), .win(in_win), .win_valid(in_valid),
    .mod_out(mod_out), .ran(mod_ran), .status(mod_status),
    .wr_en(m_wr_en), .wr_idx(m_wr_idx), .wr_data(m_wr_data), .in_pop(m_pop));

  // controller
  logic       pc_step, pc_load, ctl_we, ctl_pop;
  logic [PW-1:0] pc_target;
  logic [7:0] ctl_idx;
  word_t      ctl_data;

  controller #(.PW(PW), .MAX_TIME(MAX_TIME), .NREG(NREG)) u_ctl (
    .clk(clk), .rst_n(rst_n), .start(start), .prog_len(prog_len), .pc(pc),
    .hdr(hdr), .cst(cst), .b0(b0), .b1(b1), .opnd0(opnd0), .opnd1(opnd1),
    .in_head(in_win[0]), .in_head_valid(in_valid[0]),
    .ran(mod_ran), .mod_status(mod_status),
    .busy(busy), .done(done), .timeout(timeout), .ltime(ltime), .clear(clear),
    .pc_step(pc_step), .pc_load(pc_load), .pc_target(pc_target), .mod_en(mod_en),
    .ctl_we(ctl_we), .ctl_idx(ctl_idx), .ctl_data(ctl_data), .ctl_pop(ctl_pop),
    .out_valid(out_valid), .out_data(out_data));

  program_counter #(.PW(PW)) u_pc (
    .clk(clk), .rst_n(rst_n), .start(start), .step(pc_step), .load(pc_load),
    .target(pc_target), .pc(pc));

  // register write decoder: module outputs, then the controller's request
  logic [NREQ-1:0] rq_en;
  logic [7:0]      rq_idx  [NREQ];
  word_t           rq_data [NREQ];
  for (genvar q = 0; q < NW; q++) begin : g_rq
    assign rq_en[q]   = m_wr_en[q];
    assign rq_idx[q]  = m_wr_idx[q];
    assign rq_data[q] = m_wr_data[q];
  end
  assign rq_en[NW]   = ctl_we;
  assign rq_idx[NW]  = ctl_idx;
  assign rq_data[NW] = ctl_data;

  reg_write_decoder #(.NREQ(NREQ), .NREG(NREG)) u_dec (
    .req_en(rq_en), .req_idx(rq_idx), .req_data(rq_data), .we(we), .wd(wd));

  assign in_pop = ctl_pop ? POPW'(1) : m_pop;
endmodule
