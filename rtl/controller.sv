// controller: the microinstruction decoder and controller of the platform.
//
// Runs a loaded program from its first instruction block when `start` is
// pulsed, one microinstruction per clock cycle (one unit of logical time),
// until the program counter passes the last block (prog_len) or MAX_TIME
// cycles have elapsed. Then `done` is raised (with `timeout` if the time limit
// ended the run) and held until the next start.
//
// Header fields, checked in this order (the first non-zero one gives the
// microinstruction type; the document names the types, the priority and the
// field values are this design's choice):
//   JMP  1: jump; 2: JSMOD k, jump if module k's status is set; 3: jump if it
//        is clear. k is byte 0. The target is pc + CONST (signed, relative to
//        the branch itself) clamped into the program, as the document's
//        simulator limits jumps that leave the program.
//   MOV  register[byte 0] <= CONST when byte 1 has its CONST FLAG, else
//        register[byte 1].
//   LOAD 1: IN, register[byte 0] <= next input sample (0 when none);
//        2: OUT, emit register[byte 0], or CONST when byte 0 has its CONST FLAG.
//   MODULES: execute the enabled modules (EXEC MODS), which write the
//        registers their output bytes name.
// The status of a module is latched whenever it runs and cleared at start.
module controller
  import mp_pkg::*;
#(
  parameter int unsigned PW       = 4,
  parameter int unsigned MAX_TIME = 300,
  parameter int unsigned NREG     = NREG_DEF,
  localparam int unsigned TW      = $clog2(MAX_TIME + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [PW-1:0]     prog_len,
  input  logic [PW-1:0]     pc,
  input  header_t           hdr,
  input  word_t             cst,
  input  sel_t              b0,
  input  sel_t              b1,
  input  word_t             opnd0,        // register named by byte 0
  input  word_t             opnd1,        // register named by byte 1
  input  word_t             in_head,
  input  logic              in_head_valid,
  input  logic [MAXMOD-1:0] ran,
  input  logic [MAXMOD-1:0] mod_status,
  output logic              busy,
  output logic              done,
  output logic              timeout,
  output logic [TW-1:0]     ltime,
  output logic              clear,
  output logic              pc_step,
  output logic              pc_load,
  output logic [PW-1:0]     pc_target,
  output logic [MAXMOD-1:0] mod_en,
  output logic              ctl_we,
  output logic [7:0]        ctl_idx,
  output word_t             ctl_data,
  output logic              ctl_pop,
  output logic              out_valid,
  output word_t             out_data
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e state;

  logic [MAXMOD-1:0] st_q;
  logic              fin, is_jmp, is_mov, is_io, take;
  logic signed [PW+1:0] tgt;

  assign busy  = (state == S_RUN);
  assign done  = (state == S_DONE);
  assign clear = start;
  assign fin   = busy && ((pc >= prog_len) || (32'(ltime) >= MAX_TIME));

  assign is_jmp = (hdr.jmp != JMP_NONE);
  assign is_mov = !is_jmp && hdr.mov;
  assign is_io  = !is_jmp && !hdr.mov && (hdr.load != IO_NONE);

  always_comb begin
    // Branch decision and clamped target
    unique case (hdr.jmp)
      JMP_ALWAYS: take = 1'b1;
      JMP_SMOD:   take = (32'(b0.idx) < MAXMOD) && st_q[b0.idx[4:0]];
      JMP_NSMOD:  take = !((32'(b0.idx) < MAXMOD) && st_q[b0.idx[4:0]]);
      default:    take = 1'b0;
    endcase
    tgt = $signed({2'b00, pc}) + $signed(cst[PW+1:0]);
    if ($signed(cst) < -$signed(32'(pc)))                 tgt = '0;
    else if ($signed(cst) >= $signed(32'(prog_len) - $signed(32'(pc)))) tgt = $signed({2'b00, prog_len}) - 1;
    pc_target = tgt[PW-1:0];

    pc_step  = busy && !fin;
    pc_load  = pc_step && is_jmp && take;
    mod_en   = (pc_step && !is_jmp && !hdr.mov && hdr.load == IO_NONE) ? hdr.modules : '0;

    ctl_we   = 1'b0;
    ctl_idx  = {1'b0, b0.idx};
    ctl_data = '0;
    ctl_pop  = 1'b0;
    out_valid = 1'b0;
    out_data  = '0;
    if (pc_step && is_mov) begin
      ctl_we   = !b0.cflag && (32'(b0.idx) < NREG);
      ctl_data = b1.cflag ? cst : opnd1;
    end
    if (pc_step && is_io && hdr.load == IO_IN) begin
      ctl_we   = !b0.cflag && (32'(b0.idx) < NREG);
      ctl_data = in_head_valid ? in_head : '0;
      ctl_pop  = in_head_valid;
    end
    if (pc_step && is_io && hdr.load == IO_OUT) begin
      out_valid = 1'b1;
      out_data  = b0.cflag ? cst : opnd0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ltime   <= '0;
      timeout <= 1'b0;
      st_q    <= '0;
    end else if (start) begin
      state   <= S_RUN;
      ltime   <= '0;
      timeout <= 1'b0;
      st_q    <= '0;
    end else if (busy) begin
      if (fin) begin
        state   <= S_DONE;
        timeout <= (pc < prog_len);
      end else begin
        ltime <= ltime + 1'b1;
        st_q  <= (st_q & ~ran) | (mod_status & ran);
      end
    end
  end

  // A new run may only be requested while no run is in progress.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
