// module_array: the ordered set of computational modules with their input
// multiplexers (the "Modules" and "MUXs" of the platform diagram, extended by
// direct module-to-module connections and per-microinstruction deactivation).
//
// Slot k holds a module of kind KINDS[k]. Each input of slot k is selected by
// one I/O byte of the microinstruction: a 7-bit constant, a register, or an
// output of a slot j < k. The whole chain is combinational and settles within
// the cycle in which the microinstruction executes, so a value can pass
// through several modules without being stored ("im" values). A slot runs only
// if its bit in `en` is set and it is used in the hardware configuration
// (USED); a slot that does not run outputs zeros and does not write.
// Each output byte names the register it writes, or "no reg" with its CONST
// FLAG set. Enabled input modules take consecutive samples of the input
// window in topology order; `in_pop` says how many samples were taken.
//
// Topology is fixed by the order of KINDS (the designer or the evolution picks
// it before synthesis); the document lets the order evolve as a permutation,
// which here becomes the choice of that list.
module module_array
  import mp_pkg::*;
#(
  parameter kinds_t            KINDS   = KINDS_DEF,
  parameter logic [MAXMOD-1:0] USED    = '1,
  parameter int unsigned       NREG    = NREG_DEF,
  parameter int unsigned       FRAC    = 6,
  parameter int                EXT_MAX = 255,
  localparam int unsigned      NB      = n_bytes(KINDS),
  localparam int unsigned      NWIN    = (n_inmods(KINDS) > 0) ? n_inmods(KINDS) : 1,
  localparam int unsigned      NW      = MAXMOD * MAXOUT
) (
  input  logic [MAXMOD-1:0]         en,
  input  sel_t                      bytes     [NB],
  input  word_t                     regs      [NREG],
  input  word_t                     win       [NWIN],
  input  logic [NWIN-1:0]           win_valid,
  output word_t                     mod_out   [MAXMOD][MAXOUT],
  output logic [MAXMOD-1:0]         ran,
  output logic [MAXMOD-1:0]         status,
  output logic [NW-1:0]             wr_en,
  output logic [7:0]                wr_idx    [NW],
  output word_t                     wr_data   [NW],
  output logic [$clog2(NWIN+1)-1:0] in_pop
);

  // Running count of enabled input modules, for the stream position of each.
  logic [$clog2(NWIN+1)-1:0] rank [MAXMOD+1];
  assign rank[0] = '0;

  for (genvar k = 0; k < MAXMOD; k++) begin : g_slot
    localparam mod_kind_e   KIND = KINDS[k];
    localparam int unsigned OFF  = byte_off(KINDS, k);
    localparam int unsigned NI   = n_in(KIND);
    localparam int unsigned NO   = n_out(KIND);
    localparam int unsigned NVIS = NREG + MAXOUT * k;

    logic  act;
    word_t vis  [NVIS];
    word_t in_v [MAXIN];
    word_t o_v  [MAXOUT];
    word_t smp;
    logic  smp_ok;

    assign act = en[k] && USED[k] && (KIND != K_NONE);

    // Sources visible to this slot: registers, then outputs of earlier slots.
    for (genvar r = 0; r < NREG; r++) begin : g_vr
      assign vis[r] = regs[r];
    end
    for (genvar j = 0; j < k; j++) begin : g_vm
      for (genvar o = 0; o < MAXOUT; o++) begin : g_vo
        assign vis[NREG + MAXOUT*j + o] = g_slot[j].o_v[o];
      end
    end

    for (genvar i = 0; i < MAXIN; i++) begin : g_in
      if (i < NI) begin : g_used
        operand_mux #(.NSRC(NVIS)) u_mux (.sel(bytes[OFF + i]), .src(vis), .y(in_v[i]));
      end else begin : g_unused
        assign in_v[i] = '0;
      end
    end

    // Stream sample for an input module.
    if (KIND == K_IN) begin : g_smp
      always_comb begin
        smp    = '0;
        smp_ok = 1'b0;
        for (int unsigned w = 0; w < NWIN; w++)
          if (w == 32'(rank[k])) begin
            smp    = win[w];
            smp_ok = win_valid[w];
          end
      end
      assign rank[k+1] = rank[k] + $bits(rank[k])'(act && smp_ok);
    end else begin : g_nosmp
      assign smp       = '0;
      assign smp_ok    = 1'b0;
      assign rank[k+1] = rank[k];
    end

    module_slot #(.KIND(KIND), .FRAC(FRAC), .EXT_MAX(EXT_MAX)) u_slot (
      .en(act), .in_v(in_v), .sample(smp), .sample_valid(smp_ok),
      .out_v(o_v), .status(status[k]));

    assign ran[k] = act;

    for (genvar o = 0; o < MAXOUT; o++) begin : g_out
      assign mod_out[k][o] = o_v[o];
      if (o < NO) begin : g_wr
        sel_t ob;
        assign ob                    = bytes[OFF + NI + o];
        assign wr_en[MAXOUT*k + o]   = act && !ob.cflag && (32'(ob.idx) < NREG);
        assign wr_idx[MAXOUT*k + o]  = {1'b0, ob.idx};
        assign wr_data[MAXOUT*k + o] = o_v[o];
      end else begin : g_nowr
        assign wr_en[MAXOUT*k + o]   = 1'b0;
        assign wr_idx[MAXOUT*k + o]  = '0;
        assign wr_data[MAXOUT*k + o] = '0;
      end
    end
  end

  assign in_pop = rank[MAXMOD];

endmodule
