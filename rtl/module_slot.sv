// module_slot: one position of the ordered module array, holding a module of
// the kind given by KIND behind a uniform port list.
//
// Inputs arrive as MAXIN operands, outputs leave as MAXOUT words. A slot that
// is not enabled in the current microinstruction outputs zeros, so a later
// module that reads it sees 0. The status bit is what a JSMOD branch tests:
// sample availability for an input module, "first output non-zero" for the
// other kinds (this design's choice). Purely combinational.
module module_slot
  import mp_pkg::*;
#(
  parameter mod_kind_e   KIND    = K_ALU,
  parameter int unsigned FRAC    = 6,
  parameter int          EXT_MAX = 255
) (
  input  logic  en,
  input  word_t in_v   [MAXIN],
  input  word_t sample,
  input  logic  sample_valid,
  output word_t out_v  [MAXOUT],
  output logic  status
);
  word_t y0, y1;
  logic  st;

  generate
    case (KIND)
      K_IN: begin : g_in
        input_module #(.EXT_MAX(EXT_MAX)) u_m (
          .sample(sample), .sample_valid(sample_valid),
          .value(y0), .extreme(y1), .avail(st));
      end
      K_ALU: begin : g_alu
        alu_module u_m (.a(in_v[0]), .b(in_v[1]), .op(in_v[2][1:0]), .y(y0));
        assign y1 = '0;
        assign st = (y0 != '0);
      end
      K_MD: begin : g_md
        md_module u_m (.a(in_v[0]), .b(in_v[1]), .op(in_v[2][0]), .y(y0));
        assign y1 = '0;
        assign st = (y0 != '0);
      end
      K_CMP: begin : g_cmp
        cmp_module u_m (.a(in_v[0]), .b(in_v[1]), .lo(y0), .hi(y1));
        assign st = (y0 != '0);
      end
      K_XOR: begin : g_xor
        xor_module u_m (.a(in_v[0]), .b(in_v[1]), .y(y0));
        assign y1 = '0;
        assign st = (y0 != '0);
      end
      K_SHR: begin : g_shr
        shift_module u_m (.a(in_v[0]), .b(in_v[1]), .y(y0));
        assign y1 = '0;
        assign st = (y0 != '0);
      end
      K_MUL: begin : g_mul
        mult_module #(.FRAC(FRAC)) u_m (.a(in_v[0]), .b(in_v[1]), .y(y0));
        assign y1 = '0;
        assign st = (y0 != '0);
      end
      K_BOOL: begin : g_bool
        word_t bx [4];
        assign bx[0] = in_v[0];
        assign bx[1] = in_v[1];
        assign bx[2] = in_v[2];
        assign bx[3] = in_v[3];
        bool_module u_m (.x(bx), .op(in_v[4][1:0]), .y(y0));
        assign y1 = '0;
        assign st = (y0 != '0);
      end
      default: begin : g_none
        assign y0 = '0;
        assign y1 = '0;
        assign st = 1'b0;
      end
    endcase
  endgenerate

  assign out_v[0] = en ? y0 : '0;
  assign out_v[1] = en ? y1 : '0;
  assign status   = en & st;
endmodule
