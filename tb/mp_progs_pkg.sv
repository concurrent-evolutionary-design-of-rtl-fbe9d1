// mp_progs_pkg: programs for the default platform configuration, used by the
// core and top-level testbenches. Each function returns instruction block i
// of one program; the *_LEN constants give the program lengths.
//
//   max      maximum of a stream: CMP(IN1, IN3) -> CMP(r0, greater) -> r0,
//            repeated while input module 1 still gets samples, then OUT r0
//   par_par  parity of 8 inputs with a tree of 7 XORs in one block -> r3
//   par_seq  parity of a stream: r2 <- r2 XOR IN3, repeated, then OUT r2
//   sig      y = 1 - 2^-1 (1 - 2^-2 x)^2 in 6-fractional-bit fixed point
//   fib      Fibonacci numbers from 1, 1 with one ALU, output forever
//   sextic   x^6 - 2x^4 + x^2 = x^2 (x^2 - 1)^2 with the MD module and ALU
package mp_progs_pkg;
  import mp_pkg::*;
  import mp_asm_pkg::*;

  localparam int MAX_LEN = 3, PAR_PAR_LEN = 2, PAR_SEQ_LEN = 3, SIG_LEN = 4,
                 FIB_LEN = 7, SEXTIC_LEN = 4;

  function automatic logic [MAXMOD-1:0] bit_of(int s);
    return MAXMOD'(1) << s;
  endfunction

  function automatic uword_t prog_max(int i);
    uword_t w;
    case (i)
      0: begin
        w = op_exec(bit_of(1) | bit_of(3) | bit_of(S_CMP0) | bit_of(S_CMP1));
        w = set_in(w, S_CMP0, 0, mo(1, 0));
        w = set_in(w, S_CMP0, 1, mo(3, 0));
        w = set_in(w, S_CMP1, 0, rg(0));
        w = set_in(w, S_CMP1, 1, mo(S_CMP0, 1));
        w = set_out(w, S_CMP1, 1, rg(0));
      end
      1: w = op_jsmod(1, -1);
      default: w = op_out_reg(0);
    endcase
    return w;
  endfunction

  function automatic uword_t prog_par_par(int i);
    uword_t w;
    if (i == 0) begin
      w = op_exec(MAXMOD'(32'h001F_C0FF));   // IN0..7, XOR 14..20
      for (int k = 0; k < 4; k++) begin
        w = set_in(w, S_XOR0 + k, 0, mo(2*k, 0));
        w = set_in(w, S_XOR0 + k, 1, mo(2*k + 1, 0));
      end
      w = set_in(w, S_XOR0 + 4, 0, mo(S_XOR0 + 0, 0));
      w = set_in(w, S_XOR0 + 4, 1, mo(S_XOR0 + 1, 0));
      w = set_in(w, S_XOR0 + 5, 0, mo(S_XOR0 + 2, 0));
      w = set_in(w, S_XOR0 + 5, 1, mo(S_XOR0 + 3, 0));
      w = set_in(w, S_XOR0 + 6, 0, mo(S_XOR0 + 4, 0));
      w = set_in(w, S_XOR0 + 6, 1, mo(S_XOR0 + 5, 0));
      w = set_out(w, S_XOR0 + 6, 0, rg(3));
    end else w = op_out_reg(3);
    return w;
  endfunction

  function automatic uword_t prog_par_seq(int i);
    uword_t w;
    case (i)
      0: begin
        w = op_exec(bit_of(3) | bit_of(S_XOR0));
        w = set_in(w, S_XOR0, 0, rg(2));
        w = set_in(w, S_XOR0, 1, mo(3, 0));
        w = set_out(w, S_XOR0, 0, rg(2));
      end
      1: w = op_jsmod(3, -1);
      default: w = op_out_reg(2);
    endcase
    return w;
  endfunction

  function automatic uword_t prog_sig(int i);
    uword_t w;
    case (i)
      0: begin   // SHR x, 2 -> im1 ; SUB 1, im1 -> r1
        w = op_exec(bit_of(S_IN0) | bit_of(S_SHR) | bit_of(S_ALU));
        w = set_in(w, S_SHR, 0, mo(S_IN0, 0));
        w = set_in(w, S_SHR, 1, kc(2));
        w = set_in(w, S_ALU, 0, kc(64));
        w = set_in(w, S_ALU, 1, mo(S_SHR, 0));
        w = set_in(w, S_ALU, 2, kc(int'(ALU_SUB)));
        w = set_out(w, S_ALU, 0, rg(1));
      end
      1: begin   // MULT r1, r1 -> im2 ; SHR im2, 1 -> r0
        w = op_exec(bit_of(S_MUL) | bit_of(S_SHR));
        w = set_in(w, S_MUL, 0, rg(1));
        w = set_in(w, S_MUL, 1, rg(1));
        w = set_in(w, S_SHR, 0, mo(S_MUL, 0));
        w = set_in(w, S_SHR, 1, kc(1));
        w = set_out(w, S_SHR, 0, rg(0));
      end
      2: begin   // SUB 1, r0 -> r0
        w = op_exec(bit_of(S_ALU));
        w = set_in(w, S_ALU, 0, kc(64));
        w = set_in(w, S_ALU, 1, rg(0));
        w = set_in(w, S_ALU, 2, kc(int'(ALU_SUB)));
        w = set_out(w, S_ALU, 0, rg(0));
      end
      default: w = op_out_reg(0);
    endcase
    return w;
  endfunction

  function automatic uword_t prog_fib(int i);
    uword_t w;
    case (i)
      0: w = op_movi(0, 1);
      1: w = op_movi(1, 1);
      2: w = op_out_reg(0);
      3: begin
        w = op_exec(bit_of(S_ALU));
        w = set_in(w, S_ALU, 0, rg(0));
        w = set_in(w, S_ALU, 1, rg(1));
        w = set_in(w, S_ALU, 2, kc(int'(ALU_ADD)));
        w = set_out(w, S_ALU, 0, rg(0));
      end
      4: w = op_out_reg(1);
      5: begin
        w = op_exec(bit_of(S_ALU));
        w = set_in(w, S_ALU, 0, rg(0));
        w = set_in(w, S_ALU, 1, rg(1));
        w = set_in(w, S_ALU, 2, kc(int'(ALU_ADD)));
        w = set_out(w, S_ALU, 0, rg(1));
      end
      default: w = op_jmp(-4);
    endcase
    return w;
  endfunction

  function automatic uword_t prog_sextic(int i);
    uword_t w;
    case (i)
      0: begin   // x*x -> r1 ; (x*x) - 1 -> r2   (MD before ALU1 in topology)
        w = op_exec(bit_of(S_IN0) | bit_of(S_MD) | bit_of(S_ALU1));
        w = set_in(w, S_MD, 0, mo(S_IN0, 0));
        w = set_in(w, S_MD, 1, mo(S_IN0, 0));
        w = set_in(w, S_MD, 2, kc(0));
        w = set_out(w, S_MD, 0, rg(1));
        w = set_in(w, S_ALU1, 0, mo(S_MD, 0));
        w = set_in(w, S_ALU1, 2, kc(int'(ALU_DEC)));
        w = set_out(w, S_ALU1, 0, rg(2));
      end
      1: begin   // r2 * r2 -> r3
        w = op_exec(bit_of(S_MD));
        w = set_in(w, S_MD, 0, rg(2));
        w = set_in(w, S_MD, 1, rg(2));
        w = set_in(w, S_MD, 2, kc(0));
        w = set_out(w, S_MD, 0, rg(3));
      end
      2: begin   // r3 * r1 -> r4
        w = op_exec(bit_of(S_MD));
        w = set_in(w, S_MD, 0, rg(3));
        w = set_in(w, S_MD, 1, rg(1));
        w = set_in(w, S_MD, 2, kc(0));
        w = set_out(w, S_MD, 0, rg(4));
      end
      default: w = op_out_reg(4);
    endcase
    return w;
  endfunction
endpackage
