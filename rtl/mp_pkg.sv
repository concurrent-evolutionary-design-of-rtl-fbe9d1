// mp_pkg: types, constants and encoding helpers shared by the microprogrammed
// HW/SW platform.
//
// The platform is a configurable datapath: a register file, up to 25 ordered
// computational modules and a microprogram controller. A hardware
// configuration is a list of module kinds in topological order (module k may
// read the outputs of modules j < k), a register count with one bit width per
// register, and a module-utilisation mask.
//
// Microinstruction word (one word per instruction block), fields in the order
// of the format figure, first field in the most significant bits:
//   header  [32]  : MOV(1) JMP(2) LOAD(4) MODULES(25)
//   CONST   [32]  : signed constant for branches, MOV and OUT
//   I/O bytes     : for each module slot in topology order, one byte per module
//                   input followed by one byte per module output. A byte is
//                   {CONST FLAG, INDEX/CONST[6:0]}.
// The field widths and the byte layout follow the document. The opcode values
// inside JMP and LOAD, the source-index numbering and the per-kind port counts
// are this design's choice.
package mp_pkg;

  parameter int unsigned DW       = 32;   // datapath width (32-bit signed integers)
  parameter int unsigned MAXMOD   = 25;   // width of the MODULES header field
  parameter int unsigned MAXIN    = 5;    // most inputs of any module kind (Boolean)
  parameter int unsigned MAXOUT   = 2;    // most outputs of any module kind (CMP, IN)
  parameter int unsigned NREG_DEF = 16;   // default register count
  parameter int unsigned HDR_W    = 32;
  parameter int unsigned CONST_W  = 32;

  typedef logic signed [DW-1:0] word_t;

  // One I/O byte of a microinstruction.
  typedef struct packed {
    logic       cflag;   // 1: constant (module input) or "no reg" (module output)
    logic [6:0] idx;     // register / module-output index, or a 7-bit constant
  } sel_t;

  typedef struct packed {
    logic              mov;
    logic [1:0]        jmp;
    logic [3:0]        load;
    logic [MAXMOD-1:0] modules;   // bit k enables module slot k
  } header_t;

  // JMP field
  localparam logic [1:0] JMP_NONE  = 2'd0;
  localparam logic [1:0] JMP_ALWAYS = 2'd1;   // JMP  offset
  localparam logic [1:0] JMP_SMOD  = 2'd2;    // JSMOD k offset: jump if status of module k set
  localparam logic [1:0] JMP_NSMOD = 2'd3;    // jump if status of module k clear

  // LOAD field (I/O)
  localparam logic [3:0] IO_NONE = 4'd0;
  localparam logic [3:0] IO_IN   = 4'd1;      // IN  reg  : register <- next input sample
  localparam logic [3:0] IO_OUT  = 4'd2;      // OUT src  : emit register or CONST

  typedef enum logic [3:0] {
    K_NONE = 4'd0,
    K_IN   = 4'd1,   // input module: value, extreme flag
    K_ALU  = 4'd2,   // add/sub/inc/dec, op on input 2
    K_MD   = 4'd3,   // mul/div, op on input 2
    K_CMP  = 4'd4,   // comparator: min, max
    K_XOR  = 4'd5,
    K_SHR  = 4'd6,   // arithmetic shift right
    K_MUL  = 4'd7,   // fixed-point multiplier
    K_BOOL = 4'd8    // 4-input AND/OR/NAND/NOR, op on input 4
  } mod_kind_e;

  typedef mod_kind_e kinds_t [MAXMOD];

  // ALU operation codes (value on the op input)
  localparam logic [1:0] ALU_ADD = 2'd0, ALU_SUB = 2'd1, ALU_INC = 2'd2, ALU_DEC = 2'd3;
  // Boolean module operation codes
  localparam logic [1:0] BOOL_AND = 2'd0, BOOL_OR = 2'd1, BOOL_NAND = 2'd2, BOOL_NOR = 2'd3;

  // Default configuration in topological order: 8 input modules, then the
  // arithmetic modules, comparators, XORs and Boolean modules.
  localparam kinds_t KINDS_DEF = '{
    K_IN, K_IN, K_IN, K_IN, K_IN, K_IN, K_IN, K_IN,   // 0..7
    K_MUL, K_SHR, K_ALU, K_MD,                        // 8..11
    K_CMP, K_CMP,                                     // 12..13
    K_XOR, K_XOR, K_XOR, K_XOR, K_XOR, K_XOR, K_XOR,  // 14..20
    K_BOOL, K_BOOL,                                   // 21..22
    K_SHR, K_ALU                                      // 23..24
  };

  function automatic int unsigned n_in(mod_kind_e k);
    case (k)
      K_IN:   return 0;
      K_ALU:  return 3;
      K_MD:   return 3;
      K_CMP:  return 2;
      K_XOR:  return 2;
      K_SHR:  return 2;
      K_MUL:  return 2;
      K_BOOL: return 5;
      default: return 0;
    endcase
  endfunction

  function automatic int unsigned n_out(mod_kind_e k);
    case (k)
      K_IN:   return 2;
      K_CMP:  return 2;
      K_NONE: return 0;
      default: return 1;
    endcase
  endfunction

  // Index of the first I/O byte of module slot s.
  function automatic int unsigned byte_off(kinds_t kinds, int unsigned s);
    int unsigned o = 0;
    for (int unsigned j = 0; j < MAXMOD; j++)
      if (j < s) o += n_in(kinds[j]) + n_out(kinds[j]);
    return o;
  endfunction

  function automatic int unsigned n_bytes(kinds_t kinds);
    return byte_off(kinds, MAXMOD);
  endfunction

  // Number of input modules placed before slot s (their stream position).
  function automatic int unsigned in_rank(kinds_t kinds, int unsigned s);
    int unsigned r = 0;
    for (int unsigned j = 0; j < MAXMOD; j++)
      if (j < s && kinds[j] == K_IN) r++;
    return r;
  endfunction

  function automatic int unsigned n_inmods(kinds_t kinds);
    return in_rank(kinds, MAXMOD);
  endfunction

  // Instruction word width for a configuration.
  function automatic int unsigned instr_w(kinds_t kinds);
    return HDR_W + CONST_W + 8 * n_bytes(kinds);
  endfunction

endpackage
