// asc_pkg: types, constants and instruction encoding shared by the ASC
// (ASsociative Computing) co-processor.
//
// The machine is 8 bits wide throughout: the control unit, every processing
// element (PE), the 16 common registers and the network all move bytes.
// Widths and register counts follow the design description (16 8-bit GPRs,
// 16 1-bit logical registers, a 16-entry mask stack, 16 common registers).
// The instruction set and its 32-bit encoding below are this design's own:
// the description names instructions (search, STEP, FIND, RESOLVE_FIRST,
// MAX, MOVE, masked/unmasked) but not their encoding.
//
// Instruction word:
//   [31:26] op   [25] m (masked)   [24:21] d   [20:17] a   [16:13] b
//   [12:10] f (ALU function / compare condition / logic op / direction)
//   [9:8]   x (operand-b source, or network wrap/2-D mode)   [7:0] imm
//   Branches use [9:0] as an absolute instruction address.
package asc_pkg;

  localparam int W           = 8;   // data path width
  localparam int NREG        = 16;  // GPRs in the control unit and in each PE
  localparam int NLREG       = 16;  // 1-bit logical registers per PE
  localparam int NCR         = 16;  // common registers
  localparam int IW          = 32;  // instruction width
  localparam int PC_W        = 10;  // instruction address width
  localparam int PEID_REG    = 15;  // PE register that reads as the PE's own ID

  typedef logic [W-1:0] byte_t;

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_HALT  = 6'd1,
    // scalar (control unit) instructions
    OP_LDI   = 6'd2,   // R[d] = imm
    OP_ALU   = 6'd3,   // R[d] = R[a] f src(x)
    OP_LD    = 6'd4,   // R[d] = DM[R[a]+imm]
    OP_ST    = 6'd5,   // DM[R[a]+imm] = R[b]
    OP_WCR   = 6'd6,   // CR[d] = R[a]
    OP_RCR   = 6'd7,   // R[d] = CR[a]
    OP_BR    = 6'd8,   // branch, condition f, target [9:0]
    OP_GETCR = 6'd9,   // CR[d] = P[a] of the PE(s) whose mask top is 1 (data bus)
    // parallel (PE array) instructions, masked when m = 1
    OP_PLDI  = 6'd16,  // P[d] = imm
    OP_PALU  = 6'd17,  // P[d] = P[a] f src(x)
    OP_PLD   = 6'd18,  // P[d] = LM[P[a]+imm]
    OP_PST   = 6'd19,  // LM[P[a]+imm] = P[b]
    OP_PCMP  = 6'd20,  // L[d] = P[a] cond(f) src(x)
    OP_LOP   = 6'd21,  // L[d] = L[a] lop(f) L[b]
    OP_LGET  = 6'd22,  // L[d] = x[0] ? responder : mask top
    OP_SRCH  = 6'd23,  // associative search: r = P[a] cond(f) src(x); RSP=r; push r
    OP_SRCHL = 6'd24,  // r = L[a]; RSP=r; push r
    OP_PUSH  = 6'd25,  // push (x[0] ? 1 : L[a])
    OP_POP   = 6'd26,  // pop the mask stack
    OP_MSET  = 6'd27,  // mask top = L[a]
    OP_SFR   = 6'd28,  // f: 0 STEP, 1 FIND, 2 RESOLVE_FIRST
    OP_MAXMN = 6'd29,  // Falkoff search over P[a]; f[0]: 0 MAX, 1 MIN
    OP_MOVE  = 6'd30   // P[d] = neighbour's P[a]; f = direction, x[0] wrap, x[1] 2-D
  } opcode_t;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR = 3'd3,
    ALU_XOR = 3'd4, ALU_MUL = 3'd5, ALU_NOT = 3'd6, ALU_PASSB = 3'd7
  } alu_fn_t;

  typedef enum logic [2:0] {
    CMP_EQ = 3'd0, CMP_NE = 3'd1, CMP_LTU = 3'd2, CMP_GEU = 3'd3,
    CMP_GTU = 3'd4, CMP_LEU = 3'd5, CMP_LTS = 3'd6, CMP_GES = 3'd7
  } cmp_fn_t;

  typedef enum logic [2:0] {
    LOP_AND = 3'd0, LOP_OR = 3'd1, LOP_XOR = 3'd2, LOP_ANDN = 3'd3,
    LOP_NOTA = 3'd4, LOP_MOVA = 3'd5, LOP_ZERO = 3'd6, LOP_ONE = 3'd7
  } lop_fn_t;

  typedef enum logic [2:0] {
    BR_JMP = 3'd0, BR_EQ = 3'd1, BR_NE = 3'd2, BR_RSP = 3'd3,
    BR_NRSP = 3'd4, BR_LTU = 3'd5
  } br_fn_t;

  typedef enum logic [1:0] {
    SFR_STEP = 2'd0, SFR_FIND = 2'd1, SFR_RESOLVE = 2'd2, SFR_NONE = 2'd3
  } sfr_op_t;

  // Network directions. DOWN: PE j receives from PE j-1 (1-D) or from the
  // PE one row above (2-D). UP is the reverse. RIGHT: PE receives from its
  // left neighbour in the same row; LEFT is the reverse (2-D only).
  typedef enum logic [1:0] {
    DIR_DOWN = 2'd0, DIR_UP = 2'd1, DIR_RIGHT = 2'd2, DIR_LEFT = 2'd3
  } net_dir_t;

  // Operand-b source select (x field)
  localparam logic [1:0] SRC_REG = 2'd0, SRC_CR = 2'd1, SRC_IMM = 2'd2;

  // Per-cycle action broadcast from the control unit on the instruction bus
  typedef enum logic [4:0] {
    PE_NONE, PE_LDI, PE_ALU, PE_LD, PE_ST, PE_CMP, PE_LOP, PE_LGET,
    PE_SRCH, PE_SRCHL, PE_PUSH, PE_POP, PE_MSET, PE_SFR,
    PE_MAX_LOAD, PE_MAX_STEP, PE_NET_WB
  } pe_op_t;

  typedef struct packed {
    pe_op_t     op;
    logic       masked;
    logic [3:0] d;
    logic [3:0] a;
    logic [3:0] b;
    logic [2:0] f;
    logic [1:0] x;
    byte_t      imm;
    byte_t      cr;     // common register CR[b], broadcast on the data bus
  } pe_ctrl_t;

  function automatic logic cmp(input logic [2:0] fn, input byte_t a, input byte_t b);
    case (cmp_fn_t'(fn))
      CMP_EQ:  return a == b;
      CMP_NE:  return a != b;
      CMP_LTU: return a < b;
      CMP_GEU: return a >= b;
      CMP_GTU: return a > b;
      CMP_LEU: return a <= b;
      CMP_LTS: return $signed(a) < $signed(b);
      default: return $signed(a) >= $signed(b);
    endcase
  endfunction

  function automatic logic lop(input logic [2:0] fn, input logic a, input logic b);
    case (lop_fn_t'(fn))
      LOP_AND:  return a & b;
      LOP_OR:   return a | b;
      LOP_XOR:  return a ^ b;
      LOP_ANDN: return a & ~b;
      LOP_NOTA: return ~a;
      LOP_MOVA: return a;
      LOP_ZERO: return 1'b0;
      default:  return 1'b1;
    endcase
  endfunction

  // Instruction encoders, used by programs written in SystemVerilog
  function automatic logic [IW-1:0] enc(input opcode_t op, input logic m,
                                        input logic [3:0] d, input logic [3:0] a,
                                        input logic [3:0] b, input logic [2:0] f,
                                        input logic [1:0] x, input byte_t imm);
    return {op, m, d, a, b, f, x, imm};
  endfunction

  function automatic logic [IW-1:0] enc_br(input br_fn_t f, input logic [3:0] a,
                                           input logic [3:0] b, input logic [PC_W-1:0] tgt);
    return {OP_BR, 1'b0, 4'd0, a, b, f, tgt};
  endfunction

endpackage
