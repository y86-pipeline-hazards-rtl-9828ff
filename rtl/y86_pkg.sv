// y86_pkg: shared types and constants of the five-stage Y86-64 pipeline.
//
// Holds the instruction, register, ALU-function, condition and status
// encodings of the Y86-64 instruction set, and one struct per pipeline
// register (F, D, E, M, W) with the default ("bubble") value of each. A
// bubble is a no-op: icode NOP, no register sources or destinations, status
// "bubble" so that the machine status ignores it.
//
// The encodings are the standard Y86-64 ones; the lecture names the
// instructions (addq, subq, xorq, andq, irmovq, rmmovq, mrmovq, jXX, call,
// ret, popq) but does not print their encodings, so the numbers here are
// the usual textbook values. The register-bank defaults (icode NOP,
// register fields REG_NONE) follow the lecture's bubble example.
package y86_pkg;

  // ---- instruction codes (icode, high nibble of the first byte) ----
  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  // ---- ALU functions (ifun of OPq) ----
  localparam logic [3:0] ALU_ADD = 4'h0;
  localparam logic [3:0] ALU_SUB = 4'h1;
  localparam logic [3:0] ALU_AND = 4'h2;
  localparam logic [3:0] ALU_XOR = 4'h3;

  // ---- branch / conditional-move conditions (ifun of jXX, cmovXX) ----
  localparam logic [3:0] C_YES = 4'h0;
  localparam logic [3:0] C_LE  = 4'h1;
  localparam logic [3:0] C_L   = 4'h2;
  localparam logic [3:0] C_E   = 4'h3;
  localparam logic [3:0] C_NE  = 4'h4;
  localparam logic [3:0] C_GE  = 4'h5;
  localparam logic [3:0] C_G   = 4'h6;

  // ---- registers ----
  localparam logic [3:0] REG_RSP  = 4'h4;
  localparam logic [3:0] REG_NONE = 4'hF;

  // ---- status ----
  typedef enum logic [2:0] {
    STAT_BUB = 3'd0,   // bubble: carries no instruction
    STAT_AOK = 3'd1,
    STAT_HLT = 3'd2,
    STAT_ADR = 3'd3,
    STAT_INS = 3'd4
  } stat_t;

  typedef logic [63:0] word_t;

  // condition codes
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // ---- pipeline registers ----
  // F: predicted PC
  typedef struct packed {
    word_t pred_pc;
  } f_reg_t;

  // D: fetched instruction
  typedef struct packed {
    stat_t       stat;
    icode_t      icode;
    logic [3:0]  ifun;
    logic [3:0]  ra;
    logic [3:0]  rb;
    word_t       valc;
    word_t       valp;
  } d_reg_t;

  // E: decoded instruction with operands
  typedef struct packed {
    stat_t       stat;
    icode_t      icode;
    logic [3:0]  ifun;
    word_t       valc;
    word_t       vala;
    word_t       valb;
    logic [3:0]  dste;
    logic [3:0]  dstm;
    logic [3:0]  srca;
    logic [3:0]  srcb;
  } e_reg_t;

  // M: executed instruction
  typedef struct packed {
    stat_t       stat;
    icode_t      icode;
    logic        cnd;
    word_t       vale;
    word_t       vala;
    logic [3:0]  dste;
    logic [3:0]  dstm;
  } m_reg_t;

  // W: instruction ready to write back
  typedef struct packed {
    stat_t       stat;
    icode_t      icode;
    word_t       vale;
    word_t       valm;
    logic [3:0]  dste;
    logic [3:0]  dstm;
  } w_reg_t;

  localparam d_reg_t D_BUBBLE = '{stat: STAT_BUB, icode: I_NOP, ifun: 4'h0,
                                  ra: REG_NONE, rb: REG_NONE,
                                  valc: '0, valp: '0};
  localparam e_reg_t E_BUBBLE = '{stat: STAT_BUB, icode: I_NOP, ifun: 4'h0,
                                  valc: '0, vala: '0, valb: '0,
                                  dste: REG_NONE, dstm: REG_NONE,
                                  srca: REG_NONE, srcb: REG_NONE};
  localparam m_reg_t M_BUBBLE = '{stat: STAT_BUB, icode: I_NOP, cnd: 1'b0,
                                  vale: '0, vala: '0,
                                  dste: REG_NONE, dstm: REG_NONE};
  localparam w_reg_t W_BUBBLE = '{stat: STAT_BUB, icode: I_NOP,
                                  vale: '0, valm: '0,
                                  dste: REG_NONE, dstm: REG_NONE};

  // true for a status that stops the machine
  function automatic logic stat_is_exception(stat_t s);
    return (s == STAT_HLT) || (s == STAT_ADR) || (s == STAT_INS);
  endfunction

  // evaluate a jXX / cmovXX condition against the condition codes
  function automatic logic cond_holds(logic [3:0] ifun, cc_t cc);
    unique case (ifun)
      C_YES:   return 1'b1;
      C_LE:    return (cc.sf ^ cc.of) | cc.zf;
      C_L:     return cc.sf ^ cc.of;
      C_E:     return cc.zf;
      C_NE:    return ~cc.zf;
      C_GE:    return ~(cc.sf ^ cc.of);
      C_G:     return ~(cc.sf ^ cc.of) & ~cc.zf;
      default: return 1'b0;
    endcase
  endfunction

endpackage
