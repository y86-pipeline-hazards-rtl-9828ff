// y86_execute: execute stage of the five-stage Y86-64 pipeline.
//
// Chooses the two ALU operands for the instruction in the E register, runs
// the ALU (add, sub, and, xor), and owns the condition-code register
// (ZF, SF, OF). The condition codes are the only state the execute stage
// changes; they are written at the clock edge only when set_cc is given
// (an OPq that is not behind an exception). The stage also evaluates the
// jXX / cmovXX condition against the current codes: e_cnd. For a jXX,
// e_cnd=0 means the "taken" guess made in fetch was wrong; for a cmovXX
// whose condition fails the destination is dropped (e_dste = REG_NONE).
//
// Operand selection: aluA = valA (rrmovq, OPq), valC (irmovq, rmmovq,
// mrmovq), -8 (call, pushq), +8 (ret, popq); aluB = valB for everything
// except rrmovq and irmovq, which use 0. subq computes valB - valA.
//
// Outputs are combinational except the condition codes. Reset sets ZF=1,
// SF=0, OF=0. The lecture places the condition-code write in execute and
// the branch check there; the operand table, flag rules and reset value are
// the standard Y86-64 ones.
module y86_execute
  import y86_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  e_reg_t      e_reg,
  input  logic        set_cc,
  output logic        e_cnd,
  output logic [3:0]  e_dste,
  output word_t       e_vale,
  output m_reg_t      m_next,
  output cc_t         cc_q
);

  word_t      alu_a, alu_b, res;
  logic [3:0] alufun;
  cc_t        cc_new;

  always_comb begin
    unique case (e_reg.icode)
      I_RRMOVQ, I_OPQ:              alu_a = e_reg.vala;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: alu_a = e_reg.valc;
      I_CALL, I_PUSHQ:              alu_a = -64'sd8;
      I_RET, I_POPQ:                alu_a = 64'd8;
      default:                      alu_a = '0;
    endcase

    if (e_reg.icode inside {I_RRMOVQ, I_IRMOVQ}) alu_b = '0;
    else                                         alu_b = e_reg.valb;

    alufun = (e_reg.icode == I_OPQ) ? e_reg.ifun : ALU_ADD;

    unique case (alufun)
      ALU_SUB: res = alu_b - alu_a;
      ALU_AND: res = alu_b & alu_a;
      ALU_XOR: res = alu_b ^ alu_a;
      default: res = alu_b + alu_a;
    endcase

    cc_new.zf = (res == '0);
    cc_new.sf = res[63];
    unique case (alufun)
      ALU_ADD: cc_new.of = (alu_a[63] == alu_b[63]) && (res[63] != alu_a[63]);
      ALU_SUB: cc_new.of = (alu_a[63] != alu_b[63]) && (res[63] != alu_b[63]);
      default: cc_new.of = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)         cc_q <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc_q <= cc_new;
  end

  always_comb begin
    e_cnd  = cond_holds(e_reg.ifun, cc_q);
    e_vale = res;
    e_dste = (e_reg.icode == I_RRMOVQ && !e_cnd) ? REG_NONE : e_reg.dste;

    m_next.stat  = e_reg.stat;
    m_next.icode = e_reg.icode;
    m_next.cnd   = e_cnd;
    m_next.vale  = res;
    m_next.vala  = e_reg.vala;
    m_next.dste  = e_dste;
    m_next.dstm  = e_reg.dstm;
  end

endmodule
