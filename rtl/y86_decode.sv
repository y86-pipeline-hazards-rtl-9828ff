// y86_decode: decode stage of the five-stage Y86-64 pipeline, with the
// forwarding (bypass) muxes (combinational).
//
// From the instruction in the D register it chooses the registers to read
// (srcA, srcB) and to write (dstE for the ALU result, dstM for a loaded
// value), reads srcA/srcB from the register file and then replaces each
// value with a newer one still travelling down the pipeline when there is
// one. Sources, in priority order (the youngest producer wins):
//   e_valE  ALU result of the instruction now in execute  (e_dstE)
//   m_valM  value being loaded by the instruction in memory (M_dstM)
//   M_valE  ALU result held in the M register              (M_dstE)
//   W_valM  loaded value held in the W register            (W_dstM)
//   W_valE  ALU result held in the W register              (W_dstE)
//   the register file
// For call and jXX, valA carries valP instead (the return address, or the
// fall-through address used to undo a wrongly taken jump). REG_NONE never
// matches. A value loaded by the instruction in execute (mrmovq/popq) cannot
// be forwarded in time: y86_control stalls for it (load/use hazard).
//
// Forwarding from the end of execute and from the end of memory, and its
// "reg_srcA == e_dstE : e_valE" form, follow the lecture; the full set of
// sources and their order are those of the standard Y86-64 pipeline.
module y86_decode
  import y86_pkg::*;
(
  input  d_reg_t      d_reg,
  // register file
  output logic [3:0]  src_a,
  output logic [3:0]  src_b,
  input  word_t       rval_a,
  input  word_t       rval_b,
  // forwarding sources
  input  logic [3:0]  e_dste,
  input  word_t       e_vale,
  input  logic [3:0]  m_dstm,
  input  word_t       m_valm,
  input  logic [3:0]  m_dste,
  input  word_t       m_vale,
  input  logic [3:0]  w_dstm,
  input  word_t       w_valm,
  input  logic [3:0]  w_dste,
  input  word_t       w_vale,
  // input of the E register
  output e_reg_t      e_next,
  // valA / valB taken from the pipeline rather than the register file
  output logic        fwd_a,
  output logic        fwd_b
);

  icode_t     icode;
  logic [3:0] dste, dstm;

  function automatic word_t forward(logic [3:0] src, word_t regval,
                                    logic [3:0] edst, word_t eval,
                                    logic [3:0] mdstm, word_t mvalm,
                                    logic [3:0] mdste, word_t mvale,
                                    logic [3:0] wdstm, word_t wvalm,
                                    logic [3:0] wdste, word_t wvale);
    if (src == REG_NONE)   return regval;
    else if (src == edst)  return eval;
    else if (src == mdstm) return mvalm;
    else if (src == mdste) return mvale;
    else if (src == wdstm) return wvalm;
    else if (src == wdste) return wvale;
    else                   return regval;
  endfunction

  function automatic logic hit(logic [3:0] src, logic [3:0] edst,
                               logic [3:0] mdstm, logic [3:0] mdste,
                               logic [3:0] wdstm, logic [3:0] wdste);
    return (src != REG_NONE) &&
           (src == edst || src == mdstm || src == mdste ||
            src == wdstm || src == wdste);
  endfunction

  always_comb begin
    icode = d_reg.icode;

    if (icode inside {I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ}) src_a = d_reg.ra;
    else if (icode inside {I_POPQ, I_RET})                src_a = REG_RSP;
    else                                                  src_a = REG_NONE;

    if (icode inside {I_OPQ, I_RMMOVQ, I_MRMOVQ})               src_b = d_reg.rb;
    else if (icode inside {I_PUSHQ, I_POPQ, I_CALL, I_RET})     src_b = REG_RSP;
    else                                                        src_b = REG_NONE;

    if (icode inside {I_RRMOVQ, I_IRMOVQ, I_OPQ})               dste = d_reg.rb;
    else if (icode inside {I_PUSHQ, I_POPQ, I_CALL, I_RET})     dste = REG_RSP;
    else                                                        dste = REG_NONE;

    dstm = (icode inside {I_MRMOVQ, I_POPQ}) ? d_reg.ra : REG_NONE;

    e_next.stat  = d_reg.stat;
    e_next.icode = icode;
    e_next.ifun  = d_reg.ifun;
    e_next.valc  = d_reg.valc;
    e_next.vala  = (icode inside {I_CALL, I_JXX}) ? d_reg.valp
                 : forward(src_a, rval_a, e_dste, e_vale, m_dstm, m_valm,
                           m_dste, m_vale, w_dstm, w_valm, w_dste, w_vale);
    e_next.valb  = forward(src_b, rval_b, e_dste, e_vale, m_dstm, m_valm,
                           m_dste, m_vale, w_dstm, w_valm, w_dste, w_vale);
    e_next.dste  = dste;
    e_next.dstm  = dstm;
    e_next.srca  = src_a;
    e_next.srcb  = src_b;

    fwd_a = !(icode inside {I_CALL, I_JXX}) &&
            hit(src_a, e_dste, m_dstm, m_dste, w_dstm, w_dste);
    fwd_b = hit(src_b, e_dste, m_dstm, m_dste, w_dstm, w_dste);
  end

endmodule
