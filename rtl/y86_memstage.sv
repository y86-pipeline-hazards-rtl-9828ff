// y86_memstage: memory stage of the five-stage Y86-64 pipeline
// (combinational).
//
// Drives the data port of the memory for the instruction in the M register:
//   reads  : mrmovq, popq, ret     writes : rmmovq, pushq, call
//   address: valE (rmmovq, pushq, call, mrmovq) or valA (popq, ret, which
//            read at the old stack pointer)
//   data   : valA
// Memory writes are the only state this stage changes. A data access that
// the memory refuses turns the instruction's status into ADR (m_stat), which
// y86_control uses to stop everything younger. m_valm is the loaded value;
// it is also a forwarding source for decode and, for a ret, the return
// address the F register takes.
//
// The stage's place and its effect follow the lecture; the address and
// read/write tables are the standard Y86-64 ones.
module y86_memstage
  import y86_pkg::*;
(
  input  m_reg_t      m_reg,
  output logic [63:0] mem_addr,
  output logic        mem_re,
  output logic        mem_we,
  output word_t       mem_wdata,
  input  word_t       mem_rdata,
  input  logic        mem_err,
  output word_t       m_valm,
  output stat_t       m_stat,
  output w_reg_t      w_next
);

  always_comb begin
    if (m_reg.icode inside {I_RMMOVQ, I_PUSHQ, I_CALL, I_MRMOVQ}) mem_addr = m_reg.vale;
    else if (m_reg.icode inside {I_POPQ, I_RET})                mem_addr = m_reg.vala;
    else                                                        mem_addr = '0;

    mem_re    = m_reg.icode inside {I_MRMOVQ, I_POPQ, I_RET};
    mem_we    = m_reg.icode inside {I_RMMOVQ, I_PUSHQ, I_CALL};
    mem_wdata = m_reg.vala;

    m_valm = mem_re ? mem_rdata : '0;
    m_stat = mem_err ? STAT_ADR : m_reg.stat;

    w_next.stat  = m_stat;
    w_next.icode = m_reg.icode;
    w_next.vale  = m_reg.vale;
    w_next.valm  = m_valm;
    w_next.dste  = m_reg.dste;
    w_next.dstm  = m_reg.dstm;
  end

endmodule
