// y86_control: pipeline control logic of the five-stage Y86-64 pipeline
// (combinational).
//
// Turns the hazards that forwarding cannot solve into stall and bubble
// commands for the pipeline register banks, and chooses what the F (PC)
// register loads:
//   mispredict : the jXX in execute finds its condition false, so the two
//                instructions fetched from the guessed target (now in fetch
//                and decode) are squashed: bubble D and E, and F loads the
//                fall-through address E_valA. Costs 2 cycles.
//   ret        : the return address is known only when the ret has been
//                through memory. While a ret is in fetch, decode or execute
//                F stalls; while one is in decode, execute or memory D takes
//                a bubble; when it is in memory F loads m_valM. A ret costs
//                3 extra cycles.
//   load/use   : an mrmovq or popq in execute whose destination is a source
//                of the instruction in decode. F and D stall, E takes a
//                bubble: 1 extra cycle, then forwarding from m_valM applies.
//   exception  : once an instruction with status HLT/ADR/INS reaches memory
//                or writeback, M takes bubbles (no younger memory write),
//                W stalls (the machine stops) and the condition codes are
//                frozen.
// set_cc enables the condition-code write of an OPq in execute.
//
// The ret, mispredict and load/use rules, their costs and the ret stall
// pattern (F: S S S N, D: N B B B) follow the lecture. Loading the corrected
// PC into the F register, and the exception handling, are this design's own
// (the latter as in the standard Y86-64 pipeline).
module y86_control
  import y86_pkg::*;
(
  input  icode_t      f_icode,
  input  icode_t      d_icode,
  input  logic [3:0]  d_srca,      // decode's chosen sources
  input  logic [3:0]  d_srcb,
  input  icode_t      e_icode,
  input  logic [3:0]  e_dstm,      // E register dstM
  input  logic        e_cnd,
  input  icode_t      m_icode,
  input  stat_t       m_stat,      // status leaving the memory stage
  input  stat_t       w_stat,      // W register status
  output logic        f_stall,
  output logic        f_take_ret,  // F loads m_valM
  output logic        f_take_fix,  // F loads E_valA (fall-through)
  output logic        d_stall,
  output logic        d_bubble,
  output logic        e_bubble,
  output logic        m_bubble,
  output logic        w_stall,
  output logic        set_cc,
  output logic        load_use,
  output logic        mispredict,
  output logic        ret_wait
);

  logic exc_mw;

  always_comb begin
    load_use   = (e_icode inside {I_MRMOVQ, I_POPQ}) && (e_dstm != REG_NONE) &&
                 (e_dstm == d_srca || e_dstm == d_srcb);
    mispredict = (e_icode == I_JXX) && !e_cnd;
    ret_wait   = (d_icode == I_RET) || (e_icode == I_RET) || (m_icode == I_RET);
    exc_mw     = stat_is_exception(m_stat) || stat_is_exception(w_stat);

    f_take_fix = mispredict;
    f_take_ret = !mispredict && (m_icode == I_RET);
    f_stall    = !f_take_fix && !f_take_ret &&
                 (load_use || f_icode == I_RET || d_icode == I_RET || e_icode == I_RET);

    d_stall    = load_use;
    d_bubble   = mispredict || (!load_use && ret_wait);
    e_bubble   = mispredict || load_use;
    m_bubble   = exc_mw;
    w_stall    = stat_is_exception(w_stat);
    set_cc     = (e_icode == I_OPQ) && !exc_mw;
  end

endmodule
