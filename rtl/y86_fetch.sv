// y86_fetch: fetch stage of the five-stage Y86-64 pipeline (combinational).
//
// The PC of the instruction to fetch is always the F register (F.pred_pc):
// corrections after a mispredicted jump or a ret are written into that
// register by y86_pipe, so this stage never selects among late PCs. From the
// 10 bytes the memory returns at that PC it splits out icode/ifun, the
// register byte (rA, rB) and the 8-byte constant valC, computes the address
// of the next instruction (valP) and the status of the fetch.
//
// Branch prediction: a jXX is guessed taken, so the predicted next PC of
// jXX (and of call) is its target valC; every other instruction continues
// at valP. A wrong guess is squashed later, after the jXX has been through
// execute (see y86_control).
//
// Inputs : F register, fetch_bytes/fetch_err from the memory fetch port.
// Outputs: fetch_addr (to memory), d_next (input of the D register),
//          pred_pc (predicted next PC), f_icode (icode fetched this cycle).
//
// "Guess taken" and the split of the instruction follow the lecture; the
// instruction layout (byte 0 icode:ifun, optional register byte rA:rB,
// optional little-endian 8-byte constant) is the standard Y86-64 one.
module y86_fetch
  import y86_pkg::*;
(
  input  f_reg_t       f_reg,
  output logic [63:0]  fetch_addr,
  input  logic [79:0]  fetch_bytes,
  input  logic         fetch_err,
  output d_reg_t       d_next,
  output word_t        pred_pc,
  output icode_t       f_icode
);

  logic [3:0] raw_icode, ifun;
  icode_t     icode;
  logic       instr_valid, need_regids, need_valc;
  word_t      valc, valp;
  logic [3:0] ra, rb;

  assign fetch_addr = f_reg.pred_pc;
  assign raw_icode  = fetch_bytes[7:4];

  always_comb begin
    // an unreadable or unknown instruction travels down the pipeline as a
    // nop that carries status ADR or INS
    instr_valid = (raw_icode <= 4'hB);
    icode = (fetch_err || !instr_valid) ? I_NOP : icode_t'(raw_icode);
    ifun  = (fetch_err || !instr_valid) ? 4'h0  : fetch_bytes[3:0];

    need_regids = icode inside {I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ,
                                I_IRMOVQ, I_RMMOVQ, I_MRMOVQ};
    need_valc   = icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};

    ra   = need_regids ? fetch_bytes[15:12] : REG_NONE;
    rb   = need_regids ? fetch_bytes[11:8]  : REG_NONE;
    valc = need_regids ? fetch_bytes[79:16] : fetch_bytes[71:8];
    valp = f_reg.pred_pc + 64'd1 + (need_regids ? 64'd1 : 64'd0)
                                 + (need_valc   ? 64'd8 : 64'd0);

    pred_pc = (icode inside {I_JXX, I_CALL}) ? valc : valp;

    d_next.icode = icode;
    d_next.ifun  = ifun;
    d_next.ra    = ra;
    d_next.rb    = rb;
    d_next.valc  = valc;
    d_next.valp  = valp;
    if (fetch_err)         d_next.stat = STAT_ADR;
    else if (!instr_valid) d_next.stat = STAT_INS;
    else if (icode == I_HALT) d_next.stat = STAT_HLT;
    else                   d_next.stat = STAT_AOK;

    f_icode = icode;
  end

endmodule
