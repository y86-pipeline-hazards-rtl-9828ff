// y86_control_tb: checks the pipeline control logic.
//
// Directed cases replay the lecture's diagrams: the ret sequence (fetch
// register S S S then N, decode register N B B B), a mispredicted jXX
// (decode and execute take bubbles, fetch loads the fall-through), a
// load/use (fetch and decode stall, execute takes a bubble) and an
// exception (memory bubbles, writeback stalls, no condition-code write).
// Random cases check that stall and bubble are never asked of the same bank
// and that the commands match a table written from those rules.
module y86_control_tb;
  import y86_pkg::*;
  icode_t     f_icode, d_icode, e_icode, m_icode;
  logic [3:0] d_srca, d_srcb, e_dstm;
  logic       e_cnd;
  stat_t      m_stat, w_stat;
  logic       f_stall, f_take_ret, f_take_fix, d_stall, d_bubble, e_bubble;
  logic       m_bubble, w_stall, set_cc, load_use, mispredict, ret_wait;
  int checks = 0, failures = 0;

  y86_control dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %b expected %b", what, got, exp);
    end
  endtask

  // F code: 0 N, 1 S, 2 load ret address, 3 load fall-through
  function automatic logic [1:0] fcode();
    return f_take_fix ? 2'd3 : f_take_ret ? 2'd2 : f_stall ? 2'd1 : 2'd0;
  endfunction
  // D code: 0 N, 1 S, 2 B
  function automatic logic [1:0] dcode();
    return d_stall ? 2'd1 : d_bubble ? 2'd2 : 2'd0;
  endfunction

  task automatic idle();
    f_icode = I_NOP; d_icode = I_NOP; e_icode = I_NOP; m_icode = I_NOP;
    d_srca = 4'hF; d_srcb = 4'hF; e_dstm = 4'hF; e_cnd = 1;
    m_stat = STAT_AOK; w_stat = STAT_AOK;
  endtask

  initial begin
    // ret: times 1..4 of the lecture's diagram (call ahead of ret)
    idle(); f_icode = I_RET; d_icode = I_CALL; #1;
    chk(fcode(), 1, "ret t1 F"); chk(dcode(), 0, "ret t1 D");
    idle(); d_icode = I_RET; e_icode = I_CALL; #1;
    chk(fcode(), 1, "ret t2 F"); chk(dcode(), 2, "ret t2 D");
    idle(); e_icode = I_RET; m_icode = I_CALL; #1;
    chk(fcode(), 1, "ret t3 F"); chk(dcode(), 2, "ret t3 D");
    idle(); m_icode = I_RET; #1;
    chk(fcode(), 2, "ret t4 F"); chk(dcode(), 2, "ret t4 D");
    idle(); #1;
    chk(fcode(), 0, "ret t5 F"); chk(dcode(), 0, "ret t5 D");

    // mispredicted jne in execute
    idle(); e_icode = I_JXX; e_cnd = 0; f_icode = I_MRMOVQ; d_icode = I_OPQ; #1;
    chk(fcode(), 3, "mispredict F"); chk(dcode(), 2, "mispredict D");
    chk(e_bubble, 1, "mispredict E");
    // correctly predicted jump: no squash
    e_cnd = 1; #1;
    chk(fcode(), 0, "taken F"); chk(dcode(), 0, "taken D"); chk(e_bubble, 0, "taken E");

    // load/use: mrmovq 0(%rax),%rbx then subq %rbx,%rcx
    idle(); e_icode = I_MRMOVQ; e_dstm = 4'd3; d_icode = I_OPQ; d_srca = 4'd3; d_srcb = 4'd1; #1;
    chk(fcode(), 1, "load/use F"); chk(dcode(), 1, "load/use D"); chk(e_bubble, 1, "load/use E");
    d_srca = 4'd2; #1;
    chk(load_use, 0, "no load/use for other register");

    // exception reaching memory and writeback
    idle(); e_icode = I_OPQ; m_stat = STAT_ADR; #1;
    chk(m_bubble, 1, "exception M bubble"); chk(set_cc, 0, "exception blocks CC");
    chk(w_stall, 0, "W not yet stalled");
    idle(); e_icode = I_OPQ; w_stat = STAT_HLT; #1;
    chk(w_stall, 1, "halt W stall"); chk(m_bubble, 1, "halt M bubble");
    idle(); e_icode = I_OPQ; #1;
    chk(set_cc, 1, "OPq sets CC");

    // random combinations
    for (int n = 0; n < 5000; n++) begin
      bit lu, mp, rw, exc;
      f_icode = icode_t'($urandom_range(11)); d_icode = icode_t'($urandom_range(11));
      e_icode = icode_t'($urandom_range(11)); m_icode = icode_t'($urandom_range(11));
      d_srca = 4'($urandom); d_srcb = 4'($urandom); e_dstm = 4'($urandom);
      e_cnd = 1'($urandom);
      m_stat = stat_t'($urandom_range(4)); w_stat = stat_t'($urandom_range(4));
      // the pipeline never holds a ret in memory together with a jXX in execute
      if (m_icode == I_RET && e_icode == I_JXX) e_icode = I_NOP;
      #1;
      lu  = (e_icode == I_MRMOVQ || e_icode == I_POPQ) && e_dstm != 4'hF &&
            (e_dstm == d_srca || e_dstm == d_srcb);
      mp  = e_icode == I_JXX && !e_cnd;
      rw  = d_icode == I_RET || e_icode == I_RET || m_icode == I_RET;
      exc = m_stat inside {STAT_HLT, STAT_ADR, STAT_INS} || w_stat inside {STAT_HLT, STAT_ADR, STAT_INS};
      chk({d_stall, d_bubble}, {lu, mp || (rw && !lu)}, "D commands");
      chk(e_bubble, mp || lu, "E bubble");
      chk(m_bubble, exc, "M bubble");
      chk(w_stall, w_stat inside {STAT_HLT, STAT_ADR, STAT_INS}, "W stall");
      chk(set_cc, e_icode == I_OPQ && !exc, "set_cc");
      chk(fcode(), mp ? 2'd3 : (m_icode == I_RET) ? 2'd2 :
                   (lu || f_icode == I_RET || d_icode == I_RET || e_icode == I_RET) ? 2'd1 : 2'd0,
          "F command");
      chk(d_stall && d_bubble, 0, "D stall and bubble together");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
