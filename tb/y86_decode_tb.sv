// y86_decode_tb: checks register selection and the forwarding priority of
// the decode stage. Random instructions meet random destination registers
// in execute, memory and writeback; the expected valA/valB is the value of
// the youngest stage that writes the source register (e_valE, then m_valM,
// M_valE, W_valM, W_valE), else the register file; call/jXX take valP.
// Also replays the lecture's two-addq example: %r9 is forwarded from the
// end of execute (1700).
module y86_decode_tb;
  import y86_pkg::*;
  d_reg_t      d_reg;
  logic [3:0]  src_a, src_b, e_dste, m_dstm, m_dste, w_dstm, w_dste;
  word_t       rval_a, rval_b, e_vale, m_valm, m_vale, w_valm, w_vale;
  e_reg_t      e_next;
  logic        fwd_a, fwd_b;
  int checks = 0, failures = 0, nfwd = 0;

  y86_decode dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0h expected %0h (icode %0d)", what, got, exp, d_reg.icode);
    end
  endtask

  function automatic word_t expect_val(logic [3:0] s, word_t rf);
    if (s == 4'hF)     return rf;
    if (s == e_dste)   return e_vale;
    if (s == m_dstm)   return m_valm;
    if (s == m_dste)   return m_vale;
    if (s == w_dstm)   return w_valm;
    if (s == w_dste)   return w_vale;
    return rf;
  endfunction

  function automatic word_t rf_val(logic [3:0] s);
    return (s == 4'hF) ? 64'd0 : 64'(s) * 64'd100;   // register n holds 100*n
  endfunction

  initial begin
    // lecture example: addq %r8,%r9 in execute, addq %r9,%r8 in decode
    d_reg = D_BUBBLE;
    d_reg.stat = STAT_AOK; d_reg.icode = I_OPQ; d_reg.ra = 4'd9; d_reg.rb = 4'd8;
    e_dste = 4'd9; e_vale = 64'd1700;
    {m_dstm, m_dste, w_dstm, w_dste} = 16'hFFFF;
    {m_valm, m_vale, w_valm, w_vale} = '0;
    #1 rval_a = rf_val(src_a); rval_b = rf_val(src_b); #1;
    chk(e_next.vala, 64'd1700, "R9 forwarded (1700)");
    chk(e_next.valb, 64'd800, "R8 from register file");
    chk(64'(e_next.dste), 64'd8, "dstE");

    for (int n = 0; n < 5000; n++) begin
      logic [3:0] ic, ra, rb, exp_sa, exp_sb, exp_de, exp_dm;
      ic = 4'($urandom_range(11));
      ra = 4'($urandom); rb = 4'($urandom);
      d_reg.stat = STAT_AOK; d_reg.icode = icode_t'(ic); d_reg.ifun = 4'($urandom);
      d_reg.ra = ra; d_reg.rb = rb;
      d_reg.valc = {$urandom, $urandom}; d_reg.valp = {$urandom, $urandom};
      e_dste = 4'($urandom); m_dstm = 4'($urandom); m_dste = 4'($urandom);
      w_dstm = 4'($urandom); w_dste = 4'($urandom);
      e_vale = {$urandom, $urandom}; m_valm = {$urandom, $urandom};
      m_vale = {$urandom, $urandom}; w_valm = {$urandom, $urandom};
      w_vale = {$urandom, $urandom};
      #1 rval_a = rf_val(src_a); rval_b = rf_val(src_b); #1;
      case (ic)
        4'h2: begin exp_sa = ra;  exp_sb = 4'hF; exp_de = rb;  exp_dm = 4'hF; end
        4'h3: begin exp_sa = 4'hF; exp_sb = 4'hF; exp_de = rb;  exp_dm = 4'hF; end
        4'h4: begin exp_sa = ra;  exp_sb = rb;   exp_de = 4'hF; exp_dm = 4'hF; end
        4'h5: begin exp_sa = 4'hF; exp_sb = rb;   exp_de = 4'hF; exp_dm = ra;  end
        4'h6: begin exp_sa = ra;  exp_sb = rb;   exp_de = rb;  exp_dm = 4'hF; end
        4'h8: begin exp_sa = 4'hF; exp_sb = 4'h4; exp_de = 4'h4; exp_dm = 4'hF; end
        4'h9: begin exp_sa = 4'h4; exp_sb = 4'h4; exp_de = 4'h4; exp_dm = 4'hF; end
        4'hA: begin exp_sa = ra;  exp_sb = 4'h4; exp_de = 4'h4; exp_dm = 4'hF; end
        4'hB: begin exp_sa = 4'h4; exp_sb = 4'h4; exp_de = 4'h4; exp_dm = ra;  end
        default: begin exp_sa = 4'hF; exp_sb = 4'hF; exp_de = 4'hF; exp_dm = 4'hF; end
      endcase
      chk(64'(src_a), 64'(exp_sa), "srcA");
      chk(64'(src_b), 64'(exp_sb), "srcB");
      chk(64'(e_next.dste), 64'(exp_de), "dstE");
      chk(64'(e_next.dstm), 64'(exp_dm), "dstM");
      chk(e_next.vala, (ic == 7 || ic == 8) ? d_reg.valp : expect_val(exp_sa, rval_a), "valA");
      chk(e_next.valb, expect_val(exp_sb, rval_b), "valB");
      chk(e_next.valc, d_reg.valc, "valC");
      nfwd += int'(fwd_a) + int'(fwd_b);
    end
    checks++;
    if (nfwd == 0) begin failures++; $display("FAIL: no forwarding seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
