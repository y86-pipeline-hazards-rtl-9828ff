// y86_memstage_tb: checks the memory stage's address, read and write
// choices for every instruction, that a refused access turns the status
// into ADR, and that the loaded value and the register fields pass to W.
module y86_memstage_tb;
  import y86_pkg::*;
  m_reg_t      m_reg;
  logic [63:0] mem_addr;
  logic        mem_re, mem_we, mem_err;
  word_t       mem_wdata, mem_rdata, m_valm;
  stat_t       m_stat;
  w_reg_t      w_next;
  int checks = 0, failures = 0;

  y86_memstage dut (.*);

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
      $display("FAIL: %s got %0h expected %0h (icode %0d)", what, got, exp, m_reg.icode);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [3:0] ic;
      bit rd, wr;
      ic = 4'($urandom_range(11));
      m_reg = M_BUBBLE;
      m_reg.stat = STAT_AOK; m_reg.icode = icode_t'(ic); m_reg.cnd = 1'($urandom);
      m_reg.vale = {$urandom, $urandom}; m_reg.vala = {$urandom, $urandom};
      m_reg.dste = 4'($urandom); m_reg.dstm = 4'($urandom);
      mem_rdata = {$urandom, $urandom};
      mem_err = ($urandom_range(7) == 0);
      #1;
      rd = (ic == 5 || ic == 11 || ic == 9);
      wr = (ic == 4 || ic == 10 || ic == 8);
      chk(64'(mem_re), 64'(rd), "read");
      chk(64'(mem_we), 64'(wr), "write");
      if (ic inside {4, 5, 8, 10}) chk(mem_addr, m_reg.vale, "address valE");
      if (ic inside {9, 11})       chk(mem_addr, m_reg.vala, "address valA");
      if (wr) chk(mem_wdata, m_reg.vala, "write data");
      if (rd) chk(m_valm, mem_rdata, "valM");
      chk(64'(m_stat), 64'(mem_err ? STAT_ADR : STAT_AOK), "status");
      chk(64'(w_next.stat), 64'(m_stat), "W status");
      chk(w_next.vale, m_reg.vale, "W valE");
      chk(64'({w_next.dste, w_next.dstm}), 64'({m_reg.dste, m_reg.dstm}), "W dst");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
