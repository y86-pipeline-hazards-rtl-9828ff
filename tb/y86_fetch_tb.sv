// y86_fetch_tb: checks the fetch stage on random instruction bytes: the
// split into icode/ifun/rA/rB/valC, the instruction length (valP), the
// "guess taken" predicted PC for jXX and call, and the status (AOK, HLT,
// INS for an unknown icode, ADR on a fetch error). Expected values are
// computed from the Y86-64 instruction lengths table.
module y86_fetch_tb;
  import y86_pkg::*;
  f_reg_t      f_reg;
  logic [63:0] fetch_addr;
  logic [79:0] fetch_bytes;
  logic        fetch_err;
  d_reg_t      d_next;
  word_t       pred_pc;
  icode_t      f_icode;
  int checks = 0, failures = 0;

  y86_fetch dut (.*);

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
      $display("FAIL: %s got %0h expected %0h (bytes %h)", what, got, exp, fetch_bytes);
    end
  endtask

  // instruction lengths by icode 0..B
  int len_tab [12] = '{1, 1, 2, 10, 10, 10, 2, 9, 9, 1, 2, 2};

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int ic, len;
      logic [63:0] pc, exp_c;
      logic [3:0] exp_ra, exp_rb;
      pc = {$urandom, $urandom};
      f_reg.pred_pc = pc;
      fetch_bytes = {$urandom, $urandom, $urandom};
      fetch_err = ($urandom_range(15) == 0);
      #1;
      ic = fetch_bytes[7:4];
      chk(fetch_addr, pc, "fetch address");
      if (fetch_err) begin
        chk(64'(d_next.stat), 64'(STAT_ADR), "stat ADR");
        chk(64'(d_next.icode), 64'(I_NOP), "icode on error");
      end else if (ic > 11) begin
        chk(64'(d_next.stat), 64'(STAT_INS), "stat INS");
        chk(64'(d_next.icode), 64'(I_NOP), "icode on invalid");
      end else begin
        len = len_tab[ic];
        chk(64'(d_next.stat), 64'(ic == 0 ? STAT_HLT : STAT_AOK), "stat");
        chk(64'(d_next.icode), 64'(ic), "icode");
        chk(64'(f_icode), 64'(ic), "f_icode");
        chk(64'(d_next.ifun), 64'(fetch_bytes[3:0]), "ifun");
        chk(d_next.valp, pc + 64'(len), "valP");
        exp_ra = (len == 2 || len == 10) ? fetch_bytes[15:12] : 4'hF;
        exp_rb = (len == 2 || len == 10) ? fetch_bytes[11:8]  : 4'hF;
        chk(64'(d_next.ra), 64'(exp_ra), "rA");
        chk(64'(d_next.rb), 64'(exp_rb), "rB");
        exp_c = (len == 10) ? fetch_bytes[79:16] : fetch_bytes[71:8];
        if (len >= 9) chk(d_next.valc, exp_c, "valC");
        chk(pred_pc, (ic == 7 || ic == 8) ? exp_c : pc + 64'(len), "predicted PC");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
