// y86_execute_tb: checks the execute stage: ALU operand choice and result
// for every instruction, the condition codes written only when set_cc is
// given (ZF/SF/OF rules for add and sub), the jXX/cmovXX condition against
// the current codes, and the dropped destination of a failed cmovXX.
module y86_execute_tb;
  import y86_pkg::*;
  logic       clk = 0, rst = 1, set_cc = 0;
  e_reg_t     e_reg;
  logic       e_cnd;
  logic [3:0] e_dste;
  word_t      e_vale;
  m_reg_t     m_next;
  cc_t        cc_q;
  bit         zf = 1, sf = 0, of = 0;
  int checks = 0, failures = 0;

  y86_execute dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0h expected %0h (icode %0d ifun %0d)", what, got, exp,
               e_reg.icode, e_reg.ifun);
    end
  endtask

  function automatic bit cnd_of(logic [3:0] fn);
    case (fn)
      0: return 1;
      1: return (sf != of) || zf;
      2: return sf != of;
      3: return zf;
      4: return !zf;
      5: return sf == of;
      6: return (sf == of) && !zf;
      default: return 0;
    endcase
  endfunction

  initial begin
    e_reg = E_BUBBLE;
    @(posedge clk); #1 rst = 0;
    chk(64'(cc_q), 64'(3'b100), "reset condition codes");
    for (int n = 0; n < 5000; n++) begin
      logic [3:0] ic;
      logic [63:0] a, b, c, r;
      bit exp_cnd;
      ic = 4'($urandom_range(11));
      e_reg.stat = STAT_AOK; e_reg.icode = icode_t'(ic);
      e_reg.ifun = (ic == 6) ? 4'($urandom_range(3)) : 4'($urandom_range(6));
      case ($urandom_range(3))
        0: begin a = 64'h7FFF_FFFF_FFFF_FFFF; b = 64'(int'($urandom_range(3))); end
        1: begin a = 64'h8000_0000_0000_0000; b = 64'h8000_0000_0000_0000 + 64'($urandom_range(2)); end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      if ($urandom_range(7) == 0) b = a;
      c = {$urandom, $urandom};
      e_reg.vala = a; e_reg.valb = b; e_reg.valc = c;
      e_reg.dste = 4'($urandom); e_reg.dstm = 4'($urandom);
      set_cc = ($urandom_range(1) == 1) && ic == 6;
      #1;
      case (ic)
        2:          r = a;
        3:          r = c;
        4, 5:       r = b + c;
        6: case (e_reg.ifun)
             0: r = b + a;
             1: r = b - a;
             2: r = b & a;
             default: r = b ^ a;
           endcase
        8, 10:      r = b - 64'd8;
        9, 11:      r = b + 64'd8;
        default:    r = b;          // aluA is 0, aluB is valB
      endcase
      exp_cnd = cnd_of(e_reg.ifun);
      chk(e_vale, r, "valE");
      chk(m_next.vale, r, "M valE");
      chk(m_next.vala, a, "M valA");
      chk(64'(e_cnd), 64'(exp_cnd), "condition");
      chk(64'(e_dste), 64'((ic == 2 && !exp_cnd) ? 4'hF : e_reg.dste), "dstE");
      chk(64'(m_next.dstm), 64'(e_reg.dstm), "dstM");
      @(posedge clk); #1;
      if (set_cc) begin
        zf = (r == 0); sf = r[63];
        of = (e_reg.ifun == 0) ? (a[63] == b[63] && r[63] != a[63]) :
             (e_reg.ifun == 1) ? (a[63] != b[63] && r[63] != b[63]) : 0;
      end
      chk(64'(cc_q), 64'({zf, sf, of}), "condition codes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
