// hazards_top_tb: end-to-end test of the whole design at its default sizes.
//
// Y86-64 pipeline: runs the lecture's example programs (forwarding paths,
// load/use, speculation right and wrong, call/ret) and the lecture's
// hypothetical instruction mix (3% not-taken jXX, 5% taken jXX, 1% ret,
// 91% other instructions, no load/use), each checked against the
// instruction-level reference model for registers, condition codes,
// memory, status and exact cycle count. For the mix it reports the
// measured cycles per instruction, which the lecture predicts as 1.09 with
// branch prediction (1.19 with stalling alone), and checks it lies within
// 0.03 of 1.09 + 5/N (the fill cycles of an N-instruction run).
// addq pipeline: runs the two-addq forwarding example followed by an addq
// that reads %r9 two instructions later, and checks the registers.
// Every mechanism (load/use stall, squash of a wrong guess, ret stall,
// forwarding in both pipelines, halting on an exception) must act at least
// once.
module hazards_top_tb;
  import y86_pkg::*;
  import y86_tb_pkg::*;

  logic        clk = 0, rst = 1;
  logic        y86_load_we = 0, addq_load_we = 0;
  logic [63:0] y86_load_addr = '0;
  logic [7:0]  y86_load_data = '0, addq_load_addr = '0, addq_load_data = '0;
  stat_t       y86_stat;
  logic        y86_retired, y86_ev_load_use, y86_ev_mispredict, y86_ev_ret_stall, y86_ev_forward;
  logic [63:0] y86_pc, addq_pc, addq_wb_val;
  cc_t         y86_cc;
  logic        addq_wb_valid, addq_fwd_e, addq_fwd_w;
  logic [3:0]  addq_wb_dst;

  int checks = 0, failures = 0;
  int n_load_use = 0, n_mispredict = 0, n_ret_stall = 0, n_forward = 0;
  int n_addq_fwd_e = 0, n_addq_fwd_w = 0, n_exception = 0;

  hazards_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int last_cycles;

  task automatic run_y86(string name, int max_cycles = 20000);
    int cyc, halt_cyc;
    rst = 1;
    for (int a = 0; a < MEMSZ; a++) begin
      @(negedge clk);
      y86_load_we = 1; y86_load_addr = 64'(a); y86_load_data = img[a];
    end
    @(negedge clk);
    y86_load_we = 0;
    @(posedge clk);
    #1 rst = 0;
    ref_run(100000);
    cyc = 0; halt_cyc = -1;
    while (cyc < max_cycles) begin
      @(negedge clk);
      if (y86_stat != STAT_AOK) begin halt_cyc = cyc; break; end
      n_load_use   += int'(y86_ev_load_use);
      n_mispredict += int'(y86_ev_mispredict);
      n_ret_stall  += int'(y86_ev_ret_stall);
      n_forward    += int'(y86_ev_forward);
      n_addq_fwd_e += int'(addq_fwd_e);
      n_addq_fwd_w += int'(addq_fwd_w);
      cyc++;
    end
    last_cycles = halt_cyc + 1;
    n_exception += int'(y86_stat inside {STAT_HLT, STAT_ADR, STAT_INS});
    check(int'(y86_stat) == r_stat, $sformatf("%s: status %0d expected %0d", name, y86_stat, r_stat));
    check(halt_cyc == ref_cycles(), $sformatf("%s: stopped in cycle %0d expected %0d",
                                              name, halt_cyc, ref_cycles()));
    for (int r = 0; r < 15; r++)
      check(dut.u_y86.u_rf.regs[r] == rregs[r], $sformatf("%s: reg %0d", name, r));
    check(y86_cc == '{zf: rzf, sf: rsf, of: rof}, $sformatf("%s: condition codes", name));
    for (int a = 0; a < MEMSZ; a++)
      if (dut.u_y86.u_mem.mem[a] != rmem[a]) begin
        check(0, $sformatf("%s: mem[%0h]", name, a));
        break;
      end
  endtask

  // the lecture's hypothetical mix, n instructions in all
  function automatic void gen_mix(int n, output int n_nt, output int n_tk, output int n_ret);
    int kinds[$];
    n_nt = n * 3 / 100; n_tk = n * 5 / 100; n_ret = n / 100;
    for (int i = 0; i < n_nt; i++)  kinds.push_back(1);
    for (int i = 0; i < n_tk; i++)  kinds.push_back(2);
    for (int i = 0; i < n_ret; i++) kinds.push_back(3);   // a call plus its ret
    while (kinds.size() < n - 1 - 15 - n_ret) kinds.push_back(0);
    kinds.shuffle();
    asm_clear();
    pc_asm = 'h1C00; a_ret();      // subroutine: just ret
    pc_asm = 0;
    for (int r = 0; r < 15; r++)
      if (r == RSP) a_irmovq('h1F00, RSP); else a_irmovq(64'($urandom_range(1, 1000)), r);
    // all values stay positive: ZF=SF=OF=0, so je is never taken
    foreach (kinds[i]) begin
      case (kinds[i])
        1: a_jxx(3, 'h1C00);                 // je: not taken
        2: a_jxx(0, pc_asm + 9);             // jmp to the next instruction
        3: a_call('h1C00);
        default: begin
          int ra = $urandom_range(14), rb = $urandom_range(14);
          while (ra == RSP) ra = $urandom_range(14);
          while (rb == RSP) rb = $urandom_range(14);
          case ($urandom_range(19))
            0, 1, 2, 3, 4: a_irmovq(64'($urandom_range(1, 1000)), rb);
            5, 6, 7: a_cmov(0, ra, rb);
            default: a_op(0, ra, rb);
          endcase
        end
      endcase
    end
    a_halt();
  endfunction

  initial begin
    longint unsigned l1;
    int nt, tk, nr, ninstr;
    real cpi, want;

    // ---------- addq pipeline, running alongside ----------
    rst = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      addq_load_we = 1; addq_load_addr = 8'(a);
      addq_load_data = (a == 1) ? 8'h89 : (a == 3) ? 8'h98 : (a == 5) ? 8'h9A :
                       (a % 2 == 0) ? 8'h60 : 8'hFF;
    end
    @(negedge clk); addq_load_we = 0;

    // ---------- Y86-64: lecture examples ----------
    asm_clear();
    a_irmovq(800, R8); a_irmovq(900, R9); a_irmovq('h1000 + 1700, R11);
    a_op(0, R8, R9); a_op(1, R9, R11); a_mrmovq(4, R11, R10);
    a_rmmovq(R9, 8, R11); a_op(3, R10, R9);
    a_irmovq('h1000, RAX); a_mrmovq(0, RAX, RBX); a_op(1, RBX, RCX);
    a_op(1, R8, R8);
    l1 = pc_asm; a_jxx(4, 0); a_op(3, R10, R11); patch64(l1 + 1, pc_asm);
    a_op(0, R8, R9);
    a_irmovq('h1F00, RSP); a_call('h800); a_op(0, RAX, RBX);
    a_halt();
    pc_asm = 'h800; a_irmovq(42, RAX); a_ret();
    run_y86("lecture examples");
    // the addq pipeline ran with them: check its example result
    check(dut.u_addq.u_rf.regs[9] == 64'd1700, "addq: R9 = 1700");
    check(dut.u_addq.u_rf.regs[8] == 64'd2500, "addq: R8 = 2500");
    check(dut.u_addq.u_rf.regs[10] == 64'd2700, "addq: R10 = 1000 + 1700");

    // ---------- Y86-64: the instruction-mix workload ----------
    ninstr = 1000;
    gen_mix(ninstr, nt, tk, nr);
    run_y86("instruction mix");
    cpi  = real'(last_cycles) / real'(r_instrs);
    want = 1.0 + 2.0 * real'(r_mispred) / real'(r_instrs) + 3.0 * real'(r_rets) / real'(r_instrs)
           + 4.0 / real'(r_instrs);
    $display("mix: %0d instructions (%0d not-taken jXX, %0d taken jXX, %0d ret), %0d cycles, CPI %0.3f (model %0.3f, lecture 1.09)",
             r_instrs, r_mispred, tk, r_rets, last_cycles, cpi, want);
    check(r_mispred == nt, "mix: every je was not taken");
    check(cpi > 1.09 - 0.03 + 5.0 / real'(r_instrs) && cpi < 1.09 + 0.03 + 5.0 / real'(r_instrs),
          $sformatf("mix: CPI %0.3f not near 1.09", cpi));

    $display("events: load_use=%0d mispredict=%0d ret_stall=%0d forward=%0d addq_fwd_e=%0d addq_fwd_w=%0d exceptions=%0d",
             n_load_use, n_mispredict, n_ret_stall, n_forward, n_addq_fwd_e, n_addq_fwd_w, n_exception);
    check(n_load_use > 0,   "load/use stall never happened");
    check(n_mispredict > 0, "squash never happened");
    check(n_ret_stall > 0,  "ret stall never happened");
    check(n_forward > 0,    "Y86 forwarding never happened");
    check(n_addq_fwd_e > 0, "addq forwarding from execute never happened");
    check(n_addq_fwd_w > 0, "addq forwarding from writeback never happened");
    check(n_exception > 0,  "halt never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
