// y86_pipe_tb: self-checking testbench of the five-stage Y86-64 pipeline.
//
// Each test assembles a program (y86_tb_pkg), loads it through the load
// port while reset is held, runs the pipeline until its status leaves AOK,
// and compares against the reference model: final status, all 15
// registers, the condition codes, the data and stack areas of memory, and
// the exact cycle in which the last instruction reaches writeback (which
// checks the hazard costs: 2 cycles per wrong jXX guess, 3 per ret, 1 per
// load/use). Directed programs come from the lecture's examples
// (forwarding paths, multiple forwarding, load/use, speculation right and
// wrong, call/ret); then random programs follow. Five short programs are
// also traced cycle by cycle: the icode held by every stage is compared with
// the published timing tables (ret stall, right and wrong jXX guess, a
// forwarding chain without stalls, and a load/use stall). The testbench
// counts how often each hazard mechanism acted and fails if one never did.
module y86_pipe_tb;
  import y86_pkg::*;
  import y86_tb_pkg::*;

  logic        clk = 0;
  logic        rst = 1;
  logic        load_we = 0;
  logic [63:0] load_addr = '0;
  logic [7:0]  load_data = '0;
  stat_t       stat;
  logic        retired;
  word_t       pc;
  cc_t         cc;
  logic        ev_load_use, ev_mispredict, ev_ret_stall, ev_forward;

  int checks = 0, failures = 0;
  int n_load_use = 0, n_mispredict = 0, n_ret_stall = 0, n_forward = 0;

  y86_pipe #(.MEM_BYTES(MEMSZ)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
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

  // load img, run, compare with the reference model
  task automatic run_test(string name, int max_cycles = 5000);
    int cyc, halt_cyc, instrs;
    rst = 1;
    for (int a = 0; a < MEMSZ; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = 64'(a); load_data = img[a];
    end
    @(negedge clk);
    load_we = 0;
    @(posedge clk);   // reset edge with the program in place
    #1 rst = 0;
    ref_run(100000);
    cyc = 0; halt_cyc = -1; instrs = 0;
    while (cyc < max_cycles) begin
      @(negedge clk);
      if (stat != STAT_AOK) begin halt_cyc = cyc; break; end
      instrs += int'(retired);
      n_load_use   += int'(ev_load_use);
      n_mispredict += int'(ev_mispredict);
      n_ret_stall  += int'(ev_ret_stall);
      n_forward    += int'(ev_forward);
      cyc++;
    end
    check(int'(stat) == r_stat, $sformatf("%s: status %0d expected %0d", name, stat, r_stat));
    check(halt_cyc == ref_cycles(),
          $sformatf("%s: stopped in cycle %0d expected %0d (instrs %0d mispred %0d rets %0d loaduse %0d)",
                    name, halt_cyc, ref_cycles(), r_instrs, r_mispred, r_rets, r_loaduse));
    check(instrs == r_instrs, $sformatf("%s: retired %0d expected %0d", name, instrs, r_instrs));
    for (int r = 0; r < 15; r++)
      check(dut.u_rf.regs[r] == rregs[r],
            $sformatf("%s: reg %0d = %0h expected %0h", name, r, dut.u_rf.regs[r], rregs[r]));
    check(cc == '{zf: rzf, sf: rsf, of: rof}, $sformatf("%s: condition codes", name));
    for (int a = 'h1000; a < MEMSZ; a++)
      if (dut.u_mem.mem[a] != rmem[a]) begin
        check(0, $sformatf("%s: mem[%0h] = %0h expected %0h", name, a, dut.u_mem.mem[a], rmem[a]));
        break;
      end
  endtask

  // ---------- stage-by-stage traces ----------
  // icodes per stage: fetch (f_icode), decode, execute, memory, writeback;
  // I_NOP in D..W stands for a bubble
  typedef icode_t row_t [5];

  task automatic load_and_start();
    rst = 1;
    for (int a = 0; a < MEMSZ; a++) begin
      @(negedge clk);
      load_we = 1; load_addr = 64'(a); load_data = img[a];
    end
    @(negedge clk);
    load_we = 0;
    @(posedge clk);
    #1 rst = 0;
  endtask

  // compare the stages in cycles first..first+n-1 with rows[]
  task automatic trace(string name, int first, row_t rows [$]);
    load_and_start();
    for (int c = 0; c < first + rows.size(); c++) begin
      @(negedge clk);
      if (c >= first) begin
        row_t got;
        got[0] = dut.f_icode;  got[1] = dut.d_q.icode; got[2] = dut.e_q.icode;
        got[3] = dut.m_q.icode; got[4] = dut.w_q.icode;
        for (int st = 0; st < 5; st++)
          check(got[st] == rows[c - first][st],
                $sformatf("%s: cycle %0d stage %0d icode %0d expected %0d",
                          name, c - first, st, got[st], rows[c - first][st]));
      end
    end
  endtask

  // ---------- random program generator ----------
  int pool[13] = '{RAX, RCX, RDX, RBX, RSI, RDI, R8, R9, R10, R11, R12, R13, R14};

  function automatic int rreg();   return pool[$urandom_range(12)]; endfunction
  function automatic int anyreg(); int r = $urandom_range(14); return r; endfunction

  function automatic void gen_simple();
    case ($urandom_range(3))
      0: a_op($urandom_range(3), anyreg(), rreg());
      1: a_irmovq({$urandom, $urandom}, rreg());
      2: a_cmov($urandom_range(6), anyreg(), rreg());
      default: a_op($urandom_range(3), rreg(), rreg());
    endcase
  endfunction

  function automatic void gen_random(int n);
    asm_clear();
    // subroutine at 0xC00: rdi += rax
    pc_asm = 'hC00;
    a_op(0, RAX, RDI);
    a_ret();
    pc_asm = 0;
    foreach (pool[i]) a_irmovq({$urandom, $urandom}, pool[i]);
    a_irmovq('h1F00, RSP);
    a_irmovq('h1000, RBP);
    for (int i = 0; i < n; i++) begin
      case ($urandom_range(9))
        0, 1, 2: gen_simple();
        3: a_mrmovq(8 * $urandom_range(31), RBP, rreg());
        4: a_rmmovq(anyreg(), 8 * $urandom_range(31), RBP);
        5: begin
             longint unsigned at;
             int k = $urandom_range(1, 3);
             at = pc_asm;
             a_jxx($urandom_range(6), 0);
             for (int j = 0; j < k; j++) gen_simple();
             patch64(at + 1, pc_asm);
           end
        6: begin a_pushq(anyreg()); gen_simple(); a_popq(rreg()); end
        7: a_call('hC00);
        8: begin a_mrmovq(8 * $urandom_range(31), RBP, rreg()); gen_simple(); end
        default: a_op($urandom_range(3), rreg(), rreg());
      endcase
    end
    a_halt();
  endfunction

  initial begin
    longint unsigned l1, l2;

    // 1: forwarding paths (lecture example), register values 100*n
    asm_clear();
    a_irmovq(800, R8); a_irmovq(900, R9); a_irmovq('h1000 + 1700 - 4 + 4, R11);
    a_irmovq(1100, R10);
    a_op(0, R8, R9);             // addq %r8, %r9
    a_op(1, R9, R11);            // subq %r9, %r11
    a_mrmovq(4, R11, R10);       // mrmovq 4(%r11), %r10
    a_rmmovq(R9, 8, R11);        // rmmovq %r9, 8(%r11)
    a_op(3, R10, R9);            // xorq %r10, %r9
    a_halt();
    run_test("forwarding paths");

    // 2: multiple forwarding paths (1) and (2)
    asm_clear();
    a_irmovq(1000, R10); a_irmovq(1100, R11); a_irmovq(1200, R12); a_irmovq(800, R8);
    a_op(0, R10, R8); a_op(0, R11, R8); a_op(0, R12, R8);
    a_op(0, R10, R8); a_op(0, R11, R12); a_op(0, R12, R8);
    a_halt();
    run_test("multiple forwarding");

    // 3: load/use (unsolved and solvable problem: both stall here)
    asm_clear();
    a_irmovq('h1000, RAX); a_irmovq('h1100, RCX); a_irmovq(5, RDX);
    a_rmmovq(RDX, 0, RAX);
    a_mrmovq(0, RAX, RBX); a_op(1, RBX, RCX);
    a_mrmovq(0, RAX, RBX); a_rmmovq(RBX, 0, RCX);
    a_halt();
    run_test("load/use");

    // 4: speculating wrong (jne not taken) and right (je taken)
    asm_clear();
    a_irmovq(7, R8); a_irmovq(3, R10); a_irmovq(4, R11);
    a_op(1, R8, R8);             // subq %r8, %r8 -> ZF
    l1 = pc_asm; a_jxx(4, 0);    // jne LABEL (not taken)
    a_op(3, R10, R11);           // xorq %r10, %r11
    a_op(3, R12, R13);
    patch64(l1 + 1, pc_asm);
    a_op(0, R8, R9);             // LABEL: addq %r8, %r9
    a_rmmovq(R10, 'h1000, R11);
    a_op(1, R8, R8);
    l2 = pc_asm; a_jxx(3, 0);    // je (taken)
    a_irmovq(99, R12);
    patch64(l2 + 1, pc_asm);
    a_irmovq(1, R11);
    a_halt();
    run_test("speculation");

    // 5: call / ret, then a counted loop with a backward taken jump
    asm_clear();
    a_irmovq('h1F00, RSP);
    a_call('h400);
    a_op(0, RAX, RBX);
    a_irmovq(5, RCX); a_irmovq(1, RDX); a_irmovq(0, RSI);
    l1 = pc_asm;
    a_op(0, RCX, RSI);           // sum += n
    a_op(1, RDX, RCX);           // n--
    a_jxx(4, l1);                // jne loop
    a_pushq(RSI); a_popq(R14);
    a_cmov(3, RSI, R13);         // cmove (taken: ZF set)
    a_cmov(4, RSI, R12);         // cmovne (not taken)
    a_halt();
    pc_asm = 'h400;
    a_irmovq(42, RAX);
    a_ret();
    run_test("call/ret/loop");

    // 5a: dependencies and hazards: two short examples run back to back
    asm_clear();
    a_irmovq(3, RAX); a_irmovq(5, RBX); a_irmovq(9, R10);
    a_op(0, RAX, RBX);           // addq %rax, %rbx
    a_op(1, RAX, RCX);           // subq %rax, %rcx
    a_irmovq(100, RCX);          // irmovq $100, %rcx
    a_op(0, RCX, R10);           // addq %rcx, %r10 (forwarded from M)
    a_op(0, RBX, R10);           // addq %rbx, %r10
    a_irmovq('h1000, RAX); a_irmovq('h100, RDX);
    a_rmmovq(RDX, 0, RAX);
    a_mrmovq(0, RAX, RBX);       // mrmovq 0(%rax), %rbx
    a_op(0, RBX, RCX);           // addq %rbx, %rcx (load/use)
    l1 = pc_asm; a_jxx(4, 0);    // jne foo
    patch64(l1 + 1, pc_asm);
    a_op(0, RCX, RDX);           // foo: addq %rcx, %rdx
    a_mrmovq(0, RDX, RCX);       // mrmovq (%rdx), %rcx
    a_halt();
    run_test("dependencies and hazards");

    // 5b: trace of the ret stall: call, then ret, then the instruction after
    // the call (rows: fetch, decode, execute, memory, writeback)
    asm_clear();
    a_irmovq('h1F00, RSP);
    a_call('h400);               // fetched in cycle 1
    a_op(0, RAX, RBX);
    a_halt();
    pc_asm = 'h400;
    a_ret();
    trace("ret stall trace", 1, '{
      '{I_CALL,   I_IRMOVQ, I_NOP,    I_NOP,  I_NOP},
      '{I_RET,    I_CALL,   I_IRMOVQ, I_NOP,  I_NOP},
      '{I_RET,    I_RET,    I_CALL,   I_IRMOVQ, I_NOP},   // waiting for ret
      '{I_RET,    I_NOP,    I_RET,    I_CALL, I_IRMOVQ},
      '{I_RET,    I_NOP,    I_NOP,    I_RET,  I_CALL},
      '{I_OPQ,    I_NOP,    I_NOP,    I_NOP,  I_RET}});

    // 5c: trace of a wrong guess: subq; jne LABEL (not taken); xorq ...
    // LABEL: addq; rmmovq
    asm_clear();
    a_op(1, R8, R8);
    a_jxx(4, 'h100);
    a_op(3, R10, R11);
    a_halt();
    pc_asm = 'h100;
    a_op(0, R8, R9);
    a_rmmovq(R10, 0, R11);
    a_halt();
    trace("squash trace", 0, '{
      '{I_OPQ,    I_NOP,    I_NOP,    I_NOP,  I_NOP},
      '{I_JXX,    I_OPQ,    I_NOP,    I_NOP,  I_NOP},
      '{I_OPQ,    I_JXX,    I_OPQ,    I_NOP,  I_NOP},     // addq [?]
      '{I_RMMOVQ, I_OPQ,    I_JXX,    I_OPQ,  I_NOP},     // rmmovq [?], jne uses ZF
      '{I_OPQ,    I_NOP,    I_NOP,    I_JXX,  I_OPQ}});   // xorq, squashed

    // 5d: trace of a right guess: the jne is taken, nothing is squashed
    asm_clear();
    a_irmovq(1, RCX);
    a_op(1, RCX, RAX);           // %rax = -1, ZF = 0
    a_jxx(4, 'h100);
    a_op(3, R10, R11);
    a_halt();
    pc_asm = 'h100;
    a_op(0, R8, R9);
    a_rmmovq(R10, 0, R11);
    a_irmovq(1, R11);
    a_halt();
    trace("right guess trace", 1, '{
      '{I_OPQ,    I_IRMOVQ, I_NOP,    I_NOP,    I_NOP},
      '{I_JXX,    I_OPQ,    I_IRMOVQ, I_NOP,    I_NOP},
      '{I_OPQ,    I_JXX,    I_OPQ,    I_IRMOVQ, I_NOP},
      '{I_RMMOVQ, I_OPQ,    I_JXX,    I_OPQ,    I_IRMOVQ},
      '{I_IRMOVQ, I_RMMOVQ, I_OPQ,    I_JXX,    I_OPQ}});

    // 5e: five dependent instructions, every value forwarded, no stall
    // (xorq reads %r10 loaded two instructions earlier)
    asm_clear();
    a_op(0, R8, R9);
    a_op(1, R9, R11);
    a_mrmovq(4, R11, R10);
    a_rmmovq(R9, 8, R11);
    a_op(3, R10, R9);
    a_halt();
    trace("forwarding trace", 0, '{
      '{I_OPQ,    I_NOP,    I_NOP,    I_NOP,    I_NOP},
      '{I_OPQ,    I_OPQ,    I_NOP,    I_NOP,    I_NOP},
      '{I_MRMOVQ, I_OPQ,    I_OPQ,    I_NOP,    I_NOP},
      '{I_RMMOVQ, I_MRMOVQ, I_OPQ,    I_OPQ,    I_NOP},
      '{I_OPQ,    I_RMMOVQ, I_MRMOVQ, I_OPQ,    I_OPQ},
      '{I_HALT,   I_OPQ,    I_RMMOVQ, I_MRMOVQ, I_OPQ},
      '{I_HALT,   I_HALT,   I_OPQ,    I_RMMOVQ, I_MRMOVQ}});

    // 5f: load/use: subq waits one cycle in decode (F D D E M W)
    asm_clear();
    a_mrmovq(0, RAX, RBX);
    a_op(1, RBX, RCX);
    a_halt();
    trace("load/use trace", 0, '{
      '{I_MRMOVQ, I_NOP,    I_NOP,    I_NOP,    I_NOP},
      '{I_OPQ,    I_MRMOVQ, I_NOP,    I_NOP,    I_NOP},
      '{I_HALT,   I_OPQ,    I_MRMOVQ, I_NOP,    I_NOP},
      '{I_HALT,   I_OPQ,    I_NOP,    I_MRMOVQ, I_NOP},
      '{I_HALT,   I_HALT,   I_OPQ,    I_NOP,    I_MRMOVQ}});

    // 6: exceptions: invalid instruction and bad address
    asm_clear();
    a_irmovq(1, RAX);
    emit(8'hF0);                 // invalid instruction
    a_irmovq(2, RAX);
    a_halt();
    run_test("invalid instruction");
    asm_clear();
    a_irmovq(64'h7000_0000, RBX);
    a_irmovq(3, RCX);
    a_rmmovq(RCX, 0, RBX);       // address out of range
    a_irmovq(4, RCX);
    a_halt();
    run_test("bad address");

    // 7: random programs
    for (int t = 0; t < 25; t++) begin
      gen_random(80);
      run_test($sformatf("random %0d", t));
    end

    $display("events: load_use=%0d mispredict=%0d ret_stall=%0d forward=%0d",
             n_load_use, n_mispredict, n_ret_stall, n_forward);
    check(n_load_use > 0,   "load/use stall never happened");
    check(n_mispredict > 0, "misprediction never happened");
    check(n_ret_stall > 0,  "ret stall never happened");
    check(n_forward > 0,    "forwarding never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
