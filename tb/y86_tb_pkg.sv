// y86_tb_pkg: testbench support for the Y86-64 pipeline.
//
// Two parts:
//   - a small assembler: functions that append the bytes of one Y86-64
//     instruction to the program image `img` at address `pc_asm`;
//   - an instruction-by-instruction reference model (ref_run) that executes
//     the image without any pipeline, producing the final registers,
//     condition codes, memory and status, and counting the events that
//     cost the pipeline cycles: not-taken jXX (2 cycles), ret (3 cycles)
//     and a load immediately followed by a use of the loaded register
//     (1 cycle). From these the expected cycle count of the pipeline is
//     instructions + 4 + 2*mispredicts + 3*rets + loaduses.
// The model is written from the instruction-set definition, independently
// of the RTL.
package y86_tb_pkg;

  localparam int MEMSZ = 8192;

  // ---------------- assembler ----------------
  byte unsigned img [MEMSZ];
  longint unsigned pc_asm;

  localparam int RAX = 0, RCX = 1, RDX = 2, RBX = 3, RSP = 4, RBP = 5,
                 RSI = 6, RDI = 7, R8 = 8, R9 = 9, R10 = 10, R11 = 11,
                 R12 = 12, R13 = 13, R14 = 14, RNONE = 15;

  function automatic void asm_clear();
    foreach (img[i]) img[i] = 8'h00;
    pc_asm = 0;
  endfunction

  function automatic void emit(byte unsigned b);
    img[pc_asm] = b;
    pc_asm++;
  endfunction

  function automatic void emit64(longint unsigned v);
    for (int i = 0; i < 8; i++) emit(byte'(v >> (8 * i)));
  endfunction

  // overwrite the 8-byte constant at address at (jump targets known later)
  function automatic void patch64(longint unsigned at, longint unsigned v);
    for (int i = 0; i < 8; i++) img[at + i] = byte'(v >> (8 * i));
  endfunction

  function automatic void a_halt();  emit(8'h00); endfunction
  function automatic void a_nop();   emit(8'h10); endfunction
  function automatic void a_cmov(int fn, int ra, int rb);
    emit(byte'(8'h20 | fn)); emit(byte'((ra << 4) | rb));
  endfunction
  function automatic void a_irmovq(longint unsigned v, int rb);
    emit(8'h30); emit(byte'(8'hF0 | rb)); emit64(v);
  endfunction
  function automatic void a_rmmovq(int ra, longint unsigned d, int rb);
    emit(8'h40); emit(byte'((ra << 4) | rb)); emit64(d);
  endfunction
  function automatic void a_mrmovq(longint unsigned d, int rb, int ra);
    emit(8'h50); emit(byte'((ra << 4) | rb)); emit64(d);
  endfunction
  function automatic void a_op(int fn, int ra, int rb);
    emit(byte'(8'h60 | fn)); emit(byte'((ra << 4) | rb));
  endfunction
  function automatic void a_jxx(int fn, longint unsigned dest);
    emit(byte'(8'h70 | fn)); emit64(dest);
  endfunction
  function automatic void a_call(longint unsigned dest);
    emit(8'h80); emit64(dest);
  endfunction
  function automatic void a_ret();   emit(8'h90); endfunction
  function automatic void a_pushq(int ra);
    emit(8'hA0); emit(byte'((ra << 4) | 4'hF));
  endfunction
  function automatic void a_popq(int ra);
    emit(8'hB0); emit(byte'((ra << 4) | 4'hF));
  endfunction

  // ---------------- reference model ----------------
  byte unsigned    rmem [MEMSZ];
  longint unsigned rregs [15];
  bit              rzf, rsf, rof;
  int              r_stat;      // 1 AOK, 2 HLT, 3 ADR, 4 INS
  int              r_instrs, r_mispred, r_rets, r_loaduse;

  function automatic longint unsigned rd64(longint unsigned a);
    longint unsigned v = 0;
    for (int i = 7; i >= 0; i--) v = (v << 8) | rmem[a + i];
    return v;
  endfunction

  function automatic void wr64(longint unsigned a, longint unsigned v);
    for (int i = 0; i < 8; i++) rmem[a + i] = byte'(v >> (8 * i));
  endfunction

  function automatic bit cond(int fn);
    case (fn)
      0: return 1;
      1: return (rsf ^ rof) | rzf;
      2: return rsf ^ rof;
      3: return rzf;
      4: return !rzf;
      5: return !(rsf ^ rof);
      6: return !(rsf ^ rof) && !rzf;
      default: return 0;
    endcase
  endfunction

  function automatic bit addr_ok(longint unsigned a);
    return a <= longint'(MEMSZ - 8);
  endfunction

  // registers read by an instruction (as the pipeline's decode chooses them)
  function automatic void srcs(int icode, int ra, int rb, output int sa, output int sb);
    sa = RNONE; sb = RNONE;
    if (icode inside {2, 4, 6, 'hA}) sa = ra;
    else if (icode inside {'hB, 9})  sa = RSP;
    if (icode inside {6, 4, 5})              sb = rb;
    else if (icode inside {'hA, 'hB, 8, 9})  sb = RSP;
  endfunction

  function automatic void ref_run(int max_steps);
    longint unsigned pc = 0;
    int last_load_dst = RNONE;
    foreach (rmem[i]) rmem[i] = img[i];
    foreach (rregs[i]) rregs[i] = 0;
    rzf = 1; rsf = 0; rof = 0;
    r_stat = 1; r_instrs = 0; r_mispred = 0; r_rets = 0; r_loaduse = 0;
    for (int step = 0; step < max_steps && r_stat == 1; step++) begin
      int icode, ifun, ra, rb, sa, sb, len;
      longint unsigned valc, a, b, r, valp;
      bit need_reg, need_c;
      if (pc > longint'(MEMSZ - 10)) begin r_stat = 3; r_instrs++; break; end
      icode = rmem[pc] >> 4; ifun = rmem[pc] & 15;
      if (icode > 'hB) begin r_stat = 4; r_instrs++; break; end
      need_reg = icode inside {2, 3, 4, 5, 6, 'hA, 'hB};
      need_c   = icode inside {3, 4, 5, 7, 8};
      ra = need_reg ? (rmem[pc + 1] >> 4) : RNONE;
      rb = need_reg ? (rmem[pc + 1] & 15) : RNONE;
      valc = 0;
      for (int i = 7; i >= 0; i--) valc = (valc << 8) | rmem[pc + (need_reg ? 2 : 1) + i];
      len = 1 + (need_reg ? 1 : 0) + (need_c ? 8 : 0);
      valp = pc + len;
      srcs(icode, ra, rb, sa, sb);
      if (last_load_dst != RNONE && (sa == last_load_dst || sb == last_load_dst))
        r_loaduse++;
      last_load_dst = RNONE;
      r_instrs++;
      case (icode)
        0: begin r_stat = 2; end
        1: pc = valp;
        2: begin if (cond(ifun)) rregs[rb] = rregs[ra]; pc = valp; end
        3: begin rregs[rb] = valc; pc = valp; end
        4: begin
             a = rregs[rb] + valc;
             if (!addr_ok(a)) r_stat = 3; else begin wr64(a, rregs[ra]); pc = valp; end
           end
        5: begin
             a = rregs[rb] + valc;
             if (!addr_ok(a)) r_stat = 3;
             else begin rregs[ra] = rd64(a); pc = valp; last_load_dst = ra; end
           end
        6: begin
             a = rregs[ra]; b = rregs[rb];
             case (ifun)
               0: r = b + a;
               1: r = b - a;
               2: r = b & a;
               3: r = b ^ a;
               default: r = 0;
             endcase
             rzf = (r == 0); rsf = r[63];
             rof = (ifun == 0) ? (a[63] == b[63] && r[63] != a[63]) :
                   (ifun == 1) ? (a[63] != b[63] && r[63] != b[63]) : 0;
             rregs[rb] = r; pc = valp;
           end
        7: begin
             if (cond(ifun)) pc = valc;
             else begin pc = valp; r_mispred++; end
           end
        8: begin
             a = rregs[RSP] - 8;
             if (!addr_ok(a)) r_stat = 3; else begin wr64(a, valp); rregs[RSP] = a; pc = valc; end
           end
        9: begin
             a = rregs[RSP];
             r_rets++;
             if (!addr_ok(a)) r_stat = 3; else begin pc = rd64(a); rregs[RSP] = a + 8; end
           end
        'hA: begin
             a = rregs[RSP] - 8;
             if (!addr_ok(a)) r_stat = 3; else begin wr64(a, rregs[ra]); rregs[RSP] = a; pc = valp; end
           end
        'hB: begin
             a = rregs[RSP];
             if (!addr_ok(a)) r_stat = 3;
             else begin rregs[RSP] = a + 8; rregs[ra] = rd64(a); pc = valp; last_load_dst = ra; end
           end
        default: r_stat = 4;
      endcase
    end
  endfunction

  // expected cycle (counted from the first cycle after reset, 0-based) in
  // which the last instruction reaches writeback
  function automatic int ref_cycles();
    return r_instrs - 1 + 4 + 2 * r_mispred + 3 * r_rets + r_loaduse;
  endfunction

endpackage
