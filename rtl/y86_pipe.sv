// y86_pipe: five-stage pipelined Y86-64 processor
// (fetch, decode, execute, memory, writeback).
//
// One instruction completes every cycle except around hazards:
//   - most data hazards are solved by forwarding into decode (y86_decode);
//   - a load followed at once by a use of the loaded register stalls 1 cycle;
//   - a jXX is guessed taken; a wrong guess is squashed when the jXX leaves
//     execute, costing 2 cycles;
//   - a ret stalls fetch for 3 cycles, until its return address has been read.
// Every pipeline register bank is a pipe_reg with stall and bubble inputs
// driven by y86_control. Register writes happen in writeback, memory writes
// in memory, condition-code writes in execute; fetch and decode change
// nothing but pipeline registers, so squashing the two youngest
// instructions undoes them completely.
//
// Interface: rst (synchronous, active high) empties the pipeline and sets
// the PC to 0. While rst is held a program may be written into memory one
// byte per cycle through load_we/load_addr/load_data. stat is the status of
// the instruction in writeback (AOK while running or when writeback holds a
// bubble; HLT, ADR or INS once the machine has stopped). retired is set in
// each cycle in which an instruction moves from memory into writeback. The
// event outputs (ev_*) are set in each cycle in which the corresponding
// hazard mechanism acts.
//
// The stage structure, the hazard rules and their costs follow the lecture;
// the instruction encodings, the status handling and the memory organisation
// are the standard Y86-64 ones or this design's own (see the submodules).
module y86_pipe
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  output stat_t       stat,
  output logic        retired,
  output word_t       pc,          // PC being fetched
  output cc_t         cc,
  // hazard events
  output logic        ev_load_use,
  output logic        ev_mispredict,
  output logic        ev_ret_stall,
  output logic        ev_forward
);

  // pipeline registers
  f_reg_t f_q, f_d;
  d_reg_t d_q, d_d;
  e_reg_t e_q, e_d;
  m_reg_t m_q, m_d;
  w_reg_t w_q, w_d;

  // control
  logic f_stall, f_take_ret, f_take_fix, d_stall, d_bubble, e_bubble;
  logic m_bubble, w_stall, set_cc, load_use, mispredict, ret_wait;

  // fetch
  logic [63:0] fetch_addr;
  logic [79:0] fetch_bytes;
  logic        fetch_err;
  word_t       f_pred_pc;
  icode_t      f_icode;

  // decode / register file
  logic [3:0]  d_srca, d_srcb;
  logic        fwd_a, fwd_b;
  word_t       rval_a, rval_b;

  // execute
  logic        e_cnd;
  logic [3:0]  e_dste;
  word_t       e_vale;

  // memory
  logic [63:0] mem_addr;
  logic        mem_re, mem_we, mem_err;
  word_t       mem_wdata, mem_rdata, m_valm;
  stat_t       m_stat;

  // ---------------- memory and register file ----------------
  y86_memory #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk        (clk),
    .fetch_addr (fetch_addr),
    .fetch_bytes(fetch_bytes),
    .fetch_err  (fetch_err),
    .data_addr  (mem_addr),
    .data_re    (mem_re),
    .data_we    (mem_we && !rst),
    .data_wdata (mem_wdata),
    .data_rdata (mem_rdata),
    .data_err   (mem_err),
    .load_we    (load_we),
    .load_addr  (load_addr),
    .load_data  (load_data)
  );

  y86_regfile u_rf (
    .clk   (clk),
    .rst   (rst),
    .src_a (d_srca),
    .src_b (d_srcb),
    .rval_a(rval_a),
    .rval_b(rval_b),
    .dst_e (w_q.dste),
    .val_e (w_q.vale),
    .dst_m (w_q.dstm),
    .val_m (w_q.valm)
  );

  // ---------------- F ----------------
  always_comb begin
    if (f_take_fix)      f_d.pred_pc = e_q.vala;
    else if (f_take_ret) f_d.pred_pc = m_valm;
    else                 f_d.pred_pc = f_pred_pc;
  end

  pipe_reg #(.T(f_reg_t), .DEFAULT('0)) u_freg (
    .clk(clk), .rst(rst), .stall(f_stall), .bubble(1'b0), .d(f_d), .q(f_q));

  y86_fetch u_fetch (
    .f_reg      (f_q),
    .fetch_addr (fetch_addr),
    .fetch_bytes(fetch_bytes),
    .fetch_err  (fetch_err),
    .d_next     (d_d),
    .pred_pc    (f_pred_pc),
    .f_icode    (f_icode)
  );

  // ---------------- D ----------------
  pipe_reg #(.T(d_reg_t), .DEFAULT(D_BUBBLE)) u_dreg (
    .clk(clk), .rst(rst), .stall(d_stall), .bubble(d_bubble), .d(d_d), .q(d_q));

  y86_decode u_decode (
    .d_reg (d_q),
    .src_a (d_srca),
    .src_b (d_srcb),
    .rval_a(rval_a),
    .rval_b(rval_b),
    .e_dste(e_dste),
    .e_vale(e_vale),
    .m_dstm(m_q.dstm),
    .m_valm(m_valm),
    .m_dste(m_q.dste),
    .m_vale(m_q.vale),
    .w_dstm(w_q.dstm),
    .w_valm(w_q.valm),
    .w_dste(w_q.dste),
    .w_vale(w_q.vale),
    .e_next(e_d),
    .fwd_a (fwd_a),
    .fwd_b (fwd_b)
  );

  // ---------------- E ----------------
  pipe_reg #(.T(e_reg_t), .DEFAULT(E_BUBBLE)) u_ereg (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(e_bubble), .d(e_d), .q(e_q));

  y86_execute u_execute (
    .clk   (clk),
    .rst   (rst),
    .e_reg (e_q),
    .set_cc(set_cc),
    .e_cnd (e_cnd),
    .e_dste(e_dste),
    .e_vale(e_vale),
    .m_next(m_d),
    .cc_q  (cc)
  );

  // ---------------- M ----------------
  pipe_reg #(.T(m_reg_t), .DEFAULT(M_BUBBLE)) u_mreg (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(m_bubble), .d(m_d), .q(m_q));

  y86_memstage u_memstage (
    .m_reg    (m_q),
    .mem_addr (mem_addr),
    .mem_re   (mem_re),
    .mem_we   (mem_we),
    .mem_wdata(mem_wdata),
    .mem_rdata(mem_rdata),
    .mem_err  (mem_err),
    .m_valm   (m_valm),
    .m_stat   (m_stat),
    .w_next   (w_d)
  );

  // ---------------- W ----------------
  pipe_reg #(.T(w_reg_t), .DEFAULT(W_BUBBLE)) u_wreg (
    .clk(clk), .rst(rst), .stall(w_stall), .bubble(1'b0), .d(w_d), .q(w_q));

  // ---------------- control ----------------
  y86_control u_ctrl (
    .f_icode   (f_icode),
    .d_icode   (d_q.icode),
    .d_srca    (d_srca),
    .d_srcb    (d_srcb),
    .e_icode   (e_q.icode),
    .e_dstm    (e_q.dstm),
    .e_cnd     (e_cnd),
    .m_icode   (m_q.icode),
    .m_stat    (m_stat),
    .w_stat    (w_q.stat),
    .f_stall   (f_stall),
    .f_take_ret(f_take_ret),
    .f_take_fix(f_take_fix),
    .d_stall   (d_stall),
    .d_bubble  (d_bubble),
    .e_bubble  (e_bubble),
    .m_bubble  (m_bubble),
    .w_stall   (w_stall),
    .set_cc    (set_cc),
    .load_use  (load_use),
    .mispredict(mispredict),
    .ret_wait  (ret_wait)
  );

  // ---------------- status and events ----------------
  assign stat    = (w_q.stat == STAT_BUB) ? STAT_AOK : w_q.stat;
  assign retired = (w_d.stat != STAT_BUB) && !w_stall && !rst;
  assign pc      = f_q.pred_pc;

  assign ev_load_use   = load_use && !rst;
  assign ev_mispredict = mispredict && !rst;
  assign ev_ret_stall  = ret_wait && d_bubble && !mispredict && !rst;
  // a decode operand taken from the pipeline instead of the register file
  assign ev_forward    = !rst && (fwd_a || fwd_b) && !d_stall && !d_bubble;

endmodule
