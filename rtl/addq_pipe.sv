// addq_pipe: the small addq-only pipeline used to introduce forwarding.
//
// Four stages: fetch, decode, execute, writeback. Every instruction is an
// addq rA, rB of two bytes (byte 0 is the opcode and is not looked at, byte 1
// holds rA in its high and rB in its low nibble), so fetch simply reads two
// bytes at PC and the next PC is PC + 2. Decode reads R[rA] and R[rB] from
// the register file; execute adds them; writeback writes the sum to rB
// (dstE). The register file's dstM write port is unused (tied to 0xF).
//
// Without help, an addq that uses the result of the addq just before it
// would read the old register value. Forwarding muxes in decode fix that:
//   srcX == e_dstE : take the adder output e_valE (instruction in execute)
//   srcX == W_dstE : take W_valE (instruction in writeback, whose register
//                    write lands only at the end of the cycle)
//   otherwise      : the register file
// so a dependent addq never waits. Each pipeline register is a pipe_reg with
// stall and bubble held low; reset loads its default (dstE = 0xF, no write)
// and sets register i to 100*i, as in the lecture's example (%r8 = 800,
// %r9 = 900).
//
// Interface: while rst is held, a program may be written into the
// IMEM_BYTES-byte instruction memory one byte per cycle (load_*). After
// reset one instruction is fetched per cycle. wb_valid/wb_dst/wb_val show
// the register write of the instruction in writeback; fwd_e/fwd_w are set
// when a decode operand comes from execute or from writeback.
//
// The datapath (PC, add 2, instruction memory, split, register file with
// srcA/srcB/dstM/dstE ports, adder, forwarding mux with the e_dstE
// condition) is the one drawn in the lecture. The writeback forwarding path,
// the instruction memory size and the load port are this design's own.
module addq_pipe #(
  parameter int unsigned IMEM_BYTES = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [7:0]  load_addr,
  input  logic [7:0]  load_data,
  output logic [63:0] pc,
  output logic        wb_valid,
  output logic [3:0]  wb_dst,
  output logic [63:0] wb_val,
  output logic        fwd_e,
  output logic        fwd_w
);

  localparam logic [3:0] RNONE = 4'hF;
  localparam int unsigned AW = $clog2(IMEM_BYTES);

  typedef struct packed { logic [3:0] rb; logic [3:0] ra; } fd_t;
  typedef struct packed { logic [63:0] vala; logic [63:0] valb; logic [3:0] dste; } de_t;
  typedef struct packed { logic [63:0] vale; logic [3:0] dste; } ew_t;

  localparam fd_t FD_DEFAULT = '{rb: RNONE, ra: RNONE};
  localparam de_t DE_DEFAULT = '{vala: '0, valb: '0, dste: RNONE};
  localparam ew_t EW_DEFAULT = '{vale: '0, dste: RNONE};

  logic [7:0]  imem [IMEM_BYTES];
  logic [63:0] pc_q, pc_d;
  fd_t         fd_q, fd_d;
  de_t         de_q, de_d;
  ew_t         ew_q, ew_d;
  logic [63:0] rval_a, rval_b, e_vale;

  // ---- instruction memory ----
  always_ff @(posedge clk)
    if (load_we && 32'(load_addr) < IMEM_BYTES) imem[AW'(load_addr)] <= load_data;

  // ---- fetch: PC, add 2, split ----
  assign pc_d = pc_q + 64'd2;
  always_comb begin
    {fd_d.ra, fd_d.rb} = imem[AW'(pc_q) + AW'(1)];
  end

  pipe_reg #(.T(logic [63:0]), .DEFAULT('0)) u_pc (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(1'b0), .d(pc_d), .q(pc_q));
  pipe_reg #(.T(fd_t), .DEFAULT(FD_DEFAULT)) u_fd (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(1'b0), .d(fd_d), .q(fd_q));

  // ---- decode: register file and forwarding muxes ----
  y86_regfile #(.INIT_STEP(64'd100)) u_rf (
    .clk   (clk),
    .rst   (rst),
    .src_a (fd_q.ra),
    .src_b (fd_q.rb),
    .rval_a(rval_a),
    .rval_b(rval_b),
    .dst_e (ew_q.dste),
    .val_e (ew_q.vale),
    .dst_m (RNONE),
    .val_m ('0)
  );

  logic a_from_e, b_from_e, a_from_w, b_from_w;
  always_comb begin
    a_from_e = (fd_q.ra != RNONE) && (fd_q.ra == de_q.dste);
    b_from_e = (fd_q.rb != RNONE) && (fd_q.rb == de_q.dste);
    a_from_w = (fd_q.ra != RNONE) && (fd_q.ra == ew_q.dste);
    b_from_w = (fd_q.rb != RNONE) && (fd_q.rb == ew_q.dste);

    de_d.vala = a_from_e ? e_vale : a_from_w ? ew_q.vale : rval_a;
    de_d.valb = b_from_e ? e_vale : b_from_w ? ew_q.vale : rval_b;
    de_d.dste = fd_q.rb;
  end

  pipe_reg #(.T(de_t), .DEFAULT(DE_DEFAULT)) u_de (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(1'b0), .d(de_d), .q(de_q));

  // ---- execute: ADD ----
  assign e_vale    = de_q.vala + de_q.valb;
  assign ew_d.vale = e_vale;
  assign ew_d.dste = de_q.dste;

  pipe_reg #(.T(ew_t), .DEFAULT(EW_DEFAULT)) u_ew (
    .clk(clk), .rst(rst), .stall(1'b0), .bubble(1'b0), .d(ew_d), .q(ew_q));

  // ---- outputs ----
  assign pc       = pc_q;
  assign wb_valid = (ew_q.dste != RNONE) && !rst;
  assign wb_dst   = ew_q.dste;
  assign wb_val   = ew_q.vale;
  assign fwd_e    = (a_from_e || b_from_e) && !rst;
  assign fwd_w    = ((a_from_w && !a_from_e) || (b_from_w && !b_from_e)) && !rst;

endmodule
