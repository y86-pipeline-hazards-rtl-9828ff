// y86_regfile: the Y86-64 register file, 15 registers of 64 bits.
//
// Two combinational read ports (srcA, srcB) and two write ports (dstE with
// valE, dstM with valM) written on the rising clock edge. Register number
// 0xF (REG_NONE) names no register: reading it returns 0 and writing it does
// nothing. If both write ports name the same register the dstM write wins
// (a popq %rsp keeps the loaded value). A read in the same cycle as a write
// to that register returns the old value: the pipeline forwards around that.
// Reset sets register i to i*INIT_STEP (0 by default).
//
// The port names (srcA, srcB, dstE, dstM, next R[dstE], next R[dstM]) are the
// ones drawn in the lecture's datapath figures. The register count and width
// are those of Y86-64; the write priority and reset are this design's own.
module y86_regfile #(
  parameter int unsigned NREGS = 15,
  parameter int unsigned WIDTH = 64,
  parameter logic [WIDTH-1:0] INIT_STEP = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       src_a,
  input  logic [3:0]       src_b,
  output logic [WIDTH-1:0] rval_a,
  output logic [WIDTH-1:0] rval_b,
  input  logic [3:0]       dst_e,
  input  logic [WIDTH-1:0] val_e,
  input  logic [3:0]       dst_m,
  input  logic [WIDTH-1:0] val_m
);

  logic [WIDTH-1:0] regs [NREGS];

  always_comb begin
    rval_a = (32'(src_a) < NREGS) ? regs[src_a] : '0;
    rval_b = (32'(src_b) < NREGS) ? regs[src_b] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= WIDTH'(i) * INIT_STEP;
    end else begin
      if (32'(dst_e) < NREGS) regs[dst_e] <= val_e;
      if (32'(dst_m) < NREGS) regs[dst_m] <= val_m;
    end
  end

endmodule
