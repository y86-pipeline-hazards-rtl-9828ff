// hazards_top: the two pipelines of this design side by side.
//
//   y86    : the five-stage Y86-64 pipeline (y86_pipe) with stall/bubble
//            pipeline registers, taken-branch prediction with squashing,
//            ret stalls, load/use stalls and forwarding.
//   addq   : the four-stage addq-only pipeline (addq_pipe) that shows the
//            forwarding paths on their own.
// The two share only the clock and reset; each has its own program load
// port and its own status and event outputs, brought out unchanged (see the
// two modules for their timing).
module hazards_top
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES  = 8192,
  parameter int unsigned IMEM_BYTES = 256
) (
  input  logic        clk,
  input  logic        rst,
  // Y86-64 pipeline
  input  logic        y86_load_we,
  input  logic [63:0] y86_load_addr,
  input  logic [7:0]  y86_load_data,
  output stat_t       y86_stat,
  output logic        y86_retired,
  output logic [63:0] y86_pc,
  output cc_t         y86_cc,
  output logic        y86_ev_load_use,
  output logic        y86_ev_mispredict,
  output logic        y86_ev_ret_stall,
  output logic        y86_ev_forward,
  // addq pipeline
  input  logic        addq_load_we,
  input  logic [7:0]  addq_load_addr,
  input  logic [7:0]  addq_load_data,
  output logic [63:0] addq_pc,
  output logic        addq_wb_valid,
  output logic [3:0]  addq_wb_dst,
  output logic [63:0] addq_wb_val,
  output logic        addq_fwd_e,
  output logic        addq_fwd_w
);

  y86_pipe #(.MEM_BYTES(MEM_BYTES)) u_y86 (
    .clk          (clk),
    .rst          (rst),
    .load_we      (y86_load_we),
    .load_addr    (y86_load_addr),
    .load_data    (y86_load_data),
    .stat         (y86_stat),
    .retired      (y86_retired),
    .pc           (y86_pc),
    .cc           (y86_cc),
    .ev_load_use  (y86_ev_load_use),
    .ev_mispredict(y86_ev_mispredict),
    .ev_ret_stall (y86_ev_ret_stall),
    .ev_forward   (y86_ev_forward)
  );

  addq_pipe #(.IMEM_BYTES(IMEM_BYTES)) u_addq (
    .clk      (clk),
    .rst      (rst),
    .load_we  (addq_load_we),
    .load_addr(addq_load_addr),
    .load_data(addq_load_data),
    .pc       (addq_pc),
    .wb_valid (addq_wb_valid),
    .wb_dst   (addq_wb_dst),
    .wb_val   (addq_wb_val),
    .fwd_e    (addq_fwd_e),
    .fwd_w    (addq_fwd_w)
  );

endmodule
