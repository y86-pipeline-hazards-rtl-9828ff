// pipe_reg: one pipeline register bank with built-in stall and bubble muxes.
//
// Every register bank of the pipeline is this module. On each rising clock
// edge the bank does one of three things:
//   normal (stall=0, bubble=0): load the register input d
//   stall  (stall=1)          : keep its old value
//   bubble (bubble=1)         : load the bank's default value DEFAULT
// Asking for stall and bubble in the same cycle is a control error, flagged
// by an assertion; if it happens anyway, stall wins. Reset (synchronous,
// active high) also loads DEFAULT, so a bank comes out of reset holding a
// bubble. q is the registered output, valid for the whole cycle after the
// edge.
//
// The three behaviours and the use of a per-bank default value follow the
// lecture; the reset input, the priority when both controls are set and the
// assertion are this design's own choices.
module pipe_reg #(
  parameter type T       = logic [7:0],
  parameter T    DEFAULT = '1
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst)          q <= DEFAULT;
    else if (stall)   q <= q;
    else if (bubble)  q <= DEFAULT;
    else              q <= d;
  end

  // a bank is never told to both hold and clear in the same cycle
  assert property (@(posedge clk) disable iff (rst) !(stall && bubble))
    else $error("pipe_reg: stall and bubble asserted together");

endmodule
