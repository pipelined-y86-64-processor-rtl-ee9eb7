// pipe_reg: one pipeline register bank with built-in stall and bubble muxes.
//
// Every bank between two pipeline stages is one of these. On each rising
// clock edge it does one of three things:
//   normal (stall=0, bubble=0): q <= d            (take the new value)
//   stall  (stall=1)          : q <= q            (keep the old value)
//   bubble (bubble=1)         : q <= DEFAULT      (load the do-nothing value)
// Synchronous reset also loads DEFAULT. The stall/bubble behaviour and the
// idea of a per-bank default value come from the design; the reset and the
// rule that stall wins if both are raised (flagged by an assertion) are this
// implementation's choices.
//
// Parameters: T is the record type (a packed struct for the processor's
// banks), DEFAULT its bubble value.
module pipe_reg #(
  parameter type T = logic [7:0],
  parameter T DEFAULT = T'(8'hFF)
) (
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bubble,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst)         q <= DEFAULT;
    else if (stall)  q <= q;
    else if (bubble) q <= DEFAULT;
    else             q <= d;
  end

  // the control logic never asks for both at once
  assert property (@(posedge clk) disable iff (rst) !(stall && bubble))
    else $error("pipe_reg: stall and bubble raised together");

endmodule
