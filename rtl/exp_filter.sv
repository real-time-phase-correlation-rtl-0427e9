// exp_filter: first-order exponential (single-pole IIR) low-pass filter,
//   y(m) = (1 - a) * y(m-1) + a * x(m),   a = 2^-SHIFT.
//
// This is the smoothing filter of the synchronization index, and it is also
// the building block of the pre-processing filters. The weight a is a negative
// power of two, so the update is a subtraction, an arithmetic shift and an
// addition: acc += ((x << FRAC) - acc) >>> SHIFT. The state keeps FRAC extra
// fraction bits (FRAC = SHIFT by default) so that the output settles to within
// one LSB of a constant input instead of stalling SHIFT LSBs away.
//
// Interface: in_valid/x is one sample (signed, W bits); one clock later
// out_valid pulses and y holds the new output (the integer part of the state,
// rounded toward minus infinity). y holds its value between samples.
// SHIFT = 0 makes the filter a registered pass-through.
// The recursion is the document's smoothing filter; the fraction bits, the rounding
// and the reset of the state to zero are this design's choices.
module exp_filter #(
  parameter int unsigned W     = 11,
  parameter int unsigned SHIFT = 3,
  parameter int unsigned FRAC  = SHIFT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);
  localparam int unsigned AW = W + FRAC + 1;

  logic signed [AW-1:0] acc, acc_next, xs, diff;

  always_comb begin
    xs       = AW'(x) <<< FRAC;
    diff     = xs - acc;
    acc_next = acc + (diff >>> SHIFT);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) acc <= acc_next;
    end
  end

  assign y = W'(acc >>> FRAC);
endmodule
