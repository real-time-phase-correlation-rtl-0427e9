// preprocessor: per-channel pre-processing ahead of the marker detector.
//
// The document places a band-pass filter, which selects the band in which
// synchronization is measured, and a further low-pass filter, which removes
// remaining high-frequency components, in front of each marker detector. It
// gives neither order nor coefficients, so this block builds the simplest
// multiplier-free version from first-order exponential sections (exp_filter):
//   band-pass  : high-pass hp(m) = x(m) - lpH(m-1), where lpH is an
//                exponential low-pass with weight 2^-HP_SHIFT (removes DC and
//                slow drift), followed by an exponential low-pass with weight
//                2^-BP_LP_SHIFT (upper band edge);
//   low-pass   : one more exponential low-pass with weight 2^-LP_SHIFT.
// A shift of 0 turns a low-pass section into a plain register.
//
// Interface: in_valid/x is one signed DW-bit sample; three clocks later
// out_valid pulses with y, a signed DW+1-bit sample (the high-pass difference
// needs one more bit). The section structure and the default shifts are this
// design's choices; only the band-pass plus low-pass chain is the document's.
module preprocessor #(
  parameter int unsigned DW           = 10,
  parameter int unsigned HP_SHIFT     = 3,
  parameter int unsigned BP_LP_SHIFT  = 1,
  parameter int unsigned LP_SHIFT     = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic                 out_valid,
  output logic signed [DW:0]   y
);
  logic signed [DW:0] x_ext, lph_y, hp_d;
  logic               lph_valid_unused;
  logic               hp_valid;
  logic               bp_valid;
  logic signed [DW:0] bp_y;

  assign x_ext = (DW+1)'(x);

  // Slow low-pass whose output is subtracted to form the high-pass.
  exp_filter #(.W(DW+1), .SHIFT(HP_SHIFT)) u_lph (
    .clk, .rst, .in_valid, .x(x_ext),
    .out_valid(lph_valid_unused), .y(lph_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      hp_valid <= 1'b0;
      hp_d     <= '0;
    end else begin
      hp_valid <= in_valid;
      if (in_valid) hp_d <= x_ext - lph_y;
    end
  end

  // Upper edge of the band-pass.
  exp_filter #(.W(DW+1), .SHIFT(BP_LP_SHIFT)) u_bp_lp (
    .clk, .rst, .in_valid(hp_valid), .x(hp_d),
    .out_valid(bp_valid), .y(bp_y)
  );

  // Additional low-pass filter.
  exp_filter #(.W(DW+1), .SHIFT(LP_SHIFT)) u_lp (
    .clk, .rst, .in_valid(bp_valid), .x(bp_y),
    .out_valid, .y
  );
endmodule
