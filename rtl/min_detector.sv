// min_detector: marker (minimum) detector of one channel.
//
// As the document describes it, the detector is a digital comparator of the
// current and previous sample, s(i) > s(i-1), a shift register holding the M
// most recent comparison results, and a combinational block that decides from
// that sequence whether a minimum is present, tolerating up to Q outliers
// caused by noise. The document uses M = 10 and Q = 2.
//
// Decision rule (this design's reading of the combinational block): with
// r[0] the newest comparison (1 = rising) and H = M/2,
//   - the two centre comparisons form a turning point: r[H] = 0 (falling)
//     and r[H-1] = 1 (rising);
//   - the older half r[M-1:H] holds at least H-Q falling results;
//   - the newer half r[H-1:0] holds at least H-Q rising results.
// Equal samples count as "not rising". The minimum found is the sample taken
// H samples before the newest one, so markers come out a fixed H+1 samples
// late; both channels share that delay, which cancels in the period
// differences. No decision is made until M comparisons have been collected.
//
// Interface: in_valid/x is one sample; one clock later out_valid pulses and
// ev is high if the register, including that sample's comparison, shows a
// minimum.
module min_detector #(
  parameter int unsigned W = 11,
  parameter int unsigned M = 10,
  parameter int unsigned Q = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic                ev
);
  localparam int unsigned H  = M / 2;
  localparam int unsigned CW = $clog2(M + 2);

  logic signed [W-1:0] prev;
  logic [M-1:0]        r, r_next;
  logic [CW-1:0]       fill;        // comparisons collected, saturates at M
  logic                have_prev;
  logic                rising;
  logic                is_min;
  int unsigned         n_fall_old, n_rise_new;

  assign rising = have_prev && (x > prev);
  assign r_next = {r[M-2:0], rising};

  always_comb begin
    n_fall_old = 0;
    n_rise_new = 0;
    for (int i = 0; i < int'(H); i++) begin
      n_rise_new += 32'(r_next[i]);
      n_fall_old += 32'(!r_next[H + i]);
    end
    is_min = !r_next[H] && r_next[H-1]
             && (n_fall_old >= H - Q) && (n_rise_new >= H - Q)
             && (fill >= CW'(M - 1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev      <= '0;
      r         <= '0;
      fill      <= '0;
      have_prev <= 1'b0;
      out_valid <= 1'b0;
      ev        <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        prev      <= x;
        have_prev <= 1'b1;
        r         <= r_next;
        if (have_prev && fill < CW'(M)) fill <= fill + 1'b1;
        ev        <= is_min;
      end else begin
        ev <= 1'b0;
      end
    end
  end
endmodule
