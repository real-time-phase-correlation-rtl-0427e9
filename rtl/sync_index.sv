// sync_index: synchronization index of the Discrete Distance Approximation,
//   SI = 1 - sum_{n=0}^{K-1} |dT_n| / (K * dT_max),
// over a sliding window of the K most recent period differences.
//
// Each |dT_n| is first limited to DT_MAX, the largest difference the signal
// band allows, so every term stays in [0, 1]. The window is a K-entry shift
// register of limited values with a running sum (add the newest, subtract the
// one that falls out). As in the document, K * DT_MAX is meant to be a power
// of two, 2^SCALE_LOG2, so the division is a shift. SI is produced as an
// unsigned SI_W-bit fraction: SI_q = 2^SI_W - sum * 2^SI_W / 2^SCALE_LOG2,
// saturated to [0, 2^SI_W - 1], so full synchronization reads 2^SI_W - 1.
//
// Interface: dt_valid/dt delivers one |dT_n|; one clock later si_valid
// pulses with the new SI. No SI is produced until K values have been
// collected. The update rate follows the marker rate, not a fixed rate.
// The document gives the formula and the power-of-two scaling; K, DT_MAX,
// the limiting of |dT_n|, the output format and the start-up rule are this
// design's choices.
module sync_index #(
  parameter int unsigned DT_W       = 7,
  parameter int unsigned K          = 16,
  parameter int unsigned DT_MAX     = 8,
  parameter int unsigned SCALE_LOG2 = $clog2(K * DT_MAX),
  parameter int unsigned SI_W       = 10
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            dt_valid,
  input  logic [DT_W-1:0] dt,
  output logic            si_valid,
  output logic [SI_W-1:0] si
);
  localparam int unsigned EW   = $clog2(DT_MAX + 1);
  localparam int unsigned SW   = $clog2(K * DT_MAX + 1);
  localparam int unsigned PW   = SW + SI_W + 1;
  localparam int unsigned FW   = $clog2(K + 1);

  logic [EW-1:0] win [K];
  logic [SW-1:0] sum, sum_n;
  logic [EW-1:0] d;
  logic [FW-1:0] fill;
  logic [PW-1:0] scaled, one, si_full;

  always_comb begin
    d       = (dt > DT_W'(DT_MAX)) ? EW'(DT_MAX) : EW'(dt);
    sum_n   = sum + SW'(d) - SW'(win[K-1]);
    scaled  = (PW'(sum_n) << SI_W) >> SCALE_LOG2;
    one     = PW'(1) << SI_W;
    if (scaled >= one)          si_full = '0;
    else if (scaled == '0)      si_full = one - PW'(1);
    else                        si_full = one - scaled;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(K); i++) win[i] <= '0;
      sum      <= '0;
      fill     <= '0;
      si_valid <= 1'b0;
      si       <= '0;
    end else begin
      si_valid <= 1'b0;
      if (dt_valid) begin
        win[0] <= d;
        for (int i = 1; i < int'(K); i++) win[i] <= win[i-1];
        sum <= sum_n;
        if (fill < FW'(K)) fill <= fill + 1'b1;
        if (fill >= FW'(K - 1)) begin
          si_valid <= 1'b1;
          si       <= si_full[SI_W-1:0];
        end
      end
    end
  end
endmodule
