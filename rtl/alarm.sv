// alarm: rise/fall detector on the smoothed synchronization index.
//
// Two comparators and two counters. alarm_fall is raised once the index has
// been below t_fall for n_fall consecutive samples (the condition the
// document proposes for anticipating a seizure); alarm_rise once it has been
// above t_rise for n_rise consecutive samples (used to log seizure activity).
// An alarm stays high while its condition holds and drops in the first sample
// in which it does not. A count of 0 raises the alarm in the first sample that
// meets the condition, like a count of 1.
//
// Interface: the index si is sampled on every tick (one per input sample);
// the alarm outputs are registered and change one clock after a tick.
// Comparators, counters and the rule are the document's; strict comparisons,
// counting in samples, the counter width and the hold behaviour are this
// design's choices.
module alarm #(
  parameter int unsigned SI_W   = 10,
  parameter int unsigned HOLD_W = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  input  logic [SI_W-1:0]   si,
  input  logic [SI_W-1:0]   t_rise,
  input  logic [SI_W-1:0]   t_fall,
  input  logic [HOLD_W-1:0] n_rise,
  input  logic [HOLD_W-1:0] n_fall,
  output logic              alarm_rise,
  output logic              alarm_fall
);
  logic [HOLD_W-1:0] c_rise, c_fall;
  logic              above, below;

  assign above = si > t_rise;
  assign below = si < t_fall;

  always_ff @(posedge clk) begin
    if (rst) begin
      c_rise     <= '0;
      c_fall     <= '0;
      alarm_rise <= 1'b0;
      alarm_fall <= 1'b0;
    end else if (tick) begin
      if (above) begin
        if (c_rise != '1) c_rise <= c_rise + 1'b1;
        alarm_rise <= (HOLD_W+1)'(c_rise) + 1'b1 >= (HOLD_W+1)'(n_rise);
      end else begin
        c_rise     <= '0;
        alarm_rise <= 1'b0;
      end
      if (below) begin
        if (c_fall != '1) c_fall <= c_fall + 1'b1;
        alarm_fall <= (HOLD_W+1)'(c_fall) + 1'b1 >= (HOLD_W+1)'(n_fall);
      end else begin
        c_fall     <= '0;
        alarm_fall <= 1'b0;
      end
    end
  end
endmodule
