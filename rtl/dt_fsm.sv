// dt_fsm: finite state machine and up/down counter that measure the
// difference of transition periods, dT_n = T_n^1 - T_n^2, between two marker
// streams (Discrete Distance Approximation).
//
// The counter runs in one of three modes, FROZEN, UP or DOWN; MS1 and MS2
// count the markers seen on each signal since the last measurement. The
// rules follow the document's FSM algorithm:
//   - before the first marker nothing counts; the first marker(s) start a
//     measurement: FROZEN if both signals fire together, UP otherwise;
//   - every later marker increments MSx of its signal; when MS1 > 1 and
//     MS2 > 1 the unsigned counter value is output as |dT|, the counter is
//     cleared and MSx is set to 1 for a signal that fired in that sample, 0
//     otherwise; a new measurement then starts as after the first marker;
//   - otherwise the marker sets the mode: both signals together -> FROZEN;
//     same signal as the last marker -> FROZEN becomes UP, UP/DOWN stay;
//     the other signal -> FROZEN becomes DOWN, UP/DOWN become FROZEN;
//   - counter overload (|count| would exceed 2^(CNT_W-1)-1) outputs that
//     maximum as |dT| with ovf set and returns to the waiting state.
// For a pair of nearby marker trains this counts up from the first s1 marker
// to the first s2 marker, holds, counts down from the second s1 marker to the
// second s2 marker, and ends at T^1 - T^2.
//
// Timing: in each sample (in_valid) the counter first advances by one step
// in its current mode, which covers the sample interval just ended, and the
// markers of that sample are then applied. dt_valid pulses one clock after
// the in_valid that completes a measurement.
// This design's choices: the count-then-apply order, the restart mode after a
// measurement (as after the first marker), a last marker from both signals
// counting as "the same signal" for any later single marker, overload taking
// priority over a measurement completed in the same sample, and CNT_W.
module dt_fsm
  import dda_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic               ev1,
  input  logic               ev2,
  output logic               dt_valid,
  output logic [CNT_W-2:0]   dt,       // |dT_n| in samples
  output logic               dt_ovf,   // dt is the overload value
  output cnt_mode_e          mode_o    // counter mode, for observation
);
  localparam logic signed [CNT_W:0] CNT_MAX = (CNT_W+1)'((1 << (CNT_W-1)) - 1);

  cnt_mode_e                mode, mode_n;
  ev_src_e                  last, src;
  logic                     started;
  logic [1:0]               ms1, ms2, ms1_n, ms2_n;
  logic signed [CNT_W-1:0]  cnt;
  logic signed [CNT_W:0]    cnt_now, cnt_abs;
  logic                     any_ev, overload, complete;

  assign mode_o = mode;
  assign any_ev = ev1 | ev2;
  assign src    = ev_src_e'({ev2, ev1});

  always_comb begin
    unique case (mode)
      CNT_UP:   cnt_now = (CNT_W+1)'(cnt) + (CNT_W+1)'(1);
      CNT_DOWN: cnt_now = (CNT_W+1)'(cnt) - (CNT_W+1)'(1);
      default:  cnt_now = (CNT_W+1)'(cnt);
    endcase
    cnt_abs  = (cnt_now < 0) ? -cnt_now : cnt_now;
    overload = started && (cnt_abs > CNT_MAX);
    ms1_n    = (ms1 == 2'd2) ? 2'd2 : ms1 + 2'(ev1);
    ms2_n    = (ms2 == 2'd2) ? 2'd2 : ms2 + 2'(ev2);
    complete = started && any_ev && ms1_n == 2'd2 && ms2_n == 2'd2;

    mode_n = mode;
    if (ev1 && ev2)                                   mode_n = CNT_FROZEN;
    else if (last == SRC_BOTH || src == last)         mode_n = (mode == CNT_FROZEN) ? CNT_UP : mode;
    else                                              mode_n = (mode == CNT_FROZEN) ? CNT_DOWN : CNT_FROZEN;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      started  <= 1'b0;
      mode     <= CNT_FROZEN;
      last     <= SRC_NONE;
      ms1      <= '0;
      ms2      <= '0;
      cnt      <= '0;
      dt_valid <= 1'b0;
      dt       <= '0;
      dt_ovf   <= 1'b0;
    end else begin
      dt_valid <= 1'b0;
      if (in_valid) begin
        if (!started) begin
          if (any_ev) begin
            started <= 1'b1;
            ms1     <= 2'(ev1);
            ms2     <= 2'(ev2);
            last    <= src;
            mode    <= (ev1 && ev2) ? CNT_FROZEN : CNT_UP;
            cnt     <= '0;
          end
        end else if (overload) begin
          dt_valid <= 1'b1;
          dt       <= CNT_MAX[CNT_W-2:0];
          dt_ovf   <= 1'b1;
          started  <= 1'b0;
          ms1      <= '0;
          ms2      <= '0;
          mode     <= CNT_FROZEN;
          last     <= SRC_NONE;
          cnt      <= '0;
        end else if (complete) begin
          dt_valid <= 1'b1;
          dt       <= cnt_abs[CNT_W-2:0];
          dt_ovf   <= 1'b0;
          ms1      <= 2'(ev1);
          ms2      <= 2'(ev2);
          last     <= src;
          mode     <= (ev1 && ev2) ? CNT_FROZEN : CNT_UP;
          cnt      <= '0;
        end else begin
          cnt <= cnt_now[CNT_W-1:0];
          if (any_ev) begin
            ms1  <= ms1_n;
            ms2  <= ms2_n;
            last <= src;
            mode <= mode_n;
          end
        end
      end
    end
  end
endmodule
