// dda_core: Discrete Distance Approximation (DDA) phase-synchronization
// processor for two neural signals, on parallel samples.
//
// Data path (one sample of each signal per in_valid):
//   A/B  preprocessor -> min_detector, one chain per signal: band-pass plus
//        low-pass filtering, then a marker pulse at every signal minimum;
//   C    dt_fsm: FSM-controlled up/down counter turning the two marker
//        streams into |dT_n|, the difference of the two signals' periods;
//   D    sync_index: SI = 1 - sum|dT_n| / (K dT_max) over the last K values,
//        then exp_filter: exponential smoothing with weight 2^-SMOOTH_SHIFT;
//   E    alarm: smoothed index below t_fall for n_fall samples, or above
//        t_rise for n_rise samples.
// The block structure is the document's block diagram; the widths, filter
// shifts, K and dT_max defaults are this design's choices.
//
// Timing: markers appear 4 clocks after the sample's in_valid (3 filter
// stages and the detector register), dt_valid one clock later, si_valid one
// clock after that, and the smoothed index one clock later still; the alarm
// block samples the smoothed index on every in_valid once the first smoothed
// value exists, so the start-up value of the filter raises no alarm.
module dda_core
  import dda_pkg::*;
#(
  parameter int unsigned DW           = SAMPLE_W,
  parameter int unsigned HP_SHIFT     = 3,
  parameter int unsigned BP_LP_SHIFT  = 1,
  parameter int unsigned LP_SHIFT     = 1,
  parameter int unsigned M            = 10,
  parameter int unsigned Q            = 2,
  parameter int unsigned CNT_W        = 8,
  parameter int unsigned K            = 16,
  parameter int unsigned DT_MAX       = 8,
  parameter int unsigned SI_W         = SAMPLE_W,
  parameter int unsigned SMOOTH_SHIFT = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] s1,
  input  logic signed [DW-1:0] s2,
  input  dda_cfg_t             cfg,
  // observation of internal nodes
  output logic                 ev1,
  output logic                 ev2,
  output logic                 dt_valid,
  output logic [CNT_W-2:0]     dt,
  output logic                 dt_ovf,
  output cnt_mode_e            cnt_mode,
  output logic                 si_valid,
  output logic [SI_W-1:0]      si,
  // results
  output logic                 smooth_valid,
  output logic [SI_W-1:0]      si_smooth,
  output logic                 alarm_rise,
  output logic                 alarm_fall
);
  logic               pv1, pv2, ev_valid1, ev_valid2_unused;
  logic signed [DW:0] p1, p2;
  logic signed [SI_W:0] sm_y;
  logic               smooth_seen;

  preprocessor #(.DW(DW), .HP_SHIFT(HP_SHIFT), .BP_LP_SHIFT(BP_LP_SHIFT), .LP_SHIFT(LP_SHIFT))
    u_pre1 (.clk, .rst, .in_valid, .x(s1), .out_valid(pv1), .y(p1));
  preprocessor #(.DW(DW), .HP_SHIFT(HP_SHIFT), .BP_LP_SHIFT(BP_LP_SHIFT), .LP_SHIFT(LP_SHIFT))
    u_pre2 (.clk, .rst, .in_valid, .x(s2), .out_valid(pv2), .y(p2));

  min_detector #(.W(DW+1), .M(M), .Q(Q))
    u_det1 (.clk, .rst, .in_valid(pv1), .x(p1), .out_valid(ev_valid1), .ev(ev1));
  min_detector #(.W(DW+1), .M(M), .Q(Q))
    u_det2 (.clk, .rst, .in_valid(pv2), .x(p2), .out_valid(ev_valid2_unused), .ev(ev2));

  dt_fsm #(.CNT_W(CNT_W))
    u_fsm (.clk, .rst, .in_valid(ev_valid1), .ev1, .ev2,
           .dt_valid, .dt, .dt_ovf, .mode_o(cnt_mode));

  sync_index #(.DT_W(CNT_W-1), .K(K), .DT_MAX(DT_MAX), .SI_W(SI_W))
    u_si (.clk, .rst, .dt_valid, .dt, .si_valid, .si);

  exp_filter #(.W(SI_W+1), .SHIFT(SMOOTH_SHIFT))
    u_smooth (.clk, .rst, .in_valid(si_valid), .x({1'b0, si}),
              .out_valid(smooth_valid), .y(sm_y));
  assign si_smooth = sm_y[SI_W-1:0];

  always_ff @(posedge clk) begin
    if (rst)               smooth_seen <= 1'b0;
    else if (smooth_valid) smooth_seen <= 1'b1;
  end

  alarm #(.SI_W(SI_W), .HOLD_W(HOLD_W))
    u_alarm (.clk, .rst, .tick(in_valid && smooth_seen), .si(si_smooth),
             .t_rise(cfg.t_rise), .t_fall(cfg.t_fall),
             .n_rise(cfg.n_rise), .n_fall(cfg.n_fall),
             .alarm_rise, .alarm_fall);
endmodule
