// dda_top: test chip of the DDA phase-synchronization processor.
//
// The chip has one master clock (128 kHz), a reset, a parameter-load line and
// two serial data inputs, one per neural signal. Each sample period is a
// frame of CLKS_PER_SAMPLE clocks (1000, giving 128 S/s at 128 kHz): in the
// first DW clocks of a frame each serial input port (ser2par) shifts in a
// DW-bit two's complement sample, MSB first, starting in the clock where
// frame_start is high; at clock DW both words go to the processor core
// (dda_core). In the first clock of every frame the parallel-to-serial port
// (par2ser) captures the current smoothed synchronization index and sends it,
// MSB first, in the next DW clocks with dataout_valid high. The two alarm
// outputs are brought out directly, and so are a few intermediate nodes
// (markers, counter mode, |dT_n| and the raw index) as test outputs, which
// the document's chip also buffers to pins; which nodes it brings out is not
// stated, so the selection here is this design's.
// While load_param is high the frame counter is held and datain1 shifts the
// alarm configuration into param_loader, one bit per clock, MSB first
// (t_rise, t_fall, n_rise, n_fall; 36 bits). Reset restores the defaults.
//
// The ports, the 10-bit words, the clock and sample rates follow the
// document's test chip; the frame layout and load protocol are this design's.
module dda_top
  import dda_pkg::*;
#(
  parameter int unsigned DW              = SAMPLE_W,
  parameter int unsigned CLKS_PER_SAMPLE = 1000
) (
  input  logic clk,
  input  logic rst,
  input  logic load_param,
  input  logic datain1,
  input  logic datain2,
  output logic frame_start,
  output logic dataout,
  output logic dataout_valid,
  output logic alarm_rise,
  output logic alarm_fall,
  // test outputs: intermediate nodes of the processor
  output logic            test_ev1,        // marker (minimum) on signal 1
  output logic            test_ev2,        // marker (minimum) on signal 2
  output cnt_mode_e       test_cnt_mode,   // up/down counter mode
  output logic            test_dt_valid,   // a new |dT_n|
  output logic [6:0]      test_dt,
  output logic            test_dt_ovf,     // |dT_n| is the overload value
  output logic            test_si_valid,   // a new raw synchronization index
  output logic [DW-1:0]   test_si
);
  logic          bit_slot, word_done;
  logic          v1, v2_unused;
  logic [DW-1:0] w1, w2;
  dda_cfg_t      cfg;

  logic                 smooth_valid_unused;
  logic [DW-1:0]        si_smooth;

  frame_timer #(.CLKS_PER_SAMPLE(CLKS_PER_SAMPLE), .DW(DW))
    u_timer (.clk, .rst, .hold(load_param), .frame_start, .bit_slot, .word_done);

  ser2par #(.DW(DW)) u_in1 (.clk, .rst, .shift_en(bit_slot), .sdata(datain1),
                            .word_done, .q_valid(v1), .q(w1));
  ser2par #(.DW(DW)) u_in2 (.clk, .rst, .shift_en(bit_slot), .sdata(datain2),
                            .word_done, .q_valid(v2_unused), .q(w2));

  param_loader u_cfg (.clk, .rst, .load(load_param), .sdata(datain1), .cfg);

  dda_core #(.DW(DW), .SI_W(DW)) u_core (
    .clk, .rst, .in_valid(v1), .s1(w1), .s2(w2), .cfg,
    .ev1(test_ev1), .ev2(test_ev2), .dt_valid(test_dt_valid), .dt(test_dt),
    .dt_ovf(test_dt_ovf), .cnt_mode(test_cnt_mode), .si_valid(test_si_valid),
    .si(test_si), .smooth_valid(smooth_valid_unused), .si_smooth,
    .alarm_rise, .alarm_fall
  );

  par2ser #(.DW(DW)) u_out (.clk, .rst, .load(frame_start), .d(si_smooth),
                            .sout(dataout), .sout_valid(dataout_valid));
endmodule
