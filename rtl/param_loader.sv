// param_loader: serially loaded configuration register.
//
// While load is high, one bit of sdata is shifted in per clock, most
// significant bit of the dda_cfg_t record first (t_rise, t_fall, n_rise,
// n_fall), so CFG_W clocks load a complete set. Reset puts in the default
// values given as parameters. Outside loading the register holds.
// The document shows a LOADPARAM line on the chip's connector and configurable
// alarm thresholds and counts; the record layout, the serial protocol and the
// defaults are this design's choices.
module param_loader
  import dda_pkg::*;
#(
  parameter logic [SAMPLE_W-1:0] T_RISE_DEF = SAMPLE_W'(768),
  parameter logic [SAMPLE_W-1:0] T_FALL_DEF = SAMPLE_W'(256),
  parameter logic [HOLD_W-1:0]   N_RISE_DEF = HOLD_W'(128),
  parameter logic [HOLD_W-1:0]   N_FALL_DEF = HOLD_W'(128)
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     load,
  input  logic     sdata,
  output dda_cfg_t cfg
);
  always_ff @(posedge clk) begin
    if (rst) begin
      cfg <= '{t_rise: T_RISE_DEF, t_fall: T_FALL_DEF,
               n_rise: N_RISE_DEF, n_fall: N_FALL_DEF};
    end else if (load) begin
      cfg <= {cfg[CFG_W-2:0], sdata};
    end
  end
endmodule
