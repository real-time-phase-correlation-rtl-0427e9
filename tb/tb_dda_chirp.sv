// tb_dda_chirp: frequency-sweep workload for the DDA processor core at its
// default parameters. Signal 1 is a steady 22 Hz sine, signal 2 a linear
// chirp from 12 Hz to 32 Hz over 120 s. The bench averages the smoothed
// synchronization index in 1 Hz bins of the chirp's instantaneous frequency
// and prints the resulting curve. It checks that the index peaks within 3 Hz
// of 22 Hz, that the peak is close to full scale, and that it falls off
// clearly towards the low band edge.
// The samples are fed at 256 S/s. At 128 S/s a 25-32 Hz sine has only 4 to 5
// samples per period, too few for the 10-comparison minimum detector to see a
// clean fall-then-rise, so minima are missed and the top of the sweep reads
// as unsynchronized; below about 22 Hz (the low beta band) 128 S/s is enough.
module tb_dda_chirp;
  import dda_pkg::*;
  localparam int DW = 10;
  localparam real FS = 256.0, F0 = 12.0, F1 = 32.0, DUR = 120.0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [DW-1:0] s1 = '0, s2 = '0;
  dda_cfg_t cfg;
  logic ev1, ev2, dt_valid, dt_ovf, si_valid, smooth_valid, alarm_rise, alarm_fall;
  logic [6:0] dt;
  cnt_mode_e cnt_mode;
  logic [DW-1:0] si, si_smooth;
  int checks = 0, failures = 0;
  real bin_sum [21];
  int  bin_n [21];

  dda_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nsamp = int'(DUR * FS);
    int peak_bin = 0;
    real peak = 0.0, low = 0.0;
    cfg = '{t_rise: 10'd768, t_fall: 10'd256, n_rise: 8'd128, n_fall: 8'd128};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < nsamp; i++) begin
      automatic real t = i / FS;
      automatic real finst = F0 + (F1 - F0) * t / DUR;
      automatic real ph2 = 6.2831853 * (F0 * t + (F1 - F0) * t * t / (2.0 * DUR));
      @(negedge clk);
      s1 = DW'($rtoi(400.0 * $sin(6.2831853 * 22.0 * t)));
      s2 = DW'($rtoi(400.0 * $sin(ph2)));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (6) @(negedge clk);
      if (i > 5 * int'(FS)) begin
        automatic int b = int'($floor(finst)) - 12;
        if (b >= 0 && b < 21) begin
          bin_sum[b] += real'(si_smooth) / 1023.0;
          bin_n[b]++;
        end
      end
    end
    for (int b = 0; b < 21; b++)
      if (bin_n[b] > 0) begin
        automatic real v = bin_sum[b] / bin_n[b];
        $display("%0d Hz: index %0.3f", 12 + b, v);
        if (v > peak) begin peak = v; peak_bin = b; end
      end
    low = bin_sum[1] / bin_n[1];
    checks++;
    if (peak_bin + 12 < 19 || peak_bin + 12 > 25) begin
      failures++; $display("peak at %0d Hz, expected near 22 Hz", peak_bin + 12);
    end
    checks++;
    if (peak < 0.85) begin failures++; $display("peak only %0.3f", peak); end
    checks++;
    if (low > peak - 0.3) begin failures++; $display("no fall-off: 13 Hz %0.3f", low); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
