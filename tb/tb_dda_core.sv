// tb_dda_core: end-to-end test of the DDA processor core on parallel samples.
// Two sampled sine waves (128 S/s, amplitude 400 of 511, small noise) go
// through four phases:
//   1. locked     : both at 22 Hz with a fixed phase offset;
//   2. unlocked   : 16 Hz against 29 Hz;
//   3. relocked   : both at 20 Hz;
//   4. silent     : signal 2 flat, so the counter must overload.
// Checks: every SI equals 1 - sum|dT|/(K*DT_MAX) computed here from the
// observed |dT| values; every smoothed value follows the smoothing recursion from the observed
// SI; dT -> SI -> smoothed latencies of one clock each; |dT| is small while
// locked; the smoothed index ends high in phases 1 and 3 and low in phase 2;
// the rise alarm fires in phase 1 and the fall alarm in phase 2. Counts each
// mechanism (markers, simultaneous markers, counting down, measurements,
// overload, index updates, both alarms) and fails any that never happened.
module tb_dda_core;
  import dda_pkg::*;
  localparam int DW = 10, K = 16, DT_MAX = 8, SMOOTH = 3, CNT_W = 8;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [DW-1:0] s1 = '0, s2 = '0;
  dda_cfg_t cfg;
  logic ev1, ev2, dt_valid, dt_ovf, si_valid, smooth_valid, alarm_rise, alarm_fall;
  logic [CNT_W-2:0] dt;
  cnt_mode_e cnt_mode;
  logic [DW-1:0] si, si_smooth;
  int checks = 0, failures = 0;
  int n_ev1 = 0, n_ev2 = 0, n_both = 0, n_down = 0, n_dt = 0, n_ovf = 0, n_si = 0;
  int n_rise = 0, n_fall = 0, n_smooth = 0;
  int phase = 0;
  int dt_sum [4], dt_cnt [4];

  dda_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- scoreboard on the internal chain ----
  int  win[$];
  real acc = 0.0;
  bit  dt_d = 0, si_d = 0, ar_d = 0, af_d = 0;
  always @(posedge clk) if (!rst) begin
    if (ev1) n_ev1++;
    if (ev2) n_ev2++;
    if (ev1 && ev2) n_both++;
    if (cnt_mode == CNT_DOWN) n_down++;
    if (alarm_rise && !ar_d) n_rise++;
    if (alarm_fall && !af_d) n_fall++;
    ar_d <= alarm_rise; af_d <= alarm_fall;
    if (dt_valid) begin
      n_dt++;
      if (dt_ovf) n_ovf++;
      dt_sum[phase] += int'(dt); dt_cnt[phase]++;
      win.push_back(int'(dt) > DT_MAX ? DT_MAX : int'(dt));
      if (win.size() > K) void'(win.pop_front());
    end
    dt_d <= dt_valid;
    si_d <= si_valid;
    if (si_valid) begin
      automatic real s = 0.0;
      automatic int e;
      n_si++;
      foreach (win[i]) s += win[i];
      e = int'($floor(1024.0 * (1.0 - s / (K * DT_MAX)) + 1e-9));
      if (e > 1023) e = 1023;
      if (e < 0) e = 0;
      checks++;
      if (!dt_d || win.size() != K || int'(si) != e) begin
        failures++; $display("SI %0d, expected %0d (dT one clock before: %b)", si, e, dt_d);
      end
      acc = acc + $floor((real'(si) * 8.0 - acc) / 8.0);
    end
    if (smooth_valid) begin
      n_smooth++;
      checks++;
      if (!si_d || int'(si_smooth) != int'($floor(acc / 8.0))) begin
        failures++; $display("smoothed %0d, expected %0d", si_smooth, int'($floor(acc / 8.0)));
      end
    end
  end

  task automatic run(input real f1, input real f2, input real ph, input int n, input bit flat2);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      s1 = DW'($rtoi(400.0 * $sin(6.2831853 * f1 * i / 128.0)) + $urandom_range(0, 8) - 4);
      s2 = flat2 ? '0 :
           DW'($rtoi(400.0 * $sin(6.2831853 * f2 * i / 128.0 + ph)) + $urandom_range(0, 8) - 4);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (6) @(negedge clk);   // let the chain settle between samples
    end
  endtask

  task automatic expect_level(input bit high, input string what);
    checks++;
    if (high ? (si_smooth < 800) : (si_smooth > 500)) begin
      failures++; $display("%s: smoothed index %0d", what, si_smooth);
    end
  endtask

  initial begin
    cfg = '{t_rise: 10'd800, t_fall: 10'd500, n_rise: 8'd32, n_fall: 8'd32};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    phase = 0; run(22.0, 22.0, 1.0, 800, 0);
    expect_level(1, "locked 22 Hz");
    checks++;
    if (n_rise == 0) begin failures++; $display("no rise alarm while locked"); end
    phase = 1; run(16.0, 29.0, 0.0, 1200, 0);
    expect_level(0, "16 Hz against 29 Hz");
    checks++;
    if (n_fall == 0) begin failures++; $display("no fall alarm while unlocked"); end
    phase = 2; run(20.0, 20.0, 2.0, 800, 0);
    expect_level(1, "locked 20 Hz");
    phase = 3; run(20.0, 0.0, 0.0, 600, 1);
    for (int p = 0; p < 4; p++)
      $display("phase %0d: %0d dT values, mean %0.2f", p, dt_cnt[p],
               dt_cnt[p] ? real'(dt_sum[p]) / dt_cnt[p] : 0.0);
    checks++;
    if (dt_cnt[0] == 0 || real'(dt_sum[0]) / dt_cnt[0] > 1.5 ||
        dt_cnt[2] == 0 || real'(dt_sum[2]) / dt_cnt[2] > 1.0) begin
      failures++; $display("locked signals should give |dT| near 0");
    end
    $display("markers %0d/%0d simultaneous %0d down-count samples %0d dT %0d overloads %0d",
             n_ev1, n_ev2, n_both, n_down, n_dt, n_ovf);
    $display("SI updates %0d smoothed %0d rise alarms %0d fall alarms %0d",
             n_si, n_smooth, n_rise, n_fall);
    checks += 6;
    if (n_ev1 == 0 || n_ev2 == 0) begin failures++; $display("no markers"); end
    if (n_both == 0) begin failures++; $display("never simultaneous markers"); end
    if (n_down == 0) begin failures++; $display("never counted down"); end
    if (n_ovf == 0)  begin failures++; $display("never overloaded"); end
    if (n_si == 0 || n_smooth != n_si) begin failures++; $display("index updates missing"); end
    if (n_rise == 0 || n_fall == 0) begin failures++; $display("alarm never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
