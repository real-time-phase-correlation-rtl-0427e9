// tb_dda_bands: band workloads for the DDA processor core at 128 S/s.
// Two cores run side by side:
//   - low beta band (12-20 Hz), default parameters (K = 16, DT_MAX = 8);
//   - theta band (4-7 Hz), K = 8 and DT_MAX = 16: theta periods are 18 to 32
//     samples, so period differences reach about 14 samples, and
//     K * DT_MAX stays 128.
// Each core sees a locked stretch (equal frequencies, fixed phase offset), an
// unlocked stretch (the two band edges) and a second locked stretch, with
// small noise. The bench checks that the smoothed index ends each locked
// stretch high and the unlocked stretch low, and that the rise and fall
// alarms (thresholds 0.75 and 0.625, two seconds) both fire on each core.
// With DT_MAX = 8 the low-beta band edges (10.7 and 6.4 samples) differ by
// only about 4.3 samples, so fully unlocked low-beta signals read near 0.5,
// not 0; the fall threshold is set accordingly.
module tb_dda_bands;
  import dda_pkg::*;
  localparam int DW = 10;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [DW-1:0] b1 = '0, b2 = '0, t1 = '0, t2 = '0;
  dda_cfg_t cfg;
  logic [DW-1:0] b_sm, t_sm;
  logic b_ar, b_af, t_ar, t_af;
  int checks = 0, failures = 0;
  int n_b_ar = 0, n_b_af = 0, n_t_ar = 0, n_t_af = 0;

  // outputs not looked at here
  logic u_ev1 [2], u_ev2 [2], u_dtv [2], u_ovf [2], u_siv [2], u_smv [2];
  logic [6:0] u_dt [2];
  cnt_mode_e u_mode [2];
  logic [DW-1:0] u_si [2];

  dda_core u_beta (
    .clk, .rst, .in_valid, .s1(b1), .s2(b2), .cfg,
    .ev1(u_ev1[0]), .ev2(u_ev2[0]), .dt_valid(u_dtv[0]), .dt(u_dt[0]), .dt_ovf(u_ovf[0]),
    .cnt_mode(u_mode[0]), .si_valid(u_siv[0]), .si(u_si[0]), .smooth_valid(u_smv[0]),
    .si_smooth(b_sm), .alarm_rise(b_ar), .alarm_fall(b_af));

  dda_core #(.K(8), .DT_MAX(16)) u_theta (
    .clk, .rst, .in_valid, .s1(t1), .s2(t2), .cfg,
    .ev1(u_ev1[1]), .ev2(u_ev2[1]), .dt_valid(u_dtv[1]), .dt(u_dt[1]), .dt_ovf(u_ovf[1]),
    .cnt_mode(u_mode[1]), .si_valid(u_siv[1]), .si(u_si[1]), .smooth_valid(u_smv[1]),
    .si_smooth(t_sm), .alarm_rise(t_ar), .alarm_fall(t_af));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (b_ar && !$past(b_ar)) n_b_ar++;
    if (b_af && !$past(b_af)) n_b_af++;
    if (t_ar && !$past(t_ar)) n_t_ar++;
    if (t_af && !$past(t_af)) n_t_af++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] wave(input real f, input real ph, input int i);
    return DW'($rtoi(400.0 * $sin(6.2831853 * f * i / 128.0 + ph)) + $urandom_range(0, 8) - 4);
  endfunction

  task automatic run(input real bf1, input real bf2, input real tf1, input real tf2, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      b1 = wave(bf1, 0.0, i); b2 = wave(bf2, 0.8, i);
      t1 = wave(tf1, 0.0, i); t2 = wave(tf2, 0.8, i);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat (6) @(negedge clk);
    end
  endtask

  task automatic expect_level(input bit high, input string what);
    checks += 2;
    if (high ? b_sm < 768 : b_sm > 640) begin failures++; $display("beta %s: %0d", what, b_sm); end
    if (high ? t_sm < 768 : t_sm > 640) begin failures++; $display("theta %s: %0d", what, t_sm); end
    $display("%s: beta index %0d, theta index %0d", what, b_sm, t_sm);
  endtask

  initial begin
    cfg = '{t_rise: 10'd768, t_fall: 10'd640, n_rise: 8'd255, n_fall: 8'd255};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(15.0, 15.0, 5.0, 5.0, 2000);
    expect_level(1, "locked");
    run(12.5, 19.5, 4.0, 7.0, 2000);
    expect_level(0, "unlocked");
    run(17.0, 17.0, 6.0, 6.0, 2000);
    expect_level(1, "relocked");
    checks++;
    if (n_b_ar == 0 || n_b_af == 0 || n_t_ar == 0 || n_t_af == 0) begin
      failures++; $display("alarms: beta %0d/%0d theta %0d/%0d", n_b_ar, n_b_af, n_t_ar, n_t_af);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
