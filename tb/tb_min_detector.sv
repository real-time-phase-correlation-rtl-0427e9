// tb_min_detector: self-checking test of the minimum (marker) detector.
// Feeds noisy sine waves, pure random walks and flat stretches. A reference
// model keeps the full history of comparison results and, for every sample,
// checks the centre turning point and counts falling results among the H
// older and rising results among the H newer comparisons. Also checks the
// one-clock latency and that clean sines give one marker per period.
module tb_min_detector;
  localparam int W = 11, M = 10, Q = 2, H = M / 2;
  logic clk = 0, rst = 1, in_valid = 0, out_valid, ev;
  logic signed [W-1:0] x = '0;
  int checks = 0, failures = 0, n_ev = 0, n_samples = 0;
  int hist[$];           // comparison results, oldest first (1 = rising)
  int prev_v;
  bit have_prev;

  min_detector #(.W(W), .M(M), .Q(Q)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model_min();
    int n = hist.size();
    int fall_old = 0, rise_new = 0;
    if (n < M) return 0;
    // hist[n-1] is the newest comparison, hist[n-M] the oldest in the window
    for (int k = 0; k < H; k++) begin
      rise_new += hist[n-1-k];
      fall_old += 1 - hist[n-1-H-k];
    end
    return hist[n-1-H] == 0 && hist[n-H] == 1 && fall_old >= H - Q && rise_new >= H - Q;
  endfunction

  task automatic apply(input int v);
    bit exp_ev;
    @(negedge clk);
    x = W'(v); in_valid = 1;
    if (have_prev) hist.push_back(v > prev_v ? 1 : 0);
    prev_v = v; have_prev = 1;
    exp_ev = model_min();
    n_samples++;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || ev !== exp_ev) begin
      failures++;
      if (failures < 10) $display("sample %0d: ev=%b expected %b", n_samples, ev, exp_ev);
    end
    n_ev += int'(ev);
    @(negedge clk);
    checks++;
    if (ev !== 1'b0 || out_valid !== 1'b0) begin failures++; $display("ev not a pulse"); end
  endtask

  initial begin
    int ev_before;
    repeat (3) @(posedge clk);
    rst = 0;
    // clean sine, period 12 samples, 40 periods: expect one marker per period
    ev_before = n_ev;
    for (int i = 0; i < 480; i++) apply(int'($rtoi(400.0 * $sin(6.2831853 * i / 12.0))));
    checks++;
    if (n_ev - ev_before < 38 || n_ev - ev_before > 40) begin
      failures++; $display("clean sine: %0d markers, expected about 40", n_ev - ev_before);
    end
    // noisy sines with different periods
    for (int p = 6; p < 30; p += 3)
      for (int i = 0; i < 300; i++)
        apply(int'($rtoi(300.0 * $sin(6.2831853 * i / p))) + $urandom_range(0, 60) - 30);
    // random walk
    begin
      int v = 0;
      for (int i = 0; i < 3000; i++) begin
        v += $urandom_range(0, 40) - 20;
        if (v > 1000) v = 1000;
        if (v < -1000) v = -1000;
        apply(v);
      end
    end
    // flat signal: no markers
    ev_before = n_ev;
    for (int i = 0; i < 50; i++) apply(7);
    checks++;
    if (n_ev - ev_before > 1) begin failures++; $display("markers on a flat signal"); end
    $display("markers seen: %0d", n_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
