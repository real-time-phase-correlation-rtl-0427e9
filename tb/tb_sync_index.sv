// tb_sync_index: self-checking test of the synchronization index.
// Sends random |dT| values (some above DT_MAX, some long runs of 0 and of
// large values) at irregular intervals. The model keeps the last K values,
// limits them to DT_MAX and computes SI = 1 - sum / (K * DT_MAX) in floating
// point, scaled to 10 bits and limited to [0, 1023]. Checks the start-up
// rule (no SI before K values), the one-clock latency and the end points.
module tb_sync_index;
  localparam int DT_W = 7, K = 16, DT_MAX = 8, SI_W = 10;
  logic clk = 0, rst = 1, dt_valid = 0, si_valid;
  logic [DT_W-1:0] dt = '0;
  logic [SI_W-1:0] si;
  int checks = 0, failures = 0, n_in = 0;
  int win[$];

  sync_index #(.DT_W(DT_W), .K(K), .DT_MAX(DT_MAX), .SI_W(SI_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int v);
    real s = 0.0;
    int exp_si;
    @(negedge clk);
    dt = DT_W'(v); dt_valid = 1;
    win.push_back(v > DT_MAX ? DT_MAX : v);
    if (win.size() > K) void'(win.pop_front());
    n_in++;
    foreach (win[i]) s += win[i];
    exp_si = int'($floor(1024.0 * (1.0 - s / (K * DT_MAX)) + 1e-9));
    if (exp_si > 1023) exp_si = 1023;
    if (exp_si < 0) exp_si = 0;
    @(negedge clk);
    dt_valid = 0;
    checks++;
    if (n_in < K) begin
      if (si_valid) begin failures++; $display("SI before the window filled"); end
    end else if (!si_valid || int'(si) != exp_si) begin
      failures++;
      $display("SI %0d valid=%b, expected %0d", si, si_valid, exp_si);
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 40; i++) send(0);
    checks++;
    if (si != 10'd1023) begin failures++; $display("perfect sync should read 1023"); end
    for (int i = 0; i < 40; i++) send(100);
    checks++;
    if (si != 10'd0) begin failures++; $display("no sync should read 0"); end
    for (int i = 0; i < 5000; i++)
      send($urandom_range(0, 3) == 0 ? $urandom_range(0, 127) : $urandom_range(0, 9));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
