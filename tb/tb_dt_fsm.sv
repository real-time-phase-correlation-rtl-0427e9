// tb_dt_fsm: self-checking test of the dT state machine and up/down counter.
// 1) Directed: two periodic marker trains with periods T1, T2 and a small
//    offset; every measurement must equal |T1 - T2|.
// 2) Random marker streams checked sample by sample against a behavioural
//    model of the marker-counting algorithm (modes, MS counters, overload).
// 3) Markers on one signal only, which must end in a counter overload.
// Checks the one-clock latency of dt_valid and counts how often each mode,
// simultaneous markers and overload occurred.
module tb_dt_fsm;
  import dda_pkg::*;
  localparam int CNT_W = 8;
  localparam int CMAX = (1 << (CNT_W - 1)) - 1;
  logic clk = 0, rst = 1, in_valid = 0, ev1 = 0, ev2 = 0;
  logic dt_valid, dt_ovf;
  logic [CNT_W-2:0] dt;
  cnt_mode_e mode_o;
  int checks = 0, failures = 0;
  int n_meas = 0, n_ovf = 0, n_both = 0, n_down = 0;

  dt_fsm #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural model: 0 frozen, 1 up, -1 down
  bit m_started;
  int m_ms1, m_ms2, m_dir, m_cnt, m_last;  // m_last: 1, 2, 3 (both)

  function automatic void model_reset();
    m_started = 0; m_ms1 = 0; m_ms2 = 0; m_dir = 0; m_cnt = 0; m_last = 0;
  endfunction

  // returns -1 for no output, otherwise the output value; ovf flag by ref
  function automatic int model_step(input bit e1, input bit e2, ref bit ovf);
    int src = (e1 ? 1 : 0) + (e2 ? 2 : 0);
    ovf = 0;
    if (!m_started) begin
      if (src != 0) begin
        m_started = 1; m_ms1 = e1; m_ms2 = e2; m_last = src; m_cnt = 0;
        m_dir = (src == 3) ? 0 : 1;
      end
      return -1;
    end
    m_cnt += m_dir;
    if (m_cnt > CMAX || m_cnt < -CMAX) begin
      ovf = 1; model_reset();
      return CMAX;
    end
    if (src == 0) return -1;
    m_ms1 += e1; m_ms2 += e2;
    if (m_ms1 > 1 && m_ms2 > 1) begin
      automatic int v = m_cnt < 0 ? -m_cnt : m_cnt;
      m_cnt = 0; m_ms1 = e1; m_ms2 = e2; m_last = src;
      m_dir = (src == 3) ? 0 : 1;
      return v;
    end
    if (src == 3) m_dir = 0;
    else if (src == m_last || m_last == 3) m_dir = (m_dir == 0) ? 1 : m_dir;
    else m_dir = (m_dir == 0) ? -1 : 0;
    m_last = src;
    return -1;
  endfunction

  task automatic step(input bit e1, input bit e2, input int expect_dt = -2);
    bit ovf;
    int exp_v;
    @(negedge clk);
    ev1 = e1; ev2 = e2; in_valid = 1;
    exp_v = model_step(e1, e2, ovf);
    @(negedge clk);
    in_valid = 0; ev1 = 0; ev2 = 0;
    checks++;
    if (exp_v < 0) begin
      if (dt_valid) begin failures++; $display("unexpected dT output %0d", dt); end
    end else begin
      n_meas++;
      n_ovf += int'(ovf);
      if (!dt_valid || int'(dt) != exp_v || dt_ovf != ovf) begin
        failures++;
        $display("dT: got valid=%b %0d ovf=%b, expected %0d ovf=%b", dt_valid, dt, dt_ovf, exp_v, ovf);
      end
      if (expect_dt >= 0) begin
        checks++;
        if (int'(dt) != expect_dt) begin
          failures++; $display("dT %0d, expected |T1-T2| = %0d", dt, expect_dt);
        end
      end
    end
    if (mode_o == CNT_DOWN) n_down++;
    if (e1 && e2) n_both++;
  endtask

  // Two periodic trains. The first measurement must be |T1 - T2|; with equal
  // periods every measurement must be 0. (With unequal periods the trains
  // slide past each other and later measurements follow the model only.)
  task automatic trains(input int t1, input int t2, input int off, input int len);
    int first = n_meas;
    for (int t = 0; t < len; t++)
      step(t % t1 == 0, t >= off && (t - off) % t2 == 0,
           (n_meas == first || t1 == t2) ? ((t1 > t2) ? t1 - t2 : t2 - t1) : -2);
  endtask

  initial begin
    model_reset();
    repeat (3) @(posedge clk);
    rst = 0;
    trains(10, 7, 2, 40);
    rst = 1; @(negedge clk); rst = 0; model_reset();
    trains(12, 12, 3, 400);
    rst = 1; @(negedge clk); rst = 0; model_reset();
    trains(9, 13, 1, 40);
    rst = 1; @(negedge clk); rst = 0; model_reset();
    trains(10, 9, 2, 400);
    rst = 1; @(negedge clk); rst = 0; model_reset();
    // random streams
    for (int i = 0; i < 20000; i++) step($urandom_range(0, 6) == 0, $urandom_range(0, 6) == 0);
    // periodic with jitter, simultaneous markers included
    for (int i = 0; i < 20000; i++) step(i % 8 == 0, (i % 9 == 0) || ($urandom_range(0, 40) == 0));
    // one signal only: overload
    for (int i = 0; i < 400; i++) step(i % 10 == 0, 0);
    checks++;
    if (n_ovf == 0) begin failures++; $display("no overload seen"); end
    checks++;
    if (n_both == 0 || n_down == 0) begin failures++; $display("mode not reached"); end
    $display("measurements=%0d overloads=%0d simultaneous=%0d down_samples=%0d",
             n_meas, n_ovf, n_both, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
