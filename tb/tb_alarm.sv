// tb_alarm: self-checking test of the rise/fall alarm block.
// Drives a slowly wandering index with random thresholds and hold counts,
// and ticks at irregular intervals. The model counts consecutive ticks above
// t_rise and below t_fall and expects each alarm exactly when its count has
// reached the hold count (a hold count of 0 acting as 1). Counts how often
// each alarm was raised.
module tb_alarm;
  localparam int SI_W = 10, HOLD_W = 8;
  logic clk = 0, rst = 1, tick = 0;
  logic [SI_W-1:0] si = '0, t_rise, t_fall;
  logic [HOLD_W-1:0] n_rise, n_fall;
  logic alarm_rise, alarm_fall;
  int checks = 0, failures = 0, c_r = 0, c_f = 0, n_ar = 0, n_af = 0;
  bit exp_r = 0, exp_f = 0, prev_r = 0, prev_f = 0;

  alarm #(.SI_W(SI_W), .HOLD_W(HOLD_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v = 512;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int seg = 0; seg < 20; seg++) begin
      t_rise = SI_W'($urandom_range(600, 900));
      t_fall = SI_W'($urandom_range(100, 400));
      n_rise = HOLD_W'($urandom_range(0, 40));
      n_fall = HOLD_W'($urandom_range(0, 40));
      c_r = 0; c_f = 0; exp_r = 0; exp_f = 0;
      rst = 1; @(negedge clk); rst = 0;
      for (int i = 0; i < 4000; i++) begin
        @(negedge clk);
        v += $urandom_range(0, 40) - 20;
        if (v < 0) v = 0;
        if (v > 1023) v = 1023;
        si = SI_W'(v);
        tick = ($urandom_range(0, 3) != 0);
        if (tick) begin
          if (v > t_rise) c_r++; else c_r = 0;
          if (v < t_fall) c_f++; else c_f = 0;
          exp_r = c_r > 0 && c_r >= (n_rise == 0 ? 1 : n_rise);
          exp_f = c_f > 0 && c_f >= (n_fall == 0 ? 1 : n_fall);
        end
        @(negedge clk);
        tick = 0;
        checks++;
        if (alarm_rise !== exp_r || alarm_fall !== exp_f) begin
          failures++;
          if (failures < 10)
            $display("alarms r=%b f=%b, expected r=%b f=%b", alarm_rise, alarm_fall, exp_r, exp_f);
        end
        if (alarm_rise && !prev_r) n_ar++;
        if (alarm_fall && !prev_f) n_af++;
        prev_r = alarm_rise; prev_f = alarm_fall;
      end
    end
    checks++;
    if (n_ar == 0 || n_af == 0) begin failures++; $display("an alarm never fired"); end
    $display("rise alarms=%0d fall alarms=%0d", n_ar, n_af);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
