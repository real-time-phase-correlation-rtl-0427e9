// tb_dda_top: end-to-end test of the DDA test chip at its default size
// (10-bit words, 1000 master clocks per sample, i.e. 128 S/s at 128 kHz).
// The bench loads an alarm configuration through load_param/datain1, then
// streams two sampled sine waves serially, one 10-bit word per frame on each
// data input, through three phases: locked (22 Hz and 22 Hz), unlocked
// (16 Hz against 29 Hz) and silent (signal 2 flat). It decodes every word
// of the serial output and checks it against the smoothed index held inside
// the chip when the frame began, checks the frame period, that each sent
// sample arrives intact, the clock position of every |dT| result in the
// frame, the index level of each phase and the alarms. It counts each
// mechanism (configuration load, markers, simultaneous markers, counting
// down, measurements, overload, index updates, serial words, rise and fall
// alarms) and fails any that never happened.
module tb_dda_top;
  import dda_pkg::*;
  localparam int DW = 10, CPS = 1000;
  logic clk = 0, rst = 1, load_param = 0, datain1 = 0, datain2 = 0;
  logic frame_start, dataout, dataout_valid, alarm_rise, alarm_fall;
  logic test_ev1, test_ev2, test_dt_valid, test_dt_ovf, test_si_valid;
  cnt_mode_e test_cnt_mode;
  logic [6:0] test_dt;
  logic [DW-1:0] test_si;
  int checks = 0, failures = 0;
  int n_ev1 = 0, n_ev2 = 0, n_both = 0, n_down = 0, n_dt = 0, n_ovf = 0, n_si = 0;
  int n_rise = 0, n_fall = 0, n_words = 0, n_load = 0;
  int frame_pos = -1;

  dda_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitors ----
  logic [DW-1:0] out_expect, out_word;
  int            out_bits = 0;
  bit            ar_d = 0, af_d = 0;
  always @(negedge clk) if (!rst && !load_param) begin
    if (frame_start) begin
      checks++;
      if (frame_pos != -1 && frame_pos != CPS) begin
        failures++; $display("frame period %0d clocks", frame_pos);
      end
      frame_pos = 0;
      out_expect = dut.si_smooth;
    end
    if (dataout_valid) begin
      out_word = {out_word[DW-2:0], dataout};
      out_bits++;
      if (out_bits == DW) begin
        n_words++;
        checks++;
        if (out_word !== out_expect) begin
          failures++; $display("serial output %0d, expected %0d", out_word, out_expect);
        end
        out_bits = 0;
      end
    end
    if (test_ev1) n_ev1++;
    if (test_ev2) n_ev2++;
    if (test_ev1 && test_ev2) n_both++;
    if (test_cnt_mode == CNT_DOWN) n_down++;
    if (test_si_valid) n_si++;
    if (test_dt_valid) begin
      n_dt++;
      if (test_dt_ovf) n_ovf++;
      // word_done at clock 10, port register 11, three filter stages,
      // detector, then the dT register: clock 16 of the frame
      checks++;
      if (frame_pos != 16) begin failures++; $display("dT at frame clock %0d", frame_pos); end
    end
    if (alarm_rise && !ar_d) n_rise++;
    if (alarm_fall && !af_d) n_fall++;
    ar_d = alarm_rise; af_d = alarm_fall;
    if (frame_pos >= 0) frame_pos++;
  end

  // ---- stimulus ----
  task automatic load_cfg(input dda_cfg_t c);
    logic [CFG_W-1:0] bits = c;
    @(negedge clk);
    load_param = 1;
    for (int b = CFG_W - 1; b >= 0; b--) begin
      datain1 = bits[b];
      @(negedge clk);
    end
    load_param = 0;
    frame_pos = -1;
    n_load++;
    checks++;
    if (dut.cfg !== c) begin failures++; $display("configuration not loaded"); end
  endtask

  task automatic send_sample(input logic [DW-1:0] w1, input logic [DW-1:0] w2);
    while (!frame_start) @(negedge clk);
    for (int b = DW - 1; b >= 0; b--) begin
      datain1 = w1[b]; datain2 = w2[b];
      @(negedge clk);
    end
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (dut.w1 !== w1 || dut.w2 !== w2) begin failures++; $display("sample not received"); end
  endtask

  task automatic run(input real f1, input real f2, input real ph, input int n, input bit flat2);
    for (int i = 0; i < n; i++)
      send_sample(DW'($rtoi(400.0 * $sin(6.2831853 * f1 * i / 128.0)) + $urandom_range(0, 8) - 4),
                  flat2 ? '0 :
                  DW'($rtoi(400.0 * $sin(6.2831853 * f2 * i / 128.0 + ph)) + $urandom_range(0, 8) - 4));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++;
    if (dut.cfg.t_rise != 768 || dut.cfg.n_fall != 128) begin
      failures++; $display("reset configuration wrong");
    end
    load_cfg('{t_rise: 10'd800, t_fall: 10'd500, n_rise: 8'd32, n_fall: 8'd32});
    run(22.0, 22.0, 1.0, 700, 0);
    checks++;
    if (dut.si_smooth < 800 || n_rise == 0) begin
      failures++; $display("locked: index %0d, rise alarms %0d", dut.si_smooth, n_rise);
    end
    run(16.0, 29.0, 0.0, 900, 0);
    checks++;
    if (dut.si_smooth > 500 || n_fall == 0) begin
      failures++; $display("unlocked: index %0d, fall alarms %0d", dut.si_smooth, n_fall);
    end
    run(20.0, 0.0, 0.0, 300, 1);
    $display("loads %0d markers %0d/%0d simultaneous %0d down-count %0d dT %0d overloads %0d",
             n_load, n_ev1, n_ev2, n_both, n_down, n_dt, n_ovf);
    $display("SI updates %0d serial words %0d rise alarms %0d fall alarms %0d",
             n_si, n_words, n_rise, n_fall);
    checks += 6;
    if (n_ev1 == 0 || n_ev2 == 0) begin failures++; $display("no markers"); end
    if (n_both == 0) begin failures++; $display("never simultaneous markers"); end
    if (n_down == 0) begin failures++; $display("never counted down"); end
    if (n_ovf == 0)  begin failures++; $display("never overloaded"); end
    if (n_si == 0 || n_words < 1800) begin failures++; $display("outputs missing"); end
    if (n_rise == 0 || n_fall == 0) begin failures++; $display("alarm never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
