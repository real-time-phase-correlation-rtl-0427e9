// tb_param_loader: self-checking test of the serial configuration register.
// Checks the reset defaults, then shifts in random 36-bit records MSB first
// (t_rise, t_fall, n_rise, n_fall) and checks each field, and checks that
// the register holds while load is low.
module tb_param_loader;
  import dda_pkg::*;
  logic clk = 0, rst = 1, load = 0, sdata = 0;
  dda_cfg_t cfg;
  int checks = 0, failures = 0;

  param_loader dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [35:0] rec;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++;
    if (cfg.t_rise != 768 || cfg.t_fall != 256 || cfg.n_rise != 128 || cfg.n_fall != 128) begin
      failures++; $display("bad reset defaults");
    end
    for (int n = 0; n < 500; n++) begin
      rec = {4'($urandom), 32'($urandom)};
      load = 1;
      for (int b = 35; b >= 0; b--) begin
        sdata = rec[b];
        @(negedge clk);
      end
      load = 0;
      repeat ($urandom_range(0, 20)) begin
        sdata = $urandom;
        @(negedge clk);
      end
      checks++;
      if (cfg.t_rise != rec[35:26] || cfg.t_fall != rec[25:16] ||
          cfg.n_rise != rec[15:8] || cfg.n_fall != rec[7:0]) begin
        failures++; $display("record %h loaded as %h", rec, cfg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
