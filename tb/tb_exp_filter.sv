// tb_exp_filter: self-checking test of the exponential smoothing filter.
// Drives random and constant signed samples at irregular intervals and
// compares every output with a floating-point model of
// acc += floor((x*2^F - acc) / 2^S), y = floor(acc / 2^F); checks the
// one-clock latency, that y holds between samples, and settling to within
// one LSB of a constant input.
module tb_exp_filter;
  localparam int W = 11, S = 3, F = 3;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [W-1:0] x = '0, y;
  int checks = 0, failures = 0;
  real acc_m;
  int  y_m;

  exp_filter #(.W(W), .SHIFT(S)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v);
    @(negedge clk);
    x = W'(v); in_valid = 1;
    acc_m = acc_m + $floor((real'(v) * (2.0 ** F) - acc_m) / (2.0 ** S));
    y_m = int'($floor(acc_m / (2.0 ** F)));
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || y !== W'(y_m)) begin
      failures++;
      $display("mismatch x=%0d y=%0d exp=%0d valid=%b", v, y, y_m, out_valid);
    end
  endtask

  initial begin
    acc_m = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      apply($urandom_range(0, 1023) - 512);
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        checks++;
        if (out_valid || y !== W'(y_m)) begin
          failures++;
          $display("output changed without a sample");
        end
      end
    end
    for (int i = 0; i < 100; i++) apply(-300);
    checks++;
    if (y > -299 || y < -301) begin failures++; $display("no settling: %0d", y); end
    for (int i = 0; i < 100; i++) apply(400);
    checks++;
    if (y > 401 || y < 399) begin failures++; $display("no settling: %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
