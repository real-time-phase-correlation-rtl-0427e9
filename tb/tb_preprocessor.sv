// tb_preprocessor: self-checking test of the per-channel pre-processing
// filters. A floating-point model of the three exponential sections
// (high-pass by subtraction, band-pass low-pass, extra low-pass), each
// acc += floor((x*2^F - acc) / 2^S), y = floor(acc / 2^F), is compared with
// every output. Also checks the three-clock latency, that a constant (DC)
// input decays to within a few LSB of zero, and that a sine in the pass band
// keeps a useful amplitude.
module tb_preprocessor;
  localparam int DW = 10, HS = 3, BS = 1, LS = 1;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [DW-1:0] x = '0;
  logic signed [DW:0] y;
  int checks = 0, failures = 0;
  real a_h = 0, a_b = 0, a_l = 0;
  int  y_h = 0, hp = 0, y_b = 0, y_l = 0;

  preprocessor #(.DW(DW), .HP_SHIFT(HS), .BP_LP_SHIFT(BS), .LP_SHIFT(LS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sec(ref real acc, input int v, input int s);
    acc = acc + $floor((real'(v) * (2.0 ** s) - acc) / (2.0 ** s));
    return int'($floor(acc / (2.0 ** s)));
  endfunction

  task automatic apply(input int v);
    @(negedge clk);
    x = DW'(v); in_valid = 1;
    hp  = v - y_h;
    y_h = sec(a_h, v, HS);
    y_b = sec(a_b, hp, BS);
    y_l = sec(a_l, y_b, LS);
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("output too early"); end
    @(negedge clk);
    checks++;
    if (!out_valid || y !== (DW+1)'(y_l)) begin
      failures++;
      if (failures < 10) $display("in %0d: out %0d valid=%b, expected %0d", v, y, out_valid, y_l);
    end
  endtask

  initial begin
    int mx;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 2000; i++) apply($urandom_range(0, 1023) - 512);
    for (int i = 0; i < 200; i++) apply(400);
    checks++;
    if (y > 8 || y < -8) begin failures++; $display("DC not removed: %0d", y); end
    mx = 0;
    for (int i = 0; i < 300; i++) begin
      apply($rtoi(400.0 * $sin(6.2831853 * i / 16.0)));
      if (i > 100 && y > mx) mx = y;
    end
    checks++;
    if (mx < 100) begin failures++; $display("pass-band sine lost: peak %0d", mx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
