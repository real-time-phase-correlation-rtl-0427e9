// tb_par2ser: self-checking test of the parallel-to-serial output port.
// Loads random words, collects the DW bits that follow with sout_valid high
// and compares the rebuilt word; checks that valid stays low afterwards and
// that a load in the middle of a word restarts with the new word.
module tb_par2ser;
  localparam int DW = 10;
  logic clk = 0, rst = 1, load = 0, sout, sout_valid;
  logic [DW-1:0] d = '0;
  int checks = 0, failures = 0;

  par2ser #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_check(input logic [DW-1:0] w, input int cut);
    logic [DW-1:0] got = '0;
    @(negedge clk);
    d = w; load = 1;
    @(negedge clk);
    load = 0; d = DW'($urandom);
    for (int b = 0; b < DW; b++) begin
      if (b == cut) return;
      checks++;
      if (!sout_valid) begin failures++; $display("valid low at bit %0d", b); end
      got = {got[DW-2:0], sout};
      @(negedge clk);
    end
    checks++;
    if (got !== w) begin failures++; $display("sent %h, got %h", w, got); end
    repeat ($urandom_range(1, 4)) begin
      checks++;
      if (sout_valid) begin failures++; $display("valid after the word"); end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 1000; n++) begin
      if (n % 10 == 5) send_and_check(DW'($urandom), $urandom_range(1, DW - 1));
      send_and_check(DW'($urandom), DW);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
