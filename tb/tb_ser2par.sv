// tb_ser2par: self-checking test of the serial-to-parallel input port.
// Sends random 10-bit words MSB first in DW bit slots, with idle clocks and
// idle-time garbage on the line between words, and checks each collected
// word and the one-clock valid pulse after word_done.
module tb_ser2par;
  localparam int DW = 10;
  logic clk = 0, rst = 1, shift_en = 0, sdata = 0, word_done = 0, q_valid;
  logic [DW-1:0] q;
  int checks = 0, failures = 0;

  ser2par #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] w;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 1000; n++) begin
      w = DW'($urandom);
      for (int b = DW - 1; b >= 0; b--) begin
        sdata = w[b]; shift_en = 1;
        @(negedge clk);
      end
      shift_en = 0; word_done = 1; sdata = $urandom;
      @(negedge clk);
      word_done = 0;
      checks++;
      if (!q_valid || q !== w) begin
        failures++; $display("word %h, expected %h (valid=%b)", q, w, q_valid);
      end
      repeat ($urandom_range(0, 5)) begin
        sdata = $urandom;
        @(negedge clk);
        checks++;
        if (q_valid || q !== w) begin failures++; $display("word not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
