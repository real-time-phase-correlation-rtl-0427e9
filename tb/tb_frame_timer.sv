// tb_frame_timer: self-checking test of the sample frame timer.
// Runs the default 1000-clock frame for several frames, holds and releases
// it, and checks the frame period, the positions of frame_start, the DW bit
// slots and word_done, and that hold stops all frame events.
module tb_frame_timer;
  localparam int CPS = 1000, DW = 10;
  logic clk = 0, rst = 1, hold = 0, frame_start, bit_slot, word_done;
  int checks = 0, failures = 0;

  frame_timer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frames(input int nframes);
    int pos = -1;   // clocks since the last frame_start
    int starts = 0;
    for (int c = 0; c < nframes * CPS + 5; c++) begin
      @(negedge clk);
      if (frame_start) begin
        checks++;
        if (pos != -1 && pos != CPS) begin failures++; $display("frame length %0d", pos); end
        pos = 0; starts++;
      end
      if (pos >= 0) begin
        checks++;
        if (bit_slot !== (pos < DW) || word_done !== (pos == DW)) begin
          failures++; $display("bad slot timing at clock %0d of the frame", pos);
        end
        pos++;
      end
    end
    checks++;
    if (starts < nframes) begin failures++; $display("only %0d frames", starts); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run_frames(5);
    hold = 1;
    repeat (2000) begin
      @(negedge clk);
      checks++;
      if (frame_start || bit_slot || word_done) begin failures++; $display("event in hold"); end
    end
    hold = 0;
    run_frames(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
