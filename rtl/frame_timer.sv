// frame_timer: sample framing from the master clock.
//
// The chip runs from one master clock (128 kHz in the document) and takes
// input samples at a much lower rate (128 S/s), so each sample occupies a
// frame of CLKS_PER_SAMPLE = 1000 clocks. A counter walks through the frame:
// clock 0 is frame_start, clocks 0 .. DW-1 are the serial bit slots in which
// the two input ports shift in one DW-bit word each (MSB first) and the
// output port starts its word, and clock DW is word_done, when the collected
// words are handed to the processing chain. The rest of the frame is idle.
// While hold is high (configuration loading) the counter stays at its start
// and no frame events are produced.
// The clock and sample rates are the document's; the frame layout is this
// design's choice.
module frame_timer #(
  parameter int unsigned CLKS_PER_SAMPLE = 1000,
  parameter int unsigned DW              = 10
) (
  input  logic clk,
  input  logic rst,
  input  logic hold,
  output logic frame_start,
  output logic bit_slot,
  output logic word_done
);
  localparam int unsigned CW = $clog2(CLKS_PER_SAMPLE);

  logic [CW-1:0] cnt;
  logic          run;

  always_ff @(posedge clk) begin
    if (rst || hold) begin
      cnt <= '0;
      run <= 1'b0;
    end else begin
      run <= 1'b1;
      if (run) cnt <= (cnt == CW'(CLKS_PER_SAMPLE - 1)) ? '0 : cnt + 1'b1;
    end
  end

  // The first clock after reset or hold is a set-up clock, then frames run.
  assign frame_start = run && cnt == '0;
  assign bit_slot    = run && cnt < CW'(DW);
  assign word_done   = run && cnt == CW'(DW);

  initial assert (CLKS_PER_SAMPLE > DW + 1)
    else $fatal(1, "frame_timer: a frame must be longer than a word");
endmodule
