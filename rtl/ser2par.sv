// ser2par: serial-to-parallel input port for one signal.
//
// In each bit slot of a frame (shift_en) the serial input is shifted into a
// DW-bit register, most significant bit first; on word_done the collected
// word is presented on q with a one-clock valid pulse and kept until the next
// word. Words are two's complement samples.
// The port itself is named by the document (two such ports feed the
// processor core); the bit order, framing and number format are this
// design's choices.
module ser2par #(
  parameter int unsigned DW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          shift_en,
  input  logic          sdata,
  input  logic          word_done,
  output logic          q_valid,
  output logic [DW-1:0] q
);
  logic [DW-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr      <= '0;
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= word_done;
      if (shift_en)  sr <= {sr[DW-2:0], sdata};
      if (word_done) q  <= sr;
    end
  end
endmodule
