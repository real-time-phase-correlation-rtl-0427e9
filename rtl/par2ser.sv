// par2ser: parallel-to-serial output port.
//
// On load the DW-bit word d is captured; during the following DW clocks its
// bits appear on sout, most significant bit first, with sout_valid high.
// A load while a word is still being sent restarts with the new word.
// The port is named by the document (it carries the synchronization index
// off chip); the bit order and the valid strobe are this design's choices.
module par2ser #(
  parameter int unsigned DW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [DW-1:0] d,
  output logic          sout,
  output logic          sout_valid
);
  localparam int unsigned CW = $clog2(DW + 1);

  logic [DW-1:0] sr;
  logic [CW-1:0] left;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr   <= '0;
      left <= '0;
    end else if (load) begin
      sr   <= d;
      left <= CW'(DW);
    end else if (left != '0) begin
      sr   <= sr << 1;
      left <= left - 1'b1;
    end
  end

  assign sout       = sr[DW-1];
  assign sout_valid = left != '0;
endmodule
