// 8-bit Gray-coded time stamp counter of the FE chip.
// It counts bunch crossings at 40 MHz. The Gray value is what is distributed up the
// pixel columns, so that a pixel latching it mid-transition is off by at most one
// count. The binary value is provided for the End-of-Column logic and as the BCID.
// The counter restarts at zero on `rst` (chip reset or BCID reset).
// Timing: `gray`/`bin` are registered and change one clock after each edge.
// The 8-bit Gray code and the 40 MHz rate follow the published FE design. Resetting
// it with the BCID reset is this design's choice.
module gray_timestamp #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] gray,
  output logic [W-1:0] bin
);
  always_ff @(posedge clk) begin
    if (rst) bin <= '0;
    else     bin <= bin + 1'b1;
  end
  assign gray = bin ^ (bin >> 1);
endmodule
