// Serial receiver for one FE data line of the MCC.
// The line is idle low. A word is a start bit '1' followed by 21 data bits, MSB
// first, one bit per 40 MHz clock. After the 21st bit the word is handed to the
// receiver FIFO with a one-clock `valid` strobe, and the receiver looks for the next
// start bit. The bit counter always runs out, so the receiver also finds its way
// back to hunting for a start bit after power up.
// Timing: `valid` is high the clock after the last data bit is sampled.
// The 21-bit word and the 40 Mbit/s FE line follow the published design. The start
// bit framing is this design's own.
module mcc_rx
  import pix_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              din,
  output logic              valid,
  output logic [WORD_W-1:0] word
);
  logic [4:0]        nbit;
  logic              busy;
  logic [WORD_W-1:0] sr;

  always_ff @(posedge clk) begin
    valid <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      nbit <= '0;
    end else if (!busy) begin
      if (din) begin
        busy <= 1'b1;
        nbit <= 5'(WORD_W);
      end
    end else begin
      sr   <= {sr[WORD_W-2:0], din};
      nbit <= nbit - 1'b1;
      if (nbit <= 5'd1) begin
        busy  <= 1'b0;
        valid <= 1'b1;
        word  <= {sr[WORD_W-2:0], din};
      end
    end
  end
endmodule
