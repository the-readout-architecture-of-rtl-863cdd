// Output serialiser of the MCC: sends the event words to the ROD on one or two data
// lines at 40, 80 or 160 Mbit/s.
//
// Each 24-bit word goes out as a frame: a start bit '1' and then the word, MSB
// first. The lines are low between frames. With k = 1, 2, 2 or 4 bits per 40 MHz
// clock (modes 0..3), the serialiser shifts k bits out of the frame each clock.
// A frame that does not fill its last clock is padded with zeros, and the next word
// is taken in that same clock. For each line the module gives the bit for the rising
// clock edge (`dto_r`) and for the falling edge (`dto_f`). The double-data-rate pad
// that merges them is outside this RTL. Bit order within a clock:
//   mode 0 (40 Mbit/s, 1 line)       line0 r=f=b0
//   mode 1 (80 Mbit/s, 2 lines)      line0 r=f=b0, line1 r=f=b1
//   mode 2 (80 Mbit/s, 1 line, DDR)  line0 r=b0 f=b1
//   mode 3 (160 Mbit/s, 2 lines, DDR) line0 r=b0 f=b1, line1 r=b2 f=b3
// Interface: `w_valid`/`w_ready` handshake. `w_ready` is high when the current
// frame ends in this clock.
// Timing: a frame needs ceil(25/k) clocks: 25, 13, 13 or 7.
// The four output modes, up to 160 Mbit/s, and the use of both clock edges follow
// the published MCC. The framing is this design's own.
module mcc_output_link
  import pix_pkg::*;
#(
  parameter int WORD_W_P = 24
) (
  input  logic                clk,
  input  logic                rst,
  input  omode_e              mode,
  input  logic                w_valid,
  input  logic [WORD_W_P-1:0] w_data,
  output logic                w_ready,
  output logic [1:0]          dto_r,
  output logic [1:0]          dto_f,
  output logic                busy
);
  localparam int FW = WORD_W_P + 1;

  logic [FW+3-1:0] sh;     // three spare zero bits for padding
  logic [5:0]      cnt;
  logic [5:0]      k;
  logic [3:0]      b;      // bits of this clock, b[3] first

  always_comb begin
    unique case (mode)
      OM_40_1L:     k = 6'd1;
      OM_80_2L,
      OM_80_1L_DDR: k = 6'd2;
      default:      k = 6'd4;
    endcase
  end

  assign w_ready = (cnt <= k);
  assign busy    = (cnt != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      sh <= '0; cnt <= '0; b <= '0;
    end else begin
      if (cnt != 0) begin
        unique case (mode)
          OM_40_1L:     b <= {sh[FW+2], 3'b0};
          OM_80_2L,
          OM_80_1L_DDR: b <= {sh[FW+2 -: 2], 2'b0};
          default:      b <= sh[FW+2 -: 4];
        endcase
        sh  <= sh << k;
        cnt <= (cnt > k) ? cnt - k : 6'd0;
      end else begin
        b <= '0;
      end
      if (w_ready && w_valid) begin
        sh  <= {1'b1, w_data, 3'b000};
        cnt <= 6'(FW);
      end
    end
  end

  always_comb begin
    unique case (mode)
      OM_40_1L:     begin dto_r = {1'b0, b[3]}; dto_f = {1'b0, b[3]}; end
      OM_80_2L:     begin dto_r = {b[2], b[3]}; dto_f = {b[2], b[3]}; end
      OM_80_1L_DDR: begin dto_r = {1'b0, b[3]}; dto_f = {1'b0, b[2]}; end
      default:      begin dto_r = {b[1], b[3]}; dto_f = {b[0], b[2]}; end
    endcase
  end
endmodule
