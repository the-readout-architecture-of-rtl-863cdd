// FE configuration port of the MCC. It sends bit strings to the FE chips over the
// three common slow lines CCK, DCI and LD.
// A WRFE command gives a string of 1..32 bits and the LD level to hold while the
// string is sent. Each bit takes DIV clocks (8 clocks = 5 MHz at 40 MHz). DCI is set
// at the start of the bit period and CCK rises in its middle. After the last bit LD
// returns low. If LD was high, the FE chips latch their new command at that falling
// edge. The FEGRST command sends a broadcast GlobalReset the same way: the 20-bit
// command word {bcast=1, addr 0, 10'b0, 5'b00001} with LD high.
// A request that comes while a string is still going out is dropped and sets the
// sticky `err_busy`.
// Timing: a string of L bits keeps `busy` high for L*DIV + 1 clocks.
// The three lines, the 5 MHz rate and broadcast addressing follow the published
// design. The string length limit is this design's own.
module mcc_fe_cfg
  import pix_pkg::*;
#(
  parameter int DIV = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wrfe,
  input  logic        ld_lvl,
  input  logic [5:0]  len,
  input  logic [31:0] data,
  input  logic        fegrst,
  output logic        cck,
  output logic        dci,
  output logic        ld,
  output logic        busy,
  output logic        err_busy
);
  localparam int PW = $clog2(DIV);
  localparam logic [19:0] GRST_WORD = {1'b1, 4'd0, 10'd0, 5'b00001};

  logic [31:0]   sh;
  logic [5:0]    nbits;
  logic [PW-1:0] ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; cck <= 1'b0; dci <= 1'b0; ld <= 1'b0;
      nbits <= '0; ph <= '0; err_busy <= 1'b0;
    end else if (!busy) begin
      ld <= 1'b0; cck <= 1'b0;
      if (wrfe || fegrst) begin
        busy  <= 1'b1;
        ph    <= '0;
        ld    <= fegrst ? 1'b1 : ld_lvl;
        nbits <= fegrst ? 6'd20 : len;
        sh    <= fegrst ? {GRST_WORD, 12'b0} : (data << (6'd32 - len));
      end
    end else begin
      if (wrfe || fegrst) err_busy <= 1'b1;
      if (nbits == 0) begin
        busy <= 1'b0;
        ld   <= 1'b0;
        cck  <= 1'b0;
      end else begin
        dci <= sh[31];
        cck <= (ph >= PW'(DIV/2));
        ph  <= ph + 1'b1;
        if (ph == PW'(DIV-1)) begin
          sh    <= sh << 1;
          nbits <= nbits - 1'b1;
        end
      end
    end
  end
endmodule
