// Receiver FIFO of the MCC for one FE chip: 128 words of 21 bits.
//
// Hit words and End-of-Event (EoE) words are written in arrival order. EoE words are
// recognised by their three top bits being 111. The FIFO never loses an EoE word,
// because losing one would misalign all later events. For this, hit words are only
// accepted while more than EOE_RESERVE words are free. A hit refused for lack of
// space is lost. The loss is recorded and the next EoE word is stored with its
// overflow bit set, so the loss shows in the data stream. `eoe_wr` pulses when an
// EoE word is stored; it feeds the scoreboard. An EoE word that finds the FIFO
// completely full is lost too and sets the sticky `eoe_lost` error; the reserve
// makes this impossible while at most EOE_RESERVE events are pending.
// Read side: first-word-fall-through. `rd_valid`/`rd_data` show the oldest word and
// `rd_pop` removes it.
// Timing: a written word can be read in the next clock.
// The 128 x 21-bit size (the size chosen for the produced chip) and signalling the
// overflow in the data stream follow the published MCC. The reserve rule is this
// design's own.
module mcc_rx_fifo
  import pix_pkg::*;
#(
  parameter int DEPTH       = 128,
  parameter int W           = 21,
  parameter int EOE_RESERVE = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wr_valid,
  input  logic [W-1:0]           wr_data,
  output logic                   eoe_wr,
  output logic                   rd_valid,
  output logic [W-1:0]           rd_data,
  input  logic                   rd_pop,
  output logic [$clog2(DEPTH):0] count,
  output logic                   lost_hits,
  output logic                   eoe_lost
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic          is_eoe, do_wr, do_rd;

  assign is_eoe   = wr_data[W-1 -: 3] == EOE_TAG;
  assign do_wr    = wr_valid && (is_eoe ? (count < (AW+1)'(DEPTH))
                                        : (count < (AW+1)'(DEPTH - EOE_RESERVE)));
  assign do_rd    = rd_pop && count != 0;
  assign rd_valid = count != 0;
  assign rd_data  = mem[rp];

  always_ff @(posedge clk) begin
    eoe_wr <= 1'b0;
    if (rst) begin
      rp <= '0; wp <= '0; count <= '0; lost_hits <= 1'b0; eoe_lost <= 1'b0;
    end else begin
      if (do_wr) begin
        if (is_eoe) begin
          mem[wp] <= wr_data | (W'(lost_hits) << (W-4));
          lost_hits <= 1'b0;
          eoe_wr <= 1'b1;
        end else begin
          mem[wp] <= wr_data;
        end
        wp <= wp + 1'b1;
      end else if (wr_valid) begin
        if (is_eoe) eoe_lost <= 1'b1;
        else        lost_hits <= 1'b1;
      end
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
