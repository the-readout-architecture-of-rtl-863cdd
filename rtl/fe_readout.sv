// Read-out sequencer of the FE chip.
//
// Every accepted Lev1 trigger pushes {event number, BCID} into a 16-entry
// pending-event queue. The event number is a 4-bit counter that the event counter
// reset clears. The BCID is the binary time stamp at the trigger. A trigger that
// finds the queue full is not accepted (`lv1_acc` stays low), so no hits are tagged
// for it. For the event at the head of the queue the sequencer reads the hits of
// that event from the EoC buffers, lowest column pair first. It sends each hit as
// the word {row, column pair, TOT}. When none are left it sends the End-of-Event
// word {3'b111, overflow, 5'b0, event number, BCID}. The overflow bit is set if any
// EoC buffer lost a hit since the previous EoE. It then retires the event.
//
// Serial format on `dout` (40 Mbit/s, one bit per clock, idle low): a start bit '1'
// and then the 21 word bits, MSB first. A word takes 22 clocks and words can follow
// back to back.
// The 16 pending events, the data-push order and the 3-bit EoE tag follow the
// published design. The word and frame layout is this design's own.
module fe_readout
  import pix_pkg::*;
#(
  parameter int NUM_CP = 18,
  parameter int PEND   = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ecr,
  input  logic [TS_W-1:0]         ts_bin,
  input  logic                    lv1,
  output logic                    lv1_acc,
  output logic [L1_W-1:0]         lv1_id,
  // EoC buffers
  output logic [L1_W-1:0]         rd_l1,
  input  logic [NUM_CP-1:0]       rd_avail,
  input  logic [NUM_CP-1:0][7:0]  rd_row,
  input  logic [NUM_CP-1:0][TS_W-1:0] rd_tot,
  output logic [NUM_CP-1:0]       rd_pop,
  input  logic [NUM_CP-1:0]       ovf,
  output logic                    ovf_clr,
  // serial data to the MCC
  output logic                    dout,
  output logic [$clog2(PEND):0]   pending
);
  localparam int PW = $clog2(PEND);

  logic [L1_W-1:0] q_l1   [PEND];
  logic [TS_W-1:0] q_bcid [PEND];
  logic [PW-1:0]   rp, wp;
  logic [PW:0]     cnt;
  logic [WORD_W:0] sh;
  logic [4:0]      nbit;
  logic            busy;
  logic            cp_found;
  logic [4:0]      cp_idx;
  logic            take_hit, take_eoe;
  eoe_word_t       eoe;
  hit_word_t       hw;

  assign pending = cnt;
  assign lv1_acc = lv1 && (cnt < (PW+1)'(PEND));
  assign rd_l1   = q_l1[rp];

  always_comb begin
    cp_found = 1'b0; cp_idx = '0;
    for (int c = NUM_CP-1; c >= 0; c--)
      if (rd_avail[c]) begin cp_found = 1'b1; cp_idx = 5'(c); end
  end

  assign take_hit = !busy && cnt != 0 && cp_found;
  assign take_eoe = !busy && cnt != 0 && !cp_found;
  assign ovf_clr  = take_eoe;

  always_comb begin
    rd_pop = '0;
    if (take_hit) rd_pop[cp_idx] = 1'b1;
    hw.row = rd_row[cp_idx];
    hw.col = cp_idx;
    hw.tot = rd_tot[cp_idx];
    eoe.tag      = EOE_TAG;
    eoe.overflow = |ovf;
    eoe.spare    = '0;
    eoe.l1id     = q_l1[rp];
    eoe.bcid     = q_bcid[rp];
  end

  assign dout = sh[WORD_W];

  always_ff @(posedge clk) begin
    if (rst) begin
      rp <= '0; wp <= '0; cnt <= '0;
      sh <= '0; nbit <= '0; busy <= 1'b0;
      lv1_id <= '0;
    end else begin
      if (ecr) lv1_id <= '0;
      else if (lv1_acc) lv1_id <= lv1_id + 1'b1;
      if (lv1_acc) begin
        q_l1[wp]   <= lv1_id;
        q_bcid[wp] <= ts_bin;
        wp <= wp + 1'b1;
      end
      if (busy) begin
        sh   <= sh << 1;
        nbit <= nbit - 1'b1;
        if (nbit == 5'd1) busy <= 1'b0;
      end else if (take_hit) begin
        sh   <= {1'b1, hw};
        nbit <= 5'(WORD_W + 1);
        busy <= 1'b1;
      end else if (take_eoe) begin
        sh   <= {1'b1, eoe};
        nbit <= 5'(WORD_W + 1);
        busy <= 1'b1;
        rp   <= rp + 1'b1;
      end else begin
        sh <= '0;
      end
      cnt <= cnt + (PW+1)'(lv1_acc) - (PW+1)'(take_eoe);
    end
  end
endmodule
