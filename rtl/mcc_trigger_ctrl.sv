// Trigger distribution and Pending Event FIFO of the MCC.
//
// A decoded Trigger is accepted if fewer than 16 events are pending, that is
// triggered but not yet fully built. An accepted trigger is sent to every enabled
// FE chip as a one-clock pulse on `fe_lv1`. Its 4-bit Lev1 number and 8-bit BCID
// are pushed into the Pending Event FIFO. A trigger that finds 16 events pending is
// dropped and counted. The count, saturating at 31, is stored with the next
// accepted event as its warning, so that the ROD can insert the missing empty
// events. The MCC keeps its own BCID counter and Lev1 counter in step with those
// of the FE chips. It drives their BCID reset and event counter reset strobes
// (`fe_bcr`, `fe_ecr`) and clears its own counters in the same clock.
// Read side: the event builder sees the oldest entry and retires it with `pop`.
// Timing: `fe_lv1` is high in the clock after `trig`. The stored BCID is the
// counter value during that clock, the value the FE records.
// 16 pending events, 8-bit BCID, 4-bit Lev1 and dropping with a warning follow the
// published MCC. Attaching the warning to the next event is this design's reading.
module mcc_trigger_ctrl
  import pix_pkg::*;
#(
  parameter int NUM_FE = 16,
  parameter int PEND   = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  trig,
  input  logic                  bcr,
  input  logic                  ecr,
  input  logic [NUM_FE-1:0]     fe_en,
  output logic [NUM_FE-1:0]     fe_lv1,
  output logic                  fe_bcr,
  output logic                  fe_ecr,
  // pending events
  output logic                  ev_valid,
  output logic [L1_W-1:0]       ev_l1,
  output logic [TS_W-1:0]       ev_bcid,
  output logic [4:0]            ev_skip,
  input  logic                  pop,
  output logic [$clog2(PEND):0] pending,
  output logic [15:0]           dropped_total
);
  localparam int PW = $clog2(PEND);

  logic [L1_W-1:0] q_l1   [PEND];
  logic [TS_W-1:0] q_bcid [PEND];
  logic [4:0]      q_skip [PEND];
  logic [PW-1:0]   rp, wp;
  logic [PW:0]     cnt;
  logic [TS_W-1:0] bcid_cnt, bcid_nxt;
  logic [L1_W-1:0] l1_cnt;
  logic [4:0]      skip;
  logic            acc, do_pop;

  assign acc      = trig && (cnt < (PW+1)'(PEND));
  assign do_pop   = pop && cnt != 0;
  assign bcid_nxt = fe_bcr ? '0 : bcid_cnt + 1'b1;
  assign ev_valid = cnt != 0;
  assign ev_l1    = q_l1[rp];
  assign ev_bcid  = q_bcid[rp];
  assign ev_skip  = q_skip[rp];
  assign pending  = cnt;

  always_ff @(posedge clk) begin
    bcid_cnt <= bcid_nxt;
    if (rst) begin
      rp <= '0; wp <= '0; cnt <= '0; l1_cnt <= '0; skip <= '0;
      fe_lv1 <= '0; fe_bcr <= 1'b0; fe_ecr <= 1'b0; dropped_total <= '0;
    end else begin
      fe_bcr <= bcr;
      fe_ecr <= ecr;
      fe_lv1 <= acc ? fe_en : '0;
      if (fe_ecr) l1_cnt <= '0;
      else if (acc) l1_cnt <= l1_cnt + 1'b1;
      if (acc) begin
        q_l1[wp]   <= l1_cnt;
        q_bcid[wp] <= bcid_nxt;
        q_skip[wp] <= skip;
        wp   <= wp + 1'b1;
        skip <= '0;
      end else if (trig) begin
        if (skip != 5'd31) skip <= skip + 1'b1;
        dropped_total <= dropped_total + 1'b1;
      end
      if (do_pop) rp <= rp + 1'b1;
      cnt <= cnt + (PW+1)'(acc) - (PW+1)'(do_pop);
    end
  end
endmodule
