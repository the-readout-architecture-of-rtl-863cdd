// End-of-Column buffer of one FE column pair: 64 hit slots that keep hits for the
// Lev1 latency.
//
// A hit from the column bus goes into the lowest free slot with its pixel index,
// leading-edge time (LE) and TOT. Every clock each waiting slot compares its age,
// (time stamp - LE) mod 256, with the programmed latency. If the age equals the
// latency while Lev1 is asserted, the slot is tagged with the current event number
// and kept for read-out. Otherwise, once the age reaches the latency, the slot is
// freed. A hit that arrives when all slots are full is lost and sets the sticky
// `ovf` flag. The read-out sequencer clears the flag when it sends the event's
// End-of-Event word.
//
// Read-out: `rd_l1` selects an event. `rd_avail` and `rd_row/rd_tot` show the
// lowest slot tagged with that event, and `rd_pop` frees it.
// Timing: a hit can be tagged from the clock after it was written. Tagging happens
// in the same clock as Lev1.
// The 64 slots and the latency-window logic follow the published FE. The slot
// order and the clearing of the overflow flag are this design's choices.
module fe_eoc_buffer
  import pix_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [TS_W-1:0] ts_bin,
  input  logic [TS_W-1:0] latency,
  input  logic            lv1,
  input  logic [L1_W-1:0] lv1_id,
  // from column bus
  input  logic            wr_valid,
  input  logic [7:0]      wr_row,
  input  logic [TS_W-1:0] wr_le,
  input  logic [TS_W-1:0] wr_tot,
  // read-out
  input  logic [L1_W-1:0] rd_l1,
  output logic            rd_avail,
  output logic [7:0]      rd_row,
  output logic [TS_W-1:0] rd_tot,
  input  logic            rd_pop,
  output logic            ovf,
  input  logic            ovf_clr,
  output logic            full
);
  localparam int AW = $clog2(DEPTH);

  logic [DEPTH-1:0] used, trig;
  logic [7:0]      row [DEPTH];
  logic [TS_W-1:0] le  [DEPTH];
  logic [TS_W-1:0] tot [DEPTH];
  logic [L1_W-1:0] tag [DEPTH];

  logic          free_found, rd_found;
  logic [AW-1:0] free_idx, rd_idx;

  always_comb begin
    free_found = 1'b0; free_idx = '0;
    rd_found   = 1'b0; rd_idx   = '0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (!used[i]) begin free_found = 1'b1; free_idx = AW'(i); end
      if (used[i] && trig[i] && tag[i] == rd_l1) begin rd_found = 1'b1; rd_idx = AW'(i); end
    end
  end

  assign full     = ~free_found;
  assign rd_avail = rd_found;
  assign rd_row   = row[rd_idx];
  assign rd_tot   = tot[rd_idx];

  always_ff @(posedge clk) begin
    if (rst) begin
      used <= '0;
      trig <= '0;
      ovf  <= 1'b0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (used[i] && !trig[i]) begin
          logic [TS_W-1:0] age;
          age = ts_bin - le[i];
          if (age == latency && lv1) begin
            trig[i] <= 1'b1;
            tag[i]  <= lv1_id;
          end else if (age >= latency) begin
            used[i] <= 1'b0;
          end
        end
      end
      if (rd_pop && rd_found) begin
        used[rd_idx] <= 1'b0;
        trig[rd_idx] <= 1'b0;
      end
      if (ovf_clr) ovf <= 1'b0;
      if (wr_valid) begin
        if (free_found) begin
          used[free_idx] <= 1'b1;
          trig[free_idx] <= 1'b0;
          row[free_idx]  <= wr_row;
          le[free_idx]   <= wr_le;
          tot[free_idx]  <= wr_tot;
        end else begin
          ovf <= 1'b1;
        end
      end
    end
  end
endmodule
