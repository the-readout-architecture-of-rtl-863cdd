// Event builder of the MCC.
//
// It waits until the Pending Event FIFO has an event and the scoreboard reports that
// every enabled FE chip has delivered the event's End-of-Event (EoE) word. It then
// writes one module event into the output stream:
//   HEADER  {skipped[4:0], 4'b0, Lev1[3:0], BCID[7:0]}
//   for each enabled FE, lowest number first, only if it has hits or errors:
//     FEFLAG {bcid_err, l1_err, overflow, addr_err, 13'b0, fe[3:0]}
//     HIT    {row[7:0], col[4:0], tot[7:0]}  for every hit word of that FE
//   TRAILER {5'b0, error mask of the 16 FE chips}
// Every word is a 3-bit type and a 21-bit payload. Leaving out the FEFLAG of an FE
// chip without hits is the data compression. The FEFLAG sits in front of an FE's
// hits. If an error only shows at its EoE word, a second FEFLAG with the error bits
// follows the hits. Checks: the EoE's BCID and Lev1 number must match those stored
// at the trigger (each check can be switched off). A hit's row must be below 160 and
// its column pair below 18. The overflow bit of the EoE (hits lost in the FE or in
// the FIFO) is passed on.
// Interface: the output is a valid/ready word stream. One FIFO word is consumed per
// output word, and a word is produced each clock while `ow_ready` is high.
// The scoreboard start, the checks and the overflow signalling follow the published
// MCC. The word formats and the compression rule are this design's own.
module mcc_event_builder
  import pix_pkg::*;
#(
  parameter int NUM_FE = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [NUM_FE-1:0]             fe_en,
  input  logic                          chk_bcid,
  input  logic                          chk_l1,
  // pending event + scoreboard
  input  logic                          ev_valid,
  input  logic [L1_W-1:0]               ev_l1,
  input  logic [TS_W-1:0]               ev_bcid,
  input  logic [4:0]                    ev_skip,
  input  logic                          sb_ready,
  output logic                          ev_done,
  // receiver FIFOs
  input  logic [NUM_FE-1:0]             rd_valid,
  input  logic [NUM_FE-1:0][WORD_W-1:0] rd_data,
  output logic [NUM_FE-1:0]             rd_pop,
  // output words
  output logic                          ow_valid,
  output logic [OWORD_W-1:0]            ow_data,
  input  logic                          ow_ready,
  output logic                          idle,
  output logic [15:0]                   err_events
);
  typedef enum logic [1:0] {B_IDLE, B_SCAN, B_TRAIL} bst_e;
  localparam int FW = $clog2(NUM_FE) > 0 ? $clog2(NUM_FE) : 1;

  bst_e              st;
  logic [FW-1:0]     fe;
  logic              flag_sent;
  logic              addr_err;
  logic [NUM_FE-1:0] err_mask;
  logic              can_load;
  logic [WORD_W-1:0] head;
  hit_word_t         hw;
  eoe_word_t         ew;
  logic              b_err, l_err, any_err;

  assign can_load = !ow_valid || ow_ready;
  assign idle     = (st == B_IDLE);
  assign head     = rd_data[fe];
  assign hw       = hit_word_t'(head);
  assign ew       = eoe_word_t'(head);
  assign b_err    = chk_bcid && ew.bcid != ev_bcid;
  assign l_err    = chk_l1 && ew.l1id != ev_l1;
  assign any_err  = b_err || l_err || ew.overflow || addr_err;

  always_ff @(posedge clk) begin
    rd_pop  <= '0;
    ev_done <= 1'b0;
    if (rst) begin
      st <= B_IDLE; ow_valid <= 1'b0; ow_data <= '0; fe <= '0;
      flag_sent <= 1'b0; addr_err <= 1'b0; err_mask <= '0; err_events <= '0;
    end else begin
      if (ow_valid && ow_ready) ow_valid <= 1'b0;
      if (can_load && rd_pop == '0 && !ev_done) begin
        unique case (st)
          B_IDLE: if (ev_valid && sb_ready) begin
            ow_valid <= 1'b1;
            ow_data  <= {OT_HEADER, ev_skip, 4'b0, ev_l1, ev_bcid};
            fe <= '0; flag_sent <= 1'b0; addr_err <= 1'b0; err_mask <= '0;
            st <= B_SCAN;
          end
          B_SCAN: begin
            if (!fe_en[fe] || !rd_valid[fe]) begin
              // disabled chip (a ready scoreboard guarantees data for enabled ones)
              if (int'(fe) == NUM_FE-1) st <= B_TRAIL;
              fe <= fe + 1'b1;
            end else if (head[WORD_W-1 -: 3] != EOE_TAG) begin
              if (!flag_sent) begin
                ow_valid  <= 1'b1;
                ow_data   <= {OT_FEFLAG, 4'b0000, 13'b0, 4'(fe)};
                flag_sent <= 1'b1;
              end else begin
                ow_valid <= 1'b1;
                ow_data  <= {OT_HIT, head};
                rd_pop[fe] <= 1'b1;
                if (hw.row >= 8'd160 || hw.col >= 5'd18) addr_err <= 1'b1;
              end
            end else begin
              if (any_err) begin
                ow_valid <= 1'b1;
                ow_data  <= {OT_FEFLAG, b_err, l_err, ew.overflow, addr_err, 13'b0, 4'(fe)};
                err_mask[fe] <= 1'b1;
              end
              rd_pop[fe] <= 1'b1;
              flag_sent  <= 1'b0;
              addr_err   <= 1'b0;
              if (int'(fe) == NUM_FE-1) st <= B_TRAIL;
              fe <= fe + 1'b1;
            end
          end
          B_TRAIL: begin
            ow_valid <= 1'b1;
            ow_data  <= {OT_TRAILER, 5'b0, 16'(err_mask)};
            if (err_mask != '0) err_events <= err_events + 1'b1;
            ev_done <= 1'b1;
            st <= B_IDLE;
          end
          default: st <= B_IDLE;
        endcase
      end
    end
  end
endmodule
