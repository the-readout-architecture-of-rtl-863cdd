// Scoreboard of the MCC: tracks which FE chips have delivered the End-of-Event (EoE)
// word of each pending event.
// It is a PEND x NUM_FE bit matrix. Each FE has its own pointer, which advances on
// every EoE word stored in that FE's receiver FIFO. The EoE sets the bit of that FE
// in the row its pointer names. The oldest event is ready (`ready`) when its row has
// a bit for every enabled FE chip. Event building can then start without waiting
// for later events. `done` (event built) clears the row and moves to the next.
// Timing: `ready` is combinational from the matrix. An EoE stored in clock t can
// make `ready` true in clock t+1.
// The scoreboard and the rule "build as soon as all enabled FE chips finished the
// event" follow the published MCC. The matrix form is this design's own.
module mcc_scoreboard #(
  parameter int NUM_FE = 16,
  parameter int PEND   = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NUM_FE-1:0] eoe_wr,
  input  logic [NUM_FE-1:0] fe_en,
  output logic              ready,
  input  logic              done,
  output logic [NUM_FE-1:0] head_row
);
  localparam int PW = $clog2(PEND);

  logic [NUM_FE-1:0] sb [PEND];
  logic [PW-1:0]     fp [NUM_FE];
  logic [PW-1:0]     rp;

  assign head_row = sb[rp];
  assign ready    = &(sb[rp] | ~fe_en);

  always_ff @(posedge clk) begin
    if (rst) begin
      rp <= '0;
      for (int e = 0; e < PEND; e++) sb[e] <= '0;
      for (int f = 0; f < NUM_FE; f++) fp[f] <= '0;
    end else begin
      if (done) begin
        sb[rp] <= '0;
        rp <= rp + 1'b1;
      end
      for (int f = 0; f < NUM_FE; f++) begin
        if (eoe_wr[f]) begin
          sb[fp[f]][f] <= 1'b1;
          fp[f] <= fp[f] + 1'b1;
        end
      end
    end
  end
endmodule
