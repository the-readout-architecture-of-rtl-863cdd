// Self-trigger generator of the FE chip, used to read out the chip with a source.
// A Trigger from the MCC arms it. The next rising edge of the chip's Fast OR (a hit
// anywhere in the pixel array) starts a counter. After `delay` clocks one Lev1 pulse
// is produced on `lv1_out`, and the generator returns to the idle state. For the
// hits to be tagged, `delay` is set equal to the EoC latency.
// Timing: `lv1_out` is high for one clock, starting `delay`+2 clocks after the clock
// edge that first samples the Fast OR high.
// The arming by an MCC trigger and the Fast-OR-driven, programmable-latency Lev1
// follow the published FE. One Lev1 per arming is this design's choice.
module fe_self_trigger #(
  parameter int DLY_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             arm,
  input  logic             fast_or,
  input  logic [DLY_W-1:0] delay,
  output logic             lv1_out
);
  typedef enum logic [1:0] {ST_IDLE, ST_ARMED, ST_COUNT} st_e;
  st_e              st;
  logic             fo_q;
  logic [DLY_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= ST_IDLE; fo_q <= 1'b0; cnt <= '0; lv1_out <= 1'b0;
    end else begin
      fo_q    <= fast_or;
      lv1_out <= 1'b0;
      unique case (st)
        ST_IDLE:  if (arm) st <= ST_ARMED;
        ST_ARMED: if (fast_or && !fo_q) begin
                    cnt <= delay;
                    st  <= ST_COUNT;
                  end
        ST_COUNT: if (cnt == '0) begin
                    lv1_out <= 1'b1;
                    st      <= ST_IDLE;
                  end else cnt <= cnt - 1'b1;
        default:  st <= ST_IDLE;
      endcase
    end
  end
endmodule
