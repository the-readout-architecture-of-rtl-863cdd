// Command decoder of the MCC. It turns the serial command line from the ROD into
// decoded commands.
//
// The line is idle low and every command starts with a '1'. The first five bits are
// compared with the Trigger code 11101 and with the Fast/Slow header 10110. A code
// within one flipped bit of either is accepted; the two codes differ in three
// bits. A Trigger is acted on as soon as its fifth bit is in, whatever bit was
// flipped, so the trigger timing stays exact. After the header comes a 4-bit field:
// 0001 BCID reset, 0010 event counter reset, 0100 calibration strobe,
// 1000 sync (fast commands), 1011 slow command. A slow command goes on with a
// 4-bit opcode and a 4-bit address, then a payload:
//   WRREG 16 data bits; WRFE 5-bit (length-1) and that many bits (at most 32);
//   WRFIFO 21 bits; RDREG, RUN, GRST and FEGRST none.
// All bits are MSB first.
// Run Mode: the RUN command enters it. Any slow command leaves it (and is still
// executed). Triggers and fast commands are accepted in both modes.
// The decoder has no reset. Every state ends after a bounded number of bits, and an
// unknown state falls back to idle. So after power up, a quiet line brings it to
// idle within 64 clocks, ready for the GlobalReset command.
// Timing: the strobes in `cmd` come one clock after the last bit of the command.
// The three command classes, the 5-bit trigger with bit-flip correction, Run Mode
// and the return to idle follow the published MCC. The codes are this design's own.
module mcc_cmd_decoder
  import pix_pkg::*;
(
  input  logic     clk,
  input  logic     dci,
  output mcc_cmd_t cmd,
  output logic     run_mode
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_FIELD, S_OP, S_ADDR, S_LEN, S_PAY} st_e;

  st_e         st;
  logic [5:0]  cnt;
  logic [31:0] sr;
  logic [31:0] nxt;
  logic [3:0]  op, addr;
  logic [5:0]  len;
  logic        last;

  function automatic int unsigned dist5(input logic [4:0] a, input logic [4:0] b);
    return 32'($countones(a ^ b));
  endfunction

  assign nxt  = {sr[30:0], dci};
  assign last = (cnt == 6'd1);

  always_ff @(posedge clk) begin
    cmd <= '0;
    cmd.addr <= addr;
    cmd.len  <= len;
    cmd.data <= nxt;
    case (st)
      S_IDLE: if (dci) begin
        sr <= 32'd1; cnt <= 6'd4; st <= S_HDR;
      end
      S_HDR: begin
        sr <= nxt; cnt <= cnt - 1'b1;
        if (last) begin
          if (dist5(nxt[4:0], TRIG_CODE) <= 1) begin
            cmd.trig <= 1'b1; st <= S_IDLE;
          end else if (dist5(nxt[4:0], HDR_CODE) <= 1) begin
            cnt <= 6'd4; st <= S_FIELD;
          end else st <= S_IDLE;
        end
      end
      S_FIELD: begin
        sr <= nxt; cnt <= cnt - 1'b1;
        if (last) begin
          st <= S_IDLE;
          unique case (nxt[3:0])
            F_BCR:  cmd.bcr  <= 1'b1;
            F_ECR:  cmd.ecr  <= 1'b1;
            F_CAL:  cmd.cal  <= 1'b1;
            F_SYNC: cmd.sync <= 1'b1;
            F_SLOW: begin run_mode <= 1'b0; cnt <= 6'd4; st <= S_OP; end
            default: ;
          endcase
        end
      end
      S_OP: begin
        sr <= nxt; cnt <= cnt - 1'b1;
        if (last) begin op <= nxt[3:0]; cnt <= 6'd4; st <= S_ADDR; end
      end
      S_ADDR: begin
        sr <= nxt; cnt <= cnt - 1'b1;
        if (last) begin
          addr <= nxt[3:0];
          cmd.addr <= nxt[3:0];
          st <= S_IDLE;
          unique case (sop_e'(op))
            OP_WRREG:  begin cnt <= 6'd16; st <= S_PAY; end
            OP_WRFE:   begin cnt <= 6'd5;  st <= S_LEN; end
            OP_WRFIFO: begin cnt <= 6'd21; st <= S_PAY; end
            OP_RDREG:  cmd.rdreg  <= 1'b1;
            OP_RUN:    run_mode   <= 1'b1;
            OP_GRST:   begin cmd.grst <= 1'b1; run_mode <= 1'b0; end
            OP_FEGRST: cmd.fegrst <= 1'b1;
            default: ;
          endcase
        end
      end
      S_LEN: begin
        sr <= nxt; cnt <= cnt - 1'b1;
        if (last) begin
          len <= 6'(nxt[4:0]) + 6'd1;
          cnt <= 6'(nxt[4:0]) + 6'd1;
          st  <= S_PAY;
        end
      end
      S_PAY: begin
        sr <= nxt; cnt <= cnt - 1'b1;
        if (last) begin
          st <= S_IDLE;
          unique case (sop_e'(op))
            OP_WRREG:  cmd.wrreg  <= 1'b1;
            OP_WRFE:   cmd.wrfe   <= 1'b1;
            OP_WRFIFO: cmd.wrfifo <= 1'b1;
            default: ;
          endcase
        end
      end
      default: st <= S_IDLE;
    endcase
    if (st != S_IDLE && cnt == 6'd0) st <= S_IDLE;  // stray power-up state
  end
endmodule
