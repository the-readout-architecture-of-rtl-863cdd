// Control logic of the FE chip: the 20-bit Command Register and the 166-bit Global
// Register. It also steers the pixel shift register.
//
// The MCC reaches every FE over three slow lines: CCK (about 5 MHz), DCI (data) and
// LD (load). They are sampled with the 40 MHz chip clock. On each rising CCK edge
// one DCI bit is shifted in. While LD is high the bit goes into the command shift
// register. When LD falls, that register becomes the Command Register and its
// one-shot parts run. While LD is low the bit goes into whatever register the
// command selects, and only if the chip is addressed. The command is addressed to
// this chip if the broadcast bit is set or its address equals the wire-bonded
// geographical address `geo`.
//
// Command Register = {bcast, addr[3:0], spare[9:0], cmd[4:0]} with
//   cmd[0] GlobalReset  (one-shot: `grst` pulse, Global Register to defaults)
//   cmd[1] ClockGlobal  (CCK shifts the global shift register)
//   cmd[2] WriteGlobal  (one-shot: global shift register -> Global Register)
//   cmd[3] ClockPixel   (CCK shifts the pixel chain through `pix_shift`/`pix_sdi`)
// Global Register: [7:0] Lev1 latency, [8] self-trigger enable, [16:9] self-trigger
// delay, [34:17] column-pair enables, [130:35] twelve 8-bit DAC codes (11 bias, 1
// injection), the rest spare. Defaults: latency 255, all column pairs on, DACs 0x80.
// The chip has no reset pin. Until the first GlobalReset the Global Register holds
// whatever it powered up with.
// The register sizes, the three lines and geographical/broadcast addressing follow
// the published design. The bit layouts and the LD protocol are this design's own.
module fe_config
  import pix_pkg::*;
#(
  parameter int CMD_W  = 20,
  parameter int GLOB_W = 166
) (
  input  logic              clk,
  input  logic [3:0]        geo,
  input  logic              cck,
  input  logic              dci,
  input  logic              ld,
  output logic              grst,
  output logic [GLOB_W-1:0] glob,
  output logic              pix_shift,
  output logic              pix_sdi,
  output logic [CMD_W-1:0]  cmd_reg
);
  localparam logic [GLOB_W-1:0] GLOB_DEFAULT =
      (GLOB_W'({12{8'h80}}) << 35) | (GLOB_W'({18{1'b1}}) << 17) | GLOB_W'(8'd255);

  logic             cck_q, ld_q, cck_rise, ld_fall;
  logic [CMD_W-1:0] cmd_sr;
  logic [GLOB_W-1:0] glob_sr;
  logic             sel, sel_new;

  assign cck_rise = cck && !cck_q;
  assign ld_fall  = !ld && ld_q;
  assign sel_new  = cmd_sr[CMD_W-1] || (cmd_sr[CMD_W-2 -: 4] == geo);

  always_ff @(posedge clk) begin
    cck_q     <= cck;
    ld_q      <= ld;
    grst      <= 1'b0;
    pix_shift <= 1'b0;
    pix_sdi   <= dci;
    if (cck_rise) begin
      if (ld) cmd_sr <= {cmd_sr[CMD_W-2:0], dci};
      else if (sel) begin
        if (cmd_reg[FC_CKGLOB]) glob_sr <= {glob_sr[GLOB_W-2:0], dci};
        if (cmd_reg[FC_CKPIX])  pix_shift <= 1'b1;
      end
    end
    if (ld_fall) begin
      cmd_reg <= cmd_sr;
      sel     <= sel_new;
      if (sel_new && cmd_sr[FC_GRST]) begin
        grst <= 1'b1;
        glob <= GLOB_DEFAULT;
      end else if (sel_new && cmd_sr[FC_WRGLOB]) begin
        glob <= glob_sr;
      end
    end
  end
endmodule
