// Self-checking test of fe_config (chip address 5). The tb drives CCK/DCI/LD like the
// MCC: one bit per 8 clocks, LD high for command words. Checked: a GlobalReset sent
// to another address is ignored and a broadcast one is executed, loading the
// documented defaults. ClockGlobal and WriteGlobal load a 166-bit pattern.
// Shifting while another chip is addressed leaves the shift register alone.
// ClockPixel produces one pixel-chain shift per CCK with the right data.
module tb_fe_config;
  import pix_pkg::*;
  logic clk = 1'b0;
  logic cck, dci, ld, grst, pix_shift, pix_sdi;
  logic [165:0] glob, pat;
  logic [19:0] cmd_reg;
  int checks = 0, failures = 0;
  int grst_n = 0, pshift_n = 0;
  logic [15:0] pbits;

  always #5 clk = ~clk;

  fe_config dut (.clk, .geo(4'd5), .cck, .dci, .ld, .grst, .glob, .pix_shift, .pix_sdi, .cmd_reg);

  always @(posedge clk) begin
    if (grst) grst_n++;
    if (pix_shift) begin pbits = {pbits[14:0], pix_sdi}; pshift_n++; end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_bit(input logic b);
    dci = b; cck = 0; repeat (4) @(negedge clk);
    cck = 1; repeat (4) @(negedge clk);
  endtask

  task automatic send_cmd(input logic bcast, input logic [3:0] addr, input logic [4:0] c);
    logic [19:0] w;
    w = {bcast, addr, 10'b0, c};
    ld = 1;
    for (int i = 19; i >= 0; i--) send_bit(w[i]);
    cck = 0; ld = 0; repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [165:0] dflt;
    cck = 0; dci = 0; ld = 0;
    repeat (5) @(negedge clk);
    send_cmd(1'b0, 4'd3, 5'b00001);
    check(grst_n == 0, "reset for chip 3 ignored");
    send_cmd(1'b1, 4'd0, 5'b00001);
    check(grst_n == 1, "broadcast global reset executed");
    dflt = '0;
    dflt[7:0] = 8'd255;
    dflt[34:17] = '1;
    for (int i = 0; i < 12; i++) dflt[35 + 8*i +: 8] = 8'h80;
    check(glob == dflt, "global register defaults");
    for (int i = 0; i < 166; i++) pat[i] = 1'(($urandom() >> 3) & 1);
    send_cmd(1'b0, 4'd5, 5'b00010);            // ClockGlobal
    for (int i = 165; i >= 0; i--) send_bit(pat[i]);
    cck = 0;
    send_cmd(1'b0, 4'd5, 5'b00100);            // WriteGlobal
    check(glob == pat, "global register written");
    send_cmd(1'b0, 4'd2, 5'b00010);            // ClockGlobal for chip 2
    for (int i = 0; i < 40; i++) send_bit(1'b1);
    cck = 0;
    send_cmd(1'b0, 4'd5, 5'b00100);            // WriteGlobal here: unchanged data
    check(glob == pat, "shift for another chip ignored");
    send_cmd(1'b0, 4'd5, 5'b01000);            // ClockPixel
    pshift_n = 0;
    for (int i = 0; i < 10; i++) send_bit(1'(i % 3 == 0));
    cck = 0; repeat (4) @(negedge clk);
    check(pshift_n == 10, $sformatf("10 pixel shifts, got %0d", pshift_n));
    check(pbits[9:0] == 10'b1001001001, "pixel chain data");
    check(cmd_reg[4:0] == 5'b01000, "command register holds ClockPixel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
