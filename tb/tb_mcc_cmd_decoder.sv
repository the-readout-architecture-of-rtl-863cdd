// Self-checking test of mcc_cmd_decoder. It starts from whatever state the simulator
// powers up in, with no reset; a quiet line must bring the decoder to idle. Checked:
// the trigger is decoded with no flipped bit and with each correctable single bit
// flip, always one clock after its last bit. A trigger with two flipped bits is
// ignored. Each fast command gives its strobe. Slow commands give their strobe,
// address and payload. Run Mode is entered by RUN, survives triggers and fast
// commands, and is left by any slow command.
module tb_mcc_cmd_decoder;
  import pix_pkg::*;
  logic clk = 1'b0;
  logic dci;
  mcc_cmd_t cmd;
  logic run_mode;
  int checks = 0, failures = 0;
  int cyc = 0, n_trig = 0, t_trig = 0;
  int n_bcr = 0, n_ecr = 0, n_cal = 0, n_sync = 0;
  mcc_cmd_t last_slow;

  always #5 clk = ~clk;

  mcc_cmd_decoder dut (.clk, .dci, .cmd, .run_mode);

  `include "tb_cmd_tasks.svh"

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cmd.trig) begin n_trig++; t_trig = cyc; end
    if (cmd.bcr) n_bcr++;
    if (cmd.ecr) n_ecr++;
    if (cmd.cal) n_cal++;
    if (cmd.sync) n_sync++;
    if (cmd.wrreg | cmd.rdreg | cmd.grst | cmd.fegrst | cmd.wrfe | cmd.wrfifo) last_slow = cmd;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_end;
    dci = 0;
    cmd_idle(70);
    n_trig = 0; n_bcr = 0; n_ecr = 0; n_cal = 0; n_sync = 0;
    // triggers, with and without one flipped bit
    for (int f = -1; f < 4; f++) begin
      cmd_trigger(f < 0 ? 5'b0 : 5'(1 << f));
      t_end = cyc;
      cmd_idle(3);
      check(n_trig == f + 2, $sformatf("trigger with flip %0d decoded", f));
      check(t_trig == t_end, $sformatf("trigger timing %0d vs %0d", t_trig, t_end));
    end
    cmd_trigger(5'b00110);
    cmd_idle(30);
    check(n_trig == 5, "double flip ignored");
    cmd_fast(F_BCR); cmd_fast(F_ECR); cmd_fast(F_CAL); cmd_fast(F_SYNC); cmd_fast(F_CAL);
    cmd_idle(3);
    check(n_bcr == 1 && n_ecr == 1 && n_cal == 2 && n_sync == 1, "fast commands");
    cmd_wrreg(4'd3, 16'hBEEF); cmd_idle(2);
    check(last_slow.wrreg && last_slow.addr == 3 && last_slow.data[15:0] == 16'hBEEF, "WRREG");
    cmd_slow(4'd2, 4'd0); cmd_idle(2);
    check(run_mode, "RUN enters run mode");
    cmd_trigger(); cmd_fast(F_BCR); cmd_idle(2);
    check(run_mode, "run mode kept by trigger and fast command");
    cmd_wrfe(1'b1, 7, 32'h55); cmd_idle(2);
    check(!run_mode, "slow command leaves run mode");
    check(last_slow.wrfe && last_slow.len == 7 && last_slow.data[6:0] == 7'h55 && last_slow.addr[3],
          "WRFE length, data and LD level");
    cmd_wrfifo(4'd9, 21'h1ABCDE); cmd_idle(2);
    check(last_slow.wrfifo && last_slow.addr == 9 && last_slow.data[20:0] == 21'h1ABCDE, "WRFIFO");
    cmd_slow(4'd1, 4'd12); cmd_idle(2);
    check(last_slow.rdreg && last_slow.addr == 12, "RDREG");
    cmd_slow(4'd3, 4'd0); cmd_idle(2);
    check(last_slow.grst, "GRST");
    cmd_slow(4'd4, 4'd0); cmd_idle(2);
    check(last_slow.fegrst, "FEGRST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
