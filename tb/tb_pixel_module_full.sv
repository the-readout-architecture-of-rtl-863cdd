// Full-size test of pixel_module: 16 FE chips of 18 column pairs x 160 pixels at
// the default parameters. After an MCC reset and a broadcast FE GlobalReset the
// chips run with their power-up Global Register (latency 255 clocks, all column
// pairs on) and cleared pixel registers (every pixel live). Two pixels on two
// different chips are hit for 4 clocks, a trigger is sent so that it arrives
// exactly 255 clocks after the hit (after a BCID reset), and the 40 Mbit/s output must carry one module
// event: header, the two chips' flag words and hits in chip order, and an
// error-free trailer. The hit rows, column pairs and chips are chosen near the
// edges of the ranges (chip 5 row 159 column pair 17, chip 15 row 7 column pair 0).
module tb_pixel_module_full;
  import pix_pkg::*;
  localparam int NF = 16, NCP = 18, NPIX = 160, LAT = 255;
  logic clk = 1'b0;
  logic dci, run_mode;
  logic [NF*NCP*NPIX-1:0] disc;
  logic [1:0] dto_r, dto_f;
  logic [NF-1:0] fast_or;
  logic [1:0] out_mode = 2'd0;
  bit out_on = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pixel_module dut (.clk, .dci, .disc, .dto_r, .dto_f, .run_mode, .fast_or);

  `include "tb_cmd_tasks.svh"
  `include "tb_out_decode.svh"

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] e[$];
    logic [7:0] bc;
    dci = 0; disc = '0;
    cmd_idle(70);
    cmd_slow(4'd3, 4'd0); cmd_idle(5);           // MCC reset
    cmd_slow(4'd4, 4'd0); cmd_idle(200);         // FE broadcast GlobalReset
    cmd_slow(4'd3, 4'd0); cmd_idle(5);           // MCC reset again: flush FIFOs
    check(run_mode == 1'b0, "run mode off after reset");
    cmd_fast(F_BCR);                             // bring the BCID counters in step
    cmd_idle(20);
    out_on = 1;
    disc[5*NCP*NPIX + 17*NPIX + 159] = 1; disc[15*NCP*NPIX + 0*NPIX + 7] = 1;
    repeat (4) @(negedge clk);
    disc = '0;
    cmd_idle(LAT - 6 - 4);
    cmd_trigger();
    cmd_idle(1200);
    bc = out_words.size() > 0 ? out_words[0][7:0] : 8'd0;
    e.push_back({OT_HEADER, 5'd0, 4'b0, 4'd0, bc});
    e.push_back({OT_FEFLAG, 4'b0, 13'b0, 4'd5});
    e.push_back({OT_HIT, 8'd159, 5'd17, 8'd4});
    e.push_back({OT_FEFLAG, 4'b0, 13'b0, 4'd15});
    e.push_back({OT_HIT, 8'd7, 5'd0, 8'd4});
    e.push_back({OT_TRAILER, 5'b0, 16'b0});
    check(out_words.size() == e.size(), $sformatf("%0d words, got %0d", e.size(), out_words.size()));
    foreach (e[i]) if (i < out_words.size())
      check(out_words[i] == e[i], $sformatf("word %0d: %h expected %h", i, out_words[i], e[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
