// Self-checking test of mcc_event_builder with 4 FE chips, chip 2 disabled. Queues
// in the tb stand in for the receiver FIFOs, and the output side stalls at random.
// The event has: chip 0 with two hits; chip 1 with no hits (its FE flag is left
// out); chip 3 with a hit at an impossible row and an EoE whose BCID is wrong. The
// full output word sequence is compared with a hand-built list. Also checked: the
// disabled chip's FIFO is untouched, the event is retired once, and the error
// counter counts it.
module tb_mcc_event_builder;
  import pix_pkg::*;
  localparam int NF = 4;
  logic clk = 1'b0;
  logic rst, chk_bcid, chk_l1, ev_valid, sb_ready, ev_done, ow_valid, ow_ready, idle;
  logic [NF-1:0] fe_en, rd_valid, rd_pop;
  logic [NF-1:0][20:0] rd_data;
  logic [3:0] ev_l1;
  logic [7:0] ev_bcid;
  logic [4:0] ev_skip;
  logic [23:0] ow_data;
  logic [15:0] err_events;
  logic [20:0] q [NF][$];
  logic [23:0] got[$], exp_w[$];
  int checks = 0, failures = 0, n_done = 0;

  always #5 clk = ~clk;

  mcc_event_builder #(.NUM_FE(NF)) dut (.clk, .rst, .fe_en, .chk_bcid, .chk_l1, .ev_valid,
    .ev_l1, .ev_bcid, .ev_skip, .sb_ready, .ev_done, .rd_valid, .rd_data, .rd_pop,
    .ow_valid, .ow_data, .ow_ready, .idle, .err_events);

  always_comb
    for (int f = 0; f < NF; f++) begin
      rd_valid[f] = q[f].size() != 0;
      rd_data[f]  = rd_valid[f] ? q[f][0] : '0;
    end

  always @(posedge clk) begin
    if (!rst) begin
      for (int f = 0; f < NF; f++) if (rd_pop[f]) void'(q[f].pop_front());
      if (ow_valid && ow_ready) got.push_back(ow_data);
      if (ev_done) begin n_done++; ev_valid <= 1'b0; end
    end
    ow_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] h1, h2, hb;
    rst = 1; fe_en = 4'b1011; chk_bcid = 1; chk_l1 = 1; ev_valid = 0; sb_ready = 0;
    ev_l1 = 4'd2; ev_bcid = 8'h33; ev_skip = 5'd1;
    h1 = {8'd10, 5'd4, 8'd6}; h2 = {8'd159, 5'd17, 8'd1}; hb = {8'd200, 5'd0, 8'd3};
    q[0].push_back(h1); q[0].push_back(h2); q[0].push_back({3'b111, 1'b0, 5'b0, 4'd2, 8'h33});
    q[1].push_back({3'b111, 1'b0, 5'b0, 4'd2, 8'h33});
    q[2].push_back({3'b111, 1'b0, 5'b0, 4'd9, 8'h00});
    q[3].push_back(hb); q[3].push_back({3'b111, 1'b0, 5'b0, 4'd2, 8'h34});
    repeat (3) @(negedge clk); rst = 0;
    ev_valid = 1; sb_ready = 1;
    exp_w.push_back({OT_HEADER, 5'd1, 4'b0, 4'd2, 8'h33});
    exp_w.push_back({OT_FEFLAG, 4'b0000, 13'b0, 4'd0});
    exp_w.push_back({OT_HIT, h1});
    exp_w.push_back({OT_HIT, h2});
    exp_w.push_back({OT_FEFLAG, 4'b0000, 13'b0, 4'd3});
    exp_w.push_back({OT_HIT, hb});
    exp_w.push_back({OT_FEFLAG, 4'b1001, 13'b0, 4'd3});
    exp_w.push_back({OT_TRAILER, 5'b0, 16'b1000});
    repeat (200) @(negedge clk);
    check(got.size() == exp_w.size(), $sformatf("%0d words, got %0d", exp_w.size(), got.size()));
    foreach (exp_w[i]) if (i < got.size())
      check(got[i] == exp_w[i], $sformatf("word %0d: %h expected %h", i, got[i], exp_w[i]));
    check(n_done == 1, "event retired once");
    check(q[0].size() == 0 && q[1].size() == 0 && q[3].size() == 0, "enabled FIFOs drained");
    check(q[2].size() == 1, "disabled FIFO untouched");
    check(err_events == 1 && idle, "error event counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
