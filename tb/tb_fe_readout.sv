// Self-checking test of fe_readout with two column pairs. A small model in the tb
// stands in for the EoC buffers. The test sends two triggers: event 0 has three
// hits, event 1 none, and one EoC reports an overflow. The serial line is decoded
// and compared word by word with the expected hit and End-of-Event words: event
// number, BCID taken at the trigger, overflow bit. Also checked: a word takes 22
// clocks plus one idle clock, and a trigger is refused exactly when 16 events
// wait.
module tb_fe_readout;
  import pix_pkg::*;
  localparam int NCP = 2;
  logic clk = 1'b0;
  logic rst, ecr, lv1, lv1_acc, ovf_clr, dout;
  logic [7:0] tsb;
  logic [3:0] lv1_id, rd_l1;
  logic [NCP-1:0] rd_avail, rd_pop, ovf;
  logic [NCP-1:0][7:0] rd_row, rd_tot;
  logic [4:0] pending;
  int checks = 0, failures = 0;
  int cyc = 0;
  // EoC model: 4 entries per column pair
  logic       m_v   [NCP][4];
  logic [3:0] m_l1  [NCP][4];
  logic [7:0] m_row [NCP][4];
  logic [20:0] got[$];
  int          got_t[$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    tsb <= rst ? 8'd0 : tsb + 8'd1;
    cyc <= cyc + 1;
  end

  fe_readout #(.NUM_CP(NCP), .PEND(16)) dut (
    .clk, .rst, .ecr, .ts_bin(tsb), .lv1, .lv1_acc, .lv1_id, .rd_l1, .rd_avail, .rd_row,
    .rd_tot, .rd_pop, .ovf, .ovf_clr, .dout, .pending
  );

  always_comb begin
    for (int c = 0; c < NCP; c++) begin
      rd_avail[c] = 1'b0; rd_row[c] = '0; rd_tot[c] = '0;
      for (int i = 3; i >= 0; i--)
        if (m_v[c][i] && m_l1[c][i] == rd_l1) begin
          rd_avail[c] = 1'b1; rd_row[c] = m_row[c][i]; rd_tot[c] = m_row[c][i] + 8'd1;
        end
    end
  end

  always @(posedge clk) begin
    for (int c = 0; c < NCP; c++)
      if (rd_pop[c]) begin
        automatic bit done = 0;
        for (int i = 0; i < 4; i++)
          if (!done && m_v[c][i] && m_l1[c][i] == rd_l1) begin m_v[c][i] <= 1'b0; done = 1; end
      end
    if (ovf_clr) ovf <= '0;
  end

  // serial receiver
  initial begin
    forever begin
      @(posedge clk);
      if (!rst && dout === 1'b1) begin
        automatic logic [20:0] w = '0;
        automatic int t0 = cyc;
        for (int i = 0; i < 21; i++) begin @(posedge clk); w = {w[19:0], dout}; end
        got.push_back(w); got_t.push_back(t0);
      end
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b0, b1;
    eoe_word_t e;
    rst = 1; ecr = 0; lv1 = 0; ovf = '0;
    for (int c = 0; c < NCP; c++) for (int i = 0; i < 4; i++) m_v[c][i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // hits already tagged for event 0: cp0 rows 5,6; cp1 row 9
    m_v[0][0] = 1; m_l1[0][0] = 0; m_row[0][0] = 8'd6;
    m_v[0][1] = 1; m_l1[0][1] = 0; m_row[0][1] = 8'd5;
    m_v[1][2] = 1; m_l1[1][2] = 0; m_row[1][2] = 8'd9;
    ovf[1] = 1'b1;
    b0 = tsb; lv1 = 1; @(negedge clk); lv1 = 0;
    repeat (3) @(negedge clk);
    b1 = tsb; lv1 = 1; @(negedge clk); lv1 = 0;
    repeat (200) @(negedge clk);
    check(got.size() == 5, $sformatf("5 words, got %0d", got.size()));
    if (got.size() == 5) begin
      check(got[0] == {8'd6, 5'd0, 8'd7}, "hit cp0 row 6 (lowest slot first)");
      check(got[1] == {8'd5, 5'd0, 8'd6}, "hit cp0 row 5");
      check(got[2] == {8'd9, 5'd1, 8'd10}, "hit cp1 row 9");
      e = eoe_word_t'(got[3]);
      check(e.tag == 3'b111 && e.overflow && e.l1id == 0 && e.bcid == b0, "EoE of event 0");
      e = eoe_word_t'(got[4]);
      check(e.tag == 3'b111 && !e.overflow && e.l1id == 1 && e.bcid == b1, "EoE of event 1");
      check(got_t[1] - got_t[0] == 23, $sformatf("word period 23 clocks, got %0d", got_t[1] - got_t[0]));
    end
    check(pending == 0, "all events retired");
    // back-to-back triggers: refused exactly when 16 events are pending
    begin
      int refused = 0, bad = 0;
      for (int i = 0; i < 20; i++) begin
        lv1 = 1; #1;
        if (!lv1_acc) begin refused++; if (pending != 16) bad++; end
        else if (pending == 16) bad++;
        @(negedge clk);
      end
      lv1 = 0;
      check(refused > 0 && bad == 0, $sformatf("refusal only at 16 pending (%0d refused, %0d bad)", refused, bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
