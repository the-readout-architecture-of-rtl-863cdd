// Self-checking test of mcc_output_link in all four output modes. For each mode
// the tb sends 6 random words back to back and rebuilds the bit stream from the
// line outputs in the documented order. It parses the frames and compares the
// words. It also checks that frames start every 25, 13, 13 and 7 clocks (40, 80, 80
// and 160 Mbit/s for a 25-bit frame) and that unused line bits stay low.
module tb_mcc_output_link;
  import pix_pkg::*;
  logic clk = 1'b0;
  logic rst, w_valid, w_ready, busy;
  logic [23:0] w_data;
  logic [1:0] dto_r, dto_f;
  omode_e mode;
  int checks = 0, failures = 0, cyc = 0;
  logic [23:0] sent[$], got[$];
  int starts[$];
  // frame parser state
  int pcnt = -1;
  logic [23:0] pw;

  always #5 clk = ~clk;
  mcc_output_link dut (.clk, .rst, .mode, .w_valid, .w_data, .w_ready, .dto_r, .dto_f, .busy);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic take(input logic b, input int c);
    if (pcnt < 0) begin
      if (b) begin pcnt = 0; pw = '0; starts.push_back(c); end
    end else begin
      pw = {pw[22:0], b}; pcnt++;
      if (pcnt == 24) begin got.push_back(pw); pcnt = -1; end
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      unique case (mode)
        OM_40_1L:     begin take(dto_r[0], cyc); check(dto_r[1] == 0 && dto_f[1] == 0 && dto_f[0] == dto_r[0], "mode0 lines"); end
        OM_80_2L:     begin take(dto_r[0], cyc); take(dto_r[1], cyc); check(dto_f == dto_r, "mode1 lines"); end
        OM_80_1L_DDR: begin take(dto_r[0], cyc); take(dto_f[0], cyc); check(dto_r[1] == 0 && dto_f[1] == 0, "mode2 lines"); end
        default:      begin take(dto_r[0], cyc); take(dto_f[0], cyc); take(dto_r[1], cyc); take(dto_f[1], cyc); end
      endcase
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int per [4] = '{25, 13, 13, 7};
    rst = 1; w_valid = 0; w_data = 0; mode = OM_40_1L;
    for (int m = 0; m < 4; m++) begin
      rst = 1; mode = omode_e'(m);
      sent.delete(); got.delete(); starts.delete(); pcnt = -1;
      repeat (2) @(negedge clk); rst = 0;
      for (int n = 0; n < 6; n++) begin
        w_data = 24'($urandom()) | 24'h800000;
        w_valid = 1;
        @(posedge clk); #1;
        while (!w_ready) begin @(posedge clk); #1; end
        sent.push_back(w_data);
        @(negedge clk);
      end
      w_valid = 0;
      repeat (40) @(negedge clk);
      check(got.size() == 6, $sformatf("mode %0d: 6 words, got %0d", m, got.size()));
      foreach (sent[i]) if (i < got.size()) check(got[i] == sent[i], $sformatf("mode %0d word %0d", m, i));
      for (int i = 1; i < starts.size(); i++)
        check(starts[i] - starts[i-1] == per[m], $sformatf("mode %0d period %0d", m, starts[i] - starts[i-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
