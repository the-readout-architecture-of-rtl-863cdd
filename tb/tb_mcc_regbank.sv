// Self-checking test of mcc_regbank. Checked: reset defaults; every register keeps
// its own written value; the decoded fields follow the CSR, FE-enable and
// calibration registers.
module tb_mcc_regbank;
  import pix_pkg::*;
  logic clk = 1'b0;
  logic rst, wr, selftest, chk_bcid, chk_l1;
  logic [2:0] waddr, raddr;
  logic [15:0] wdata, rdata, fe_en;
  logic [7:0] cal_width;
  omode_e mode;
  int checks = 0, failures = 0;
  logic [15:0] ref_v [8];

  always #5 clk = ~clk;

  mcc_regbank dut (.clk, .rst, .wr, .waddr, .wdata, .raddr, .rdata, .mode, .selftest,
                   .chk_bcid, .chk_l1, .fe_en, .cal_width);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wr = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(negedge clk); rst = 0;
    raddr = 0; #1 check(rdata == 16'h0018, "CSR default");
    raddr = 1; #1 check(rdata == 16'hFFFF, "FEEN default");
    check(mode == OM_40_1L && chk_bcid && chk_l1 && !selftest && fe_en == 16'hFFFF, "decoded defaults");
    for (int i = 0; i < 8; i++) begin
      ref_v[i] = 16'($urandom());
      wr = 1; waddr = 3'(i); wdata = ref_v[i]; @(negedge clk);
    end
    wr = 0;
    for (int i = 0; i < 8; i++) begin
      raddr = 3'(i); #1 check(rdata == ref_v[i], $sformatf("register %0d", i));
    end
    check(mode == omode_e'(ref_v[0][1:0]) && selftest == ref_v[0][2] && chk_bcid == ref_v[0][3]
          && chk_l1 == ref_v[0][4], "CSR fields");
    check(fe_en == ref_v[1] && cal_width == ref_v[2][7:0], "FEEN and calibration width");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
