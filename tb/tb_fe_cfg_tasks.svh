// Tasks that drive the FE configuration lines CCK/DCI/LD the way the MCC does: one
// bit per 8 clocks, LD high while a command word is sent. The including module
// declares `clk`, `cck`, `cfg_dci` and `ld`.
task automatic fe_bit(input logic b);
  cfg_dci = b; cck = 0; repeat (4) @(negedge clk);
  cck = 1; repeat (4) @(negedge clk);
endtask
task automatic fe_cmd(input logic bcast, input logic [3:0] addr, input logic [4:0] c);
  logic [19:0] w;
  w = {bcast, addr, 10'b0, c};
  ld = 1;
  for (int i = 19; i >= 0; i--) fe_bit(w[i]);
  cck = 0; ld = 0; repeat (4) @(negedge clk);
endtask
// Broadcast: ClockGlobal, shift 166 bits, WriteGlobal
task automatic fe_write_global(input logic [165:0] g);
  fe_cmd(1'b1, 4'd0, 5'b00010);
  for (int i = 165; i >= 0; i--) fe_bit(g[i]);
  cck = 0;
  fe_cmd(1'b1, 4'd0, 5'b00100);
endtask
// Global register value: latency, self trigger, delay, all column pairs on
function automatic logic [165:0] fe_glob(input logic [7:0] lat, input logic st, input logic [7:0] dly);
  logic [165:0] g;
  g = '0;
  g[7:0] = lat; g[8] = st; g[16:9] = dly; g[34:17] = '1;
  return g;
endfunction
