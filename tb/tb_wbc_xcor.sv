// Self-checking testbench for wbc_xcor (64-lag correlator and read select).
// For 4-bit (nbit=2) and 8-bit (nbit=7) samples, random lagged words and prompt
// samples with random valid bits are fed on irregular word strobes for one tick
// interval. A reference model keeps every word and forms, for each lag i, the
// sum over strobes of prompt(oldest word) * lagged sample i of the window, and
// the valid count. After the tick the 64 results are read through the read
// select (zero address, then one increment per lag) on the bus clock.
module tb_wbc_xcor;
  logic clk = 1'b0, rst = 1'b1, tk = 1'b0, ce = 1'b0;
  logic [63:0] dd = '0;
  logic vd = 1'b0, vp = 1'b0;
  logic [7:0] dp = '0;
  logic [2:0] nbit = '0;
  logic mcb_clk = 1'b0, mcb_rst = 1'b1, zero_acc = 1'b0, zero_vcnt = 1'b0;
  logic inc_acc = 1'b0, inc_vcnt = 1'b0;
  logic [38:0] pacc;
  logic [21:0] vcnt;
  int checks = 0, failures = 0;

  wbc_xcor dut (.*);

  always #2 clk = ~clk;
  always #15 mcb_clk = ~mcb_clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] W [$];
  logic [7:0]  P [$];
  bit          VW [$], VP [$];
  longint      rx [64];
  int          rv [64];

  function automatic int conv(input int v, input int n);
    return 2 * (v & ((1 << n) - 1)) - ((1 << n) - 1);
  endfunction

  task automatic ref_strobe(input bit m8);
    int n, nw, base, w, s;
    n  = W.size() - 1;
    nw = m8 ? 8 : 4;
    base = n - nw + 1;
    if (base < 0) return;
    for (int i = 0; i < 64; i++) begin
      if (m8) begin w = base + i / 8;  s = int'(W[w][63 - 8*(i % 8) -: 8]); end
      else    begin w = base + i / 16; s = int'(W[w][63 - 4*(i % 16) -: 4]); end
      if (VW[w] && VP[base]) begin
        rx[i] += conv(s, int'(nbit) + 1) * conv(int'(P[base]), int'(nbit) + 1);
        rv[i]++;
      end
    end
  endtask

  task automatic run(input logic [2:0] nb);
    nbit = nb;
    W.delete(); P.delete(); VW.delete(); VP.delete();
    // restart the shift registers from reset
    rst = 1'b1; @(negedge clk); @(negedge clk); rst = 1'b0;
    tk = 1'b1; @(negedge clk); tk = 1'b0;
    foreach (rx[i]) begin rx[i] = 0; rv[i] = 0; end
    for (int k = 0; k < 120; k++) begin
      dd = {$urandom, $urandom};
      dp = 8'($urandom);
      vd = ($urandom_range(0, 9) != 0);
      vp = ($urandom_range(0, 9) != 0);
      ce = 1'b1;
      W.push_back(dd); P.push_back(dp); VW.push_back(vd); VP.push_back(vp);
      ref_strobe(nb[2]);
      @(negedge clk);
      ce = 1'b0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    tk = 1'b1; @(negedge clk); tk = 1'b0;
    // read back on the bus clock
    @(negedge mcb_clk); zero_acc = 1'b1; zero_vcnt = 1'b1;
    @(negedge mcb_clk); zero_acc = 1'b0; zero_vcnt = 1'b0;
    for (int i = 0; i < 64; i++) begin
      @(negedge mcb_clk);
      checks += 2;
      if (pacc != 39'(rx[i])) begin
        failures++;
        if (failures < 10) $display("nbit=%0d lag %0d pacc %0d expected %0d", nb, i, $signed(pacc), rx[i]);
      end
      if (vcnt != 22'(rv[i])) begin
        failures++;
        if (failures < 10) $display("nbit=%0d lag %0d vcnt %0d expected %0d", nb, i, vcnt, rv[i]);
      end
      inc_acc = 1'b1; inc_vcnt = 1'b1;
      @(negedge mcb_clk);
      inc_acc = 1'b0; inc_vcnt = 1'b0;
    end
  endtask

  initial begin
    repeat (4) @(posedge mcb_clk);
    mcb_rst = 1'b0;
    run(3'd2);
    run(3'd7);
    run(3'd3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
