// Self-checking testbench for wbc_inout (INOUT block).
// Checks the internal tick made from STICK (one clock per rising edge, for both
// capture edges), the STICK width error (a 2-clock STICK is fine, 1 and 4
// clocks are errors), the edge comparison events, the reset from RESET_N and
// from a 0->1 change of the software reset bit, the clock-manager controls, the
// pass-through of both inputs to the outputs and to SELECT with {tick, valid},
// the test-signal mode, and the time interval counter of input A against the
// system tick.
module tb_wbc_inout;
  import wbc_pkg::*;
  logic clk = 0, sclk = 0, reset_n = 0, stick = 0;
  logic [63:0] idata_a = 0, idata_b = 0, odata_a, odata_b;
  logic itick_a = 0, ivalid_a = 0, inoise_a = 0, iderr_a = 0, idfrm_a = 0, iclk_a = 0;
  logic itick_b = 0, ivalid_b = 0, inoise_b = 0, iderr_b = 0, idfrm_b = 0, iclk_b = 0;
  logic otick_a, ovalid_a, onoise_a, oderr_a, odfrm_a, oclk_a;
  logic otick_b, ovalid_b, onoise_b, oderr_b, odfrm_b, oclk_b;
  cfg_t cfg = '0;
  logic [15:0] ctl = 0;
  logic [6:0] esel_a = 0, esel_b = 0, dsel_a = 0, dsel_b = 0;
  logic [15:0] seed_a = 16'h1357, seed_b = 16'h2468, derr_a = 0, derr_b = 0, sdly = 0;
  logic [1:0] tmode_a = 2'b11, tmode_b = 2'b01;
  logic dcm_locked = 1, dcm_psdone = 0, dcm_psovf = 0;
  logic dcm_rst, dcm_psen, dcm_psincdec, clk_off, rst, tk;
  logic [63:0] da, db;
  logic [1:0] va, vb;
  logic [3:0] icrc_a, ocrc_a, icrc_b, ocrc_b;
  logic [21:0] tint_a, tint_b;
  logic ev_stick_w, ev_unlock, ev_psdone, ev_psovf, ev_edge_eq, ev_edge_lead;
  int checks = 0, failures = 0;
  int n_tk = 0, n_w = 0, n_eq = 0, n_lead = 0, n_psen = 0, n_rst = 0;

  wbc_inout dut (.*);

  always #2 clk = ~clk;
  always #4 sclk = ~sclk;

  always @(posedge clk) begin
    if (tk) n_tk++;
    if (ev_stick_w) n_w++;
    if (ev_edge_eq) n_eq++;
    if (ev_edge_lead) n_lead++;
    if (dcm_psen) n_psen++;
    if (rst) n_rst++;
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // STICK high for `len` clock periods, starting 0.5 after the call
  task automatic pulse_stick(input int len);
    #0.5;
    stick = 1;
    repeat (len) #4;
    stick = 0;
    #3.5;
  endtask

  task automatic expect_cnt(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("%s: %0d expected %0d", what, got, exp_v); end
  endtask

  initial begin
    int base;
    repeat (4) @(negedge clk);
    reset_n = 1;
    repeat (4) @(negedge clk);
    expect_cnt("reset after RESET_N", int'(n_rst > 2), 1);
    n_rst = 0;
    // STICK: good width, both edge choices
    for (int e = 0; e < 2; e++) begin
      cfg.edge_st = e[0];
      n_tk = 0; n_w = 0;
      repeat (3) begin pulse_stick(2); repeat (20) @(negedge clk); end
      expect_cnt("ticks", n_tk, 3);
      expect_cnt("width errors (good)", n_w, 0);
    end
    // STICK rising in the second half of a clock: the rising-edge copy sees it a
    // whole clock before the retimed falling-edge copy, so the chosen (rising) copy leads
    cfg.edge_st = 0; n_lead = 0; n_eq = 0;
    @(negedge clk); #0.5; stick = 1; #8; stick = 0; repeat (10) @(negedge clk);
    expect_cnt("lead events", n_lead, 1);
    expect_cnt("match events", n_eq, 0);
    // STICK rising in the first half: both copies rise in the same clock
    @(posedge clk); pulse_stick(2); repeat (10) @(negedge clk);
    expect_cnt("match events", n_eq, 1);
    expect_cnt("lead events", n_lead, 1);
    cfg.edge_st = 0;
    n_w = 0;
    @(posedge clk); pulse_stick(1); repeat (10) @(negedge clk);
    @(posedge clk); pulse_stick(4); repeat (10) @(negedge clk);
    expect_cnt("width errors (bad)", n_w, 2);
    // software reset and phase shift
    ctl[CT_SWRST] = 1; repeat (6) @(negedge clk);
    expect_cnt("software reset", n_rst, 1);
    ctl[CT_SWRST] = 0;
    n_psen = 0;
    ctl[CT_PSINC] = 1; ctl[CT_PSEN] = 1; repeat (6) @(negedge clk); ctl[CT_PSEN] = 0;
    repeat (6) @(negedge clk);
    expect_cnt("phase shift pulses", n_psen, 1);
    ctl[CT_DCMRST] = 1; ctl[CT_CLKOFF] = 1; dcm_locked = 0; dcm_psovf = 1; #1;
    checks++;
    if (!dcm_rst || !clk_off || !dcm_psincdec || !ev_unlock || !ev_psovf) failures++;
    ctl = 0; dcm_locked = 1; dcm_psovf = 0;
    // pass-through of A and B (rising-edge capture, latency 3)
    cfg.edge_a = 0; cfg.edge_b = 0;
    @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      idata_a = {$urandom, $urandom}; idata_b = ~idata_a; ivalid_a = k[0]; ivalid_b = ~k[0];
      itick_a = (k == 2); itick_b = 0;
      @(negedge clk);
    end
    idata_a = 64'h1111; idata_b = 64'h2222;
    repeat (4) @(negedge clk);
    checks++;
    if (odata_a !== 64'h1111 || odata_b !== 64'h2222 || da !== 64'h1111 || db !== 64'h2222) failures++;
    // time interval, system tick -> data tick of A: data tick enters 7 pad clocks after STICK
    tmode_a = 2'b11;
    @(posedge clk); #0.5; stick = 1; #8; stick = 0;
    // tk is one clock after the first rising edge that sees STICK
    repeat (5) @(negedge clk);
    itick_a = 1; @(negedge clk); itick_a = 0;
    repeat (10) @(negedge clk);
    checks++;
    // STICK sampled at edge 1, tk at clock 1; itick driven at clock 7 reaches da at clock 10
    if (tint_a != 22'd8) begin failures++; $display("tint_a %0d expected 8", tint_a); end
    // test signal mode: data changes every clock, valid high, tick follows tk
    cfg.test_out = 1;
    base = n_tk;
    pulse_stick(2);
    repeat (4) @(negedge clk);
    checks++;
    if (!ovalid_a || !ovalid_b || odata_a == odata_b) failures++;
    expect_cnt("ticks in test mode", n_tk - base, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
