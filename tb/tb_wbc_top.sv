// End-to-end testbench for wbc_top at its default sizes.
//
// Drives both wideband inputs at one 64-bit word per 256 MHz clock, a system
// tick under testbench control, and the monitor bus at 33 MHz. Input B carries
// input A's sample stream delayed by S = 21 samples, so with B lagged and A
// prompt the correlation peaks at lag 21. Two-level samples make the peak exact:
// with 1-bit samples every product at the peak is +1, so its accumulation equals
// the valid count; with 8-bit samples of 0 or 255 it is 255^2 per count.
// Scenarios (each counted as a mechanism; one never seen is a failure):
//   pass    pad-to-pad retransmission of both inputs, 3 clocks;
//   lag0    4_16 organisation, 1-bit samples, delay 0: every lag counts one
//           sample pair per clock of the tick interval, peak at lag 21 exact;
//   lagstep DL_LDLY = 1 written mid-interval takes effect at the tick: peak
//           moves to lag 21-16 = 5, DL_PLDLY reports the delay of the results;
//   band8   8_2 organisation (4 bands), band 1, 8-bit samples: one word per 4 clocks,
//           autocorrelation of band 1 exact at lag 0;
//   testgen test signals on the outputs: ODATA follows the pseudo-random
//           generator restarted at the tick;
//   status  an illegal band count is latched into CM_STS at the tick;
//   tport   the test port shows the internal tick.
// The tick interval is 2000 clocks instead of 10 ms, to keep the run short.
module tb_wbc_top;
  import wbc_pkg::*;
  logic reset_n = 0, sclk = 0, stick = 0, clk_256 = 0;
  logic dcm_locked = 1, dcm_psdone = 0, dcm_psovf = 0;
  logic dcm_rst, dcm_psen, dcm_psincdec, clk_off;
  logic [63:0] idata_a = 0, idata_b = 0, odata_a, odata_b;
  logic itick_a = 0, ivalid_a = 1, inoise_a = 0, iderr_a = 0, idfrm_a = 0, idclk_a = 0;
  logic itick_b = 0, ivalid_b = 1, inoise_b = 0, iderr_b = 0, idfrm_b = 0, idclk_b = 0;
  logic otick_a, ovalid_a, onoise_a, oderr_a, odfrm_a, odclk_a;
  logic otick_b, ovalid_b, onoise_b, oderr_b, odfrm_b, odclk_b;
  logic mcb_clk = 0, mcb_cs_n = 1, mcb_rd = 1;
  logic [7:0] mcb_addr = 0;
  logic [15:0] mcb_data_i = 0, mcb_data_o;
  logic mcb_data_oe;
  logic [3:0] test;

  wbc_top dut (.*);

  localparam int T = 2000;    // clocks per tick interval
  localparam int S = 21;      // B = A delayed by S samples

  int checks = 0, failures = 0;
  int m_pass = 0, m_lag0 = 0, m_lagstep = 0, m_band8 = 0, m_testgen = 0, m_status = 0, m_tport = 0;

  always #2 clk_256 = ~clk_256;
  always #4 sclk = ~sclk;
  always #15 mcb_clk = ~mcb_clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- pad stimulus
  int mode = 0;               // 0: 1-bit samples in nibbles, 1: 8-bit band 1 of 4
  bit abit [$];               // sample sign stream of input A
  logic [63:0] sent_a [$], sent_b [$];

  function automatic logic bsample(input int n);
    return (n - S >= 0) ? abit[n - S] : 1'b0;
  endfunction

  always @(posedge clk_256) begin
    #0.5;
    if (mode == 0) begin
      for (int j = 0; j < 16; j++) begin
        int n;
        n = abit.size();
        abit.push_back(1'($urandom));
        idata_a[63 - 4*j -: 4] = {3'($urandom), abit[n]};
        idata_b[63 - 4*j -: 4] = {3'($urandom), bsample(n)};
      end
    end else begin
      for (int s = 0; s < 8; s++) begin
        if (s % 4 == 2) idata_a[63 - 8*s -: 8] = ($urandom_range(0, 1) != 0) ? 8'hFF : 8'h00;
        else            idata_a[63 - 8*s -: 8] = 8'($urandom);
      end
      idata_b = {$urandom, $urandom};
    end
    sent_a.push_back(idata_a);
    sent_b.push_back(idata_b);
    if (sent_a.size() > 8) begin void'(sent_a.pop_front()); void'(sent_b.pop_front()); end
  end

  // pad-to-pad check: outputs show the inputs driven 3 clocks earlier
  int pass_err = 0, quiet = 0;
  always @(negedge clk_256) begin
    quiet = (mode == 0 && dut.cfg.test_out == 1'b0 && !dut.rst) ? quiet + 1 : 0;
    if (reset_n && quiet > 8) begin
      if (odata_a !== sent_a[4] || odata_b !== sent_b[4]) begin
        pass_err++;
        if (pass_err < 4) $display("pass-through mismatch at %0t quiet %0d", $time, quiet);
      end
      else m_pass++;
    end
  end

  // test port counts internal ticks on pin 0
  int n_tp = 0, n_tk = 0;
  always @(posedge clk_256) begin
    if (test[0]) n_tp++;
    if (dut.tk) n_tk++;
  end

  // ---------------------------------------------------------------- bus and tick
  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge mcb_clk); mcb_cs_n = 0; mcb_rd = 0; mcb_addr = a; mcb_data_i = d;
    @(negedge mcb_clk); mcb_cs_n = 1; mcb_rd = 1;
  endtask

  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge mcb_clk); mcb_cs_n = 0; mcb_rd = 1; mcb_addr = a;
    @(negedge mcb_clk);
    d = mcb_data_o;
    @(negedge mcb_clk); mcb_cs_n = 1;
  endtask

  task automatic sys_tick();
    @(posedge clk_256); #0.5; stick = 1;
    @(posedge clk_256); @(posedge clk_256); #0.5; stick = 0;
  endtask

  // one interval of exactly T clocks between STICK rising edges
  task automatic interval();
    sys_tick();
    repeat (T - 3) @(posedge clk_256);
    sys_tick();
    repeat (20) @(posedge clk_256);
  endtask

  longint pacc [64];
  int     vcnt [64];

  task automatic read_results();
    logic [15:0] d2, d1, d0;
    wr(A_CM_CTL, 16'h000C);
    wr(A_CM_CTL, 16'h0000);
    for (int i = 0; i < 64; i++) begin
      rd(A_XC_PACC2, d2); rd(A_XC_PACC1, d1); rd(A_XC_PACC0, d0);
      pacc[i] = longint'($signed({d2, d1, d0}));
      rd(A_XC_VCNT1, d1); rd(A_XC_VCNT0, d0);
      vcnt[i] = int'({d1, d0});
    end
  endtask

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // peak lag, its value, and the largest magnitude elsewhere
  task automatic peak(output int pl, output longint pv, output longint other);
    pl = 0; pv = pacc[0]; other = 0;
    for (int i = 1; i < 64; i++) if (pacc[i] > pv) begin pv = pacc[i]; pl = i; end
    for (int i = 0; i < 64; i++) if (i != pl) other = (pacc[i] < 0 ? -pacc[i] : pacc[i]) > other ?
                                                      (pacc[i] < 0 ? -pacc[i] : pacc[i]) : other;
  endtask

  initial begin
    logic [15:0] d;
    int pl;
    longint pv, other;
    repeat (10) @(negedge mcb_clk);
    reset_n = 1;
    repeat (10) @(negedge mcb_clk);
    rd(A_CM_DID, d);
    check("design id", d == 16'hC518);

    // ---------------- lag0: B lagged, A prompt, 1-bit samples, delay 0
    mode = 0;
    wr(A_CM_CFG, 16'h0001);
    wr(A_XC_NBIT, 16'h0000);
    repeat (100) @(posedge clk_256);
    interval();
    read_results();
    peak(pl, pv, other);
    $display("lag0: peak lag %0d value %0d valid %0d other %0d", pl, pv, vcnt[pl], other);
    check("lag0 peak lag", pl == S);
    check("lag0 peak value equals valid count", pv == longint'(vcnt[pl]));
    check("lag0 off-peak smaller", other < longint'(T) / 2);
    begin
      automatic bit all_t = 1;
      foreach (vcnt[i]) if (vcnt[i] != T) all_t = 0;
      check("lag0 one sample pair per clock on every lag", all_t);
    end
    if (pl == S && pv == longint'(T)) m_lag0++;

    // ---------------- lagstep: DL_LDLY = 1 becomes active at the next tick
    sys_tick();
    wr(A_DL_LDLY, 16'h0001);          // mid-interval, not yet active
    repeat (T) @(posedge clk_256);
    interval();                       // first tick activates the delay
    read_results();
    peak(pl, pv, other);
    $display("lagstep: peak lag %0d value %0d valid %0d other %0d", pl, pv, vcnt[pl], other);
    check("lagstep peak lag", pl == S - 16);
    check("lagstep peak value", pv > longint'(T) - 16 && pv <= longint'(T));
    check("lagstep off-peak smaller", other < longint'(T) / 2);
    rd(A_DL_PLDLY, d);
    check("previous lag delay", d == 16'd1);
    if (pl == S - 16 && d == 16'd1) m_lagstep++;
    wr(A_DL_LDLY, 16'h0000);

    // ---------------- band8: 8_2, band 1 of A against itself, 8-bit samples
    mode = 1;
    wr(A_CM_CFG, 16'h0000);
    wr(A_XC_NBIT, 16'h0007);
    wr(A_SL_NBND, 16'h0003);
    wr(A_SL_DBND, 16'h0001);
    wr(A_SL_PBND, 16'h0001);
    wr(A_SL_IDEC, 16'h0000);
    wr(A_SL_ODEC, 16'h0002);
    sys_tick();                       // activates delay 0
    repeat (200) @(posedge clk_256);
    interval();
    read_results();
    $display("band8: lag0 %0d valid %0d lag1 %0d", pacc[0], vcnt[0], pacc[1]);
    check("band8 one word per 4 clocks", vcnt[0] == T / 4);
    check("band8 lag 0 exact", pacc[0] == 64'd65025 * vcnt[0]);
    check("band8 lag 1 smaller", pacc[1] < pacc[0] / 2);
    rd(A_CM_STS, d);
    // bits 4..7 are the SELECT setting errors (bit 10, the STICK edge-match test
    // flag, is set here because STICK changes in the first half of a clock)
    check("no SELECT error for a legal setting", d[7:4] == 4'h0);
    if (vcnt[0] == T / 4 && pacc[0] == 64'd65025 * vcnt[0]) m_band8++;

    // ---------------- status: 3 bands is illegal
    wr(A_SL_NBND, 16'h0002);
    interval();
    rd(A_CM_STS, d);
    check("illegal band count reported", d[ST_NBND] == 1'b1);
    if (d[ST_NBND]) m_status++;
    wr(A_SL_NBND, 16'h0000);
    wr(A_SL_DBND, 16'h0000);
    wr(A_SL_PBND, 16'h0000);
    wr(A_SL_ODEC, 16'h0000);

    // ---------------- tport: pin 0 shows the tick
    wr(A_CM_TST0, 16'h0001);
    n_tp = 0; n_tk = 0;
    interval();
    check("test port follows tick", n_tp == n_tk && n_tk == 2);
    if (n_tp == 2) m_tport++;
    wr(A_CM_TST0, 16'h0000);

    // ---------------- testgen: pseudo-random test signals on the outputs
    wr(A_CM_CFG, 16'h0004);
    begin
      logic [15:0] m;
      logic [63:0] w;
      int ok;
      ok = 1;
      sys_tick();
      @(posedge otick_a);
      m = 16'h1357;
      for (int k = 0; k < 20; k++) begin
        for (int i = 63; i >= 0; i--) begin
          w[i] = m[15];
          m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]};
        end
        #1;
        if (odata_a !== w || !ovalid_a) ok = 0;
        @(posedge clk_256);
      end
      check("test generator data on the output", ok == 1);
      if (ok == 1) m_testgen++;
    end
    wr(A_CM_CFG, 16'h0000);
    mode = 0;
    repeat (20) @(posedge clk_256);

    check("pad-to-pad retransmission", pass_err == 0);
    check("mechanism pass",    m_pass > 0);
    check("mechanism lag0",    m_lag0 > 0);
    check("mechanism lagstep", m_lagstep > 0);
    check("mechanism band8",   m_band8 > 0);
    check("mechanism status",  m_status > 0);
    check("mechanism tport",   m_tport > 0);
    check("mechanism testgen", m_testgen > 0);
    $display("mechanisms: pass=%0d lag0=%0d lagstep=%0d band8=%0d status=%0d tport=%0d testgen=%0d",
             m_pass, m_lag0, m_lagstep, m_band8, m_status, m_tport, m_testgen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
