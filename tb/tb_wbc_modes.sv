// End-to-end testbench for wbc_top: every wideband data organisation.
//
// Runs the full-size top (no parameter changes) through the nine word
// organisations 4_16, 4_8, 4_4, 4_2, 4_1, 8_8, 8_4, 8_2 and 8_1, and through
// the decimated 4_1 case with SL_IDEC = 3, SL_ODEC = 7. Two more cases move the
// lag window with DL_LDLY (lags 192..255), and one runs a real 10 ms tick in
// mode 8_8, the largest accumulation the design must hold.
//
// Stimulus: in a word with N bands and S slots (16 of 4 bits or 8 of 8 bits),
// slot s carries band N-1-(s mod N) at band-sample time t = word*(S/N) + s div N.
// Every band of input A carries a random two-level stream, 0 or full scale
// (15 or 255), taken from a hash of (band, t). Input B carries the same streams
// delayed by D band samples. With B lagged, A prompt and XC_NBIT = 3 or 7, each
// sample is -M or +M (M = 15 or 255). With decimation by 2^idec, only every
// 2^idec-th band sample is kept, so the peak moves to lag D / 2^idec.
//
// Checks per organisation, on the second tick interval after the setting:
//  * every lag counts T / (N * 2^idec) valid words (the lagged word rate);
//  * the peak is at lag D / 2^idec and equals M^2 times its valid count;
//  * every other lag is below half of the peak;
//  * SELECT reports no illegal setting in CM_STS.
// The tick interval is T = 4096 clocks (16384 with decimation), except in the
// 10 ms case.
module tb_wbc_modes;
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

  int T = 4096;               // clocks per tick interval

  int checks = 0, failures = 0, n_modes = 0;

  always #2 clk_256 = ~clk_256;
  always #4 sclk = ~sclk;
  always #15 mcb_clk = ~mcb_clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- stimulus
  int     nb = 1;             // bands per word
  bit     w8 = 0;             // 8-bit slots
  int     dly = 21;           // B = A delayed by dly band samples
  longint word = 0;

  // two-level sample of band b at band-sample time t (t < 0: 0)
  function automatic bit sbit(input int b, input longint t);
    logic [63:0] x;
    if (t < 0) return 1'b0;
    x = 64'(t) * 64'h9E3779B97F4A7C15 ^ 64'(b) * 64'hC2B2AE3D27D4EB4F;
    x = x ^ (x >> 29);
    x = x * 64'hBF58476D1CE4E5B9;
    x = x ^ (x >> 32);
    return x[17];
  endfunction

  always @(posedge clk_256) begin
    int slots, per;
    #0.5;
    slots = w8 ? 8 : 16;
    per   = slots / nb;
    for (int s = 0; s < slots; s++) begin
      int     b;
      longint t;
      b = nb - 1 - (s % nb);
      t = word * longint'(per) + longint'(s) / longint'(nb);
      if (w8) begin
        idata_a[63 - 8*s -: 8] = sbit(b, t) ? 8'hFF : 8'h00;
        idata_b[63 - 8*s -: 8] = sbit(b, t - longint'(dly)) ? 8'hFF : 8'h00;
      end else begin
        idata_a[63 - 4*s -: 4] = sbit(b, t) ? 4'hF : 4'h0;
        idata_b[63 - 4*s -: 4] = sbit(b, t - longint'(dly)) ? 4'hF : 4'h0;
      end
    end
    word++;
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

  // one organisation: n bands, 8-bit or 4-bit slots, input decimation code idec
  // dl: DL_LDLY in words (moves the window by 16*dl or 8*dl lags); tl: clocks
  // of the measured interval; d0: delay of B in band samples
  task automatic run_mode(input string name, input int n, input bit eight, input int idec,
                          input int dl = 0, input int tl = 0, input int d0 = 21);
    logic [15:0] d;
    int     l2, band, lag, words, pl;
    longint m2, pv, other, mag;
    bit     all_v;
    l2 = $clog2(n);
    band = n / 2;
    m2 = eight ? 65025 : 225;
    dly = (idec == 0) ? d0 : 3 << idec;
    lag = (dly >> idec) - dl * (eight ? 8 : 16);
    T = (idec == 0) ? 4096 : 16384;            // at least 128 lagged words
    words = T / (n << idec);
    nb = n; w8 = eight;
    wr(A_CM_CFG, 16'h0001);                     // lagged B, prompt A
    wr(A_XC_NBIT, eight ? 16'd7 : 16'd3);
    wr(A_SL_IDEC, 16'(idec));
    wr(A_SL_NBND, 16'(n - 1));
    wr(A_SL_DBND, 16'(band));
    wr(A_SL_PBND, 16'(band));
    wr(A_SL_ODEC, 16'(idec + l2));
    wr(A_DL_LDLY, 16'(dl));
    repeat (50) @(posedge clk_256);
    interval();                                 // settle
    if (tl != 0) begin
      T = tl;
      words = T / (n << idec);
    end
    interval();                                 // measured
    read_results();
    rd(A_CM_STS, d);
    check({name, " no SELECT status error"}, d[7:4] == 4'd0);
    all_v = 1;
    foreach (vcnt[i]) if (vcnt[i] != words) all_v = 0;
    check({name, " valid count = lagged word rate"}, all_v);
    pl = 0; pv = pacc[0];
    for (int i = 1; i < 64; i++) if (pacc[i] > pv) begin pv = pacc[i]; pl = i; end
    other = 0;
    for (int i = 0; i < 64; i++) if (i != pl) begin
      mag = pacc[i] < 0 ? -pacc[i] : pacc[i];
      if (mag > other) other = mag;
    end
    $display("%s: words %0d peak lag %0d value %0d (expect lag %0d value %0d) other %0d",
             name, vcnt[0], pl, pv, lag, m2 * words, other);
    check({name, " peak lag"}, pl == lag);
    check({name, " peak value exact"}, pv == m2 * longint'(vcnt[pl]) && vcnt[pl] == words);
    check({name, " off-peak below half"}, other < pv / 2);
    if (pl == lag && pv == m2 * longint'(words)) n_modes++;
  endtask

  initial begin
    repeat (10) @(negedge mcb_clk);
    reset_n = 1;
    repeat (10) @(negedge mcb_clk);
    run_mode("4_16", 1, 0, 0);
    run_mode("4_8", 2, 0, 0);
    run_mode("4_4", 4, 0, 0);
    run_mode("4_2", 8, 0, 0);
    run_mode("4_1", 16, 0, 0);
    run_mode("8_8", 1, 1, 0);
    run_mode("8_4", 2, 1, 0);
    run_mode("8_2", 4, 1, 0);
    run_mode("8_1", 8, 1, 0);
    run_mode("4_1 idec 3", 16, 0, 3);
    // lag windows beyond the first: B delayed by 200 samples, DL_LDLY steps
    // of 4 (4-bit) or 8 (8-bit) words per 64 lags, peak at 200 - 192 = 8
    run_mode("4_16 window 3", 1, 0, 0, 12, 0, 200);
    run_mode("8_4 window 3", 2, 1, 0, 24, 0, 200);
    // one real 10 ms tick (2,560,000 clocks) with 8-bit full-scale samples:
    // peak 65025 * 2,560,000 = 1.66e11 needs 38 bits, count needs 22 bits
    run_mode("8_8 10 ms", 1, 1, 0, 0, 2560000);
    check("all cases exercised", n_modes == 13);
    $display("cases passed: %0d of 13", n_modes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
