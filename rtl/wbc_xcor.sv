// XCOR: 64-lag cross-correlator with tick-latched results and read select.
//
// Lags: on each word strobe `ce` the lagged word and the prompt sample enter
// shift registers eight words deep. With 4-bit samples (nbit < 4) the four
// newest lagged words hold 64 consecutive samples, with 8-bit samples all eight
// do. The prompt sample used is the one that arrived with the oldest of those
// words, so lag i pairs the prompt with the lagged sample i samples after the
// first sample of that word (0 <= i < 64); DELAY shifts this window by whole
// words.
// Split: lag i takes its 4-bit or 8-bit sample and the valid of the word holding
// it; the prompt sample and valid are common to all 64 MACs, which accumulate one
// clock after `ce` and latch their totals on the tick `tk`.
// Read select (monitor-bus clock domain): two 6-bit read addresses choose which
// lag's accumulation (`pacc`) and valid count (`vcnt`) the register interface
// sees. A 0->1 change of `zero_acc` / `zero_vcnt` (CM_CTL bits 2/3) sets the
// address to 0; `inc_acc` / `inc_vcnt` (a completed read of the least
// significant word) advance it. The latched totals change only on a tick, so
// reading them from the bus clock is safe within the interval.
// Lag count, shift register depths, widths and the read protocol follow the
// specification; the exact alignment of prompt and lag 0 and the one-clock MAC
// timing are this design's.
module wbc_xcor (
  input  logic        clk,
  input  logic        rst,
  input  logic        tk,
  input  logic        ce,
  input  logic [63:0] dd,
  input  logic        vd,
  input  logic [7:0]  dp,
  input  logic        vp,
  input  logic [2:0]  nbit,
  // read select, monitor-bus clock domain
  input  logic        mcb_clk,
  input  logic        mcb_rst,
  input  logic        zero_acc,
  input  logic        zero_vcnt,
  input  logic        inc_acc,
  input  logic        inc_vcnt,
  output logic [38:0] pacc,
  output logic [21:0] vcnt
);
  localparam int unsigned NLAG = 64;
  localparam int unsigned RAW  = $clog2(NLAG);

  logic [63:0] lw [8];
  logic [7:0]  lv;
  logic [7:0]  pd [8];
  logic [7:0]  pv;
  logic        en;
  logic        mode8;

  logic [7:0]  ls   [NLAG];
  logic        lsv  [NLAG];
  logic [7:0]  pcur;
  logic        pvcur;
  logic signed [38:0] xsum [NLAG];
  logic        [21:0] vsum [NLAG];

  assign mode8 = nbit[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) begin
        lw[i] <= '0;
        pd[i] <= '0;
      end
      lv <= '0;
      pv <= '0;
      en <= 1'b0;
    end else begin
      en <= ce;
      if (ce) begin
        lw[0] <= dd;
        pd[0] <= dp;
        for (int i = 1; i < 8; i++) begin
          lw[i] <= lw[i-1];
          pd[i] <= pd[i-1];
        end
        lv <= {lv[6:0], vd};
        pv <= {pv[6:0], vp};
      end
    end
  end

  // split: sample i of the time-ordered window, oldest word first
  always_comb begin
    int w;
    pcur  = mode8 ? pd[7] : pd[3];
    pvcur = mode8 ? pv[7] : pv[3];
    for (int i = 0; i < NLAG; i++) begin
      if (mode8) begin
        w      = 7 - (i / 8);
        ls[i]  = lw[w & 7][63 - 8*(i % 8) -: 8];
      end else begin
        w      = 3 - (i / 16);
        ls[i]  = {4'd0, lw[w & 7][63 - 4*(i % 16) -: 4]};
      end
      lsv[i] = lv[w & 7];
    end
  end

  for (genvar g = 0; g < NLAG; g++) begin : g_mac
    wbc_mac u_mac (
      .clk, .rst, .tk, .en, .nbit,
      .ld(ls[g]), .pd(pcur), .lv(lsv[g]), .pv(pvcur),
      .xsum(xsum[g]), .vsum(vsum[g]));
  end

  // read select
  logic [RAW-1:0] aaddr, vaddr;
  logic           za_q, zv_q;
  always_ff @(posedge mcb_clk) begin
    if (mcb_rst) begin
      aaddr <= '0;
      vaddr <= '0;
      za_q  <= 1'b0;
      zv_q  <= 1'b0;
    end else begin
      za_q <= zero_acc;
      zv_q <= zero_vcnt;
      if (zero_acc & ~za_q) aaddr <= '0;
      else if (inc_acc)     aaddr <= aaddr + RAW'(1);
      if (zero_vcnt & ~zv_q) vaddr <= '0;
      else if (inc_vcnt)     vaddr <= vaddr + RAW'(1);
    end
  end
  assign pacc = xsum[aaddr];
  assign vcnt = vsum[vaddr];
endmodule
