// Station board wideband correlator (WBC) FPGA, top level.
//
// Two 64-bit wideband inputs (A and B) arrive from the delay modules at 256
// Mword/s (128 MHz clock, both edges) and leave again, re-timed, towards the
// filter banks. On the way, one band of one input (the "lagged" side) is
// correlated against one sample per word of one band of one input (the
// "prompt" side) over 64 consecutive lags; the 64 accumulations and valid counts
// of each 10 ms system tick are read by the board processor over the monitor and
// control bus (MCB), which steps the lag window from tick to tick.
//
//   pads -> INOUT -> SELECT -> DELAY -> XCOR
//             |         \________|_______/
//             +--------------- MCBI (registers, MCB) ---- test port
//
// Clocking: `clk_256` is the 256 MHz internal clock made from SCLK by the FPGA's
// clock manager, a vendor primitive that is not part of this RTL; its reset,
// phase-shift and lock signals are ports here. The MCB runs on its own clock.
// The bidirectional MCB_DATA pad is split into `mcb_data_i`, `mcb_data_o` and
// the drive enable `mcb_data_oe`. The block split, the register map and the data
// flow follow the specification; port splitting and the test signal list are
// this design's.
// The output clocks ODCLK_A/B are SCLK passed straight through.
//
// Test port codes (CM_TST0..3): 1 tick, 2 SELECT word strobe, 3/4 A data tick /
// valid, 5/6 B data tick / valid, 7/8 lagged / prompt valid, 9 DCM phase-shift
// enable, 10 reset, 11 STICK width error, 12 XCOR word strobe, 13/14 OTICK A/B,
// 15 STICK edge match.
module wbc_top
  import wbc_pkg::*;
(
  // system
  input  logic        reset_n,
  input  logic        sclk,
  input  logic        stick,
  // clock manager (external primitive)
  input  logic        clk_256,
  input  logic        dcm_locked,
  input  logic        dcm_psdone,
  input  logic        dcm_psovf,
  output logic        dcm_rst,
  output logic        dcm_psen,
  output logic        dcm_psincdec,
  output logic        clk_off,
  // wideband A
  input  logic [63:0] idata_a,
  input  logic        itick_a, ivalid_a, inoise_a, iderr_a, idfrm_a, idclk_a,
  output logic [63:0] odata_a,
  output logic        otick_a, ovalid_a, onoise_a, oderr_a, odfrm_a, odclk_a,
  // wideband B
  input  logic [63:0] idata_b,
  input  logic        itick_b, ivalid_b, inoise_b, iderr_b, idfrm_b, idclk_b,
  output logic [63:0] odata_b,
  output logic        otick_b, ovalid_b, onoise_b, oderr_b, odfrm_b, odclk_b,
  // monitor and control bus
  input  logic        mcb_clk,
  input  logic        mcb_cs_n,
  input  logic        mcb_rd,
  input  logic [7:0]  mcb_addr,
  input  logic [15:0] mcb_data_i,
  output logic [15:0] mcb_data_o,
  output logic        mcb_data_oe,
  // test port
  output logic [3:0]  test
);
  logic        rst, tk, mcb_rst;
  cfg_t        cfg;
  logic [15:0] ctl;
  logic [7:0]  tst [4];
  logic [6:0]  esel_a, esel_b, dsel_a, dsel_b;
  logic [1:0]  tmode_a, tmode_b;
  logic [15:0] seed_a, seed_b, sdly, derr_a, derr_b;
  logic [3:0]  idec, nbnd, dbnd, pbnd, odec;
  logic [13:0] ldly, pldly;
  logic [2:0]  nbit;
  logic [3:0]  icrc_a, icrc_b, ocrc_a, ocrc_b;
  logic [21:0] tint_a, tint_b;
  logic [38:0] pacc;
  logic [21:0] vcnt;
  logic        inc_acc, inc_vcnt;
  logic        ev_stick_w, ev_unlock, ev_psdone, ev_psovf, ev_edge_eq, ev_edge_lead;
  logic        ill_nbnd, ill_dbnd, ill_pbnd, ill_comb;
  logic [15:0] sts_ev;

  logic [63:0] da, db, sdd, ddd;
  logic [1:0]  va, vb;
  logic        svd, svp, sce, dvd, dvp, dce;
  logic [7:0]  sdp, ddp;

  wbc_inout u_inout (
    .clk(clk_256), .sclk, .reset_n, .stick,
    .idata_a, .itick_a, .ivalid_a, .inoise_a, .iderr_a, .idfrm_a, .iclk_a(idclk_a),
    .odata_a, .otick_a, .ovalid_a, .onoise_a, .oderr_a, .odfrm_a, .oclk_a(odclk_a),
    .idata_b, .itick_b, .ivalid_b, .inoise_b, .iderr_b, .idfrm_b, .iclk_b(idclk_b),
    .odata_b, .otick_b, .ovalid_b, .onoise_b, .oderr_b, .odfrm_b, .oclk_b(odclk_b),
    .cfg, .ctl, .esel_a, .esel_b, .dsel_a, .dsel_b, .seed_a, .seed_b, .derr_a, .derr_b,
    .sdly, .tmode_a, .tmode_b,
    .dcm_locked, .dcm_psdone, .dcm_psovf, .dcm_rst, .dcm_psen, .dcm_psincdec, .clk_off,
    .rst, .tk, .da, .va, .db, .vb,
    .icrc_a, .ocrc_a, .icrc_b, .ocrc_b, .tint_a, .tint_b,
    .ev_stick_w, .ev_unlock, .ev_psdone, .ev_psovf, .ev_edge_eq, .ev_edge_lead);

  wbc_select u_select (
    .clk(clk_256), .rst, .da, .va, .db, .vb,
    .lagged_b(cfg.lagged_b), .prompt_b(cfg.prompt_b), .mode8(nbit[2]),
    .idec, .nbnd, .dbnd, .pbnd, .odec,
    .dd(sdd), .vd(svd), .dp(sdp), .vp(svp), .ce(sce),
    .ill_nbnd, .ill_dbnd, .ill_pbnd, .ill_comb);

  wbc_delay u_delay (
    .clk(clk_256), .rst, .tk, .ce(sce),
    .dd_i(sdd), .vd_i(svd), .dp_i(sdp), .vp_i(svp), .ldly,
    .dd_o(ddd), .vd_o(dvd), .dp_o(ddp), .vp_o(dvp), .ce_o(dce), .pldly);

  wbc_xcor u_xcor (
    .clk(clk_256), .rst, .tk, .ce(dce), .dd(ddd), .vd(dvd), .dp(ddp), .vp(dvp), .nbit,
    .mcb_clk, .mcb_rst, .zero_acc(ctl[CT_ZACC]), .zero_vcnt(ctl[CT_ZVCNT]),
    .inc_acc, .inc_vcnt, .pacc, .vcnt);

  always_comb begin
    sts_ev               = '0;
    sts_ev[ST_STICK_W]   = ev_stick_w;
    sts_ev[ST_UNLOCK]    = ev_unlock;
    sts_ev[ST_NBND]      = ill_nbnd;
    sts_ev[ST_DBND]      = ill_dbnd;
    sts_ev[ST_PBND]      = ill_pbnd;
    sts_ev[ST_COMB]      = ill_comb;
    sts_ev[ST_PSDONE]    = ev_psdone;
    sts_ev[ST_PSOVF]     = ev_psovf;
    sts_ev[ST_EDGE_EQ]   = ev_edge_eq;
    sts_ev[ST_EDGE_LEAD] = ev_edge_lead;
  end

  wbc_mcbi u_mcbi (
    .mcb_clk, .reset_n, .mcb_cs_n, .mcb_rd, .mcb_addr, .mcb_din(mcb_data_i),
    .mcb_dout(mcb_data_o), .mcb_doe(mcb_data_oe), .mcb_rst,
    .clk(clk_256), .rst, .tk, .sts_ev,
    .cfg, .ctl, .tst, .esel_a, .esel_b, .dsel_a, .dsel_b, .tmode_a, .tmode_b,
    .seed_a, .seed_b, .sdly, .derr_a, .derr_b,
    .idec, .nbnd, .dbnd, .pbnd, .odec, .ldly, .nbit,
    .icrc_a, .icrc_b, .ocrc_a, .ocrc_b, .tint_a, .tint_b, .pldly, .pacc, .vcnt,
    .inc_acc, .inc_vcnt);

  wbc_testport u_test (
    .clk(clk_256), .rst, .sel(tst),
    .sig({ev_edge_eq, otick_b, otick_a, dce, ev_stick_w, rst, dcm_psen,
          svp, svd, vb[0], vb[1], va[0], va[1], sce, tk}),
    .test);
endmodule
