// INOUT: wideband input/output, system tick, reset and clock-manager control.
//
// Holds one input clocking/CRC channel and one test generator per wideband input,
// the system tick (STICK) capture, the time interval counters and the reset
// distribution of the 256 MHz domain.
//
// * STICK is sampled on both edges of the 256 MHz clock; `cfg.edge_st` picks the
//   copy. Its rising edge gives the one-clock internal tick `tk`, which times
//   every interval in the design (CRCs, accumulations, status latching, delay
//   changes). A STICK high for other than two clocks (one SCLK cycle) raises the
//   width error. For clock-edge tests the rising edges of the two copies are
//   compared: `ev_edge_eq` when they coincide, `ev_edge_lead` when the chosen copy
//   rises first.
// * Reset: RESET_N (low true) is synchronised; a 0->1 change of CM_CTL bit 0 adds
//   a one-clock software reset. `rst` goes to all blocks of the 256 MHz domain.
// * The clock manager (a vendor clock primitive outside this RTL) gets its reset
//   (CM_CTL bit 15), phase-shift requests (one-clock `dcm_psen` on a 0->1 change of
//   CM_CTL bit 5, direction CM_CTL bit 4) and the clock disable (CM_CTL bit 1);
//   its lock, shift-done and overflow indications come back as status events.
// * To SELECT each input gives 64 data bits and va = {data tick, valid}.
// Some outputs are plain wires on purpose: OCLK A/B is SCLK; dcm_rst,
// dcm_psincdec and clk_off are CM_CTL bits 15, 4 and 1; the clock manager's lock,
// shift-done and overflow lines become status events unchanged.
// The blocks and register meanings follow the specification; the STICK width
// rule, the edge comparison method and the reset scheme are this design's.
module wbc_inout
  import wbc_pkg::*;
(
  input  logic        clk,          // internal 256 MHz clock (from the clock manager)
  input  logic        sclk,         // 128 MHz system clock, forwarded as OCLK
  input  logic        reset_n,
  input  logic        stick,
  // wideband A pads
  input  logic [63:0] idata_a,
  input  logic        itick_a, ivalid_a, inoise_a, iderr_a, idfrm_a, iclk_a,
  output logic [63:0] odata_a,
  output logic        otick_a, ovalid_a, onoise_a, oderr_a, odfrm_a, oclk_a,
  // wideband B pads
  input  logic [63:0] idata_b,
  input  logic        itick_b, ivalid_b, inoise_b, iderr_b, idfrm_b, iclk_b,
  output logic [63:0] odata_b,
  output logic        otick_b, ovalid_b, onoise_b, oderr_b, odfrm_b, oclk_b,
  // registers (monitor bus domain, quasi-static)
  input  cfg_t        cfg,
  input  logic [15:0] ctl,
  input  logic [6:0]  esel_a, esel_b, dsel_a, dsel_b,
  input  logic [15:0] seed_a, seed_b, derr_a, derr_b, sdly,
  input  logic [1:0]  tmode_a, tmode_b,
  // clock manager
  input  logic        dcm_locked,
  input  logic        dcm_psdone,
  input  logic        dcm_psovf,
  output logic        dcm_rst,
  output logic        dcm_psen,
  output logic        dcm_psincdec,
  output logic        clk_off,
  // to the other blocks
  output logic        rst,
  output logic        tk,
  output logic [63:0] da,
  output logic [1:0]  va,           // {tick, valid}
  output logic [63:0] db,
  output logic [1:0]  vb,
  // monitor
  output logic [3:0]  icrc_a, ocrc_a, icrc_b, ocrc_b,
  output logic [21:0] tint_a, tint_b,
  output logic        ev_stick_w,
  output logic        ev_unlock,
  output logic        ev_psdone,
  output logic        ev_psovf,
  output logic        ev_edge_eq,
  output logic        ev_edge_lead
);
  // ------------------------------------------------------------ reset
  logic rst_m, rst_s, swr_s, swr_q, ps_s, ps_q;
  always_ff @(posedge clk) begin
    rst_m <= ~reset_n;
    rst_s <= rst_m;
    rst   <= rst_s | (swr_s & ~swr_q);
  end
  wbc_sync u_swr (.clk, .rst(rst_s), .d(ctl[CT_SWRST]), .q(swr_s));
  wbc_sync u_ps  (.clk, .rst(rst_s), .d(ctl[CT_PSEN]),  .q(ps_s));
  always_ff @(posedge clk) begin
    if (rst_s) begin
      swr_q    <= 1'b0;
      ps_q     <= 1'b0;
      dcm_psen <= 1'b0;
    end else begin
      swr_q    <= swr_s;
      ps_q     <= ps_s;
      dcm_psen <= ps_s & ~ps_q;
    end
  end
  assign dcm_psincdec = ctl[CT_PSINC];
  assign dcm_rst      = ctl[CT_DCMRST];
  assign clk_off      = ctl[CT_CLKOFF];

  // ------------------------------------------------------------ system tick
  logic st_p, st_n, st_nr, st_sel, st_q, st_pq, st_nq;
  logic [2:0] st_len;
  always_ff @(posedge clk) st_p <= stick;
  always_ff @(negedge clk) st_n <= stick;
  always_ff @(posedge clk) begin
    if (rst) begin
      st_nr  <= 1'b0;
      st_q   <= 1'b0;
      st_pq  <= 1'b0;
      st_nq  <= 1'b0;
      st_len <= '0;
    end else begin
      st_nr  <= st_n;
      st_q   <= st_sel;
      st_pq  <= st_p;
      st_nq  <= st_nr;
      st_len <= st_sel ? ((st_len == 3'd7) ? st_len : st_len + 3'd1) : 3'd0;
    end
  end
  assign st_sel     = cfg.edge_st ? st_nr : st_p;
  assign tk         = st_sel & ~st_q;
  assign ev_stick_w = ~st_sel & st_q & (st_len != 3'd2);

  logic rise_p, rise_n;
  assign rise_p       = st_p & ~st_pq;
  assign rise_n       = st_nr & ~st_nq;
  assign ev_edge_eq   = rise_p & rise_n;
  assign ev_edge_lead = cfg.edge_st ? (rise_n & ~st_p) : (rise_p & ~st_nr);

  assign ev_unlock = ~dcm_locked;
  assign ev_psdone = dcm_psdone;
  assign ev_psovf  = dcm_psovf;

  // ------------------------------------------------------------ wideband channels
  logic [63:0] tg_data_a, tg_data_b;
  logic        tg_valid_a, tg_tick_a, tg_derr_a, tg_dfrm_a;
  logic        tg_valid_b, tg_tick_b, tg_derr_b, tg_dfrm_b;
  logic        tick_a, valid_a, tick_b, valid_b;

  wbc_testgen u_tg_a (.clk, .rst, .tick(tk), .seed(seed_a), .delta(cfg.test_delta),
                      .inv_tick(cfg.test_inv), .derr_word(derr_a), .data(tg_data_a),
                      .valid(tg_valid_a), .otick(tg_tick_a), .derr(tg_derr_a), .dfrm(tg_dfrm_a));
  wbc_testgen u_tg_b (.clk, .rst, .tick(tk), .seed(seed_b), .delta(cfg.test_delta),
                      .inv_tick(cfg.test_inv), .derr_word(derr_b), .data(tg_data_b),
                      .valid(tg_valid_b), .otick(tg_tick_b), .derr(tg_derr_b), .dfrm(tg_dfrm_b));

  wbc_wbchan u_ch_a (
    .clk, .rst, .stk(tk),
    .idata(idata_a), .itick(itick_a), .ivalid(ivalid_a), .inoise(inoise_a),
    .iderr(iderr_a), .idfrm(idfrm_a), .iclk(iclk_a), .sclk,
    .odata(odata_a), .otick(otick_a), .ovalid(ovalid_a), .onoise(onoise_a),
    .oderr(oderr_a), .odfrm(odfrm_a), .oclk(oclk_a),
    .edge_sel(cfg.edge_a), .align(cfg.align_a), .test_out(cfg.test_out),
    .dsel(dsel_a), .esel(esel_a),
    .t_data(tg_data_a), .t_valid(tg_valid_a), .t_tick(tg_tick_a),
    .t_derr(tg_derr_a), .t_dfrm(tg_dfrm_a),
    .data(da), .tick(tick_a), .valid(valid_a), .icrc(icrc_a), .ocrc(ocrc_a));

  wbc_wbchan u_ch_b (
    .clk, .rst, .stk(tk),
    .idata(idata_b), .itick(itick_b), .ivalid(ivalid_b), .inoise(inoise_b),
    .iderr(iderr_b), .idfrm(idfrm_b), .iclk(iclk_b), .sclk,
    .odata(odata_b), .otick(otick_b), .ovalid(ovalid_b), .onoise(onoise_b),
    .oderr(oderr_b), .odfrm(odfrm_b), .oclk(oclk_b),
    .edge_sel(cfg.edge_b), .align(cfg.align_b), .test_out(cfg.test_out),
    .dsel(dsel_b), .esel(esel_b),
    .t_data(tg_data_b), .t_valid(tg_valid_b), .t_tick(tg_tick_b),
    .t_derr(tg_derr_b), .t_dfrm(tg_dfrm_b),
    .data(db), .tick(tick_b), .valid(valid_b), .icrc(icrc_b), .ocrc(ocrc_b));

  assign va = {tick_a, valid_a};
  assign vb = {tick_b, valid_b};

  // ------------------------------------------------------------ time interval counters
  wbc_tint u_tint_a (.clk, .rst, .dtick(tick_a), .stk(tk), .sdly, .mode(tmode_a), .count(tint_a));
  wbc_tint u_tint_b (.clk, .rst, .dtick(tick_b), .stk(tk), .sdly, .mode(tmode_b), .count(tint_b));
endmodule
