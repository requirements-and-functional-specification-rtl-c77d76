// Input clocking and CRC for one wideband input (A or B).
//
// The 64 data lines and the tick, valid, noise, delay-error, delay-frame and
// clock lines of one input are sampled by both edges of the internal 256 MHz
// clock; `edge_sel` (CM_CFG bit 4 or 5) picks the falling-edge (1) or rising-edge
// (0) copy, which is then retimed to the rising edge. `align` (CM_CFG bit 8 or 9)
// adds one clock so A and B can be time aligned. `test_out` (CM_CFG bit 2)
// substitutes the test generator's data, valid, tick and delay-error frame; the
// noise line is then held low. The result is registered once more and driven to
// the next FPGA (ODATA, OTICK, ...) and to SELECT; OCLK is the system clock.
//
// Two CRC-4 signatures are formed per system tick interval on the wire chosen by
// `dsel` (IO_DSEL): bits 5:0 pick a data line; with bit 6 set, lines 0..4 are
// replaced by valid, noise, derr, dfrm and the sampled input clock. The input CRC
// uses the captured input, the output CRC the driven output. With `esel[6]` set
// and `esel[5:0]` equal to `dsel[5:0]` the input CRC is reported inverted, to
// create a CRC error for software tests.
//
// Latency from pad to output and to SELECT: 3 clocks (4 with `align`). The
// double-edge capture, the register meanings and the CRC wire map follow the
// specification; which edge value means which, the latency, and feeding the test
// signals to SELECT as well as to the outputs are this design's choices.
module wbc_wbchan (
  input  logic        clk,        // internal 256 MHz clock
  input  logic        rst,
  input  logic        stk,        // internal system tick (CRC interval)
  // pads
  input  logic [63:0] idata,
  input  logic        itick,
  input  logic        ivalid,
  input  logic        inoise,
  input  logic        iderr,
  input  logic        idfrm,
  input  logic        iclk,
  input  logic        sclk,
  output logic [63:0] odata,
  output logic        otick,
  output logic        ovalid,
  output logic        onoise,
  output logic        oderr,
  output logic        odfrm,
  output logic        oclk,
  // configuration
  input  logic        edge_sel,
  input  logic        align,
  input  logic        test_out,
  input  logic [6:0]  dsel,
  input  logic [6:0]  esel,
  // test generator
  input  logic [63:0] t_data,
  input  logic        t_valid,
  input  logic        t_tick,
  input  logic        t_derr,
  input  logic        t_dfrm,
  // to SELECT / time interval counter
  output logic [63:0] data,
  output logic        tick,
  output logic        valid,
  // monitor
  output logic [3:0]  icrc,
  output logic [3:0]  ocrc
);
  typedef struct packed {
    logic        clk;
    logic        dfrm;
    logic        derr;
    logic        noise;
    logic        valid;
    logic        tick;
    logic [63:0] data;
  } wb_t;

  wb_t pin, cap_p, cap_n, rt, al, sel, outq;
  logic [3:0] icrc_raw;

  assign pin = '{clk: iclk, dfrm: idfrm, derr: iderr, noise: inoise,
                 valid: ivalid, tick: itick, data: idata};

  always_ff @(posedge clk) cap_p <= pin;
  always_ff @(negedge clk) cap_n <= pin;

  always_ff @(posedge clk) begin
    if (rst) begin
      rt   <= '0;
      al   <= '0;
      outq <= '0;
    end else begin
      rt   <= edge_sel ? cap_n : cap_p;
      al   <= rt;
      outq <= sel;
    end
  end

  always_comb begin
    sel = align ? al : rt;
    if (test_out) begin
      sel.data  = t_data;
      sel.valid = t_valid;
      sel.tick  = t_tick;
      sel.derr  = t_derr;
      sel.dfrm  = t_dfrm;
      sel.noise = 1'b0;
    end
  end

  assign odata  = outq.data;
  assign otick  = outq.tick;
  assign ovalid = outq.valid;
  assign onoise = outq.noise;
  assign oderr  = outq.derr;
  assign odfrm  = outq.dfrm;
  assign oclk   = sclk;
  assign data   = outq.data;
  assign tick   = outq.tick;
  assign valid  = outq.valid;

  // CRC wire selection
  function automatic logic pick(input wb_t w, input logic [6:0] s);
    logic [63:0] v;
    v = w.data;
    if (s[6]) v[4:0] = {w.clk, w.dfrm, w.derr, w.noise, w.valid};
    return v[s[5:0]];
  endfunction

  wbc_crc4 u_icrc (.clk, .rst, .tick(stk), .din(pick(align ? al : rt, dsel)), .crc(icrc_raw));
  wbc_crc4 u_ocrc (.clk, .rst, .tick(stk), .din(pick(outq, dsel)),             .crc(ocrc));

  assign icrc = (esel[6] && esel[5:0] == dsel[5:0]) ? ~icrc_raw : icrc_raw;
endmodule
