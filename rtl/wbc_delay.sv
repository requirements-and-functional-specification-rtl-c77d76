// DELAY: gross lag delay of the prompt stream.
//
// The prompt side (one 8-bit sample and its valid per lagged word) is written,
// on every word strobe `ce`, into a DEPTH-entry circular buffer and read back
// `act` words later, so a prompt sample meets the lagged word that arrived `act`
// words after it. This moves the 64-lag window of XCOR by `act` lagged words:
// 64 lags per step of 4 with 4-bit samples, of 8 with 8-bit samples. Delaying
// the prompt side (8 bits) rather than the lagged side (64 bits) keeps the
// buffer small. The lagged side only passes a one-word register so both sides
// keep the same latency (one `ce`).
//
// `ldly` (DL_LDLY) is copied to the active delay on the tick `tk`; the delay that
// was active before that tick is kept in `pldly` (DL_PLDLY), the one that goes
// with the accumulations read in that interval. Until `act` words have been
// written since reset the prompt valid is forced low, since the buffer holds no
// data yet. The buffer is a simple-dual-port memory with a registered read.
// The depth and the register meanings follow the specification; the fill guard
// and the one-word latency are this design's.
module wbc_delay #(
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          tk,
  input  logic          ce,
  input  logic [63:0]   dd_i,
  input  logic          vd_i,
  input  logic [7:0]    dp_i,
  input  logic          vp_i,
  input  logic [AW-1:0] ldly,
  output logic [63:0]   dd_o,
  output logic          vd_o,
  output logic [7:0]    dp_o,
  output logic          vp_o,
  output logic          ce_o,
  output logic [AW-1:0] pldly
);
  logic [8:0]    mem [DEPTH];
  logic [AW-1:0] wptr, act, raddr;
  logic [AW:0]   fill;
  logic [8:0]    rdq;
  logic          bypass_q, fill_ok_q;
  logic [8:0]    inq;

  assign raddr = wptr - act;

  always_ff @(posedge clk) begin
    if (ce) begin
      mem[wptr] <= {vp_i, dp_i};
      rdq       <= mem[raddr];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      act       <= '0;
      pldly     <= '0;
      fill      <= '0;
      dd_o      <= '0;
      vd_o      <= 1'b0;
      inq       <= '0;
      bypass_q  <= 1'b1;
      fill_ok_q <= 1'b0;
      ce_o      <= 1'b0;
    end else begin
      ce_o <= ce;
      if (tk) begin
        act   <= ldly;
        pldly <= act;
      end
      if (ce) begin
        wptr      <= wptr + AW'(1);
        fill      <= (fill == (AW+1)'(DEPTH)) ? fill : fill + (AW+1)'(1);
        dd_o      <= dd_i;
        vd_o      <= vd_i;
        inq       <= {vp_i, dp_i};
        bypass_q  <= (act == '0);
        fill_ok_q <= fill >= (AW+1)'(act);
      end
    end
  end

  assign dp_o = bypass_q ? inq[7:0] : rdq[7:0];
  assign vp_o = bypass_q ? inq[8]   : (rdq[8] & fill_ok_q);
endmodule
