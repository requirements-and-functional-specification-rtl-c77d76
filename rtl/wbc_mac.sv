// One correlator lag: multiplier/accumulator plus valid counter.
//
// Both inputs are offset-binary samples of NBIT = nbit+1 bits (0 is the most
// negative level, 2^NBIT-1 the most positive), right-aligned in 8 bits; higher
// bits are ignored. Each is mapped to the symmetric odd two's-complement value
// 2v - (2^NBIT - 1), e.g. for 3 bits 7 -> +7, 4 -> +1, 3 -> -1, 0 -> -7. On each
// clock with `en` and both valid bits set, the product is added to a 39-bit
// accumulator and the 22-bit valid counter is incremented. On the tick `tk` both
// totals are copied to `xsum`/`vsum` (held for the next interval) and the
// accumulation restarts with the sample of that clock. 39 and 22 bits cover a
// 10 ms tick of 256 Msample/s products of 8-bit samples (2.56e6 * 255^2 < 2^38).
// The conversion, widths and tick latching follow the specification (there the
// two halves map onto two DSP48 slices); the single-clock accumulate is this
// design's.
module wbc_mac #(
  parameter int unsigned XW = 39,
  parameter int unsigned VW = 22
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 tk,
  input  logic                 en,
  input  logic [2:0]           nbit,     // bits per sample - 1
  input  logic [7:0]           ld,       // lagged sample
  input  logic [7:0]           pd,       // prompt sample
  input  logic                 lv,
  input  logic                 pv,
  output logic signed [XW-1:0] xsum,
  output logic        [VW-1:0] vsum
);
  logic signed [9:0]    lc, pc;
  logic signed [19:0]   prod;
  logic signed [XW-1:0] acc, add;
  logic        [VW-1:0] vacc;
  logic                 hit;

  function automatic logic signed [9:0] conv(input logic [7:0] x, input logic [2:0] nb);
    logic [8:0] mask;
    mask = 9'((10'd2 << nb) - 10'd1);     // 2^NBIT - 1
    return $signed({1'b0, (x & mask[7:0]), 1'b0}) - $signed({1'b0, mask});
  endfunction

  assign lc   = conv(ld, nbit);
  assign pc   = conv(pd, nbit);
  assign prod = lc * pc;
  assign hit  = en & lv & pv;
  assign add  = hit ? XW'(prod) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc  <= '0;
      vacc <= '0;
      xsum <= '0;
      vsum <= '0;
    end else if (tk) begin
      xsum <= acc;
      vsum <= vacc;
      acc  <= add;
      vacc <= VW'(hit);
    end else begin
      acc  <= acc + add;
      vacc <= vacc + VW'(hit);
    end
  end
endmodule
