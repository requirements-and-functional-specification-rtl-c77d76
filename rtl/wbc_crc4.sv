// Serial CRC-4 over one bit per enabled clock, restarted by a tick.
//
// Used by the wideband input/output channels to give the monitor processor a
// signature of one chosen wire per tick interval. The CRC is shifted with the
// polynomial x^4 + x + 1 (the specification names a 4-bit CRC but no polynomial:
// this polynomial is this design's choice). On `tick` the current signature is
// copied to `crc` (stable for the next interval) and the shift register restarts
// from zero with the bit present in that cycle.
module wbc_crc4 (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,     // one-cycle interval marker
  input  logic       din,      // serial bit, one per clock
  output logic [3:0] crc       // signature of the previous interval
);
  logic [3:0] sr;

  function automatic logic [3:0] step(input logic [3:0] s, input logic b);
    logic fb;
    fb = s[3] ^ b;
    return {s[2], s[1], s[0] ^ fb, fb};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sr  <= '0;
      crc <= '0;
    end else if (tick) begin
      crc <= sr;
      sr  <= step(4'd0, din);
    end else begin
      sr  <= step(sr, din);
    end
  end
endmodule
