// Two-flop synchroniser for a single control bit entering a clock domain.
//
// Used where a level from the monitor bus clock (independent of the 256 MHz
// system clock, at most 33 MHz) is sampled in the other domain. Latency two
// destination clocks. The reset value is a parameter.
module wbc_sync #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
