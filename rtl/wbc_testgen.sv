// Wideband test signal generator (one per wideband input).
//
// When the configuration asks for test signals, this generator replaces a
// wideband stream. Data is either pseudo-random or a delta function, the valid
// line is either always high or low for the one sample at the tick, and the
// delay-error line carries a serial frame built from the IO_DERR register.
//
// * Pseudo random: a 16-bit Fibonacci LFSR (x^16+x^14+x^13+x^11+1) is advanced 64
//   steps per clock and the 64 bits shifted out form one data word, the first bit
//   in bit 63. It is loaded from `seed` (IO_SEED, reset value 0x1357) on every
//   tick, so each tick interval carries the same sequence.
// * Delta function: the word of the tick sample is all ones, every other word is
//   all zeros.
// * Delay error frame: 20 bit cells of two clocks each (128 Mbit/s), restarted by
//   the tick: derr_word bits 0..15 (bit 0 first) followed by 0,1,0,1. `dfrm` is
//   high during the first bcell. The frame layout is read from the wideband timing
//   diagram; the polynomial, the delta pattern and the restart on tick are this
//   design's choices.
// All outputs are registered: they change one clock after `tick`.
module wbc_testgen (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,        // internal system tick, one clock wide
  input  logic [15:0] seed,
  input  logic        delta,       // 1 => delta function data
  input  logic        inv_tick,    // 1 => valid low for the tick sample
  input  logic [15:0] derr_word,
  output logic [63:0] data,
  output logic        valid,
  output logic        otick,
  output logic        derr,
  output logic        dfrm
);
  logic [15:0] lfsr;
  logic [15:0] lfsr_nxt;
  logic [63:0] prbs;
  logic [4:0]  bcell;
  logic        half;

  // 64 LFSR steps in one clock; each output bit is the bit shifted out.
  always_comb begin
    logic [15:0] s;
    logic        fb;
    s = tick ? seed : lfsr;
    for (int i = 63; i >= 0; i--) begin
      fb      = s[15] ^ s[13] ^ s[12] ^ s[10];
      prbs[i] = s[15];
      s       = {s[14:0], fb};
    end
    lfsr_nxt = s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr  <= seed;
      data  <= '0;
      valid <= 1'b0;
      otick <= 1'b0;
      derr  <= 1'b0;
      dfrm  <= 1'b0;
      bcell  <= '0;
      half  <= 1'b0;
    end else begin
      lfsr  <= lfsr_nxt;
      data  <= delta ? {64{tick}} : prbs;
      valid <= ~(inv_tick & tick);
      otick <= tick;
      // delay error frame
      if (tick) begin
        bcell <= '0;
        half <= 1'b0;
      end else begin
        half <= ~half;
        if (half) bcell <= (bcell == 5'd19) ? 5'd0 : bcell + 5'd1;
      end
      begin
        logic [4:0] c;
        c    = tick ? 5'd0 : (half ? ((bcell == 5'd19) ? 5'd0 : bcell + 5'd1) : bcell);
        dfrm <= (c == 5'd0);
        derr <= (c < 5'd16) ? derr_word[c[3:0]] : c[0];
      end
    end
  end
endmodule
