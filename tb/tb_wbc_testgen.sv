// Self-checking testbench for wbc_testgen (wideband test signal generator).
// An independent bit-serial LFSR model (x^16+x^14+x^13+x^11+1, loaded from the
// seed on the tick, 64 bits per word, first bit in bit 63) predicts every data
// word; then the delta-function mode (all ones on the tick word only), the
// valid line with and without the tick gap, and the delay-error frame (16
// register bits, bit 0 first, then 0,1,0,1, two clocks per bit, frame marker on
// the first bit) are checked clock by clock.
module tb_wbc_testgen;
  logic clk = 0, rst = 1, tick = 0, delta = 0, inv_tick = 0;
  logic [15:0] seed = 16'h1357, derr_word = 16'hA3C5;
  logic [63:0] data;
  logic valid, otick, derr, dfrm;
  int checks = 0, failures = 0;

  wbc_testgen dut (.*);

  always #2 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] m;
  function automatic logic [63:0] next_word();
    logic [63:0] w;
    for (int i = 63; i >= 0; i--) begin
      w[i] = m[15];
      m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]};
    end
    return w;
  endfunction

  initial begin
    logic [63:0] e;
    int cyc;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      seed = (pass != 0) ? 16'hBEEF : 16'h1357;
      inv_tick = pass[0];
      tick = 1; m = seed;
      cyc = 0;
      repeat (60) begin
        e = next_word();
        @(negedge clk);
        checks += 4;
        if (data !== e) begin failures++; if (failures < 5) $display("prbs %h exp %h", data, e); end
        if (otick !== (cyc == 0)) failures++;
        if (valid !== !(inv_tick && cyc == 0)) failures++;
        // delay error frame: cell = cyc/2 mod 20
        begin
          int c;
          logic eb;
          c = (cyc / 2) % 20;
          eb = (c < 16) ? derr_word[c] : c[0];
          if (derr !== eb || dfrm !== (c == 0)) begin
            failures++; if (failures < 5) $display("derr cyc %0d got %b/%b exp %b/%b", cyc, derr, dfrm, eb, c == 0);
          end
        end
        tick = 0;
        cyc++;
      end
    end
    delta = 1;
    tick = 1; @(negedge clk); tick = 0;
    checks++; if (data !== '1) failures++;
    repeat (5) begin @(negedge clk); checks++; if (data !== '0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
