// Self-checking testbench for wbc_tint (time interval counter).
// Data and system ticks are generated with known spacings; for each of the four
// interval modes, with and without the system tick delay, the latched count
// must equal the clock distance between the chosen start and stop events.
// Directed cases come first, then random periods, offsets and delays, whose
// expected count is worked out from the tick positions modulo the period.
module tb_wbc_tint;
  logic clk = 0, rst = 1, dtick = 0, stk = 0;
  logic [15:0] sdly = 0;
  logic [1:0] mode = 0;
  logic [21:0] count;
  int checks = 0, failures = 0;

  wbc_tint dut (.*);

  always #2 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ticks: period P, data tick OFF clocks after the system tick
  task automatic run(input logic [1:0] md, input int per, input int off, input int dly, input int expv);
    mode = md; sdly = 16'(dly);
    rst = 1; @(negedge clk); rst = 0;
    for (int t = 0; t < 4 * per; t++) begin
      stk   = (t % per) == 0;
      dtick = (t % per) == off;
      @(negedge clk);
    end
    stk = 0; dtick = 0;
    checks++;
    if (count != 22'(expv)) begin
      failures++; $display("mode %0d per %0d off %0d dly %0d: %0d expected %0d", md, per, off, dly, count, expv);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run(2'b01, 100, 30, 0, 100);       // data tick period
    run(2'b10, 120, 30, 0, 120);       // system tick period
    run(2'b11, 100, 30, 0, 30);        // system tick -> data tick
    run(2'b00, 100, 30, 0, 70);        // data tick -> next system tick
    run(2'b11, 100, 30, 10, 20);       // delayed system tick -> data tick
    run(2'b00, 100, 30, 10, 80);       // data tick -> delayed system tick
    run(2'b00, 100, 30, 30, 0);        // coincident after delay: zero
    run(2'b11, 100, 40, 40, 0);        // delay nulls the offset
    for (int i = 0; i < 40; i++) begin
      int per, off, dly, md, e;
      per = $urandom_range(20, 200);
      off = $urandom_range(0, per - 1);
      dly = $urandom_range(0, per - 1);
      md  = i % 4;
      case (md)
        1, 2:    e = per;
        3:       e = (off - dly + per) % per;   // delayed system tick -> data tick
        default: e = (dly - off + per) % per;   // data tick -> delayed system tick
      endcase
      run(2'(md), per, off, dly, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
