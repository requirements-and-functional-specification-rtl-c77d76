// Self-checking testbench for wbc_testport. Each pin is given a random signal
// code (0..20) while the 15 inputs change randomly; one clock later each pin
// must show the selected input, or 0 for code 0 and codes above 15.
module tb_wbc_testport;
  logic clk = 0, rst = 1;
  logic [7:0] sel [4] = '{default: 8'd0};
  logic [15:1] sig = '0;
  logic [3:0] test;
  int checks = 0, failures = 0;

  wbc_testport dut (.*);

  always #2 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] e;
    logic [15:0] s;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (200) begin
      for (int i = 0; i < 4; i++) sel[i] = 8'($urandom_range(0, 20));
      sig = 15'($urandom);
      s = {sig, 1'b0};
      for (int i = 0; i < 4; i++) e[i] = (sel[i] < 16) ? s[sel[i][3:0]] : 1'b0;
      @(negedge clk);
      checks++;
      if (test !== e) begin failures++; $display("test %b expected %b", test, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
