// Self-checking testbench for wbc_mac (one correlator lag).
// Random offset-binary sample pairs with random valid bits are fed for several
// tick intervals at each sample width 1..8 bits. A reference model converts
// each sample to 2v-(2^n-1), sums the products and counts the valid pairs; at
// each tick the latched xsum/vsum must equal the reference. The 3-bit mapping
// table of the specification is also checked sample by sample.
module tb_wbc_mac;
  logic clk = 1'b0, rst = 1'b1, tk = 1'b0, en = 1'b0, lv = 1'b0, pv = 1'b0;
  logic [2:0] nbit = '0;
  logic [7:0] ld = '0, pd = '0;
  logic signed [38:0] xsum;
  logic [21:0] vsum;
  int checks = 0, failures = 0;

  wbc_mac dut (.*);

  always #2 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int conv(input int v, input int n);
    return 2 * (v & ((1 << n) - 1)) - ((1 << n) - 1);
  endfunction

  initial begin
    longint ref_x;
    int     ref_v;
    automatic int tbl [8] = '{-7, -5, -3, -1, 1, 3, 5, 7};
    for (int v = 0; v < 8; v++) begin
      checks++;
      if (conv(v, 3) != tbl[v]) failures++;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 8; n++) begin
      nbit <= 3'(n);
      // first tick starts a clean interval
      @(negedge clk); tk = 1'b1; en = 1'b0;
      @(negedge clk); tk = 1'b0;
      ref_x = 0; ref_v = 0;
      for (int c = 0; c < 300; c++) begin
        en = ($urandom_range(0, 3) != 0);
        lv = ($urandom_range(0, 7) != 0);
        pv = ($urandom_range(0, 7) != 0);
        ld = 8'($urandom);
        pd = 8'($urandom);
        // 3-bit: check a few extreme pairs explicitly
        if (c == 0) begin ld = 8'hFF; pd = 8'hFF; en = 1; lv = 1; pv = 1; end
        if (en && lv && pv) begin
          ref_x += conv(int'(ld), n + 1) * conv(int'(pd), n + 1);
          ref_v++;
        end
        @(negedge clk);
      end
      en = 1'b0;
      tk = 1'b1;
      @(negedge clk);
      tk = 1'b0;
      checks += 2;
      if (xsum != 39'(ref_x)) begin
        failures++;
        $display("nbit=%0d xsum %0d expected %0d", n, xsum, ref_x);
      end
      if (vsum != 22'(ref_v)) begin
        failures++;
        $display("nbit=%0d vsum %0d expected %0d", n, vsum, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
