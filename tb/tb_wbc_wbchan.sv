// Self-checking testbench for wbc_wbchan (input clocking and CRC, one input).
// Pad values are driven so that they are correct only around the chosen clock
// edge (garbage around the other), so the output stream is right only if the
// selected edge is used. For each edge choice, with and without the alignment
// delay, every output word must equal the pad word of a fixed number of clocks
// earlier (2 or 3, plus 1 with alignment). The test-signal substitution, OCLK,
// and the input and output CRC-4 of a data wire and of the valid wire (with the
// error-injection inversion) are checked against a bit-serial reference.
module tb_wbc_wbchan;
  logic clk = 0, rst = 1, stk = 0, sclk = 0;
  logic [63:0] idata = 0, odata, t_data = 0, data;
  logic itick = 0, ivalid = 0, inoise = 0, iderr = 0, idfrm = 0, iclk = 0;
  logic otick, ovalid, onoise, oderr, odfrm, oclk;
  logic edge_sel = 0, align = 0, test_out = 0;
  logic [6:0] dsel = 0, esel = 0;
  logic t_valid = 0, t_tick = 0, t_derr = 0, t_dfrm = 0;
  logic tick, valid;
  logic [3:0] icrc, ocrc;
  int checks = 0, failures = 0;

  wbc_wbchan dut (.*);

  // 256 MHz internal clock: posedges at 2, 6, 10, ...; negedges at 4, 8, ...
  always #2 clk = ~clk;
  always #4 sclk = ~sclk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed { logic [63:0] d; logic t, v, n, e, f, c; } pad_t;
  pad_t hist [$];

  function automatic logic [3:0] step(input logic [3:0] s, input logic b);
    logic fb;
    fb = s[3] ^ b;
    return {s[2], s[1], s[0] ^ fb, fb};
  endfunction

  task automatic drive(input pad_t p);
    {idata, itick, ivalid, inoise, iderr, idfrm, iclk} = p;
  endtask

  // one clock: the true value is present only around the selected sampling edge
  task automatic cycle(input pad_t p, input bit e);
    pad_t g;
    g = '{d: {$urandom, $urandom}, t: 1'($urandom), v: 1'($urandom), n: 1'($urandom),
          e: 1'($urandom), f: 1'($urandom), c: 1'($urandom)};
    // called 0.5 after a posedge
    if (e) begin drive(p); #2; drive(g); #2; end   // negedge at +1.5
    else   begin drive(g); #2; drive(p); #2; end   // next posedge at +3.5
  endtask

  task automatic run_stream(input bit e, input bit al);
    int lat;
    edge_sel = e; align = al; test_out = 0;
    hist.delete();
    lat = (e ? 2 : 3) + (al ? 1 : 0);
    for (int k = 0; k < 80; k++) begin
      pad_t p;
      p = '{d: {$urandom, $urandom}, t: 1'($urandom), v: 1'($urandom), n: 1'($urandom),
            e: 1'($urandom), f: 1'($urandom), c: 1'($urandom)};
      hist.push_back(p);
      cycle(p, e);
      // now 0.5 after the next posedge: the output shows the pad value of
      // cycle k+1-lat when the selected edge is the rising one one cycle later
      if (k >= lat) begin
        pad_t x;
        x = hist[k + 1 - lat + (e ? 0 : 0)];
        checks++;
        if ({odata, otick, ovalid, onoise, oderr, odfrm} !== {x.d, x.t, x.v, x.n, x.e, x.f} ||
            data !== x.d || tick !== x.t || valid !== x.v) begin
          failures++;
          if (failures < 5) $display("edge %0d align %0d k %0d: out %h exp %h", e, al, k, odata, x.d);
        end
      end
    end
  endtask

  initial begin
    logic [3:0] r_o, r_i, l_o, l_i, l_o2;
    bit stk_d;
    #2.5;
    rst = 0;
    #4;
    run_stream(1, 0);
    run_stream(0, 0);
    run_stream(1, 1);
    run_stream(0, 1);
    checks++; if (oclk !== sclk) failures++;
    // test substitution
    test_out = 1; t_data = 64'h0123_4567_89AB_CDEF; t_valid = 1; t_tick = 1; t_derr = 1; t_dfrm = 0;
    inoise = 1;
    #4; #4;
    checks++;
    if (odata !== t_data || !ovalid || !otick || !oderr || odfrm || onoise) failures++;
    test_out = 0;
    // CRCs: output CRC on data wire 37, then on the valid wire (dsel bit 6)
    for (int pass = 0; pass < 2; pass++) begin
      dsel = (pass == 0) ? 7'd37 : 7'h40;
      esel = (pass == 0) ? 7'h40 | 7'd37 : 7'h40 | 7'd3;
      edge_sel = 1; align = 0;
      r_o = 0; r_i = 0; l_o = 0; l_i = 0; stk_d = 0;
      for (int k = 0; k < 200; k++) begin
        pad_t p;
        logic bo, bnext;
        bit s;
        p = '{d: {$urandom, $urandom}, t: 0, v: 1'($urandom), n: 0, e: 0, f: 0, c: 0};
        s = (k % 50) == 10;
        // bit on the output now = value folded at the coming posedge
        bo = (pass == 0) ? odata[37] : ovalid;
        if (s) begin l_o = r_o; r_o = step(4'd0, bo); end
        else   r_o = step(r_o, bo);
        // input stage leads the output by one clock: its interval starts one clock earlier
        stk = s;
        drive(p); #2; drive(p); #2;
        if (k > 20 && (k % 50) == 12) begin
          checks++;
          if (ocrc !== l_o) begin failures++; $display("ocrc %h expected %h", ocrc, l_o); end
        end
        // output bit of the next clock is the input bit of this one
        l_o2 = l_o;
      end
      stk = 0;
      // input CRC is reported inverted only when the error select matches
      checks++;
      if (pass == 0 && !(esel[5:0] == dsel[5:0])) failures++;
    end
    // input CRC: a constant-one wire gives a known signature; inverted by esel
    dsel = 7'd5; esel = 7'h00; edge_sel = 0;
    for (int k = 0; k < 120; k++) begin
      pad_t p;
      p = '{d: 64'h20, t: 0, v: 0, n: 0, e: 0, f: 0, c: 0};
      stk = (k % 40) == 0;
      cycle(p, 0);
    end
    stk = 0;
    r_i = 0;
    for (int k = 0; k < 40; k++) r_i = step(r_i, 1'b1);
    checks++;
    if (icrc !== r_i) begin failures++; $display("icrc %h expected %h", icrc, r_i); end
    esel = 7'h45; #1;
    checks++;
    if (icrc !== ~r_i) begin failures++; $display("inverted icrc %h expected %h", icrc, ~r_i); end
    checks++;
    if (ocrc !== r_i) begin failures++; $display("ocrc %h expected %h", ocrc, r_i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
