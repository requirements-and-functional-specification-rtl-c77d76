// Self-checking testbench for wbc_delay (prompt delay line).
// Uses a 64-entry buffer to keep the run short. Words with random lagged data
// and a counting prompt sample are streamed with irregular strobes; the delay
// register is changed several times (0, 5, 63, 17) and takes effect only at the
// next tick. After each strobe the lagged side must be the word just sent (one
// strobe of latency) and the prompt side the sample sent `D` strobes earlier,
// its valid low while fewer than D samples have been written since reset.
// DL_PLDLY must report the delay active before the latest tick.
module tb_wbc_delay;
  localparam int DEPTH = 64;
  logic clk = 1'b0, rst = 1'b1, tk = 1'b0, ce = 1'b0;
  logic [63:0] dd_i = '0, dd_o;
  logic vd_i = 1'b0, vp_i = 1'b0, vd_o, vp_o, ce_o;
  logic [7:0] dp_i = '0, dp_o;
  logic [5:0] ldly = '0, pldly;
  int checks = 0, failures = 0;

  wbc_delay #(.DEPTH(DEPTH)) dut (.*);

  always #2 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] P [$];
  bit         V [$];

  initial begin
    automatic int d_act, d_prev, dl [4] = '{0, 5, 63, 17};
    int nce;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    d_act = 0; d_prev = 0; nce = 0;
    for (int seg = 0; seg < 4; seg++) begin
      ldly = 6'(dl[seg]);
      // strobes before the tick still use the old delay
      for (int k = 0; k < 3; k++) begin
        dd_i = {$urandom, $urandom}; dp_i = 8'(P.size()); vd_i = 1'($urandom); vp_i = ($urandom_range(0,5) != 0);
        P.push_back(dp_i); V.push_back(vp_i);
        ce = 1'b1; @(negedge clk); ce = 1'b0;
        checks += 3;
        if (!ce_o || dd_o != dd_i || vd_o != vd_i) failures++;
        if (d_act == 0) begin
          if (dp_o != dp_i || vp_o != vp_i) failures++;
        end else if (P.size() - 1 - d_act >= 0) begin
          if (dp_o != P[P.size()-1-d_act] || vp_o != V[P.size()-1-d_act]) failures++;
        end else if (vp_o) failures++;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      tk = 1'b1; @(negedge clk); tk = 1'b0;
      d_prev = d_act; d_act = dl[seg];
      checks++;
      if (pldly != 6'(d_prev)) begin failures++; $display("pldly %0d expected %0d", pldly, d_prev); end
      for (int k = 0; k < 150; k++) begin
        dd_i = {$urandom, $urandom}; dp_i = 8'(P.size()); vd_i = 1'($urandom); vp_i = ($urandom_range(0,5) != 0);
        P.push_back(dp_i); V.push_back(vp_i);
        ce = 1'b1; @(negedge clk); ce = 1'b0;
        checks += 2;
        if (!ce_o || dd_o != dd_i || vd_o != vd_i) failures++;
        if (d_act == 0) begin
          if (dp_o != dp_i || vp_o != vp_i) failures++;
        end else if (P.size() - 1 - d_act >= 0) begin
          if (dp_o != P[P.size()-1-d_act] || vp_o != V[P.size()-1-d_act]) begin
            failures++;
            if (failures < 6) $display("D=%0d k=%0d dp %0d expected %0d", d_act, k, dp_o, P[P.size()-1-d_act]);
          end
        end else if (vp_o) failures++;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
