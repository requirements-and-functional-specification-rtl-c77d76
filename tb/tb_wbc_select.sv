// Self-checking testbench for wbc_select (input choice, decimation, band collect).
// For several data organisations (4-bit with 1, 2 and 16 bands, 8-bit with 1, 4
// and 8 bands, with and without input decimation, either input on either side)
// random words with random valid bits are fed to A and B, with a data tick on
// the first word. A reference model keeps one word in 2^idec, takes the chosen
// band's samples from each kept word (slot s holds band N-1-(s mod N)) and packs
// N kept words into one lagged word; the prompt sample is the first sample of
// the prompt band in the group's first kept word. Every word strobe is compared,
// the strobe spacing must be 2^odec clocks, and illegal settings must raise
// their status flags.
module tb_wbc_select;
  logic clk = 1'b0, rst = 1'b1;
  logic [63:0] da = '0, db = '0, dd;
  logic [1:0] va = '0, vb = '0;
  logic lagged_b = 0, prompt_b = 0, mode8 = 0;
  logic [3:0] idec = 0, nbnd = 0, dbnd = 0, pbnd = 0, odec = 0;
  logic vd, vp, ce, ill_nbnd, ill_dbnd, ill_pbnd, ill_comb;
  logic [7:0] dp;
  int checks = 0, failures = 0;

  wbc_select dut (.*);

  always #2 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [63:0] d; logic v; logic [7:0] p; logic pv; } exp_t;
  exp_t q [$];

  task automatic run(input bit m8, input int nb, input int db_, input int pb_,
                     input int id, input bit lb, input bit pbs, input int nwords);
    int kept, spw, last_ce, ncmp;
    logic [63:0] col;
    logic v_and;
    logic [7:0] p0;
    logic pv0;
    int l2;
    l2 = $clog2(nb);
    mode8 = m8; nbnd = 4'(nb - 1); dbnd = 4'(db_); pbnd = 4'(pb_);
    idec = 4'(id); odec = 4'(id + l2); lagged_b = lb; prompt_b = pbs;
    q.delete();
    rst = 1; @(negedge clk); rst = 0;
    checks += 4;
    if (ill_nbnd || ill_dbnd || ill_pbnd || ill_comb) begin
      failures++; $display("legal setting flagged");
    end
    spw = (m8 ? 8 : 16) / nb;
    kept = 0; last_ce = -1; ncmp = 0;
    col = '0; v_and = 1; p0 = 0; pv0 = 0;
    for (int t = 0; t < nwords; t++) begin
      logic [63:0] lw, pw;
      logic lv, pv;
      da = {$urandom, $urandom}; db = {$urandom, $urandom};
      va = {t == 0 && !lb, 1'($urandom_range(0, 7) != 0)};
      vb = {t == 0 &&  lb, 1'($urandom_range(0, 7) != 0)};
      lw = lb ? db : da;  lv = lb ? vb[0] : va[0];
      pw = pbs ? db : da; pv = pbs ? vb[0] : va[0];
      if (t % (1 << id) == 0) begin
        if (kept % nb == 0) begin
          v_and = 1;
          p0  = m8 ? pw[63 - 8*(nb-1-pb_) -: 8] : {4'd0, pw[63 - 4*(nb-1-pb_) -: 4]};
          pv0 = pv;
        end
        for (int j = 0; j < spw; j++) begin
          int s;
          s = j * nb + (nb - 1 - db_);
          if (m8) col = {col[55:0], lw[63 - 8*s -: 8]};
          else    col = {col[59:0], lw[63 - 4*s -: 4]};
        end
        v_and &= lv;
        kept++;
        if (kept % nb == 0) q.push_back('{col, v_and, p0, pv0});
      end
      @(negedge clk);
      if (ce) begin
        exp_t e;
        checks += 4;
        if (q.size() == 0) begin failures++; $display("unexpected strobe"); end
        else begin
          e = q.pop_front();
          ncmp++;
          if (dd !== e.d || vd !== e.v || dp !== e.p || vp !== e.pv) begin
            failures++;
            if (failures < 8) $display("m8=%0d nb=%0d t=%0d dd %h exp %h dp %h exp %h v %b%b exp %b%b",
                                       m8, nb, t, dd, e.d, dp, e.p, vd, vp, e.v, e.pv);
          end
          if (last_ce >= 0 && t - last_ce != (1 << (id + l2))) begin
            failures++; $display("strobe spacing %0d", t - last_ce);
          end
          last_ce = t;
        end
      end
    end
    checks++;
    if (ncmp < 4) begin failures++; $display("too few output words %0d", ncmp); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run(0, 1, 0, 0, 0, 0, 0, 60);     // 4_16
    run(0, 2, 1, 0, 1, 1, 0, 80);     // 4_8, decimate by 2, lagged B
    run(0, 16, 5, 9, 0, 0, 1, 200);   // 4_1
    run(1, 1, 0, 0, 0, 1, 1, 60);     // 8_8
    run(1, 4, 2, 3, 0, 0, 0, 120);    // 8_4
    run(1, 8, 7, 0, 1, 0, 1, 300);    // 8_1, decimate by 2
    // illegal settings
    nbnd = 4'd2; #1; checks++; if (!ill_nbnd) failures++;
    nbnd = 4'd1; dbnd = 4'd3; pbnd = 4'd0; #1; checks += 2; if (!ill_dbnd || ill_pbnd) failures++;
    pbnd = 4'd2; #1; checks++; if (!ill_pbnd) failures++;
    idec = 4'd1; odec = 4'd1; #1; checks++; if (!ill_comb) failures++;
    mode8 = 1; nbnd = 4'd15; #1; checks++; if (!ill_nbnd) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
