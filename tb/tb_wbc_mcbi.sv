// Self-checking testbench for wbc_mcbi (monitor and control bus, registers).
// Bus cycles follow the write (one edge) and read (address edge, then data
// taken at the next edge) timing. Checked: reset values (IO_SEED 0x1357), write
// and read-back of every writable register with its width, read-only monitor
// values and their sign/zero extension, CM_DID, refused writes setting CM_ERR
// bits 0/1 and CM_DEF, a read of a missing register returning CM_DEF and
// setting bit 2, status events latched on the tick and inverted by writes, the
// read-address advance strobes, and the data-bus drive enable.
module tb_wbc_mcbi;
  import wbc_pkg::*;
  logic mcb_clk = 0, reset_n = 0, mcb_cs_n = 1, mcb_rd = 1;
  logic [7:0] mcb_addr = 0;
  logic [15:0] mcb_din = 0, mcb_dout;
  logic mcb_doe, mcb_rst;
  logic clk = 0, rst = 1, tk = 0;
  logic [15:0] sts_ev = 0;
  cfg_t cfg;
  logic [15:0] ctl;
  logic [7:0] tst [4];
  logic [6:0] esel_a, esel_b, dsel_a, dsel_b;
  logic [1:0] tmode_a, tmode_b;
  logic [15:0] seed_a, seed_b, sdly, derr_a, derr_b;
  logic [3:0] idec, nbnd, dbnd, pbnd, odec;
  logic [13:0] ldly;
  logic [2:0] nbit;
  logic [3:0] icrc_a = 4'h3, icrc_b = 4'h5, ocrc_a = 4'h9, ocrc_b = 4'hC;
  logic [21:0] tint_a = 22'h2A_1234, tint_b = 22'h15_4321;
  logic [13:0] pldly = 14'h1ABC;
  logic [38:0] pacc = -39'sd123456789;
  logic [21:0] vcnt = 22'h3F_0F0F;
  logic inc_acc, inc_vcnt;
  int checks = 0, failures = 0, n_inc_acc = 0, n_inc_vcnt = 0;

  wbc_mcbi dut (.*);

  always #15 mcb_clk = ~mcb_clk;
  always #2 clk = ~clk;
  always @(posedge mcb_clk) begin
    if (inc_acc) n_inc_acc++;
    if (inc_vcnt) n_inc_vcnt++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge mcb_clk); mcb_cs_n = 0; mcb_rd = 0; mcb_addr = a; mcb_din = d;
    @(negedge mcb_clk); mcb_cs_n = 1; mcb_rd = 1;
  endtask

  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge mcb_clk); mcb_cs_n = 0; mcb_rd = 1; mcb_addr = a;
    @(negedge mcb_clk);                 // after edge A
    checks++;
    if (!mcb_doe) begin failures++; $display("no drive enable"); end
    d = mcb_dout;
    @(negedge mcb_clk); mcb_cs_n = 1;   // edge B took the data
    #1;
    checks++;
    if (mcb_doe) begin failures++; $display("drive enable after CS high"); end
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [15:0] e);
    logic [15:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin failures++; $display("addr %h read %h expected %h", a, d, e); end
  endtask

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge mcb_clk);
    reset_n = 1; rst = 0;
    repeat (3) @(negedge mcb_clk);
    expect_rd(A_IO_SEED_A, 16'h1357);
    expect_rd(A_IO_SEED_B, 16'h1357);
    expect_rd(A_CM_CFG, 16'h0000);
    expect_rd(A_CM_DID, 16'hC518);
    // writable registers
    wr(A_CM_CFG, 16'h02A5);   expect_rd(A_CM_CFG, 16'h02A5);
    checks++; if (cfg.lagged_b !== 1'b1 || cfg.prompt_b !== 1'b0 || cfg.align_b !== 1'b1) failures++;
    wr(A_CM_CTL, 16'h8004);   expect_rd(A_CM_CTL, 16'h8004);
    wr(8'h06, 16'hFF11);      expect_rd(8'h06, 16'h0011);
    wr(8'h09, 16'h0044);      expect_rd(8'h09, 16'h0044);
    checks++; if (tst[0] != 8'h11 || tst[3] != 8'h44) failures++;
    wr(A_IO_ESEL_A, 16'hFFFF); expect_rd(A_IO_ESEL_A, 16'h007F);
    wr(A_IO_DSEL_B, 16'h0045); expect_rd(A_IO_DSEL_B, 16'h0045);
    wr(A_IO_SEED_A, 16'hBEEF); expect_rd(A_IO_SEED_A, 16'hBEEF);
    wr(A_IO_SDLY, 16'h0123);   expect_rd(A_IO_SDLY, 16'h0123);
    wr(A_IO_DERR_B, 16'h5A5A); expect_rd(A_IO_DERR_B, 16'h5A5A);
    wr(A_IO_TINT1_A, 16'hC03F); expect_rd(A_IO_TINT1_A, 16'hC02A);
    checks++; if (tmode_a != 2'b11) failures++;
    wr(A_SL_IDEC, 16'h0013);   expect_rd(A_SL_IDEC, 16'h0003);
    wr(A_SL_ODEC, 16'h0007);   expect_rd(A_SL_ODEC, 16'h0007);
    wr(A_DL_LDLY, 16'hFFFF);   expect_rd(A_DL_LDLY, 16'h3FFF);
    wr(A_XC_NBIT, 16'h0002);   expect_rd(A_XC_NBIT, 16'h0002);
    checks++; if (ldly != 14'h3FFF || nbit != 3'd2 || idec != 4'd3 || odec != 4'd7) failures++;
    // monitor values
    expect_rd(A_IO_ICRC_A, 16'h0003);
    expect_rd(A_IO_OCRC_B, 16'h000C);
    expect_rd(A_IO_TINT0_B, 16'h4321);
    expect_rd(A_IO_TINT1_B, 16'h0015);
    expect_rd(A_DL_PLDLY, 16'h1ABC);
    expect_rd(A_XC_VCNT1, 16'h003F);
    expect_rd(A_XC_PACC2, 16'hFFFF);
    expect_rd(A_XC_PACC1, 16'(pacc[31:16]));
    expect_rd(A_XC_PACC0, 16'(pacc[15:0]));
    expect_rd(A_XC_VCNT0, 16'h0F0F);
    checks += 2;
    if (n_inc_acc != 1) begin failures++; $display("inc_acc count %0d", n_inc_acc); end
    if (n_inc_vcnt != 1) begin failures++; $display("inc_vcnt count %0d", n_inc_vcnt); end
    // errors and default register
    expect_rd(A_CM_ERR, 16'h0000);
    wr(A_XC_PACC0, 16'h1111);
    expect_rd(A_CM_ERR, 16'h0001);
    expect_rd(A_CM_DEF, 16'h1111);
    wr(8'h77, 16'h2222);
    expect_rd(A_CM_ERR, 16'h0003);
    expect_rd(8'h78, 16'h2222);
    expect_rd(A_CM_ERR, 16'h0007);
    wr(A_CM_ERR, 16'h0000);
    expect_rd(A_CM_ERR, 16'h0000);
    // status: events latched on the tick
    @(negedge clk); sts_ev = 16'h0014; @(negedge clk); sts_ev = 16'h0000;
    repeat (3) @(negedge clk);
    @(negedge clk); sts_ev = 16'h0800; tk = 1; @(negedge clk); tk = 0; sts_ev = 0;
    repeat (4) @(negedge mcb_clk);
    expect_rd(A_CM_STS, 16'h0814);
    wr(A_CM_STS, 16'h0011);
    expect_rd(A_CM_STS, 16'h0805);
    // next tick: no events, mask cleared
    @(negedge clk); tk = 1; @(negedge clk); tk = 0;
    repeat (4) @(negedge mcb_clk);
    expect_rd(A_CM_STS, 16'h0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
