// MCBI: monitor and control bus interface and register set.
//
// Bus (MCB_CLK domain, independent of the 256 MHz clock, up to 33 MHz):
// * Write: with CS* and RD/WR* low at a rising MCB_CLK edge, MCB_DATA is written
//   to the register at MCB_ADDR in that edge (one cycle).
// * Read: with CS* low and RD/WR* high at a rising edge (A), the address is
//   registered; from then on, while CS* stays low, the addressed register is
//   driven on MCB_DATA through combinational logic only (no output register), so
//   the processor can take it at the next edge (B). An edge at which CS* is low,
//   RD/WR* high and the address still equals the registered one completes a read;
//   completed reads of XC_VCNT0 and XC_PACC0 advance the XCOR read addresses.
//   `mcb_doe` tells the pad buffer to drive.
// * Unused upper bits read as zero; XC_PACC2 is sign extended.
// Registers (addresses in wbc_pkg): configuration, control and test-port
// selects, the INOUT, SELECT, DELAY and XCOR settings, and the monitor values
// from those blocks, which change only on the tick and are read as they are.
// * CM_STS: status events of the 256 MHz domain are ORed into a working
//   register; on each tick it is saved and cleared. Reads return the saved bits
//   XOR an inversion mask; writes XOR into that mask (to fake errors), which is
//   cleared when the next saved status arrives.
// * CM_ERR: bit 0 write to a read-only register, bit 1 write to a non-existent
//   one, bit 2 read of a non-existent one. Writing sets it to the written value.
// * CM_DEF: takes the data of each refused write; returned by reads of
//   non-existent registers; may also be written directly.
// * CM_DID: {design, revision, version} from parameters.
// The register map, bit meanings and bus cycles follow the specification; the
// completion rule for reads, the status hand-over between the clocks and the
// design identifier value are this design's.
module wbc_mcbi
  import wbc_pkg::*;
#(
  parameter logic [7:0] DID_DESIGN   = 8'hC5,
  parameter logic [3:0] DID_REVISION = 4'd1,
  parameter logic [3:0] DID_VERSION  = 4'd8
) (
  // bus
  input  logic        mcb_clk,
  input  logic        reset_n,
  input  logic        mcb_cs_n,
  input  logic        mcb_rd,       // 1 read, 0 write
  input  logic [7:0]  mcb_addr,
  input  logic [15:0] mcb_din,
  output logic [15:0] mcb_dout,
  output logic        mcb_doe,
  output logic        mcb_rst,
  // 256 MHz side of the status register
  input  logic        clk,
  input  logic        rst,
  input  logic        tk,
  input  logic [15:0] sts_ev,       // status events / levels, 1 = error
  // configuration and control
  output cfg_t        cfg,
  output logic [15:0] ctl,
  output logic [7:0]  tst [4],
  output logic [6:0]  esel_a, esel_b, dsel_a, dsel_b,
  output logic [1:0]  tmode_a, tmode_b,
  output logic [15:0] seed_a, seed_b, sdly, derr_a, derr_b,
  output logic [3:0]  idec, nbnd, dbnd, pbnd, odec,
  output logic [13:0] ldly,
  output logic [2:0]  nbit,
  // monitor values
  input  logic [3:0]  icrc_a, icrc_b, ocrc_a, ocrc_b,
  input  logic [21:0] tint_a, tint_b,
  input  logic [13:0] pldly,
  input  logic [38:0] pacc,
  input  logic [21:0] vcnt,
  output logic        inc_acc,
  output logic        inc_vcnt
);
  // ------------------------------------------------------------ reset in bus domain
  logic rm, rs;
  always_ff @(posedge mcb_clk) begin
    rm <= ~reset_n;
    rs <= rm;
  end
  assign mcb_rst = rs;

  // ------------------------------------------------------------ status (256 MHz side)
  logic [15:0] sts_work, sts_saved;
  logic        sts_tog;
  always_ff @(posedge clk) begin
    if (rst) begin
      sts_work  <= '0;
      sts_saved <= '0;
      sts_tog   <= 1'b0;
    end else if (tk) begin
      sts_saved <= sts_work | sts_ev;
      sts_work  <= '0;
      sts_tog   <= ~sts_tog;
    end else begin
      sts_work  <= sts_work | sts_ev;
    end
  end

  logic sts_tog_s, sts_tog_q;
  wbc_sync u_stog (.clk(mcb_clk), .rst(rs), .d(sts_tog), .q(sts_tog_s));

  // ------------------------------------------------------------ bus decode
  logic [7:0]  raddr;
  logic        ract;
  logic        wr, rd_done;
  logic [15:0] sts_inv;
  logic [2:0]  err;
  logic [15:0] def;
  logic [15:0] rdata;
  logic        r_exists;
  logic        w_exists, w_ro;

  assign wr      = !mcb_cs_n && !mcb_rd;
  assign rd_done = !mcb_cs_n && mcb_rd && ract && (mcb_addr == raddr);

  // read multiplexer on the registered address
  always_comb begin
    r_exists = 1'b1;
    rdata    = '0;
    unique case (raddr)
      A_CM_STS:     rdata = {4'd0, sts_saved[11:2], 2'b00} ^ sts_inv;
      A_CM_CFG:     rdata = cfg;
      A_CM_CTL:     rdata = ctl;
      A_CM_ERR:     rdata = {13'd0, err};
      A_CM_DEF:     rdata = def;
      A_CM_DID:     rdata = {DID_DESIGN, DID_REVISION, DID_VERSION};
      A_CM_TST0, A_CM_TST1, A_CM_TST2, A_CM_TST3:
                    rdata = {8'd0, tst[raddr[1:0] - 2'd2]};
      A_IO_ESEL_A:  rdata = {9'd0, esel_a};
      A_IO_ESEL_B:  rdata = {9'd0, esel_b};
      A_IO_DSEL_A:  rdata = {9'd0, dsel_a};
      A_IO_ICRC_A:  rdata = {12'd0, icrc_a};
      A_IO_DSEL_B:  rdata = {9'd0, dsel_b};
      A_IO_ICRC_B:  rdata = {12'd0, icrc_b};
      A_IO_TINT1_A: rdata = {tmode_a, 8'd0, tint_a[21:16]};
      A_IO_TINT0_A: rdata = tint_a[15:0];
      A_IO_TINT1_B: rdata = {tmode_b, 8'd0, tint_b[21:16]};
      A_IO_TINT0_B: rdata = tint_b[15:0];
      A_IO_SEED_A:  rdata = seed_a;
      A_IO_SEED_B:  rdata = seed_b;
      A_IO_SDLY:    rdata = sdly;
      A_IO_OCRC_A:  rdata = {12'd0, ocrc_a};
      A_IO_OCRC_B:  rdata = {12'd0, ocrc_b};
      A_IO_DERR_A:  rdata = derr_a;
      A_IO_DERR_B:  rdata = derr_b;
      A_SL_IDEC:    rdata = {12'd0, idec};
      A_SL_NBND:    rdata = {12'd0, nbnd};
      A_SL_DBND:    rdata = {12'd0, dbnd};
      A_SL_PBND:    rdata = {12'd0, pbnd};
      A_SL_ODEC:    rdata = {12'd0, odec};
      A_DL_LDLY:    rdata = {2'd0, ldly};
      A_DL_PLDLY:   rdata = {2'd0, pldly};
      A_XC_NBIT:    rdata = {13'd0, nbit};
      A_XC_VCNT1:   rdata = {10'd0, vcnt[21:16]};
      A_XC_VCNT0:   rdata = vcnt[15:0];
      A_XC_PACC2:   rdata = {{9{pacc[38]}}, pacc[38:32]};
      A_XC_PACC1:   rdata = pacc[31:16];
      A_XC_PACC0:   rdata = pacc[15:0];
      default: begin
        r_exists = 1'b0;
        rdata    = def;
      end
    endcase
  end

  assign inc_acc  = rd_done && raddr == A_XC_PACC0;
  assign inc_vcnt = rd_done && raddr == A_XC_VCNT0;

  assign mcb_dout = rdata;
  assign mcb_doe  = !mcb_cs_n && mcb_rd && ract;

  // write decode: does the address exist, is it read-only
  always_comb begin
    w_ro = 1'b0;
    unique case (mcb_addr)
      A_CM_DID, A_IO_ICRC_A, A_IO_ICRC_B, A_IO_TINT0_A, A_IO_TINT0_B,
      A_IO_OCRC_A, A_IO_OCRC_B, A_DL_PLDLY, A_XC_VCNT1, A_XC_VCNT0,
      A_XC_PACC2, A_XC_PACC1, A_XC_PACC0: begin
        w_exists = 1'b1;
        w_ro     = 1'b1;
      end
      A_CM_STS, A_CM_CFG, A_CM_CTL, A_CM_ERR, A_CM_DEF, A_CM_TST0, A_CM_TST1, A_CM_TST2, A_CM_TST3,
      A_IO_ESEL_A, A_IO_ESEL_B, A_IO_DSEL_A, A_IO_DSEL_B, A_IO_TINT1_A, A_IO_TINT1_B,
      A_IO_SEED_A, A_IO_SEED_B, A_IO_SDLY, A_IO_DERR_A, A_IO_DERR_B,
      A_SL_IDEC, A_SL_NBND, A_SL_DBND, A_SL_PBND, A_SL_ODEC, A_DL_LDLY, A_XC_NBIT:
        w_exists = 1'b1;
      default:
        w_exists = 1'b0;
    endcase
  end

  always_ff @(posedge mcb_clk) begin
    if (rs) begin
      raddr     <= '0;
      ract      <= 1'b0;
      sts_inv   <= '0;
      sts_tog_q <= 1'b0;
      err       <= '0;
      def       <= '0;
      cfg       <= '0;
      ctl       <= '0;
      for (int i = 0; i < 4; i++) tst[i] <= '0;
      esel_a  <= '0;  esel_b  <= '0;
      dsel_a  <= '0;  dsel_b  <= '0;
      tmode_a <= '0;  tmode_b <= '0;
      seed_a  <= 16'h1357;
      seed_b  <= 16'h1357;
      sdly    <= '0;
      derr_a  <= '0;  derr_b  <= '0;
      idec    <= '0;  nbnd    <= '0;  dbnd <= '0;  pbnd <= '0;  odec <= '0;
      ldly    <= '0;
      nbit    <= '0;
    end else begin
      // read address register
      if (mcb_cs_n) begin
        ract <= 1'b0;
      end else if (mcb_rd) begin
        raddr <= mcb_addr;
        ract  <= 1'b1;
      end else begin
        ract <= 1'b0;
      end

      // new saved status clears the inversion mask
      sts_tog_q <= sts_tog_s;
      if (sts_tog_s != sts_tog_q) sts_inv <= '0;

      if (rd_done && !r_exists) err[2] <= 1'b1;

      if (wr) begin
        if (!w_exists || w_ro) begin
          def <= mcb_din;
          if (w_ro) err[0] <= 1'b1;
          else      err[1] <= 1'b1;
        end
        unique case (mcb_addr)
          A_CM_STS:     sts_inv <= sts_inv ^ mcb_din;
          A_CM_CFG:     cfg     <= mcb_din;
          A_CM_CTL:     ctl     <= mcb_din;
          A_CM_ERR:     err     <= mcb_din[2:0];
          A_CM_DEF:     def     <= mcb_din;
          A_CM_TST0, A_CM_TST1, A_CM_TST2, A_CM_TST3:
                        tst[mcb_addr[1:0] - 2'd2] <= mcb_din[7:0];
          A_IO_ESEL_A:  esel_a  <= mcb_din[6:0];
          A_IO_ESEL_B:  esel_b  <= mcb_din[6:0];
          A_IO_DSEL_A:  dsel_a  <= mcb_din[6:0];
          A_IO_DSEL_B:  dsel_b  <= mcb_din[6:0];
          A_IO_TINT1_A: tmode_a <= mcb_din[15:14];
          A_IO_TINT1_B: tmode_b <= mcb_din[15:14];
          A_IO_SEED_A:  seed_a  <= mcb_din;
          A_IO_SEED_B:  seed_b  <= mcb_din;
          A_IO_SDLY:    sdly    <= mcb_din;
          A_IO_DERR_A:  derr_a  <= mcb_din;
          A_IO_DERR_B:  derr_b  <= mcb_din;
          A_SL_IDEC:    idec    <= mcb_din[3:0];
          A_SL_NBND:    nbnd    <= mcb_din[3:0];
          A_SL_DBND:    dbnd    <= mcb_din[3:0];
          A_SL_PBND:    pbnd    <= mcb_din[3:0];
          A_SL_ODEC:    odec    <= mcb_din[3:0];
          A_DL_LDLY:    ldly    <= mcb_din[13:0];
          A_XC_NBIT:    nbit    <= mcb_din[2:0];
          default: ;
        endcase
      end
    end
  end
endmodule
