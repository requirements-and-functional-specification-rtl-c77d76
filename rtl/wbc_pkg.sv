// Shared types and constants of the station board wideband correlator (WBC).
//
// The WBC receives two 64-bit wideband sample streams (A and B) at 256 Msample-words/s,
// passes them on unchanged and correlates one band of one input ("lagged", 64
// consecutive samples) against one sample of one band of an input ("prompt"),
// accumulating 64 lags per system tick (10 ms).
//
// The register addresses and bit assignments below follow the register map of the
// specification (common, INOUT, SELECT, DELAY and XCOR groups). The test port signal
// codes and the design identifier value are this design's own choice.
package wbc_pkg;

  // ---------------------------------------------------------------- register addresses
  localparam logic [7:0] A_CM_STS     = 8'h00;
  localparam logic [7:0] A_CM_CFG     = 8'h01;
  localparam logic [7:0] A_CM_CTL     = 8'h02;
  localparam logic [7:0] A_CM_ERR     = 8'h03;
  localparam logic [7:0] A_CM_DEF     = 8'h04;
  localparam logic [7:0] A_CM_DID     = 8'h05;
  localparam logic [7:0] A_CM_TST0    = 8'h06;
  localparam logic [7:0] A_CM_TST1    = 8'h07;
  localparam logic [7:0] A_CM_TST2    = 8'h08;
  localparam logic [7:0] A_CM_TST3    = 8'h09;
  localparam logic [7:0] A_IO_ESEL_A  = 8'h10;
  localparam logic [7:0] A_IO_ESEL_B  = 8'h11;
  localparam logic [7:0] A_IO_DSEL_A  = 8'h12;
  localparam logic [7:0] A_IO_ICRC_A  = 8'h13;
  localparam logic [7:0] A_IO_DSEL_B  = 8'h14;
  localparam logic [7:0] A_IO_ICRC_B  = 8'h15;
  localparam logic [7:0] A_IO_TINT1_A = 8'h16;
  localparam logic [7:0] A_IO_TINT0_A = 8'h17;
  localparam logic [7:0] A_IO_TINT1_B = 8'h18;
  localparam logic [7:0] A_IO_TINT0_B = 8'h19;
  localparam logic [7:0] A_IO_SEED_A  = 8'h1A;
  localparam logic [7:0] A_IO_SEED_B  = 8'h1B;
  localparam logic [7:0] A_IO_SDLY    = 8'h1C;
  localparam logic [7:0] A_IO_OCRC_A  = 8'h1D;
  localparam logic [7:0] A_IO_OCRC_B  = 8'h1E;
  localparam logic [7:0] A_IO_DERR_A  = 8'h1F;
  localparam logic [7:0] A_IO_DERR_B  = 8'h20;
  localparam logic [7:0] A_SL_IDEC    = 8'h30;
  localparam logic [7:0] A_SL_NBND    = 8'h31;
  localparam logic [7:0] A_SL_DBND    = 8'h32;
  localparam logic [7:0] A_SL_PBND    = 8'h33;
  localparam logic [7:0] A_SL_ODEC    = 8'h34;
  localparam logic [7:0] A_DL_LDLY    = 8'h40;
  localparam logic [7:0] A_DL_PLDLY   = 8'h41;
  localparam logic [7:0] A_XC_NBIT    = 8'h60;
  localparam logic [7:0] A_XC_VCNT1   = 8'h61;
  localparam logic [7:0] A_XC_VCNT0   = 8'h62;
  localparam logic [7:0] A_XC_PACC2   = 8'h63;
  localparam logic [7:0] A_XC_PACC1   = 8'h64;
  localparam logic [7:0] A_XC_PACC0   = 8'h65;

  // ---------------------------------------------------------------- status bits (CM_STS)
  localparam int unsigned ST_STICK_W   = 2;   // STICK width error
  localparam int unsigned ST_UNLOCK    = 3;   // SCLK not locked
  localparam int unsigned ST_NBND      = 4;   // illegal number of bands
  localparam int unsigned ST_DBND      = 5;   // illegal lagged band
  localparam int unsigned ST_PBND      = 6;   // illegal prompt band
  localparam int unsigned ST_COMB      = 7;   // illegal combination
  localparam int unsigned ST_PSDONE    = 8;   // DCM phase shift complete
  localparam int unsigned ST_PSOVF     = 9;   // DCM phase shift over/underflow
  localparam int unsigned ST_EDGE_EQ   = 10;  // STICK edge+ matches edge-
  localparam int unsigned ST_EDGE_LEAD = 11;  // STICK chosen edge leads the other

  // ---------------------------------------------------------------- configuration (CM_CFG)
  typedef struct packed {
    logic [5:0] unused;      // [15:10]
    logic       align_b;     // [9]  one extra clock on B
    logic       align_a;     // [8]  one extra clock on A
    logic       test_inv;    // [7]  test data invalid for the tick sample
    logic       test_delta;  // [6]  0 pseudo random, 1 delta function
    logic       edge_b;      // [5]  B data capture edge
    logic       edge_a;      // [4]  A data capture edge
    logic       edge_st;     // [3]  STICK capture edge
    logic       test_out;    // [2]  put test signals on the outputs
    logic       prompt_b;    // [1]  prompt from B
    logic       lagged_b;    // [0]  lagged from B
  } cfg_t;

  // ---------------------------------------------------------------- control (CM_CTL)
  localparam int unsigned CT_SWRST    = 0;
  localparam int unsigned CT_CLKOFF   = 1;
  localparam int unsigned CT_ZACC     = 2;
  localparam int unsigned CT_ZVCNT    = 3;
  localparam int unsigned CT_PSINC    = 4;
  localparam int unsigned CT_PSEN     = 5;
  localparam int unsigned CT_DCMRST   = 15;

  // ---------------------------------------------------------------- helpers
  // Rate divider code (Table 7-7): divide by 2**code, codes 12..15 all divide by 4096.
  function automatic logic [3:0] dec_clamp(input logic [3:0] code);
    return (code > 4'd12) ? 4'd12 : code;
  endfunction

  // log2 of a band count given as (count - 1); only meaningful for powers of two.
  function automatic logic [3:0] log2_bands(input logic [3:0] nbnd_m1);
    logic [3:0] r;
    r = 4'd0;
    for (int i = 0; i < 4; i++)
      if (nbnd_m1[i]) r = 4'(i + 1);
    return r;
  endfunction

endpackage
