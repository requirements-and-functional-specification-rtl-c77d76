// SELECT: choose the lagged and prompt inputs, decimate, and collect one band.
//
// Each 64-bit input word holds 16 4-bit or 8 8-bit sample slots, the earliest in
// bits 63:60 (63:56). With N = nbnd+1 bands the slots interleave the bands,
// highest band first: slot s carries band N-1-(s mod N), sample s div N.
//
// Lagged side: the chosen input (cfg bit 0: A or B) is decimated by 2^idec (one
// word kept out of 2^idec, codes above 12 act as 12). From every kept word the
// samples of band `dbnd` are appended to a 64-bit collect register, earliest
// sample first, so after N kept words the register holds 16 (or 8) consecutive
// samples of that band. That word is emitted, with the AND of the N valid bits,
// at the output rate 2^odec; `ce` marks the clock in which dd/vd/dp/vp change.
// Prompt side: from the first kept word of each output group, the first sample
// of band `pbnd` of the prompt input (cfg bit 1) is emitted (4-bit samples zero
// extended to 8 bits) with that word's valid. Using one prompt sample per
// lagged word is the document's resource trade-off: it costs SNR, not lags.
//
// The rate counter restarts on the data tick of the lagged input, so every
// output group starts on a tick word. odec must equal idec + log2(N): other
// settings, N not a power of two (or over 8 for 8-bit samples) and bands
// beyond N raise the status flags; the output is then not meaningful.
// Latency: one clock from the input word to dd. The band layout, the registers
// and the rate rules follow the specification; collecting into a 64-bit shift
// register (instead of a 16-word one) and the prompt sample choice are this
// design's.
module wbc_select
  import wbc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] da,
  input  logic [1:0]  va,          // {data tick, valid}
  input  logic [63:0] db,
  input  logic [1:0]  vb,
  input  logic        lagged_b,    // CM_CFG[0]
  input  logic        prompt_b,    // CM_CFG[1]
  input  logic        mode8,       // 8-bit sample containers (XC_NBIT >= 4)
  input  logic [3:0]  idec,        // SL_IDEC
  input  logic [3:0]  nbnd,        // SL_NBND (bands - 1)
  input  logic [3:0]  dbnd,        // SL_DBND
  input  logic [3:0]  pbnd,        // SL_PBND
  input  logic [3:0]  odec,        // SL_ODEC
  output logic [63:0] dd,
  output logic        vd,
  output logic [7:0]  dp,
  output logic        vp,
  output logic        ce,
  output logic        ill_nbnd,
  output logic        ill_dbnd,
  output logic        ill_pbnd,
  output logic        ill_comb
);
  logic [63:0] lw, pw;
  logic        lv, pv, ltick;
  logic [11:0] cnt, cnt_eff, imask, omask;
  logic [3:0]  idec_c, odec_c, l2nb;
  logic        ce_in, first, last;
  logic [63:0] col, col_nxt;
  logic        vacc;
  logic [7:0]  psamp, psamp_now;
  logic        pvq;

  assign lw    = lagged_b ? db : da;
  assign lv    = lagged_b ? vb[0] : va[0];
  assign ltick = lagged_b ? vb[1] : va[1];
  assign pw    = prompt_b ? db : da;
  assign pv    = prompt_b ? vb[0] : va[0];

  assign idec_c = dec_clamp(idec);
  assign odec_c = dec_clamp(odec);
  assign l2nb   = log2_bands(nbnd);
  assign imask  = 12'((13'd1 << idec_c) - 13'd1);
  assign omask  = 12'((13'd1 << odec_c) - 13'd1);

  assign cnt_eff = ltick ? 12'd0 : cnt;
  assign ce_in   = (cnt_eff & imask) == 12'd0;
  assign first   = ce_in && ((cnt_eff & omask) == 12'd0);
  assign last    = ce_in && ((cnt_eff & omask) == (omask & ~imask));

  // legality
  assign ill_nbnd = !(nbnd == 4'd0 || nbnd == 4'd1 || nbnd == 4'd3 || nbnd == 4'd7 ||
                      (nbnd == 4'd15 && !mode8));
  assign ill_dbnd = dbnd > nbnd;
  assign ill_pbnd = pbnd > nbnd;
  assign ill_comb = ({1'b0, idec_c} + {1'b0, l2nb} > 5'd12) || (odec_c != idec_c + l2nb);

  // nibble j of a word, j = 0 is bits 63:60
  function automatic logic [3:0] nib(input logic [63:0] w, input int j);
    return w[63 - 4*j -: 4];
  endfunction

  // collect register after appending the chosen band of word lw
  always_comb begin
    int nb, cn, m, k, slot, wn;
    nb = int'(nbnd) + 1;
    cn = 16 >> l2nb;                   // nibbles per band per word
    m = 0; k = 0; slot = 0; wn = 0;
    col_nxt = '0;
    for (int j = 0; j < 16; j++) begin
      if (j < 16 - cn) begin
        col_nxt[63 - 4*j -: 4] = nib(col, j + cn);
      end else begin
        m = j - (16 - cn);
        if (mode8) begin
          k    = m / 2;
          slot = k * nb + (nb - 1 - int'(dbnd));
          wn   = 2 * slot + (m % 2);
        end else begin
          slot = m * nb + (nb - 1 - int'(dbnd));
          wn   = slot;
        end
        col_nxt[63 - 4*j -: 4] = nib(lw, wn & 15);
      end
    end
  end

  // first sample of the prompt band in the prompt word
  always_comb begin
    int slot;
    slot = int'(nbnd) - int'(pbnd);
    if (mode8) psamp_now = pw[63 - 8*(slot & 7) -: 8];
    else       psamp_now = {4'd0, nib(pw, slot & 15)};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      col   <= '0;
      vacc  <= 1'b0;
      psamp <= '0;
      pvq   <= 1'b0;
      dd    <= '0;
      vd    <= 1'b0;
      dp    <= '0;
      vp    <= 1'b0;
      ce    <= 1'b0;
    end else begin
      cnt <= cnt_eff + 12'd1;
      ce  <= last;
      if (ce_in) begin
        col  <= col_nxt;
        vacc <= first ? lv : (vacc & lv);
      end
      if (first) begin
        psamp <= psamp_now;
        pvq   <= pv;
      end
      if (last) begin
        dd <= col_nxt;
        vd <= first ? lv : (vacc & lv);
        dp <= first ? psamp_now : psamp;
        vp <= first ? pv : pvq;
      end
    end
  end
endmodule
