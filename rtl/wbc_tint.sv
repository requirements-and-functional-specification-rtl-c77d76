// Time interval counter for one wideband input.
//
// Measures, in 256 MHz clocks, the time between the data tick of a wideband
// input and the system tick, so the capture timing can be checked. `mode`
// (IO_TINT1 bits 15:14) picks the interval:
//   00  data tick  -> system tick      01  data tick  -> next data tick
//   10  system tick -> next system tick 11  system tick -> data tick
// The system tick is first delayed by `sdly` clocks (IO_SDLY), so the offset
// between the two ticks can be nulled. An interval is the number of clock edges
// from the start event to the stop event; the count saturates at 2^22-1 and is
// copied to `count` (IO_TINT1[5:0], IO_TINT0) at the stop event. The interval
// meanings follow the register description; counting edges and saturating are
// this design's choices.
module wbc_tint #(
  parameter int unsigned W = 22
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         dtick,      // data tick of the input (one clock)
  input  logic         stk,        // internal system tick (one clock)
  input  logic [15:0]  sdly,
  input  logic [1:0]   mode,
  output logic [W-1:0] count
);
  logic [15:0]  dcnt;
  logic         dbusy;
  logic         dstk;
  logic [W-1:0] cnt;
  logic         run;
  logic         start, stop;
  logic         same;         // start and stop are the same event

  // programmable delay of the system tick
  always_ff @(posedge clk) begin
    if (rst) begin
      dcnt  <= '0;
      dbusy <= 1'b0;
    end else if (stk && sdly != 16'd0) begin
      dcnt  <= sdly;
      dbusy <= 1'b1;
    end else if (dbusy) begin
      dcnt  <= dcnt - 16'd1;
      if (dcnt == 16'd1) dbusy <= 1'b0;
    end
  end
  assign dstk = (sdly == 16'd0) ? stk : (dbusy && dcnt == 16'd1);

  always_comb begin
    unique case (mode)
      2'b00:   begin start = dtick; stop = dstk;  end
      2'b01:   begin start = dtick; stop = dtick; end
      2'b10:   begin start = dstk;  stop = dstk;  end
      default: begin start = dstk;  stop = dtick; end
    endcase
  end

  assign same = mode[1] ^ mode[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      run   <= 1'b0;
      count <= '0;
    end else begin
      if (stop && (run || (start && !same))) count <= run ? cnt : '0;
      if (start && (same || !stop)) begin
        cnt <= W'(1);
        run <= 1'b1;
      end else if (stop) begin
        run <= 1'b0;
      end else if (run && cnt != '1) begin
        cnt <= cnt + W'(1);
      end
    end
  end
endmodule
