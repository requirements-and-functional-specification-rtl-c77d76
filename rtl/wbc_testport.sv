// Test port: four diagnostic output pins, each showing an internal signal.
//
// CM_TST0..3 each hold a signal code for one TEST pin. Code 0 holds the pin low
// (the quiet setting), codes 1..15 select sig[1..15], larger codes read as 0.
// The pins are registered on the 256 MHz clock (one clock of latency). The
// specification leaves the list of signals open; the assignment of codes to
// signals is made by the instantiating top level.
module wbc_testport (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  sel [4],
  input  logic [15:1] sig,
  output logic [3:0]  test
);
  logic [15:0] s;
  assign s = {sig, 1'b0};

  always_ff @(posedge clk) begin
    if (rst) begin
      test <= '0;
    end else begin
      for (int i = 0; i < 4; i++)
        test[i] <= (sel[i] < 8'd16) ? s[sel[i][3:0]] : 1'b0;
    end
  end
endmodule
