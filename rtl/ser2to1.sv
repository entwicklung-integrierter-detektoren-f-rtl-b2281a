// ser2to1: behavioural model of the chip's analogue 2->1 output serializer
// (in silicon a differential current-mode-logic circuit, not synthesized
// logic).
//
// The two-bit word d is taken on the rising edge of clk; during the high half
// of the following clock period q carries d[1], during the low half d[0]. The
// serial rate is therefore twice the clock rate (1.6 Gbit/s from an 800 MHz
// clock in the document's numbers). This is a model of the output stage only;
// it has no timing detail of the real circuit.
module ser2to1 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] d,
  output logic       q
);

  logic [1:0] d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_q <= 2'b00;
    else        d_q <= d;
  end

  // the clock selects which half of the word is on the line
  assign q = clk ? d_q[1] : d_q[0];

endmodule
