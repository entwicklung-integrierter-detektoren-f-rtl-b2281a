// cfg_register: daisy-chained configuration shift register of NBITS cfg_bit
// cells.
//
// Data enter at sin and move one bit per ck1/ck2 pulse pair towards sout;
// after NBITS pairs the first bit shifted in sits in cell NBITS-1 and the last
// in cell 0. Load copies every cell's shift stage into its triple-redundant
// storage, whose majority outputs are q. With rb high one ck1 pulse copies the
// stored values back into the shift stages for read-back.
//
// Follows the document: serial shift registers of full-custom bits in a daisy
// chain, written with Sin/Ck1/Ck2/Load and read back with Rb. The upset inputs
// of the cells are tied to zero here.
module cfg_register #(
  parameter int unsigned NBITS = 862
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ck1,
  input  logic             ck2,
  input  logic             sin,
  input  logic             load,
  input  logic             rb,
  output logic             sout,
  output logic [NBITS-1:0] q
);

  logic [NBITS:0] chain;

  assign chain[0] = sin;
  assign sout     = chain[NBITS];

  for (genvar i = 0; i < NBITS; i++) begin : g_bit
    cfg_bit u_bit (
      .clk, .rst_n, .ck1, .ck2, .sin(chain[i]), .load, .rb,
      .upset(3'b000), .sout(chain[i+1]), .q(q[i])
    );
  end

endmodule
