// ccpd53_encoder: pixel-to-pad address encoding of one CCPD53 pixel group.
//
// A group has 16 pixels in four subgroups A, B, C, D, each pixel with an index
// 1 to 4; pixel Q[4*s + (i-1)] is pixel i of subgroup s (so C1 is Q8). Every
// pixel has two comparators with rail-to-rail outputs, OutR and OutL. The eight
// transmission pads are wired ORs of them:
//   pad_idx[i-1] ("pad i")  = OutR of the four pixels with index i
//   pad_grp[s]   ("pad A..D") = OutL of the four pixels of subgroup s
// so a single hit raises exactly one index pad and one subgroup pad, and the
// readout chip recovers the pixel from the pair. Purely combinational.
//
// Follows the document: 16 pixels to 8 pads, the subgroup/index wiring and the
// C1 = Q8 numbering.
module ccpd53_encoder (
  input  logic [15:0] out_r,
  input  logic [15:0] out_l,
  output logic [3:0]  pad_idx,
  output logic [3:0]  pad_grp
);

  always_comb begin
    pad_idx = '0;
    pad_grp = '0;
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < 4; i++) begin
        pad_idx[i] |= out_r[4*s + i];
        pad_grp[s] |= out_l[4*s + i];
      end
    end
  end

endmodule
