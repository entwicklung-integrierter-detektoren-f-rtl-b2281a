// photon_matrix: the PHOTON readout chip's matrix of NX x NY counting pixels
// (32 x 30 in the chip) with a common shutter and clear and one mask bit per
// pixel. Every pixel's count is brought out in parallel; the chip's serial
// readout of the counters is not modelled.
module photon_matrix #(
  parameter int unsigned NX    = 32,
  parameter int unsigned NY    = 30,
  parameter int unsigned CNT_W = 13
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NY-1:0][NX-1:0]       comp,
  input  logic [NY-1:0][NX-1:0]       mask,
  input  logic                        shutter,
  input  logic                        clear,
  output logic [CNT_W-1:0]            count [NY][NX]
);

  for (genvar y = 0; y < NY; y++) begin : g_row
    for (genvar x = 0; x < NX; x++) begin : g_px
      photon_pixel #(.CNT_W(CNT_W)) u_px (
        .clk, .rst_n, .comp(comp[y][x]), .shutter, .mask(mask[y][x]), .clear,
        .count(count[y][x])
      );
    end
  end

endmodule
