// photon_pixel: digital part of a PHOTON counting pixel.
//
// A 13 bit counter counts rising edges of the pixel's comparator output while
// the shutter is open and the pixel is not masked; the shutter therefore sets
// the measurement time. clear resets the count for the next measurement. The
// counter stops at its maximum (8191) instead of wrapping, so an overflowing
// pixel reads full scale.
//
// Interface: comp is the comparator output already synchronous to clk (a
// pulse must be high for at least one clock and low for one between pulses).
// Follows the document: 13 bit counter, shutter enable, per-pixel mask. Own
// choices: synchronous edge detection, clear input, saturation.
module photon_pixel #(
  parameter int unsigned CNT_W = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             comp,
  input  logic             shutter,
  input  logic             mask,
  input  logic             clear,
  output logic [CNT_W-1:0] count
);

  logic comp_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comp_d <= 1'b0;
      count  <= '0;
    end else begin
      comp_d <= comp;
      if (clear)
        count <= '0;
      else if (shutter && !mask && comp && !comp_d && count != '1)
        count <= count + 1'b1;
    end
  end

endmodule
