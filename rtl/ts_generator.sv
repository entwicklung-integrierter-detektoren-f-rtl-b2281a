// ts_generator: global time stamp generator of the readout control unit.
//
// One binary counter advances on every rising edge of ts_ck. Its value is
// distributed Gray coded, so that a hit buffer storing it during a change is off
// by at most one count:
//   ts_rise - CNT_W bits, changes on the rising edge of ts_ck  (TS11)
//   ts_fall - the same value copied on the falling edge        (TS12)
//   ts2     - low TS2_W bits, for the falling-edge (ToT) RAM
//   ts3     - low TS3_W bits, the clock of the fine time stamp
// In the first half of a period ts_fall is one behind ts_rise, in the second
// half they are equal; the fine time formulas use this to tell on which side of
// a clock edge a hit fell. A chip with a 20 bit TS1 stores {ts_fall, ts_rise}.
//
// Follows the document: binary counters, Gray coding, TsToDet(9:0) on the
// rising and TsToDet(19:10) on the falling edge, widths 10/10/7. Own choices:
// one shared counter for all stamps; the TS1 upper half is a half-period
// delayed copy of the lower half (this is how the fine-time formulas read).
module ts_generator #(
  parameter int unsigned CNT_W = 10,
  parameter int unsigned TS2_W = 10,
  parameter int unsigned TS3_W = 7
) (
  input  logic             ts_ck,
  input  logic             rst_n,
  output logic [CNT_W-1:0] ts_rise,
  output logic [CNT_W-1:0] ts_fall,
  output logic [TS2_W-1:0] ts2,
  output logic [TS3_W-1:0] ts3
);
  import det_pkg::*;

  logic [CNT_W-1:0] cnt, cnt_nx;
  logic [CNT_W-1:0] g_full;
  logic [TS2_W-1:0] g_2;
  logic [TS3_W-1:0] g_3;

  assign cnt_nx = cnt + 1'b1;
  assign g_full = CNT_W'(bin2gray(32'(cnt_nx)));
  assign g_2    = TS2_W'(bin2gray(32'(cnt_nx[TS2_W-1:0])));
  assign g_3    = TS3_W'(bin2gray(32'(cnt_nx[TS3_W-1:0])));

  always_ff @(posedge ts_ck or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      ts_rise <= '0;
      ts2     <= '0;
      ts3     <= '0;
    end else begin
      cnt     <= cnt_nx;
      ts_rise <= g_full;
      ts2     <= g_2;
      ts3     <= g_3;
    end
  end

  always_ff @(negedge ts_ck or negedge rst_n) begin
    if (!rst_n) ts_fall <= '0;
    else        ts_fall <= ts_rise;
  end

endmodule
