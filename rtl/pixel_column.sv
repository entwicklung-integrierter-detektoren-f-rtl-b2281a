// pixel_column: one matrix column of hit buffers with their priority chain,
// their shared data bus and the column hit bus.
//
// NBUF hit buffers (MPROC: 270 pixels with two readout cells each = 540)
// share LdPix, RdPix and the global time stamps. The grouped fast/slow
// priority chain enables the first cell whose hitflag is set, so one RdPix
// pulse reads exactly that cell onto the bus and clears it; the next RdPix
// reads the next one. The bus is the OR of all cell outputs (only the read
// cell drives a non-zero word). col_scan is the ScanOut of the last cell
// (ScanOut<540>): some cell holds a flagged hit. hitbus is the OR of all
// comparator outputs, a fast analog-style monitor, unless hitbus_dis is set.
//
// Cell k gets address ROM value k (own choice: pixel row * 2 + channel).
// Timing: rd_pix must only be given while col_scan is high; the read word is
// valid during the rd_pix cycle.
module pixel_column #(
  parameter int unsigned NBUF    = 540,
  parameter int unsigned GROUP   = 30,
  parameter int unsigned TS1_W   = 20,
  parameter int unsigned TS2_W   = 10,
  parameter int unsigned TS3_W   = 7,
  parameter int unsigned ADDR_W  = 10,
  parameter bit          HAS_TDC = 1'b1,
  localparam int unsigned WORD_W = TS1_W + TS2_W + TS3_W + ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NBUF-1:0]   comp,
  input  logic [NBUF-1:0]   tdc_fired,
  output logic [NBUF-1:0]   hit,
  input  logic [TS1_W-1:0]  ts1,
  input  logic [TS2_W-1:0]  ts2,
  input  logic [TS3_W-1:0]  ts3,
  input  logic              ld_pix,
  input  logic              rd_pix,
  input  logic              hitbus_dis,
  output logic              col_scan,
  output logic [WORD_W-1:0] col_bus,
  output logic              hitbus
);

  logic [NBUF-1:0]   hitflag, enable, scan;
  logic [WORD_W-1:0] cell_bus [NBUF];

  for (genvar k = 0; k < NBUF; k++) begin : g_cell
    hit_buffer #(
      .TS1_W(TS1_W), .TS2_W(TS2_W), .TS3_W(TS3_W), .ADDR_W(ADDR_W),
      .HAS_TDC(HAS_TDC)
    ) u_cell (
      .clk, .rst_n,
      .comp(comp[k]), .ts1, .ts2, .ts3, .row_addr(ADDR_W'(k)), .tdc_fired(tdc_fired[k]),
      .ld_pix, .rd_pix, .enable(enable[k]),
      .hit(hit[k]), .hitflag(hitflag[k]), .bus_out(cell_bus[k])
    );
  end

  priority_chain #(.N(NBUF), .GROUP(GROUP)) u_prio (
    .flag(hitflag), .enable, .scan, .scan_out(col_scan)
  );

  always_comb begin
    col_bus = '0;
    for (int unsigned k = 0; k < NBUF; k++) col_bus |= cell_bus[k];
  end

  assign hitbus = ~hitbus_dis & (|comp);

  a_rd_needs_hit: assert property (@(posedge clk) disable iff (!rst_n) rd_pix |-> col_scan);

endmodule
