// readout_matrix: the pixel columns of a chip together with their
// end-of-column (EoC) blocks and the EoC priority chain.
//
// Each column has its own hit-buffer chain and EoC. LdPix goes to all hit
// buffers. One LdCol moves one hit out of every column that has one into that
// column's EoC (after PullDN cleared the EoC latches). The EoC flags then form
// a priority chain of their own, like the hit buffers: each RdCol reads the
// first full EoC onto the chip bus (dout = {TS1, TS2, TS3, row, column}).
// pix_pending is the OR of the columns' ScanOut<last>: some hit buffer is
// flagged; eoc_pending is the ScanOut of the EoC chain: some EoC is full.
// The global time stamps pass through to all columns.
//
// Follows the document: the hit buffer / EoC / RCU control scheme (LdPix,
// PullDN, LdCol, RdCol, RdPix). Own choices: the EoC chain is one group (its
// grouping is not given) and column 0 has the highest priority.
module readout_matrix #(
  parameter int unsigned NCOL    = 30,
  parameter int unsigned NBUF    = 540,
  parameter int unsigned GROUP   = 30,
  parameter int unsigned TS1_W   = 20,
  parameter int unsigned TS2_W   = 10,
  parameter int unsigned TS3_W   = 7,
  parameter int unsigned ADDR_W  = 10,
  parameter int unsigned COL_W   = 5,
  parameter bit          HAS_TDC = 1'b1,
  localparam int unsigned WORD_W = TS1_W + TS2_W + TS3_W + ADDR_W,
  localparam int unsigned HIT_W  = WORD_W + COL_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NCOL-1:0][NBUF-1:0]  comp,
  input  logic [NCOL-1:0][NBUF-1:0]  tdc_fired,
  output logic [NCOL-1:0][NBUF-1:0]  hit,
  input  logic [TS1_W-1:0]           ts1,
  input  logic [TS2_W-1:0]           ts2,
  input  logic [TS3_W-1:0]           ts3,
  input  logic                       ld_pix,
  input  logic                       pull_dn,
  input  logic                       ld_col,
  input  logic                       rd_col,
  input  logic [NCOL-1:0]            hitbus_dis,
  output logic                       pix_pending,
  output logic                       eoc_pending,
  output logic [HIT_W-1:0]           dout,
  output logic [NCOL-1:0]            hitbus
);

  logic [NCOL-1:0]   col_scan, rd_pix, eoc_flag, eoc_en, eoc_scan;
  logic [WORD_W-1:0] col_bus [NCOL];
  logic [HIT_W-1:0]  eoc_dout [NCOL];

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    pixel_column #(
      .NBUF(NBUF), .GROUP(GROUP), .TS1_W(TS1_W), .TS2_W(TS2_W), .TS3_W(TS3_W),
      .ADDR_W(ADDR_W), .HAS_TDC(HAS_TDC)
    ) u_col (
      .clk, .rst_n,
      .comp(comp[c]), .tdc_fired(tdc_fired[c]), .hit(hit[c]),
      .ts1, .ts2, .ts3, .ld_pix, .rd_pix(rd_pix[c]),
      .hitbus_dis(hitbus_dis[c]),
      .col_scan(col_scan[c]), .col_bus(col_bus[c]), .hitbus(hitbus[c])
    );

    eoc #(.WORD_W(WORD_W), .COL_W(COL_W), .COL_ADDR(c)) u_eoc (
      .clk, .rst_n, .pull_dn, .ld_col, .rd_col,
      .col_en(eoc_en[c]), .col_scan(col_scan[c]), .col_bus(col_bus[c]),
      .rd_pix(rd_pix[c]), .flag(eoc_flag[c]), .dout(eoc_dout[c])
    );
  end

  priority_chain #(.N(NCOL), .GROUP(NCOL)) u_eoc_prio (
    .flag(eoc_flag), .enable(eoc_en), .scan(eoc_scan), .scan_out(eoc_pending)
  );

  assign pix_pending = |col_scan;

  always_comb begin
    dout = '0;
    for (int unsigned c = 0; c < NCOL; c++) dout |= eoc_dout[c];
  end

endmodule
