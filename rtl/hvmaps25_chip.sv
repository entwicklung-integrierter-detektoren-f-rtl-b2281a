// hvmaps25_chip: digital part of the HVMAPS25 monolithic pixel sensor.
//
// 30 columns of 48 groups x 12 pixels (576 pixels, 17280 in all); every pixel
// has one hit buffer that stores a 10 bit leading-edge time stamp and a 6 bit
// falling-edge stamp (ToT = difference) and its 10 bit address. There is no
// fine time stamp: the TS3 field is one constant zero bit. Readout, end of
// column and RCU work as in the MPROC chip (the RCU here also holds the
// configuration register): hit words of 10+6+1+10+5 = 32 bits leave as frames
// through the serializer.
// Configuration (row control, then column control; order is an own choice):
//   cfg_q[6*g +: 6]          row control block g (q<0:5>, g = 0..47)
//   cfg_q[288 + 8*c +: 8]    column control block c (q<0:7>); q<6> disables
//                            the column's hit bus.
// The pixel RAM bits they write are analog settings and leave as cfg_q.
// Own choice: hit buffers are grouped by 24 in the priority chain.
module hvmaps25_chip #(
  parameter int unsigned NCOL  = 30,
  parameter int unsigned NGRP  = 48,
  parameter int unsigned GROUP = 24,
  localparam int unsigned NBUF   = NGRP * 12,
  localparam int unsigned TS1_W  = 10,
  localparam int unsigned TS2_W  = 6,
  localparam int unsigned TS3_W  = 1,
  localparam int unsigned ADDR_W = 10,
  localparam int unsigned COL_W  = 5,
  localparam int unsigned HIT_W  = TS1_W + TS2_W + TS3_W + ADDR_W + COL_W,
  localparam int unsigned ROWCFG = 6 * NGRP,
  localparam int unsigned NCFG   = ROWCFG + 8 * NCOL
) (
  input  logic                      clk,
  input  logic                      ts_ck,
  input  logic                      rst_n,
  input  logic [NCOL-1:0][NBUF-1:0] comp,
  output logic [NCOL-1:0]           hitbus,
  input  logic                      cfg_ck1,
  input  logic                      cfg_ck2,
  input  logic                      cfg_sin,
  input  logic                      cfg_load,
  input  logic                      cfg_rb,
  output logic                      cfg_sout,
  output logic [NCFG-1:0]           cfg_q,
  output logic [1:0]                bit_data,
  output logic                      ser_out
);

  logic [TS1_W-1:0] ts_rise, ts_fall;
  logic [TS2_W-1:0] ts2;
  logic [TS3_W-1:0] ts3;
  logic             ld_pix, pull_dn, ld_col, rd_col;
  logic             pix_pending, eoc_pending;
  logic [HIT_W-1:0] eoc_data, word;
  logic             word_valid, ser_ready;
  logic [NCOL-1:0]  hitbus_dis;
  logic [NCOL-1:0][NBUF-1:0] hit_unused;

  for (genvar c = 0; c < NCOL; c++) begin : g_dis
    assign hitbus_dis[c] = cfg_q[ROWCFG + 8*c + 6];
  end

  ts_generator #(.CNT_W(TS1_W), .TS2_W(TS2_W), .TS3_W(TS3_W)) u_ts (
    .ts_ck, .rst_n, .ts_rise, .ts_fall, .ts2, .ts3
  );

  readout_matrix #(
    .NCOL(NCOL), .NBUF(NBUF), .GROUP(GROUP), .TS1_W(TS1_W), .TS2_W(TS2_W),
    .TS3_W(TS3_W), .ADDR_W(ADDR_W), .COL_W(COL_W), .HAS_TDC(1'b0)
  ) u_matrix (
    .clk, .rst_n, .comp, .tdc_fired({NCOL{{NBUF{1'b1}}}}), .hit(hit_unused),
    .ts1(ts_rise), .ts2, .ts3,
    .ld_pix, .pull_dn, .ld_col, .rd_col, .hitbus_dis,
    .pix_pending, .eoc_pending, .dout(eoc_data), .hitbus
  );

  rcu_fsm #(.HIT_W(HIT_W)) u_rcu (
    .clk, .rst_n, .pix_pending, .eoc_pending, .eoc_data, .ser_ready,
    .ld_pix, .pull_dn, .ld_col, .rd_col, .word, .word_valid
  );

  hit_serializer #(.DATA_W(HIT_W)) u_ser (
    .clk, .rst_n, .word, .word_valid, .ready(ser_ready), .bits(bit_data)
  );

  ser2to1 u_out (.clk, .rst_n, .d(bit_data), .q(ser_out));

  cfg_register #(.NBITS(NCFG)) u_cfg (
    .clk, .rst_n, .ck1(cfg_ck1), .ck2(cfg_ck2), .sin(cfg_sin), .load(cfg_load),
    .rb(cfg_rb), .sout(cfg_sout), .q(cfg_q)
  );

endmodule
