// mproc_chip: digital part of the MPROC hybrid pixel readout chip.
//
// The matrix has NCOL columns of NBUF hit buffers (30 x 540: 270 pixels per
// column, two readout channels per pixel with their own threshold). Every hit
// buffer stores, for one hit, the leading-edge time TS1 (20 bits: the rising-
// and falling-edge copies of a 10 bit stamp), the falling-edge time TS2 (10 bits;
// ToT = TS2 - TS1), the fine time stamp TS3 (7 bits) and its 10 bit address.
// The readout control unit (RCU) drains the matrix through the end-of-column
// blocks, which add the 5 bit column address, into 52 bit hit words; the RCU
// serializer frames them into a two-bit stream and the output stage makes a
// single serial line of it. The configuration register holds 25 bits per
// column and 7 bits (6 bit code + spare) per bias DAC; its outputs leave the
// chip model as cfg_q (their users are analog).
//
// Analog parts are outside: comp are the pixel comparator outputs, hit goes to
// the fine-time (TDC) ramps and tdc_fired comes back from them.
// Clocks: clk runs the readout (800 MHz in the document's data-rate numbers),
// ts_ck the time stamps (100 MHz). Both are assumed related so that clk samples
// the Gray coded stamps cleanly.
// Configuration bit order (own choice): column c uses cfg_q[25*c +: 25], bias
// DAC d uses cfg_q[25*NCOL + 7*d +: 7] with the spare bit on top.
module mproc_chip #(
  parameter int unsigned NCOL  = 30,
  parameter int unsigned NBUF  = 540,
  parameter int unsigned GROUP = 30,
  parameter int unsigned NDAC  = 16,
  localparam int unsigned TS_W   = 10,
  localparam int unsigned TS1_W  = 2 * TS_W,
  localparam int unsigned TS2_W  = 10,
  localparam int unsigned TS3_W  = 7,
  localparam int unsigned ADDR_W = 10,
  localparam int unsigned COL_W  = 5,
  localparam int unsigned HIT_W  = TS1_W + TS2_W + TS3_W + ADDR_W + COL_W,
  localparam int unsigned NCFG   = 25 * NCOL + 7 * NDAC
) (
  input  logic                      clk,
  input  logic                      ts_ck,
  input  logic                      rst_n,
  input  logic [NCOL-1:0][NBUF-1:0] comp,
  input  logic [NCOL-1:0][NBUF-1:0] tdc_fired,
  output logic [NCOL-1:0][NBUF-1:0] hit,
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

  logic [TS_W-1:0]  ts_rise, ts_fall;
  logic [TS2_W-1:0] ts2;
  logic [TS3_W-1:0] ts3;
  logic             ld_pix, pull_dn, ld_col, rd_col;
  logic             pix_pending, eoc_pending;
  logic [HIT_W-1:0] eoc_data, word;
  logic             word_valid, ser_ready;

  ts_generator #(.CNT_W(TS_W), .TS2_W(TS2_W), .TS3_W(TS3_W)) u_ts (
    .ts_ck, .rst_n, .ts_rise, .ts_fall, .ts2, .ts3
  );

  readout_matrix #(
    .NCOL(NCOL), .NBUF(NBUF), .GROUP(GROUP), .TS1_W(TS1_W), .TS2_W(TS2_W),
    .TS3_W(TS3_W), .ADDR_W(ADDR_W), .COL_W(COL_W), .HAS_TDC(1'b1)
  ) u_matrix (
    .clk, .rst_n, .comp, .tdc_fired, .hit,
    .ts1({ts_fall, ts_rise}), .ts2, .ts3,
    .ld_pix, .pull_dn, .ld_col, .rd_col, .hitbus_dis('0),
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
