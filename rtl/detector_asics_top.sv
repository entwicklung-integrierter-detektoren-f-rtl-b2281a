// detector_asics_top: the digital logic of four pixel detector chips, side
// by side, each with its own ports (they share nothing but reset).
//
//  - MPROC (mproc_*): hybrid readout chip for X-ray imaging. 8100 pixels with
//    two readout channels each; every hit is stored in its pixel with a coarse
//    time stamp, a falling-edge stamp for the time over threshold and a fine
//    stamp, and read out through end-of-column blocks and a serializer.
//  - HVMAPS25 (h25_*): monolithic sensor, 17280 pixels, the same readout with
//    10 bit time and 6 bit ToT and no fine stamp.
//  - CCPD53 (ccpd_*): sensor chip read capacitively; its logic is the
//    address encoding of each group of 16 pixels onto 8 pads (40 columns x 4
//    groups of 16 = 64 pixels per column).
//  - PHOTON (photon_*): counting readout chip used for CCPD53, 32 x 30
//    pixels with 13 bit counters.
// Analog parts (amplifiers, comparators, TDC ramps, DACs, PLL) are outside:
// their digital signals are ports.
module detector_asics_top #(
  parameter int unsigned MPROC_NCOL = 30,
  parameter int unsigned MPROC_NBUF = 540,
  parameter int unsigned MPROC_NDAC = 16,
  parameter int unsigned H25_NCOL   = 30,
  parameter int unsigned H25_NGRP   = 48,
  parameter int unsigned CCPD_NCOL  = 40,
  parameter int unsigned CCPD_NGRP  = 4,
  parameter int unsigned PH_NX      = 32,
  parameter int unsigned PH_NY      = 30,
  localparam int unsigned MPROC_NCFG = 25 * MPROC_NCOL + 7 * MPROC_NDAC,
  localparam int unsigned H25_NBUF   = 12 * H25_NGRP,
  localparam int unsigned H25_NCFG   = 6 * H25_NGRP + 8 * H25_NCOL
) (
  input  logic                                  rst_n,
  // MPROC
  input  logic                                  mproc_clk,
  input  logic                                  mproc_ts_ck,
  input  logic [MPROC_NCOL-1:0][MPROC_NBUF-1:0] mproc_comp,
  input  logic [MPROC_NCOL-1:0][MPROC_NBUF-1:0] mproc_tdc_fired,
  output logic [MPROC_NCOL-1:0][MPROC_NBUF-1:0] mproc_hit,
  output logic [MPROC_NCOL-1:0]                 mproc_hitbus,
  input  logic                                  mproc_cfg_ck1,
  input  logic                                  mproc_cfg_ck2,
  input  logic                                  mproc_cfg_sin,
  input  logic                                  mproc_cfg_load,
  input  logic                                  mproc_cfg_rb,
  output logic                                  mproc_cfg_sout,
  output logic [MPROC_NCFG-1:0]                 mproc_cfg_q,
  output logic [1:0]                            mproc_bit_data,
  output logic                                  mproc_ser_out,
  // HVMAPS25
  input  logic                                  h25_clk,
  input  logic                                  h25_ts_ck,
  input  logic [H25_NCOL-1:0][H25_NBUF-1:0]     h25_comp,
  output logic [H25_NCOL-1:0]                   h25_hitbus,
  input  logic                                  h25_cfg_ck1,
  input  logic                                  h25_cfg_ck2,
  input  logic                                  h25_cfg_sin,
  input  logic                                  h25_cfg_load,
  input  logic                                  h25_cfg_rb,
  output logic                                  h25_cfg_sout,
  output logic [H25_NCFG-1:0]                   h25_cfg_q,
  output logic [1:0]                            h25_bit_data,
  output logic                                  h25_ser_out,
  // CCPD53: OutR/OutL of every pixel, 16 pixels per group
  input  logic [CCPD_NCOL-1:0][CCPD_NGRP-1:0][15:0] ccpd_out_r,
  input  logic [CCPD_NCOL-1:0][CCPD_NGRP-1:0][15:0] ccpd_out_l,
  output logic [CCPD_NCOL-1:0][CCPD_NGRP-1:0][3:0]  ccpd_pad_idx,
  output logic [CCPD_NCOL-1:0][CCPD_NGRP-1:0][3:0]  ccpd_pad_grp,
  // PHOTON
  input  logic                                  photon_clk,
  input  logic [PH_NY-1:0][PH_NX-1:0]           photon_comp,
  input  logic [PH_NY-1:0][PH_NX-1:0]           photon_mask,
  input  logic                                  photon_shutter,
  input  logic                                  photon_clear,
  output logic [12:0]                           photon_count [PH_NY][PH_NX]
);

  mproc_chip #(.NCOL(MPROC_NCOL), .NBUF(MPROC_NBUF), .NDAC(MPROC_NDAC)) u_mproc (
    .clk(mproc_clk), .ts_ck(mproc_ts_ck), .rst_n,
    .comp(mproc_comp), .tdc_fired(mproc_tdc_fired), .hit(mproc_hit),
    .hitbus(mproc_hitbus),
    .cfg_ck1(mproc_cfg_ck1), .cfg_ck2(mproc_cfg_ck2), .cfg_sin(mproc_cfg_sin),
    .cfg_load(mproc_cfg_load), .cfg_rb(mproc_cfg_rb), .cfg_sout(mproc_cfg_sout),
    .cfg_q(mproc_cfg_q), .bit_data(mproc_bit_data), .ser_out(mproc_ser_out)
  );

  hvmaps25_chip #(.NCOL(H25_NCOL), .NGRP(H25_NGRP)) u_h25 (
    .clk(h25_clk), .ts_ck(h25_ts_ck), .rst_n,
    .comp(h25_comp), .hitbus(h25_hitbus),
    .cfg_ck1(h25_cfg_ck1), .cfg_ck2(h25_cfg_ck2), .cfg_sin(h25_cfg_sin),
    .cfg_load(h25_cfg_load), .cfg_rb(h25_cfg_rb), .cfg_sout(h25_cfg_sout),
    .cfg_q(h25_cfg_q), .bit_data(h25_bit_data), .ser_out(h25_ser_out)
  );

  for (genvar c = 0; c < CCPD_NCOL; c++) begin : g_ccpd_col
    for (genvar g = 0; g < CCPD_NGRP; g++) begin : g_ccpd_grp
      ccpd53_encoder u_enc (
        .out_r(ccpd_out_r[c][g]), .out_l(ccpd_out_l[c][g]),
        .pad_idx(ccpd_pad_idx[c][g]), .pad_grp(ccpd_pad_grp[c][g])
      );
    end
  end

  photon_matrix #(.NX(PH_NX), .NY(PH_NY), .CNT_W(13)) u_photon (
    .clk(photon_clk), .rst_n, .comp(photon_comp), .mask(photon_mask),
    .shutter(photon_shutter), .clear(photon_clear), .count(photon_count)
  );

endmodule
