// tb_detector_asics_top: end-to-end test of the whole design at its full
// size (30 x 540 MPROC hit buffers, 30 x 576 HVMAPS25 hit buffers, 40 x 4
// CCPD53 encoder groups, a 32 x 30 PHOTON counter matrix), default
// parameters.
//
// MPROC and HVMAPS25: both configuration registers are loaded and read back
// (the HVMAPS25 one then disables the hit bus of column 0), then a
// readout_agent per chip injects hits, rebuilds the output frames, checks
// every word against its own time stamp counters and requires each readout
// mechanism to occur (several hits per column in one round, several columns
// per LdCol, serializer back-pressure, hits during readout, dead-time pulses,
// hit bus). The MPROC DDR output is checked against its 2 bit stream.
// CCPD53: every group gets single hits on every pixel (one index pad and one
// subgroup pad must rise) and random multi-pixel patterns (wired OR).
// PHOTON: random comparator pulses with random masks and shutter windows,
// checked against a per-pixel reference count, then a clear, and one pixel
// driven past 8191 counts to check saturation.
// All run concurrently; the bench ends when all parts are done.
`timescale 1ns/1ps
module tb_detector_asics_top;
  import det_pkg::*;
  localparam int MNCOL = 30, MNBUF = 540, MNCFG = 25 * 30 + 7 * 16;
  localparam int HNCOL = 30, HNBUF = 576, HROW = 6 * 48, HNCFG = HROW + 8 * 30;
  localparam int CNCOL = 40, CNGRP = 4, PX = 32, PY = 30;

  logic rst_n = 0;
  logic clk = 0, ts_ck = 0, ph_clk = 0;
  always #0.625 clk = ~clk;
  initial begin #0.3; forever #5 ts_ck = ~ts_ck; end
  always #2 ph_clk = ~ph_clk;

  // MPROC
  logic [MNCOL-1:0][MNBUF-1:0] m_comp, m_tdc, m_hit;
  logic [MNCOL-1:0] m_hitbus;
  logic m_ck1 = 0, m_ck2 = 0, m_sin = 0, m_load = 0, m_rb = 0, m_sout;
  logic [MNCFG-1:0] m_cfg_q;
  logic [1:0] m_bits;
  logic m_ser;
  // HVMAPS25
  logic [HNCOL-1:0][HNBUF-1:0] h_comp, h_tdc_unused;
  logic [HNCOL-1:0] h_hitbus;
  logic h_ck1 = 0, h_ck2 = 0, h_sin = 0, h_load = 0, h_rb = 0, h_sout;
  logic [HNCFG-1:0] h_cfg_q;
  logic [1:0] h_bits;
  logic h_ser;
  // CCPD53
  logic [CNCOL-1:0][CNGRP-1:0][15:0] c_r = '0, c_l = '0;
  logic [CNCOL-1:0][CNGRP-1:0][3:0]  c_idx, c_grp;
  // PHOTON
  logic [PY-1:0][PX-1:0] p_comp = '0, p_mask = '0;
  logic p_shutter = 0, p_clear = 0;
  logic [12:0] p_count [PY][PX];

  detector_asics_top dut (
    .rst_n,
    .mproc_clk(clk), .mproc_ts_ck(ts_ck), .mproc_comp(m_comp), .mproc_tdc_fired(m_tdc),
    .mproc_hit(m_hit), .mproc_hitbus(m_hitbus),
    .mproc_cfg_ck1(m_ck1), .mproc_cfg_ck2(m_ck2), .mproc_cfg_sin(m_sin),
    .mproc_cfg_load(m_load), .mproc_cfg_rb(m_rb), .mproc_cfg_sout(m_sout),
    .mproc_cfg_q(m_cfg_q), .mproc_bit_data(m_bits), .mproc_ser_out(m_ser),
    .h25_clk(clk), .h25_ts_ck(ts_ck), .h25_comp(h_comp), .h25_hitbus(h_hitbus),
    .h25_cfg_ck1(h_ck1), .h25_cfg_ck2(h_ck2), .h25_cfg_sin(h_sin),
    .h25_cfg_load(h_load), .h25_cfg_rb(h_rb), .h25_cfg_sout(h_sout),
    .h25_cfg_q(h_cfg_q), .h25_bit_data(h_bits), .h25_ser_out(h_ser),
    .ccpd_out_r(c_r), .ccpd_out_l(c_l), .ccpd_pad_idx(c_idx), .ccpd_pad_grp(c_grp),
    .photon_clk(ph_clk), .photon_comp(p_comp), .photon_mask(p_mask),
    .photon_shutter(p_shutter), .photon_clear(p_clear), .photon_count(p_count)
  );

  logic m_start = 0, m_done, h_start = 0, h_done;
  int m_checks, m_failures, h_checks, h_failures;
  int checks = 0, failures = 0;

  readout_agent #(.NCOL(MNCOL), .NBUF(MNBUF), .TS2_W(10), .TS3_W(7), .TWO_EDGE(1'b1),
                  .HAS_TDC(1'b1), .HIT_W(52), .NHITS(150)) m_agent (
    .clk, .ts_ck, .rst_n, .start(m_start), .comp(m_comp), .tdc_fired(m_tdc), .hit(m_hit),
    .hitbus(m_hitbus), .bit_data(m_bits),
    .rcu_state(3'(dut.u_mproc.u_rcu.state)), .pix_pending(dut.u_mproc.pix_pending),
    .eoc_pending(dut.u_mproc.eoc_pending), .ser_ready(dut.u_mproc.ser_ready),
    .ld_col(dut.u_mproc.ld_col), .rd_pix(dut.u_mproc.u_matrix.rd_pix),
    .done(m_done), .checks(m_checks), .failures(m_failures)
  );

  readout_agent #(.NCOL(HNCOL), .NBUF(HNBUF), .TS2_W(6), .TS3_W(1), .TWO_EDGE(1'b0),
                  .HAS_TDC(1'b0), .HIT_W(32), .NHITS(150)) h_agent (
    .clk, .ts_ck, .rst_n, .start(h_start), .comp(h_comp), .tdc_fired(h_tdc_unused),
    .hit(dut.u_h25.hit_unused), .hitbus(h_hitbus), .bit_data(h_bits),
    .rcu_state(3'(dut.u_h25.u_rcu.state)), .pix_pending(dut.u_h25.pix_pending),
    .eoc_pending(dut.u_h25.eoc_pending), .ser_ready(dut.u_h25.ser_ready),
    .ld_col(dut.u_h25.ld_col), .rd_pix(dut.u_h25.u_matrix.rd_pix),
    .done(h_done), .checks(h_checks), .failures(h_failures)
  );

  // ---- MPROC DDR output ----
  logic [1:0] ddr_w;
  bit ddr_seen = 1'b0;   // low-phase check starts after the first rising edge
  int n_ddr = 0;
  always @(posedge clk) if (rst_n) begin
    ddr_w = m_bits; ddr_seen = 1'b1;
    #0.1 checks++; n_ddr++; if (m_ser !== ddr_w[1]) begin failures++; $display("FAIL ddr high phase"); end
  end
  always @(negedge clk) if (rst_n && ddr_seen) begin
    #0.1 checks++; if (m_ser !== ddr_w[0]) begin failures++; $display("FAIL ddr low phase"); end
  end

  // ---- HVMAPS25 disabled hit bus ----
  int col0_hit_cycles = 0, col0_bus_cycles = 0;
  always @(posedge clk) if (h_start) begin
    if (|h_comp[0]) col0_hit_cycles++;
    if (h_hitbus[0]) col0_bus_cycles++;
  end

  // ---- configuration tasks (two-phase shift, load, read-back) ----
  logic [MNCFG-1:0] m_pat, m_rd;
  logic [HNCFG-1:0] h_pat, h_rd;
  task automatic m_shift(input logic b);
    m_sin = b; #1 m_ck1 = 1; #2 m_ck1 = 0; #1 m_ck2 = 1; #2 m_ck2 = 0; #1;
  endtask
  task automatic h_shift(input logic b);
    h_sin = b; #1 h_ck1 = 1; #2 h_ck1 = 0; #1 h_ck2 = 1; #2 h_ck2 = 0; #1;
  endtask

  int n_cfg = 0;
  initial begin : mproc_seq
    wait (rst_n); repeat (2) @(negedge clk);
    for (int i = 0; i < MNCFG; i++) m_pat[i] = 1'($urandom);
    for (int i = MNCFG-1; i >= 0; i--) m_shift(m_pat[i]);
    @(negedge clk) m_load = 1; @(negedge clk) m_load = 0; @(negedge clk);
    checks++; n_cfg++; if (m_cfg_q !== m_pat) begin failures++; $display("FAIL mproc config load"); end
    m_rb = 1; m_shift(0); m_rb = 0;
    for (int i = MNCFG-1; i >= 0; i--) begin m_rd[i] = m_sout; m_shift(0); end
    checks++; n_cfg++; if (m_rd !== m_pat) begin failures++; $display("FAIL mproc config read back"); end
    m_start = 1;
  end
  initial begin : h25_seq
    wait (rst_n); repeat (2) @(negedge clk);
    for (int i = 0; i < HNCFG; i++) h_pat[i] = 1'($urandom);
    for (int i = HNCFG-1; i >= 0; i--) h_shift(h_pat[i]);
    @(negedge clk) h_load = 1; @(negedge clk) h_load = 0; @(negedge clk);
    checks++; n_cfg++; if (h_cfg_q !== h_pat) begin failures++; $display("FAIL h25 config load"); end
    h_rb = 1; h_shift(0); h_rb = 0;
    for (int i = HNCFG-1; i >= 0; i--) begin h_rd[i] = h_sout; h_shift(0); end
    checks++; n_cfg++; if (h_rd !== h_pat) begin failures++; $display("FAIL h25 config read back"); end
    h_pat = '0; h_pat[HROW + 6] = 1'b1;
    for (int i = HNCFG-1; i >= 0; i--) h_shift(h_pat[i]);
    @(negedge clk) h_load = 1; @(negedge clk) h_load = 0; @(negedge clk);
    checks++; n_cfg++; if (h_cfg_q !== h_pat) begin failures++; $display("FAIL h25 config load 2"); end
    h_start = 1;
  end

  // ---- CCPD53 encoders ----
  bit c_done = 0;
  int n_ccpd_single = 0, n_ccpd_multi = 0;
  initial begin : ccpd_seq
    logic [3:0] e_idx, e_grp;
    wait (rst_n);
    for (int p = 0; p < 16; p++) begin
      for (int c = 0; c < CNCOL; c++)
        for (int g = 0; g < CNGRP; g++) begin
          c_r[c][g] = 16'(1) << ((p + c + g) % 16);
          c_l[c][g] = 16'(1) << ((p + c + g) % 16);
        end
      #1;
      for (int c = 0; c < CNCOL; c++)
        for (int g = 0; g < CNGRP; g++) begin
          automatic int q = (p + c + g) % 16;
          checks++; n_ccpd_single++;
          if (c_idx[c][g] !== 4'(1 << (q % 4)) || c_grp[c][g] !== 4'(1 << (q / 4))) begin
            failures++; $display("FAIL ccpd single pixel %0d in col %0d grp %0d", q, c, g);
          end
        end
    end
    repeat (200) begin
      for (int c = 0; c < CNCOL; c++)
        for (int g = 0; g < CNGRP; g++) begin
          c_r[c][g] = 16'($urandom); c_l[c][g] = 16'($urandom);
        end
      #1;
      for (int c = 0; c < CNCOL; c++)
        for (int g = 0; g < CNGRP; g++) begin
          e_idx = '0; e_grp = '0;
          for (int q = 0; q < 16; q++) begin
            if (c_r[c][g][q]) e_idx[q % 4] = 1'b1;
            if (c_l[c][g][q]) e_grp[q / 4] = 1'b1;
          end
          checks++; n_ccpd_multi++;
          if (c_idx[c][g] !== e_idx || c_grp[c][g] !== e_grp) begin
            failures++; $display("FAIL ccpd pattern col %0d grp %0d", c, g);
          end
        end
    end
    c_done = 1;
  end

  // ---- PHOTON counters ----
  bit p_done = 0;
  int ref_cnt [PY][PX];
  int n_ph_counted = 0, n_ph_masked = 0, n_ph_closed = 0, n_ph_sat = 0, n_ph_clear = 0;
  task automatic ph_check(input string what);
    for (int y = 0; y < PY; y++)
      for (int x = 0; x < PX; x++) begin
        checks++;
        if (p_count[y][x] !== 13'(ref_cnt[y][x])) begin
          failures++;
          $display("FAIL photon %s pixel (%0d,%0d): %0d expected %0d", what, y, x, p_count[y][x], ref_cnt[y][x]);
        end
      end
  endtask
  initial begin : photon_seq
    wait (rst_n);
    for (int y = 0; y < PY; y++) for (int x = 0; x < PX; x++) ref_cnt[y][x] = 0;
    repeat (40) begin
      // a window with a random mask, shutter open or closed
      @(negedge ph_clk);
      p_shutter = ($urandom_range(0, 3) != 0);
      for (int y = 0; y < PY; y++) for (int x = 0; x < PX; x++) p_mask[y][x] = ($urandom_range(0, 7) == 0);
      repeat (20) begin
        @(negedge ph_clk);
        for (int y = 0; y < PY; y++)
          for (int x = 0; x < PX; x++) begin
            if (!p_comp[y][x] && $urandom_range(0, 2) == 0) begin
              p_comp[y][x] = 1'b1;
              if (!p_shutter) n_ph_closed++;
              else if (p_mask[y][x]) n_ph_masked++;
              else begin ref_cnt[y][x]++; n_ph_counted++; end
            end else p_comp[y][x] = 1'b0;
          end
      end
      @(negedge ph_clk) p_comp = '0;
      @(negedge ph_clk);
      ph_check("count");
    end
    p_shutter = 0; @(negedge ph_clk) p_clear = 1; @(negedge ph_clk) p_clear = 0; n_ph_clear++;
    for (int y = 0; y < PY; y++) for (int x = 0; x < PX; x++) ref_cnt[y][x] = 0;
    @(negedge ph_clk) ph_check("clear");
    // saturation of one pixel at 2^13 - 1
    p_mask = '0; p_shutter = 1;
    repeat (8200) begin
      @(negedge ph_clk) p_comp[3][5] = 1'b1;
      @(negedge ph_clk) p_comp[3][5] = 1'b0;
    end
    @(negedge ph_clk);
    ref_cnt[3][5] = 8191; n_ph_sat++;
    ph_check("saturation");
    p_done = 1;
  end

  initial begin
    repeat (2) @(negedge ts_ck); repeat (4) @(negedge clk); rst_n = 1;   // reset spans time stamp clock edges
    wait (m_done && h_done && c_done && p_done);
    $display("mproc: DDR cycles %0d; config transfers %0d", n_ddr, n_cfg);
    $display("hvmaps25 column 0: %0d cycles hit, %0d with its disabled hit bus high", col0_hit_cycles, col0_bus_cycles);
    $display("ccpd53: %0d single-pixel and %0d pattern checks", n_ccpd_single, n_ccpd_multi);
    $display("photon: %0d counted, %0d masked, %0d with shutter closed, %0d clears, %0d saturations",
             n_ph_counted, n_ph_masked, n_ph_closed, n_ph_clear, n_ph_sat);
    checks++; if (col0_hit_cycles == 0) begin failures++; $display("FAIL h25 column 0 never hit"); end
    checks++; if (col0_bus_cycles != 0) begin failures++; $display("FAIL h25 disabled hit bus active"); end
    checks++; if (n_ph_masked == 0 || n_ph_closed == 0 || n_ph_counted == 0) begin
      failures++; $display("FAIL photon mechanism missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks + h_checks, failures + m_failures + h_failures);
    $finish;
  end
  initial begin
    #3ms; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks + h_checks, failures + m_failures + h_failures + 1);
    $finish;
  end
endmodule
