// tb_hvmaps25_chip: end-to-end test of the HVMAPS25 digital part (reduced
// matrix).
//
// Checks the row/column configuration register (load and read-back), then
// loads a configuration whose column bit 6 disables the hit bus of column 0
// and runs a readout_agent: random hits on the comparator inputs, frames
// rebuilt from the 2 bit output, every 32 bit word (10 bit time stamp,
// 6 bit ToT stamp, an unused fine-time bit, row, column) checked, and every
// readout mechanism counted. The disabled hit bus must stay low while its
// column is hit. Parameters are reduced for speed.
`timescale 1ns/1ps
module tb_hvmaps25_chip #(
  parameter int NCOL = 4,
  parameter int NGRP = 8,
  parameter int NHITS = 120
);
  import det_pkg::*;
  localparam int NBUF = 12 * NGRP;
  localparam int ROWCFG = 6 * NGRP;
  localparam int NCFG = ROWCFG + 8 * NCOL;

  logic clk = 0, ts_ck = 0, rst_n = 0;
  logic [NCOL-1:0][NBUF-1:0] comp, tdc_unused;
  logic [NCOL-1:0] hitbus;
  logic cfg_ck1 = 0, cfg_ck2 = 0, cfg_sin = 0, cfg_load = 0, cfg_rb = 0, cfg_sout;
  logic [NCFG-1:0] cfg_q;
  logic [1:0] bit_data;
  logic ser_out;
  logic start = 0, done;
  int checks = 0, failures = 0, a_checks, a_failures;
  int col0_hit_cycles = 0, col0_bus_cycles = 0;

  always #0.625 clk = ~clk;
  initial begin #0.3; forever #5 ts_ck = ~ts_ck; end

  hvmaps25_chip #(.NCOL(NCOL), .NGRP(NGRP)) dut (.*);

  readout_agent #(.NCOL(NCOL), .NBUF(NBUF), .TS2_W(6), .TS3_W(1), .TWO_EDGE(1'b0),
                  .HAS_TDC(1'b0), .HIT_W(32), .NHITS(NHITS)) agent (
    .clk, .ts_ck, .rst_n, .start, .comp, .tdc_fired(tdc_unused), .hit(dut.hit_unused),
    .hitbus, .bit_data,
    .rcu_state(3'(dut.u_rcu.state)), .pix_pending(dut.pix_pending),
    .eoc_pending(dut.eoc_pending), .ser_ready(dut.ser_ready), .ld_col(dut.ld_col),
    .rd_pix(dut.u_matrix.rd_pix), .done, .checks(a_checks), .failures(a_failures)
  );

  always @(posedge clk) if (start) begin
    if (|comp[0]) col0_hit_cycles++;
    if (hitbus[0]) col0_bus_cycles++;
  end

  task automatic cfg_shift(input logic b);
    cfg_sin = b; #3 cfg_ck1 = 1; #5 cfg_ck1 = 0; #3 cfg_ck2 = 1; #5 cfg_ck2 = 0; #3;
  endtask
  task automatic cfg_write(input logic [NCFG-1:0] v);
    for (int i = NCFG-1; i >= 0; i--) cfg_shift(v[i]);
    @(negedge clk) cfg_load = 1; @(negedge clk) cfg_load = 0; @(negedge clk);
  endtask

  logic [NCFG-1:0] pat, rd;
  initial begin
    repeat (2) @(negedge ts_ck); repeat (4) @(negedge clk); rst_n = 1;   // reset spans time stamp clock edges
    for (int i = 0; i < NCFG; i++) pat[i] = 1'($urandom);
    cfg_write(pat);
    checks++; if (cfg_q !== pat) begin failures++; $display("FAIL config load"); end
    cfg_rb = 1; cfg_shift(0); cfg_rb = 0;
    for (int i = NCFG-1; i >= 0; i--) begin rd[i] = cfg_sout; cfg_shift(0); end
    checks++; if (rd !== pat) begin failures++; $display("FAIL config read back"); end
    // hit bus of column 0 off, all others on
    pat = '0; pat[ROWCFG + 6] = 1'b1;
    cfg_write(pat);
    checks++; if (cfg_q !== pat) begin failures++; $display("FAIL config load 2"); end
    start = 1;
    wait (done);
    $display("column 0: %0d cycles with a comparator high, %0d with its hit bus high",
             col0_hit_cycles, col0_bus_cycles);
    checks++; if (col0_hit_cycles == 0) begin failures++; $display("FAIL column 0 never hit"); end
    checks++; if (col0_bus_cycles != 0) begin failures++; $display("FAIL disabled hit bus active"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + a_checks, failures + a_failures);
    $finish;
  end
  initial begin
    #2ms; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + a_checks, failures + a_failures + 1);
    $finish;
  end
endmodule
