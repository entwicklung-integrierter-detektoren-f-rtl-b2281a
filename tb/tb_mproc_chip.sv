// tb_mproc_chip: end-to-end test of the MPROC digital part (reduced matrix).
//
// A readout_agent injects hits on the comparator inputs, models the pixel
// fine-time ramps, rebuilds the 64 bit frames from the 2 bit output and checks
// every 52 bit word (TS1 rising and falling-edge copies, TS2, TS3, row,
// column) against its own time stamp counters; it also checks that every
// readout mechanism occurred. This bench first checks the configuration
// register: shift a random pattern in, load it, compare the outputs, then
// read it back through the chain. The DDR output is checked against the
// 2 bit stream. Parameters NCOL and NBUF are reduced for speed.
`timescale 1ns/1ps
module tb_mproc_chip #(
  parameter int NCOL = 4,
  parameter int NBUF = 90,
  parameter int NDAC = 2,
  parameter int NHITS = 120
);
  import det_pkg::*;
  localparam int NCFG = 25 * NCOL + 7 * NDAC;

  logic clk = 0, ts_ck = 0, rst_n = 0;
  logic [NCOL-1:0][NBUF-1:0] comp, tdc_fired, hit;
  logic [NCOL-1:0] hitbus;
  logic cfg_ck1 = 0, cfg_ck2 = 0, cfg_sin = 0, cfg_load = 0, cfg_rb = 0, cfg_sout;
  logic [NCFG-1:0] cfg_q;
  logic [1:0] bit_data;
  logic ser_out;
  logic start = 0, done;
  int checks = 0, failures = 0, a_checks, a_failures;

  // 800 MHz readout clock, 100 MHz time stamp clock, edges offset by 0.3 ns
  always #0.625 clk = ~clk;
  initial begin #0.3; forever #5 ts_ck = ~ts_ck; end

  mproc_chip #(.NCOL(NCOL), .NBUF(NBUF), .NDAC(NDAC)) dut (.*);

  readout_agent #(.NCOL(NCOL), .NBUF(NBUF), .TS2_W(10), .TS3_W(7), .TWO_EDGE(1'b1),
                  .HAS_TDC(1'b1), .HIT_W(52), .NHITS(NHITS)) agent (
    .clk, .ts_ck, .rst_n, .start, .comp, .tdc_fired, .hit, .hitbus, .bit_data,
    .rcu_state(3'(dut.u_rcu.state)), .pix_pending(dut.pix_pending),
    .eoc_pending(dut.eoc_pending), .ser_ready(dut.ser_ready), .ld_col(dut.ld_col),
    .rd_pix(dut.u_matrix.rd_pix), .done, .checks(a_checks), .failures(a_failures)
  );

  // DDR output: the word taken at a rising edge is sent bit 1 in the high
  // clock phase, bit 0 in the low phase
  logic [1:0] ddr_w;
  bit ddr_seen = 1'b0;   // low-phase check starts after the first rising edge
  always @(posedge clk) if (rst_n) begin
    ddr_w = bit_data; ddr_seen = 1'b1;
    #0.1 checks++; if (ser_out !== ddr_w[1]) begin failures++; $display("FAIL ddr high phase"); end
  end
  always @(negedge clk) if (rst_n && ddr_seen) begin
    #0.1 checks++; if (ser_out !== ddr_w[0]) begin failures++; $display("FAIL ddr low phase"); end
  end

  task automatic cfg_shift(input logic b);
    cfg_sin = b; #3 cfg_ck1 = 1; #5 cfg_ck1 = 0; #3 cfg_ck2 = 1; #5 cfg_ck2 = 0; #3;
  endtask

  logic [NCFG-1:0] pat, rd;
  initial begin
    repeat (2) @(negedge ts_ck); repeat (4) @(negedge clk); rst_n = 1;   // reset spans time stamp clock edges
    for (int i = 0; i < NCFG; i++) pat[i] = 1'($urandom);
    for (int i = NCFG-1; i >= 0; i--) cfg_shift(pat[i]);
    @(negedge clk) cfg_load = 1; @(negedge clk) cfg_load = 0; @(negedge clk);
    checks++; if (cfg_q !== pat) begin failures++; $display("FAIL config load"); end
    cfg_rb = 1; cfg_shift(0); cfg_rb = 0;
    for (int i = NCFG-1; i >= 0; i--) begin rd[i] = cfg_sout; cfg_shift(0); end
    checks++; if (rd !== pat) begin failures++; $display("FAIL config read back"); end
    start = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + a_checks, failures + a_failures);
    $finish;
  end
  initial begin
    #2ms; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + a_checks, failures + a_failures + 1);
    $finish;
  end
endmodule
