// tb_readout_matrix: 4 columns x 40 hit buffers driven directly (LdPix,
// PullDN, LdCol, RdCol from the testbench). Hits in random cells; each LdCol
// round must move the first flagged cell of every non-empty column into its
// EoC, RdCol must return them in column order with the column address added,
// and rounds repeat until no hit is left. Also checks pix_pending/eoc_pending.
`timescale 1ns/1ps
module tb_readout_matrix;
  import det_pkg::*;
  localparam int NCOL = 4, NBUF = 40, G = 10;
  localparam int TS1_W = 20, TS2_W = 10, TS3_W = 7, ADDR_W = 10, COL_W = 5;
  localparam int HW = TS1_W + TS2_W + TS3_W + ADDR_W + COL_W;
  logic clk = 0, rst_n = 0;
  logic [NCOL-1:0][NBUF-1:0] comp = '0, tdc_fired = '1, hit;
  logic [TS1_W-1:0] ts1 = '0; logic [TS2_W-1:0] ts2 = '0; logic [TS3_W-1:0] ts3 = '0;
  logic ld_pix = 0, pull_dn = 0, ld_col = 0, rd_col = 0;
  logic [NCOL-1:0] hitbus_dis = '0, hitbus;
  logic pix_pending, eoc_pending;
  logic [HW-1:0] dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  readout_matrix #(.NCOL(NCOL), .NBUF(NBUF), .GROUP(G)) dut (.*);

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; @(negedge clk) s = 0;
  endtask

  bit hits [NCOL][NBUF];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      foreach (hits[c, k]) hits[c][k] = 0;
      for (int i = 0; i < 14; i++) begin
        automatic int c = $urandom_range(0, NCOL-1);
        automatic int k = $urandom_range(0, NBUF-1);
        hits[c][k] = 1;
        @(negedge clk) ts1 = TS1_W'(i + 100 * r); ts2 = TS2_W'(i + 3);
        comp[c][k] = 1; @(negedge clk) comp[c][k] = 0;
      end
      check("nothing pending before LdPix", pix_pending, 0);
      pulse(ld_pix);
      check("pending after LdPix", pix_pending, 1);
      while (pix_pending) begin
        pulse(pull_dn);
        pulse(ld_col);
        for (int c = 0; c < NCOL; c++) begin
          automatic int k;
          k = -1;
          for (int j = 0; j < NBUF; j++) if (hits[c][j]) begin k = j; break; end
          if (k < 0) continue;
          hits[c][k] = 0;
          check("EoC full", eoc_pending, 1);
          rd_col = 1; #1;
          check("column address", dout[COL_W-1:0], c);
          check("row address (priority order)", dout[COL_W +: ADDR_W], k);
          @(negedge clk) rd_col = 0;
        end
        check("EoCs empty", eoc_pending, 0);
      end
      foreach (hits[c, k]) if (hits[c][k]) begin failures++; $display("FAIL hit %0d,%0d not read", c, k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
