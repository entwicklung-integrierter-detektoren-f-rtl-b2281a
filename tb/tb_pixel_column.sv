// tb_pixel_column: a reduced column (60 cells in groups of 30, two groups)
// gets hits in random cells at random times. After LdPix, repeated RdPix
// pulses must read the hit cells in ascending address order, each word with
// the right address and leading/falling-edge stamps, until col_scan drops.
// Also checks the hit bus and its disable.
`timescale 1ns/1ps
module tb_pixel_column;
  import det_pkg::*;
  localparam int NBUF = 60, G = 30;
  localparam int TS1_W = 20, TS2_W = 10, TS3_W = 7, ADDR_W = 10;
  localparam int W = TS1_W + TS2_W + TS3_W + ADDR_W;

  logic clk = 0, rst_n = 0;
  logic [NBUF-1:0] comp = '0, tdc_fired = '1, hit;
  logic [TS1_W-1:0] ts1; logic [TS2_W-1:0] ts2; logic [TS3_W-1:0] ts3;
  logic ld_pix = 0, rd_pix = 0, hitbus_dis = 0, col_scan, hitbus;
  logic [W-1:0] col_bus;
  int checks = 0, failures = 0;
  int unsigned cnt = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cnt <= cnt + 1;
  assign ts1 = TS1_W'(bin2gray(cnt & 32'hFFFFF));
  assign ts2 = TS2_W'(bin2gray(cnt & 32'h3FF));
  assign ts3 = TS3_W'(bin2gray(cnt & 32'h7F));

  pixel_column #(.NBUF(NBUF), .GROUP(G)) dut (.*);

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  int unsigned t_rise [NBUF], t_fall [NBUF];
  bit          was_hit [NBUF];

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      int nhit;
      foreach (was_hit[k]) was_hit[k] = 0;
      nhit = (round == 0) ? 1 : $urandom_range(2, 12);
      // fire the hits one after another (comparator high 2..6 clocks)
      for (int h = 0; h < nhit; h++) begin
        int k, len;
        do k = $urandom_range(0, NBUF-1); while (was_hit[k]);
        len = $urandom_range(2, 6);
        @(negedge clk) comp[k] = 1;
        #1 check("hit bus follows comparator", hitbus, 1);
        @(posedge clk) t_rise[k] = cnt;
        repeat (len - 1) @(posedge clk);
        t_fall[k] = cnt;
        @(negedge clk) comp[k] = 0;
        was_hit[k] = 1;
      end
      @(negedge clk) check("no scan before LdPix", col_scan, 0);
      ld_pix = 1; @(negedge clk) ld_pix = 0;
      for (int k = 0; k < NBUF; k++) begin
        if (!was_hit[k]) continue;
        check("scan while hits pending", col_scan, 1);
        rd_pix = 1; #1;
        check("address order", col_bus[ADDR_W-1:0], k);
        check("TS1", col_bus[W-1 -: TS1_W], TS1_W'(bin2gray(t_rise[k] & 32'hFFFFF)));
        check("TS2", col_bus[W-TS1_W-1 -: TS2_W], TS2_W'(bin2gray(t_fall[k] & 32'h3FF)));
        @(negedge clk) rd_pix = 0;
        @(negedge clk);
      end
      check("column empty", col_scan, 0);
    end
    hitbus_dis = 1; comp[5] = 1; #1;
    check("hit bus disabled", hitbus, 0);
    comp[5] = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
