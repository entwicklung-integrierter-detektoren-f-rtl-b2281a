// tb_hit_buffer: self-checking test of one readout cell.
// The cell's clock is also the time stamp clock here (TS advances every
// clock, Gray coded). Checks: leading-edge stamp, falling-edge stamp (ToT),
// hitflag only after LdPix, read word, clear on read, no drive when not
// enabled, dead time while a hit is stored, and the fine time stamp from the
// TDC ramp model (later hit phase -> later crossing).
`timescale 1ns/1ps
module tb_hit_buffer;
  import det_pkg::*;
  localparam int TS1_W = 20, TS2_W = 10, TS3_W = 7, ADDR_W = 10;
  localparam int ROW = 517;
  localparam int W = TS1_W + TS2_W + TS3_W + ADDR_W;

  logic clk = 0, rst_n = 0;
  logic comp = 0, ld_pix = 0, rd_pix = 0, enable = 0;
  logic [TS1_W-1:0] ts1;
  logic [TS2_W-1:0] ts2;
  logic [TS3_W-1:0] ts3;
  logic tdc_fired, hit, hitflag;
  logic [W-1:0] bus_out;
  int checks = 0, failures = 0;
  int unsigned cnt;

  always #5 clk = ~clk;   // 10 ns: TS clock

  wire [ADDR_W-1:0] row_addr = ADDR_W'(ROW);
  hit_buffer #(.TS1_W(TS1_W), .TS2_W(TS2_W), .TS3_W(TS3_W), .ADDR_W(ADDR_W),
               .HAS_TDC(1'b1)) dut (.*);

  tdc_ramp_model #(.T_CK(10.0), .RATIO(100.0), .VTH(1100.0)) u_tdc (
    .comp, .hit, .ts_ck(clk), .fired(tdc_fired));

  // time stamps: binary counter cnt, distributed Gray coded
  always @(posedge clk) cnt <= cnt + 1;
  assign ts1 = TS1_W'(bin2gray(32'(cnt & 32'hFFFFF)));
  assign ts2 = TS2_W'(bin2gray(32'(cnt & 32'h3FF)));
  assign ts3 = TS3_W'(bin2gray(32'(cnt & 32'h7F)));

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // one hit: comparator rises `phase` ns after a clock edge and stays high for
  // `len` clock periods; returns the counter values at the rise/fall samples
  task automatic do_hit(input real phase, input int len, output int unsigned c_rise, output int unsigned c_fall);
    @(posedge clk); #(phase);
    comp = 1;
    @(posedge clk); c_rise = cnt;         // first edge that sees comp high
    repeat (len - 1) @(posedge clk);
    c_fall = cnt;                          // last edge that sees comp high
    #1 comp = 0;
  endtask

  int unsigned r, f, r2, f2, ts3_a, ts3_b;
  logic [W-1:0] word;
  int unsigned fine_a, fine_b;

  initial begin
    cnt = 32'($urandom_range(0, 1000));
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- hit 1: early phase ----
    do_hit(1.0, 7, r, f);
    repeat (3) @(posedge clk);
    check("hit set", hit, 1);
    check("no hitflag before LdPix", hitflag, 0);
    // wait until the TDC ramp has fired, then some more
    wait (tdc_fired); repeat (2) @(posedge clk);
    @(negedge clk) ld_pix = 1; @(negedge clk) ld_pix = 0;
    check("hitflag after LdPix", hitflag, 1);
    // not enabled: no drive
    @(negedge clk) rd_pix = 1; enable = 0;
    #1 check("bus idle when not enabled", bus_out, 0);
    @(negedge clk) rd_pix = 0;
    check("not cleared by foreign read", hitflag, 1);
    @(negedge clk) rd_pix = 1; enable = 1;
    #1 word = bus_out;
    check("TS1 = stamp at rising edge", word[W-1 -: TS1_W], TS1_W'(bin2gray(r & 32'hFFFFF)));
    check("TS2 = stamp at falling edge", word[W-TS1_W-1 -: TS2_W], TS2_W'(bin2gray(f & 32'h3FF)));
    check("ToT in clocks", (gray2bin(32'(word[W-TS1_W-1 -: TS2_W])) - gray2bin(32'(word[W-1 -: TS1_W]))) & 32'h3FF, 6);
    check("address ROM", word[ADDR_W-1:0], ROW);
    ts3_a = gray2bin(32'(word[ADDR_W +: TS3_W]));
    fine_a = (ts3_a - (r & 32'h7F)) & 32'h7F;
    @(negedge clk) rd_pix = 0; enable = 0;
    check("hit cleared by read", hit, 0);
    check("hitflag cleared by read", hitflag, 0);

    // ---- hit 2: late phase (just before the next edge) -> larger dTS3 ----
    repeat (3) @(posedge clk);
    do_hit(9.0, 3, r2, f2);
    // a second comparator pulse while the hit is stored must not move TS1
    repeat (2) @(posedge clk);
    wait (tdc_fired); repeat (2) @(posedge clk);
    @(negedge clk) ld_pix = 1; @(negedge clk) ld_pix = 0;
    @(negedge clk) rd_pix = 1; enable = 1;
    #1 word = bus_out;
    check("TS1 hit 2", word[W-1 -: TS1_W], TS1_W'(bin2gray(r2 & 32'hFFFFF)));
    check("ToT hit 2", (gray2bin(32'(word[W-TS1_W-1 -: TS2_W])) - gray2bin(32'(word[W-1 -: TS1_W]))) & 32'h3FF, 2);
    ts3_b = gray2bin(32'(word[ADDR_W +: TS3_W]));
    fine_b = (ts3_b - ((r2 - 1) & 32'h7F)) & 32'h7F;
    @(negedge clk) rd_pix = 0; enable = 0;
    // early hit (1 ns after edge): ~ (1100-909)/10 = 19 periods; late hit: ~ (1100-101)/10 = 100
    checks++;
    if (!(fine_a >= 17 && fine_a <= 22 && fine_b >= 97 && fine_b <= 103)) begin
      failures++; $display("FAIL fine stamps: early %0d late %0d", fine_a, fine_b);
    end

    // ---- no LdPix -> no flag ----
    do_hit(3.0, 2, r, f);
    repeat (4) @(posedge clk);
    check("hit without LdPix is not flagged", hitflag, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
