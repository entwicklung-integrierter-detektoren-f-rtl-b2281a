// tb_ts_generator: checks the time stamp generator against its own binary
// count: outputs are Gray codes of an incrementing counter, change by one bit
// per step, the rising-edge stamp changes only on rising edges, the falling-
// edge copy is one behind in the first half period and equal in the second,
// and TS2/TS3 are the low bits of the same count.
`timescale 1ns/1ps
module tb_ts_generator;
  import det_pkg::*;
  logic ts_ck = 0, rst_n = 0;
  logic [9:0] ts_rise, ts_fall, ts2;
  logic [6:0] ts3;
  int checks = 0, failures = 0;

  always #5 ts_ck = ~ts_ck;

  ts_generator #(.CNT_W(10), .TS2_W(10), .TS3_W(7)) dut (.*);

  task automatic check(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time); end
  endtask

  logic [9:0] prev;
  int unsigned n;
  initial begin
    #12 rst_n = 1;
    @(posedge ts_ck); #1;
    n = gray2bin(32'(ts_rise));
    prev = ts_rise;
    for (int k = 0; k < 2100; k++) begin
      @(posedge ts_ck); #1;
      n = (n + 1) & 32'h3FF;
      check("TS11 counts", gray2bin(32'(ts_rise)), n);
      check("one bit changes", $countones(ts_rise ^ prev), 1);
      check("TS12 one behind in first half", gray2bin(32'(ts_fall)), (n - 1) & 32'h3FF);
      check("TS2 same count", gray2bin(32'(ts2)), n);
      check("TS3 low 7 bits", gray2bin(32'(ts3)), n & 32'h7F);
      prev = ts_rise;
      #3;   // still high half: no change
      check("TS11 stable in high half", ts_rise, prev);
      @(negedge ts_ck); #1;
      check("TS12 equal in second half", ts_fall, ts_rise);
      check("TS11 stable at falling edge", ts_rise, prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
