// tb_cfg_bit: one configuration bit. Checks two-phase shifting (ck1 then
// ck2), that Load stores the shifted value, that q does not change while
// shifting, that a single upset copy is repaired (q unchanged, copies equal
// again), that read-back through Rb returns the stored value, and that two
// simultaneous upsets do flip q (the limit of triple redundancy).
`timescale 1ns/1ps
module tb_cfg_bit;
  logic clk = 0, rst_n = 0, ck1 = 0, ck2 = 0, sin = 0, load = 0, rb = 0, sout, q;
  logic [2:0] upset = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cfg_bit dut (.*);

  task automatic check(input string what, input logic got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b expected %0b", what, got, exp); end
  endtask
  task automatic shift(input logic b);
    sin = b; #7 ck1 = 1; #10 ck1 = 0; #7 ck2 = 1; #10 ck2 = 0; #7;
  endtask
  task automatic do_load();
    @(negedge clk) load = 1; @(negedge clk) load = 0; @(negedge clk);
  endtask

  logic v;
  initial begin
    #22 rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      v = 1'($urandom);
      sin = v; #7 ck1 = 1; #10 ck1 = 0; #3;
      check("ck1 alone does not move sout", sout, dut.sout);
      #4 ck2 = 1; #10 ck2 = 0; #7;
      check("shifted", sout, v);
      do_load();
      check("loaded", q, v);
      shift(~v);
      check("q holds while shifting", q, v);
      // single upset in a random copy
      @(negedge clk) upset = 3'b001 << $urandom_range(0, 2);
      @(negedge clk) upset = 0;
      check("single upset masked", q, v);
      repeat (2) @(negedge clk);
      check("refreshed", (dut.copy == 3'b000 || dut.copy == 3'b111), 1);
      // read back
      rb = 1; #7 ck1 = 1; #10 ck1 = 0; #7 ck2 = 1; #10 ck2 = 0; #7 rb = 0;
      check("read back", sout, v);
    end
    // double upset defeats the majority
    shift(1); do_load();
    @(negedge clk) upset = 3'b011; @(negedge clk) upset = 0; #1;
    check("double upset flips q", q, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
