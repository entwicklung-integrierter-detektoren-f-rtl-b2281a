// tb_photon_pixel: counts comparator pulses only while the shutter is open
// and the pixel is unmasked, clears on clear, stops at 8191.
`timescale 1ns/1ps
module tb_photon_pixel;
  logic clk = 0, rst_n = 0, comp = 0, shutter = 0, mask = 0, clear = 0;
  logic [12:0] count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  photon_pixel #(.CNT_W(13)) dut (.*);

  task automatic pulses(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk) comp = 1; repeat ($urandom_range(1, 3)) @(negedge clk); comp = 0;
      repeat ($urandom_range(1, 3)) @(negedge clk);
    end
  endtask
  task automatic check(input string what, input int got, exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int n;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    pulses(5);   check("shutter closed", count, 0);
    shutter = 1; n = $urandom_range(10, 60); pulses(n); shutter = 0; @(negedge clk);
    check("counted in shutter", count, n);
    pulses(4);   check("holds after shutter", count, n);
    mask = 1; shutter = 1; pulses(7); shutter = 0; mask = 0; @(negedge clk);
    check("masked", count, n);
    clear = 1; @(negedge clk) clear = 0; check("clear", count, 0);
    // saturation: preload near the top by counting, then overflow
    shutter = 1;
    for (int i = 0; i < 8200; i++) begin @(negedge clk) comp = 1; @(negedge clk) comp = 0; end
    shutter = 0; @(negedge clk);
    check("saturates", count, 8191);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
