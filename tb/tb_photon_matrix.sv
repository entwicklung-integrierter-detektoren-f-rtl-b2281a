// tb_photon_matrix: full 32 x 30 matrix. Each pixel gets its own random
// number of comparator pulses during the shutter (some pixels masked);
// every counter must hold exactly its own number.
`timescale 1ns/1ps
module tb_photon_matrix;
  localparam int NX = 32, NY = 30;
  logic clk = 0, rst_n = 0, shutter = 0, clear = 0;
  logic [NY-1:0][NX-1:0] comp = '0, mask = '0;
  logic [12:0] count [NY][NX];
  int checks = 0, failures = 0;
  int exp_n [NY][NX];
  always #5 clk = ~clk;
  photon_matrix #(.NX(NX), .NY(NY), .CNT_W(13)) dut (.*);

  initial begin
    for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) begin
      exp_n[y][x] = $urandom_range(0, 40);
      mask[y][x]  = ($urandom_range(0, 9) == 0);
    end
    repeat (2) @(negedge clk); rst_n = 1;
    shutter = 1;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) comp[y][x] = (k < exp_n[y][x]);
      @(negedge clk) comp = '0;
    end
    shutter = 0; @(negedge clk);
    for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) begin
      checks++;
      if (count[y][x] != (mask[y][x] ? 0 : exp_n[y][x])) begin
        failures++; $display("FAIL pixel %0d,%0d: %0d", y, x, count[y][x]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
