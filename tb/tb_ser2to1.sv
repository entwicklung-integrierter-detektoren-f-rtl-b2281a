// tb_ser2to1: random two-bit words; the serial line must carry d[1] in the
// high half and d[0] in the low half of the clock period after the word was
// taken.
`timescale 1ns/1ps
module tb_ser2to1;
  logic clk = 0, rst_n = 0, q;
  logic [1:0] d = 0, prev;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ser2to1 dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk) d = 2'($urandom);
      prev = d;
      @(posedge clk); #2;
      checks++; if (q !== prev[1]) begin failures++; $display("FAIL high half"); end
      @(negedge clk); #2;
      checks++; if (q !== prev[0]) begin failures++; $display("FAIL low half"); end
      d = 2'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
