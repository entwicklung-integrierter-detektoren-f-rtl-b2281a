// tb_cfg_register: a 97 bit chain. Shifts a random pattern in, loads it,
// checks every q bit, checks q is stable while a second pattern is shifted,
// then reads the stored pattern back through Rb and sout.
`timescale 1ns/1ps
module tb_cfg_register;
  localparam int N = 97;
  logic clk = 0, rst_n = 0, ck1 = 0, ck2 = 0, sin = 0, load = 0, rb = 0, sout;
  logic [N-1:0] q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  cfg_register #(.NBITS(N)) dut (.*);

  task automatic shift(input logic b);
    sin = b; #7 ck1 = 1; #10 ck1 = 0; #7 ck2 = 1; #10 ck2 = 0; #7;
  endtask

  logic [N-1:0] pat, pat2, rd;
  initial begin
    #22 rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < N; i++) pat[i] = 1'($urandom);
      // the first bit shifted ends in cell N-1
      for (int i = N-1; i >= 0; i--) shift(pat[i]);
      @(negedge clk) load = 1; @(negedge clk) load = 0; @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++; if (q[i] !== pat[i]) begin failures++; $display("FAIL q[%0d]", i); end
      end
      for (int i = 0; i < N; i++) pat2[i] = 1'($urandom);
      for (int i = N-1; i >= 0; i--) shift(pat2[i]);
      checks++; if (q !== pat) begin failures++; $display("FAIL q moved while shifting"); end
      // read back: copy stored bits into the shift stages, shift out
      rb = 1; shift(0); rb = 0;
      for (int i = N-1; i >= 0; i--) begin rd[i] = sout; shift(0); end
      checks++; if (rd !== pat) begin failures++; $display("FAIL read back %h vs %h", rd, pat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
