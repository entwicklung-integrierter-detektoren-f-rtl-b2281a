// tb_eoc: end-of-column block with a modelled column. Checks that RdPix is
// given only on LdCol with a pending column hit and an empty EoC, that the
// EoC stores the column word (ORed into a latch cleared by PullDN), that RdCol
// with enable drives {word, column address} and frees the EoC, and that
// without enable it drives nothing.
`timescale 1ns/1ps
module tb_eoc;
  localparam int WORD_W = 47, COL_W = 5, COL = 19;
  logic clk = 0, rst_n = 0;
  logic pull_dn = 0, ld_col = 0, rd_col = 0, col_en = 0, col_scan = 0;
  logic [WORD_W-1:0] col_bus;
  logic rd_pix, flag;
  logic [WORD_W+COL_W-1:0] dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  eoc #(.WORD_W(WORD_W), .COL_W(COL_W), .COL_ADDR(COL)) dut (.*);

  // column model: drives its word only while RdPix is high
  logic [WORD_W-1:0] col_word;
  assign col_bus = rd_pix ? col_word : '0;

  task automatic check(input string what, input logic [63:0] got, exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  logic [WORD_W-1:0] w;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      w = {$urandom, $urandom};
      col_word = w;
      col_scan = (t % 5 != 4);
      @(negedge clk) pull_dn = 1;
      @(negedge clk) pull_dn = 0; ld_col = 1; #1;
      check("RdPix from LdCol and scan", rd_pix, col_scan);
      @(negedge clk) ld_col = 0;
      check("flag", flag, col_scan);
      if (col_scan) begin
        // a second LdCol while full must not read the column
        ld_col = 1; #1 check("no RdPix while full", rd_pix, 0);
        @(negedge clk) ld_col = 0;
        rd_col = 1; col_en = 0; #1;
        check("no drive without enable", dout, 0);
        col_en = 1; #1;
        check("data out", dout, {w, 5'(COL)});
        @(negedge clk) rd_col = 0; col_en = 0;
        check("freed", flag, 0);
      end
    end
    // without PullDN the latch keeps old bits: OR of two words
    col_scan = 1; col_word = 47'h1; 
    @(negedge clk) pull_dn = 1; @(negedge clk) pull_dn = 0; ld_col = 1; @(negedge clk) ld_col = 0;
    rd_col = 1; col_en = 1; @(negedge clk) rd_col = 0; col_en = 0;
    col_word = 47'h2; ld_col = 1; @(negedge clk) ld_col = 0;
    rd_col = 1; col_en = 1; #1;
    check("latch accumulates without PullDN", dout[WORD_W+COL_W-1:COL_W], 47'h3);
    @(negedge clk) rd_col = 0; col_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
