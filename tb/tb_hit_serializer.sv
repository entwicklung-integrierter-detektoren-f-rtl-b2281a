// tb_hit_serializer: random words handed over whenever ready is high; a
// receiver rebuilds frames from the two-bit stream (header search, MSB
// first). Checks every word in order, back-to-back frames (32 clocks per
// 52 bit word with the 12 bit header) and the idle pattern.
`timescale 1ns/1ps
module tb_hit_serializer;
  import det_pkg::*;
  localparam int DW = 52, FW = 64;
  logic clk = 0, rst_n = 0;
  logic [DW-1:0] word = '0;
  logic word_valid = 0, ready;
  logic [1:0] bits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  hit_serializer #(.DATA_W(DW)) dut (.*);

  logic [DW-1:0] sent [$];
  logic [FW-1:0] rx;
  int nrx = 0, got = 0, in_frame = 0, idle_seen = 0;
  longint t_first = -1, t_last;

  // receiver: samples bits every clock
  always @(posedge clk) if (rst_n) begin
    if (!in_frame) begin
      rx = {rx[FW-3:0], bits};
      if (rx[11:0] == FRAME_HDR) begin in_frame = 1; nrx = 6; end
      else if (bits == 2'b00) idle_seen++;
    end else begin
      rx = {rx[FW-3:0], bits};
      nrx++;
      if (nrx == FW/2) begin
        checks++;
        if (sent.size() == 0 || rx[DW-1:0] !== sent[0]) begin failures++; $display("FAIL frame %0h", rx[DW-1:0]); end
        if (sent.size() != 0) void'(sent.pop_front());
        got++; in_frame = 0; rx = '0;
        if (t_first < 0) t_first = $time; t_last = $time;
      end
    end
  end

  initial begin
    rx = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    // 20 words as fast as allowed: frames must be back to back
    for (int i = 0; i < 20; i++) begin
      while (!ready) @(negedge clk);
      word = {$urandom, $urandom}; word[DW-1 -: 12] = 12'h000; // keep header unique
      word_valid = 1; sent.push_back(word);
      @(negedge clk) word_valid = 0;
      @(negedge clk);
    end
    repeat (100) @(negedge clk);
    checks++;
    if (got != 20) begin failures++; $display("FAIL received %0d", got); end
    checks++;
    if ((t_last - t_first) != 19 * 32 * 10) begin failures++; $display("FAIL not back to back: %0d", t_last - t_first); end
    checks++;
    if (idle_seen < 10) begin failures++; $display("FAIL idle pattern"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
