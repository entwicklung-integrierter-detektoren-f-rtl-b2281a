// tb_rcu_fsm: the readout state machine against a behavioural model of the
// matrix (per-column queues of hits, hit flags, EoC latches) and a serializer
// that is randomly busy. Checks: every hit word arrives exactly once, in the
// order column-by-column per LdCol round; control pulses never overlap; every
// LdCol follows a PullDN; RdCol only with a full EoC and a ready serializer;
// hits that arrive after LdPix wait for the next LdPix.
`timescale 1ns/1ps
module tb_rcu_fsm;
  localparam int NCOL = 6, HIT_W = 52;
  logic clk = 0, rst_n = 0;
  logic pix_pending, eoc_pending, ser_ready;
  logic [HIT_W-1:0] eoc_data, word;
  logic ld_pix, pull_dn, ld_col, rd_col, word_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  rcu_fsm #(.HIT_W(HIT_W)) dut (.*);

  // matrix model
  int unsigned unflagged [NCOL][$];
  int unsigned flagged   [NCOL][$];
  int unsigned eoc_word  [NCOL];
  bit          eoc_full  [NCOL];
  int unsigned expected  [$];
  int n_words = 0, n_ldpix = 0, last_was_pulldn = 0;

  always_comb begin
    pix_pending = 0; eoc_pending = 0; eoc_data = '0;
    for (int c = 0; c < NCOL; c++) begin
      if (flagged[c].size() != 0) pix_pending = 1;
      if (eoc_full[c]) begin
        if (!eoc_pending && rd_col) eoc_data = HIT_W'(eoc_word[c]);
        eoc_pending = 1;
      end
    end
  end

  // DUT outputs are sampled mid-cycle; the model reacts just after the
  // clock edge that ends the cycle, so the DUT sees the pre-edge state.
  logic s_ldpix, s_pulldn, s_ldcol, s_rdcol, s_wv, s_epend, s_ready;
  logic [HIT_W-1:0] s_word;
  always @(negedge clk) begin
    s_ldpix = ld_pix; s_pulldn = pull_dn; s_ldcol = ld_col; s_rdcol = rd_col;
    s_wv = word_valid; s_word = word; s_epend = eoc_pending; s_ready = ser_ready;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if ((int'(s_ldpix) + int'(s_pulldn) + int'(s_ldcol) + int'(s_rdcol)) > 1) begin failures++; $display("FAIL overlap"); end
    if (s_ldcol && !last_was_pulldn) begin failures++; $display("FAIL LdCol without PullDN"); end
    if (s_rdcol && !(s_epend && s_ready)) begin failures++; $display("FAIL RdCol not allowed"); end
    last_was_pulldn = s_pulldn ? 1 : (s_ldcol ? 0 : last_was_pulldn);
    if (s_ldpix) begin
      n_ldpix++;
      for (int c = 0; c < NCOL; c++) while (unflagged[c].size() != 0) flagged[c].push_back(unflagged[c].pop_front());
    end
    if (s_ldcol) for (int c = 0; c < NCOL; c++)
      if (!eoc_full[c] && flagged[c].size() != 0) begin
        eoc_word[c] = flagged[c].pop_front(); eoc_full[c] = 1; expected.push_back(eoc_word[c]);
      end
    if (s_rdcol) for (int c = 0; c < NCOL; c++) if (eoc_full[c]) begin eoc_full[c] = 0; break; end
    if (s_wv) begin
      checks++; n_words++;
      if (expected.size() == 0 || HIT_W'(expected[0]) !== s_word) begin
        failures++; $display("FAIL word %0h", s_word);
      end
      if (expected.size() != 0) void'(expected.pop_front());
    end
    ser_ready = ($urandom_range(0, 3) != 0);
  end

  int total = 0;
  initial begin
    ser_ready = 1;
    foreach (eoc_full[c]) eoc_full[c] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int burst = 0; burst < 30; burst++) begin
      automatic int n = $urandom_range(1, 15);
      for (int i = 0; i < n; i++) begin
        automatic int c = $urandom_range(0, NCOL-1);
        unflagged[c].push_back(32'(total) * 32'h9E37 + 1);
        total++;
      end
      repeat ($urandom_range(5, 120)) @(negedge clk);
    end
    repeat (400) @(negedge clk);
    checks++;
    if (n_words != total) begin failures++; $display("FAIL delivered %0d of %0d", n_words, total); end
    checks++;
    if (n_ldpix < 2) begin failures++; $display("FAIL LdPix not repeated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
