// tb_ccpd53_encoder: every single-pixel hit must raise exactly the pad of
// its index and the pad of its subgroup, and decoding that pad pair must give
// the pixel back (C1 -> Q8 among them); random multi-hit patterns are checked
// against a reference OR.
module tb_ccpd53_encoder;
  logic [15:0] out_r, out_l;
  logic [3:0] pad_idx, pad_grp;
  int checks = 0, failures = 0;
  ccpd53_encoder dut (.*);

  initial begin
    for (int p = 0; p < 16; p++) begin
      out_r = 16'b1 << p; out_l = 16'b1 << p; #1;
      checks++;
      if (pad_idx != (4'b1 << (p % 4)) || pad_grp != (4'b1 << (p / 4))) begin
        failures++; $display("FAIL pixel Q%0d: idx %b grp %b", p, pad_idx, pad_grp);
      end
      // decode: subgroup * 4 + index
      checks++;
      if ($clog2(pad_grp) * 4 + $clog2(pad_idx) != p) begin failures++; $display("FAIL decode Q%0d", p); end
    end
    // pixel C1 is Q8: pad C (subgroup 2) and pad 1 (index bit 0)
    out_r = 16'h0100; out_l = 16'h0100; #1;
    checks++; if (pad_idx != 4'b0001 || pad_grp != 4'b0100) begin failures++; $display("FAIL C1"); end
    for (int t = 0; t < 300; t++) begin
      logic [3:0] ei, eg;
      out_r = 16'($urandom); out_l = 16'($urandom); #1;
      ei = '0; eg = '0;
      for (int p = 0; p < 16; p++) begin
        if (out_r[p]) ei[p % 4] = 1;
        if (out_l[p]) eg[p / 4] = 1;
      end
      checks++; if (pad_idx !== ei || pad_grp !== eg) begin failures++; $display("FAIL random %h %h", out_r, out_l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
