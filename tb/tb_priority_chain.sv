// tb_priority_chain: random flag patterns against a reference "first set
// flag" search, for a chain of 540 cells in groups of 30 and a short chain
// with an odd group size. Checks enable (one-hot, lowest index), every ScanOut
// and the chain's scan_out.
module tb_priority_chain;
  localparam int N = 540, G = 30;
  localparam int N2 = 37, G2 = 8;
  logic [N-1:0]  flag, enable, scan;
  logic          scan_out;
  logic [N2-1:0] flag2, enable2, scan2;
  logic          scan_out2;
  int checks = 0, failures = 0;

  priority_chain #(.N(N),  .GROUP(G))  dut  (.flag(flag),  .enable(enable),  .scan(scan),  .scan_out(scan_out));
  priority_chain #(.N(N2), .GROUP(G2)) dut2 (.flag(flag2), .enable(enable2), .scan(scan2), .scan_out(scan_out2));

  function automatic void ref_chain(input logic [N-1:0] f, input int n, output logic [N-1:0] en, output logic [N-1:0] sc);
    bit seen = 0;
    en = '0; sc = '0;
    for (int i = 0; i < n; i++) begin
      if (f[i] && !seen) en[i] = 1'b1;
      seen |= f[i];
      sc[i] = seen;
    end
  endfunction

  logic [N-1:0] e_en, e_sc;
  initial begin
    for (int t = 0; t < 400; t++) begin
      // sparse, dense and single-bit patterns
      flag = '0;
      case (t % 4)
        0: flag[$urandom_range(0, N-1)] = 1'b1;
        1: for (int i = 0; i < N; i++) flag[i] = ($urandom_range(0, 99) < 1);
        2: for (int i = 0; i < N; i++) flag[i] = ($urandom_range(0, 1) == 1);
        3: ;
      endcase
      flag2 = N2'(flag >> 100);
      #1;
      ref_chain(flag, N, e_en, e_sc);
      checks++; if (enable !== e_en) begin failures++; $display("FAIL enable t=%0d", t); end
      checks++; if (scan !== e_sc) begin failures++; $display("FAIL scan t=%0d", t); end
      checks++; if (scan_out !== (|flag)) begin failures++; $display("FAIL scan_out t=%0d", t); end
      ref_chain(N'(flag2), N2, e_en, e_sc);
      checks++; if (enable2 !== N2'(e_en) || scan_out2 !== (|flag2)) begin failures++; $display("FAIL short chain t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
