// readout_agent: hit source, frame receiver and scoreboard for one pixel
// readout chip (MPROC or HVMAPS25 style), shared by the chip and top
// testbenches.
//
// After `start` it injects NHITS hits in bursts at random free pixels. Each
// hit is a comparator pulse of random length; with HAS_TDC a model of the
// pixel's fine-time ramp raises tdc_fired a random number of time stamp
// periods later and drops it when the hit buffer is read. Every SP_EVERY-th
// hit gets a second comparator pulse while the first is still stored (dead
// time). The agent keeps its own copy of the time stamp counters and predicts
// each 52/32 bit word: leading-edge stamp (rising-edge value and, with
// TWO_EDGE, the falling-edge copy), the stamp at the last clock edge with the
// comparator high, the fine stamp at the last clock edge before the ramp
// crossing, row and column. A receiver rebuilds the frames (12 bit header,
// then the word) from the 2 bit output and compares them in order per pixel.
// When all hits are out it checks that nothing is missing and that each
// readout mechanism was exercised: several hits per column in one round,
// several columns in one LdCol, serializer back-pressure, hits arriving
// during a readout round, dead-time pulses, and the hit bus.
// Probes of the RCU state and pending lines come in as ports.
`timescale 1ns/1ps
module readout_agent #(
  parameter int  NCOL     = 4,
  parameter int  NBUF     = 90,
  parameter int  TS2_W    = 10,
  parameter int  TS3_W    = 7,
  parameter bit  TWO_EDGE = 1'b1,
  parameter bit  HAS_TDC  = 1'b1,
  parameter int  HIT_W    = 52,
  parameter int  NHITS    = 120,
  parameter int  SP_EVERY = 17,
  parameter int  NSLOT    = 12,
  parameter int  DRAIN    = 200000
) (
  input  logic                      clk,
  input  logic                      ts_ck,
  input  logic                      rst_n,
  input  logic                      start,
  output logic [NCOL-1:0][NBUF-1:0] comp,
  output logic [NCOL-1:0][NBUF-1:0] tdc_fired,
  input  logic [NCOL-1:0][NBUF-1:0] hit,
  input  logic [NCOL-1:0]           hitbus,
  input  logic [1:0]                bit_data,
  input  logic [2:0]                rcu_state,
  input  logic                      pix_pending,
  input  logic                      eoc_pending,
  input  logic                      ser_ready,
  input  logic                      ld_col,
  input  logic [NCOL-1:0]           rd_pix,
  output logic                      done,
  output int                        checks,
  output int                        failures
);
  import det_pkg::*;
  localparam int FW = FRAME_HDR_W + HIT_W;

  int n_multi_col = 0, n_multi_eoc = 0, n_stall = 0, n_late = 0, n_dead = 0, n_hitbus = 0;

  initial begin comp = '0; tdc_fired = '0; done = 1'b0; checks = 0; failures = 0; end

  // ---- the agent's own time stamp counters ----
  int unsigned n_rise = 0, n_fall_copy = 0, at_clk_rise, at_clk_fall;
  always @(posedge ts_ck) if (rst_n) n_rise++;
  always @(negedge ts_ck) if (rst_n) n_fall_copy = n_rise;
  always @(posedge clk) begin at_clk_rise = n_rise; at_clk_fall = n_fall_copy; end

  // ---- scoreboard ----
  logic [HIT_W-1:0] expect_q [int][$];
  int n_expected = 0, n_received = 0;
  bit busy [NCOL][NBUF];   // pixel injected and not yet read out
  function automatic int key(int c, int k); return c * 4096 + k; endfunction

  function automatic logic [HIT_W-1:0] predict(int unsigned r_fall, int unsigned r_rise,
      int unsigned last_hi, int unsigned ts3c, int k, int c);
    logic [63:0] w = '0;
    if (TWO_EDGE) w = 64'(bin2gray(r_fall & 32'h3FF));
    w = (w << 10) | 64'(bin2gray(r_rise & 32'h3FF));
    w = (w << TS2_W) | 64'(bin2gray(last_hi & ((32'd1 << TS2_W) - 1)));
    w = (w << TS3_W) | (HAS_TDC ? 64'(bin2gray(ts3c & ((32'd1 << TS3_W) - 1))) : 64'd0);
    w = (w << 10) | 64'(k);
    w = (w << 5) | 64'(c);
    return HIT_W'(w);
  endfunction

  // Injection jobs are taken by NSLOT independent injector processes.
  typedef struct { int c, k, len_clk, d_ts; bit sp; } job_t;
  job_t job_q [$];
  int slot_busy = 0;

  for (genvar s = 0; s < NSLOT; s++) begin : g_slot
    job_t j;
    int unsigned r_rise, r_fall, last_hi, ts3c;
    bit got;
    initial forever begin
      @(negedge clk);
      got = 1'b0;
      if (job_q.size() != 0) begin j = job_q.pop_front(); got = 1'b1; slot_busy++; end
      if (got) begin
        comp[j.c][j.k] = 1'b1;
        @(posedge clk); #0.1 r_rise = at_clk_rise; r_fall = at_clk_fall;
        if (HAS_TDC) begin
          fork
            begin
              repeat (j.d_ts) @(posedge ts_ck);
              repeat ($urandom_range(1, 6)) @(negedge clk);
              ts3c = at_clk_rise;          // last clock edge before the crossing
              tdc_fired[j.c][j.k] = 1'b1;
            end
          join_none
        end
        repeat (j.len_clk - 1) @(posedge clk);
        #0.1 last_hi = at_clk_rise;
        @(negedge clk) comp[j.c][j.k] = 1'b0;
        if (j.sp) begin
          // second pulse while the hit is stored, in a cycle where it cannot
          // be read: no new hit, but the ToT RAM follows it
          @(negedge clk);
          while (rcu_state == 3'(RCU_LDCOL)) @(negedge clk);
          if (hit[j.c][j.k]) begin
            comp[j.c][j.k] = 1'b1; n_dead++;
            @(negedge clk) comp[j.c][j.k] = 1'b0;
            last_hi = at_clk_rise;
          end
        end
        wait fork;
        expect_q[key(j.c, j.k)].push_back(predict(r_fall, r_rise, last_hi, ts3c, j.k, j.c));
        n_expected++;
        slot_busy--;
      end
    end
  end

  // ramp reset when the hit buffer is read
  for (genvar c = 0; c < NCOL; c++) begin : g_rst
    for (genvar k = 0; k < NBUF; k++) begin : g_k
      always @(negedge hit[c][k]) tdc_fired[c][k] = 1'b0;
    end
  end

  // ---- receiver ----
  logic [63:0] rx = '0;
  int nrx = 0;
  bit in_frame = 1'b0;
  always @(posedge clk) if (rst_n) begin
    rx = {rx[61:0], bit_data};
    if (!in_frame) begin
      if (rx[11:0] == FRAME_HDR && rx[13:12] == 2'b00) begin in_frame = 1'b1; nrx = 6; end
    end else if (++nrx == FW/2) begin
      automatic logic [HIT_W-1:0] w = rx[HIT_W-1:0];
      automatic int wc = int'(w[4:0]), wk = int'(w[14:5]);
      automatic int kk = key(wc, wk);
      checks++; n_received++;
      if (!expect_q.exists(kk) || expect_q[kk].size() == 0) begin
        failures++; $display("%t FAIL unexpected word %h", $time, w);
      end else begin
        if (expect_q[kk][0] !== w) begin
          failures++;
          $display("%t FAIL word col %0d row %0d: got %h expected %h", $time, wc, wk, w, expect_q[kk][0]);
        end
        void'(expect_q[kk].pop_front());
        if (wc < NCOL && wk < NBUF) busy[wc][wk] = 1'b0;
      end
      in_frame = 1'b0; rx = '0;
    end
  end

  // ---- mechanism counters ----
  always @(posedge clk) if (rst_n) begin
    if (rcu_state == 3'(RCU_RDCOL) && eoc_pending && !ser_ready) n_stall++;
    if (ld_col && $countones(rd_pix) > 1) n_multi_eoc++;
    if (rcu_state == 3'(RCU_RDCOL) && !eoc_pending && pix_pending) n_multi_col++;
    if (|hitbus) n_hitbus++;
  end

  int nb, hc, hk;
  initial begin
    wait (start === 1'b1);
    for (int h = 0; h < NHITS; ) begin
      nb = $urandom_range(1, 8);
      for (int b = 0; b < nb && h < NHITS; b++, h++) begin
        do begin
          hc = $urandom_range(0, NCOL-1); hk = $urandom_range(0, NBUF-1);
        end while (busy[hc][hk]);
        busy[hc][hk] = 1'b1;
        if (rcu_state != 3'(RCU_LDPIX) && rcu_state != 3'(RCU_CHECK)) n_late++;
        job_q.push_back('{hc, hk, $urandom_range(3, 40), $urandom_range(2, 12), h % SP_EVERY == 5});
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      repeat ($urandom_range(0, 400)) @(negedge clk);
    end
    wait (job_q.size() == 0 && slot_busy == 0);
    repeat (DRAIN) begin
      @(negedge clk);
      if (n_received == n_expected && !pix_pending && !eoc_pending) break;
    end
    repeat (100) @(negedge clk);
    checks++;
    if (n_received != n_expected) begin
      failures++; $display("FAIL received %0d of %0d words", n_received, n_expected);
    end
    $display("%m: words %0d; multi-hit column rounds %0d, multi-column LdCol %0d, serializer stalls %0d, hits during readout %0d, dead-time pulses %0d, hitbus cycles %0d",
             n_received, n_multi_col, n_multi_eoc, n_stall, n_late, n_dead, n_hitbus);
    checks++; if (n_multi_col == 0) begin failures++; $display("FAIL no multi-hit column round"); end
    checks++; if (n_multi_eoc == 0) begin failures++; $display("FAIL no multi-column LdCol"); end
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL no serializer stall"); end
    checks++; if (n_late == 0)      begin failures++; $display("FAIL no hit during readout"); end
    checks++; if (n_dead == 0)      begin failures++; $display("FAIL no dead-time pulse"); end
    checks++; if (n_hitbus == 0)    begin failures++; $display("FAIL hit bus never high"); end
    done = 1'b1;
  end
endmodule
