// cfg_bit: one bit of the configuration shift register, with a
// single-event-upset tolerant storage latch.
//
// Shift stage: two-phase, non-overlapping clocks. A rising edge of ck1 takes
// the serial input into the first half, a rising edge of ck2 moves it to the
// second half, which is the serial output. One ck1 pulse followed by one ck2
// pulse shifts the chain by one bit. While rb (read back) is high, ck1 takes
// the stored bit instead of the serial input, so the stored configuration can
// be shifted out.
// Storage: three copies of the bit and a majority gate. Load writes the shift
// stage's value into all three; whenever the copies disagree, the majority is
// written back into all three (auto-refresh), so a single flipped copy is
// repaired one clock later and never reaches q. upset flips copies and exists
// only to emulate radiation upsets in simulation (tie it to zero).
//
// Follows the document: Ck1/Ck2/Sin/Sout/Load/Rb, triple redundant latch with
// majority and auto-refresh. Own choices: the storage copies are flip-flops on
// the chip clock clk (load is sampled by clk; clk must run faster than load
// pulses are long) and the read-back mechanism through ck1.
module cfg_bit (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ck1,
  input  logic       ck2,
  input  logic       sin,
  input  logic       load,
  input  logic       rb,
  input  logic [2:0] upset,
  output logic       sout,
  output logic       q
);

  logic       stage1;
  logic [2:0] copy;
  logic       maj;

  assign maj = (copy[0] & copy[1]) | (copy[0] & copy[2]) | (copy[1] & copy[2]);
  assign q   = maj;

  always_ff @(posedge ck1 or negedge rst_n) begin
    if (!rst_n) stage1 <= 1'b0;
    else        stage1 <= rb ? maj : sin;
  end

  always_ff @(posedge ck2 or negedge rst_n) begin
    if (!rst_n) sout <= 1'b0;
    else        sout <= stage1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 copy <= 3'b000;
    else if (load)                              copy <= {3{sout}};
    else if (!(&copy || !(|copy)))              copy <= {3{maj}};
    else                                        copy <= copy ^ upset;
  end

endmodule
