// hit_serializer: turns hit words into the RCU's two-bit output stream
// BitDataOut(1:0).
//
// Each accepted word is sent as a frame {HDR, word}, most significant bits
// first, two bits per clock: bits[1] is the earlier bit of each pair (the
// external 2->1 serializer sends it first). Between frames the output is 2'b00.
// A one-word input register lets the state machine hand over the next word
// while a frame is being sent, so frames follow each other without gaps.
// ready is high when that register is free.
//
// With the MPROC sizes a frame is 12 + 52 = 64 bits, i.e. 32 clocks: at the
// 1.6 Gbit/s output rate of the document (800 MHz clock, two bits per clock
// into the 2->1 serializer) that is 40 ns per hit, in line with its "about
// one hit per 50 ns". Follows the document: two-bit output, 52 bit hit word.
// Own choices: the 12 bit frame header, idle pattern and MSB-first order.
module hit_serializer
  import det_pkg::*;
#(
  parameter int unsigned DATA_W = MPROC_HIT_W,
  parameter int unsigned HDR_W  = FRAME_HDR_W,
  parameter logic [HDR_W-1:0] HDR = FRAME_HDR,
  localparam int unsigned FRAME_W = HDR_W + DATA_W,
  localparam int unsigned NSYM    = FRAME_W / 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] word,
  input  logic              word_valid,
  output logic              ready,
  output logic [1:0]        bits
);

  logic [FRAME_W-1:0]         shreg;
  logic [$clog2(NSYM+1)-1:0]  left;    // symbols still to send
  logic [DATA_W-1:0]          pend;
  logic                       pend_v;

  assign ready = ~pend_v;
  assign bits  = (left != 0) ? shreg[FRAME_W-1 -: 2] : 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '0;
      left   <= '0;
      pend   <= '0;
      pend_v <= 1'b0;
    end else begin
      if (word_valid) begin
        pend   <= word;
        pend_v <= 1'b1;
      end
      if (left > 1) begin
        shreg <= shreg << 2;
        left  <= left - 1'b1;
      end else if (pend_v) begin
        shreg  <= {HDR, pend};
        left   <= NSYM[$bits(left)-1:0];
        pend_v <= word_valid;
      end else begin
        shreg <= '0;
        left  <= '0;
      end
    end
  end

  initial assert (FRAME_W % 2 == 0) else $error("frame length must be even");
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) word_valid |-> ready);

endmodule
