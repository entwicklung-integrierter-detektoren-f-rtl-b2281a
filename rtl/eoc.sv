// eoc: end-of-column block.
//
// On LdCol, if its column holds a flagged hit (col_scan) and the EoC itself is
// empty, the EoC sends RdPix to the column; the column's highest-priority hit
// buffer drives its word onto the column bus and is cleared, and the EoC ORs
// the bus into its data latch and sets its own flag. Because the bus bits can
// only be pulled up, the latch must first be cleared by PullDN. The EoC flags of
// all columns form a second priority chain (outside this module); on RdCol the
// selected EoC drives {hit word, column address} onto the chip bus and clears
// its flag.
//
// Interface: all control inputs are one-cycle pulses synchronous to clk.
// rd_pix is combinational from ld_col. dout is zero unless this EoC is read.
// Follows the document: RdPix from LdCol and the column scan signal, RdCol
// reading the EoC chain, pull-down of the bus, 5 bit column address. Own
// choices: the "EoC empty" condition on RdPix and the clocked latch.
module eoc #(
  parameter int unsigned WORD_W   = 47,
  parameter int unsigned COL_W    = 5,
  parameter int unsigned COL_ADDR = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pull_dn,
  input  logic                    ld_col,
  input  logic                    rd_col,
  input  logic                    col_en,     // from the EoC priority chain
  input  logic                    col_scan,   // ScanOut of the column
  input  logic [WORD_W-1:0]       col_bus,
  output logic                    rd_pix,
  output logic                    flag,
  output logic [WORD_W+COL_W-1:0] dout
);

  logic [WORD_W-1:0] data;
  logic              read_me;

  assign rd_pix  = ld_col & col_scan & ~flag;
  assign read_me = rd_col & col_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data <= '0;
      flag <= 1'b0;
    end else begin
      if (pull_dn && !flag) data <= '0;
      else if (rd_pix)      data <= data | col_bus;
      if (rd_pix)       flag <= 1'b1;
      else if (read_me) flag <= 1'b0;
    end
  end

  assign dout = read_me ? {data, COL_W'(COL_ADDR)} : '0;

  a_read_flagged: assert property (@(posedge clk) disable iff (!rst_n) read_me |-> flag);

endmodule
