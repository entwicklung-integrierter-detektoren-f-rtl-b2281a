// hit_buffer: digital part of one pixel readout cell.
//
// A rising edge of the comparator output sets the "hit" flip-flop. While
// hit is low the TS RAM follows the global time stamp TS1, so when hit sets it
// keeps the stamp of the leading edge. The ToT RAM follows TS2 while the
// comparator is high and so keeps the stamp of its falling edge; ToT is the
// difference of the two. The TS3 RAM follows the fine time stamp until the
// time-to-digital converter (an analog ramp outside this module) reports that
// its node crossed threshold. The address ROM is the constant input row_addr
// (tied off by the column, so it reduces to wiring).
// LdPix copies hit into hitflag once the hit is complete, i.e. the comparator
// is low again (ToT known) and the TDC has fired (fine stamp known); a hit
// that is still in progress is flagged by a later LdPix. The column priority
// logic turns the highest
// flagged cell's enable on, and RdPix then puts {TS1, TS2, TS3, address} on
// the column bus and clears hit and hitflag (a new leading edge in that
// same cycle is lost).
//
// Interface: comp, tdc_fired, ld_pix and rd_pix are synchronous to clk; the
// time stamp buses are Gray coded and are stored as they are. bus_out is zero
// unless this cell is read, so a column ORs the outputs of its cells (the
// silicon uses pull-up-only RAM/ROM bit lines and a pull-down at the EoC).
//
// Follows the document: RAM write conditions (TS RAM written while hit is
// low, ToT RAM while the comparator is high), hitflag set by LdPix, read
// and clear by RdPix, field widths. Own choices: the whole cell is modelled
// as clocked logic; the edge detector's pulse is one clock long; the
// "hit complete" condition on LdPix; reset clears everything.
module hit_buffer #(
  parameter int unsigned TS1_W    = 20,
  parameter int unsigned TS2_W    = 10,
  parameter int unsigned TS3_W    = 7,
  parameter int unsigned ADDR_W   = 10,
  parameter bit          HAS_TDC  = 1'b1,
  localparam int unsigned WORD_W  = TS1_W + TS2_W + TS3_W + ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              comp,       // comparator output
  input  logic [TS1_W-1:0]  ts1,        // global leading-edge stamp
  input  logic [TS2_W-1:0]  ts2,        // global falling-edge stamp
  input  logic [TS3_W-1:0]  ts3,        // global fine-time stamp
  input  logic [ADDR_W-1:0] row_addr,   // address ROM contents (constant)
  input  logic              tdc_fired,  // TDC ramp crossed its threshold
  input  logic              ld_pix,
  input  logic              rd_pix,
  input  logic              enable,     // from the priority chain
  output logic              hit,
  output logic              hitflag,
  output logic [WORD_W-1:0] bus_out
);

  logic             comp_d;
  logic [TS1_W-1:0] ts_ram;
  logic [TS2_W-1:0] tot_ram;
  logic [TS3_W-1:0] ts3_ram;
  logic             edge_pulse;
  logic             read_me;
  logic             complete;

  assign edge_pulse = comp & ~comp_d;
  assign read_me    = rd_pix & enable;
  assign complete   = hit & ~comp & (tdc_fired | ~HAS_TDC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comp_d  <= 1'b0;
      hit     <= 1'b0;
      hitflag <= 1'b0;
      ts_ram  <= '0;
      tot_ram <= '0;
      ts3_ram <= '0;
    end else begin
      comp_d <= comp;
      // SR flip-flop: reset (read) dominates set (edge)
      if (read_me)         hit <= 1'b0;
      else if (edge_pulse) hit <= 1'b1;
      if (read_me)     hitflag <= 1'b0;
      else if (ld_pix) hitflag <= complete;
      // DRAM cells: transparent while their write line is active
      if (!hit) ts_ram  <= ts1;
      if (comp) tot_ram <= ts2;
      if (!HAS_TDC)        ts3_ram <= '0;
      else if (!tdc_fired) ts3_ram <= ts3;
    end
  end

  assign bus_out = read_me ? {ts_ram, tot_ram, ts3_ram, row_addr} : '0;

  // A cell may only be read when it holds a flagged hit.
  a_read_flagged: assert property (@(posedge clk) disable iff (!rst_n) read_me |-> hitflag);

endmodule
