// priority_chain: selects the highest-priority set flag of a chain of cells
// (index 0 is highest) with the grouped fast/slow OR chain of the readout
// cells.
//
// Cells are grouped in groups of GROUP. Inside a group the "slow" signal of a
// cell is the ScanOut of the cell before it (ground for the group's first
// cell). The "fast" signal of every cell of a group is the ScanOut of the last
// cell of the previous group (ground for the first group). A cell's ScanOut is
// flag OR slow OR fast, and its Enable is flag AND NOT slow AND NOT fast, so
// exactly the first set flag is enabled and the fast path crosses a group in
// one gate instead of GROUP gates. scan_out is the ScanOut of the last cell:
// "some flag in the chain is set". Purely combinational.
//
// Follows the document: ScanOut/Enable equations and the group wiring (groups
// of 30 for a column of 540 hit buffers). Own choice: the same chain is used
// for the chain of end-of-column blocks.
module priority_chain #(
  parameter int unsigned N     = 540,
  parameter int unsigned GROUP = 30
) (
  input  logic [N-1:0] flag,
  output logic [N-1:0] enable,
  output logic [N-1:0] scan,      // ScanOut of every cell
  output logic         scan_out   // ScanOut of the last cell
);

  always_comb begin
    logic fast, slow, so_prev, so;
    fast    = 1'b0;
    so_prev = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      slow      = (i % GROUP == 0) ? 1'b0 : so_prev;
      so        = flag[i] | slow | fast;
      enable[i] = flag[i] & ~slow & ~fast;
      scan[i]   = so;
      so_prev   = so;
      if (i % GROUP == GROUP - 1) fast = so;
    end
  end

  assign scan_out = scan[N-1];

endmodule
