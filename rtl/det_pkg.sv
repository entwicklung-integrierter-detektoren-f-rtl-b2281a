// det_pkg: constants, types and helper functions shared by the pixel readout
// blocks. The time stamps travel across the matrix Gray coded, so a hit
// buffer that stores a stamp while it is changing is off by at most one count;
// bin2gray/gray2bin convert between the binary counter and that code.
// The word widths below are the MPROC numbers (TS1 20 bit, TS2 10 bit, TS3
// 7 bit, 10 bit row address, 5 bit column address, 52 bits per hit).
package det_pkg;

  localparam int unsigned MPROC_TS1_W  = 20;
  localparam int unsigned MPROC_TS2_W  = 10;
  localparam int unsigned MPROC_TS3_W  = 7;
  localparam int unsigned MPROC_ADDR_W = 10;
  localparam int unsigned COL_ADDR_W   = 5;
  localparam int unsigned MPROC_HIT_W  = MPROC_TS1_W + MPROC_TS2_W + MPROC_TS3_W
                                       + MPROC_ADDR_W + COL_ADDR_W;   // 52

  // Header put in front of every hit word by the serializer (own choice).
  localparam int unsigned FRAME_HDR_W = 12;
  localparam logic [FRAME_HDR_W-1:0] FRAME_HDR = 12'hB5C;

  // States of the readout control unit's state machine.
  typedef enum logic [2:0] {
    RCU_LDPIX  = 3'd0,   // copy hit -> hitflag in all hit buffers
    RCU_CHECK  = 3'd1,   // hit flags have settled: anything to read?
    RCU_PULLDN = 3'd2,   // clear the EoC bus latches
    RCU_LDCOL  = 3'd3,   // every column with a flagged hit moves one to its EoC
    RCU_SETTLE = 3'd4,   // EoC flags settle
    RCU_RDCOL  = 3'd5    // read EoCs one per cycle into the serializer
  } rcu_state_e;

  function automatic logic [31:0] bin2gray(input logic [31:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [31:0] gray2bin(input logic [31:0] g);
    logic [31:0] b;
    b[31] = g[31];
    for (int i = 30; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
