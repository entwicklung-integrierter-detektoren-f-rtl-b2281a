// rcu_fsm: readout state machine of the readout control unit (RCU).
//
// It drains the matrix in rounds:
//   LDPIX  - one-cycle LdPix: every hit buffer copies hit into hitflag
//   CHECK  - flags have settled; if no column has a flagged hit, start again
//   PULLDN - one-cycle PullDN: clear the EoC bus latches
//   LDCOL  - one-cycle LdCol: each column with a flagged hit moves its
//            highest-priority hit into its EoC
//   SETTLE - EoC flags settle
//   RDCOL  - one RdCol per cycle while the serializer can take a word; the
//            selected EoC's word is captured into `word`
// When no EoC is full any more, it goes back to PULLDN if the columns still
// hold flagged hits, else to LDPIX. Hits that arrive during a round are
// flagged by the next LdPix.
//
// Interface: pix_pending / eoc_pending are the two priority-chain outputs of
// the matrix; word/word_valid is a one-cycle hand-over to the serializer,
// which raises ser_ready when it can accept a word in the next cycle.
// Follows the document: the control signals LdPix, PullDN, LdCol, RdCol and
// their roles. Own choices: the order and one-cycle length of the phases.
module rcu_fsm #(
  parameter int unsigned HIT_W = 52
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pix_pending,
  input  logic             eoc_pending,
  input  logic [HIT_W-1:0] eoc_data,
  input  logic             ser_ready,
  output logic             ld_pix,
  output logic             pull_dn,
  output logic             ld_col,
  output logic             rd_col,
  output logic [HIT_W-1:0] word,
  output logic             word_valid
);
  import det_pkg::*;

  rcu_state_e state, state_nx;

  always_comb begin
    state_nx = state;
    ld_pix   = 1'b0;
    pull_dn  = 1'b0;
    ld_col   = 1'b0;
    rd_col   = 1'b0;
    unique case (state)
      RCU_LDPIX:  begin ld_pix = 1'b1; state_nx = RCU_CHECK; end
      RCU_CHECK:  state_nx = pix_pending ? RCU_PULLDN : RCU_LDPIX;
      RCU_PULLDN: begin pull_dn = 1'b1; state_nx = RCU_LDCOL; end
      RCU_LDCOL:  begin ld_col = 1'b1; state_nx = RCU_SETTLE; end
      RCU_SETTLE: state_nx = RCU_RDCOL;
      RCU_RDCOL: begin
        if (eoc_pending) begin
          rd_col = ser_ready & ~word_valid;   // one word in flight at most
        end else begin
          state_nx = pix_pending ? RCU_PULLDN : RCU_LDPIX;
        end
      end
      default: state_nx = RCU_LDPIX;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= RCU_LDPIX;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      state      <= state_nx;
      word_valid <= rd_col;
      if (rd_col) word <= eoc_data;
    end
  end

  a_rdcol_has_data: assert property (@(posedge clk) disable iff (!rst_n) rd_col |-> eoc_pending);

endmodule
