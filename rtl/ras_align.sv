// ras_align: correct-alignment recovery of the return-address stack.
//
// The TOS is checkpointed before a branch updates the stack. When that branch
// turns out mispredicted, the wrong-path TOS is replaced by a value derived
// from the checkpoint and from the branch's type:
//   - a branch that does not touch the stack (conditional, jump): the
//     checkpointed TOS itself;
//   - a call: the entry after the checkpoint, because the call pushed its
//     return address correctly even though its target was wrong;
//   - a return: the entry before the checkpoint, so that the next return does
//     not get the same address again.
// These three rules are the published correct-alignment method. Two optional
// repair writes, both also described with it, go with them:
//   - UNCORRUPT: the content of the checkpointed TOS entry, saved with the
//     checkpoint, is written back into that entry (TOS-content repair; that
//     it goes to the checkpointed entry, not the recovered one, is this
//     design's choice);
//   - CALL_UNCORRUPT: after a mispredicted call, the call's return address,
//     recomputed as call PC + INST_BYTES, is rewritten into the entry the
//     recovered TOS points at, so no checkpoint storage is needed for it.
// CKPT_AFTER selects the method's second way of reaching the same TOS:
// the checkpoint is taken after the branch has updated the stack (one up
// for a call, one down for a return), and recovery restores it unchanged for
// every branch type. The content repair then writes the saved content back
// into that entry, and call-uncorruption rewrites the recovered TOS entry.
// Purely combinational; outputs are meaningful when mis_valid_i is high and
// are zero otherwise. Index arithmetic wraps modulo DEPTH. With both repair
// options off (the default) the repair-write outputs are constant zero.
module ras_align
  import ras_pkg::*;
#(
  parameter int unsigned DEPTH          = 32,
  parameter int unsigned ADDR_W         = 32,
  parameter int unsigned INST_BYTES     = 8,
  parameter bit          UNCORRUPT      = 1'b0,
  parameter bit          CALL_UNCORRUPT = 1'b0,
  parameter bit          CKPT_AFTER     = 1'b0,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              mis_valid_i,
  input  br_type_e          mis_type_i,
  input  logic [ADDR_W-1:0] mis_pc_i,
  input  logic [IDX_W-1:0]  ckpt_tos_i,
  input  logic [ADDR_W-1:0] ckpt_data_i,
  // recovered TOS
  output logic              set_tos_o,
  output logic [IDX_W-1:0]  new_tos_o,
  // TOS-content repair write
  output logic              wr0_o,
  output logic [IDX_W-1:0]  wr0_idx_o,
  output logic [ADDR_W-1:0] wr0_data_o,
  // call-uncorruption write
  output logic              wr1_o,
  output logic [IDX_W-1:0]  wr1_idx_o,
  output logic [ADDR_W-1:0] wr1_data_o
);

  logic [IDX_W-1:0] next_tos, prev_tos;

  always_comb begin
    next_tos = (ckpt_tos_i == IDX_W'(DEPTH - 1)) ? '0 : ckpt_tos_i + 1'b1;
    prev_tos = (ckpt_tos_i == '0) ? IDX_W'(DEPTH - 1) : ckpt_tos_i - 1'b1;
  end

  always_comb begin
    set_tos_o  = mis_valid_i;
    new_tos_o  = '0;
    wr0_o      = 1'b0;
    wr0_idx_o  = '0;
    wr0_data_o = '0;
    wr1_o      = 1'b0;
    wr1_idx_o  = '0;
    wr1_data_o = '0;
    if (mis_valid_i) begin
      if (CKPT_AFTER) begin
        new_tos_o = ckpt_tos_i;
      end else begin
        unique case (mis_type_i)
          BR_CALL:   new_tos_o = next_tos;
          BR_RETURN: new_tos_o = prev_tos;
          default:   new_tos_o = ckpt_tos_i;
        endcase
      end
      if (UNCORRUPT) begin
        wr0_o      = 1'b1;
        wr0_idx_o  = ckpt_tos_i;
        wr0_data_o = ckpt_data_i;
      end
      if (CALL_UNCORRUPT && mis_type_i == BR_CALL) begin
        wr1_o      = 1'b1;
        wr1_idx_o  = CKPT_AFTER ? ckpt_tos_i : next_tos;
        wr1_data_o = mis_pc_i + ADDR_W'(INST_BYTES);
      end
    end
  end

endmodule
