// ras_predictor: return-address predictor with a correctly aligned RAS.
//
// A return-address stack (RAS) predicts the target of a return: calls push
// their return address, returns pop it. In a speculative pipeline branches on
// a wrong path also push and pop, so the TOS pointer is checkpointed for every
// branch and restored when that branch resolves as mispredicted. The point of
// this design is how it is restored. The checkpoint is taken before the branch
// updates the stack, so restoring it verbatim is right only for branches that
// do not touch the stack. A mispredicted call still pushed a correct return
// address, so the TOS goes to the entry after the checkpoint; a mispredicted
// return still popped, so the TOS goes to the entry before it. This keeps the
// stack aligned with the program's call depth after call and return
// mispredictions (ras_align). Optional repair of the TOS content
// (UNCORRUPT) and rewriting of a mispredicted call's return address
// (CALL_UNCORRUPT) can be enabled; both are off by default, which is the
// baseline configuration (TOS-only repair with correct alignment).
// CKPT_AFTER (off by default) switches to the other implementation of the
// same rule: checkpoint the TOS after the branch's own push or pop and
// restore it unchanged; the recovered TOS is the same either way.
//
// Blocks: ras_stack (the ring of DEPTH return addresses and the TOS),
// ras_ckpt_table (checkpoint per in-flight branch, indexed by tag),
// ras_align (recovery rule and repair writes).
//
// Interface and timing (one RAS operation per cycle):
//   pred_*   A branch at fetch. In the same cycle pred_target_o holds the
//            return address for a return (the current top entry) and
//            pred_target_valid_o is high for a return. At the clock edge the
//            checkpoint (TOS and top entry before the update) is stored under
//            pred_tag_i, then a call pushes pred_pc_i + INST_BYTES and a
//            return pops.
//   mis_*    A mispredicted branch, identified by the tag it was given at
//            fetch, its type and its PC. At the clock edge the TOS and, if
//            configured, the repaired entries are written. A prediction in
//            the same cycle belongs to the squashed path and is ignored.
//   tos_o    The TOS pointer, for observation.
// Assertions check that a valid branch on either port has a defined type.
// The 32-entry RAS is the published baseline; one branch per cycle, the tag
// interface, NUM_TAGS = 128 (the instruction-window size) and the 8-byte
// instruction size used for the return address are this design's choices.
module ras_predictor
  import ras_pkg::*;
#(
  parameter int unsigned DEPTH          = 32,
  parameter int unsigned ADDR_W         = 32,
  parameter int unsigned INST_BYTES     = 8,
  parameter int unsigned NUM_TAGS       = 128,
  parameter bit          UNCORRUPT      = 1'b0,
  parameter bit          CALL_UNCORRUPT = 1'b0,
  parameter bit          CKPT_AFTER     = 1'b0,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned TAG_W = (NUM_TAGS > 1) ? $clog2(NUM_TAGS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // prediction (fetch)
  input  logic              pred_valid_i,
  input  br_type_e          pred_type_i,
  input  logic [ADDR_W-1:0] pred_pc_i,
  input  logic [TAG_W-1:0]  pred_tag_i,
  output logic              pred_target_valid_o,
  output logic [ADDR_W-1:0] pred_target_o,
  // misprediction (resolve)
  input  logic              mis_valid_i,
  input  br_type_e          mis_type_i,
  input  logic [ADDR_W-1:0] mis_pc_i,
  input  logic [TAG_W-1:0]  mis_tag_i,
  // observation
  output logic [IDX_W-1:0]  tos_o
);

  logic              pred_go;
  logic [IDX_W-1:0]  tos;
  logic [ADDR_W-1:0] top_addr, below_addr, ret_addr;
  logic [IDX_W-1:0]  ckpt_wr_tos;
  logic [ADDR_W-1:0] ckpt_wr_data;
  logic [IDX_W-1:0]  ckpt_tos;
  logic [ADDR_W-1:0] ckpt_data;
  logic              set_tos;
  logic [IDX_W-1:0]  new_tos;
  logic              wr0, wr1;
  logic [IDX_W-1:0]  wr0_idx, wr1_idx;
  logic [ADDR_W-1:0] wr0_data, wr1_data;

  // a recovery squashes whatever is fetched in the same cycle
  assign pred_go = pred_valid_i && !mis_valid_i;

  assign ret_addr = pred_pc_i + ADDR_W'(INST_BYTES);

  // What the checkpoint holds: the TOS and its entry before the branch's own
  // update, or (CKPT_AFTER) after it.
  always_comb begin
    ckpt_wr_tos  = tos;
    ckpt_wr_data = top_addr;
    if (CKPT_AFTER) begin
      unique case (pred_type_i)
        BR_CALL: begin
          ckpt_wr_tos  = (tos == IDX_W'(DEPTH - 1)) ? '0 : tos + 1'b1;
          ckpt_wr_data = ret_addr;
        end
        BR_RETURN: begin
          ckpt_wr_tos  = (tos == '0) ? IDX_W'(DEPTH - 1) : tos - 1'b1;
          ckpt_wr_data = below_addr;
        end
        default: ;
      endcase
    end
  end

  ras_stack #(
    .DEPTH (DEPTH),
    .ADDR_W(ADDR_W)
  ) u_stack (
    .clk,
    .rst_n,
    .push_i     (pred_go && pred_type_i == BR_CALL),
    .push_addr_i(ret_addr),
    .pop_i      (pred_go && pred_type_i == BR_RETURN),
    .set_tos_i  (set_tos),
    .new_tos_i  (new_tos),
    .wr0_i      (wr0),
    .wr0_idx_i  (wr0_idx),
    .wr0_data_i (wr0_data),
    .wr1_i      (wr1),
    .wr1_idx_i  (wr1_idx),
    .wr1_data_i (wr1_data),
    .tos_o      (tos),
    .top_addr_o (top_addr),
    .below_addr_o(below_addr)
  );

  ras_ckpt_table #(
    .NUM_TAGS (NUM_TAGS),
    .IDX_W    (IDX_W),
    .ADDR_W   (ADDR_W),
    .KEEP_DATA(UNCORRUPT)
  ) u_ckpt (
    .clk,
    .rst_n,
    .wr_i     (pred_go),
    .wr_tag_i (pred_tag_i),
    .wr_tos_i (ckpt_wr_tos),
    .wr_data_i(ckpt_wr_data),
    .rd_tag_i (mis_tag_i),
    .rd_tos_o (ckpt_tos),
    .rd_data_o(ckpt_data)
  );

  ras_align #(
    .DEPTH         (DEPTH),
    .ADDR_W        (ADDR_W),
    .INST_BYTES    (INST_BYTES),
    .UNCORRUPT     (UNCORRUPT),
    .CALL_UNCORRUPT(CALL_UNCORRUPT),
    .CKPT_AFTER    (CKPT_AFTER)
  ) u_align (
    .mis_valid_i(mis_valid_i),
    .mis_type_i (mis_type_i),
    .mis_pc_i   (mis_pc_i),
    .ckpt_tos_i (ckpt_tos),
    .ckpt_data_i(ckpt_data),
    .set_tos_o  (set_tos),
    .new_tos_o  (new_tos),
    .wr0_o      (wr0),
    .wr0_idx_o  (wr0_idx),
    .wr0_data_o (wr0_data),
    .wr1_o      (wr1),
    .wr1_idx_o  (wr1_idx),
    .wr1_data_o (wr1_data)
  );

  // interface rules: a valid branch carries one of the three defined types
  a_pred_type: assert property (@(posedge clk) disable iff (!rst_n)
    pred_valid_i |-> pred_type_i inside {BR_OTHER, BR_CALL, BR_RETURN})
    else $error("ras_predictor: undefined pred_type_i");
  a_mis_type: assert property (@(posedge clk) disable iff (!rst_n)
    mis_valid_i |-> mis_type_i inside {BR_OTHER, BR_CALL, BR_RETURN})
    else $error("ras_predictor: undefined mis_type_i");

  assign pred_target_valid_o = pred_valid_i && pred_type_i == BR_RETURN;
  assign pred_target_o       = top_addr;
  assign tos_o               = tos;

endmodule
