// ras_ckpt_table: per-branch checkpoints of the return-address stack.
//
// Every branch, whatever its type, gets a checkpoint when it is predicted:
// the TOS pointer as it was before the branch touched the stack and, for
// TOS-content repair, the content of that TOS entry. The checkpoint is kept
// until the branch resolves; if it is mispredicted, the recovery logic reads
// it back. Checkpoints are addressed by a branch tag that the pipeline gives
// the branch at fetch and returns with the misprediction; NUM_TAGS bounds the
// branches in flight. Checkpointing before the update follows the published
// method;
// the tag-indexed table and its size are this design's own choice.
//
// KEEP_DATA = 0 drops the content field (wr_data_i is then unused and
// rd_data_o is zero), which is how the predictor builds it when TOS-content
// repair is off.
//
// Timing: the write (wr_i) takes effect at the next clock edge; the read is
// combinational on rd_tag_i. Reset clears all entries.
module ras_ckpt_table #(
  parameter int unsigned NUM_TAGS = 128,
  parameter int unsigned IDX_W    = 5,
  parameter int unsigned ADDR_W   = 32,
  parameter bit          KEEP_DATA = 1'b1,
  localparam int unsigned TAG_W = (NUM_TAGS > 1) ? $clog2(NUM_TAGS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_i,
  input  logic [TAG_W-1:0]  wr_tag_i,
  input  logic [IDX_W-1:0]  wr_tos_i,
  input  logic [ADDR_W-1:0] wr_data_i,
  input  logic [TAG_W-1:0]  rd_tag_i,
  output logic [IDX_W-1:0]  rd_tos_o,
  output logic [ADDR_W-1:0] rd_data_o
);

  logic [IDX_W-1:0]  tos_q  [NUM_TAGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TAGS; i++) tos_q[i] <= '0;
    end else if (wr_i) begin
      tos_q[wr_tag_i] <= wr_tos_i;
    end
  end

  assign rd_tos_o = tos_q[rd_tag_i];

  // The content field exists only when TOS-content repair is configured.
  if (KEEP_DATA) begin : g_data
    logic [ADDR_W-1:0] data_q [NUM_TAGS];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < NUM_TAGS; i++) data_q[i] <= '0;
      end else if (wr_i) begin
        data_q[wr_tag_i] <= wr_data_i;
      end
    end
    assign rd_data_o = data_q[rd_tag_i];
  end else begin : g_nodata
    assign rd_data_o = '0;
  end

endmodule
