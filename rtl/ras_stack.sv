// ras_stack: circular return-address stack with a top-of-stack (TOS) pointer.
//
// DEPTH entries of ADDR_W bits held in flip-flops, addressed by a TOS pointer
// that wraps modulo DEPTH, as a ring buffer: a push increments the TOS and
// writes the new top, a pop returns the top entry and decrements the TOS.
// There is no overflow or underflow detection; a deep call chain simply
// overwrites the oldest entries, and a pop of an empty stack returns whatever
// the entry holds. Recovery after a misprediction overrides the TOS with a
// given value and may rewrite up to two entries in the same cycle
// (content repair and call-uncorruption, see ras_align).
//
// Interface and timing:
//   top_addr / tos   combinational: the entry the TOS points at, and the TOS.
//   below_addr       combinational: the entry below the TOS, which becomes the
//                    top after a pop.
//   push_i           next edge: tos <= tos+1, stack[tos+1] <= push_addr_i.
//   pop_i            next edge: tos <= tos-1 (read top_addr in the same cycle).
//   set_tos_i        next edge: tos <= new_tos_i; has priority over push/pop.
//   wr0_i / wr1_i    next edge: stack[wr*_idx_i] <= wr*_data_i. wr1 wins if
//                    both name the same entry. A push write wins over both.
//   Reset clears the TOS and every entry to zero.
// Ring organisation and 32 entries follow the published baseline; the port set, the
// priorities and the reset values are this design's own choice.
module ras_stack #(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned ADDR_W = 32,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // speculative update at prediction time
  input  logic              push_i,
  input  logic [ADDR_W-1:0] push_addr_i,
  input  logic              pop_i,
  // recovery
  input  logic              set_tos_i,
  input  logic [IDX_W-1:0]  new_tos_i,
  input  logic              wr0_i,
  input  logic [IDX_W-1:0]  wr0_idx_i,
  input  logic [ADDR_W-1:0] wr0_data_i,
  input  logic              wr1_i,
  input  logic [IDX_W-1:0]  wr1_idx_i,
  input  logic [ADDR_W-1:0] wr1_data_i,
  // state
  output logic [IDX_W-1:0]  tos_o,
  output logic [ADDR_W-1:0] top_addr_o,
  output logic [ADDR_W-1:0] below_addr_o
);

  logic [ADDR_W-1:0] mem_q [DEPTH];
  logic [IDX_W-1:0]  tos_q;
  logic [IDX_W-1:0]  tos_inc, tos_dec;

  // modulo-DEPTH neighbours of the TOS (DEPTH need not be a power of two)
  always_comb begin
    tos_inc = (tos_q == IDX_W'(DEPTH - 1)) ? '0 : tos_q + 1'b1;
    tos_dec = (tos_q == '0) ? IDX_W'(DEPTH - 1) : tos_q - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos_q <= '0;
    end else if (set_tos_i) begin
      tos_q <= new_tos_i;
    end else if (push_i) begin
      tos_q <= tos_inc;
    end else if (pop_i) begin
      tos_q <= tos_dec;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else begin
      if (wr0_i) mem_q[wr0_idx_i] <= wr0_data_i;
      if (wr1_i) mem_q[wr1_idx_i] <= wr1_data_i;
      if (push_i && !set_tos_i) mem_q[tos_inc] <= push_addr_i;
    end
  end

  assign tos_o      = tos_q;
  assign top_addr_o   = mem_q[tos_q];
  assign below_addr_o = mem_q[tos_dec];

endmodule
