// ras_align_tb: exhaustive test of the correct-alignment recovery rule.
//
// For every checkpointed TOS and every branch type, in all eight combinations
// of the two repair options and the checkpoint point, compares the recovered TOS and the repair writes
// with values computed here: same entry for a branch that does not touch the
// stack, next entry (mod DEPTH) for a call, previous entry for a return, or
// the checkpoint itself for every type when it was taken after the update.
module ras_align_tb;
  import ras_pkg::*;
  localparam int unsigned DEPTH  = 32;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned IDX_W  = $clog2(DEPTH);
  localparam int unsigned INST_BYTES = 8;

  logic clk;
  initial clk = 1'b0;
  int checks = 0, failures = 0;

  logic              mis_valid;
  br_type_e          mis_type;
  logic [ADDR_W-1:0] mis_pc, ckpt_data;
  logic [IDX_W-1:0]  ckpt_tos;

  typedef struct packed {
    logic              set_tos;
    logic [IDX_W-1:0]  new_tos;
    logic              wr0;
    logic [IDX_W-1:0]  wr0_idx;
    logic [ADDR_W-1:0] wr0_data;
    logic              wr1;
    logic [IDX_W-1:0]  wr1_idx;
    logic [ADDR_W-1:0] wr1_data;
  } out_t;

  out_t o [8];

  for (genvar g = 0; g < 8; g++) begin : g_dut
    ras_align #(
      .DEPTH(DEPTH), .ADDR_W(ADDR_W), .INST_BYTES(INST_BYTES),
      .UNCORRUPT(g[0]), .CALL_UNCORRUPT(g[1]), .CKPT_AFTER(g[2])
    ) dut (
      .mis_valid_i(mis_valid), .mis_type_i(mis_type), .mis_pc_i(mis_pc),
      .ckpt_tos_i(ckpt_tos), .ckpt_data_i(ckpt_data),
      .set_tos_o(o[g].set_tos), .new_tos_o(o[g].new_tos),
      .wr0_o(o[g].wr0), .wr0_idx_o(o[g].wr0_idx), .wr0_data_o(o[g].wr0_data),
      .wr1_o(o[g].wr1), .wr1_idx_o(o[g].wr1_idx), .wr1_data_o(o[g].wr1_data)
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  br_type_e types [3] = '{BR_OTHER, BR_CALL, BR_RETURN};

  initial begin
    mis_valid = 0; mis_type = BR_OTHER; mis_pc = '0; ckpt_data = '0; ckpt_tos = '0;
    #1;
    for (int g = 0; g < 8; g++) begin
      checks++;
      if (o[g].set_tos || o[g].wr0 || o[g].wr1) begin
        failures++;
        $display("FAIL cfg %0d: activity without a misprediction", g);
      end
    end
    for (int t = 0; t < DEPTH; t++) begin
      for (int k = 0; k < 3; k++) begin
        mis_valid = 1;
        mis_type  = types[k];
        ckpt_tos  = IDX_W'(t);
        mis_pc    = $urandom;
        ckpt_data = $urandom;
        #1;
        for (int g = 0; g < 8; g++) begin
          int exp_tos;
          bit unc, cunc, after;
          logic [ADDR_W-1:0] ret;
          unc  = (g % 2) == 1;
          cunc = (g / 2) % 2 == 1;
          after = g >= 4;
          // checkpoint before the update: same / next / previous entry;
          // checkpoint after the update: the checkpoint itself
          exp_tos = after ? t :
                    (k == 1) ? (t + 1) % DEPTH : (k == 2) ? (t + DEPTH - 1) % DEPTH : t;
          ret = mis_pc + INST_BYTES;
          checks++;
          if (!o[g].set_tos || o[g].new_tos != IDX_W'(exp_tos)) begin
            failures++;
            $display("FAIL cfg %0d tos %0d type %0d: new_tos %0d exp %0d", g, t, k,
                     o[g].new_tos, exp_tos);
          end
          checks++;
          if (o[g].wr0 != unc || (unc && (o[g].wr0_idx != IDX_W'(t) || o[g].wr0_data != ckpt_data))) begin
            failures++;
            $display("FAIL cfg %0d tos %0d type %0d: content repair write", g, t, k);
          end
          checks++;
          if (o[g].wr1 != (cunc && k == 1) ||
              (cunc && k == 1 && (o[g].wr1_idx != IDX_W'(exp_tos) || o[g].wr1_data != ret))) begin
            failures++;
            $display("FAIL cfg %0d tos %0d type %0d: call-uncorruption write", g, t, k);
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
