// ras_predictor_tb: end-to-end test of the return-address predictor.
//
// Eight copies of a pipeline model (ras_pipe_harness) run side by side, each
// with its own 32-entry predictor: TOS-only repair (the default
// configuration), TOS-content repair, call-uncorruption, and both, each with
// the checkpoint taken before and after the branch's own stack update. Each runs a generated program with
// deep recursion, random call and branch mispredictions, wrong-path fetch
// and a 20-cycle resolve latency, and checks the predictor against a
// reference stack and against the program's real call depth. The testbench
// then checks that every mechanism happened: pushes, pops, pointer
// wrap-around, recovery after a conditional, a call and a return
// misprediction, a fetch dropped by a same-cycle recovery, TOS-content repair
// and call-uncorruption, and correct as well as wrong return predictions.
module ras_predictor_tb;
  localparam int NCFG = 8;

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic done [NCFG];
  int checks_h [NCFG], failures_h [NCFG];
  int push [NCFG], pop [NCFG], wrap [NCFG], rec_other [NCFG], rec_call [NCFG];
  int rec_ret [NCFG], squash [NCFG], repair [NCFG], call_unc [NCFG];
  int ret_ok [NCFG], ret_mis [NCFG];
  int corrupt [NCFG][32];

  int checks = 0, failures = 0;

  // Configuration g: content repair = g[0], call-uncorruption = g[1],
  // checkpoint after the update = g[2].
  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic              pred_valid, mis_valid, tgt_valid;
    ras_pkg::br_type_e pred_type, mis_type;
    logic [31:0]       pred_pc, mis_pc, tgt;
    logic [6:0]        pred_tag, mis_tag;
    logic [4:0]        tos;

    ras_predictor #(
      .DEPTH(32), .NUM_TAGS(128), .UNCORRUPT(g[0]), .CALL_UNCORRUPT(g[1]),
      .CKPT_AFTER(g[2])
    ) u_dut (
      .clk, .rst_n,
      .pred_valid_i(pred_valid), .pred_type_i(pred_type), .pred_pc_i(pred_pc),
      .pred_tag_i(pred_tag), .pred_target_valid_o(tgt_valid), .pred_target_o(tgt),
      .mis_valid_i(mis_valid), .mis_type_i(mis_type), .mis_pc_i(mis_pc),
      .mis_tag_i(mis_tag), .tos_o(tos)
    );

    ras_pipe_harness #(
      .DEPTH(32), .NUM_TAGS(128),
      .UNCORRUPT     (g[0]),
      .CALL_UNCORRUPT(g[1]),
      .CKPT_AFTER    (g[2]),
      .N_BRANCHES    (100000)
    ) u_h (
      .clk, .rst_n,
      .pred_valid, .pred_type, .pred_pc, .pred_tag, .tgt_valid, .tgt,
      .mis_valid, .mis_type, .mis_pc, .mis_tag, .tos,
      .done(done[g]), .checks(checks_h[g]), .failures(failures_h[g]),
      .n_push(push[g]), .n_pop(pop[g]), .n_wrap(wrap[g]), .n_rec_other(rec_other[g]),
      .n_rec_call(rec_call[g]), .n_rec_ret(rec_ret[g]), .n_squash(squash[g]),
      .n_repair(repair[g]), .n_call_unc(call_unc[g]), .n_ret_ok(ret_ok[g]),
      .n_ret_mis(ret_mis[g]), .n_corrupt(corrupt[g])
    );
  end

  task automatic report();
    for (int g = 0; g < NCFG; g++) begin
      checks += checks_h[g];
      failures += failures_h[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    report();
    $finish;
  end

  task automatic need(string what, int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    int s_push, s_pop, s_wrap, s_ro, s_rc, s_rr, s_sq;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < NCFG; g++) while (!done[g]) @(posedge clk);
    for (int g = 0; g < NCFG; g++)
      $display("config %0d (content repair %0d, call-uncorruption %0d, checkpoint after %0d): %0d returns, %0d mispredicted (%0d.%0d%%), %0d corrupted TOS entries after recoveries",
               g, g % 2, (g / 2) % 2, g / 4, ret_ok[g] + ret_mis[g], ret_mis[g],
               (1000 * ret_mis[g] / (ret_ok[g] + ret_mis[g])) / 10,
               (1000 * ret_mis[g] / (ret_ok[g] + ret_mis[g])) % 10, corrupt[g][0]);
    s_push = 0; s_pop = 0; s_wrap = 0; s_ro = 0; s_rc = 0; s_rr = 0; s_sq = 0;
    for (int g = 0; g < NCFG; g++) begin
      s_push += push[g]; s_pop += pop[g]; s_wrap += wrap[g]; s_ro += rec_other[g];
      s_rc += rec_call[g]; s_rr += rec_ret[g]; s_sq += squash[g];
    end
    $display("mechanisms:");
    need("push (call)", s_push);
    need("pop (return)", s_pop);
    need("TOS wrap-around", s_wrap);
    need("recovery after other branch", s_ro);
    need("recovery after call", s_rc);
    need("recovery after return", s_rr);
    need("fetch dropped by recovery", s_sq);
    need("recovery, default config", rec_other[0] + rec_call[0] + rec_ret[0]);
    need("TOS-content repair", repair[1] + repair[3]);
    need("call-uncorruption", call_unc[2] + call_unc[3]);
    need("recovery, checkpoint after update", rec_other[4] + rec_call[4] + rec_ret[4]);
    need("content repair, checkpoint after", repair[5] + repair[7]);
    need("call-uncorruption, checkpoint after", call_unc[6] + call_unc[7]);
    need("correct return predictions", ret_ok[0]);
    need("return mispredictions", ret_mis[0]);
    report();
    $finish;
  end
endmodule
