// ras_predictor_full_tb: the predictor with every parameter at its default
// (32 entries, 128 checkpoint tags, TOS-only repair with correct alignment),
// driven through a long run of the pipeline model (ras_pipe_harness):
// 400000 branches with deep recursion, wrong-path fetch and a 20-cycle
// resolve latency, the baseline pipeline depth. Every cycle the predicted
// return address and the TOS are checked against a reference stack, and after
// every recovery the TOS against the program's call depth. Counts each
// mechanism and fails if one never happened; reports the return
// misprediction rate and how many stack entries differ, after recoveries,
// from a stack updated by the correct path only, by distance from the
// recovered TOS.
module ras_predictor_full_tb;
  import ras_pkg::*;

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic              pred_valid, mis_valid, tgt_valid;
  br_type_e          pred_type, mis_type;
  logic [31:0]       pred_pc, mis_pc, tgt;
  logic [6:0]        pred_tag, mis_tag;
  logic [4:0]        tos;
  logic              done;
  int checks_h, failures_h, push, pop, wrap, rec_other, rec_call, rec_ret;
  int squash, repair, call_unc, ret_ok, ret_mis;
  int corrupt [32];
  int checks = 0, failures = 0;

  ras_predictor u_dut (
    .clk, .rst_n,
    .pred_valid_i(pred_valid), .pred_type_i(pred_type), .pred_pc_i(pred_pc),
    .pred_tag_i(pred_tag), .pred_target_valid_o(tgt_valid), .pred_target_o(tgt),
    .mis_valid_i(mis_valid), .mis_type_i(mis_type), .mis_pc_i(mis_pc),
    .mis_tag_i(mis_tag), .tos_o(tos)
  );

  ras_pipe_harness #(.PIPE(20), .N_BRANCHES(400000)) u_h (
    .clk, .rst_n,
    .pred_valid, .pred_type, .pred_pc, .pred_tag, .tgt_valid, .tgt,
    .mis_valid, .mis_type, .mis_pc, .mis_tag, .tos,
    .done, .checks(checks_h), .failures(failures_h),
    .n_push(push), .n_pop(pop), .n_wrap(wrap), .n_rec_other(rec_other),
    .n_rec_call(rec_call), .n_rec_ret(rec_ret), .n_squash(squash),
    .n_repair(repair), .n_call_unc(call_unc), .n_ret_ok(ret_ok), .n_ret_mis(ret_mis), .n_corrupt(corrupt)
  );

  task automatic report();
    checks += checks_h;
    failures += failures_h;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    report();
    $finish;
  end

  task automatic need(string what, int count);
    checks++;
    $display("  %-30s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    $display("%0d returns, %0d mispredicted (%0d.%0d%%)", ret_ok + ret_mis, ret_mis,
             (1000 * ret_mis / (ret_ok + ret_mis)) / 10, (1000 * ret_mis / (ret_ok + ret_mis)) % 10);
    need("push (call)", push);
    need("pop (return)", pop);
    need("TOS wrap-around", wrap);
    need("recovery after other branch", rec_other);
    need("recovery after call", rec_call);
    need("recovery after return", rec_ret);
    need("fetch dropped by recovery", squash);
    begin
      int mid;
      mid = 0;
      for (int d = 2; d < 31; d++) mid += corrupt[d];
      $display("corrupted entries after recoveries, by distance from the recovered TOS:");
      $display("  tos %0d, 1 below %0d, 2..30 %0d, 1 above (31) %0d", corrupt[0], corrupt[1], mid, corrupt[31]);
    end
    need("corruption at the recovered TOS", corrupt[0]);
    need("corruption above the recovered TOS", corrupt[31]);
    need("correct return predictions", ret_ok);
    need("return mispredictions", ret_mis);
    checks++;
    if (repair != 0 || call_unc != 0) begin
      failures++;
      $display("FAIL repair writes counted in the default configuration");
    end
    report();
    $finish;
  end
endmodule
