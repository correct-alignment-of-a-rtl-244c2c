// ras_sweep_tb: the predictor across stack sizes and pipeline depths.
//
// Runs the pipeline model (ras_pipe_harness) against predictors of 8, 16, 32
// and 64 entries with TOS-content repair, each at resolve latencies of 5, 10,
// 15, 20, 25 and 30 cycles, the grid of stack sizes and pipeline depths over
// which such a predictor is usually studied. Every cycle of every run is
// checked against the reference stack and the call depth; the testbench then
// prints the return misprediction rate of each run. The rates belong to the
// synthetic program of the model, not to any real workload, and are reported,
// not checked. Each run must see recoveries of all three branch types. For the
// 32-entry stack it also prints, per resolve latency, how many entries differ
// after recoveries from a stack that only the correct path updates, grouped
// by distance from the recovered TOS.
module ras_sweep_tb;
  localparam int NS = 4;
  localparam int NP = 6;
  localparam int SIZES [NS] = '{8, 16, 32, 64};
  localparam int PIPES [NP] = '{5, 10, 15, 20, 25, 30};

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic done [NS][NP];
  int ch [NS][NP], fa [NS][NP], rok [NS][NP], rmis [NS][NP];
  int ro [NS][NP], rc [NS][NP], rr [NS][NP];
  // corrupted entries after recoveries, by distance from the recovered TOS:
  // the TOS itself, one below, one above, and everything else
  int k_tos [NS][NP], k_below [NS][NP], k_above [NS][NP], k_rest [NS][NP];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NS; s++) begin : g_size
    for (genvar p = 0; p < NP; p++) begin : g_pipe
      localparam int unsigned D  = SIZES[s];
      localparam int unsigned IW = $clog2(D);
      logic              pred_valid, mis_valid, tgt_valid;
      ras_pkg::br_type_e pred_type, mis_type;
      logic [31:0]       pred_pc, mis_pc, tgt;
      logic [6:0]        pred_tag, mis_tag;
      logic [IW-1:0]     tos;
      int                unused [6];
      int                corrupt [D];

      function automatic int sum_rest(int c [D]);
        int acc;
        acc = 0;
        for (int d = 2; d < D - 1; d++) acc += c[d];
        return acc;
      endfunction

      assign k_tos[s][p]   = corrupt[0];
      assign k_below[s][p] = corrupt[1];
      assign k_above[s][p] = corrupt[D-1];
      assign k_rest[s][p]  = sum_rest(corrupt);

      ras_predictor #(.DEPTH(D), .NUM_TAGS(128), .UNCORRUPT(1'b1)) u_dut (
        .clk, .rst_n,
        .pred_valid_i(pred_valid), .pred_type_i(pred_type), .pred_pc_i(pred_pc),
        .pred_tag_i(pred_tag), .pred_target_valid_o(tgt_valid), .pred_target_o(tgt),
        .mis_valid_i(mis_valid), .mis_type_i(mis_type), .mis_pc_i(mis_pc),
        .mis_tag_i(mis_tag), .tos_o(tos)
      );

      ras_pipe_harness #(
        .DEPTH(D), .NUM_TAGS(128), .UNCORRUPT(1'b1), .PIPE(PIPES[p]), .N_BRANCHES(20000)
      ) u_h (
        .clk, .rst_n,
        .pred_valid, .pred_type, .pred_pc, .pred_tag, .tgt_valid, .tgt,
        .mis_valid, .mis_type, .mis_pc, .mis_tag, .tos,
        .done(done[s][p]), .checks(ch[s][p]), .failures(fa[s][p]),
        .n_push(unused[0]), .n_pop(unused[1]), .n_wrap(unused[2]),
        .n_rec_other(ro[s][p]), .n_rec_call(rc[s][p]), .n_rec_ret(rr[s][p]),
        .n_squash(unused[3]), .n_repair(unused[4]), .n_call_unc(unused[5]),
        .n_ret_ok(rok[s][p]), .n_ret_mis(rmis[s][p]), .n_corrupt(corrupt)
      );
    end
  end

  function automatic bit all_done();
    for (int s = 0; s < NS; s++)
      for (int p = 0; p < NP; p++)
        if (!done[s][p]) return 0;
    return 1;
  endfunction

  task automatic report();
    for (int s = 0; s < NS; s++)
      for (int p = 0; p < NP; p++) begin
        checks += ch[s][p];
        failures += fa[s][p];
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    report();
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!all_done()) @(posedge clk);
    $display("return misprediction rate in 0.1%% (rows: entries, columns: resolve latency 5..30)");
    for (int s = 0; s < NS; s++) begin
      string line;
      line = $sformatf("%3d entries:", SIZES[s]);
      for (int p = 0; p < NP; p++)
        line = {line, $sformatf(" %5d", 1000 * rmis[s][p] / (rok[s][p] + rmis[s][p]))};
      $display("%s", line);
    end
    $display("corrupted entries per 1000 branches after recoveries, 32 entries, by distance from the recovered TOS");
    for (int p = 0; p < NP; p++)
      $display("  latency %2d: tos %4d  below %4d  above %4d  other %4d", PIPES[p],
               1000 * k_tos[2][p] / 20000, 1000 * k_below[2][p] / 20000,
               1000 * k_above[2][p] / 20000, 1000 * k_rest[2][p] / 20000);
    for (int s = 0; s < NS; s++)
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (ro[s][p] == 0 || rc[s][p] == 0 || rr[s][p] == 0) begin
          failures++;
          $display("FAIL %0d entries, latency %0d: a recovery type never happened", SIZES[s], PIPES[p]);
        end
      end
    report();
    $finish;
  end
endmodule
