// ras_stack_tb: self-checking test of the circular return-address stack.
//
// Drives random pushes, pops, TOS overrides and repair writes (including
// collisions between them) and compares the TOS, the top entry and the entry
// below it every cycle with a reference ring kept in the testbench. Also
// checks wrap-around in both directions and, by sweeping the TOS over every
// entry at the end, the whole array.
module ras_stack_tb;
  localparam int unsigned DEPTH  = 32;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned IDX_W  = $clog2(DEPTH);

  logic              clk;
  initial clk = 1'b0;
  logic              rst_n;
  initial rst_n = 1'b0;
  logic              push, pop, set_tos, wr0, wr1;
  logic [ADDR_W-1:0] push_addr, wr0_data, wr1_data;
  logic [IDX_W-1:0]  new_tos, wr0_idx, wr1_idx;
  logic [IDX_W-1:0]  tos;
  logic [ADDR_W-1:0] top_addr, below_addr;

  int checks = 0, failures = 0;
  int wraps_up = 0, wraps_down = 0;

  logic [ADDR_W-1:0] ref_mem [DEPTH];
  int                ref_tos;

  ras_stack #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) dut (
    .clk, .rst_n,
    .push_i(push), .push_addr_i(push_addr), .pop_i(pop),
    .set_tos_i(set_tos), .new_tos_i(new_tos),
    .wr0_i(wr0), .wr0_idx_i(wr0_idx), .wr0_data_i(wr0_data),
    .wr1_i(wr1), .wr1_idx_i(wr1_idx), .wr1_data_i(wr1_data),
    .tos_o(tos), .top_addr_o(top_addr), .below_addr_o(below_addr)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(string what);
    checks++;
    if (tos !== IDX_W'(ref_tos) || top_addr !== ref_mem[ref_tos]) begin
      failures++;
      $display("FAIL %s: tos=%0d exp %0d top=%h exp %h", what, tos, ref_tos,
               top_addr, ref_mem[ref_tos]);
    end
    checks++;
    if (below_addr !== ref_mem[(ref_tos + DEPTH - 1) % DEPTH]) begin
      failures++;
      $display("FAIL %s: below=%h exp %h", what, below_addr, ref_mem[(ref_tos + DEPTH - 1) % DEPTH]);
    end
  endtask

  // apply the stimulus currently on the inputs to the reference at a clock edge
  task automatic ref_step();
    int nt;
    nt = ref_tos;
    if (set_tos) nt = int'(new_tos);
    else if (push) nt = (ref_tos + 1) % DEPTH;
    else if (pop) nt = (ref_tos + DEPTH - 1) % DEPTH;
    if (wr0) ref_mem[wr0_idx] = wr0_data;
    if (wr1) ref_mem[wr1_idx] = wr1_data;
    if (push && !set_tos) ref_mem[(ref_tos + 1) % DEPTH] = push_addr;
    if (!set_tos && push && ref_tos == DEPTH - 1) wraps_up++;
    if (!set_tos && !push && pop && ref_tos == 0) wraps_down++;
    ref_tos = nt;
  endtask

  task automatic idle();
    push = 0; pop = 0; set_tos = 0; wr0 = 0; wr1 = 0;
    push_addr = '0; wr0_data = '0; wr1_data = '0;
    new_tos = '0; wr0_idx = '0; wr1_idx = '0;
  endtask

  initial begin
    idle();
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    ref_tos = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_state("reset");

    // directed: fill beyond the depth, wrap up, then pop everything back
    for (int i = 0; i < DEPTH + 3; i++) begin
      push = 1; push_addr = 32'h1000 + 8 * i;
      @(posedge clk); ref_step(); @(negedge clk); idle();
      check_state("push");
    end
    for (int i = 0; i < DEPTH + 5; i++) begin
      pop = 1;
      @(posedge clk); ref_step(); @(negedge clk); idle();
      check_state("pop");
    end

    // random mix
    for (int n = 0; n < 20000; n++) begin
      int r;
      r = $urandom_range(0, 99);
      push = (r < 40);
      pop  = (r >= 35 && r < 75);
      set_tos = ($urandom_range(0, 9) == 0);
      new_tos = IDX_W'($urandom);
      wr0 = ($urandom_range(0, 7) == 0);
      wr1 = ($urandom_range(0, 7) == 0);
      wr0_idx = ($urandom_range(0, 3) == 0) ? IDX_W'((ref_tos + 1) % DEPTH) : IDX_W'($urandom);
      wr1_idx = ($urandom_range(0, 3) == 0) ? wr0_idx : IDX_W'($urandom);
      push_addr = $urandom; wr0_data = $urandom; wr1_data = $urandom;
      @(posedge clk); ref_step(); @(negedge clk); idle();
      check_state("random");
    end

    // sweep every entry through the top to check the whole array
    for (int i = 0; i < DEPTH; i++) begin
      set_tos = 1; new_tos = IDX_W'(i);
      @(posedge clk); ref_step(); @(negedge clk); idle();
      check_state("sweep");
    end

    checks++;
    if (wraps_up == 0 || wraps_down == 0) begin
      failures++;
      $display("FAIL wrap-around not exercised (%0d up, %0d down)", wraps_up, wraps_down);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
