// ras_pipe_harness: drives one return-address predictor from a model of a
// speculative pipeline and checks it.
//
// The program on the correct path is generated on the fly: calls, returns and
// other branches, with phases of deep recursion so that the call depth goes
// past the stack depth. One branch is fetched per cycle (with bubbles), gets a
// tag, and resolves PIPE cycles later, oldest first. A call or other branch is
// mispredicted at random; a return is mispredicted exactly when the predicted
// address differs from the program's real return address. After a
// mispredicted branch, fetch follows a wrong path of random branches until the
// branch resolves; then the predictor is told, the pipeline is flushed and the
// correct path resumes.
//
// Checks, every cycle:
//   - predicted target and TOS against a reference stack kept here, with the
//     same checkpoint and recovery rules (checkpoint before the branch's
//     update, or after it with CKPT_AFTER);
//   - after each recovery, that the TOS equals the program's real call depth
//     modulo DEPTH (the stack is aligned) - this does not use the reference;
//   - with CALL_UNCORRUPT, that the top entry after a recovered call is that
//     call's return address; with UNCORRUPT, that after a recovered
//     non-call branch the top entry is the one seen when it was fetched.
// The predictor is instantiated by the enclosing testbench and connected to
// the ports here; the parameters must match its configuration. Mechanism
// counters are brought out for the enclosing testbench.
module ras_pipe_harness
  import ras_pkg::*;
#(
  parameter int unsigned DEPTH          = 32,
  parameter int unsigned NUM_TAGS       = 128,
  parameter bit          UNCORRUPT      = 1'b0,
  parameter bit          CALL_UNCORRUPT = 1'b0,
  parameter bit          CKPT_AFTER     = 1'b0,
  parameter int unsigned PIPE           = 20,
  parameter int unsigned N_BRANCHES     = 20000,
  localparam int unsigned ADDR_W     = 32,
  localparam int unsigned INST_BYTES = 8,
  localparam int unsigned IDX_W      = $clog2(DEPTH),
  localparam int unsigned TAG_W      = $clog2(NUM_TAGS)
) (
  input  logic clk,
  input  logic rst_n,
  // to and from the predictor under test
  output logic              pred_valid,
  output br_type_e          pred_type,
  output logic [ADDR_W-1:0] pred_pc,
  output logic [TAG_W-1:0]  pred_tag,
  input  logic              tgt_valid,
  input  logic [ADDR_W-1:0] tgt,
  output logic              mis_valid,
  output br_type_e          mis_type,
  output logic [ADDR_W-1:0] mis_pc,
  output logic [TAG_W-1:0]  mis_tag,
  input  logic [IDX_W-1:0]  tos,
  // results
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_push,
  output int   n_pop,
  output int   n_wrap,
  output int   n_rec_other,
  output int   n_rec_call,
  output int   n_rec_ret,
  output int   n_squash,
  output int   n_repair,
  output int   n_call_unc,
  output int   n_ret_ok,
  output int   n_ret_mis,
  // corrupted entries found after recoveries, by distance from the recovered
  // TOS (0 = the TOS itself, 1 = the entry below it, DEPTH-1 = the one above)
  output int   n_corrupt [DEPTH]
);

  // ---- reference stack ----
  logic [ADDR_W-1:0] r_mem [DEPTH];
  int                r_tos;
  int                c_tos  [NUM_TAGS];
  logic [ADDR_W-1:0] c_data [NUM_TAGS];

  // ---- uncorrupted stack: updated by correct-path branches only ----
  logic [ADDR_W-1:0] u_mem [DEPTH];
  int                u_tos;

  // ---- pipeline model ----
  typedef struct {
    int unsigned       tag;
    br_type_e          btype;
    logic [ADDR_W-1:0] pc;
    bit                mispred;
    int                fetch_cycle;
    int                depth_after;
    logic [ADDR_W-1:0] top_at_fetch;
  } inflight_t;

  inflight_t         pipe_q [$];
  logic [ADDR_W-1:0] arch_ret [$];    // the program's real return addresses
  int                arch_depth;
  bit                wrong_path;
  int                cycle;
  int unsigned       next_tag;
  int                fetched;
  int                deep_phase;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL [%m] cycle %0d: %s", cycle, msg);
  endtask

  function automatic logic [ADDR_W-1:0] rand_pc();
    return {$urandom_range(32'h0000_1000, 32'h0fff_ffff)} & ~32'(INST_BYTES - 1);
  endfunction

  initial begin
    inflight_t         rec;
    inflight_t         br;
    bit                do_pred, do_mis, on_cp;
    int                exp_after;
    logic [ADDR_W-1:0] exp_top;
    int                post_kind;       // 0 none, 1 call-uncorruption, 2 content repair
    int                r;

    done = 0; checks = 0; failures = 0;
    n_push = 0; n_pop = 0; n_wrap = 0; n_rec_other = 0; n_rec_call = 0; n_rec_ret = 0;
    n_squash = 0; n_repair = 0; n_call_unc = 0; n_ret_ok = 0; n_ret_mis = 0;
    pred_valid = 0; pred_type = BR_OTHER; pred_pc = '0; pred_tag = '0;
    mis_valid = 0; mis_type = BR_OTHER; mis_pc = '0; mis_tag = '0;
    for (int i = 0; i < DEPTH; i++) begin r_mem[i] = '0; u_mem[i] = '0; n_corrupt[i] = 0; end
    u_tos = 0;
    for (int i = 0; i < NUM_TAGS; i++) begin c_tos[i] = 0; c_data[i] = '0; end
    do_mis = 0; do_pred = 0; on_cp = 0;
    r_tos = 0; arch_depth = 0; wrong_path = 0; cycle = 0; next_tag = 0; fetched = 0;
    deep_phase = 0; post_kind = 0; exp_after = 0; exp_top = '0;

    @(posedge rst_n);
    while (fetched < N_BRANCHES || pipe_q.size() != 0) begin
      @(negedge clk);
      cycle++;

      // checks that belong to the recovery of the previous cycle
      if (do_mis) begin
        checks++;
        if (int'(tos) != exp_after) fail($sformatf("misaligned after recovery: tos %0d, call depth mod DEPTH %0d", tos, exp_after));
        if (post_kind != 0) begin
          checks++;
          if (tgt != exp_top) fail($sformatf("repaired top %h, expected %h (kind %0d)", tgt, exp_top, post_kind));
        end
      end

      // ---- resolve ----
      do_mis = 0;
      mis_valid = 0;
      if (pipe_q.size() != 0 && pipe_q[0].fetch_cycle + PIPE <= cycle) begin
        rec = pipe_q.pop_front();
        if (rec.mispred) begin
          do_mis = 1;
          mis_valid = 1; mis_type = rec.btype; mis_pc = rec.pc; mis_tag = TAG_W'(rec.tag);
          pipe_q.delete();                  // everything younger is wrong path
          wrong_path = 0;
          exp_after = rec.depth_after % DEPTH;
          post_kind = 0;
          if (CALL_UNCORRUPT && rec.btype == BR_CALL) begin
            post_kind = 1; exp_top = rec.pc + INST_BYTES;
          end else if (UNCORRUPT && rec.btype == BR_OTHER) begin
            post_kind = 2; exp_top = rec.top_at_fetch;
          end
          case (rec.btype)
            BR_CALL:   n_rec_call++;
            BR_RETURN: n_rec_ret++;
            default:   n_rec_other++;
          endcase
        end
      end

      // ---- fetch ----
      do_pred = (fetched < N_BRANCHES) && ($urandom_range(0, 9) < 8);
      pred_valid = do_pred;
      if (do_pred) begin
        br.tag = next_tag;
        br.fetch_cycle = cycle;
        br.pc = rand_pc();
        br.mispred = 0;
        if (wrong_path) begin
          r = $urandom_range(0, 2);
          br.btype = (r == 0) ? BR_OTHER : (r == 1) ? BR_CALL : BR_RETURN;
        end else begin
          if (deep_phase == 0 && $urandom_range(0, 499) == 0) deep_phase = $urandom_range(30, 60);
          r = $urandom_range(0, 99);
          if (deep_phase > 0) begin
            br.btype = (r < 70) ? BR_CALL : (r < 85 && arch_depth > 0) ? BR_RETURN : BR_OTHER;
            deep_phase--;
          end else begin
            br.btype = (r < 28) ? BR_CALL : (r < 56 && arch_depth > 0) ? BR_RETURN : BR_OTHER;
          end
        end
        pred_type = br.btype;
        pred_pc = br.pc;
        pred_tag = TAG_W'(br.tag);
      end
      #1;
      br.top_at_fetch = tgt;

      // ---- compare with the reference before the edge ----
      checks++;
      if (tgt != r_mem[r_tos]) fail($sformatf("predicted target %h, expected %h", tgt, r_mem[r_tos]));
      checks++;
      if (int'(tos) != r_tos) fail($sformatf("tos %0d, expected %0d", tos, r_tos));
      checks++;
      if (tgt_valid != (do_pred && pred_type == BR_RETURN)) fail("pred_target_valid_o");

      on_cp = do_pred && !do_mis && !wrong_path;
      if (do_pred && do_mis) begin
        n_squash++;                         // fetched on the squashed path: dropped
      end else if (do_pred) begin
        if (!wrong_path) begin
          case (br.btype)
            BR_CALL: begin
              arch_ret.push_back(br.pc + INST_BYTES);
              arch_depth++;
              br.mispred = ($urandom_range(0, 99) < 8);
            end
            BR_RETURN: begin
              logic [ADDR_W-1:0] actual;
              actual = arch_ret.pop_back();
              arch_depth--;
              br.mispred = (tgt != actual);
              if (br.mispred) n_ret_mis++; else n_ret_ok++;
            end
            default: br.mispred = ($urandom_range(0, 99) < 10);
          endcase
          br.depth_after = arch_depth;
          if (br.mispred) wrong_path = 1;
        end
        pipe_q.push_back(br);
        next_tag = (next_tag + 1) % NUM_TAGS;
        fetched++;
      end

      // ---- reference update at the edge ----
      @(posedge clk);
      if (do_mis) begin
        int ct;
        ct = c_tos[mis_tag];
        if (UNCORRUPT) r_mem[ct] = c_data[mis_tag];
        if (CKPT_AFTER) r_tos = ct;
        else begin
          case (mis_type)
            BR_CALL:   r_tos = (ct + 1) % DEPTH;
            BR_RETURN: r_tos = (ct + DEPTH - 1) % DEPTH;
            default:   r_tos = ct;
          endcase
        end
        if (UNCORRUPT) n_repair++;
        if (CALL_UNCORRUPT && mis_type == BR_CALL) begin
          r_mem[r_tos] = mis_pc + INST_BYTES;
          n_call_unc++;
        end
        // the recovered stack against the uncorrupted one
        checks++;
        if (u_tos != r_tos) fail($sformatf("recovered tos %0d, uncorrupted stack at %0d", r_tos, u_tos));
        for (int i = 0; i < DEPTH; i++)
          if (r_mem[i] != u_mem[i]) n_corrupt[(r_tos - i + DEPTH) % DEPTH]++;
      end else if (do_pred) begin
        if (!CKPT_AFTER) begin
          c_tos[pred_tag] = r_tos;
          c_data[pred_tag] = r_mem[r_tos];
        end
        if (pred_type == BR_CALL) begin
          if (r_tos == DEPTH - 1) n_wrap++;
          r_tos = (r_tos + 1) % DEPTH;
          r_mem[r_tos] = pred_pc + INST_BYTES;
          n_push++;
        end else if (pred_type == BR_RETURN) begin
          if (r_tos == 0) n_wrap++;
          r_tos = (r_tos + DEPTH - 1) % DEPTH;
          n_pop++;
        end
        if (CKPT_AFTER) begin
          c_tos[pred_tag] = r_tos;
          c_data[pred_tag] = r_mem[r_tos];
        end
        if (on_cp) begin
          if (pred_type == BR_CALL) begin
            u_tos = (u_tos + 1) % DEPTH;
            u_mem[u_tos] = pred_pc + INST_BYTES;
          end else if (pred_type == BR_RETURN) begin
            u_tos = (u_tos + DEPTH - 1) % DEPTH;
          end
        end
      end
    end
    @(negedge clk);
    pred_valid = 0; mis_valid = 0;
    done = 1;
  end
endmodule
