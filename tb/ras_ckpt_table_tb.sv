// ras_ckpt_table_tb: self-checking test of the per-branch checkpoint table.
//
// Writes random checkpoints under random tags, reads random tags back in the
// same cycles, and compares with a reference array; also checks that a write
// becomes visible only after the clock edge and that reset clears the table.
module ras_ckpt_table_tb;
  localparam int unsigned NUM_TAGS = 128;
  localparam int unsigned IDX_W    = 5;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned TAG_W    = $clog2(NUM_TAGS);

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  logic              wr;
  logic [TAG_W-1:0]  wr_tag, rd_tag;
  logic [IDX_W-1:0]  wr_tos, rd_tos;
  logic [ADDR_W-1:0] wr_data, rd_data;

  logic [IDX_W-1:0]  ref_tos  [NUM_TAGS];
  logic [ADDR_W-1:0] ref_data [NUM_TAGS];
  int checks = 0, failures = 0;

  ras_ckpt_table #(.NUM_TAGS(NUM_TAGS), .IDX_W(IDX_W), .ADDR_W(ADDR_W), .KEEP_DATA(1'b1)) dut (
    .clk, .rst_n, .wr_i(wr), .wr_tag_i(wr_tag), .wr_tos_i(wr_tos), .wr_data_i(wr_data),
    .rd_tag_i(rd_tag), .rd_tos_o(rd_tos), .rd_data_o(rd_data)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(string what);
    checks++;
    if (rd_tos !== ref_tos[rd_tag] || rd_data !== ref_data[rd_tag]) begin
      failures++;
      $display("FAIL %s tag %0d: tos %0d exp %0d data %h exp %h", what, rd_tag,
               rd_tos, ref_tos[rd_tag], rd_data, ref_data[rd_tag]);
    end
  endtask

  initial begin
    wr = 0; wr_tag = '0; wr_tos = '0; wr_data = '0; rd_tag = '0;
    for (int i = 0; i < NUM_TAGS; i++) begin ref_tos[i] = '0; ref_data[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NUM_TAGS; i++) begin rd_tag = TAG_W'(i); #1; check_read("reset"); end

    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      wr      = $urandom_range(0, 3) != 0;
      wr_tag  = TAG_W'($urandom);
      wr_tos  = IDX_W'($urandom);
      wr_data = $urandom;
      rd_tag  = ($urandom_range(0, 3) == 0) ? wr_tag : TAG_W'($urandom);
      #1;
      check_read("before edge");     // old contents until the edge
      @(posedge clk);
      if (wr) begin ref_tos[wr_tag] = wr_tos; ref_data[wr_tag] = wr_data; end
      #1;
      check_read("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
