// Testbench for tsib: (a) an entry completing before its release is written
// back to the window by tag; (b) an entry released first commits directly to
// the register file and reactivates its thread; (c) release and completion
// in the same cycle go the direct way; (d) a flush removes unreleased
// entries of the thread, keeps released ones, and keeps a started entry
// (dead) until its completion so it cannot be reused early; full/alloc.
module tb_tsib;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, alloc_has_dst = 1; tag_t alloc_tag = 0; tid_t alloc_tid = 0;
  preg_t alloc_dst = 0; logic [31:0] alloc_payload = 0;
  logic full; logic [1:0] alloc_idx;
  logic [3:0] e_waiting, e_valid, e_started; logic [31:0] e_payload [4];
  logic start_valid = 0; logic [1:0] start_idx = 0;
  logic cmp_valid = 0; logic [1:0] cmp_idx = 0; word_t cmp_result = 0;
  logic rel_valid = 0; tag_t rel_tag = 0; logic flush = 0; tid_t flush_tid = 0;
  logic wb_valid, rf_we, act_valid; tag_t wb_tag; word_t wb_result, rf_wdata; preg_t rf_waddr; tid_t act_tid;
  tsib #(.DEPTH(4), .PW(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask
  task automatic alloc(input int tg, input int td, input int dst, input int pay);
    @(negedge clk); alloc_valid = 1; alloc_tag = tag_t'(tg); alloc_tid = tid_t'(td);
    alloc_dst = preg_t'(dst); alloc_payload = pay;
    @(negedge clk); alloc_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // (a)
    alloc(5, 1, 40, 32'haaaa);
    chk(e_waiting == 4'b0001 && e_payload[0] == 32'haaaa, "entry waiting with payload");
    start_valid = 1; start_idx = 0; @(negedge clk); start_valid = 0;
    chk(e_waiting == 0 && e_started[0], "started");
    cmp_valid = 1; cmp_idx = 0; cmp_result = 77; @(negedge clk); cmp_valid = 0; #1;
    chk(wb_valid && wb_tag == 5 && wb_result == 77 && !rf_we && !act_valid, "write-back by tag");
    @(negedge clk); chk(!wb_valid && e_valid == 0, "freed after write-back");
    // (b)
    alloc(7, 2, 41, 1);
    rel_valid = 1; rel_tag = 7; @(negedge clk); rel_valid = 0;
    cmp_valid = 1; cmp_idx = 0; cmp_result = 99; @(negedge clk); cmp_valid = 0; #1;
    chk(!wb_valid && rf_we && rf_waddr == 41 && rf_wdata == 99 && act_valid && act_tid == 2, "direct commit");
    @(negedge clk); chk(e_valid == 0, "freed after direct commit");
    // (c) completion then release in the same cycle as write-back would happen
    alloc(3, 0, 42, 1);
    cmp_valid = 1; cmp_idx = 0; cmp_result = 11; @(negedge clk); cmp_valid = 0;
    rel_valid = 1; rel_tag = 3; #1; chk(!wb_valid, "release wins over write-back");
    @(negedge clk); rel_valid = 0; #1;
    chk(rf_we && rf_waddr == 42 && rf_wdata == 11, "committed directly");
    @(negedge clk);
    // (d)
    alloc(1, 4, 43, 0);             // idx0: released
    alloc(2, 4, 44, 0);             // idx1: started, unreleased
    alloc(9, 4, 45, 0);             // idx2: waiting
    alloc(10, 3, 46, 0);            // idx3: other thread
    chk(full, "full with four");
    rel_valid = 1; rel_tag = 1; start_valid = 1; start_idx = 1; @(negedge clk);
    rel_valid = 0; start_valid = 0;
    flush = 1; flush_tid = 4; @(negedge clk); flush = 0;
    chk(e_valid == 4'b1011, "flush: released and started kept, waiting removed");
    chk(alloc_idx == 2 && !full, "freed entry reused first");
    cmp_valid = 1; cmp_idx = 1; cmp_result = 5; @(negedge clk); cmp_valid = 0; #1;
    chk(!wb_valid && e_valid == 4'b1001, "dead entry dropped at completion");
    cmp_valid = 1; cmp_idx = 0; cmp_result = 6; @(negedge clk); cmp_valid = 0; #1;
    chk(rf_we && rf_waddr == 43, "released entry survives flush and commits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
