// Testbench for load_store_unit (small data cache, data memory model with a
// DLAT-cycle line fill): stores pushed into the store queue drain in order to
// the data memory; a load of an address still in the queue is refused until
// it drains; a load that misses is refused, starts one line fill and hits
// once the line is in (value in the issue cycle); a store to a cached line
// updates the cache and memory; a store is held while a fill is outstanding;
// a store returns its address; remote loads enter the Load Queue, go
// out as network requests and are completed by replies (written back, or
// committed directly after release); a remote store leaves as a network
// write; a full Load Queue refuses further remote loads.
module tb_load_store_unit;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic issue_valid = 0, issue_has_dst = 1; opcode_e issue_op = OP_LD; tag_t issue_tag = 0;
  tid_t issue_tid = 0; preg_t issue_dst = 0; word_t issue_base = 0, issue_imm = 0;
  logic issue_ok, ls_wb_valid, lq_wb_valid, lq_rf_we, lq_act_valid;
  tag_t ls_wb_tag, lq_wb_tag; word_t ls_wb_result, lq_wb_result, lq_rf_wdata; preg_t lq_rf_waddr; tid_t lq_act_tid;
  logic rel_valid = 0, flush = 0; tag_t rel_tag = 0; tid_t flush_tid = 0;
  logic sq_push = 0, sq_remote = 0, sq_full, sq_empty; word_t sq_addr = 0, sq_data = 0;
  logic net_req_valid, net_req_store, net_rsp_valid = 0; logic [2:0] net_req_idx, net_rsp_idx = 0;
  word_t net_req_addr, net_req_data, net_rsp_data = 0;
  logic st_valid, dc_miss; word_t st_addr, st_data; logic [5:0] lq_busy;
  logic dmem_req_valid, dmem_rsp_valid = 0; word_t dmem_req_addr, dmem_rsp_line [4];
  load_store_unit #(.LQ_DEPTH(6), .SQ_DEPTH(4), .DC_LINES(16)) dut (.*);
  always #5 clk = ~clk;

  // data memory model: mem[a] = a + 1000 until written; line fill after DLAT cycles
  localparam int DLAT = 4;
  word_t mem [256];
  int    n_req = 0;
  initial foreach (mem[i]) mem[i] = word_t'(i + 1000);
  always @(posedge clk) if (rst_n && st_valid) mem[st_addr % 256] = st_data;
  initial begin
    foreach (dmem_rsp_line[w]) dmem_rsp_line[w] = '0;
    forever begin
      @(posedge clk);
      if (rst_n && dmem_req_valid) begin
        word_t a;
        a = dmem_req_addr;
        n_req++;
        repeat (DLAT - 1) @(posedge clk);
        #1;
        foreach (dmem_rsp_line[w]) dmem_rsp_line[w] = mem[(a + w) % 256];
        dmem_rsp_valid = 1;
        @(posedge clk); #1 dmem_rsp_valid = 0;
      end
    end
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // push two local stores in consecutive cycles; they drain one per cycle
    @(negedge clk); sq_push = 1; sq_addr = 10; sq_data = 111; #1;
    chk(!st_valid, "store queue empty before push");
    @(negedge clk); sq_addr = 11; sq_data = 222; #1;
    chk(st_valid && st_addr == 10 && st_data == 111, "first store drains");
    // a load to 11 while the store to 11 is queued is refused
    // (the window itself keeps a load behind a store of its thread that is
    // still committing, so only queued stores are checked here)
    @(negedge clk); sq_push = 0; #1;
    chk(st_valid && st_addr == 11, "second store drains");
    issue_valid = 1; issue_op = OP_LD; issue_base = 5; issue_imm = 6; issue_tag = 2; #1;
    chk(!issue_ok && !dc_miss, "load refused while a store to its address is queued");
    @(negedge clk); #1;
    chk(!issue_ok && !ls_wb_valid && dc_miss, "load misses: refused, fill starts");
    begin
      int waited = 0;
      while (!issue_ok) begin @(negedge clk); #1; waited++; chk(!dc_miss, "one fill only"); end
      chk(waited == DLAT + 2, $sformatf("miss penalty %0d cycles", waited));
    end
    chk(issue_ok && ls_wb_valid && ls_wb_tag == 2 && ls_wb_result == 222, "load reads stored value");
    issue_base = 10; issue_imm = 0; #1; chk(issue_ok && ls_wb_result == 111, "same line hits");
    issue_base = 9; #1; chk(issue_ok && ls_wb_result == 1009, "line filled from memory");
    chk(n_req == 1, "one line request");
    // write-through store to a cached word
    issue_valid = 0;
    @(negedge clk); sq_push = 1; sq_addr = 9; sq_data = 999;
    @(negedge clk); sq_push = 0; #1; chk(st_valid && st_addr == 9, "store 9 drains");
    @(negedge clk); issue_valid = 1; issue_base = 9; #1;
    chk(issue_ok && ls_wb_result == 999 && mem[9] == 999, "store updated cache and memory");
    // a store is held while a fill is outstanding
    issue_base = 40; #1; chk(!issue_ok && dc_miss, "miss at 40");
    @(negedge clk); issue_valid = 0; sq_push = 1; sq_addr = 41; sq_data = 4141;
    @(negedge clk); sq_push = 0; #1; chk(!st_valid, "store held during fill");
    while (!st_valid) @(negedge clk);
    @(negedge clk);
    issue_valid = 1; issue_base = 41; #1;
    chk(issue_ok && ls_wb_result == 4141, "held store reaches the filled line");
    // store issue returns its address
    issue_op = OP_ST; issue_base = 100; issue_imm = 5; issue_tag = 4; #1;
    chk(issue_ok && ls_wb_valid && ls_wb_result == 105, "store address");
    // remote load
    issue_op = OP_LDR; issue_base = 32'h8000; issue_imm = 4; issue_tag = 9; issue_tid = 3; issue_dst = 50; #1;
    chk(issue_ok && !ls_wb_valid, "remote load accepted, no immediate result");
    @(negedge clk); issue_valid = 0; #1;
    chk(net_req_valid && !net_req_store && net_req_addr == 32'h8004 && net_req_idx == 0, "network read request");
    @(negedge clk); #1; chk(!net_req_valid, "request sent once");
    net_rsp_valid = 1; net_rsp_idx = 0; net_rsp_data = 32'h1234;
    @(negedge clk); net_rsp_valid = 0; #1;
    chk(lq_wb_valid && lq_wb_tag == 9 && lq_wb_result == 32'h1234, "remote load written back");
    // remote load released before reply -> direct commit
    @(negedge clk); issue_valid = 1; issue_tag = 12; issue_dst = 51; issue_tid = 2;
    @(negedge clk); issue_valid = 0; rel_valid = 1; rel_tag = 12;
    @(negedge clk); rel_valid = 0;
    net_rsp_valid = 1; net_rsp_idx = 0; net_rsp_data = 77;
    @(negedge clk); net_rsp_valid = 0; #1;
    chk(lq_rf_we && lq_rf_waddr == 51 && lq_rf_wdata == 77 && lq_act_valid && lq_act_tid == 2, "direct commit");
    // remote store
    @(negedge clk); sq_push = 1; sq_remote = 1; sq_addr = 32'h9000; sq_data = 5;
    @(negedge clk); sq_push = 0; sq_remote = 0; #1;
    chk(net_req_valid && net_req_store && net_req_addr == 32'h9000 && net_req_data == 5 && !st_valid, "remote store");
    // fill the Load Queue
    @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      issue_valid = 1; issue_op = OP_LDR; issue_tag = tag_t'(k); #1;
      chk(issue_ok, "LQ accepts");
      @(negedge clk);
    end
    #1; chk(!issue_ok && lq_busy == 6'b111111, "LQ full refuses");
    issue_valid = 0;
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
