// Testbench for fetch_unit with a behavioural cache (lines below address
// 0x100 hit; others miss until the test says the fill is done). Checks the
// fetched block, slot mask and next address on a hit; on a miss the suspend
// request, the Cache Miss Buffer contents and the reactivation after the
// fill; a second miss while the buffer is full; cancellation by decode,
// flush, and stall holding the fetch/decode register.
module tb_fetch_unit;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic t_valid = 0; tid_t t_tid = 0; word_t t_pc = 0; rrm_t t_rrm = 0;
  logic fetch_go, pc_we, miss_susp, miss_done, cmb_busy;
  word_t next_pc, miss_pc, cmb_addr, ic_addr, ic_line [FETCH_W];
  tid_t miss_tid, miss_done_tid;
  logic ic_hit, ic_fill_start, ic_fill_busy = 0, ic_fill_done = 0;
  logic stall = 0, cancel = 0, flush = 0;
  tid_t cancel_tid = 0, flush_tid = 0;
  logic fd_valid; tid_t fd_tid; rrm_t fd_rrm; word_t fd_pc, fd_ins [FETCH_W];
  logic [FETCH_W-1:0] fd_mask;
  fetch_unit dut (.*);
  always #5 clk = ~clk;

  assign ic_hit = ic_addr < 32'h100;
  always_comb foreach (ic_line[w]) ic_line[w] = {ic_addr[31:2], 2'b00} + w + 32'h1000;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // hit: pc 0x22 (slot 2 of block 0x20)
    @(negedge clk); t_valid = 1; t_tid = 3; t_pc = 32'h22; t_rrm = 5; #1;
    chk(fetch_go && pc_we && next_pc == 32'h24 && !miss_susp, "hit go/next pc");
    @(negedge clk); t_valid = 0;
    chk(fd_valid && fd_tid == 3 && fd_rrm == 5 && fd_pc == 32'h20 && fd_mask == 4'b1100, "fd block");
    chk(fd_ins[0] == 32'h1020 && fd_ins[3] == 32'h1023, "fd instructions");
    @(negedge clk); chk(!fd_valid, "no fetch -> fd empty");
    // miss
    t_valid = 1; t_tid = 1; t_pc = 32'h205; #1;
    chk(miss_susp && miss_tid == 1 && miss_pc == 32'h205 && ic_fill_start && !pc_we, "miss suspend");
    @(negedge clk); t_valid = 1; t_tid = 2; t_pc = 32'h300; #1;
    chk(cmb_busy && cmb_addr == 32'h205, "cache miss buffer holds pc");
    chk(!miss_susp && !ic_fill_start && !pc_we, "second miss while buffer full retried later");
    @(negedge clk); t_valid = 0; ic_fill_done = 1; #1;
    chk(miss_done && miss_done_tid == 1, "reactivate after fill");
    @(negedge clk); ic_fill_done = 0; #1; chk(!cmb_busy, "buffer freed");
    // cancel by decode for the same thread
    t_valid = 1; t_tid = 4; t_pc = 32'h40; cancel = 1; cancel_tid = 4; #1;
    chk(fetch_go && !pc_we, "cancelled fetch keeps pc");
    @(negedge clk); cancel = 0; t_valid = 0; chk(!fd_valid, "cancelled fetch not latched");
    // cancel for another thread does not matter
    t_valid = 1; t_tid = 4; t_pc = 32'h40; cancel = 1; cancel_tid = 2; #1;
    chk(pc_we, "cancel of other thread ignored");
    @(negedge clk); cancel = 0; t_valid = 0; chk(fd_valid && fd_pc == 32'h40 && fd_mask == 4'b1111, "fetched");
    // stall holds, flush of that thread empties
    stall = 1; t_valid = 1; t_tid = 0; t_pc = 32'h80; #1;
    chk(!fetch_go && !pc_we, "stall: no fetch");
    @(negedge clk); chk(fd_valid && fd_pc == 32'h40, "stall holds fd");
    flush = 1; flush_tid = 4; @(negedge clk); flush = 0;
    chk(!fd_valid, "flush empties fd of that thread");
    stall = 0; t_valid = 0;
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
