// Testbench for tas: reset state, fork into free entries, round-robin
// fetch order, PC update, suspension refused for the only ready thread and
// granted otherwise, TSI activation, cache-miss suspend/reactivate, branch
// redirect, and join (all but the last thread die; the last continues).
module tb_tas;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  word_t boot_pc = 32'h100;
  logic suspend_en = 1;
  logic fetch_valid, fetch_go = 0, pc_we = 0, dec_susp = 0, susp_ok, miss_susp = 0, miss_done = 0;
  tid_t fetch_tid, dec_susp_tid = 0, miss_tid = 0, miss_done_tid = 0, redir_tid = 0, join_tid = 0;
  word_t fetch_pc, next_pc = 0, dec_susp_pc = 0, miss_pc = 0, redir_pc = 0, fork_pc = 0, join_pc = 0;
  rrm_t fetch_rrm, fork_rrm = 0, join_rrm = 0;
  logic [5:0] act_mask = 0, thr_valid, thr_ready;
  logic redir = 0, fork_valid = 0, fork_ready, join_valid = 0, join_continue;
  tas #(.NT(6)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask
  task automatic tick; @(posedge clk); #1; endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1; #1;
    chk(thr_valid == 6'b000001, "only thread 0 after reset");
    chk(fetch_valid && fetch_tid == 0 && fetch_pc == 32'h100 && fetch_rrm == 0, "thread 0 fetches boot pc");
    // fetch thread 0 and advance PC
    fetch_go = 1; pc_we = 1; next_pc = 32'h104; tick; fetch_go = 0; pc_we = 0;
    chk(fetch_pc == 32'h104, "pc advanced");
    // suspension refused for the only ready thread
    dec_susp = 1; dec_susp_tid = 0; dec_susp_pc = 32'h200; #1;
    chk(!susp_ok, "only ready thread not suspended");
    tick; dec_susp = 0;
    chk(thr_ready == 6'b000001 && fetch_pc == 32'h104, "thread 0 still ready");
    // fork two threads
    fork_valid = 1; fork_pc = 32'h300; fork_rrm = 4; #1; chk(fork_ready, "fork ready");
    tick;
    fork_pc = 32'h400; fork_rrm = 6; tick; fork_valid = 0;
    chk(thr_valid == 6'b000111, "three threads valid");
    // round robin: last = 0 -> 1, 2, 0, 1
    begin
      tid_t seq [4] = '{1, 2, 0, 1};
      foreach (seq[k]) begin
        chk(fetch_valid && fetch_tid == seq[k], $sformatf("round robin step %0d got %0d", k, fetch_tid));
        if (k == 0) chk(fetch_pc == 32'h300 && fetch_rrm == 4, "forked thread pc/rrm");
        fetch_go = 1; tick; fetch_go = 0;
      end
    end
    // suspend thread 1 (granted), it is skipped
    dec_susp = 1; dec_susp_tid = 1; dec_susp_pc = 32'h305; #1; chk(susp_ok, "suspend granted");
    suspend_en = 0; #1; chk(!susp_ok, "no-suspend mode refuses"); suspend_en = 1; #1;
    tick; dec_susp = 0;
    chk(thr_ready == 6'b000101, "thread 1 suspended");
    for (int k = 0; k < 4; k++) begin
      chk(fetch_tid != 1, "suspended thread not fetched");
      fetch_go = 1; tick; fetch_go = 0;
    end
    act_mask = 6'b000010; tick; act_mask = 0;
    chk(thr_ready == 6'b000111, "thread 1 reactivated");
    // cache-miss suspension of thread 2
    miss_susp = 1; miss_tid = 2; miss_pc = 32'h404; tick; miss_susp = 0;
    chk(thr_ready == 6'b000011, "thread 2 miss-suspended");
    miss_done = 1; miss_done_tid = 2; tick; miss_done = 0;
    chk(thr_ready == 6'b000111, "thread 2 back after fill");
    // redirect thread 2
    redir = 1; redir_tid = 2; redir_pc = 32'h500; tick; redir = 0;
    while (fetch_tid != 2) begin fetch_go = 1; tick; end
    fetch_go = 0;
    chk(fetch_pc == 32'h500, "redirected pc");
    // joins: 0 and 2 die, 1 continues
    join_valid = 1; join_tid = 0; join_pc = 32'h600; join_rrm = 0; #1; chk(!join_continue, "join 0 dies");
    tick; join_tid = 2; #1; chk(!join_continue, "join 2 dies"); tick;
    join_tid = 1; join_rrm = 0; #1; chk(join_continue, "last join continues"); tick; join_valid = 0;
    chk(thr_valid == 6'b000010 && fetch_tid == 1 && fetch_pc == 32'h600 && fetch_rrm == 0, "continuing thread");
    // fill the TAS: 5 forks then full
    fork_valid = 1;
    for (int k = 0; k < 5; k++) begin fork_pc = 32'h700 + k; tick; end
    #1; chk(!fork_ready && thr_valid == 6'b111111, "TAS full after six threads");
    fork_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
