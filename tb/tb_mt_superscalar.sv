// End-to-end testbench for mt_superscalar at its default size.
//
// Program (word addresses): thread 0 divides 100 by 7 alone (its divide
// cannot suspend the only thread), stores the quotient, forks two threads
// with relocation maps 4 and 6, and all three run the same loop body on
// their own physical registers: N times a remote load, a divide of the value
// by 3 (both thread suspending) and an accumulation, with a taken branch back.
// Each thread stores its sum locally and remotely and joins; the last thread
// continues, adds the three sums and stores the total and a done flag.
//
// Models: instruction memory answering line fills after IMEM_LAT cycles, data
// memory answering data-cache line fills after DMEM_LAT cycles, and
// a network with remote memory answering reads after REMOTE_LAT cycles (50,
// the largest published remote latency). Checked: every stored value against
// sums computed here, and that each mechanism happened at least once
// (suspension granted and refused, TSI release and direct commit, TSIB
// write-back, instruction and data cache misses, redirects, fork, join, dispatch stall).
module tb_mt_superscalar;
  import mt_pkg::*;
  localparam int IMEM_LAT   = 10;
  localparam int REMOTE_LAT = 50;
  localparam int N          = 4;
  localparam int NREM       = 1024;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  word_t boot_pc = 0;
  logic suspend_en = 1;
  logic imem_req_valid, imem_rsp_valid = 0;
  word_t imem_req_addr, imem_rsp_line [FETCH_W];
  logic net_req_valid, net_req_store, net_rsp_valid = 0;
  logic [2:0] net_req_idx, net_rsp_idx = 0;
  word_t net_req_addr, net_req_data, net_rsp_data = 0;
  logic st_valid; word_t st_addr, st_data;
  logic dmem_req_valid, dmem_rsp_valid = 0; word_t dmem_req_addr, dmem_rsp_line [4];
  logic [NTHREADS-1:0] thr_valid, thr_ready;
  logic [2:0] ev_commit;
  logic ev_tsi_suspend, ev_tsi_nosuspend, ev_fetch_cancel, ev_release, ev_tsib_direct, ev_tsib_wb,
        ev_icache_miss, ev_dcache_miss, ev_redirect, ev_fork, ev_join, ev_dispatch_stall;

  mt_superscalar dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- program ----------------
  word_t prog [256];
  localparam int W1 = 8, W2 = 10, BODY = 12, LOOP = 17;
  initial begin
    foreach (prog[i]) prog[i] = '0;
    prog[0]  = enc_i(OP_ADDI, 1, 0, 100);
    prog[1]  = enc_i(OP_ADDI, 2, 0, 7);
    prog[2]  = enc_r(OP_DIV, 3, 1, 2);
    prog[3]  = enc_s(OP_ST, 0, 3, 'h200);
    prog[4]  = enc_i(OP_FORK, 4, 0, W1 - 4);
    prog[5]  = enc_i(OP_FORK, 6, 0, W2 - 5);
    prog[6]  = enc_i(OP_ADDI, 1, 0, 0);
    prog[7]  = enc_i(OP_JMP, 0, 0, BODY - 7);
    prog[8]  = enc_i(OP_ADDI, 1, 0, 1);
    prog[9]  = enc_i(OP_JMP, 0, 0, BODY - 9);
    prog[10] = enc_i(OP_ADDI, 1, 0, 2);
    prog[11] = enc_i(OP_JMP, 0, 0, BODY - 11);
    prog[12] = enc_i(OP_ADDI, 4, 0, 6);
    prog[13] = enc_r(OP_SLL, 2, 1, 4);
    prog[14] = enc_i(OP_ADDI, 3, 0, 3);
    prog[15] = enc_i(OP_ADDI, 8, 0, 0);
    prog[16] = enc_i(OP_ADDI, 9, 0, N);
    prog[17] = enc_i(OP_LDR, 5, 2, 0);
    prog[18] = enc_r(OP_DIV, 7, 5, 3);
    prog[19] = enc_r(OP_ADD, 8, 8, 7);
    prog[20] = enc_i(OP_ADDI, 2, 2, 1);
    prog[21] = enc_i(OP_ADDI, 9, 9, -1);
    prog[22] = enc_s(OP_BNE, 9, 0, LOOP - 22);
    prog[23] = enc_i(OP_ADDI, 10, 1, 'h201);
    prog[24] = enc_s(OP_ST, 10, 8, 0);
    prog[25] = enc_i(OP_ADDI, 11, 1, 'h4000);
    prog[26] = enc_s(OP_STR, 11, 8, 0);
    prog[27] = enc_i(OP_JOIN, 0, 0, 0);
    prog[28] = enc_i(OP_LD, 12, 0, 'h201);
    prog[29] = enc_i(OP_LD, 13, 0, 'h202);
    prog[30] = enc_i(OP_LD, 14, 0, 'h203);
    prog[31] = enc_r(OP_ADD, 12, 12, 13);
    prog[32] = enc_r(OP_ADD, 12, 12, 14);
    prog[33] = enc_s(OP_ST, 0, 12, 'h210);
    prog[34] = enc_i(OP_ADDI, 15, 0, 1);
    prog[35] = enc_s(OP_ST, 0, 15, 'h3ff);
    prog[36] = enc_i(OP_JMP, 0, 0, 0);
  end

  // ---------------- instruction memory model ----------------
  initial begin
    foreach (imem_rsp_line[w]) imem_rsp_line[w] = '0;
    forever begin
      @(posedge clk);
      if (rst_n && imem_req_valid) begin
        word_t a;
        a = imem_req_addr;
        repeat (IMEM_LAT - 1) @(posedge clk);
        #1;
        foreach (imem_rsp_line[w]) imem_rsp_line[w] = prog[(a + w) % 256];
        imem_rsp_valid = 1;
        @(posedge clk); #1 imem_rsp_valid = 0;
      end
    end
  end

  // ---------------- network + remote memory model ----------------
  function automatic word_t rem_init(input int a); return word_t'(a * 3 + 5); endfunction
  word_t rmem [NREM];
  int    pend_due [$];
  int    pend_idx [$];
  word_t pend_dat [$];
  int    cycle = 0;
  initial foreach (rmem[i]) rmem[i] = rem_init(i);
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && net_req_valid) begin
      if (net_req_store) rmem[net_req_addr % NREM] = net_req_data;
      else begin
        pend_due.push_back(cycle + REMOTE_LAT);
        pend_idx.push_back(int'(net_req_idx));
        pend_dat.push_back(rmem[net_req_addr % NREM]);
      end
    end
  end
  always @(negedge clk) begin
    net_rsp_valid = 0;
    if (pend_due.size() > 0 && pend_due[0] <= cycle) begin
      net_rsp_valid = 1;
      net_rsp_idx   = 3'(pend_idx.pop_front());
      net_rsp_data  = pend_dat.pop_front();
      void'(pend_due.pop_front());
    end
  end

  // ---------------- observation ----------------
  word_t lmem [1024];
  initial foreach (lmem[i]) lmem[i] = '0;
  logic  lwritten [1024];
  int n_susp = 0, n_nosusp = 0, n_cancel = 0, n_rel = 0, n_direct = 0, n_wb = 0, n_miss = 0, n_dmiss = 0,
      n_redir = 0, n_fork = 0, n_join = 0, n_stall = 0, n_commit = 0;
  initial foreach (lwritten[i]) lwritten[i] = 0;
  always @(posedge clk) if (rst_n) begin
    if (st_valid) begin lmem[st_addr % 1024] = st_data; lwritten[st_addr % 1024] = 1; end
    n_susp   += int'(ev_tsi_suspend);
    n_nosusp += int'(ev_tsi_nosuspend);
    n_cancel += int'(ev_fetch_cancel);
    n_rel    += int'(ev_release);
    n_direct += int'(ev_tsib_direct);
    n_wb     += int'(ev_tsib_wb);
    n_miss   += int'(ev_icache_miss);
    n_dmiss  += int'(ev_dcache_miss);
    n_redir  += int'(ev_redirect);
    n_fork   += int'(ev_fork);
    n_join   += int'(ev_join);
    n_stall  += int'(ev_dispatch_stall);
    n_commit += int'(ev_commit);
  end

  // data memory model: line fills after DMEM_LAT cycles from lmem, which
  // also receives the written-through local stores
  localparam int DMEM_LAT = 8;
  initial begin
    foreach (dmem_rsp_line[w]) dmem_rsp_line[w] = '0;
    forever begin
      @(posedge clk);
      if (rst_n && dmem_req_valid) begin
        word_t a;
        a = dmem_req_addr;
        repeat (DMEM_LAT - 1) @(posedge clk);
        #1;
        foreach (dmem_rsp_line[w]) dmem_rsp_line[w] = lmem[(a + w) % 1024];
        dmem_rsp_valid = 1;
        @(posedge clk); #1 dmem_rsp_valid = 0;
      end
    end
  end

  initial begin
    int sums [3];
    int total;
    total = 0;
    for (int id = 0; id < 3; id++) begin
      sums[id] = 0;
      for (int i = 0; i < N; i++) sums[id] += int'(rem_init(id * 64 + i)) / 3;
      total += sums[id];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (lwritten['h3ff]);
    repeat (20) @(posedge clk);
    $display("finished after %0d cycles, %0d instructions committed", cycle, n_commit);
    $display("events: suspend=%0d nosuspend=%0d cancel=%0d release=%0d direct=%0d tsib_wb=%0d miss=%0d dmiss=%0d redirect=%0d fork=%0d join=%0d stall=%0d",
             n_susp, n_nosusp, n_cancel, n_rel, n_direct, n_wb, n_miss, n_dmiss, n_redir, n_fork, n_join, n_stall);
    chk(lwritten['h200] && lmem['h200] == 100 / 7, $sformatf("single-thread divide result %0d", lmem['h200]));
    for (int id = 0; id < 3; id++) begin
      chk(lwritten['h201 + id] && lmem['h201 + id] == word_t'(sums[id]),
          $sformatf("thread %0d local sum %0d exp %0d", id, lmem['h201 + id], sums[id]));
      chk(rmem['h4000 % NREM + id] == word_t'(sums[id]), $sformatf("thread %0d remote sum", id));
    end
    chk(lmem['h210] == word_t'(total), $sformatf("total %0d exp %0d", lmem['h210], total));
    chk(thr_valid == 6'b000001 || $countones(thr_valid) == 1, "one thread left after join");
    chk(n_susp > 0,   "TSI suspended a thread");
    chk(n_nosusp > 0, "TSI of the only ready thread did not suspend");
    chk(n_rel > 0,    "TSI released at bottom of window");
    chk(n_direct > 0, "TSIB committed directly");
    chk(n_wb > 0,     "TSIB wrote back into window");
    chk(n_miss > 0,   "instruction cache miss suspended a thread");
    chk(n_dmiss > 0,  "data cache miss (load waited in the window)");
    chk(n_redir > 0,  "branch redirect");
    chk(n_fork == 2,  "two forks");
    chk(n_join == 3,  "three joins");
    chk(n_stall > 0,  "dispatch stall on full window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: stores seen to 0x200..0x203: %b%b%b%b", lwritten['h200], lwritten['h201], lwritten['h202], lwritten['h203]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
