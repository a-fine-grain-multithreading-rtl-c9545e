// Workload testbench: single-threaded against multithreaded execution.
//
// One kernel is run three ways on the full-size core: ST, one thread doing
// the work of three in sequence; MT, three threads (fork/join) with thread
// suspension; MTns, the same three threads in no-suspend mode. The kernel is
// a loop of N iterations per thread of: remote load, divide of it by 3, local
// load from an array (cold in the data cache, so it misses once per line;
// data memory answers after DMEM_LAT cycles) and accumulation of both.
// Each way runs with a remote-load latency of 5 and of 50 cycles (the two
// latencies of the published experiments), from a cold instruction and data
// cache. Checked: every run stores the right three
// sums and misses the data cache at least once per array line, and
// with latency 50 the MT run takes fewer cycles than the ST run and no more
// than the MTns run. Cycle counts and speedups are printed.
module tb_mt_workload;
  import mt_pkg::*;
  localparam int IMEM_LAT = 10;
  localparam int N        = 8;
  localparam int NREM     = 1024;
  localparam int LBASE    = 'h100;   // local array read by the kernel

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

  word_t prog [256];
  int remote_lat = 50;

  task automatic load_mt;
    foreach (prog[i]) prog[i] = '0;
    prog[0]  = enc_i(OP_FORK, 4, 0, 8 - 0);
    prog[1]  = enc_i(OP_FORK, 6, 0, 10 - 1);
    prog[2]  = enc_i(OP_ADDI, 1, 0, 0);
    prog[3]  = enc_i(OP_JMP, 0, 0, 12 - 3);
    prog[8]  = enc_i(OP_ADDI, 1, 0, 1);
    prog[9]  = enc_i(OP_JMP, 0, 0, 12 - 9);
    prog[10] = enc_i(OP_ADDI, 1, 0, 2);
    prog[11] = enc_i(OP_JMP, 0, 0, 12 - 11);
    prog[12] = enc_i(OP_ADDI, 4, 0, 6);
    prog[13] = enc_r(OP_SLL, 2, 1, 4);
    prog[14] = enc_i(OP_ADDI, 3, 0, 3);
    prog[15] = enc_i(OP_ADDI, 8, 0, 0);
    prog[16] = enc_i(OP_ADDI, 9, 0, N);
    prog[17] = enc_i(OP_LDR, 5, 2, 0);
    prog[18] = enc_i(OP_LD, 11, 2, LBASE);
    prog[19] = enc_r(OP_DIV, 7, 5, 3);
    prog[20] = enc_r(OP_ADD, 8, 8, 7);
    prog[21] = enc_r(OP_ADD, 8, 8, 11);
    prog[22] = enc_i(OP_ADDI, 2, 2, 1);
    prog[23] = enc_i(OP_ADDI, 9, 9, -1);
    prog[24] = enc_s(OP_BNE, 9, 0, 17 - 24);
    prog[25] = enc_i(OP_ADDI, 10, 1, 'h201);
    prog[26] = enc_s(OP_ST, 10, 8, 0);
    prog[27] = enc_i(OP_JOIN, 0, 0, 0);
    prog[28] = enc_i(OP_ADDI, 15, 0, 1);
    prog[29] = enc_s(OP_ST, 0, 15, 'h3ff);
    prog[30] = enc_i(OP_JMP, 0, 0, 0);
  endtask

  task automatic load_st;
    foreach (prog[i]) prog[i] = '0;
    prog[0]  = enc_i(OP_ADDI, 1, 0, 0);
    prog[1]  = enc_i(OP_ADDI, 4, 0, 6);
    prog[2]  = enc_r(OP_SLL, 2, 1, 4);
    prog[3]  = enc_i(OP_ADDI, 3, 0, 3);
    prog[4]  = enc_i(OP_ADDI, 8, 0, 0);
    prog[5]  = enc_i(OP_ADDI, 9, 0, N);
    prog[6]  = enc_i(OP_LDR, 5, 2, 0);
    prog[7]  = enc_i(OP_LD, 11, 2, LBASE);
    prog[8]  = enc_r(OP_DIV, 7, 5, 3);
    prog[9]  = enc_r(OP_ADD, 8, 8, 7);
    prog[10] = enc_r(OP_ADD, 8, 8, 11);
    prog[11] = enc_i(OP_ADDI, 2, 2, 1);
    prog[12] = enc_i(OP_ADDI, 9, 9, -1);
    prog[13] = enc_s(OP_BNE, 9, 0, 6 - 13);
    prog[14] = enc_i(OP_ADDI, 10, 1, 'h201);
    prog[15] = enc_s(OP_ST, 10, 8, 0);
    prog[16] = enc_i(OP_ADDI, 1, 1, 1);
    prog[17] = enc_i(OP_ADDI, 12, 0, 3);
    prog[18] = enc_s(OP_BNE, 1, 12, 1 - 18);
    prog[19] = enc_i(OP_ADDI, 15, 0, 1);
    prog[20] = enc_s(OP_ST, 0, 15, 'h3ff);
    prog[21] = enc_i(OP_JMP, 0, 0, 0);
  endtask

  // instruction memory model
  initial begin
    foreach (imem_rsp_line[w]) imem_rsp_line[w] = '0;
    forever begin
      @(posedge clk);
      if (rst_n && imem_req_valid) begin
        word_t a;
        a = imem_req_addr;
        // a reset between runs drops the request in flight
        for (int k = 0; k < IMEM_LAT - 1 && rst_n; k++) @(posedge clk);
        #1;
        if (rst_n) begin
          foreach (imem_rsp_line[w]) imem_rsp_line[w] = prog[(a + w) % 256];
          imem_rsp_valid = 1;
          @(posedge clk); #1 imem_rsp_valid = 0;
        end
      end
    end
  end

  // network + remote memory model
  function automatic word_t rem_init(input int a); return word_t'(a * 3 + 5); endfunction
  word_t rmem [NREM];
  int    pend_due [$];
  int    pend_idx [$];
  word_t pend_dat [$];
  int    cycle = 0;
  initial foreach (rmem[i]) rmem[i] = rem_init(i);
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && net_req_valid && !net_req_store) begin
      pend_due.push_back(cycle + remote_lat);
      pend_idx.push_back(int'(net_req_idx));
      pend_dat.push_back(rmem[net_req_addr % NREM]);
    end
  end
  always @(negedge clk) begin
    net_rsp_valid = 0;
    if (rst_n && pend_due.size() > 0 && pend_due[0] <= cycle) begin
      net_rsp_valid = 1;
      net_rsp_idx   = 3'(pend_idx.pop_front());
      net_rsp_data  = pend_dat.pop_front();
      void'(pend_due.pop_front());
    end
  end

  word_t lmem [1024];
  initial foreach (lmem[i]) lmem[i] = word_t'(i);   // local array: lmem[a] = a
  logic  lwritten [1024];
  int    n_susp = 0, n_dmiss = 0;
  always @(posedge clk) if (rst_n) begin
    if (st_valid) begin lmem[st_addr % 1024] = st_data; lwritten[st_addr % 1024] = 1; end
    n_susp += int'(ev_tsi_suspend);
    n_dmiss += int'(ev_dcache_miss);
  end

  task automatic run(input string name, input logic mt, input logic susp, input int lat, output int cycles);
    int start, sums [3];
    rst_n = 0;
    remote_lat = lat;
    suspend_en = susp;
    pend_due.delete(); pend_idx.delete(); pend_dat.delete();
    foreach (lwritten[i]) lwritten[i] = 0;
    if (mt) load_mt(); else load_st();
    repeat (3) @(posedge clk);
    n_susp = 0; n_dmiss = 0;
    start = cycle;
    rst_n = 1;
    fork
      wait (lwritten['h3ff]);
      repeat (40000) @(posedge clk);
    join_any
    disable fork;
    cycles = cycle - start;
    chk(lwritten['h3ff], {name, " finished"});
    for (int id = 0; id < 3; id++) begin
      sums[id] = 0;
      for (int i = 0; i < N; i++) sums[id] += int'(rem_init(id * 64 + i)) / 3 + LBASE + id * 64 + i;
      chk(lwritten['h201 + id] && lmem['h201 + id] == word_t'(sums[id]), $sformatf("%s sum %0d got %0d want %0d", name, id, lmem['h201 + id], sums[id]));
    end
    if (mt && susp) chk(n_susp > 0, {name, " suspended threads"});
    if (!susp)      chk(n_susp == 0, {name, " never suspended"});
    chk(n_dmiss >= 6, {name, " data cache misses on the local array"});
    $display("%-6s remote latency %2d: %0d cycles, %0d data cache misses", name, lat, cycles, n_dmiss);
  endtask

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
        for (int k = 0; k < DMEM_LAT - 1 && rst_n; k++) @(posedge clk);
        #1;
        if (rst_n) begin
          foreach (dmem_rsp_line[w]) dmem_rsp_line[w] = lmem[(a + w) % 1024];
          dmem_rsp_valid = 1;
          @(posedge clk); #1 dmem_rsp_valid = 0;
        end
      end
    end
  end

  initial begin
    int lats [2] = '{5, 50};
    foreach (lats[k]) begin
      int c_st, c_mt, c_ns;
      run("ST",   0, 1, lats[k], c_st);
      run("MT",   1, 1, lats[k], c_mt);
      run("MTns", 1, 0, lats[k], c_ns);
      $display("latency %0d: MT speedup over ST %0.2f, over MTns %0.2f",
               lats[k], real'(c_st) / real'(c_mt), real'(c_ns) / real'(c_mt));
      if (lats[k] == 50) begin
        chk(c_mt < c_st, "MT faster than ST at latency 50");
        chk(c_mt <= c_ns, "suspension does not slow MT at latency 50");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
