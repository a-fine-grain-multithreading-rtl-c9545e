// Testbench for central_window with four real ALUs and behavioural models
// of the register file, divide unit and load/store unit.
//   1. a dependent chain inside one dispatch block and a register-file
//      operand: values and in-order commit;
//   2. a divide of a suspended thread reaching the bottom unfinished is
//      released to its TSIB (rel_*) and younger instructions commit past it;
//   3. a divide of a thread that was not suspended holds the bottom until
//      its result is written back, then commits it;
//   4. a taken branch commits with a redirect and invalidates the younger
//      instructions of its thread only;
//   5. a store goes to the load/store unit, commits into the store queue;
//   6. a fork waits at the bottom while the TAS is full; a join flushes;
//   7. dispatch is refused when fewer than four slots are free.
module tb_central_window;
  import mt_pkg::*;
  localparam int NALU = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  dec_t dec [FETCH_W];
  logic accept;
  preg_t rf_raddr [2*FETCH_W]; word_t rf_rdata [2*FETCH_W];
  logic alu_valid [NALU]; opcode_e alu_op [NALU];
  word_t alu_a [NALU], alu_b [NALU], alu_imm [NALU], alu_pc [NALU], alu_result [NALU], alu_target [NALU];
  logic alu_taken [NALU];
  logic div_valid, div_has_dst, div_full = 0, div_wb_valid = 0; tag_t div_tag, div_wb_tag = 0;
  tid_t div_tid; preg_t div_dst; word_t div_a, div_b, div_wb_result = 0;
  logic mem_valid, mem_has_dst, mem_ok, ls_wb_valid, lq_wb_valid = 0; opcode_e mem_op;
  tag_t mem_tag, ls_wb_tag, lq_wb_tag = 0; tid_t mem_tid; preg_t mem_dst;
  word_t mem_base, mem_imm, ls_wb_result, lq_wb_result = 0;
  logic rf_we [FETCH_W]; preg_t rf_waddr [FETCH_W]; word_t rf_wdata [FETCH_W];
  logic sq_push, sq_remote, sq_full = 0, rel_valid; word_t sq_addr, sq_data; tag_t rel_tag;
  logic [NTHREADS-1:0] act_mask;
  logic redir, fork_valid, fork_ready = 1, join_valid, flush;
  tid_t redir_tid, join_tid, flush_tid; word_t redir_pc, fork_pc, join_pc; rrm_t fork_rrm, join_rrm;
  logic [2:0] n_commit; logic [TAG_W:0] occupancy;

  central_window #(.NALU(NALU), .COMMIT_W(FETCH_W)) dut (.*);
  for (genvar a = 0; a < NALU; a++) begin : g_alu
    alu u (.op(alu_op[a]), .a(alu_a[a]), .b(alu_b[a]), .imm(alu_imm[a]), .pc(alu_pc[a]),
           .result(alu_result[a]), .taken(alu_taken[a]), .target(alu_target[a]));
  end
  always #5 clk = ~clk;

  // register file model, written by commits
  word_t rf [64];
  always_comb foreach (rf_raddr[r]) rf_rdata[r] = rf[rf_raddr[r]];
  // load/store model: stores and local loads accepted at once
  assign mem_ok       = mem_valid;
  assign ls_wb_valid  = mem_valid;
  assign ls_wb_tag    = mem_tag;
  assign ls_wb_result = mem_base + mem_imm;

  // commit log
  int   log_dst [$];
  word_t log_val [$];
  int   n_rel = 0, n_push = 0, n_redir = 0, n_fork = 0, n_join = 0;
  word_t push_addr, push_data, redir_to;
  always @(posedge clk) if (rst_n) begin
    foreach (rf_we[k]) if (rf_we[k]) begin
      rf[rf_waddr[k]] = rf_wdata[k];
      log_dst.push_back(int'(rf_waddr[k])); log_val.push_back(rf_wdata[k]);
    end
    if (rel_valid) n_rel++;
    if (sq_push) begin n_push++; push_addr = sq_addr; push_data = sq_data; end
    if (redir) begin n_redir++; redir_to = redir_pc; end
    if (fork_valid && fork_ready) n_fork++;
    if (join_valid) n_join++;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic dec_t mk(input opcode_e op, input int tid, input int dst, input int s1, input int s2,
                              input int imm, input int pc);
    dec_t d;
    d = '0;
    d.valid = 1; d.op = op; d.tid = tid_t'(tid); d.pc = word_t'(pc); d.imm = word_t'(imm);
    d.dst = preg_t'(dst); d.has_dst = (dst != 0);
    d.s1 = preg_t'(s1); d.use_s1 = (s1 >= 0); d.s2 = preg_t'(s2); d.use_s2 = (s2 >= 0);
    if (s1 < 0) d.s1 = 0;
    if (s2 < 0) d.s2 = 0;
    case (op)
      OP_DIV: begin d.fu = FU_DIV; d.tsi = 1; end
      OP_ST, OP_LD: d.fu = FU_MEM;
      OP_BEQ, OP_BNE, OP_JMP: d.fu = FU_BR;
      OP_FORK, OP_JOIN: d.fu = FU_THR;
      OP_NOP: d.fu = FU_NONE;
      default: d.fu = FU_ALU;
    endcase
    return d;
  endfunction

  task automatic send(input dec_t d0, input dec_t d1, input dec_t d2, input dec_t d3);
    @(negedge clk);
    dec[0] = d0; dec[1] = d1; dec[2] = d2; dec[3] = d3;
    while (!accept) @(negedge clk);
    @(negedge clk);
    foreach (dec[k]) dec[k] = '0;
  endtask

  task automatic wait_empty;
    int n;
    n = 0;
    while (occupancy != 0 && n < 200) begin @(negedge clk); n++; end
    chk(occupancy == 0, "window drained");
  endtask

  dec_t none;
  initial begin
    none = '0;
    foreach (dec[k]) dec[k] = '0;
    foreach (rf[i]) rf[i] = '0;
    rf[10] = 100; rf[12] = 6; rf[13] = 42;
    repeat (2) @(posedge clk); rst_n = 1;
    // 1. chain
    send(mk(OP_ADDI, 0, 1, 0, -1, 5, 0), mk(OP_ADD, 0, 2, 1, 1, 0, 1),
         mk(OP_ADDI, 0, 3, 2, -1, 1, 2), mk(OP_ADDI, 0, 11, 10, -1, 1, 3));
    wait_empty;
    chk(log_dst.size() == 4, "four commits");
    chk(log_dst[0] == 1 && log_val[0] == 5 && log_dst[1] == 2 && log_val[1] == 10 &&
        log_dst[2] == 3 && log_val[2] == 11 && log_dst[3] == 11 && log_val[3] == 101, "chain values in order");
    log_dst.delete(); log_val.delete();
    // 2. released divide (thread 1 suspended); younger thread-2 work commits past it
    begin
      dec_t dv;
      dv = mk(OP_DIV, 1, 40, 10, 12, 0, 8); dv.susp = 1;
      send(dv, mk(OP_ADDI, 2, 50, 0, -1, 7, 20), mk(OP_ADDI, 2, 51, 50, -1, 1, 21), none);
      repeat (6) @(negedge clk);
      chk(n_rel == 1, "suspended divide released at bottom");
      chk(log_dst.size() == 2 && rf[51] == 8, "younger instructions committed past the TSI");
      chk(occupancy == 0, "released entry left the window");
    end
    log_dst.delete(); log_val.delete();
    // 3. divide of a non-suspended thread holds the bottom until written back
    send(mk(OP_DIV, 0, 41, 10, 12, 0, 30), mk(OP_ADDI, 0, 42, 0, -1, 3, 31), none, none);
    @(negedge clk);
    repeat (5) @(negedge clk);
    chk(log_dst.size() == 0 && occupancy == 2, "no commit past unfinished divide");
    div_wb_valid = 1; div_wb_tag = tag_t'(int'(dut.head)); div_wb_result = 16;
    @(negedge clk); div_wb_valid = 0;
    repeat (3) @(negedge clk);
    chk(log_dst.size() == 2 && rf[41] == 16 && rf[42] == 3, "divide committed after write-back");
    log_dst.delete(); log_val.delete();
    // 4. taken branch of thread 3 flushes its younger instructions only
    send(mk(OP_BEQ, 3, 0, 0, 0, -4, 40), mk(OP_ADDI, 3, 20, 0, -1, 9, 41),
         mk(OP_ADDI, 4, 21, 0, -1, 9, 50), mk(OP_ADDI, 3, 22, 0, -1, 9, 42));
    wait_empty;
    chk(n_redir == 1 && redir_to == 36, "redirect to branch target");
    chk(rf[20] == 0 && rf[22] == 0 && rf[21] == 9, "only same-thread instructions invalidated");
    // 5. store
    send(mk(OP_ST, 0, 0, 10, 13, 3, 60), none, none, none);
    wait_empty;
    chk(n_push == 1 && push_addr == 103 && push_data == 42, "store committed into store queue");
    // 6. fork waits while TAS full, then join flushes
    fork_ready = 0;
    send(mk(OP_FORK, 0, 0, -1, -1, 10, 70), mk(OP_ADDI, 0, 23, 0, -1, 1, 71), none, none);
    repeat (5) @(negedge clk);
    chk(n_fork == 0 && occupancy == 2, "fork waits for a free TAS entry");
    fork_ready = 1;
    wait_empty;
    chk(n_fork == 1 && rf[23] == 1, "fork then next instruction");
    send(mk(OP_JOIN, 5, 0, -1, -1, 0, 80), mk(OP_ADDI, 5, 24, 0, -1, 1, 81), none, none);
    wait_empty;
    chk(n_join == 1 && rf[24] == 0, "join flushes younger same-thread instruction");
    // 7. fill: unfinished non-suspended divide at bottom, then blocks until full
    send(mk(OP_DIV, 0, 43, 10, 12, 0, 90), none, none, none);
    for (int b = 0; b < 3; b++)
      send(mk(OP_ADDI, 0, 25, 0, -1, 1, 91), mk(OP_ADDI, 0, 25, 0, -1, 1, 92),
           mk(OP_ADDI, 0, 25, 0, -1, 1, 93), mk(OP_ADDI, 0, 25, 0, -1, 1, 94));
    @(negedge clk);
    chk(!accept && occupancy == 13, "dispatch refused with three free slots");
    div_wb_valid = 1; div_wb_tag = tag_t'(int'(dut.head)); div_wb_result = 1;
    @(negedge clk); div_wb_valid = 0;
    wait_empty;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
