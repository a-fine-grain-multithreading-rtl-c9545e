// Fine-grain multithreaded four-wide superscalar core (top level).
//
// Up to six hardware threads share one out-of-order superscalar pipeline.
// The Thread Attribute Store (tas) chooses a ready thread round-robin every
// cycle; the fetch unit reads that thread's 4-instruction block from the
// instruction cache; the decoder remaps its registers with the thread's
// relocation map and writes it into the central instruction window, which
// issues out of order to four ALUs, a divide unit and a load/store unit and
// commits in order into the 64-entry physical register file.
//
// Long-latency instructions (DIV, remote load LDR) suspend their thread at
// decode, so other threads fill the pipeline, and run in a Thread Suspending
// Instruction Buffer (TSIB) of their unit. If such an instruction is still
// running when it reaches the bottom of the window it is released from the
// window and later commits from its TSIB; the thread is reactivated when it
// retires. An instruction-cache miss suspends its thread too until the line
// fill ends. A data-cache miss does not: the load waits in the window. FORK starts a thread, JOIN ends all but the last thread.
//
// Pipeline: TAS choice + cache lookup (cycle 1), decode + operand lookup +
// dispatch (cycle 2), issue + execute + write-back (from cycle 3), commit.
// External interfaces: line fills from instruction memory (imem_*), remote
// loads and stores over a network (net_*; requests are always accepted,
// replies carry the Load Queue index), data memory (dmem_* line fills for
// the data cache, and st_* for local stores written through, one per cycle,
// always accepted); ev_* are one-cycle event strobes for counting.
// The structure follows the published architecture; the instruction set and
// the timing of each stage are this design's own.
module mt_superscalar
  import mt_pkg::*;
#(
  parameter int unsigned ICACHE_LINES = 512,
  parameter int unsigned LQ_DEPTH     = 6,
  parameter int unsigned DIV_DEPTH    = 2,
  parameter int unsigned DC_LINES     = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t boot_pc,
  input  logic  suspend_en,        // 1: threads suspend on TSIs; 0: no-suspend mode
  // instruction memory
  output logic  imem_req_valid,
  output word_t imem_req_addr,
  input  logic  imem_rsp_valid,
  input  word_t imem_rsp_line [FETCH_W],
  // network for remote memory
  output logic  net_req_valid,
  output logic  net_req_store,
  output logic [$clog2(LQ_DEPTH)-1:0] net_req_idx,
  output word_t net_req_addr,
  output word_t net_req_data,
  input  logic  net_rsp_valid,
  input  logic [$clog2(LQ_DEPTH)-1:0] net_rsp_idx,
  input  word_t net_rsp_data,
  // data memory: cache line fills and write-through local stores
  output logic  dmem_req_valid,
  output word_t dmem_req_addr,
  input  logic  dmem_rsp_valid,
  input  word_t dmem_rsp_line [4],
  output logic  st_valid,
  output word_t st_addr,
  output word_t st_data,
  // status and events
  output logic [NTHREADS-1:0] thr_valid,
  output logic [NTHREADS-1:0] thr_ready,
  output logic [2:0] ev_commit,
  output logic  ev_tsi_suspend,
  output logic  ev_tsi_nosuspend,
  output logic  ev_fetch_cancel,
  output logic  ev_release,
  output logic  ev_tsib_direct,
  output logic  ev_tsib_wb,
  output logic  ev_icache_miss,
  output logic  ev_dcache_miss,
  output logic  ev_redirect,
  output logic  ev_fork,
  output logic  ev_join,
  output logic  ev_dispatch_stall
);
  // ---------------- TAS <-> fetch ----------------
  logic  t_valid, fetch_go, pc_we, susp_ok, fork_ready, join_continue;
  tid_t  t_tid;
  word_t t_pc, next_pc;
  rrm_t  t_rrm;
  logic  miss_susp, miss_done;
  tid_t  miss_tid, miss_done_tid;
  word_t miss_pc;
  logic  dec_susp, cancel;
  tid_t  dec_susp_tid, cancel_tid;
  word_t dec_susp_pc;
  logic [NTHREADS-1:0] act_mask;
  logic  redir, fork_valid, join_valid, flush;
  tid_t  redir_tid, join_tid, flush_tid;
  word_t redir_pc, fork_pc, join_pc;
  rrm_t  fork_rrm, join_rrm;
  logic  div_act_valid, lq_act_valid;
  tid_t  div_act_tid, lq_act_tid;
  logic [NTHREADS-1:0] act_all;

  always_comb begin
    act_all = act_mask;
    if (div_act_valid) act_all[div_act_tid] = 1'b1;
    if (lq_act_valid)  act_all[lq_act_tid]  = 1'b1;
  end

  tas u_tas (
    .clk, .rst_n, .boot_pc, .suspend_en,
    .fetch_valid(t_valid), .fetch_tid(t_tid), .fetch_pc(t_pc), .fetch_rrm(t_rrm),
    .fetch_go, .pc_we, .next_pc,
    .dec_susp, .dec_susp_tid, .dec_susp_pc, .susp_ok,
    .miss_susp, .miss_tid, .miss_pc, .miss_done, .miss_done_tid,
    .act_mask(act_all),
    .redir, .redir_tid, .redir_pc,
    .fork_valid, .fork_pc, .fork_rrm, .fork_ready,
    .join_valid, .join_tid, .join_pc, .join_rrm, .join_continue,
    .thr_valid, .thr_ready
  );

  // ---------------- fetch + instruction cache ----------------
  word_t ic_addr, ic_line [FETCH_W];
  logic  ic_hit, ic_fill_start, ic_fill_busy, ic_fill_done, cmb_busy;
  word_t ic_fill_done_addr, cmb_addr;
  logic  stall, accept;
  logic  fd_valid;
  tid_t  fd_tid;
  rrm_t  fd_rrm;
  word_t fd_pc, fd_ins [FETCH_W];
  logic [FETCH_W-1:0] fd_mask;

  icache #(.LINES(ICACHE_LINES)) u_icache (
    .clk, .rst_n, .lk_addr(ic_addr), .lk_hit(ic_hit), .lk_line(ic_line),
    .fill_start(ic_fill_start), .fill_addr(ic_addr), .fill_busy(ic_fill_busy),
    .fill_done(ic_fill_done), .fill_done_addr(ic_fill_done_addr),
    .mem_req_valid(imem_req_valid), .mem_req_addr(imem_req_addr),
    .mem_rsp_valid(imem_rsp_valid), .mem_rsp_line(imem_rsp_line)
  );

  fetch_unit u_fetch (
    .clk, .rst_n,
    .t_valid, .t_tid, .t_pc, .t_rrm, .fetch_go, .pc_we, .next_pc,
    .miss_susp, .miss_tid, .miss_pc, .miss_done, .miss_done_tid, .cmb_busy, .cmb_addr,
    .ic_addr, .ic_hit, .ic_line, .ic_fill_start, .ic_fill_busy, .ic_fill_done,
    .stall, .cancel, .cancel_tid, .flush, .flush_tid,
    .fd_valid, .fd_tid, .fd_rrm, .fd_pc, .fd_ins, .fd_mask
  );

  assign stall = fd_valid && !accept;

  // ---------------- decode ----------------
  dec_t dec [FETCH_W];
  decoder u_dec (
    .fd_valid, .fd_tid, .fd_rrm, .fd_pc, .fd_ins, .fd_mask,
    .accept, .flush, .flush_tid, .susp_ok,
    .dec, .dec_susp, .dec_susp_tid, .dec_susp_pc, .cancel, .cancel_tid
  );

  // ---------------- register file ----------------
  localparam int unsigned NWR = FETCH_W + 2;
  preg_t rf_raddr [2*FETCH_W];
  word_t rf_rdata [2*FETCH_W];
  logic  rf_we    [NWR];
  preg_t rf_waddr [NWR];
  word_t rf_wdata [NWR];
  logic  c_we    [FETCH_W];
  preg_t c_waddr [FETCH_W];
  word_t c_wdata [FETCH_W];
  logic  div_rf_we, lq_rf_we;
  preg_t div_rf_waddr, lq_rf_waddr;
  word_t div_rf_wdata, lq_rf_wdata;

  always_comb begin
    for (int k = 0; k < int'(FETCH_W); k++) begin
      rf_we[k] = c_we[k]; rf_waddr[k] = c_waddr[k]; rf_wdata[k] = c_wdata[k];
    end
    rf_we[FETCH_W]   = div_rf_we; rf_waddr[FETCH_W]   = div_rf_waddr; rf_wdata[FETCH_W]   = div_rf_wdata;
    rf_we[FETCH_W+1] = lq_rf_we;  rf_waddr[FETCH_W+1] = lq_rf_waddr;  rf_wdata[FETCH_W+1] = lq_rf_wdata;
  end

  regfile #(.N(NPREG), .NRD(2*FETCH_W), .NWR(NWR)) u_rf (
    .clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata), .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  // ---------------- central window ----------------
  localparam int unsigned NALU = 4;
  logic    alu_valid [NALU];
  opcode_e alu_op [NALU];
  word_t   alu_a [NALU], alu_b [NALU], alu_imm [NALU], alu_pc [NALU];
  word_t   alu_result [NALU], alu_target [NALU];
  logic    alu_taken [NALU];
  logic    div_valid, div_has_dst, div_full, div_wb_valid;
  tag_t    div_tag, div_wb_tag;
  tid_t    div_tid;
  preg_t   div_dst;
  word_t   div_a, div_b, div_wb_result;
  logic    mem_valid, mem_has_dst, mem_ok, ls_wb_valid, lq_wb_valid;
  opcode_e mem_op;
  tag_t    mem_tag, ls_wb_tag, lq_wb_tag;
  tid_t    mem_tid;
  preg_t   mem_dst;
  word_t   mem_base, mem_imm, ls_wb_result, lq_wb_result;
  logic    sq_push, sq_remote, sq_full, sq_empty, rel_valid;
  word_t   sq_addr, sq_data;
  tag_t    rel_tag;
  logic [TAG_W:0] occupancy;

  central_window #(.NALU(NALU), .COMMIT_W(FETCH_W)) u_win (
    .clk, .rst_n,
    .dec, .accept, .rf_raddr, .rf_rdata,
    .alu_valid, .alu_op, .alu_a, .alu_b, .alu_imm, .alu_pc, .alu_result, .alu_taken, .alu_target,
    .div_valid, .div_tag, .div_tid, .div_has_dst, .div_dst, .div_a, .div_b, .div_full,
    .div_wb_valid, .div_wb_tag, .div_wb_result,
    .mem_valid, .mem_op, .mem_tag, .mem_tid, .mem_has_dst, .mem_dst, .mem_base, .mem_imm, .mem_ok,
    .ls_wb_valid, .ls_wb_tag, .ls_wb_result, .lq_wb_valid, .lq_wb_tag, .lq_wb_result,
    .rf_we(c_we), .rf_waddr(c_waddr), .rf_wdata(c_wdata),
    .sq_push, .sq_addr, .sq_data, .sq_remote, .sq_full,
    .rel_valid, .rel_tag, .act_mask,
    .redir, .redir_tid, .redir_pc,
    .fork_valid, .fork_pc, .fork_rrm, .fork_ready,
    .join_valid, .join_tid, .join_pc, .join_rrm,
    .flush, .flush_tid, .n_commit(ev_commit), .occupancy
  );

  // ---------------- execution units ----------------
  for (genvar a = 0; a < int'(NALU); a++) begin : g_alu
    alu u_alu (
      .op(alu_op[a]), .a(alu_a[a]), .b(alu_b[a]), .imm(alu_imm[a]), .pc(alu_pc[a]),
      .result(alu_result[a]), .taken(alu_taken[a]), .target(alu_target[a])
    );
  end

  logic div_busy;
  div_unit #(.DEPTH(DIV_DEPTH)) u_divu (
    .clk, .rst_n,
    .issue_valid(div_valid), .issue_tag(div_tag), .issue_tid(div_tid), .issue_has_dst(div_has_dst),
    .issue_dst(div_dst), .issue_a(div_a), .issue_b(div_b), .full(div_full),
    .rel_valid, .rel_tag, .flush, .flush_tid,
    .wb_valid(div_wb_valid), .wb_tag(div_wb_tag), .wb_result(div_wb_result),
    .rf_we(div_rf_we), .rf_waddr(div_rf_waddr), .rf_wdata(div_rf_wdata),
    .act_valid(div_act_valid), .act_tid(div_act_tid), .busy(div_busy)
  );

  logic [LQ_DEPTH-1:0] lq_busy;
  load_store_unit #(.LQ_DEPTH(LQ_DEPTH), .DC_LINES(DC_LINES)) u_lsu (
    .clk, .rst_n,
    .issue_valid(mem_valid), .issue_op(mem_op), .issue_tag(mem_tag), .issue_tid(mem_tid),
    .issue_has_dst(mem_has_dst), .issue_dst(mem_dst), .issue_base(mem_base), .issue_imm(mem_imm),
    .issue_ok(mem_ok),
    .ls_wb_valid, .ls_wb_tag, .ls_wb_result,
    .lq_wb_valid, .lq_wb_tag, .lq_wb_result,
    .lq_rf_we, .lq_rf_waddr, .lq_rf_wdata, .lq_act_valid, .lq_act_tid,
    .rel_valid, .rel_tag, .flush, .flush_tid,
    .sq_push, .sq_addr, .sq_data, .sq_remote, .sq_full, .sq_empty,
    .net_req_valid, .net_req_store, .net_req_idx, .net_req_addr, .net_req_data,
    .net_rsp_valid, .net_rsp_idx, .net_rsp_data,
    .dmem_req_valid, .dmem_req_addr, .dmem_rsp_valid, .dmem_rsp_line,
    .st_valid, .st_addr, .st_data, .dc_miss(ev_dcache_miss), .lq_busy
  );

  // ---------------- events ----------------
  assign ev_tsi_suspend    = dec_susp && susp_ok;
  assign ev_tsi_nosuspend  = dec_susp && !susp_ok;
  assign ev_fetch_cancel   = cancel && t_valid && cancel_tid == t_tid;
  assign ev_release        = rel_valid;
  assign ev_tsib_direct    = div_act_valid || lq_act_valid;
  assign ev_tsib_wb        = div_wb_valid || lq_wb_valid;
  assign ev_icache_miss    = miss_susp;
  assign ev_redirect       = redir;
  assign ev_fork           = fork_valid && fork_ready;
  assign ev_join           = join_valid;
  assign ev_dispatch_stall = stall;
endmodule
