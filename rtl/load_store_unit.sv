// Load/store unit: data cache, remote-load Load Queue, Store Queue.
//
// Local loads (LD) look up the data cache (see dcache) in the cycle they
// issue; on a hit the value goes back to the window at once. On a miss the
// load is refused (issue_ok low), stays in the window and is retried, while
// the cache fetches the line from the data memory (dmem_req_*/dmem_rsp_*);
// dc_miss pulses when such a fill starts. The thread is not suspended.
//
// Remote loads (LDR) are thread suspending instructions. The window issues
// one into the Load Queue, a TSIB (see tsib) of LQ_DEPTH entries; a later
// cycle sends the request (net_req_*, with the queue index as its tag) to
// the network, and the reply (net_rsp_*) completes the entry. The queue then
// writes the value back to the window or commits it to the register file.
//
// Stores (ST, STR) compute their address when issued and return it to the
// window. When a store commits at the bottom of the window it enters the
// Store Queue (sq_push) and the queue completes stores in order: local ones
// go to the data memory on st_* and update the cache (write-through; held
// while a line fill is outstanding), remote ones go out as network writes, so
// local and
// remote stores are ordered alike, as published. A load whose address matches
// a queued store of the same kind is refused (issue_ok low) until the store
// has left the queue. The network takes one request per cycle; Load Queue
// requests go before stores. Load Queue depth 6 and the 8 KiB cache are the
// published values; the cache organisation, the Store Queue depth and the
// refusal rules are this design's choices.
module load_store_unit
  import mt_pkg::*;
#(
  parameter int unsigned LQ_DEPTH = 6,
  parameter int unsigned SQ_DEPTH = 4,
  parameter int unsigned DC_LINES = 512
) (
  input  logic    clk,
  input  logic    rst_n,
  // issue from the window (one memory instruction per cycle)
  input  logic    issue_valid,
  input  opcode_e issue_op,
  input  tag_t    issue_tag,
  input  tid_t    issue_tid,
  input  logic    issue_has_dst,
  input  preg_t   issue_dst,
  input  word_t   issue_base,
  input  word_t   issue_imm,
  output logic    issue_ok,
  // immediate result: local load value or store address
  output logic    ls_wb_valid,
  output tag_t    ls_wb_tag,
  output word_t   ls_wb_result,
  // Load Queue (TSIB) results
  output logic    lq_wb_valid,
  output tag_t    lq_wb_tag,
  output word_t   lq_wb_result,
  output logic    lq_rf_we,
  output preg_t   lq_rf_waddr,
  output word_t   lq_rf_wdata,
  output logic    lq_act_valid,
  output tid_t    lq_act_tid,
  input  logic    rel_valid,
  input  tag_t    rel_tag,
  input  logic    flush,
  input  tid_t    flush_tid,
  // Store Queue input from commit
  input  logic    sq_push,
  input  word_t   sq_addr,
  input  word_t   sq_data,
  input  logic    sq_remote,
  output logic    sq_full,
  output logic    sq_empty,
  // network
  output logic    net_req_valid,
  output logic    net_req_store,
  output logic [$clog2(LQ_DEPTH)-1:0] net_req_idx,
  output word_t   net_req_addr,
  output word_t   net_req_data,
  input  logic    net_rsp_valid,
  input  logic [$clog2(LQ_DEPTH)-1:0] net_rsp_idx,
  input  word_t   net_rsp_data,
  // data memory: line fills and write-through stores
  output logic    dmem_req_valid,
  output word_t   dmem_req_addr,
  input  logic    dmem_rsp_valid,
  input  word_t   dmem_rsp_line [4],
  output logic    st_valid,
  output word_t   st_addr,
  output word_t   st_data,
  output logic    dc_miss,
  output logic [LQ_DEPTH-1:0] lq_busy
);
  localparam int unsigned LW = $clog2(LQ_DEPTH);
  localparam int unsigned SW = $clog2(SQ_DEPTH);

  // ---------------- Store Queue ----------------
  word_t            sq_a [SQ_DEPTH];
  word_t            sq_d [SQ_DEPTH];
  logic [SQ_DEPTH-1:0] sq_r;
  logic [SW-1:0]    sq_head, sq_tail;
  logic [SW:0]      sq_cnt;
  assign sq_full  = (sq_cnt == (SW+1)'(SQ_DEPTH));
  assign sq_empty = (sq_cnt == '0);

  // ---------------- issue ----------------
  word_t addr;
  logic  is_load, is_remote, conflict;
  assign addr      = issue_base + issue_imm;
  assign is_load   = (issue_op == OP_LD) || (issue_op == OP_LDR);
  assign is_remote = (issue_op == OP_LDR) || (issue_op == OP_STR);
  always_comb begin
    conflict = 1'b0;
    for (int i = 0; i < int'(SQ_DEPTH); i++)
      if (SW'(i) - sq_head < sq_cnt[SW-1:0] || (sq_full))
        if (sq_a[i] == addr && sq_r[i] == is_remote) conflict = 1'b1;
  end

  logic lq_full;
  logic [LW-1:0] lq_alloc_idx;
  logic  dc_hit, dc_busy;
  word_t dc_data;
  assign issue_ok = issue_valid && !(is_load && conflict) && !(issue_op == OP_LDR && lq_full)
                    && !(issue_op == OP_LD && !dc_hit);
  assign dc_miss  = issue_valid && issue_op == OP_LD && !conflict && !dc_hit && !dc_busy;

  assign ls_wb_valid  = issue_ok && issue_op != OP_LDR;
  assign ls_wb_tag    = issue_tag;
  assign ls_wb_result = (issue_op == OP_LD) ? dc_data : addr;

  dcache #(.LINES(DC_LINES)) u_dc (
    .clk, .rst_n,
    .rd_addr(addr), .rd_hit(dc_hit), .rd_data(dc_data),
    .fill_start(dc_miss), .fill_addr(addr), .fill_busy(dc_busy),
    .wr_valid(st_valid), .wr_addr(st_addr), .wr_data(st_data),
    .mem_req_valid(dmem_req_valid), .mem_req_addr(dmem_req_addr),
    .mem_rsp_valid(dmem_rsp_valid), .mem_rsp_line(dmem_rsp_line)
  );

  // ---------------- Load Queue ----------------
  logic [LQ_DEPTH-1:0] lq_waiting, lq_valid, lq_started;
  logic [XLEN-1:0]     lq_pay [LQ_DEPTH];
  logic                lq_start;
  logic [LW-1:0]       lq_start_idx;

  tsib #(.DEPTH(LQ_DEPTH), .PW(XLEN)) u_lq (
    .clk, .rst_n,
    .alloc_valid(issue_ok && issue_op == OP_LDR), .alloc_tag(issue_tag), .alloc_tid(issue_tid),
    .alloc_has_dst(issue_has_dst), .alloc_dst(issue_dst), .alloc_payload(addr),
    .full(lq_full), .alloc_idx(lq_alloc_idx),
    .e_waiting(lq_waiting), .e_payload(lq_pay), .start_valid(lq_start), .start_idx(lq_start_idx),
    .cmp_valid(net_rsp_valid), .cmp_idx(net_rsp_idx), .cmp_result(net_rsp_data),
    .rel_valid, .rel_tag, .flush, .flush_tid, .e_valid(lq_valid), .e_started(lq_started),
    .wb_valid(lq_wb_valid), .wb_tag(lq_wb_tag), .wb_result(lq_wb_result),
    .rf_we(lq_rf_we), .rf_waddr(lq_rf_waddr), .rf_wdata(lq_rf_wdata),
    .act_valid(lq_act_valid), .act_tid(lq_act_tid)
  );
  assign lq_busy = lq_valid;

  always_comb begin
    lq_start     = 1'b0;
    lq_start_idx = '0;
    for (int i = int'(LQ_DEPTH) - 1; i >= 0; i--)
      if (lq_waiting[i]) begin lq_start = 1'b1; lq_start_idx = LW'(i); end
  end

  // ---------------- network and memory side ----------------
  logic sq_pop, sq_pop_remote;
  assign sq_pop_remote = !sq_empty && sq_r[sq_head] && !lq_start;
  assign sq_pop        = !sq_empty && (sq_r[sq_head] ? sq_pop_remote : !dc_busy);

  assign net_req_valid = lq_start || sq_pop_remote;
  assign net_req_store = !lq_start;
  assign net_req_idx   = lq_start_idx;
  assign net_req_addr  = lq_start ? lq_pay[lq_start_idx] : sq_a[sq_head];
  assign net_req_data  = lq_start ? '0 : sq_d[sq_head];

  assign st_valid = sq_pop && !sq_r[sq_head];
  assign st_addr  = sq_a[sq_head];
  assign st_data  = sq_d[sq_head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_head <= '0; sq_tail <= '0; sq_cnt <= '0; sq_r <= '0;
      for (int i = 0; i < int'(SQ_DEPTH); i++) begin sq_a[i] <= '0; sq_d[i] <= '0; end
    end else begin
      if (sq_push && !sq_full) begin
        sq_a[sq_tail] <= sq_addr;
        sq_d[sq_tail] <= sq_data;
        sq_r[sq_tail] <= sq_remote;
        sq_tail       <= sq_tail + 1'b1;
      end
      if (sq_pop) sq_head <= sq_head + 1'b1;
      sq_cnt <= sq_cnt + (SW+1)'(sq_push && !sq_full) - (SW+1)'(sq_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(sq_push && sq_full));
endmodule
