// Central instruction window of the scheduling unit.
//
// A circular buffer of WIN entries, filled at the top (tail) with up to four
// decoded instructions per cycle and emptied in order from the bottom (head).
// The slot number of an entry is its tag.
//
// Dispatch: the whole decoded block is taken when at least four slots are
// free (accept), otherwise the decode stage stalls. Operand lookup searches,
// for each source register, the older instructions of the same block, then
// the window from youngest to oldest for the latest writer of that physical
// register; a finished writer supplies its result, an unfinished one its tag,
// and with no writer in flight the register file value is used. Results
// written back in the same cycle are picked up too.
//
// Issue, out of order, oldest first: up to NALU ALU or branch instructions to
// the ALUs; one DIV to the divide unit's TSIB; one memory instruction to the
// load/store unit, a load only when no older store of its thread is still in
// the window. Fork, join and no-ops need no unit. Results come back on
// write-back buses (ALUs, load/store unit, the two TSIBs) and wake waiting
// operands by tag.
//
// Commit: up to COMMIT_W entries per cycle from the bottom, in order. A
// finished entry writes the register file (one port per commit slot); a
// store enters the store queue (one per cycle); a retiring suspending TSI
// reactivates its thread. A TSI of a suspended thread that reaches the
// bottom unfinished is released instead: its TSIB gets the completion signal
// (rel_*) and the entry leaves, so the window never stalls on it; the TSIB
// will commit the result. Branches are fetched as not taken; a taken branch
// commits with a redirect of its thread (redir_*), a JOIN with a join request
// to the Thread Attribute Store, and both invalidate every other instruction
// of that thread in the window, the TSIBs and the fetch path (flush_*). A
// FORK commits when the TAS has a free entry. Each of these ends the commit
// group of its cycle.
//
// The release/commit scheme, the per-thread invalidation and the decode-time
// operand lookup follow the published design. The window size, the commit
// width, not-taken prediction with resolution at commit and executing
// fork/join at commit are this design's choices.
module central_window
  import mt_pkg::*;
#(
  parameter int unsigned NALU     = 4,
  parameter int unsigned COMMIT_W = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // dispatch
  input  dec_t    dec [FETCH_W],
  output logic    accept,
  output preg_t   rf_raddr [2*FETCH_W],
  input  word_t   rf_rdata [2*FETCH_W],
  // ALUs
  output logic    alu_valid [NALU],
  output opcode_e alu_op    [NALU],
  output word_t   alu_a     [NALU],
  output word_t   alu_b     [NALU],
  output word_t   alu_imm   [NALU],
  output word_t   alu_pc    [NALU],
  input  word_t   alu_result[NALU],
  input  logic    alu_taken [NALU],
  input  word_t   alu_target[NALU],
  // divide unit
  output logic    div_valid,
  output tag_t    div_tag,
  output tid_t    div_tid,
  output logic    div_has_dst,
  output preg_t   div_dst,
  output word_t   div_a,
  output word_t   div_b,
  input  logic    div_full,
  input  logic    div_wb_valid,
  input  tag_t    div_wb_tag,
  input  word_t   div_wb_result,
  // load/store unit
  output logic    mem_valid,
  output opcode_e mem_op,
  output tag_t    mem_tag,
  output tid_t    mem_tid,
  output logic    mem_has_dst,
  output preg_t   mem_dst,
  output word_t   mem_base,
  output word_t   mem_imm,
  input  logic    mem_ok,
  input  logic    ls_wb_valid,
  input  tag_t    ls_wb_tag,
  input  word_t   ls_wb_result,
  input  logic    lq_wb_valid,
  input  tag_t    lq_wb_tag,
  input  word_t   lq_wb_result,
  // commit
  output logic    rf_we    [COMMIT_W],
  output preg_t   rf_waddr [COMMIT_W],
  output word_t   rf_wdata [COMMIT_W],
  output logic    sq_push,
  output word_t   sq_addr,
  output word_t   sq_data,
  output logic    sq_remote,
  input  logic    sq_full,
  output logic    rel_valid,
  output tag_t    rel_tag,
  output logic [NTHREADS-1:0] act_mask,
  output logic    redir,
  output tid_t    redir_tid,
  output word_t   redir_pc,
  output logic    fork_valid,
  output word_t   fork_pc,
  output rrm_t    fork_rrm,
  input  logic    fork_ready,
  output logic    join_valid,
  output tid_t    join_tid,
  output word_t   join_pc,
  output rrm_t    join_rrm,
  output logic    flush,
  output tid_t    flush_tid,
  // status
  output logic [$clog2(COMMIT_W+1)-1:0] n_commit,
  output logic [TAG_W:0] occupancy
);
  localparam int unsigned NBUS = NALU + 3;

  // ---------------- entry state ----------------
  logic [WIN-1:0] v, issued, done, s1rdy, s2rdy, taken;
  dec_t  e      [WIN];
  word_t s1val  [WIN];
  word_t s2val  [WIN];
  tag_t  s1tag  [WIN];
  tag_t  s2tag  [WIN];
  word_t result [WIN];
  word_t target [WIN];
  tag_t  head, tail;
  logic [TAG_W:0] count;

  assign occupancy = count;

  // ---------------- issue selection ----------------
  logic [WIN-1:0] alu_sel, div_sel, mem_sel;
  tag_t           alu_tag [NALU];
  always_comb begin
    int na;
    logic [NTHREADS-1:0] older_store;
    logic dv, mv;
    na = 0; dv = 1'b0; mv = 1'b0;
    older_store = '0;
    alu_sel = '0; div_sel = '0;
    div_tag = '0; mem_tag = '0;
    for (int a = 0; a < int'(NALU); a++) begin
      alu_valid[a] = 1'b0; alu_tag[a] = '0;
    end
    for (int k = 0; k < int'(WIN); k++) begin
      tag_t i;
      logic rdy;
      i   = head + tag_t'(k);
      rdy = (k < int'(count)) && v[i] && !issued[i] && !done[i] && s1rdy[i] && s2rdy[i];
      if (rdy && (e[i].fu == FU_ALU || e[i].fu == FU_BR) && na < int'(NALU)) begin
        alu_sel[i] = 1'b1; alu_valid[na] = 1'b1; alu_tag[na] = i; na++;
      end
      if (rdy && e[i].fu == FU_DIV && !dv && !div_full) begin
        div_sel[i] = 1'b1; dv = 1'b1; div_tag = i;
      end
      if (rdy && e[i].fu == FU_MEM && !mv &&
          !((e[i].op == OP_LD || e[i].op == OP_LDR) && older_store[e[i].tid])) begin
        mv = 1'b1; mem_tag = i;
      end
      if ((k < int'(count)) && v[i] && (e[i].op == OP_ST || e[i].op == OP_STR))
        older_store[e[i].tid] = 1'b1;
    end
    div_valid = dv;
    mem_valid = mv;
  end

  always_comb begin
    mem_sel = '0;
    if (mem_valid && mem_ok) mem_sel[mem_tag] = 1'b1;
  end

  always_comb
    for (int a = 0; a < int'(NALU); a++) begin
      alu_op[a]  = e[alu_tag[a]].op;
      alu_a[a]   = s1val[alu_tag[a]];
      alu_b[a]   = s2val[alu_tag[a]];
      alu_imm[a] = e[alu_tag[a]].imm;
      alu_pc[a]  = e[alu_tag[a]].pc;
    end
  assign div_tid     = e[div_tag].tid;
  assign div_has_dst = e[div_tag].has_dst;
  assign div_dst     = e[div_tag].dst;
  assign div_a       = s1val[div_tag];
  assign div_b       = s2val[div_tag];
  assign mem_op      = e[mem_tag].op;
  assign mem_tid     = e[mem_tag].tid;
  assign mem_has_dst = e[mem_tag].has_dst;
  assign mem_dst     = e[mem_tag].dst;
  assign mem_base    = s1val[mem_tag];
  assign mem_imm     = e[mem_tag].imm;

  // ---------------- write-back buses ----------------
  logic  bus_v [NBUS];
  tag_t  bus_t [NBUS];
  word_t bus_d [NBUS];
  always_comb begin
    for (int a = 0; a < int'(NALU); a++) begin
      bus_v[a] = alu_valid[a]; bus_t[a] = alu_tag[a]; bus_d[a] = alu_result[a];
    end
    bus_v[NALU]   = ls_wb_valid;  bus_t[NALU]   = ls_wb_tag;  bus_d[NALU]   = ls_wb_result;
    bus_v[NALU+1] = div_wb_valid; bus_t[NALU+1] = div_wb_tag; bus_d[NALU+1] = div_wb_result;
    bus_v[NALU+2] = lq_wb_valid;  bus_t[NALU+2] = lq_wb_tag;  bus_d[NALU+2] = lq_wb_result;
  end

  // ---------------- commit ----------------
  logic [WIN-1:0] pop, flush_kill;
  always_comb begin
    logic stop, pushed, is_st;
    stop = 1'b0; pushed = 1'b0; is_st = 1'b0;
    flush_kill = '0;
    pop = '0;
    n_commit = '0;
    sq_push = 1'b0; sq_addr = '0; sq_data = '0; sq_remote = 1'b0;
    rel_valid = 1'b0; rel_tag = '0;
    act_mask = '0;
    redir = 1'b0; redir_tid = '0; redir_pc = '0;
    fork_valid = 1'b0; fork_pc = '0; fork_rrm = '0;
    join_valid = 1'b0; join_tid = '0; join_pc = '0; join_rrm = '0;
    flush = 1'b0; flush_tid = '0;
    for (int k = 0; k < int'(COMMIT_W); k++) begin
      tag_t i;
      i = head + tag_t'(k);
      rf_we[k] = 1'b0; rf_waddr[k] = e[i].dst; rf_wdata[k] = result[i];
      if (!stop && k < int'(count)) begin
        if (!v[i]) begin
          pop[i] = 1'b1;                                   // hole left by a flush
        end else if (done[i]) begin
          is_st = (e[i].op == OP_ST || e[i].op == OP_STR);
          if (is_st && (pushed || sq_full)) stop = 1'b1;
          else if (e[i].op == OP_FORK && !fork_ready) stop = 1'b1;
          else begin
            pop[i]   = 1'b1;
            n_commit = n_commit + 1'b1;
            rf_we[k] = e[i].has_dst;
            if (is_st) begin
              pushed = 1'b1; sq_push = 1'b1;
              sq_addr = result[i]; sq_data = s2val[i]; sq_remote = (e[i].op == OP_STR);
            end
            if (e[i].tsi && e[i].susp) act_mask[e[i].tid] = 1'b1;
            if (e[i].fu == FU_BR && taken[i]) begin
              redir = 1'b1; redir_tid = e[i].tid; redir_pc = target[i];
              flush = 1'b1; flush_tid = e[i].tid; stop = 1'b1;
            end
            if (e[i].op == OP_FORK) begin
              fork_valid = 1'b1; fork_pc = e[i].pc + e[i].imm; fork_rrm = e[i].new_rrm;
              stop = 1'b1;
            end
            if (e[i].op == OP_JOIN) begin
              join_valid = 1'b1; join_tid = e[i].tid; join_pc = e[i].pc + 1; join_rrm = e[i].new_rrm;
              flush = 1'b1; flush_tid = e[i].tid; stop = 1'b1;
            end
          end
        end else if (e[i].tsi && e[i].susp && issued[i] && !rel_valid) begin
          pop[i] = 1'b1;                                   // release to the TSIB
          rel_valid = 1'b1; rel_tag = i;
        end else begin
          stop = 1'b1;
        end
      end
    end
    if (flush)
      for (int i = 0; i < int'(WIN); i++)
        if (v[i] && !pop[i] && e[i].tid == flush_tid) flush_kill[i] = 1'b1;
  end

  // ---------------- dispatch and operand lookup ----------------
  logic [$clog2(FETCH_W+1)-1:0] n_disp;
  tag_t  slot_tag [FETCH_W];
  logic  d_r1 [FETCH_W], d_r2 [FETCH_W];
  word_t d_v1 [FETCH_W], d_v2 [FETCH_W];
  tag_t  d_t1 [FETCH_W], d_t2 [FETCH_W];

  assign accept = (int'(count) <= int'(WIN) - int'(FETCH_W));

  always_comb
    for (int k = 0; k < int'(FETCH_W); k++) begin
      rf_raddr[2*k]   = dec[k].s1;
      rf_raddr[2*k+1] = dec[k].s2;
    end

  // look up one source of slot k
  task automatic lookup(input int k, input logic use_s, input preg_t p, input word_t rfv,
                        output logic rdy, output word_t val, output tag_t tg);
    logic found;
    rdy = 1'b1; val = use_s ? rfv : '0; tg = '0; found = !use_s;
    for (int j = k - 1; j >= 0; j--)
      if (!found && dec[j].valid && dec[j].has_dst && dec[j].dst == p) begin
        found = 1'b1; rdy = 1'b0; tg = slot_tag[j];
      end
    for (int m = 1; m <= int'(WIN); m++) begin
      tag_t i;
      i = tail - tag_t'(m);
      if (!found && m <= int'(count) && v[i] && !flush_kill[i] && e[i].has_dst && e[i].dst == p) begin
        found = 1'b1;
        if (done[i]) begin
          val = result[i];
        end else begin
          rdy = 1'b0; tg = i;
          for (int b = 0; b < int'(NBUS); b++)
            if (bus_v[b] && bus_t[b] == i) begin rdy = 1'b1; val = bus_d[b]; end
        end
      end
    end
  endtask

  always_comb begin
    n_disp = '0;
    for (int k = 0; k < int'(FETCH_W); k++) begin
      slot_tag[k] = tail + tag_t'(n_disp);
      if (dec[k].valid) n_disp = n_disp + 1'b1;
    end
    for (int k = 0; k < int'(FETCH_W); k++) begin
      lookup(k, dec[k].use_s1, dec[k].s1, rf_rdata[2*k],   d_r1[k], d_v1[k], d_t1[k]);
      lookup(k, dec[k].use_s2, dec[k].s2, rf_rdata[2*k+1], d_r2[k], d_v2[k], d_t2[k]);
    end
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0; issued <= '0; done <= '0; s1rdy <= '0; s2rdy <= '0; taken <= '0;
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < int'(WIN); i++) begin
        e[i] <= '0; s1val[i] <= '0; s2val[i] <= '0; s1tag[i] <= '0; s2tag[i] <= '0;
        result[i] <= '0; target[i] <= '0;
      end
    end else begin
      logic [$clog2(COMMIT_W+1)-1:0] npop;
      logic [$clog2(FETCH_W+1)-1:0]  nd;
      // wake-up of waiting operands
      for (int i = 0; i < int'(WIN); i++)
        for (int b = 0; b < int'(NBUS); b++)
          if (bus_v[b]) begin
            if (!s1rdy[i] && s1tag[i] == bus_t[b]) begin s1rdy[i] <= 1'b1; s1val[i] <= bus_d[b]; end
            if (!s2rdy[i] && s2tag[i] == bus_t[b]) begin s2rdy[i] <= 1'b1; s2val[i] <= bus_d[b]; end
          end
      // issue and results
      for (int a = 0; a < int'(NALU); a++)
        if (alu_valid[a]) begin
          issued[alu_tag[a]] <= 1'b1;
          done[alu_tag[a]]   <= 1'b1;
          result[alu_tag[a]] <= alu_result[a];
          taken[alu_tag[a]]  <= alu_taken[a];
          target[alu_tag[a]] <= alu_target[a];
        end
      if (div_valid) issued[div_tag] <= 1'b1;
      for (int i = 0; i < int'(WIN); i++)
        if (mem_sel[i]) issued[i] <= 1'b1;
      if (ls_wb_valid)  begin done[ls_wb_tag]  <= 1'b1; result[ls_wb_tag]  <= ls_wb_result;  end
      if (div_wb_valid) begin done[div_wb_tag] <= 1'b1; result[div_wb_tag] <= div_wb_result; end
      if (lq_wb_valid)  begin done[lq_wb_tag]  <= 1'b1; result[lq_wb_tag]  <= lq_wb_result;  end
      // commit, release and invalidation
      npop = '0;
      for (int i = 0; i < int'(WIN); i++) begin
        if (pop[i]) npop = npop + 1'b1;
        if (pop[i] || flush_kill[i]) v[i] <= 1'b0;
      end
      head <= head + tag_t'(npop);
      // dispatch
      nd = '0;
      if (accept) begin
        for (int k = 0; k < int'(FETCH_W); k++)
          if (dec[k].valid) begin
            tag_t t;
            t = slot_tag[k];
            nd = nd + 1'b1;
            v[t]      <= 1'b1;
            e[t]      <= dec[k];
            issued[t] <= 1'b0;
            done[t]   <= (dec[k].fu == FU_THR || dec[k].fu == FU_NONE);
            taken[t]  <= 1'b0;
            s1rdy[t]  <= d_r1[k]; s1val[t] <= d_v1[k]; s1tag[t] <= d_t1[k];
            s2rdy[t]  <= d_r2[k]; s2val[t] <= d_v2[k]; s2tag[t] <= d_t2[k];
          end
      end
      tail  <= tail + tag_t'(nd);
      count <= count + (TAG_W+1)'(nd) - (TAG_W+1)'(npop);
    end
  end

  // A window tag is never written back twice in one cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(div_wb_valid && lq_wb_valid && div_wb_tag == lq_wb_tag));
endmodule
