// Thread Attribute Store (TAS).
//
// Holds one entry per hardware thread: valid, program counter, Register
// Relocation Map (RRM) and two suspend flags, one set by a thread suspending
// instruction (TSI) seen at decode and one set by an instruction-cache miss.
// A thread is ready when it is valid and neither flag is set.
//
// Every cycle a ready thread is chosen round-robin, starting after the thread
// chosen last, and its thread ID, PC and RRM are given to the fetch unit
// (cycle-by-cycle context switching). When the fetch unit takes the slot it
// pulses fetch_go; with pc_we it also returns the next sequential address,
// which is stored as the thread's PC.
//
// Events, all applied at the rising edge:
//   dec_susp   decode saw a TSI. Granted (susp_ok) only if another thread is
//              ready and suspend_en is set; the PC is set to the instruction
//              after the TSI. suspend_en low gives the no-suspend mode used
//              as the reference point of the published measurements.
//   miss_susp  fetch missed in the instruction cache; PC set to the missed one.
//   miss_done  the line fill for that thread finished: miss flag cleared.
//   act_mask   TSIs retired: their threads' TSI flags are cleared.
//   redir      a mispredicted branch of a thread committed: new PC, TSI flag
//              cleared (the suspending TSI, if any, was on the wrong path).
//   fork       a FORK committed: a free entry gets its PC and RRM (fork_ready
//              says a free entry exists).
//   join       a JOIN committed: the thread continues with the new PC and RRM
//              if it is the only valid thread (join_continue), else it dies.
// After reset only entry 0 is valid, with PC boot_pc and RRM 0, as published.
// The join rule and the fork-on-full behaviour (the caller waits) are this
// design's reading of the published description.
module tas
  import mt_pkg::*;
#(
  parameter int unsigned NT = NTHREADS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t boot_pc,
  input  logic  suspend_en,   // 0: no-suspend mode, TSIs never suspend
  // fetch
  output logic  fetch_valid,
  output tid_t  fetch_tid,
  output word_t fetch_pc,
  output rrm_t  fetch_rrm,
  input  logic  fetch_go,
  input  logic  pc_we,
  input  word_t next_pc,
  // decode suspension
  input  logic  dec_susp,
  input  tid_t  dec_susp_tid,
  input  word_t dec_susp_pc,
  output logic  susp_ok,
  // instruction cache miss
  input  logic  miss_susp,
  input  tid_t  miss_tid,
  input  word_t miss_pc,
  input  logic  miss_done,
  input  tid_t  miss_done_tid,
  // TSI retirement
  input  logic [NT-1:0] act_mask,
  // branch redirect
  input  logic  redir,
  input  tid_t  redir_tid,
  input  word_t redir_pc,
  // fork / join
  input  logic  fork_valid,
  input  word_t fork_pc,
  input  rrm_t  fork_rrm,
  output logic  fork_ready,
  input  logic  join_valid,
  input  tid_t  join_tid,
  input  word_t join_pc,
  input  rrm_t  join_rrm,
  output logic  join_continue,
  // status
  output logic [NT-1:0] thr_valid,
  output logic [NT-1:0] thr_ready
);
  logic [NT-1:0] valid, s_tsi, s_miss;
  word_t         pc  [NT];
  rrm_t          rrm [NT];
  tid_t          last;

  assign thr_valid = valid;
  assign thr_ready = valid & ~s_tsi & ~s_miss;

  // round-robin choice
  always_comb begin
    fetch_valid = 1'b0;
    fetch_tid   = '0;
    for (int k = 1; k <= int'(NT); k++) begin
      int i;
      i = (int'(last) + k) % int'(NT);
      if (!fetch_valid && thr_ready[i]) begin
        fetch_valid = 1'b1;
        fetch_tid   = tid_t'(i);
      end
    end
  end
  assign fetch_pc  = pc[fetch_tid];
  assign fetch_rrm = rrm[fetch_tid];

  // decode may suspend only if some other thread is ready
  always_comb begin
    susp_ok = 1'b0;
    for (int i = 0; i < int'(NT); i++)
      if (thr_ready[i] && tid_t'(i) != dec_susp_tid && suspend_en) susp_ok = 1'b1;
  end

  // free entry for fork; join continues only for the sole valid thread
  tid_t free_slot;
  always_comb begin
    fork_ready = 1'b0;
    free_slot  = '0;
    for (int i = int'(NT) - 1; i >= 0; i--)
      if (!valid[i]) begin
        fork_ready = 1'b1;
        free_slot  = tid_t'(i);
      end
  end
  assign join_continue = ($countones(valid) == 1) && valid[join_tid];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      valid[0] <= 1'b1;
      s_tsi  <= '0;
      s_miss <= '0;
      last   <= tid_t'(NT - 1);
      for (int i = 0; i < int'(NT); i++) begin
        pc[i]  <= (i == 0) ? boot_pc : '0;
        rrm[i] <= '0;
      end
    end else begin
      if (fetch_valid && fetch_go) last <= fetch_tid;
      if (fetch_valid && fetch_go && pc_we) pc[fetch_tid] <= next_pc;
      if (miss_susp) begin
        s_miss[miss_tid] <= 1'b1;
        pc[miss_tid]     <= miss_pc;
      end
      if (miss_done) s_miss[miss_done_tid] <= 1'b0;
      s_tsi <= s_tsi & ~act_mask;
      if (dec_susp && susp_ok) begin
        s_tsi[dec_susp_tid] <= 1'b1;
        pc[dec_susp_tid]    <= dec_susp_pc;
      end
      if (redir) begin
        pc[redir_tid]    <= redir_pc;
        s_tsi[redir_tid] <= 1'b0;
      end
      if (fork_valid && fork_ready) begin
        valid[free_slot]  <= 1'b1;
        pc[free_slot]     <= fork_pc;
        rrm[free_slot]    <= fork_rrm;
        s_tsi[free_slot]  <= 1'b0;
        s_miss[free_slot] <= 1'b0;
      end
      if (join_valid) begin
        if (join_continue) begin
          pc[join_tid]    <= join_pc;
          rrm[join_tid]   <= join_rrm;
          s_tsi[join_tid] <= 1'b0;
        end else begin
          valid[join_tid] <= 1'b0;
        end
      end
    end
  end

  // A thread being given a new PC by two sources in one cycle is a caller error.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(redir && join_valid && redir_tid == join_tid));
endmodule
