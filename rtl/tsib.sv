// Thread Suspending Instruction Buffer (TSIB).
//
// One TSIB sits in front of each functional unit that executes thread
// suspending instructions (TSIs). An instruction enters only when it is ready
// to execute: the window issues it with its operands (alloc, payload) and the
// entry keeps its window tag, thread and destination register. The
// functional unit marks an entry started (start_*) and later completes it
// with a result (cmp_*).
//
// A completed entry leaves in one of two ways, as in the published design:
//   * its window entry has not reached the bottom of the window: the result
//     is written back into the window by tag (wb_*), like any other result;
//   * the window entry reached the bottom first: the window sends the
//     completion signal (rel_valid/rel_tag), the entry becomes released and,
//     when done, commits straight to the register file (rf_*) and tells the
//     Thread Attribute Store to reactivate the thread (act_*).
// If release and write-back of the same entry meet in one cycle the release
// wins and the entry commits directly the next cycle.
// The TSIB also watches invalidations: flush/flush_tid removes every entry
// of that thread that is not released (all of them are younger than the
// flushing instruction, which is at the bottom of the window). An entry the
// unit has already started is kept, marked dead, until the unit completes
// it, so a late completion can never land on a reused entry.
// One write-back and one direct commit per cycle; alloc_idx is the lowest
// free entry. All state resets to empty.
module tsib
  import mt_pkg::*;
#(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned PW    = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  // allocation from the window's issue logic
  input  logic            alloc_valid,
  input  tag_t            alloc_tag,
  input  tid_t            alloc_tid,
  input  logic            alloc_has_dst,
  input  preg_t           alloc_dst,
  input  logic [PW-1:0]   alloc_payload,
  output logic            full,
  output logic [$clog2(DEPTH)-1:0] alloc_idx,
  // functional unit side
  output logic [DEPTH-1:0] e_waiting,      // valid, not started, not done
  output logic [PW-1:0]    e_payload [DEPTH],
  input  logic            start_valid,
  input  logic [$clog2(DEPTH)-1:0] start_idx,
  input  logic            cmp_valid,
  input  logic [$clog2(DEPTH)-1:0] cmp_idx,
  input  word_t           cmp_result,
  // completion signal from the bottom of the window
  input  logic            rel_valid,
  input  tag_t            rel_tag,
  // invalidation
  input  logic            flush,
  input  tid_t            flush_tid,
  output logic [DEPTH-1:0] e_valid,
  output logic [DEPTH-1:0] e_started,
  // write-back into the window
  output logic            wb_valid,
  output tag_t            wb_tag,
  output word_t           wb_result,
  // direct commit to the register file
  output logic            rf_we,
  output preg_t           rf_waddr,
  output word_t           rf_wdata,
  output logic            act_valid,
  output tid_t            act_tid
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DEPTH-1:0] vld, started, done, released, hasd, dead;
  tag_t             tag  [DEPTH];
  tid_t             tid  [DEPTH];
  preg_t            dst  [DEPTH];
  word_t            res  [DEPTH];
  logic [PW-1:0]    pay  [DEPTH];

  assign e_valid   = vld;
  assign e_started = started;
  assign e_waiting = vld & ~started & ~done & ~dead;
  always_comb for (int i = 0; i < int'(DEPTH); i++) e_payload[i] = pay[i];

  always_comb begin
    full      = 1'b1;
    alloc_idx = '0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--)
      if (!vld[i]) begin full = 1'b0; alloc_idx = IW'(i); end
  end

  // released this cycle (completion signal)
  logic [DEPTH-1:0] rel_now;
  always_comb
    for (int i = 0; i < int'(DEPTH); i++)
      rel_now[i] = rel_valid && vld[i] && !dead[i] && !released[i] && tag[i] == rel_tag;

  // one write-back and one direct commit per cycle
  logic [IW-1:0] wb_idx, dc_idx;
  logic          dc_valid;
  always_comb begin
    wb_valid = 1'b0; wb_idx = '0;
    dc_valid = 1'b0; dc_idx = '0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--) begin
      if (vld[i] && !dead[i] && done[i] && !released[i] && !rel_now[i]) begin wb_valid = 1'b1; wb_idx = IW'(i); end
      if (vld[i] && !dead[i] && done[i] && released[i])      begin dc_valid = 1'b1; dc_idx = IW'(i); end
    end
  end
  assign wb_tag    = tag[wb_idx];
  assign wb_result = res[wb_idx];
  assign rf_we     = dc_valid && hasd[dc_idx];
  assign rf_waddr  = dst[dc_idx];
  assign rf_wdata  = res[dc_idx];
  assign act_valid = dc_valid;
  assign act_tid   = tid[dc_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0; started <= '0; done <= '0; released <= '0; hasd <= '0; dead <= '0;
      for (int i = 0; i < int'(DEPTH); i++) begin
        tag[i] <= '0; tid[i] <= '0; dst[i] <= '0; res[i] <= '0; pay[i] <= '0;
      end
    end else begin
      if (start_valid) started[start_idx] <= 1'b1;
      if (cmp_valid && vld[cmp_idx]) begin
        done[cmp_idx] <= 1'b1;
        res[cmp_idx]  <= cmp_result;
        if (dead[cmp_idx]) vld[cmp_idx] <= 1'b0;
      end
      for (int i = 0; i < int'(DEPTH); i++) begin
        if (rel_now[i]) released[i] <= 1'b1;
        if (flush && vld[i] && !released[i] && !rel_now[i] && tid[i] == flush_tid) begin
          if (started[i] && !done[i] && !(cmp_valid && cmp_idx == IW'(i))) dead[i] <= 1'b1;
          else                        vld[i]  <= 1'b0;
        end
      end
      if (wb_valid) vld[wb_idx] <= 1'b0;
      if (dc_valid) vld[dc_idx] <= 1'b0;
      if (alloc_valid && !full) begin
        vld[alloc_idx]      <= 1'b1;
        started[alloc_idx]  <= 1'b0;
        done[alloc_idx]     <= 1'b0;
        released[alloc_idx] <= 1'b0;
        dead[alloc_idx]     <= 1'b0;
        hasd[alloc_idx]     <= alloc_has_dst;
        tag[alloc_idx]      <= alloc_tag;
        tid[alloc_idx]      <= alloc_tid;
        dst[alloc_idx]      <= alloc_dst;
        pay[alloc_idx]      <= alloc_payload;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(alloc_valid && full));
endmodule
