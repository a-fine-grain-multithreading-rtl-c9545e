// Fetch unit with Cache Miss Buffer.
//
// Each cycle the Thread Attribute Store (TAS) offers a ready thread's ID, PC
// and RRM. The fetch unit looks the PC up in the instruction cache and, on a
// hit, latches the aligned 4-instruction block that holds the PC into the
// fetch/decode register; slots before the PC are marked invalid. It returns
// the next sequential block address to the TAS (pc_we/next_pc).
//
// On a miss it asks the cache to start a line fill, tells the TAS to suspend
// the thread, and keeps the thread's ID and PC in the Cache Miss Buffer until
// the cache reports the fill done; then it tells the TAS to reactivate the
// thread. The buffer holds one miss; a thread that misses while it is full is
// left ready and simply tries again on its next turn (this design's choice).
//
// Decode can cancel the fetch being made for the thread it is suspending
// (cancel/cancel_tid). A redirect or join of a thread (flush/flush_tid) drops
// that thread's fetch in progress and its block in the fetch/decode register.
// When decode stalls (stall) the register holds and no fetch is made.
// Timing: one cycle from TAS choice to a block in the fetch/decode register.
module fetch_unit
  import mt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // from/to TAS
  input  logic  t_valid,
  input  tid_t  t_tid,
  input  word_t t_pc,
  input  rrm_t  t_rrm,
  output logic  fetch_go,
  output logic  pc_we,
  output word_t next_pc,
  output logic  miss_susp,
  output tid_t  miss_tid,
  output word_t miss_pc,
  output logic  miss_done,
  output tid_t  miss_done_tid,
  output logic  cmb_busy,              // Cache Miss Buffer occupied
  output word_t cmb_addr,              // PC held in it
  // instruction cache
  output word_t ic_addr,
  input  logic  ic_hit,
  input  word_t ic_line [FETCH_W],
  output logic  ic_fill_start,
  input  logic  ic_fill_busy,
  input  logic  ic_fill_done,
  // control
  input  logic  stall,
  input  logic  cancel,
  input  tid_t  cancel_tid,
  input  logic  flush,
  input  tid_t  flush_tid,
  // fetch/decode register
  output logic  fd_valid,
  output tid_t  fd_tid,
  output rrm_t  fd_rrm,
  output word_t fd_pc,                 // address of slot 0 (block base)
  output word_t fd_ins  [FETCH_W],
  output logic [FETCH_W-1:0] fd_mask
);
  // Cache Miss Buffer
  logic  cmb_valid;
  tid_t  cmb_tid;
  word_t cmb_pc;

  logic killed, hit_go, miss_go;
  assign ic_addr  = t_pc;
  assign killed   = (cancel && cancel_tid == t_tid) || (flush && flush_tid == t_tid);
  assign fetch_go = t_valid && !stall;
  assign hit_go   = fetch_go && !killed && ic_hit;
  assign miss_go  = fetch_go && !killed && !ic_hit && !cmb_valid && !ic_fill_busy;
  assign pc_we    = hit_go;
  assign next_pc  = {t_pc[XLEN-1:2], 2'b00} + word_t'(FETCH_W);

  assign ic_fill_start = miss_go;
  assign miss_susp     = miss_go;
  assign miss_tid      = t_tid;
  assign miss_pc       = t_pc;
  assign miss_done     = ic_fill_done && cmb_valid;
  assign miss_done_tid = cmb_tid;
  assign cmb_busy      = cmb_valid;
  assign cmb_addr      = cmb_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmb_valid <= 1'b0;
      cmb_tid   <= '0;
      cmb_pc    <= '0;
      fd_valid  <= 1'b0;
      fd_tid    <= '0;
      fd_rrm    <= '0;
      fd_pc     <= '0;
      fd_mask   <= '0;
      for (int w = 0; w < int'(FETCH_W); w++) fd_ins[w] <= '0;
    end else begin
      if (miss_go) begin
        cmb_valid <= 1'b1;
        cmb_tid   <= t_tid;
        cmb_pc    <= t_pc;
      end else if (ic_fill_done) begin
        cmb_valid <= 1'b0;
      end
      if (!stall) begin
        fd_valid <= hit_go;
        fd_tid   <= t_tid;
        fd_rrm   <= t_rrm;
        fd_pc    <= {t_pc[XLEN-1:2], 2'b00};
        for (int w = 0; w < int'(FETCH_W); w++) begin
          fd_ins[w]  <= ic_line[w];
          fd_mask[w] <= (w >= int'(t_pc[1:0]));
        end
      end else if (flush && flush_tid == fd_tid) begin
        fd_valid <= 1'b0;
      end
    end
  end
endmodule
