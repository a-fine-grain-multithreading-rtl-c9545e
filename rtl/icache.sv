// Instruction cache: direct-mapped, non-blocking, 4-instruction lines, line
// fill on read misses only (the published cache organisation).
//
// Addresses are word (instruction) addresses. A lookup is combinational: the
// fetch unit presents lk_addr and gets lk_hit and the whole 4-instruction line
// in the same cycle. On a miss the fetch unit pulses fill_start with the
// address; the cache sends one line request to the instruction memory
// (mem_req_valid/mem_req_addr, one cycle) and, when the memory answers with
// mem_rsp_valid and the line, writes it with its tag and pulses fill_done.
// Only one fill is outstanding at a time (fill_busy); lookups by other
// threads continue meanwhile, which is what makes the cache non-blocking.
// The default size, 512 lines (8 KiB of 32-bit instructions), reads the
// published "8K" as bytes. Valid bits reset to zero.
module icache
  import mt_pkg::*;
#(
  parameter int unsigned LINES = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t lk_addr,
  output logic  lk_hit,
  output word_t lk_line [FETCH_W],
  input  logic  fill_start,
  input  word_t fill_addr,
  output logic  fill_busy,
  output logic  fill_done,
  output word_t fill_done_addr,
  output logic  mem_req_valid,
  output word_t mem_req_addr,      // address of the line's first instruction
  input  logic  mem_rsp_valid,
  input  word_t mem_rsp_line [FETCH_W]
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = XLEN - IW - 2;

  logic [LINES-1:0]         vld;
  logic [TW-1:0]            tags [LINES];
  logic [FETCH_W*XLEN-1:0]  data [LINES];

  logic [IW-1:0] lk_idx;
  assign lk_idx = lk_addr[2 +: IW];
  assign lk_hit = vld[lk_idx] && tags[lk_idx] == lk_addr[XLEN-1 -: TW];
  always_comb
    for (int w = 0; w < int'(FETCH_W); w++) lk_line[w] = data[lk_idx][w*XLEN +: XLEN];

  word_t         pend_addr;
  logic [IW-1:0] pend_idx;
  assign pend_idx       = pend_addr[2 +: IW];
  assign fill_done_addr = pend_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld           <= '0;
      fill_busy     <= 1'b0;
      fill_done     <= 1'b0;
      mem_req_valid <= 1'b0;
      mem_req_addr  <= '0;
      pend_addr     <= '0;
    end else begin
      fill_done     <= 1'b0;
      mem_req_valid <= 1'b0;
      if (fill_start && !fill_busy) begin
        fill_busy     <= 1'b1;
        pend_addr     <= {fill_addr[XLEN-1:2], 2'b00};
        mem_req_valid <= 1'b1;
        mem_req_addr  <= {fill_addr[XLEN-1:2], 2'b00};
        vld[fill_addr[2 +: IW]] <= 1'b0;
      end else if (fill_busy && mem_rsp_valid) begin
        fill_busy      <= 1'b0;
        fill_done      <= 1'b1;
        vld[pend_idx]  <= 1'b1;
      end
    end
  end

  // data and tag arrays: no reset, written only by a fill
  always_ff @(posedge clk)
    if (fill_busy && mem_rsp_valid) begin
      tags[pend_idx] <= pend_addr[XLEN-1 -: TW];
      for (int w = 0; w < int'(FETCH_W); w++) data[pend_idx][w*XLEN +: XLEN] <= mem_rsp_line[w];
    end
endmodule
