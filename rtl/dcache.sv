// Data cache: direct-mapped, 4-word lines, write-through without
// write-allocate, one line fill at a time.
//
// Addresses are word addresses. A lookup is combinational: the load/store
// unit presents rd_addr and gets rd_hit and the word in the same cycle. A
// load that misses is refused by the load/store unit and stays in the
// window; the unit pulses fill_start, the cache sends one line request to
// the data memory (mem_req_valid/mem_req_addr, one cycle) in the next cycle
// and writes the line in the cycle mem_rsp_valid arrives; fill_busy is high
// from the cycle after fill_start to the end of that cycle. The load is retried by the
// window and then hits. The thread is not suspended on such a miss: the
// published design deliberately does not suspend on data-cache misses,
// because the miss is only known in the execute stage, when much of the
// thread's later work is already in the window. Lookups for other addresses
// continue while a fill is outstanding.
//
// Stores are written through: the store queue sends each local store to the
// data memory and presents it on wr_valid/wr_addr/wr_data in the same cycle;
// the cache updates the word if the line is present and does nothing
// otherwise. The store queue holds its stores while a fill is outstanding, so
// a fill never returns data older than a store. The default size, 512 lines
// (8 KiB), reads the published "8K data cache" as bytes; line size, write
// policy and the single outstanding fill are this design's choices. Valid
// bits reset to zero.
module dcache
  import mt_pkg::*;
#(
  parameter int unsigned LINES = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t rd_addr,
  output logic  rd_hit,
  output word_t rd_data,
  input  logic  fill_start,
  input  word_t fill_addr,
  output logic  fill_busy,
  input  logic  wr_valid,
  input  word_t wr_addr,
  input  word_t wr_data,
  output logic  mem_req_valid,
  output word_t mem_req_addr,      // address of the line's first word
  input  logic  mem_rsp_valid,
  input  word_t mem_rsp_line [4]
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = XLEN - IW - 2;

  logic [LINES-1:0] vld;
  logic [TW-1:0]    tags [LINES];
  word_t            data [LINES][4];

  logic [IW-1:0] rd_idx, wr_idx, pend_idx;
  logic          wr_hit;
  word_t         pend_addr;
  assign rd_idx   = rd_addr[2 +: IW];
  assign rd_hit   = vld[rd_idx] && tags[rd_idx] == rd_addr[XLEN-1 -: TW];
  assign rd_data  = data[rd_idx][rd_addr[1:0]];
  assign wr_idx   = wr_addr[2 +: IW];
  assign wr_hit   = vld[wr_idx] && tags[wr_idx] == wr_addr[XLEN-1 -: TW];
  assign pend_idx = pend_addr[2 +: IW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld           <= '0;
      fill_busy     <= 1'b0;
      mem_req_valid <= 1'b0;
      mem_req_addr  <= '0;
      pend_addr     <= '0;
    end else begin
      mem_req_valid <= 1'b0;
      if (fill_start && !fill_busy) begin
        fill_busy     <= 1'b1;
        pend_addr     <= {fill_addr[XLEN-1:2], 2'b00};
        mem_req_valid <= 1'b1;
        mem_req_addr  <= {fill_addr[XLEN-1:2], 2'b00};
        vld[fill_addr[2 +: IW]] <= 1'b0;
      end else if (fill_busy && mem_rsp_valid) begin
        fill_busy     <= 1'b0;
        vld[pend_idx] <= 1'b1;
      end
    end
  end

  // tag and data arrays: no reset; written by a fill or a store hit
  always_ff @(posedge clk) begin
    if (fill_busy && mem_rsp_valid) begin
      tags[pend_idx] <= pend_addr[XLEN-1 -: TW];
      for (int w = 0; w < 4; w++) data[pend_idx][w] <= mem_rsp_line[w];
    end else if (wr_valid && wr_hit) begin
      data[wr_idx][wr_addr[1:0]] <= wr_data;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_valid && fill_busy));
endmodule
