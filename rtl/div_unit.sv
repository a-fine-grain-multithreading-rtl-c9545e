// Divide functional unit: a Thread Suspending Instruction Buffer (TSIB)
// feeding one iterative divider.
//
// DIV is a thread suspending instruction. The window issues it here, with
// both operands, as soon as they are ready and the TSIB has room (full low).
// The divider takes the lowest-numbered waiting entry, divides it in W+1
// cycles and completes it; the TSIB then writes the quotient back to the
// window or commits it directly to the register file, as described in tsib.
// The published design gives a TSIB to each functional unit that executes
// TSIs; the divider and the TSIB depth of 2 are this design's choices.
module div_unit
  import mt_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  issue_valid,
  input  tag_t  issue_tag,
  input  tid_t  issue_tid,
  input  logic  issue_has_dst,
  input  preg_t issue_dst,
  input  word_t issue_a,
  input  word_t issue_b,
  output logic  full,
  input  logic  rel_valid,
  input  tag_t  rel_tag,
  input  logic  flush,
  input  tid_t  flush_tid,
  output logic  wb_valid,
  output tag_t  wb_tag,
  output word_t wb_result,
  output logic  rf_we,
  output preg_t rf_waddr,
  output word_t rf_wdata,
  output logic  act_valid,
  output tid_t  act_tid,
  output logic  busy
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DEPTH-1:0]  e_waiting, e_valid, e_started;
  logic [63:0]       e_payload [DEPTH];
  logic [IW-1:0]     alloc_idx;
  logic              start_valid, div_busy, div_done;
  logic [IW-1:0]     start_idx, cur_idx;
  word_t             quo, rem;

  tsib #(.DEPTH(DEPTH), .PW(64)) u_tsib (
    .clk, .rst_n,
    .alloc_valid(issue_valid), .alloc_tag(issue_tag), .alloc_tid(issue_tid),
    .alloc_has_dst(issue_has_dst), .alloc_dst(issue_dst),
    .alloc_payload({issue_a, issue_b}), .full, .alloc_idx,
    .e_waiting, .e_payload, .start_valid, .start_idx,
    .cmp_valid(div_done), .cmp_idx(cur_idx), .cmp_result(quo),
    .rel_valid, .rel_tag, .flush, .flush_tid, .e_valid, .e_started,
    .wb_valid, .wb_tag, .wb_result, .rf_we, .rf_waddr, .rf_wdata, .act_valid, .act_tid
  );

  always_comb begin
    start_valid = 1'b0;
    start_idx   = '0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--)
      if (e_waiting[i] && !div_busy && !div_done) begin start_valid = 1'b1; start_idx = IW'(i); end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)           cur_idx <= '0;
    else if (start_valid) cur_idx <= start_idx;

  divider #(.W(XLEN)) u_div (
    .clk, .rst_n, .start(start_valid), .kill(1'b0),
    .dividend(e_payload[start_idx][63:32]), .divisor(e_payload[start_idx][31:0]),
    .busy(div_busy), .done(div_done), .quotient(quo), .remainder(rem)
  );

  assign busy = div_busy;
endmodule
