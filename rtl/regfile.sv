// Physical register file: 64 registers of 32 bits.
//
// Read combinationally by the decode stage (two sources for each of the four
// instructions decoded per cycle) and written on the rising clock edge by the
// in-order commit of the central window and by the direct commit of the
// Thread Suspending Instruction Buffers. Physical register 0 always reads as
// zero and ignores writes. The register count is the published one; the port
// counts and the zero register are this design's choices. Writers never target
// the same register in one cycle; if they do, the highest-numbered port wins.
// All registers reset to zero.
module regfile
  import mt_pkg::*;
#(
  parameter int unsigned N   = NPREG,
  parameter int unsigned NRD = 2 * FETCH_W,
  parameter int unsigned NWR = FETCH_W + 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  preg_t              raddr [NRD],
  output word_t              rdata [NRD],
  input  logic               we    [NWR],
  input  preg_t              waddr [NWR],
  input  word_t              wdata [NWR]
);
  word_t regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < int'(NWR); p++)
        if (we[p] && waddr[p] != '0) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int r = 0; r < int'(NRD); r++)
      rdata[r] = (raddr[r] == '0) ? '0 : regs[raddr[r]];
endmodule
