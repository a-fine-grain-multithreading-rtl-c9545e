// Logical-to-physical register remapping.
//
// Each thread carries a 3-bit Register Relocation Map (RRM). During decode a
// logical register number in the per-thread range 1..15 is turned into a
// physical register number by ORing the RRM into physical bits 5:3, for
// example logical 7 (00111) with RRM 6 (110) gives physical 55 (110111). This
// lets several threads run the same code on disjoint physical registers.
// Register 0 and logical registers 16..31 are shared by all threads and pass
// through unchanged; treating exactly 1..15 as the remapped range follows the
// published partitioning table, while sharing 16..31 is this design's reading
// of "registers common between threads".
//
// Purely combinational, no clock.
module reg_remap
  import mt_pkg::*;
(
  input  logic [LREG_W-1:0] lreg,  // logical register from the instruction
  input  rrm_t              rrm,   // thread's relocation map
  output preg_t             preg   // physical register
);
  logic remapped;
  assign remapped = (lreg != '0) && !lreg[4];
  assign preg = remapped ? ({1'b0, lreg} | {rrm, 3'b000}) : {1'b0, lreg};
endmodule
