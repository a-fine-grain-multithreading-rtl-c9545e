// Four-wide instruction decoder with register remapping and TSI handling.
//
// Takes the block in the fetch/decode register and produces up to four
// decoded instructions for the central window. Each register field is
// remapped to a physical register with the thread's RRM (reg_remap). The
// decoder recognises thread suspending instructions (TSIs): here DIV and the
// remote load LDR, whose latencies are well above ten cycles. For the first
// TSI in the block it
//   1) asks the Thread Attribute Store to suspend the thread (dec_susp, with
//      the address after the TSI as the thread's resume PC); the TAS grants it
//      (susp_ok) unless the thread is the only ready one,
//   2) if granted, cancels the fetch being made for the same thread (cancel),
//   3) if granted, invalidates the instructions after the TSI in the block.
// A TSI whose suspension was not granted is decoded with susp = 0 and behaves
// like an ordinary long-latency instruction. The steps follow the published
// decode description; the encodings are this design's own (see mt_pkg).
//
// Combinational. accept says the window takes the block this cycle;
// suspension is requested only then. flush/flush_tid drops a block of a
// thread being redirected.
module decoder
  import mt_pkg::*;
(
  input  logic  fd_valid,
  input  tid_t  fd_tid,
  input  rrm_t  fd_rrm,
  input  word_t fd_pc,
  input  word_t fd_ins [FETCH_W],
  input  logic [FETCH_W-1:0] fd_mask,
  input  logic  accept,
  input  logic  flush,
  input  tid_t  flush_tid,
  input  logic  susp_ok,
  output dec_t  dec [FETCH_W],
  output logic  dec_susp,
  output tid_t  dec_susp_tid,
  output word_t dec_susp_pc,
  output logic  cancel,
  output tid_t  cancel_tid
);
  preg_t prd [FETCH_W], prs1 [FETCH_W], prs2 [FETCH_W];

  for (genvar w = 0; w < int'(FETCH_W); w++) begin : g_map
    reg_remap u_rd  (.lreg(fd_ins[w][25:21]), .rrm(fd_rrm), .preg(prd[w]));
    reg_remap u_rs1 (.lreg(fd_ins[w][20:16]), .rrm(fd_rrm), .preg(prs1[w]));
    reg_remap u_rs2 (.lreg(fd_ins[w][15:11]), .rrm(fd_rrm), .preg(prs2[w]));
  end

  logic live;
  assign live = fd_valid && !(flush && flush_tid == fd_tid);

  always_comb begin
    logic seen_tsi;
    seen_tsi     = 1'b0;
    dec_susp     = 1'b0;
    dec_susp_tid = fd_tid;
    dec_susp_pc  = '0;
    for (int w = 0; w < int'(FETCH_W); w++) begin
      word_t   ins;
      opcode_e op;
      ins = fd_ins[w];
      op  = f_op(ins);
      dec[w]         = '0;
      dec[w].op      = op;
      dec[w].pc      = fd_pc + word_t'(w);
      dec[w].tid     = fd_tid;
      dec[w].dst     = prd[w];
      dec[w].s1      = prs1[w];
      dec[w].s2      = prs2[w];
      dec[w].imm     = f_imm(ins);
      dec[w].new_rrm = ins[23:21];
      dec[w].fu      = FU_NONE;
      unique case (op)
        OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLT, OP_SLL, OP_SRL: begin
          dec[w].fu = FU_ALU; dec[w].has_dst = 1'b1; dec[w].use_s1 = 1'b1; dec[w].use_s2 = 1'b1;
        end
        OP_ADDI: begin dec[w].fu = FU_ALU; dec[w].has_dst = 1'b1; dec[w].use_s1 = 1'b1; end
        OP_LUI:  begin dec[w].fu = FU_ALU; dec[w].has_dst = 1'b1; end
        OP_DIV: begin
          dec[w].fu = FU_DIV; dec[w].has_dst = 1'b1; dec[w].use_s1 = 1'b1; dec[w].use_s2 = 1'b1;
          dec[w].tsi = 1'b1;
        end
        OP_LD, OP_LDR: begin
          dec[w].fu = FU_MEM; dec[w].has_dst = 1'b1; dec[w].use_s1 = 1'b1;
          dec[w].tsi = (op == OP_LDR);
        end
        OP_ST, OP_STR, OP_BEQ, OP_BNE: begin
          dec[w].fu  = (op == OP_BEQ || op == OP_BNE) ? FU_BR : FU_MEM;
          dec[w].use_s1 = 1'b1; dec[w].use_s2 = 1'b1;
          dec[w].imm = {{21{ins[10]}}, ins[10:0]};
        end
        OP_JMP:           dec[w].fu = FU_BR;
        OP_FORK, OP_JOIN: dec[w].fu = FU_THR;
        default:          dec[w].fu = FU_NONE;
      endcase
      if (dec[w].dst == '0) dec[w].has_dst = 1'b0;
      dec[w].valid = live && fd_mask[w] && !(seen_tsi && susp_ok);
      if (dec[w].valid && dec[w].tsi && !seen_tsi) begin
        seen_tsi     = 1'b1;
        dec_susp     = accept;
        dec_susp_pc  = fd_pc + word_t'(w) + 1;
        dec[w].susp  = susp_ok;
      end
    end
  end

  assign cancel     = dec_susp && susp_ok;
  assign cancel_tid = fd_tid;
endmodule
