// Testbench for decoder: register remapping with the thread's RRM, operand
// flags, immediates, the TSI rules (suspend request with resume PC, fetch
// cancel and invalidation of later slots when granted; no invalidation when
// refused), slot mask and flush.
module tb_decoder;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  logic fd_valid = 0; tid_t fd_tid = 0; rrm_t fd_rrm = 0; word_t fd_pc = 0;
  word_t fd_ins [FETCH_W];
  logic [FETCH_W-1:0] fd_mask = '1;
  logic accept = 1, flush = 0, susp_ok = 1;
  tid_t flush_tid = 0;
  dec_t dec [FETCH_W];
  logic dec_susp, cancel; tid_t dec_susp_tid, cancel_tid; word_t dec_susp_pc;
  decoder dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (fd_ins[w]) fd_ins[w] = 0;
    // block: ADD r3,r1,r20 ; ADDI r5,r3,-2 ; ST r5 -> 4(r2) ; BEQ r1,r2,-3
    fd_valid = 1; fd_tid = 2; fd_rrm = 4; fd_pc = 32'h80;
    fd_ins[0] = enc_r(OP_ADD, 3, 1, 20);
    fd_ins[1] = enc_i(OP_ADDI, 5, 3, -2);
    fd_ins[2] = enc_s(OP_ST, 2, 5, 4);
    fd_ins[3] = enc_s(OP_BEQ, 1, 2, -3);
    #1;
    chk(dec[0].valid && dec[0].fu == FU_ALU && dec[0].dst == 35 && dec[0].s1 == 33 && dec[0].s2 == 20, "ADD remap");
    chk(dec[0].pc == 32'h80 && dec[3].pc == 32'h83 && dec[0].tid == 2, "pc/tid");
    chk(dec[1].imm == 32'hfffffffe && dec[1].use_s1 && !dec[1].use_s2 && dec[1].dst == 37, "ADDI");
    chk(dec[2].fu == FU_MEM && !dec[2].has_dst && dec[2].s1 == 34 && dec[2].s2 == 37 && dec[2].imm == 4, "ST");
    chk(dec[3].fu == FU_BR && dec[3].imm == 32'hfffffffd, "BEQ");
    chk(!dec_susp && !cancel, "no TSI");
    // TSI in slot 1, granted
    fd_ins[1] = enc_r(OP_DIV, 6, 1, 2); susp_ok = 1; #1;
    chk(dec_susp && dec_susp_tid == 2 && dec_susp_pc == 32'h82, "suspend request");
    chk(cancel && cancel_tid == 2, "cancel same-thread fetch");
    chk(dec[0].valid && dec[1].valid && dec[1].tsi && dec[1].susp && !dec[2].valid && !dec[3].valid, "invalidate after TSI");
    // refused: all slots stay, susp flag clear
    susp_ok = 0; #1;
    chk(!cancel && dec[1].tsi && !dec[1].susp && dec[2].valid && dec[3].valid, "refused suspension");
    // remote load is a TSI too; local load is not
    susp_ok = 1; fd_ins[1] = enc_i(OP_LD, 6, 1, 8); fd_ins[2] = enc_i(OP_LDR, 7, 1, 8); #1;
    chk(!dec[1].tsi && dec[2].tsi && dec_susp_pc == 32'h83 && !dec[3].valid, "LDR suspends");
    chk(dec[2].dst == 39 && dec[2].imm == 8, "LDR fields");
    // no request while not accepted
    accept = 0; #1; chk(!dec_susp, "no suspend without accept"); accept = 1;
    // mask and fork
    fd_mask = 4'b1100; fd_ins[2] = enc_i(OP_FORK, 6, 0, 16); #1;
    chk(!dec[0].valid && !dec[1].valid && dec[2].valid && dec[2].fu == FU_THR && dec[2].new_rrm == 6, "mask/fork");
    // flush
    flush = 1; flush_tid = 2; #1;
    chk(!dec[2].valid && !dec[3].valid, "flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
