// Testbench for div_unit: two divides issued back to back are computed one
// after the other (33 cycles each) and written back by tag; a third is
// refused while the TSIB is full; a released divide commits straight to the
// register file and reactivates its thread.
module tb_div_unit;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic issue_valid = 0, issue_has_dst = 1; tag_t issue_tag = 0; tid_t issue_tid = 0;
  preg_t issue_dst = 0; word_t issue_a = 0, issue_b = 1;
  logic full, rel_valid = 0, flush = 0, wb_valid, rf_we, act_valid, busy;
  tag_t rel_tag = 0, wb_tag; tid_t flush_tid = 0, act_tid; word_t wb_result, rf_wdata; preg_t rf_waddr;
  div_unit #(.DEPTH(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask
  task automatic issue(input int tg, input int td, input word_t a, input word_t b);
    @(negedge clk); issue_valid = 1; issue_tag = tag_t'(tg); issue_tid = tid_t'(td);
    issue_dst = preg_t'(10 + tg); issue_a = a; issue_b = b;
    @(negedge clk); issue_valid = 0;
  endtask

  int cyc;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    issue(3, 1, 1000, 7);
    cyc = 1;
    issue(4, 2, 32'hdeadbeef, 16);
    cyc++;
    #1; chk(full, "TSIB full after two");
    while (!wb_valid) begin @(negedge clk); #1; cyc++; end
    chk(wb_tag == 3 && wb_result == 1000 / 7, "first quotient");
    chk(cyc >= 33 && cyc <= 36, $sformatf("first latency %0d", cyc));
    @(negedge clk); #1;
    while (!wb_valid) begin @(negedge clk); #1; end
    chk(wb_tag == 4 && wb_result == 32'hdeadbeef / 16, "second quotient");
    @(negedge clk);
    issue(6, 5, 81, 9);
    rel_valid = 1; rel_tag = 6; @(negedge clk); rel_valid = 0; #1;
    while (!act_valid) begin chk(!wb_valid, "no write-back after release"); @(negedge clk); #1; end
    chk(rf_we && rf_waddr == 16 && rf_wdata == 9 && act_tid == 5, "direct commit of released divide");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
