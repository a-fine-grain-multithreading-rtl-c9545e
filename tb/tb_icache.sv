// Testbench for icache: cold miss, line fill from a memory model with a
// fixed latency, hits on all four words afterwards, lookups that hit while a
// fill is in progress (non-blocking), and a conflicting line that replaces
// an earlier one. Uses a small cache (16 lines).
module tb_icache;
  import mt_pkg::*;
  localparam int LAT = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  word_t lk_addr = 0, lk_line [FETCH_W], fill_addr = 0, fill_done_addr, mem_req_addr;
  logic lk_hit, fill_start = 0, fill_busy, fill_done, mem_req_valid, mem_rsp_valid = 0;
  word_t mem_rsp_line [FETCH_W];
  icache #(.LINES(16)) dut (.*);
  always #5 clk = ~clk;

  function automatic word_t mem_word(input word_t a); return a * 32'h9e3779b1 + 1; endfunction

  // memory model: answers LAT cycles after a request
  initial begin
    foreach (mem_rsp_line[w]) mem_rsp_line[w] = 0;
    forever begin
      @(posedge clk);
      if (mem_req_valid) begin
        word_t a;
        a = mem_req_addr;
        repeat (LAT - 1) @(posedge clk);
        #1;
        foreach (mem_rsp_line[w]) mem_rsp_line[w] = mem_word(a + w);
        mem_rsp_valid = 1;
        @(posedge clk); #1 mem_rsp_valid = 0;
      end
    end
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic fill(input word_t a);
    int cyc;
    @(negedge clk); lk_addr = a; #1; chk(!lk_hit, $sformatf("miss %h", a));
    fill_addr = a; fill_start = 1; @(negedge clk); fill_start = 0;
    cyc = 1;
    while (!fill_done) begin @(negedge clk); cyc++; end
    // one cycle to send the request, LAT in memory, one to write the line
    chk(cyc == LAT + 2, $sformatf("fill latency %0d", cyc));
    chk(fill_done_addr == {a[31:2], 2'b00}, "fill_done_addr");
  endtask

  task automatic hit(input word_t a);
    @(negedge clk); lk_addr = a; #1;
    chk(lk_hit, $sformatf("hit %h", a));
    foreach (lk_line[w]) chk(lk_line[w] == mem_word({a[31:2], 2'b00} + w), "line data");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    fill(32'h40);
    hit(32'h40); hit(32'h43);
    // non-blocking: start a fill, other line still hits meanwhile
    @(negedge clk); lk_addr = 32'h84; fill_addr = 32'h84; fill_start = 1;
    @(negedge clk); fill_start = 0; chk(fill_busy, "busy during fill");
    lk_addr = 32'h41; #1; chk(lk_hit, "hit under miss");
    while (!fill_done) @(negedge clk);
    hit(32'h86);
    // conflict: 0x40 + 16 lines * 4 words maps to the same line
    fill(32'h40 + 64);
    hit(32'h40 + 64);
    @(negedge clk); lk_addr = 32'h40; #1; chk(!lk_hit, "evicted line misses");
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
