// Testbench for dcache (16 lines) against a reference memory model.
//
// Random word addresses over a range four times the cache size are read; a
// miss starts a fill (one request, the line's first address), the model
// answers after a random 1-6 cycles, and the word must then hit with the
// memory's value. Random writes go to the model and, in the same cycle, to the
// cache (write-through), only while no fill is outstanding. Every hit is
// compared with the model; a tag-conflicting line must miss after eviction.
module tb_dcache;
  import mt_pkg::*;
  localparam int LINES = 16;
  localparam int RANGE = LINES * 4 * 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  word_t rd_addr = 0, rd_data, fill_addr = 0, wr_addr = 0, wr_data = 0, mem_req_addr;
  logic rd_hit, fill_start = 0, fill_busy, wr_valid = 0, mem_req_valid, mem_rsp_valid = 0;
  word_t mem_rsp_line [4];
  dcache #(.LINES(LINES)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  word_t mem [RANGE];
  int n_hit = 0, n_fill = 0;

  // one fill: request seen after fill_start, answer after a random delay
  task automatic do_fill(input word_t a);
    int lat;
    fill_start = 1; fill_addr = a;
    @(negedge clk); fill_start = 0; #1;
    chk(fill_busy && mem_req_valid && mem_req_addr == {a[31:2], 2'b00}, "line request");
    lat = 1 + int'($urandom_range(5));
    repeat (lat) begin @(negedge clk); #1; chk(!mem_req_valid && fill_busy, "single request, busy"); end
    foreach (mem_rsp_line[w]) mem_rsp_line[w] = mem[({a[31:2], 2'b00} + w) % RANGE];
    mem_rsp_valid = 1;
    @(negedge clk); mem_rsp_valid = 0; #1;
    chk(!fill_busy, "fill finished");
    n_fill++;
  endtask

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    foreach (mem_rsp_line[w]) mem_rsp_line[w] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    rd_addr = 5; #1; chk(!rd_hit, "empty after reset");
    for (int it = 0; it < 600; it++) begin
      word_t a;
      a = word_t'($urandom_range(RANGE - 1));
      if ($urandom_range(3) == 0) begin
        wr_valid = 1; wr_addr = a; wr_data = $urandom;
        mem[a] = wr_data;
        @(negedge clk); wr_valid = 0;
      end else begin
        rd_addr = a; #1;
        if (!rd_hit) begin
          do_fill(a);
          rd_addr = a; #1;
          chk(rd_hit, "hit after fill");
        end else n_hit++;
        chk(rd_data == mem[a], $sformatf("data at %0d", a));
        @(negedge clk);
      end
    end
    // conflict: the same index with another tag evicts the line
    rd_addr = 0; #1; if (!rd_hit) do_fill(0);
    do_fill(LINES * 4);
    rd_addr = 0; #1; chk(!rd_hit, "evicted by a conflicting line");
    rd_addr = LINES * 4 + 1; #1; chk(rd_hit && rd_data == mem[LINES * 4 + 1], "conflicting line present");
    chk(n_hit > 100 && n_fill > 20, $sformatf("hits %0d fills %0d", n_hit, n_fill));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
