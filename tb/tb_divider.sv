// Testbench for divider: random and corner-case divisions compared with the
// language's / and %, and the latency from start to done (W+1 cycles).
module tb_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, kill = 0, busy, done;
  logic [31:0] dividend, divisor, quotient, remainder;
  divider #(.W(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    int cyc;
    @(negedge clk); dividend = x; divisor = y; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (cyc != 33) begin failures++; $display("FAIL latency %0d", cyc); end
    if (y == 0) begin
      if (quotient != '1 || remainder != x) begin failures++; $display("FAIL div0"); end
    end else if (quotient != x / y || remainder != x % y) begin
      failures++; $display("FAIL %0d/%0d got %0d r %0d", x, y, quotient, remainder);
    end
  endtask

  initial begin
    dividend = 0; divisor = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(100, 7); run(7, 100); run(32'hffffffff, 1); run(32'hffffffff, 32'hffffffff);
    run(12345, 0); run(32'h80000000, 3);
    for (int n = 0; n < 200; n++) run($urandom, (n % 3 == 0) ? $urandom_range(1, 255) : $urandom);
    // kill stops an operation
    @(negedge clk); dividend = 9; divisor = 3; start = 1;
    @(negedge clk); start = 0; kill = 1;
    @(negedge clk); kill = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL kill"); end
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
