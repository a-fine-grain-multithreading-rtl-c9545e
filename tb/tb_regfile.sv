// Testbench for regfile: random writes on all ports and reads on all ports,
// compared with a reference array; register 0 must stay zero.
module tb_regfile;
  import mt_pkg::*;
  localparam int NRD = 8, NWR = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  preg_t raddr [NRD];
  word_t rdata [NRD];
  logic  we [NWR];
  preg_t waddr [NWR];
  word_t wdata [NWR];
  word_t ref_regs [64];
  regfile #(.N(64), .NRD(NRD), .NWR(NWR)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    foreach (ref_regs[i]) ref_regs[i] = '0;
    foreach (we[p]) begin we[p] = 0; waddr[p] = '0; wdata[p] = '0; end
    foreach (raddr[r]) raddr[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      logic [63:0] used;
      used = '0;
      @(negedge clk);
      foreach (we[p]) begin
        waddr[p] = preg_t'($urandom_range(0, 63));
        we[p] = ($urandom_range(0, 1) == 1) && !used[waddr[p]];
        if (we[p]) used[waddr[p]] = 1'b1;
        wdata[p] = $urandom;
      end
      foreach (raddr[r]) raddr[r] = preg_t'($urandom_range(0, 63));
      #1;
      foreach (raddr[r]) begin
        checks++;
        if (rdata[r] != ref_regs[raddr[r]]) begin
          failures++; $display("FAIL read r%0d got %h exp %h", raddr[r], rdata[r], ref_regs[raddr[r]]);
        end
      end
      @(posedge clk);
      foreach (we[p]) if (we[p] && waddr[p] != 0) ref_regs[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
