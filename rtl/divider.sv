// Iterative unsigned divider (restoring, one quotient bit per cycle).
//
// start loads dividend and divisor; W cycles later done pulses for one cycle
// with quotient and remainder, so an operation takes W+1 cycles from start to
// done. Division by zero gives an all-ones quotient and the dividend as
// remainder. kill stops an operation in progress (its instruction was
// invalidated). The algorithm is this design's choice; the published design
// only names division as a long-latency, thread suspending operation.
module divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         kill,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  logic [W-1:0]         q, d;
  logic [W:0]           r;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]           trial;

  assign trial     = {r[W-1:0], q[W-1]} - {1'b0, d};
  assign quotient  = q;
  assign remainder = r[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; q <= '0; d <= '0; r <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (kill) begin
        busy <= 1'b0;
      end else if (start && !busy) begin
        busy <= 1'b1;
        q    <= dividend;
        d    <= divisor;
        r    <= '0;
        cnt  <= '0;
      end else if (busy) begin
        if (trial[W]) begin
          r <= {r[W-1:0], q[W-1]};
          q <= {q[W-2:0], 1'b0};
        end else begin
          r <= trial;
          q <= {q[W-2:0], 1'b1};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
