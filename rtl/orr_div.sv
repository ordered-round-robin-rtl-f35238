// orr_div: unsigned restoring divider, one quotient bit per clock cycle.
//
// Used by the parameter initialisation to form the load fractions, the minimal batch
// multiplier C and the per-processor quanta without a large combinational divider.
// Pulse start with dividend and divisor; busy is high for W cycles, then done pulses for one
// cycle with quotient and remainder valid (they stay valid until the next start). A zero
// divisor gives an all-ones quotient and the dividend as remainder.
module orr_div #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  logic [W-1:0]         dvsr;
  logic [W:0]           rem;
  logic [W-1:0]         quo;
  logic [$clog2(W+1)-1:0] n;
  logic [W:0]           trial;

  assign trial     = {rem[W-1:0], quo[W-1]};
  assign quotient  = quo;
  assign remainder = rem[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvsr <= '0;
      rem  <= '0;
      quo  <= '0;
      n    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dvsr <= divisor;
        rem  <= '0;
        quo  <= dividend;
        n    <= ($clog2(W+1))'(W);
        busy <= 1'b1;
      end else if (busy) begin
        // shift the next dividend bit into the partial remainder and try to subtract
        if (trial >= {1'b0, dvsr}) begin
          rem <= trial - {1'b0, dvsr};
          quo <= {quo[W-2:0], 1'b1};
        end else begin
          rem <= trial;
          quo <= {quo[W-2:0], 1'b0};
        end
        n <= n - 1'b1;
        if (n == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
