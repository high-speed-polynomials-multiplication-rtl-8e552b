// mod_add: modular adder (a + b) mod q for a, b in 0..q-1.
//
// Split over two clocks to keep the critical path short: the first stage
// registers the plain 13-bit sum, the second subtracts q when the sum is q or
// more and registers the result. Fully pipelined, latency 2 clocks.
module mod_add
  import kyber_pkg::*;
(
  input  logic  clk,
  input  coef_t a,
  input  coef_t b,
  output coef_t s
);

  logic [QW:0] sum_q;

  always_ff @(posedge clk) begin
    sum_q <= {1'b0, a} + {1'b0, b};
    s     <= (sum_q >= (QW+1)'(Q)) ? coef_t'(sum_q - (QW+1)'(Q)) : coef_t'(sum_q);
  end

endmodule
