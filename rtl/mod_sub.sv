// mod_sub: modular subtractor (a - b) mod q for a, b in 0..q-1.
//
// First clock: registers a - b + q (always positive, below 2q). Second clock:
// subtracts q when the value is q or more. Fully pipelined, latency 2 clocks.
module mod_sub
  import kyber_pkg::*;
(
  input  logic  clk,
  input  coef_t a,
  input  coef_t b,
  output coef_t d
);

  logic [QW:0] diff_q;

  always_ff @(posedge clk) begin
    diff_q <= {1'b0, a} + (QW+1)'(Q) - {1'b0, b};
    d      <= (diff_q >= (QW+1)'(Q)) ? coef_t'(diff_q - (QW+1)'(Q)) : coef_t'(diff_q);
  end

endmodule
