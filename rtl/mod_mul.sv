// mod_mul: modular multiplication r = a * b mod q by Barrett reduction.
// The prime q has exactly S bits (2^(S-1) < q < 2^S) and mu = floor(2^(2S) / q) is
// precomputed per field and supplied with q. With x = a*b < 2^(2S):
//   qhat = floor( floor(x / 2^(S-1)) * mu / 2^(S+1) ),  r = x - qhat*q,
// which leaves r < 3q, so at most two conditional subtractions finish the reduction.
// Reduction with a precomputed reciprocal of the modulus follows the software
// library the design is modelled on; the exact shift amounts are this design's choice.
// Purely combinational; callers register the result.
module mod_mul #(
  parameter int unsigned S = 30
) (
  input  logic [S-1:0] a,
  input  logic [S-1:0] b,
  input  logic [S-1:0] q,
  input  logic [S:0]   mu,
  output logic [S-1:0] r
);
  logic [2*S-1:0] x;
  logic [S:0]     q1;
  logic [2*S+1:0] q2;
  logic [S:0]     q3;
  logic [2*S:0]   q3q;
  logic [S+1:0]   r0, r1, r2;
  always_comb begin
    x   = a * b;
    q1  = (S+1)'(x >> (S-1));
    q2  = q1 * mu;
    q3  = (S+1)'(q2 >> (S+1));
    q3q = q3 * q;
    r0  = (S+2)'(x) - (S+2)'(q3q);
    r1  = (r0 >= {2'b00, q}) ? r0 - {2'b00, q} : r0;
    r2  = (r1 >= {2'b00, q}) ? r1 - {2'b00, q} : r1;
    r   = r2[S-1:0];
  end
endmodule
