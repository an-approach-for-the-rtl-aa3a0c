// ntt_butterfly: radix-2 butterfly over Z_q, combinational.
// DIT = 0 (forward transform, decimation in frequency, Gentleman-Sande):
//   x = a + b,      y = (a - b) * w
// DIT = 1 (inverse transform, decimation in time, Cooley-Tukey):
//   x = a + b * w,  y = a - b * w
// Built from mod_add, mod_sub and mod_mul. Which butterfly serves which direction is
// this design's choice; it lets the forward output and the inverse input share one
// bit-reversed order, so no reordering memory sits between them.
module ntt_butterfly #(
  parameter int unsigned S   = 30,
  parameter bit          DIT = 1'b0
) (
  input  logic [S-1:0] a,
  input  logic [S-1:0] b,
  input  logic [S-1:0] w,
  input  logic [S-1:0] q,
  input  logic [S:0]   mu,
  output logic [S-1:0] x,
  output logic [S-1:0] y
);
  if (DIT) begin : g_ct
    logic [S-1:0] t;
    mod_mul #(.S(S)) u_mul (.a(b), .b(w), .q, .mu, .r(t));
    mod_add #(.S(S)) u_add (.a(a), .b(t), .q, .r(x));
    mod_sub #(.S(S)) u_sub (.a(a), .b(t), .q, .r(y));
  end else begin : g_gs
    logic [S-1:0] d;
    mod_add #(.S(S)) u_add (.a(a), .b(b), .q, .r(x));
    mod_sub #(.S(S)) u_sub (.a(a), .b(b), .q, .r(d));
    mod_mul #(.S(S)) u_mul (.a(d), .b(w), .q, .mu, .r(y));
  end
endmodule
