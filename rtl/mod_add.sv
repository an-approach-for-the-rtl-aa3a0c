// mod_add: modular addition r = (a + b) mod q for a, b < q.
// The S+1-bit sum is reduced by one conditional subtraction of q. Purely combinational;
// the callers register the result. Operands must already be reduced (below q).
module mod_add #(
  parameter int unsigned S = 30
) (
  input  logic [S-1:0] a,
  input  logic [S-1:0] b,
  input  logic [S-1:0] q,
  output logic [S-1:0] r
);
  logic [S:0] sum, diff;
  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = sum - {1'b0, q};
    r    = (sum >= {1'b0, q}) ? diff[S-1:0] : sum[S-1:0];
  end
endmodule
