// mod_sub: modular subtraction r = (a - b) mod q for a, b < q.
// The difference is computed on S+1 bits; if it borrowed, q is added back.
// Purely combinational.
module mod_sub #(
  parameter int unsigned S = 30
) (
  input  logic [S-1:0] a,
  input  logic [S-1:0] b,
  input  logic [S-1:0] q,
  output logic [S-1:0] r
);
  logic [S:0] diff, fix;
  always_comb begin
    diff = {1'b0, a} - {1'b0, b};
    fix  = diff + {1'b0, q};
    r    = diff[S] ? fix[S-1:0] : diff[S-1:0];
  end
endmodule
