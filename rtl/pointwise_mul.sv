// pointwise_mul: coefficient-wise product of two transformed polynomials in Z_q,
// two lanes per cycle, using the q and Barrett constant of the slot in the tag.
// This is the multiplication step between the forward and inverse NTTs of negative
// wrapped convolution. Output registered: latency 1 cycle, one beat per cycle.
module pointwise_mul
  import rpm_pkg::*;
#(
  parameter int unsigned S = 30,
  parameter int unsigned G = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [S-1:0] q_tab  [G],
  input  logic [S:0]   mu_tab [G],
  input  logic [S-1:0] a_i [2],
  input  logic [S-1:0] b_i [2],
  input  tag_t         tag_i,
  output logic [S-1:0] c_o [2],
  output tag_t         tag_o
);
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;
  logic [S-1:0] c [2];
  for (genvar l = 0; l < 2; l++) begin : g_l
    mod_mul #(.S(S)) u_mul (.a(a_i[l]), .b(b_i[l]), .q(q_tab[GW'(tag_i.slot)]),
                            .mu(mu_tab[GW'(tag_i.slot)]), .r(c[l]));
  end
  always_ff @(posedge clk) begin
    c_o <= c;
    if (rst) tag_o <= '0;
    else     tag_o <= tag_i;
  end
endmodule
