// psi_weight: multiplies a two-lane coefficient stream by a geometric weight sequence,
// as negative wrapped convolution needs before the forward NTT (psi^i) and after the
// inverse NTT (n^-1 psi^-i), psi being a 2n-th root of unity (an n-th root of -1).
// Beat t of a frame carries coefficients t and t+n/2, so lane 0 is weighted by
// start0 * step^t and lane 1 by start1 * step^t. The powers are computed on the fly:
// at the start of a frame the running weights load the slot's start constants, and
// each beat multiplies them by the slot's step. No weight table is stored.
//   pre-weighting : start0 = 1,    start1 = psi^(n/2),          step = psi
//   post-weighting: start0 = n^-1, start1 = n^-1 psi^(-n/2),    step = psi^-1
// Output is registered: latency 1 cycle, one beat per cycle. Computing the weights by
// recurrence rather than storing them is this design's choice.
module psi_weight
  import rpm_pkg::*;
#(
  parameter int unsigned S     = 30,
  parameter int unsigned G     = 4,
  parameter int unsigned NPOLY = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [S-1:0]      q_tab     [G],
  input  logic [S:0]        mu_tab    [G],
  input  logic [S-1:0]      start0_tab[G],
  input  logic [S-1:0]      start1_tab[G],
  input  logic [S-1:0]      step_tab  [G],
  input  logic [S-1:0]      l0_i [NPOLY],
  input  logic [S-1:0]      l1_i [NPOLY],
  input  tag_t              tag_i,
  output logic [S-1:0]      l0_o [NPOLY],
  output logic [S-1:0]      l1_o [NPOLY],
  output tag_t              tag_o
);
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;

  logic [S-1:0] wr0, wr1;          // running weights for the next beat
  logic [S-1:0] w0, w1, n0, n1;
  logic [S-1:0] q_s, step_s;
  logic [S:0]   mu_s;
  logic [S-1:0] p0 [NPOLY];
  logic [S-1:0] p1 [NPOLY];
  logic         first;

  always_comb begin
    q_s    = q_tab[GW'(tag_i.slot)];
    mu_s   = mu_tab[GW'(tag_i.slot)];
    step_s = step_tab[GW'(tag_i.slot)];
    first  = tag_i.valid && tag_i.sop;
    w0     = first ? start0_tab[GW'(tag_i.slot)] : wr0;
    w1     = first ? start1_tab[GW'(tag_i.slot)] : wr1;
  end

  mod_mul #(.S(S)) u_n0 (.a(w0), .b(step_s), .q(q_s), .mu(mu_s), .r(n0));
  mod_mul #(.S(S)) u_n1 (.a(w1), .b(step_s), .q(q_s), .mu(mu_s), .r(n1));

  for (genvar p = 0; p < NPOLY; p++) begin : g_w
    mod_mul #(.S(S)) u_m0 (.a(l0_i[p]), .b(w0), .q(q_s), .mu(mu_s), .r(p0[p]));
    mod_mul #(.S(S)) u_m1 (.a(l1_i[p]), .b(w1), .q(q_s), .mu(mu_s), .r(p1[p]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr0   <= '0;
      wr1   <= '0;
      tag_o <= '0;
    end else begin
      if (tag_i.valid) begin
        wr0 <= n0;
        wr1 <= n1;
      end
      tag_o <= tag_i;
    end
    l0_o <= p0;
    l1_o <= p1;
  end
endmodule
