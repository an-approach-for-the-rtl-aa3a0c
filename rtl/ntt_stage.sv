// ntt_stage: one radix-2 butterfly stage of the streaming NTT, for NPOLY polynomials
// that share its twiddles, with its own twiddle bank.
// The stage counts beats from the start-of-frame tag; for a stage of span H the
// twiddle of beat tau is omega^((tau mod H) * n/(2H)) of the frame's field slot.
// Cycle 1 reads the bank and registers the operands; cycle 2 computes the butterflies
// with the slot's q and Barrett constant and registers the results. Latency 2 cycles,
// one butterfly per polynomial per cycle, no stall.
module ntt_stage
  import rpm_pkg::*;
#(
  parameter int unsigned S     = 30,
  parameter int unsigned G     = 4,
  parameter int unsigned LOGN  = 14,
  parameter int unsigned H     = 8192,
  parameter bit          DIT   = 1'b0,
  parameter int unsigned NPOLY = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [S-1:0]      q_tab  [G],
  input  logic [S:0]        mu_tab [G],
  input  logic              tw_we,
  input  logic [SLOT_W-1:0] tw_slot,
  input  logic [LOGN-2:0]   tw_exp,
  input  logic [S-1:0]      tw_data,
  input  logic [S-1:0]      a_i [NPOLY],   // lane 0
  input  logic [S-1:0]      b_i [NPOLY],   // lane 1
  input  tag_t              tag_i,
  output logic [S-1:0]      x_o [NPOLY],
  output logic [S-1:0]      y_o [NPOLY],
  output tag_t              tag_o
);
  localparam int unsigned LOGH = $clog2(H);
  localparam int unsigned GW   = (G > 1) ? $clog2(G) : 1;

  logic [LOGN-2:0] cnt, tau;
  logic [S-1:0]    w;
  logic [S-1:0]    a_r [NPOLY];
  logic [S-1:0]    b_r [NPOLY];
  logic [S-1:0]    x_c [NPOLY];
  logic [S-1:0]    y_c [NPOLY];
  tag_t            tag_r;
  logic [S-1:0]    q_s;
  logic [S:0]      mu_s;

  always_comb tau = (tag_i.valid && tag_i.sop) ? '0 : cnt;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= tau + 1'b1;
  end

  twiddle_bank #(.S(S), .G(G), .LOGN(LOGN), .H(H)) u_twb (
    .clk,
    .we(tw_we), .wslot(tw_slot), .wexp(tw_exp), .wdata(tw_data),
    .rslot(tag_i.slot),
    .rj((LOGH > 0) ? (tau & ((LOGN-1)'(H) - 1'b1)) : '0),
    .rdata(w)
  );

  always_ff @(posedge clk) begin
    a_r <= a_i;
    b_r <= b_i;
    if (rst) tag_r <= '0;
    else     tag_r <= tag_i;
  end

  always_comb begin
    q_s  = q_tab[GW'(tag_r.slot)];
    mu_s = mu_tab[GW'(tag_r.slot)];
  end

  for (genvar p = 0; p < NPOLY; p++) begin : g_bf
    ntt_butterfly #(.S(S), .DIT(DIT)) u_bf (
      .a(a_r[p]), .b(b_r[p]), .w, .q(q_s), .mu(mu_s), .x(x_c[p]), .y(y_c[p]));
  end

  always_ff @(posedge clk) begin
    x_o <= x_c;
    y_o <= y_c;
    if (rst) tag_o <= '0;
    else     tag_o <= tag_r;
  end
endmodule
