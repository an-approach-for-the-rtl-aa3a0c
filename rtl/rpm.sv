// rpm: Residue Polynomial Multiplier. Multiplies two polynomials a, b of
// Z_q[X]/(X^n + 1), q an S-bit prime with 2n | q-1, by negative wrapped convolution:
//   c = psi^-i * n^-1 * INTT( NTT(psi^i * a) . NTT(psi^i * b) )
// where psi is a 2n-th root of unity modulo q and omega = psi^2 the NTT root.
// Data path: psi pre-weighting of both operands, two forward NTTs in lockstep sharing
// their twiddle banks, a pointwise product, one inverse NTT and the post-weighting,
// all streaming two coefficients per cycle with no stall. One product leaves every
// n/2 cycles (at 200 MHz and n = 2^14: 24.4 products per ms).
//
// Frames. A frame is n/2 consecutive beats with in_valid high; in_sop marks the first.
// Beat t carries in_a = {a[t], a[t+n/2]} and in_b likewise; the result comes out in the
// same order, c[t] on out_c[0] and c[t+n/2] on out_c[1], LATENCY cycles after the
// input beat. Frames may follow each other back to back or with gaps.
//
// Fields. Each frame names a field slot (in_slot < G). A slot holds q_i, its Barrett
// constant, the weighting constants and the forward and inverse twiddle sets, so the
// prime can change from one frame to the next without a bubble (one RNS residue per
// frame). Slots are loaded through the programming port, one word per cycle:
//   prog_sel = PROG_FWD_TW: prog_addr = e, prog_data = omega^e      (e < n/2)
//   prog_sel = PROG_INV_TW: prog_addr = e, prog_data = omega^-e     (e < n/2)
//   prog_sel = PROG_CONST : prog_addr = rpm_pkg::const_e index, prog_data = constant
// While some slots are in use, a free one can be reloaded for a later field.
// slot_busy[g] is high while a frame of slot g is inside the pipeline; writing a busy
// slot corrupts that frame and sets the sticky prog_conflict flag.
// The data path follows the document; frame format, slot bookkeeping and the
// programming port are this design's choices. The host link is outside this module.
module rpm
  import rpm_pkg::*;
#(
  parameter int unsigned N = 16384,
  parameter int unsigned S = 30,
  parameter int unsigned G = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  // operand stream
  input  logic                 in_valid,
  input  logic                 in_sop,
  input  logic [SLOT_W-1:0]    in_slot,
  input  logic [S-1:0]         in_a [2],
  input  logic [S-1:0]         in_b [2],
  // programming port
  input  logic                 prog_valid,
  input  prog_sel_e            prog_sel,
  input  logic [SLOT_W-1:0]    prog_slot,
  input  logic [$clog2(N)-2:0] prog_addr,
  input  logic [S:0]           prog_data,
  // result stream
  output logic                 out_valid,
  output logic                 out_sop,
  output logic                 out_eop,
  output logic [SLOT_W-1:0]    out_slot,
  output logic [S-1:0]         out_c [2],
  // status
  output logic [G-1:0]         slot_busy,
  output logic                 prog_conflict
);
  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned NTT_LAT = 2 * LOGN + N / 2 - 1;
  localparam int unsigned LATENCY = 1 + NTT_LAT + 1 + NTT_LAT + 1;
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;

  // ---------------------------------------------------------------- field constants
  logic [S-1:0] q [G], pre0 [G], pre1 [G], prestep [G], post0 [G], post1 [G], poststep [G];
  logic [S:0]   mu [G];

  field_table #(.S(S), .G(G)) u_fields (
    .clk, .rst,
    .we(prog_valid && prog_sel == PROG_CONST), .wslot(prog_slot),
    .widx(const_e'(prog_addr[2:0])), .wdata(prog_data),
    .q, .mu, .pre0, .pre1, .prestep, .post0, .post1, .poststep);

  // ---------------------------------------------------------------- input framing
  logic [LOGN-2:0] beat;
  tag_t            tag_in;
  logic            in_first;

  always_comb begin
    in_first      = in_valid && in_sop;
    tag_in.valid  = in_valid;
    tag_in.sop    = in_first;
    tag_in.eop    = in_valid && ((in_first ? '0 : beat) == (LOGN-1)'(N / 2 - 1));
    tag_in.slot   = in_slot;
  end

  always_ff @(posedge clk) begin
    if (rst)           beat <= '0;
    else if (in_valid) beat <= (in_first ? '0 : beat) + 1'b1;
  end

  // ---------------------------------------------------------------- inverse twiddle writes
  // Direct (PROG_INV_TW) or derived from a forward write (PROG_TW): exponent 0 keeps
  // the value 1; exponent e > 0 of the forward set gives exponent n/2 - e of the
  // inverse set with value q - omega^e.
  logic                 inv_we;
  logic [LOGN-2:0]      inv_exp;
  logic [S-1:0]         inv_data;
  logic [S-1:0]         prog_q;
  logic                 derive;

  always_comb begin
    prog_q   = q[GW'(prog_slot)];
    derive   = (prog_sel == PROG_TW) && (prog_addr != '0);
    inv_we   = prog_valid && (prog_sel == PROG_INV_TW || prog_sel == PROG_TW);
    inv_exp  = derive ? (LOGN-1)'(N / 2 - int'(prog_addr)) : prog_addr;
    inv_data = derive ? prog_q - prog_data[S-1:0] : prog_data[S-1:0];
  end

  // ---------------------------------------------------------------- data path
  logic [S-1:0] a0 [2], a1 [2];          // pre-weighted, [poly] per lane
  logic [S-1:0] f0 [2], f1 [2];          // forward transforms
  logic [S-1:0] pa [2], pb [2], pc [2];  // pointwise operands / product
  logic [S-1:0] i0 [1], i1 [1];          // inverse transform
  logic [S-1:0] c0 [1], c1 [1];
  logic [S-1:0] x0 [2], x1 [2];
  tag_t         t_pre, t_fwd, t_pw, t_inv, t_out;

  assign x0 = '{in_a[0], in_b[0]};
  assign x1 = '{in_a[1], in_b[1]};

  psi_weight #(.S(S), .G(G), .NPOLY(2)) u_pre (
    .clk, .rst, .q_tab(q), .mu_tab(mu),
    .start0_tab(pre0), .start1_tab(pre1), .step_tab(prestep),
    .l0_i(x0), .l1_i(x1), .tag_i(tag_in), .l0_o(a0), .l1_o(a1), .tag_o(t_pre));

  ntt_stream #(.N(N), .S(S), .G(G), .DIT(1'b0), .NPOLY(2)) u_fwd (
    .clk, .rst, .q_tab(q), .mu_tab(mu),
    .tw_we(prog_valid && (prog_sel == PROG_FWD_TW || prog_sel == PROG_TW)),
    .tw_slot(prog_slot), .tw_exp(prog_addr), .tw_data(prog_data[S-1:0]),
    .l0_i(a0), .l1_i(a1), .tag_i(t_pre), .l0_o(f0), .l1_o(f1), .tag_o(t_fwd));

  // lane 0 and lane 1 of operand a, then of operand b
  assign pa = '{f0[0], f1[0]};
  assign pb = '{f0[1], f1[1]};

  pointwise_mul #(.S(S), .G(G)) u_mm (
    .clk, .rst, .q_tab(q), .mu_tab(mu),
    .a_i(pa), .b_i(pb), .tag_i(t_fwd), .c_o(pc), .tag_o(t_pw));

  ntt_stream #(.N(N), .S(S), .G(G), .DIT(1'b1), .NPOLY(1)) u_inv (
    .clk, .rst, .q_tab(q), .mu_tab(mu),
    .tw_we(inv_we), .tw_slot(prog_slot), .tw_exp(inv_exp), .tw_data(inv_data),
    .l0_i('{pc[0]}), .l1_i('{pc[1]}), .tag_i(t_pw), .l0_o(i0), .l1_o(i1), .tag_o(t_inv));

  psi_weight #(.S(S), .G(G), .NPOLY(1)) u_post (
    .clk, .rst, .q_tab(q), .mu_tab(mu),
    .start0_tab(post0), .start1_tab(post1), .step_tab(poststep),
    .l0_i(i0), .l1_i(i1), .tag_i(t_inv), .l0_o(c0), .l1_o(c1), .tag_o(t_out));

  assign out_valid = t_out.valid;
  assign out_sop   = t_out.valid && t_out.sop;
  assign out_eop   = t_out.valid && t_out.eop;
  assign out_slot  = t_out.slot;
  assign out_c     = '{c0[0], c1[0]};

  // ---------------------------------------------------------------- slot bookkeeping
  localparam int unsigned INFLIGHT_W = $clog2(LATENCY / (N / 2) + 3);
  logic [INFLIGHT_W-1:0] inflight [G];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int g = 0; g < G; g++) inflight[g] <= '0;
      prog_conflict <= 1'b0;
    end else begin
      for (int g = 0; g < G; g++) begin
        inflight[g] <= inflight[g]
                       + INFLIGHT_W'(in_first && GW'(in_slot) == GW'(g))
                       - INFLIGHT_W'(out_eop && GW'(out_slot) == GW'(g));
      end
      if (prog_valid && (slot_busy[GW'(prog_slot)] ||
                         (in_first && in_slot == prog_slot)))
        prog_conflict <= 1'b1;
    end
  end

  always_comb
    for (int g = 0; g < G; g++) slot_busy[g] = (inflight[g] != '0);

  // ---------------------------------------------------------------- protocol checks
  // A frame, once started, delivers n/2 consecutive beats.
  assert property (@(posedge clk) disable iff (rst)
                   (beat != '0 && !in_first) |-> in_valid)
    else $error("rpm: frame interrupted before its n/2 beats");
  assert property (@(posedge clk) disable iff (rst)
                   (in_valid && beat != '0) |-> !in_sop)
    else $error("rpm: new frame started inside a frame");
  assert property (@(posedge clk) disable iff (rst)
                   in_valid |-> (int'(in_slot) < G))
    else $error("rpm: slot out of range");
endmodule
