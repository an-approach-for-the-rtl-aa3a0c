// ntt_stream: fully streaming, multi-field radix-2 NTT of size n = 2^LOGN with a
// streaming width of two coefficients per cycle, for NPOLY polynomials in lockstep.
// A frame is n/2 consecutive beats; beat t of a frame carries its prime-field slot in
// the tag. Each polynomial gets one butterfly per stage and cycle, so one transform
// completes every n/2 cycles with no bubble, also when the field changes from one
// frame to the next: every stage looks up the twiddles, q and Barrett constant of the
// slot that travels with the data.
//
// DIT = 0, forward: decimation in frequency, stage spans n/2, n/4, ..., 1, each stage
//   followed by a commutator of delay span/2. Input beat t carries (x[t], x[t+n/2]);
//   output beat t carries (X[bitrev(2t)], X[bitrev(2t+1)]) with X[k] = sum x[i] w^(ik).
// DIT = 1, inverse: decimation in time, stage spans 1, 2, ..., n/2, commutators of
//   delay equal to the span. It takes the forward output order and returns
//   (y[t], y[t+n/2]) with y[i] = sum Y[k] w^(-ik) (the 1/n factor is applied outside).
// Latency (both directions): 2*LOGN + n/2 - 1 cycles from a beat of input to the beat
// of output at the same frame position.
// Twiddles are programmed over tw_* as exponent/value pairs (w^e for the forward set,
// w^-e for the inverse set, e < n/2); each stage's bank keeps those it uses.
// The streaming butterfly/commutator architecture follows the document's data-flow
// NTT; the pairing of directions and orders is this design's choice.
module ntt_stream
  import rpm_pkg::*;
#(
  parameter int unsigned N     = 16384,
  parameter int unsigned S     = 30,
  parameter int unsigned G     = 4,
  parameter bit          DIT   = 1'b0,
  parameter int unsigned NPOLY = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [S-1:0]      q_tab  [G],
  input  logic [S:0]        mu_tab [G],
  input  logic              tw_we,
  input  logic [SLOT_W-1:0] tw_slot,
  input  logic [$clog2(N)-2:0] tw_exp,
  input  logic [S-1:0]      tw_data,
  input  logic [S-1:0]      l0_i [NPOLY],
  input  logic [S-1:0]      l1_i [NPOLY],
  input  tag_t              tag_i,
  output logic [S-1:0]      l0_o [NPOLY],
  output logic [S-1:0]      l1_o [NPOLY],
  output tag_t              tag_o
);
  localparam int unsigned LOGN = $clog2(N);

  // Stage k input / output
  logic [S-1:0] si0 [LOGN][NPOLY];
  logic [S-1:0] si1 [LOGN][NPOLY];
  tag_t         sti [LOGN];
  logic [S-1:0] so0 [LOGN][NPOLY];
  logic [S-1:0] so1 [LOGN][NPOLY];
  tag_t         sto [LOGN];

  assign si0[0] = l0_i;
  assign si1[0] = l1_i;
  assign sti[0] = tag_i;

  for (genvar k = 0; k < LOGN; k++) begin : g_st
    localparam int unsigned H = DIT ? (1 << k) : (N >> (k + 1));
    ntt_stage #(.S(S), .G(G), .LOGN(LOGN), .H(H), .DIT(DIT), .NPOLY(NPOLY)) u_stage (
      .clk, .rst, .q_tab, .mu_tab,
      .tw_we, .tw_slot, .tw_exp, .tw_data,
      .a_i(si0[k]), .b_i(si1[k]), .tag_i(sti[k]),
      .x_o(so0[k]), .y_o(so1[k]), .tag_o(sto[k]));

    if (k < LOGN - 1) begin : g_com
      localparam int unsigned D = DIT ? H : H / 2;
      logic [S*NPOLY-1:0] p0, p1, c0, c1;
      for (genvar p = 0; p < NPOLY; p++) begin : g_pack
        assign p0[p*S +: S] = so0[k][p];
        assign p1[p*S +: S] = so1[k][p];
        assign si0[k+1][p]  = c0[p*S +: S];
        assign si1[k+1][p]  = c1[p*S +: S];
      end
      stream_commutator #(.W(S*NPOLY), .D(D)) u_com (
        .clk, .rst, .i0(p0), .i1(p1), .tag_i(sto[k]),
        .o0(c0), .o1(c1), .tag_o(sti[k+1]));
    end
  end

  assign l0_o  = so0[LOGN-1];
  assign l1_o  = so1[LOGN-1];
  assign tag_o = sto[LOGN-1];
endmodule
