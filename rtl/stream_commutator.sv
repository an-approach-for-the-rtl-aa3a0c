// stream_commutator: streaming permutation between two radix-2 stages of a two-lane NTT.
// Input beat t carries butterfly outputs (lane 0, lane 1); the next stage needs pairs
// that are D beats apart within one lane. Lane 1 is delayed by D, a switch crosses
// the lanes during the second half of every 2D-beat period, and the new lane 0 is
// delayed by D. After this, output beat u of a frame carries, for u mod 2D < D, the
// lane-0 words of input beats (u, u+D) and otherwise the lane-1 words of input beats
// (u-D, u) of the same 2D-beat block. Latency is D cycles for data and tag alike.
// The switch phase restarts at every start-of-frame tag, so frames may follow each
// other back to back or with gaps. The delay-switch-delay structure is this design's
// choice for a two-lane streaming permutation.
module stream_commutator
  import rpm_pkg::*;
#(
  parameter int unsigned W = 30,
  parameter int unsigned D = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] i0,
  input  logic [W-1:0] i1,
  input  tag_t         tag_i,
  output logic [W-1:0] o0,
  output logic [W-1:0] o1,
  output tag_t         tag_o
);
  localparam int unsigned PB = $clog2(D);      // phase bit selecting the half period
  localparam int unsigned PW = PB + 1;

  logic [PW-1:0] cnt, phase;
  logic [W-1:0]  d1, s0, s1;
  logic          swap_l;

  always_comb begin
    phase = (tag_i.valid && tag_i.sop) ? '0 : cnt;
    swap_l = phase[PB];
    s0    = swap_l ? d1 : i0;
    s1    = swap_l ? i0 : d1;
  end

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else     cnt <= phase + 1'b1;
  end

  delay_line #(.W(W), .D(D)) u_dly_in1 (.clk, .rst, .d(i1), .q(d1));
  delay_line #(.W(W), .D(D)) u_dly_out0 (.clk, .rst, .d(s0), .q(o0));
  delay_line #(.W(TAG_W), .D(D)) u_dly_tag (.clk, .rst, .d(tag_i), .q(tag_o));
  assign o1 = s1;
endmodule
