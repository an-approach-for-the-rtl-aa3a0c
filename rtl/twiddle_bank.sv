// twiddle_bank: reprogrammable twiddle bank of one radix-2 NTT stage, for G fields.
// A stage of span H uses the twiddles omega^(j*STEP), j < H, with STEP = n/(2H).
// Twiddles are programmed over a write bus shared by all stages of an NTT: a write
// carries the exponent e of one twiddle of the n/2-entry set of one slot, and every
// bank keeps it when e is a multiple of its STEP, at address e/STEP. One pass over the
// set therefore fills all stages, and a slot can be rewritten while the other slots
// are being read. The read port is synchronous (one cycle), as in block RAM.
// Storage is G*H words of S bits. Holding G complete sets per stage is how this design
// realises the document's on-the-fly change of twiddle sets; the dispatch rule is its
// own choice.
module twiddle_bank
  import rpm_pkg::*;
#(
  parameter int unsigned S        = 30,
  parameter int unsigned G        = 4,
  parameter int unsigned LOGN     = 14,
  parameter int unsigned H        = 8192    // span of the stage; entries per slot
) (
  input  logic                clk,
  // programming bus
  input  logic                we,
  input  logic [SLOT_W-1:0]   wslot,
  input  logic [LOGN-2:0]     wexp,
  input  logic [S-1:0]        wdata,
  // read port
  input  logic [SLOT_W-1:0]   rslot,
  input  logic [LOGN-2:0]     rj,          // j < H
  output logic [S-1:0]        rdata
);
  localparam int unsigned LOGH  = $clog2(H);
  localparam int unsigned LSTEP = LOGN - 1 - LOGH;
  localparam int unsigned AW    = (LOGH > 0) ? LOGH : 1;
  localparam int unsigned GW    = (G > 1) ? $clog2(G) : 1;

  logic [S-1:0] mem [G*H];
  logic         hit;
  logic [LOGN-2:0] widx;
  localparam logic [LOGN-2:0] LOW_MASK = ((LOGN-1)'(1) << LSTEP) - 1'b1;

  always_comb begin
    widx = wexp >> LSTEP;
    hit  = ((wexp & LOW_MASK) == '0);
  end

  function automatic int unsigned addr(input logic [SLOT_W-1:0] s, input logic [LOGN-2:0] j);
    return int'(GW'(s)) * H + ((LOGH > 0) ? int'(AW'(j)) : 0);
  endfunction

  always_ff @(posedge clk) begin
    if (we && hit && (int'(wslot) < G)) mem[addr(wslot, widx)] <= wdata;
    rdata <= mem[addr(rslot, rj)];
  end
endmodule
