// rpm_pkg: constants and types shared by the Residue Polynomial Multiplier (RPM).
// The default sizes are those of the main configuration: polynomial degree n = 2^14,
// 30-bit RNS primes, a streaming width of two coefficients per cycle and G = 4 field
// slots held in the twiddle banks at once. The tag that travels with each beat, the
// programming-port selectors and the order of the per-field constants are choices of
// this design.
package rpm_pkg;
  parameter int unsigned N_DEFAULT = 16384;  // polynomial degree n
  parameter int unsigned S_DEFAULT = 30;     // bits of an RNS prime q_i
  parameter int unsigned G_DEFAULT = 4;      // field slots per twiddle bank
  parameter int unsigned SLOT_W    = 3;      // slot field width; G <= 8

  // Sideband that travels with every beat through the pipeline.
  typedef struct packed {
    logic              valid;
    logic              sop;    // first beat of a polynomial frame
    logic              eop;    // last beat of a polynomial frame
    logic [SLOT_W-1:0] slot;   // field slot: selects q_i, constants and twiddles
  } tag_t;

  localparam int unsigned TAG_W = $bits(tag_t);

  // Programming port: what a write targets.
  typedef enum logic [1:0] {
    PROG_FWD_TW = 2'd0,   // forward twiddle omega^e, addr = e
    PROG_INV_TW = 2'd1,   // inverse twiddle omega^-e, addr = e
    PROG_CONST  = 2'd2,   // field constant, addr = const_e
    PROG_TW     = 2'd3    // forward twiddle omega^e, addr = e; the inverse
                          // twiddle omega^-(n/2-e) = q - omega^e is written with it
  } prog_sel_e;

  // Per-field constants, written through the programming port.
  typedef enum logic [2:0] {
    C_Q        = 3'd0,   // the prime q_i
    C_MU       = 3'd1,   // Barrett constant floor(2^(2S) / q_i)
    C_PRE0     = 3'd2,   // pre-weight start, lane 0: 1
    C_PRE1     = 3'd3,   // pre-weight start, lane 1: psi^(n/2)
    C_PRESTEP  = 3'd4,   // pre-weight ratio: psi
    C_POST0    = 3'd5,   // post-weight start, lane 0: n^-1
    C_POST1    = 3'd6,   // post-weight start, lane 1: n^-1 psi^(-n/2)
    C_POSTSTEP = 3'd7    // post-weight ratio: psi^-1
  } const_e;

  localparam int unsigned NCONST = 8;
endpackage
