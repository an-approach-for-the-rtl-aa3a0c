// field_table: the constants of the G prime fields currently loaded, one register set
// per slot: q, the Barrett constant and the six weighting constants listed in
// rpm_pkg::const_e. Written one word per cycle through the programming port; all
// entries are readable in parallel so every pipeline step can index the slot that
// travels with its data. Cleared by reset. The set of constants and their encoding are
// this design's choice.
module field_table
  import rpm_pkg::*;
#(
  parameter int unsigned S = 30,
  parameter int unsigned G = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [SLOT_W-1:0] wslot,
  input  const_e            widx,
  input  logic [S:0]        wdata,
  output logic [S-1:0]      q      [G],
  output logic [S:0]        mu     [G],
  output logic [S-1:0]      pre0   [G],
  output logic [S-1:0]      pre1   [G],
  output logic [S-1:0]      prestep[G],
  output logic [S-1:0]      post0  [G],
  output logic [S-1:0]      post1  [G],
  output logic [S-1:0]      poststep[G]
);
  logic [S:0] regs [G][NCONST];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int g = 0; g < G; g++)
        for (int c = 0; c < NCONST; c++) regs[g][c] <= '0;
    end else if (we && (int'(wslot) < G)) begin
      regs[int'(wslot)][int'(widx)] <= wdata;
    end
  end

  always_comb begin
    for (int g = 0; g < G; g++) begin
      q[g]        = regs[g][C_Q][S-1:0];
      mu[g]       = regs[g][C_MU];
      pre0[g]     = regs[g][C_PRE0][S-1:0];
      pre1[g]     = regs[g][C_PRE1][S-1:0];
      prestep[g]  = regs[g][C_PRESTEP][S-1:0];
      post0[g]    = regs[g][C_POST0][S-1:0];
      post1[g]    = regs[g][C_POST1][S-1:0];
      poststep[g] = regs[g][C_POSTSTEP][S-1:0];
    end
  end
endmodule
