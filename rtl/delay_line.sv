// delay_line: fixed delay of exactly D cycles for a W-bit word.
// D = 1 is a plain register. For D >= 2 the word is held in a (D-1)-deep circular
// memory (block RAM on an FPGA) followed by an output register: each cycle the entry
// at the pointer is read into the output register and overwritten with the input.
// The output reads as zero until D cycles after reset, so a delayed valid flag never
// shows stale memory contents.
module delay_line #(
  parameter int unsigned W = 8,
  parameter int unsigned D = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  localparam int unsigned CW = $clog2(D + 1);
  logic [CW-1:0] fill;
  logic          full;
  logic [W-1:0]  q_raw;

  always_ff @(posedge clk) begin
    if (rst)        fill <= '0;
    else if (!full) fill <= fill + 1'b1;
  end
  assign full = (fill == CW'(D));
  assign q    = full ? q_raw : '0;

  if (D == 1) begin : g_reg
    always_ff @(posedge clk) q_raw <= d;
  end else begin : g_mem
    localparam int unsigned DEPTH = D - 1;
    localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
    logic [W-1:0]  mem [DEPTH];
    logic [PW-1:0] ptr;
    always_ff @(posedge clk) begin
      q_raw    <= mem[ptr];
      mem[ptr] <= d;
    end
    always_ff @(posedge clk) begin
      if (rst)                         ptr <= '0;
      else if (ptr == PW'(DEPTH - 1))  ptr <= '0;
      else                             ptr <= ptr + 1'b1;
    end
  end
endmodule
