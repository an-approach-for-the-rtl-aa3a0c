// tb_pointwise_mul: random pairs in both lanes, slots cycling over four primes;
// each output must be a*b mod q of the beat's slot, one cycle after the input.
module tb_pointwise_mul;
  import rpm_pkg::*;
  import rpm_tb_pkg::*;
  localparam int unsigned S = 30, G = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [S-1:0] q_tab [G];
  logic [S:0]   mu_tab [G];
  logic [S-1:0] a_i [2], b_i [2], c_o [2];
  tag_t tag_i, tag_o;
  int checks = 0, failures = 0;

  pointwise_mul #(.S(S), .G(G)) dut (.*);

  u64 exp_c [512][2];
  int exp_slot [512];
  int nin = 0, nout = 0;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && tag_o.valid) begin
    checks += 3;
    if (c_o[0] != S'(exp_c[nout][0])) failures++;
    if (c_o[1] != S'(exp_c[nout][1])) failures++;
    if (tag_o.slot != SLOT_W'(exp_slot[nout])) failures++;
    nout++;
  end

  initial begin
    tag_i = '0; a_i = '{default: '0}; b_i = '{default: '0};
    for (int g = 0; g < G; g++) begin
      automatic u64 q = find_prime(S, 4096, g);
      q_tab[g] = S'(q); mu_tab[g] = (S+1)'(barrett_mu(q, S));
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 400; i++) begin
      automatic int g = (i / 7) % G;
      automatic u64 q = u64'(q_tab[g]);
      @(negedge clk);
      tag_i = '{valid: 1'b1, sop: 1'b0, eop: 1'b0, slot: SLOT_W'(g)};
      for (int l = 0; l < 2; l++) begin
        automatic u64 a = $urandom % q, b = $urandom % q;
        a_i[l] = S'(a); b_i[l] = S'(b);
        exp_c[nin][l] = mulmod(a, b, q);
      end
      exp_slot[nin] = g;
      nin++;
    end
    @(negedge clk) tag_i = '0;
    repeat (3) @(posedge clk);
    checks++;
    if (nout != nin) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
