// tb_psi_weight: post-weighting configuration with two slots (two primes).
// For n = 32, frames of 16 beats: lane 0 of beat t must come out multiplied by
// n^-1 psi^-t and lane 1 by n^-1 psi^-(t+16), one cycle later; frames alternate
// between the slots back to back, and one gap is inserted, so the running weight
// must restart at every frame start and hold while no beat is valid.
module tb_psi_weight;
  import rpm_pkg::*;
  import rpm_tb_pkg::*;
  localparam int unsigned S = 30, G = 4, N = 32, FL = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [S-1:0] q_tab [G], start0_tab [G], start1_tab [G], step_tab [G];
  logic [S:0]   mu_tab [G];
  logic [S-1:0] l0_i [1], l1_i [1], l0_o [1], l1_o [1];
  tag_t tag_i, tag_o;
  int checks = 0, failures = 0;

  psi_weight #(.S(S), .G(G), .NPOLY(1)) dut (.*);

  u64 qs [2], psis [2];
  u64 e0 [128], e1 [128];
  int nin = 0, nout = 0;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && tag_o.valid) begin
    checks += 2;
    if (l0_o[0] != S'(e0[nout])) failures++;
    if (l1_o[0] != S'(e1[nout])) failures++;
    nout++;
  end

  initial begin
    tag_i = '0; l0_i[0] = '0; l1_i[0] = '0;
    for (int s = 0; s < 2; s++) begin
      qs[s] = find_prime(S, N, s + 1);
      psis[s] = find_psi(qs[s], N);
    end
    for (int g = 0; g < G; g++) begin
      automatic u64 q = qs[g % 2], ip = invmod(psis[g % 2], q), ni = invmod(N, q);
      q_tab[g] = S'(q); mu_tab[g] = (S+1)'(barrett_mu(q, S));
      start0_tab[g] = S'(ni);
      start1_tab[g] = S'(mulmod(ni, powmod(ip, N / 2, q), q));
      step_tab[g] = S'(ip);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 6; f++) begin
      if (f == 3) begin
        @(negedge clk) tag_i = '0;
        repeat (3) @(negedge clk);
      end
      for (int t = 0; t < FL; t++) begin
        automatic int s = f % 2;
        automatic u64 q = qs[s], x0 = $urandom % q, x1 = $urandom % q;
        automatic u64 ip = invmod(psis[s], q), ni = invmod(N, q);
        @(negedge clk);
        l0_i[0] = S'(x0); l1_i[0] = S'(x1);
        tag_i = '{valid: 1'b1, sop: (t == 0), eop: (t == FL - 1), slot: SLOT_W'(s)};
        e0[nin] = mulmod(x0, mulmod(ni, powmod(ip, t, q), q), q);
        e1[nin] = mulmod(x1, mulmod(ni, powmod(ip, t + FL, q), q), q);
        nin++;
      end
    end
    @(negedge clk) tag_i = '0;
    repeat (4) @(posedge clk);
    checks++;
    if (nout != nin) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
