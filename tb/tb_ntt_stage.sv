// tb_ntt_stage: one forward stage of span H = 4 in an n = 32 transform, two
// polynomials, two slots with different primes. Its bank is programmed with
// w^e for each slot; frames of random pairs are streamed through and each output
// must be (a+b, (a-b) w^((t mod 4)*4)) mod q of its slot, 2 cycles after the input,
// including across a change of slot between back-to-back frames.
module tb_ntt_stage;
  import rpm_pkg::*;
  import rpm_tb_pkg::*;
  localparam int unsigned S = 30, G = 4, LOGN = 5, H = 4, N = 32, FL = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [S-1:0] q_tab [G];
  logic [S:0]   mu_tab [G];
  logic tw_we;
  logic [SLOT_W-1:0] tw_slot;
  logic [LOGN-2:0] tw_exp;
  logic [S-1:0] tw_data;
  logic [S-1:0] a_i [2], b_i [2], x_o [2], y_o [2];
  tag_t tag_i, tag_o;
  int checks = 0, failures = 0;

  ntt_stage #(.S(S), .G(G), .LOGN(LOGN), .H(H), .DIT(1'b0), .NPOLY(2)) dut (.*);

  u64 qs [2], ws [2];
  u64 ea [64][2], eb [64][2];
  int eslot [64], et [64];
  int nin = 0, nout = 0;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference pipeline: outputs are due two cycles after the inputs
  tag_t tq1, tq2;
  int iq1, iq2;
  always @(posedge clk) begin
    if (!rst && tag_o.valid) begin
      automatic int k = nout;
      automatic int s = eslot[k];
      automatic u64 w = powmod(ws[s], (et[k] % H) * (N / (2 * H)), qs[s]);
      for (int p = 0; p < 2; p++) begin
        checks += 2;
        if (x_o[p] != S'((ea[k][p] + eb[k][p]) % qs[s])) failures++;
        if (y_o[p] != S'(mulmod((ea[k][p] + qs[s] - eb[k][p]) % qs[s], w, qs[s]))) failures++;
      end
      checks++;
      if (!(tq2.valid && tag_o.slot == tq2.slot && tag_o.sop == tq2.sop)) failures++;
      nout++;
    end
    tq2 <= tq1; tq1 <= tag_i;
  end

  initial begin
    tw_we = 0; tw_slot = '0; tw_exp = '0; tw_data = '0; tag_i = '0;
    a_i = '{default: '0}; b_i = '{default: '0};
    for (int s = 0; s < 2; s++) begin
      qs[s] = find_prime(S, N, s);
      ws[s] = powmod(find_psi(qs[s], N), 2, qs[s]);
    end
    for (int g = 0; g < G; g++) begin q_tab[g] = S'(qs[g % 2]); mu_tab[g] = (S+1)'(barrett_mu(qs[g % 2], S)); end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int s = 0; s < 2; s++)
      for (int e = 0; e < N / 2; e++) begin
        @(negedge clk);
        tw_we = 1; tw_slot = SLOT_W'(s); tw_exp = (LOGN-1)'(e); tw_data = S'(powmod(ws[s], e, qs[s]));
      end
    @(negedge clk) tw_we = 0;
    for (int f = 0; f < 4; f++)
      for (int t = 0; t < FL; t++) begin
        @(negedge clk);
        eslot[nin] = f % 2; et[nin] = t;
        for (int p = 0; p < 2; p++) begin
          ea[nin][p] = $urandom % qs[f % 2]; eb[nin][p] = $urandom % qs[f % 2];
          a_i[p] = S'(ea[nin][p]); b_i[p] = S'(eb[nin][p]);
        end
        tag_i = '{valid: 1'b1, sop: (t == 0), eop: (t == FL - 1), slot: SLOT_W'(f % 2)};
        nin++;
      end
    @(negedge clk) tag_i = '0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != nin) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
