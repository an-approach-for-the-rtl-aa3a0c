// tb_ntt_butterfly: checks both butterfly forms against 64-bit reference arithmetic:
// the forward form gives (a+b, (a-b)w), the inverse form (a+bw, a-bw), all mod q,
// for random operands and twiddles with several 30-bit primes.
module tb_ntt_butterfly;
  import rpm_tb_pkg::*;
  localparam int unsigned S = 30;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [S-1:0] a, b, w, q, gx, gy, cx, cy;
  logic [S:0]   mu;
  int checks = 0, failures = 0;

  ntt_butterfly #(.S(S), .DIT(1'b0)) dut_gs (.a, .b, .w, .q, .mu, .x(gx), .y(gy));
  ntt_butterfly #(.S(S), .DIT(1'b1)) dut_ct (.a, .b, .w, .q, .mu, .x(cx), .y(cy));

  task automatic check(input bit ok);
    checks++;
    if (!ok) failures++;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64 qq, aa, bb, ww, t;
    for (int p = 0; p < 3; p++) begin
      qq = find_prime(S, 1024, p);
      for (int i = 0; i < 1000; i++) begin
        aa = $urandom % qq; bb = $urandom % qq; ww = $urandom % qq;
        @(negedge clk);
        a = S'(aa); b = S'(bb); w = S'(ww); q = S'(qq); mu = (S+1)'(barrett_mu(qq, S));
        @(posedge clk);
        t = mulmod(bb, ww, qq);
        check(gx == S'((aa + bb) % qq));
        check(gy == S'(mulmod((aa + qq - bb) % qq, ww, qq)));
        check(cx == S'((aa + t) % qq));
        check(cy == S'((aa + qq - t) % qq));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
