// tb_rpm_primes: runs the Residue Polynomial Multiplier at n = 2^14 with the wider
// RNS primes of the prime-size projection, 41, 51, 58 and 62 bits (fewer residues
// per ciphertext), each in its own harness (rpm_prime_check): two fields, three
// products, 128 checked coefficients per product, latency and rate checked.
module tb_rpm_primes;
  int c [4], f [4];
  bit d [4];
  int checks, failures;

  rpm_prime_check #(.S(41)) u_s41 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  rpm_prime_check #(.S(51)) u_s51 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  rpm_prime_check #(.S(58)) u_s58 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  rpm_prime_check #(.S(62)) u_s62 (.checks(c[3]), .failures(f[3]), .done(d[3]));

  task automatic report(input int extra);
    checks = 0; failures = extra;
    for (int i = 0; i < 4; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin : watchdog
    #2ms;
    report(1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    report(0);
    $finish;
  end
endmodule
