// tb_rpm_sizes: runs the Residue Polynomial Multiplier at the other polynomial
// degrees of the evaluated parameter sets, n = 2^11, 2^12, 2^13 and 2^15 (30-bit
// primes, G = 4), each in its own harness (rpm_size_check): two fields, three
// products, 128 checked coefficients per product, latency and rate checked.
module tb_rpm_sizes;
  int c [4], f [4];
  bit d [4];
  int checks, failures;

  rpm_size_check #(.N(2048))  u_n11 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  rpm_size_check #(.N(4096))  u_n12 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  rpm_size_check #(.N(8192))  u_n13 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  rpm_size_check #(.N(32768)) u_n15 (.checks(c[3]), .failures(f[3]), .done(d[3]));

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
