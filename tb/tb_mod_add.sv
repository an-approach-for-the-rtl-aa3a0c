// tb_mod_add: checks mod_add against (a + b) mod q computed on 64-bit integers, for
// random operands and the edge values 0, 1 and q-1, with several 30-bit primes.
module tb_mod_add;
  import rpm_tb_pkg::*;
  localparam int unsigned S = 30;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [S-1:0] a, b, q, r;
  int checks = 0, failures = 0;

  mod_add #(.S(S)) dut (.a, .b, .q, .r);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64 qq, aa, bb;
    for (int p = 0; p < 4; p++) begin
      qq = find_prime(S, 16384, p);
      for (int i = 0; i < 2000; i++) begin
        case (i)
          0: begin aa = 0; bb = 0; end
          1: begin aa = qq - 1; bb = qq - 1; end
          2: begin aa = 0; bb = qq - 1; end
          3: begin aa = qq - 1; bb = 0; end
          4: begin aa = 1; bb = qq - 1; end
          5: begin aa = qq - 1; bb = 1; end
          default: begin aa = $urandom % qq; bb = $urandom % qq; end
        endcase
        @(negedge clk);
        a = S'(aa); b = S'(bb); q = S'(qq);
        @(posedge clk);
        checks++;
        if (r != S'((aa + bb) % qq)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d q=%0d r=%0d", aa, bb, qq, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
