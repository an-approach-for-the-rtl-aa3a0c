// tb_field_table: after reset every constant reads zero; then each of the eight
// constants of each of four slots is written with a distinct value and all outputs
// are compared; a write to a slot beyond G must change nothing.
module tb_field_table;
  import rpm_pkg::*;
  localparam int unsigned S = 30, G = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic we;
  logic [SLOT_W-1:0] wslot;
  const_e widx;
  logic [S:0] wdata;
  logic [S-1:0] q [G], pre0 [G], pre1 [G], prestep [G], post0 [G], post1 [G], poststep [G];
  logic [S:0] mu [G];
  int checks = 0, failures = 0;

  field_table #(.S(S), .G(G)) dut (.*);

  function automatic logic [S:0] val(int g, int c);
    return (S+1)'(32'h4000_0000 | (g << 12) | (c << 4) | 5);
  endfunction

  task automatic check_all(input bit zero);
    for (int g = 0; g < G; g++) begin
      logic [S:0] got [8];
      got = '{{1'b0, q[g]}, mu[g], {1'b0, pre0[g]}, {1'b0, pre1[g]}, {1'b0, prestep[g]},
              {1'b0, post0[g]}, {1'b0, post1[g]}, {1'b0, poststep[g]}};
      for (int c = 0; c < 8; c++) begin
        automatic logic [S:0] e = zero ? '0 : val(g, c);
        if (c != int'(C_MU)) e[S] = 1'b0;
        checks++;
        if (got[c] != e) begin
          failures++;
          $display("FAIL slot %0d const %0d got %h exp %h", g, c, got[c], e);
        end
      end
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wslot = '0; widx = C_Q; wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check_all(1);
    for (int g = 0; g < G; g++)
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        we = 1; wslot = SLOT_W'(g); widx = const_e'(c); wdata = val(g, c);
      end
    @(negedge clk);
    we = 1; wslot = SLOT_W'(G); widx = C_Q; wdata = '0;   // out of range
    @(negedge clk) we = 0;
    check_all(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
