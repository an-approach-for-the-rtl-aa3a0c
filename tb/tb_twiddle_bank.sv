// tb_twiddle_bank: a bank of span H = 4 in an n = 32 transform (exponents e < 16,
// step 4) is programmed with all 16 exponents of four slots, values encoding
// (slot, exponent). Each entry j of each slot must read back the word of exponent
// 4j one cycle after the read address, i.e. only exponents that are multiples of the
// step are kept and none of the others overwrites them. Slot 2 is then rewritten
// while slot 1 is read, and both must read correctly.
module tb_twiddle_bank;
  import rpm_pkg::*;
  localparam int unsigned S = 30, G = 4, LOGN = 5, H = 4, STEP = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [SLOT_W-1:0] wslot, rslot;
  logic [LOGN-2:0] wexp, rj;
  logic [S-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  twiddle_bank #(.S(S), .G(G), .LOGN(LOGN), .H(H)) dut (.*);

  function automatic logic [S-1:0] val(int g, int e, int gen);
    return S'((gen << 16) | (g << 8) | e);
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int g, int j, int gen);
    @(negedge clk);
    rslot = SLOT_W'(g); rj = (LOGN-1)'(j);
    @(posedge clk);
    #1;
    checks++;
    if (rdata != val(g, j * STEP, gen)) begin
      failures++;
      $display("FAIL slot %0d j %0d got %h", g, j, rdata);
    end
  endtask

  initial begin
    we = 0; wslot = '0; wexp = '0; wdata = '0; rslot = '0; rj = '0;
    for (int g = 0; g < G; g++)
      for (int e = 0; e < 16; e++) begin
        @(negedge clk);
        we = 1; wslot = SLOT_W'(g); wexp = (LOGN-1)'(e); wdata = val(g, e, 0);
      end
    @(negedge clk) we = 0;
    for (int g = 0; g < G; g++)
      for (int j = 0; j < H; j++) chk(g, j, 0);
    // rewrite slot 2 while reading slot 1
    for (int e = 0; e < 16; e++) begin
      @(negedge clk);
      we = 1; wslot = 2; wexp = (LOGN-1)'(e); wdata = val(2, e, 1);
      rslot = 1; rj = (LOGN-1)'(e % H);
      @(posedge clk);
      #1;
      checks++;
      if (rdata != val(1, (e % H) * STEP, 0)) failures++;
    end
    @(negedge clk) we = 0;
    for (int j = 0; j < H; j++) chk(2, j, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
