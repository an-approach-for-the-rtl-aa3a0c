// tb_ntt_stream: checks the streaming NTT at n = 32 against a naive transform.
// A forward instance (two polynomials in lockstep) and an inverse instance are fed
// frames of random coefficients for three different primes held in three slots,
// back to back and with a gap, switching field between frames. Each output beat is
// compared with X[k] = sum x[i] w^(ik) in the documented beat order, and with the
// unscaled inverse transform; the latency 2*log2(n) + n/2 - 1 and the n/2-cycle
// frame rate are checked.
module tb_ntt_stream;
  import rpm_pkg::*;
  import rpm_tb_pkg::*;

  localparam int unsigned N = 32, S = 30, G = 4, LOGN = 5, H2 = N / 2;
  localparam int unsigned LAT = 2 * LOGN + N / 2 - 1;
  localparam int unsigned NF = 6;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [S-1:0] q_tab [G];
  logic [S:0]   mu_tab [G];
  logic         fw_we, iv_we;
  logic [SLOT_W-1:0] tw_slot;
  logic [LOGN-2:0]   tw_exp;
  logic [S-1:0]      tw_data;
  logic [S-1:0] f_l0 [2], f_l1 [2], f_o0 [2], f_o1 [2];
  logic [S-1:0] i_l0 [1], i_l1 [1], i_o0 [1], i_o1 [1];
  tag_t tag_in, f_tag, i_tag;

  ntt_stream #(.N(N), .S(S), .G(G), .DIT(1'b0), .NPOLY(2)) dut_f (
    .clk, .rst, .q_tab, .mu_tab, .tw_we(fw_we), .tw_slot, .tw_exp, .tw_data,
    .l0_i(f_l0), .l1_i(f_l1), .tag_i(tag_in), .l0_o(f_o0), .l1_o(f_o1), .tag_o(f_tag));
  ntt_stream #(.N(N), .S(S), .G(G), .DIT(1'b1), .NPOLY(1)) dut_i (
    .clk, .rst, .q_tab, .mu_tab, .tw_we(iv_we), .tw_slot, .tw_exp, .tw_data,
    .l0_i(i_l0), .l1_i(i_l1), .tag_i(tag_in), .l0_o(i_o0), .l1_o(i_o1), .tag_o(i_tag));

  int checks = 0, failures = 0;
  u64 qs [3], ws [3];
  u64 xa [NF][N], xb [NF][N], xi [NF][N];
  int unsigned fslot [NF];
  int unsigned in_start [NF];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // forward reference X[k] of poly x with root w
  function automatic u64 fwd_ref(ref u64 x [N], input int unsigned k, input u64 w, input u64 q);
    u64 acc = 0;
    for (int unsigned i = 0; i < N; i++) acc = (acc + mulmod(x[i], powmod(w, i * k, q), q)) % q;
    return acc;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checking
  int unsigned fo_frame = 0, fo_beat = 0, io_frame = 0, io_beat = 0;
  int unsigned last_fo_sop = 0;
  int unsigned in_frame = 0;
  always @(posedge clk) begin
    if (!rst && tag_in.valid && tag_in.sop) begin
      in_start[in_frame] = cyc;
      in_frame++;
    end
    if (!rst && f_tag.valid) begin
      automatic int unsigned f = fo_frame, t = fo_beat;
      automatic int unsigned s = fslot[f];
      if (t == 0) begin
        check(f_tag.sop, $sformatf("fwd sop cyc %0d f %0d", cyc, f));
        check(cyc - in_start[f] == LAT, $sformatf("fwd latency %0d f %0d", cyc - in_start[f], f));
      end
      check(f_tag.slot == SLOT_W'(s + 1), $sformatf("fwd slot cyc %0d f %0d t %0d slot %0d", cyc, f, t, f_tag.slot));
      check(f_tag.eop == (t == H2 - 1), "fwd eop");
      check(f_o0[0] == S'(fwd_ref(xa[f], bitrev(2*t, LOGN), ws[s], qs[s])), $sformatf("fwd a f%0d t%0d l0 got %0d exp %0d", f, t, f_o0[0], fwd_ref(xa[f], bitrev(2*t, LOGN), ws[s], qs[s])));
      check(f_o1[0] == S'(fwd_ref(xa[f], bitrev(2*t+1, LOGN), ws[s], qs[s])), $sformatf("fwd a f%0d t%0d l1", f, t));
      check(f_o0[1] == S'(fwd_ref(xb[f], bitrev(2*t, LOGN), ws[s], qs[s])), "fwd b l0");
      check(f_o1[1] == S'(fwd_ref(xb[f], bitrev(2*t+1, LOGN), ws[s], qs[s])), "fwd b l1");
      if (t == H2 - 1) begin fo_frame++; fo_beat = 0; end else fo_beat++;
    end
    if (!rst && i_tag.valid) begin
      automatic int unsigned f = io_frame, t = io_beat;
      automatic int unsigned s = fslot[f];
      automatic u64 winv = invmod(ws[s], qs[s]);
      automatic u64 e0 = 0, e1 = 0;
      // input of the inverse: position p holds xi[bitrev(p)], i.e. Y[k] = xi[k]
      for (int unsigned k = 0; k < N; k++) begin
        e0 = (e0 + mulmod(xi[f][k], powmod(winv, t * k, qs[s]), qs[s])) % qs[s];
        e1 = (e1 + mulmod(xi[f][k], powmod(winv, (t + H2) * k, qs[s]), qs[s])) % qs[s];
      end
      if (t == 0) check(cyc - in_start[f] == LAT, "inv latency");
      check(i_o0[0] == S'(e0), $sformatf("inv f%0d t%0d l0", f, t));
      check(i_o1[0] == S'(e1), $sformatf("inv f%0d t%0d l1", f, t));
      if (t == H2 - 1) begin io_frame++; io_beat = 0; end else io_beat++;
    end
  end

  initial begin
    tag_in = '0; fw_we = 0; iv_we = 0; tw_slot = '0; tw_exp = '0; tw_data = '0;
    foreach (f_l0[p]) begin f_l0[p] = '0; f_l1[p] = '0; end
    i_l0[0] = '0; i_l1[0] = '0;
    for (int g = 0; g < G; g++) begin q_tab[g] = '0; mu_tab[g] = '0; end
    for (int s = 0; s < 3; s++) begin
      qs[s] = find_prime(S, N, s);
      ws[s] = powmod(find_psi(qs[s], N), 2, qs[s]);
      q_tab[s + 1]  = S'(qs[s]);          // slots 1..3
      mu_tab[s + 1] = (S+1)'(barrett_mu(qs[s], S));
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    // program the twiddle sets of slots 1..3
    for (int s = 0; s < 3; s++)
      for (int e = 0; e < H2; e++) begin
        @(posedge clk);
        fw_we <= 1; iv_we <= 0; tw_slot <= SLOT_W'(s + 1); tw_exp <= (LOGN-1)'(e);
        tw_data <= S'(powmod(ws[s], e, qs[s]));
        // the inverse set is programmed on the next cycle
        @(posedge clk);
        fw_we <= 0; iv_we <= 1;
        tw_data <= S'(powmod(invmod(ws[s], qs[s]), e, qs[s]));
      end
    @(posedge clk);
    fw_we <= 0; iv_we <= 0;
    // frames
    for (int f = 0; f < NF; f++) begin
      fslot[f] = f % 3;
      for (int i = 0; i < N; i++) begin
        xa[f][i] = $urandom % qs[fslot[f]];
        xb[f][i] = $urandom % qs[fslot[f]];
        xi[f][i] = $urandom % qs[fslot[f]];
      end
    end
    for (int f = 0; f < NF; f++) begin
      if (f == 3) begin
        repeat (7) begin @(posedge clk); tag_in <= '0; end   // a gap
      end
      for (int t = 0; t < H2; t++) begin
        @(posedge clk);
        tag_in.valid <= 1; tag_in.sop <= (t == 0); tag_in.eop <= (t == H2 - 1);
        tag_in.slot  <= SLOT_W'(fslot[f] + 1);
        f_l0[0] <= S'(xa[f][t]); f_l1[0] <= S'(xa[f][t + H2]);
        f_l0[1] <= S'(xb[f][t]); f_l1[1] <= S'(xb[f][t + H2]);
        i_l0[0] <= S'(xi[f][bitrev(2*t, LOGN)]); i_l1[0] <= S'(xi[f][bitrev(2*t+1, LOGN)]);
      end
    end
    @(posedge clk); tag_in <= '0;
    repeat (LAT + 10) @(posedge clk);
    check(fo_frame == NF, $sformatf("forward frames out %0d", fo_frame));
    check(io_frame == NF, $sformatf("inverse frames out %0d", io_frame));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
