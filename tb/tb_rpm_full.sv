// tb_rpm_full: one complete run of the Residue Polynomial Multiplier at its default
// size (n = 2^14, 30-bit primes, G = 4 slots), with no parameter overridden.
// Two slots are loaded with the fields of two primes q = 1 mod 2n (the second with
// paired twiddle writes); three polynomial
// products then stream through back to back (slots 0, 1, 0), so the field changes
// between frames. For each frame, 64 output beats (128 coefficients) are compared
// with a naive negacyclic product; latency 3 + 2*(2*log2(n) + n/2 - 1) cycles and
// one product per n/2 cycles are checked, as are the frame flags and slot tags.
module tb_rpm_full;
  import rpm_pkg::*;
  import rpm_tb_pkg::*;

  localparam int unsigned N = 16384, S = 30, G = 4, LOGN = 14, H2 = N / 2;
  localparam int unsigned LATENCY = 3 + 2 * (2 * LOGN + N / 2 - 1);
  localparam int unsigned NF = 3;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_sop, prog_valid;
  logic [SLOT_W-1:0] in_slot, prog_slot, out_slot;
  logic [S-1:0] in_a [2], in_b [2], out_c [2];
  prog_sel_e prog_sel;
  logic [LOGN-2:0] prog_addr;
  logic [S:0] prog_data;
  logic out_valid, out_sop, out_eop, prog_conflict;
  logic [G-1:0] slot_busy;

  rpm dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  u64 slot_q [G];
  u64 fa [NF][N], fb [NF][N];
  int unsigned fslot [NF];
  int unsigned in_start [NF];
  int unsigned out_start [NF];
  bit skip_data [NF];
  int n_paired = 0;
  int n_switch = 0, n_b2b = 0, n_gap = 0, n_reload_busy = 0, n_multi_busy = 0, n_conflict = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 400) $display("FAIL %s", what);
    end
  endtask

  function automatic u64 negacyclic(int unsigned f, int unsigned k, u64 q);
    u64 acc = 0;
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned j = (k + N - i) % N;
      u64 p = mulmod(fa[f][i], fb[f][j], q);
      if (i <= k) acc = (acc + p) % q;
      else        acc = (acc + q - p) % q;
    end
    return acc;
  endfunction

  task automatic prog(input prog_sel_e sel, input int unsigned slot, input int unsigned addr, input u64 data);
    @(negedge clk);
    prog_valid = 1; prog_sel = sel; prog_slot = SLOT_W'(slot);
    prog_addr = (LOGN-1)'(addr); prog_data = (S+1)'(data);
  endtask

  task automatic prog_end();
    @(negedge clk);
    prog_valid = 0;
  endtask

  // Load one slot with the field of prime q, one word per cycle: the eight constants,
  // then either n/2 forward and n/2 inverse twiddles, or (paired) n/2 twiddle writes
  // from which the inverse set is derived.
  task automatic load_slot(input int unsigned slot, input u64 q);
    bit paired = (slot == 1);
    u64 psi = find_psi(q, N);
    u64 w = mulmod(psi, psi, q), wi = invmod(w, q), ipsi = invmod(psi, q);
    u64 ninv = invmod(N, q);
    prog(PROG_CONST, slot, C_Q, q);
    prog(PROG_CONST, slot, C_MU, barrett_mu(q, S));
    prog(PROG_CONST, slot, C_PRE0, 1);
    prog(PROG_CONST, slot, C_PRE1, powmod(psi, H2, q));
    prog(PROG_CONST, slot, C_PRESTEP, psi);
    prog(PROG_CONST, slot, C_POST0, ninv);
    prog(PROG_CONST, slot, C_POST1, mulmod(ninv, powmod(ipsi, H2, q), q));
    prog(PROG_CONST, slot, C_POSTSTEP, ipsi);
    if (paired) begin
      // one write per exponent fills both sets
      for (int unsigned e = 0; e < H2; e++) prog(PROG_TW, slot, e, powmod(w, e, q));
      n_paired++;
    end else begin
      for (int unsigned e = 0; e < H2; e++) prog(PROG_FWD_TW, slot, e, powmod(w, e, q));
      for (int unsigned e = 0; e < H2; e++) prog(PROG_INV_TW, slot, e, powmod(wi, e, q));
    end
    prog_end();
    slot_q[slot] = q;
  endtask

  task automatic send_frame(input int unsigned f);
    for (int unsigned t = 0; t < H2; t++) begin
      @(negedge clk);
      in_valid = 1; in_sop = (t == 0); in_slot = SLOT_W'(fslot[f]);
      in_a[0] = S'(fa[f][t]); in_a[1] = S'(fa[f][t + H2]);
      in_b[0] = S'(fb[f][t]); in_b[1] = S'(fb[f][t + H2]);
    end
  endtask

  task automatic idle(input int unsigned cycles);
    @(negedge clk);
    in_valid = 0; in_sop = 0;
    repeat (cycles) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input and output monitors
  int unsigned in_frame = 0, out_frame = 0, out_beat = 0;
  always @(posedge clk) if (!rst) begin
    int unsigned nb = 0;
    for (int g = 0; g < G; g++) nb += slot_busy[g];
    if (nb >= 2) n_multi_busy++;
    if (prog_valid && slot_busy != '0 && !slot_busy[prog_slot]) n_reload_busy++;
    if (in_valid && in_sop) begin
      in_start[in_frame] = cyc;
      if (in_frame > 0) begin
        if (fslot[in_frame] != fslot[in_frame - 1]) n_switch++;
        if (cyc == in_start[in_frame - 1] + H2) n_b2b++;
        else n_gap++;
      end
      in_frame++;
    end
    if (out_valid) begin
      automatic int unsigned f = out_frame, t = out_beat;
      automatic u64 q = slot_q[fslot[f]];
      if (t == 0) begin
        out_start[f] = cyc;
        check(out_sop, "out_sop");
        check(cyc - in_start[f] == LATENCY, $sformatf("latency %0d", cyc - in_start[f]));
        if (f > 0 && in_start[f] == in_start[f - 1] + H2)
          check(cyc - out_start[f - 1] == H2, "one product per n/2 cycles");
      end
      check(out_eop == (t == H2 - 1), "out_eop");
      check(out_slot == SLOT_W'(fslot[f]), "out_slot");
      if (t < 32 || t >= H2 - 32) begin
        check(out_c[0] == S'(negacyclic(f, t, q)),
              $sformatf("frame %0d c[%0d] got %0d exp %0d", f, t, out_c[0], negacyclic(f, t, q)));
        check(out_c[1] == S'(negacyclic(f, t + H2, q)), $sformatf("frame %0d c[%0d]", f, t + H2));
      end
      if (t == H2 - 1) begin out_frame++; out_beat = 0; end else out_beat++;
    end
  end

  initial begin
    u64 primes [G];
    in_valid = 0; in_sop = 0; in_slot = '0; prog_valid = 0; prog_sel = PROG_FWD_TW;
    prog_slot = '0; prog_addr = '0; prog_data = '0;
    in_a = '{default: '0}; in_b = '{default: '0};
    for (int g = 0; g < 2; g++) primes[g] = find_prime(S, N, g);
    // frames: slot sequence and data
    fslot = '{0, 1, 0};
    for (int f = 0; f < NF; f++) begin
      skip_data[f] = 0;
      for (int i = 0; i < N; i++) begin
        fa[f][i] = $urandom % primes[fslot[f]];
        fb[f][i] = $urandom % primes[fslot[f]];
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int g = 0; g < 2; g++) load_slot(g, primes[g]);
    check(!prog_conflict, "no conflict after loading idle slots");
    for (int f = 0; f < NF; f++) send_frame(f);
    idle(0);
    wait (out_frame == NF);
    repeat (3) @(posedge clk);
    check(slot_busy == '0, "all slots idle at the end");
    check(!prog_conflict, "no conflict flag");
    $display("field switches %0d, back-to-back frames %0d", n_switch, n_b2b);
    check(n_switch > 0, "field switch happened");
    check(n_b2b > 0, "back-to-back frames happened");
    check(n_paired > 0, "paired twiddle load happened");
    check(out_frame == NF, "all frames out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
