// tb_rpm_rns: the polynomial products of one RNS-represented operand pair at the
// default size, n = 2^14, with k + k' = 30 residues of 30 bits, the size of the
// multiplicative-depth-20 parameter set (log2 q = 432 split into 30-bit primes).
// The 30 residue products are streamed in order; the G = 4 slots are used in
// rotation, and each slot is reloaded with the next prime as soon as the frame that
// used it has left, while the other slots' frames are in flight. The residues of a
// random big-integer polynomial modulo distinct primes are independent and uniform,
// so each residue is drawn at random. For each product, 64 output beats (128
// coefficients) are compared with a naive negacyclic product modulo its prime.
// Reported: the cycles used for all 30 products and the slot reloads overlapped with
// traffic; checked: latency, slot tags, that no reload hit a busy slot, and that the
// 30 products take at most 1 % more than 30 n/2 cycles plus the latency. Slots are
// loaded with paired twiddle writes (n/2 + 8 cycles per field).
module tb_rpm_rns;
  import rpm_pkg::*;
  import rpm_tb_pkg::*;

  localparam int unsigned N = 16384, S = 30, G = 4, LOGN = 14, H2 = N / 2;
  localparam int unsigned LATENCY = 3 + 2 * (2 * LOGN + N / 2 - 1);
  localparam int unsigned NF = 30;

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
  u64 fq [NF];
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
    bit paired = (1);
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
    repeat (1200000) @(posedge clk);
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
      automatic u64 q = fq[f];
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

  int unsigned loaded = 0;     // frames whose field is loaded in its slot
  int unsigned first_in = 0;
  initial begin
    in_valid = 0; in_sop = 0; in_slot = '0; prog_valid = 0; prog_sel = PROG_FWD_TW;
    prog_slot = '0; prog_addr = '0; prog_data = '0;
    in_a = '{default: '0}; in_b = '{default: '0};
    for (int f = 0; f < NF; f++) begin
      fq[f] = find_prime(S, N, f);
      fslot[f] = f % G;
      skip_data[f] = 0;
      for (int i = 0; i < N; i++) begin
        fa[f][i] = $urandom % fq[f];
        fb[f][i] = $urandom % fq[f];
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int g = 0; g < G; g++) begin load_slot(g, fq[g]); loaded++; end
    first_in = cyc;
    fork
      begin : sender
        for (int f = 0; f < NF; f++) begin
          if (loaded <= f) begin
            idle(0);
            wait (loaded > f);
          end
          send_frame(f);
        end
        idle(0);
      end
      begin : loader
        for (int f = G; f < NF; f++) begin
          wait (out_frame > f - G);       // the slot's previous frame has left
          load_slot(fslot[f], fq[f]);
          loaded++;
        end
      end
    join
    wait (out_frame == NF);
    $display("30 residue products in %0d cycles from the first frame, %0d cycles of reload overlapped with traffic",
             cyc - first_in, n_reload_busy);
    repeat (3) @(posedge clk);
    check(slot_busy == '0, "all slots idle at the end");
    check(!prog_conflict, "no reload into a busy slot");
    check(n_switch > 0, "field switch happened");
    check(n_reload_busy > 0, "slot reload during traffic happened");
    // paired loads take n/2 + 8 cycles, so the stream stays close to one product per
    // n/2 cycles: allow 1 % over the ideal
    check(cyc - first_in <= NF * H2 * 101 / 100 + LATENCY, "sustained rate with reloads");
    check(out_frame == NF, "all frames out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
