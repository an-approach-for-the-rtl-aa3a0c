// tb_stream_commutator: drives the commutator (D = 4) with frames whose words encode
// (frame, beat, lane), and checks that output beat u of each frame carries, for
// u mod 2D < D, lane 0 of input beats (u, u+D) of the same 2D block, and otherwise
// lane 1 of input beats (u-D, u); that the tag arrives D cycles later; and that this
// holds for back-to-back frames and after a gap.
module tb_stream_commutator;
  import rpm_pkg::*;
  localparam int unsigned W = 16, D = 4, FL = 16;   // frame length: 16 beats
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [W-1:0] i0, i1, o0, o1;
  tag_t tag_i, tag_o;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  stream_commutator #(.W(W), .D(D)) dut (.clk, .rst, .i0, .i1, .tag_i, .o0, .o1, .tag_o);

  function automatic logic [W-1:0] word(int f, int t, int l);
    return W'((f << 8) | (t << 1) | l);
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int in_sop_cyc [8];
  int nin = 0, of = 0, ob = 0;
  always @(posedge clk) if (!rst) begin
    if (tag_i.valid && tag_i.sop) begin in_sop_cyc[nin] = cyc; nin++; end
    if (tag_o.valid) begin
      automatic int u = ob, blk = ob / (2 * D), j = ob % D;
      automatic logic [W-1:0] e0, e1;
      if (u % (2 * D) < D) begin
        e0 = word(of, blk * 2 * D + j, 0);     e1 = word(of, blk * 2 * D + j + D, 0);
      end else begin
        e0 = word(of, blk * 2 * D + j, 1);     e1 = word(of, blk * 2 * D + j + D, 1);
      end
      checks++;
      if (o0 != e0 || o1 != e1) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d beat %0d got %h %h exp %h %h", of, u, o0, o1, e0, e1);
      end
      if (u == 0) begin
        checks++;
        if (!(tag_o.sop && cyc - in_sop_cyc[of] == D)) failures++;
      end
      if (ob == FL - 1) begin ob = 0; of++; end else ob++;
    end
  end

  task automatic send(int f);
    for (int t = 0; t < FL; t++) begin
      @(negedge clk);
      tag_i = '{valid: 1'b1, sop: (t == 0), eop: (t == FL - 1), slot: '0};
      i0 = word(f, t, 0); i1 = word(f, t, 1);
    end
  endtask

  initial begin
    tag_i = '0; i0 = '0; i1 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    send(0); send(1); send(2);
    @(negedge clk) tag_i = '0;
    repeat (5) @(negedge clk);
    send(3); send(4);
    @(negedge clk) tag_i = '0;
    repeat (20) @(posedge clk);
    checks++;
    if (of != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
