// addr_gen_tb: checks the schedule controller against the printed schedules.
//
// Three controllers run the same way: start, then advance every cycle. The
// datapoint pairs they produce must be the consecutive pairs of the printed
// schedules for 8 points / group 4 and 32 points / group 8 (with one and with
// four butterflies for the latter); within a pair the upper input must be the
// one with bit s clear and the partner must be 2^s away; the twiddle
// exponent must be (top mod 2^s) * 2^(S-1-s). `valid` must stay high for
// exactly S*D/(2B) operations, with `last` on the final one. A fourth,
// 64-point controller is started at length 8 and must produce the 8-point
// schedule, with twiddle exponents in 64-point units. A fifth, radix-4
// controller (16 points, group 8) must give each operation four datapoints
// that differ only in bits s+1 and s, sit in four different banks, share no
// bank with the previous operation, cover every datapoint once per stage,
// and carry the three twiddle exponents of its two radix-2 layers.
module addr_gen_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, adv = 0;
  always #5 clk = ~clk;

  logic       v8, l8;   logic [1:0] st8;  logic [1:0] op8;  logic [2:0] d8 [2];  logic [1:0] w8 [1][1];
  logic       v32, l32; logic [2:0] st32; logic [3:0] op32; logic [4:0] d32 [2]; logic [3:0] w32 [1][1];
  logic       vv, lv;   logic [2:0] stv;  logic [4:0] opv;  logic [5:0] dv [2];  logic [4:0] wv [1][1];
  logic       v4, l4;   logic [2:0] st4;  logic [1:0] op4;  logic [4:0] d4 [8];  logic [3:0] w4 [4][1];
  logic       vq, lq;   logic [1:0] stq;  logic [1:0] opq;  logic [3:0] dq [4];  logic [2:0] wq [1][3];

  addr_gen #(.D(8),  .B(1), .G(4)) u8  (.clk, .rst_n, .start, .len(2'd3), .advance(adv), .valid(v8),  .last(l8),  .stage(st8),  .op(op8),  .dp(d8), .tw(w8));
  addr_gen #(.D(32), .B(1), .G(8)) u32 (.clk, .rst_n, .start, .len(3'd5), .advance(adv), .valid(v32), .last(l32), .stage(st32), .op(op32), .dp(d32), .tw(w32));
  addr_gen #(.D(32), .B(4), .G(8)) u4  (.clk, .rst_n, .start, .len(3'd5), .advance(adv), .valid(v4),  .last(l4),  .stage(st4),  .op(op4),  .dp(d4), .tw(w4));

  addr_gen #(.D(16), .B(1), .G(8), .R(4)) uq (.clk, .rst_n, .start, .len(3'd4), .advance(adv), .valid(vq), .last(lq), .stage(stq), .op(opq), .dp(dq), .tw(wq));
  addr_gen #(.D(64), .B(1), .G(4)) uv  (.clk, .rst_n, .start, .len(3'd3), .advance(adv), .valid(vv), .last(lv), .stage(stv), .op(opv), .dp(dv), .tw(wv));

  int sched8 [3][8] = '{
    '{0, 1, 2, 3, 5, 4, 7, 6},
    '{0, 2, 4, 6, 5, 7, 1, 3},
    '{0, 4, 2, 6, 5, 1, 7, 3}};
  int sched32 [5][32] = '{
    '{0, 1, 2, 3, 4, 5, 6, 7, 9, 8, 11, 10, 13, 12, 15, 14, 18, 19, 16, 17, 22, 23, 20, 21, 27, 26, 25, 24, 31, 30, 29, 28},
    '{0, 2, 4, 6, 8, 10, 12, 14, 18, 16, 22, 20, 26, 24, 30, 28, 9, 11, 13, 15, 1, 3, 5, 7, 27, 25, 31, 29, 19, 17, 23, 21},
    '{0, 4, 8, 12, 16, 20, 24, 28, 9, 13, 1, 5, 25, 29, 17, 21, 18, 22, 26, 30, 2, 6, 10, 14, 27, 31, 19, 23, 11, 15, 3, 7},
    '{0, 8, 16, 24, 4, 12, 20, 28, 9, 1, 25, 17, 13, 5, 29, 21, 18, 26, 2, 10, 22, 30, 6, 14, 27, 19, 11, 3, 31, 23, 15, 7},
    '{0, 16, 4, 20, 8, 24, 12, 28, 9, 25, 13, 29, 1, 17, 5, 21, 18, 2, 22, 6, 26, 10, 30, 14, 27, 11, 31, 15, 19, 3, 23, 7}};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // One butterfly: pair (p0,p1) of the table at stage s, S bits.
  task automatic check_bf(string name, int s, int sn, int top, int bot, int tw, int p0, int p1);
    int lo, hi;
    lo = ((p0 >> s) & 1) ? p1 : p0;
    hi = ((p0 >> s) & 1) ? p0 : p1;
    check(top == lo && bot == hi,
          $sformatf("%s stage %0d: got (%0d,%0d), schedule pair (%0d,%0d)", name, s, top, bot, p0, p1));
    check(bot - top == (1 << s), $sformatf("%s stage %0d: stride", name, s));
    check(tw == ((top & ((1 << s) - 1)) << (sn - 1 - s)), $sformatf("%s stage %0d: twiddle %0d", name, s, tw));
  endtask

  function automatic int bank16(int d);   // bank of a 16-point address, G = 8
    return ((d & 1) ^ ((d >> 3) & 1)) | (((d >> 1) & 1) << 1) | (((d >> 2) & 1) << 2);
  endfunction

  // Radix-4 operation: four distinct banks, bits (s+1,s) of dp[v] equal v,
  // all other bits shared, three twiddles, and no bank shared with the
  // previous operation of the same stage (overlapped pipeline).
  int prevq [4];
  bit seenq [16];
  task automatic check_r4(int s, int opn);
    int a, used;
    used = 0;
    a = int'(dq[0]) & ((1 << s) - 1);
    for (int v = 0; v < 4; v++) begin
      check(((int'(dq[v]) >> s) & 3) == v && (int'(dq[v]) & ~(3 << s)) == (int'(dq[0]) & ~(3 << s)),
            $sformatf("R=4 stage %0d: dp[%0d]=%0d", s, v, dq[v]));
      check(!(used >> bank16(int'(dq[v])) & 1), $sformatf("R=4 stage %0d: bank reused in op", s));
      used |= 1 << bank16(int'(dq[v]));
      check(!seenq[dq[v]], $sformatf("R=4 stage %0d: %0d twice", s, dq[v]));
      seenq[dq[v]] = 1'b1;
      if (opn > 0)
        for (int u = 0; u < 4; u++)
          check(bank16(prevq[u]) != bank16(int'(dq[v])), $sformatf("R=4 stage %0d: bank shared with previous op", s));
    end
    check(int'(wq[0][0]) == (a << (3 - s)), $sformatf("R=4 stage %0d: twiddle 0", s));
    check(int'(wq[0][1]) == ((a << (2 - s)) & 7), $sformatf("R=4 stage %0d: twiddle 1", s));
    check(int'(wq[0][2]) == (((a + (1 << s)) << (2 - s)) & 7), $sformatf("R=4 stage %0d: twiddle 2", s));
    for (int v = 0; v < 4; v++) prevq[v] = int'(dq[v]);
  endtask

  initial begin
    int n8, n32, n4, nv, nq;
    n8 = 0; n32 = 0; n4 = 0; nv = 0; nq = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!v8 && !v32 && !v4 && !vv && !vq, "idle after reset");
    start = 1;
    @(negedge clk) start = 0;
    adv = 1;
    for (int c = 0; c < 100; c++) begin
      if (v8) begin
        check_bf("D=8", int'(st8), 3, int'(d8[0]), int'(d8[1]), int'(w8[0][0]),
                 sched8[st8][2*op8], sched8[st8][2*op8+1]);
        check(l8 == (n8 == 11), "D=8 last");
        n8++;
      end
      if (vv) begin
        check_bf("D=64 at length 8", int'(stv), 6, int'(dv[0]), int'(dv[1]), int'(wv[0][0]),
                 sched8[stv][2*opv], sched8[stv][2*opv+1]);
        check(lv == (nv == 11), "D=64 at length 8 last");
        nv++;
      end
      if (vq) begin
        if (opq == 0) seenq = '{default: 1'b0};
        check_r4(int'(stq), int'(opq));
        check(stq == 2'(2 * (nq / 4)) && opq == 2'(nq % 4), "R=4 counters");
        check(lq == (nq == 7), "R=4 last");
        nq++;
      end
      if (v32) begin
        check_bf("D=32", int'(st32), 5, int'(d32[0]), int'(d32[1]), int'(w32[0][0]),
                 sched32[st32][2*op32], sched32[st32][2*op32+1]);
        check(l32 == (n32 == 79), "D=32 last");
        n32++;
      end
      if (v4) begin
        for (int j = 0; j < 4; j++)
          check_bf("D=32 B=4", int'(st4), 5, int'(d4[2*j]), int'(d4[2*j+1]), int'(w4[j][0]),
                   sched32[st4][8*op4+2*j], sched32[st4][8*op4+2*j+1]);
        check(l4 == (n4 == 19), "D=32 B=4 last");
        n4++;
      end
      @(negedge clk);
    end
    check(n8 == 12, $sformatf("D=8: %0d operations", n8));
    check(nv == 12, $sformatf("D=64 at length 8: %0d operations", nv));
    check(nq == 8, $sformatf("R=4: %0d operations", nq));
    check(n32 == 80, $sformatf("D=32: %0d operations", n32));
    check(n4 == 20, $sformatf("D=32 B=4: %0d operations", n4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
