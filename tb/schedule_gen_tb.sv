// schedule_gen_tb: checks the "generate" step.
//
// Compares the whole schedule with the ones printed for D=16/G=8 and for
// D=8/G=4 (the rotated-toggle form), and checks D=1024/G=4 exhaustively
// against a rotation model written here. Also checks that in every stage s
// each aligned group of G datapoints differs only in T adjacent toggle bits
// whose lowest is bit s (the stride of the stage). Finally runs the 1024-point
// generator at every shorter length 2^L (L = 2..9) against the same model.
module schedule_gen_tb;
  int checks = 0, failures = 0;

  logic [1:0] st16; logic [3:0] i16, d16;
  logic [1:0] st8;  logic [2:0] i8,  d8;
  logic [3:0] stk;  logic [9:0] ik,  dk;
  logic [3:0] lk;
  schedule_gen #(.S(4),  .T(3)) u16 (.len(3'd4),  .stage(st16), .i(i16), .d(d16));
  schedule_gen #(.S(3),  .T(2)) u8  (.len(2'd3),  .stage(st8),  .i(i8),  .d(d8));
  schedule_gen #(.S(10), .T(2)) uk  (.len(lk),    .stage(stk),  .i(ik),  .d(dk));

  int sched16 [4][16] = '{
    '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15},
    '{0, 2, 4, 6, 8, 10, 12, 14, 1, 3, 5, 7, 9, 11, 13, 15},
    '{0, 4, 8, 12, 2, 6, 10, 14, 1, 5, 9, 13, 3, 7, 11, 15},
    '{0, 8, 2, 10, 4, 12, 6, 14, 1, 9, 3, 11, 5, 13, 7, 15}};
  int sched8 [3][8] = '{
    '{0, 1, 2, 3, 4, 5, 6, 7},
    '{0, 2, 4, 6, 1, 3, 5, 7},
    '{0, 4, 2, 6, 1, 5, 3, 7}};

  function automatic int unsigned rotl(int unsigned x, int unsigned r, int unsigned n);
    return ((x << r) | (x >> (n - r))) & ((1 << n) - 1);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int unsigned exp_d, base, diff;
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 16; i++) begin
        st16 = 2'(s); i16 = 4'(i); #1;
        check(int'(d16) == sched16[s][i], $sformatf("D=16 stage %0d pos %0d: %0d", s, i, d16));
      end
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < 8; i++) begin
        st8 = 2'(s); i8 = 3'(i); #1;
        check(int'(d8) == sched8[s][i], $sformatf("D=8 stage %0d pos %0d: %0d", s, i, d8));
      end
    lk = 4'd10;
    for (int s = 0; s < 10; s++)
      for (int i = 0; i < 1024; i++) begin
        stk = 4'(s); ik = 10'(i); #1;
        if (s <= 8) exp_d = rotl(i, s, 10);
        else        exp_d = (rotl(i & 3, s - 8, 2) << 8) | (i >> 2);
        check(dk == 10'(exp_d), $sformatf("D=1024 stage %0d pos %0d", s, i));
        if (i % 4 == 0) base = dk;
        else begin
          diff = base ^ dk;
          // toggle bits: s,s+1 up to stage 8, then the top two bits
          check((diff & ~(s <= 8 ? (3 << s) : (3 << 8))) == 0,
                $sformatf("D=1024 stage %0d pos %0d: group differs outside toggle bits", s, i));
        end
      end
    for (int l = 2; l < 10; l++) begin
      lk = 4'(l);
      for (int s = 0; s < l; s++)
        for (int i = 0; i < (1 << l); i++) begin
          stk = 4'(s); ik = 10'(i); #1;
          if (s <= l - 2) exp_d = rotl(i, s, l);
          else            exp_d = (rotl(i & 3, s - (l - 2), 2) << (l - 2)) | (i >> 2);
          check(dk == 10'(exp_d), $sformatf("length 2^%0d stage %0d pos %0d: %0d", l, s, i, dk));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
