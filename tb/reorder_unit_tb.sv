// reorder_unit_tb: checks the "reorder" step.
//
// Printed examples: in stage 2 of a 64-point, four-bank schedule the group
// 3,7,11,15 becomes 15,11,7,3; in the 256-point, eight-bank schedule the
// groups 141..253 and 142..254 (stride 16, toggle bits d6 d5 d4) become
// 189,173,157,141,253,237,221,205 and 238,254,206,222,174,190,142,158.
// Property, for D=1024/G=4 and D=256/G=8 over the whole schedule (generate
// model written here, then the unit): each aligned group is a permutation of
// its input group, its banks are all different, and every aligned group of a
// stage visits the banks in the same order. The 1024-point unit is also run
// at the shorter lengths 2^2 .. 2^9 and must pass the same property there.
module reorder_unit_tb;
  int checks = 0, failures = 0;

  logic [2:0] st6; logic [5:0] d6, q6; logic [1:0] m6;
  logic [2:0] st8; logic [7:0] d8, q8; logic [2:0] m8;
  logic [3:0] stk; logic [9:0] dk, qk; logic [1:0] mk;
  logic [3:0] lk;
  reorder_unit #(.S(6),  .T(2)) u6 (.len(3'd6), .stage(st6), .d(d6), .delta(q6), .bank(m6));
  reorder_unit #(.S(8),  .T(3)) u8 (.len(4'd8), .stage(st8), .d(d8), .delta(q8), .bank(m8));
  reorder_unit #(.S(10), .T(2)) uk (.len(lk),   .stage(stk), .d(dk), .delta(qk), .bank(mk));

  function automatic int unsigned rotl(int unsigned x, int unsigned r, int unsigned n);
    return ((x << r) | (x >> (n - r))) & ((1 << n) - 1);
  endfunction
  function automatic int unsigned gen(int unsigned s, int unsigned i, int unsigned sn, int unsigned t);
    if (s <= sn - t) return rotl(i, s, sn);
    return (rotl(i & ((1 << t) - 1), s - (sn - t), t) << (sn - t)) | (i >> t);
  endfunction
  function automatic int unsigned par(int unsigned d, int unsigned s, int unsigned t);
    int unsigned m;
    m = 0;
    for (int unsigned b = 0; b < s; b++) if ((d >> b) & 1) m ^= 1 << (b % t);
    return m;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // Run the property over a whole schedule of 2^sn points, 2^t banks.
  task automatic sweep(int unsigned sn, int unsigned t);
    int unsigned g, in_d, out_d;
    int unsigned order [];
    bit used [];
    int unsigned insum, outsum;
    g = 1 << t;
    order = new[g];
    used = new[1 << t];
    for (int unsigned s = 0; s < sn; s++)
      for (int unsigned grp = 0; grp < (1 << sn) / g; grp++) begin
        insum = 0; outsum = 0;
        foreach (used[b]) used[b] = 0;
        for (int unsigned k = 0; k < g; k++) begin
          in_d = gen(s, grp * g + k, sn, t);
          if (t == 2)   begin lk = 4'(sn); stk = 4'(s); dk = 10'(in_d); #1; out_d = qk; end
          else          begin st8 = 3'(s); d8 = 8'(in_d);  #1; out_d = q8; end
          insum += in_d * in_d + 7 * in_d;
          outsum += out_d * out_d + 7 * out_d;
          check(!used[par(out_d, sn, t)], $sformatf("S=%0d stage %0d group %0d: bank repeated", sn, s, grp));
          used[par(out_d, sn, t)] = 1;
          if (grp == 0) order[k] = par(out_d, sn, t);
          else check(order[k] == par(out_d, sn, t),
                     $sformatf("S=%0d stage %0d group %0d: bank order differs", sn, s, grp));
        end
        check(insum == outsum, $sformatf("S=%0d stage %0d group %0d: not a permutation", sn, s, grp));
      end
  endtask

  initial begin
    int f14_in [4] = '{3, 7, 11, 15};
    int f14_out [4] = '{15, 11, 7, 3};
    int f15_in [16] = '{141, 157, 173, 189, 205, 221, 237, 253, 142, 158, 174, 190, 206, 222, 238, 254};
    int f15_out [16] = '{189, 173, 157, 141, 253, 237, 221, 205, 238, 254, 206, 222, 174, 190, 142, 158};
    for (int n = 0; n < 4; n++) begin
      st6 = 3'd2; d6 = 6'(f14_in[n]); #1;
      check(int'(q6) == f14_out[n], $sformatf("64-point example %0d -> %0d", f14_in[n], q6));
    end
    for (int n = 0; n < 16; n++) begin
      st8 = 3'd4; d8 = 8'(f15_in[n]); #1;
      check(int'(q8) == f15_out[n], $sformatf("256-point example %0d -> %0d", f15_in[n], q8));
    end
    sweep(10, 2);
    sweep(8, 3);
    for (int unsigned l = 2; l < 10; l++) sweep(l, 2);
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
