// butterfly_r4_tb: checks the radix-4 butterfly.
//
// 20000 random operand sets with random twiddles are compared with two layers
// of the reference package's radix-2 model (pairs (0,1) and (2,3) with w0,
// then (0,2) with w1 and (1,3) with w2). Directed cases use the twiddles of a
// stand-alone 4-point transform (w0 = w1 = 1, w2 = -j) on inputs given in
// bit-reversed order, where the outputs must be the DFT divided by 4 to
// within 2 LSB, and a saturating case.
module butterfly_r4_tb;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0]        x0, x1, x2, x3, y0, y1, y2, y3;
  logic signed [15:0] w0r, w0i, w1r, w1i, w2r, w2i;

  butterfly_r4 #(.W(16), .TW(16)) u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic real rabs(real v); return v < 0.0 ? -v : v; endfunction
  function automatic int re(logic [31:0] v); return int'($signed(v[31:16])); endfunction
  function automatic int im(logic [31:0] v); return int'($signed(v[15:0])); endfunction

  // Drive the inputs and compare with the two-layer model; x[] in input order.
  task automatic run(int xr[4], int xi[4], int wr[3], int wi[3]);
    int ar[4], ai[4], er[4], ei[4];
    x0 = {16'(xr[0]), 16'(xi[0])}; x1 = {16'(xr[1]), 16'(xi[1])};
    x2 = {16'(xr[2]), 16'(xi[2])}; x3 = {16'(xr[3]), 16'(xi[3])};
    w0r = 16'(wr[0]); w0i = 16'(wi[0]); w1r = 16'(wr[1]); w1i = 16'(wi[1]);
    w2r = 16'(wr[2]); w2i = 16'(wi[2]);
    #1;
    bfly(xr[0], xi[0], xr[1], xi[1], wr[0], wi[0], 16, 16, ar[0], ai[0], ar[1], ai[1]);
    bfly(xr[2], xi[2], xr[3], xi[3], wr[0], wi[0], 16, 16, ar[2], ai[2], ar[3], ai[3]);
    bfly(ar[0], ai[0], ar[2], ai[2], wr[1], wi[1], 16, 16, er[0], ei[0], er[2], ei[2]);
    bfly(ar[1], ai[1], ar[3], ai[3], wr[2], wi[2], 16, 16, er[1], ei[1], er[3], ei[3]);
    check(re(y0) == er[0] && im(y0) == ei[0] && re(y1) == er[1] && im(y1) == ei[1] &&
          re(y2) == er[2] && im(y2) == ei[2] && re(y3) == er[3] && im(y3) == ei[3],
          $sformatf("x=(%0d,%0d)..: got y0=(%0d,%0d), expected (%0d,%0d)",
                    xr[0], xi[0], re(y0), im(y0), er[0], ei[0]));
  endtask

  initial begin
    int xr[4], xi[4], wr[3], wi[3];
    // stand-alone 4-point DFT: inputs x[0], x[2], x[1], x[3]
    wr = '{16384, 16384, 0}; wi = '{0, 0, -16384};
    for (int t = 0; t < 200; t++) begin
      int n[4] = '{0, 2, 1, 3};
      int sr[4], si[4];
      for (int k = 0; k < 4; k++) begin
        sr[k] = int'($urandom_range(16383)) - 8192;
        si[k] = int'($urandom_range(16383)) - 8192;
      end
      for (int v = 0; v < 4; v++) begin xr[v] = sr[n[v]]; xi[v] = si[n[v]]; end
      run(xr, xi, wr, wi);
      for (int k = 0; k < 4; k++) begin
        real dr, di;
        logic [31:0] y;
        dr = 0.0; di = 0.0;
        for (int m = 0; m < 4; m++) begin
          dr += sr[m] * $cos(-2.0 * 3.14159265358979 * k * m / 4.0) - si[m] * $sin(-2.0 * 3.14159265358979 * k * m / 4.0);
          di += sr[m] * $sin(-2.0 * 3.14159265358979 * k * m / 4.0) + si[m] * $cos(-2.0 * 3.14159265358979 * k * m / 4.0);
        end
        y = k == 0 ? y0 : k == 1 ? y1 : k == 2 ? y2 : y3;
        check(rabs(dr / 4.0 - re(y)) <= 2.0 && rabs(di / 4.0 - im(y)) <= 2.0,
              $sformatf("4-point DFT X[%0d]/4 = (%0.1f,%0.1f), got (%0d,%0d)", k, dr / 4.0, di / 4.0, re(y), im(y)));
      end
    end
    // first layer saturates: (1+j)(32767+32767j) = 65534j
    xr = '{0, 32767, 0, 32767}; xi = '{32767, 32767, 32767, 32767};
    wr = '{16384, 16384, 16384}; wi = '{16384, 16384, 16384};
    run(xr, xi, wr, wi);
    check(u_dut.a0[15:0] == 16'sd32767, "first layer saturates high");
    // random operands and twiddles
    for (int t = 0; t < 20000; t++) begin
      for (int v = 0; v < 4; v++) begin
        xr[v] = int'($urandom_range(65535)) - 32768;
        xi[v] = int'($urandom_range(65535)) - 32768;
      end
      for (int v = 0; v < 3; v++) begin
        wr[v] = int'($urandom_range(32767)) - 16384;
        wi[v] = int'($urandom_range(32767)) - 16384;
      end
      run(xr, xi, wr, wi);
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
