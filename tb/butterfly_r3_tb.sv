// butterfly_r3_tb: checks the radix-3 butterfly arithmetic.
//
// Directed cases (unit twiddles: a DC input, an input on the second point
// only; both saturation limits) and 20000 random operand and twiddle sets,
// each compared bit for bit with the reference model; the random set also
// checks that the result is within 2 LSB of the exact complex arithmetic.
module butterfly_r3_tb;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;

  logic signed [15:0] a0r, a0i, a1r, a1i, a2r, a2i, w1r, w1i, w2r, w2i;
  logic signed [15:0] y0r, y0i, y1r, y1i, y2r, y2i;
  butterfly_r3 #(.W(16), .TW(16)) u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Apply one set and compare with the model; returns the model outputs.
  task automatic run(int v [10], output int e [6]);
    {a0r, a0i, a1r, a1i, a2r, a2i} = {16'(v[0]), 16'(v[1]), 16'(v[2]), 16'(v[3]), 16'(v[4]), 16'(v[5])};
    {w1r, w1i, w2r, w2i} = {16'(v[6]), 16'(v[7]), 16'(v[8]), 16'(v[9])};
    #1;
    bfly3(v[0], v[1], v[2], v[3], v[4], v[5], v[6], v[7], v[8], v[9], 16, 16,
          e[0], e[1], e[2], e[3], e[4], e[5]);
    check(int'(y0r) == e[0] && int'(y0i) == e[1] && int'(y1r) == e[2] &&
          int'(y1i) == e[3] && int'(y2r) == e[4] && int'(y2i) == e[5],
          $sformatf("inputs %p: got %0d %0d %0d %0d %0d %0d, model %p",
                    v, y0r, y0i, y1r, y1i, y2r, y2i, e));
  endtask

  initial begin
    int v [10];
    int e [6];
    real ur [3], ui [3], zr, zi, ang, err;
    // DC: all three inputs 4000 -> y0 = 3000, y1 = y2 = 0
    v = '{4000, 0, 4000, 0, 4000, 0, 16384, 0, 16384, 0};
    run(v, e);
    check(e[0] == 3000 && e[1] == 0 && e[2] == 0 && e[4] == 0, "DC input");
    // impulse on point 1: y_k = W3^k * 4000 / 4
    v = '{0, 0, 4000, 0, 0, 0, 16384, 0, 16384, 0};
    run(v, e);
    check(e[0] == 1000 && e[2] == -500 && (e[3] == -866 || e[3] == -867), "impulse on input 1");
    // saturation at both ends
    // (twiddles 1+j, so that w*a reaches twice full scale)
    v = '{32767, 0, 32767, -32767, 32767, -32767, 16384, 16384, 16384, 16384};
    run(v, e);
    check(int'(y0r) == 32767, "positive saturation");
    v = '{-32768, 0, -32768, 32767, -32768, 32767, 16384, 16384, 16384, 16384};
    run(v, e);
    check(int'(y0r) == -32768, "negative saturation");
    for (int n = 0; n < 20000; n++) begin
      for (int k = 0; k < 6; k++) v[k] = int'($urandom_range(16383)) - 8192;
      v[6] = tw_re($urandom_range(8), 9, 16); v[7] = tw_im($urandom_range(8), 9, 16);
      v[8] = tw_re($urandom_range(8), 9, 16); v[9] = tw_im($urandom_range(8), 9, 16);
      run(v, e);
      ur[0] = v[0]; ui[0] = v[1];
      ur[1] = (v[2] * v[6] - v[3] * v[7]) / 16384.0; ui[1] = (v[2] * v[7] + v[3] * v[6]) / 16384.0;
      ur[2] = (v[4] * v[8] - v[5] * v[9]) / 16384.0; ui[2] = (v[4] * v[9] + v[5] * v[8]) / 16384.0;
      err = 0.0;
      for (int k = 0; k < 3; k++) begin
        zr = 0.0; zi = 0.0;
        for (int a = 0; a < 3; a++) begin
          ang = -6.283185307179586 * a * k / 3.0;
          zr += ur[a] * $cos(ang) - ui[a] * $sin(ang);
          zi += ur[a] * $sin(ang) + ui[a] * $cos(ang);
        end
        if (rabs(zr / 4.0 - e[2 * k]) > err) err = rabs(zr / 4.0 - e[2 * k]);
        if (rabs(zi / 4.0 - e[2 * k + 1]) > err) err = rabs(zi / 4.0 - e[2 * k + 1]);
      end
      check(err <= 2.0, $sformatf("error %f LSB against exact arithmetic", err));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
