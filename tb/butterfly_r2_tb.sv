// butterfly_r2_tb: checks the radix-2 butterfly arithmetic.
//
// Directed cases (twiddle 1, -j and -1; saturation at both ends) and 20000
// random operand sets, compared with the fixed-point model of the reference
// package, which computes a' = (a + w*b)/2 and b' = (a - w*b)/2 with the
// product truncated to the data scale.
module butterfly_r2_tb;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [15:0] ar, ai, br, bi, wr, wi, xr, xi, yr, yi;

  butterfly_r2 #(.W(16), .TW(16)) u_dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic run(int a_r, a_i, b_r, b_i, w_r, w_i);
    int er, ei, fr, fi;
    ar = 16'(a_r); ai = 16'(a_i); br = 16'(b_r); bi = 16'(b_i); wr = 16'(w_r); wi = 16'(w_i);
    #1;
    bfly(a_r, a_i, b_r, b_i, w_r, w_i, 16, 16, er, ei, fr, fi);
    check(int'(xr) == er && int'(xi) == ei && int'(yr) == fr && int'(yi) == fi,
          $sformatf("a=(%0d,%0d) b=(%0d,%0d) w=(%0d,%0d): got (%0d,%0d) (%0d,%0d), expected (%0d,%0d) (%0d,%0d)",
                    a_r, a_i, b_r, b_i, w_r, w_i, xr, xi, yr, yi, er, ei, fr, fi));
  endtask

  initial begin
    // w = 1: plain sum and difference, halved
    run(1000, -200, 300, 50, 16384, 0);
    check(xr == 650 && xi == -75 && yr == 350 && yi == -125, "w=1 by hand");
    // w = -j: w*b = (bi, -br)
    run(1000, -200, 300, 50, 0, -16384);
    check(xr == 525 && xi == -250 && yr == 475 && yi == 50, "w=-j by hand");
    // w = -1
    run(-32768, 32767, 32767, -32768, -16384, 0);
    // saturation: |w*b| beyond the range
    run(32767, 32767, 32767, -32768, 16384, 16384);
    run(-32768, -32768, -32768, 32767, 16384, 16384);
    for (int n = 0; n < 20000; n++)
      run(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
          int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
          int'($urandom_range(32768)) - 16384, int'($urandom_range(32768)) - 16384);
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
