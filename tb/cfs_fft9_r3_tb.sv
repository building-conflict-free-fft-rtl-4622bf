// cfs_fft9_r3_tb: end-to-end test of the nine-point radix-3 engine.
//
// The placement is taken from the printed example: groups 0, 1, 2 use the
// locations 0,1,2 / 5,4,7 / 10,11,8 for banks 0, 1, 2; element b of group a
// sits in bank (a + b) mod 3. Each run loads random samples (x[3m+r] into
// element m of group r), also writes into a bank-3 location, which must be
// ignored, runs the transform and checks: 12 cycles; every output bit for bit
// against the same two stages of radix-3 butterflies computed with the
// reference model; every output within 4 LSB of the exact DFT / 16; the
// bank-3 locations read as zero.
module cfs_fft9_r3_tb;
  import fft_ref_pkg::*;
  localparam int unsigned W = 16, TW = 16;

  logic clk = 0;
  always #5 clk = ~clk;

  logic           rst_n, start, busy, done, host_we;
  logic [3:0]     host_addr;
  logic [2*W-1:0] host_wdata, host_rdata;
  logic [31:0]    cycles;
  int checks, failures;

  cfs_fft9_r3 u_dut (.*);

  int place [3][3] = '{'{0, 1, 2}, '{5, 4, 7}, '{10, 11, 8}};   // [group][bank]

  function automatic int loc(int a, int b);
    return place[a][(a + b) % 3];
  endfunction

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int xr [9], xi [9];
    int er [3][3], ei [3][3];   // model contents, [group][element]
    int tr [3], ti [3], yr [3], yi [3];
    int gr, gi, maxerr;
    real zr, zi, ang;
    checks = 0; failures = 0;
    rst_n = 0; start = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      maxerr = 0;
      for (int n = 0; n < 9; n++) begin
        xr[n] = int'($urandom_range(16383)) - 8192;
        xi[n] = int'($urandom_range(16383)) - 8192;
      end
      for (int r = 0; r < 3; r++)
        for (int m = 0; m < 3; m++) begin
          er[r][m] = xr[3 * m + r]; ei[r][m] = xi[3 * m + r];
          @(negedge clk);
          host_we = 1; host_addr = 4'(loc(r, m));
          host_wdata = {W'(xr[3 * m + r]), W'(xi[3 * m + r])};
        end
      @(negedge clk);
      host_addr = 4'(run == 0 ? 3 : 6 + 3 * (run - 1));   // a bank-3 location
      host_wdata = '1;
      @(negedge clk) host_we = 0;
      start = 1;
      @(negedge clk) start = 0;
      check(busy, "busy after start");
      while (!done) @(negedge clk);
      check(cycles == 32'd12, $sformatf("cycles %0d, expected 12", cycles));
      // model: stage 0 inside each group, stage 1 across groups
      for (int a = 0; a < 3; a++) begin
        bfly3(er[a][0], ei[a][0], er[a][1], ei[a][1], er[a][2], ei[a][2],
              tw_re(0, 9, TW), tw_im(0, 9, TW), tw_re(0, 9, TW), tw_im(0, 9, TW), W, TW,
              yr[0], yi[0], yr[1], yi[1], yr[2], yi[2]);
        for (int k = 0; k < 3; k++) begin er[a][k] = yr[k]; ei[a][k] = yi[k]; end
      end
      for (int b = 0; b < 3; b++) begin
        bfly3(er[0][b], ei[0][b], er[1][b], ei[1][b], er[2][b], ei[2][b],
              tw_re(b, 9, TW), tw_im(b, 9, TW), tw_re(2 * b, 9, TW), tw_im(2 * b, 9, TW), W, TW,
              yr[0], yi[0], yr[1], yi[1], yr[2], yi[2]);
        for (int k = 0; k < 3; k++) begin tr[k] = yr[k]; ti[k] = yi[k]; end
        for (int k = 0; k < 3; k++) begin er[k][b] = tr[k]; ei[k][b] = ti[k]; end
      end
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          host_addr = 4'(loc(a, b));
          #1;
          gr = int'($signed(host_rdata[2*W-1:W]));
          gi = int'($signed(host_rdata[W-1:0]));
          check(gr == er[a][b] && gi == ei[a][b],
                $sformatf("X[%0d] = (%0d,%0d), model (%0d,%0d)", b + 3 * a, gr, gi, er[a][b], ei[a][b]));
          zr = 0.0; zi = 0.0;
          for (int n = 0; n < 9; n++) begin
            ang = -6.283185307179586 * n * (b + 3 * a) / 9.0;
            zr += xr[n] * $cos(ang) - xi[n] * $sin(ang);
            zi += xr[n] * $sin(ang) + xi[n] * $cos(ang);
          end
          if ($rtoi($ceil(rabs(zr / 16.0 - gr))) > maxerr) maxerr = $rtoi($ceil(rabs(zr / 16.0 - gr)));
          if ($rtoi($ceil(rabs(zi / 16.0 - gi))) > maxerr) maxerr = $rtoi($ceil(rabs(zi / 16.0 - gi)));
        end
      check(maxerr <= 4, $sformatf("max error vs exact DFT %0d LSB", maxerr));
      foreach (place[a]) begin
        host_addr = 4'(4 * a + 3 - a);   // 3, 6, 9: bank 3 of each group
        #1;
        check(host_rdata == '0, $sformatf("bank-3 location %0d reads %h", host_addr, host_rdata));
      end
      $display("9-point radix-3 transform: %0d cycles, max error %0d LSB", cycles, maxerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
