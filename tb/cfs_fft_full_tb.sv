// cfs_fft_full_tb: one complete transform of the engine at its default size
// (1024 points, one radix-2 butterfly, two-stage overlapped pipeline, four
// banks, bypass buffer on).
//
// Loads random samples (x[n] into datapoint bitrev(n)), runs the transform,
// and compares every output bit for bit with the reference model and, for
// the first 64 bins, with a floating-point DFT. The transform must take the
// minimum time: 5120 butterfly operations plus one cycle to fill the
// pipeline, 5121 cycles, with no stall. Then the same engine runs an 8-point
// transform selected at run time, which must take 13 cycles (twelve
// butterflies plus the fill cycle).
module cfs_fft_full_tb;
  import fft_ref_pkg::*;
  localparam int unsigned D = 1024, W = 16, TW = 16, S = 10;

  logic clk = 0;
  always #5 clk = ~clk;

  logic           rst_n, start, busy, done, host_we;
  logic [S-1:0]   host_addr;
  logic [2*W-1:0] host_wdata, host_rdata;
  logic [31:0]    cycles, stalls, bypasses;
  logic [3:0]     log2_len;
  int checks, failures;

  cfs_fft u_dut (
    .clk, .rst_n, .start, .log2_len, .busy, .done, .host_we, .host_addr, .host_wdata, .host_rdata,
    .cycles, .stalls, .bypasses
  );

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // One transform of 2^l points, checked against the models; the transform
  // must take exp_cycles cycles without a stall.
  task automatic run(int unsigned l, int unsigned exp_cycles, int unsigned seed);
    int xr[], xi[], rr[], ri[];
    int maxerr, gr, gi;
    int unsigned dp, dl;
    real yr, yi;
    dl = 1 << l;
    maxerr = 0;
    xr = new[dl]; xi = new[dl]; rr = new[dl]; ri = new[dl];
    void'($urandom(seed));
    for (int n = 0; n < int'(dl); n++) begin
      xr[n] = int'($urandom_range(16383)) - 8192;
      xi[n] = int'($urandom_range(16383)) - 8192;
      dp = bitrev(n, l);
      rr[dp] = xr[n]; ri[dp] = xi[n];
      @(negedge clk);
      host_we = 1; host_addr = S'(dp); host_wdata = {W'(xr[n]), W'(xi[n])};
    end
    @(negedge clk) host_we = 0;
    log2_len = 4'(l);
    start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    ref_fft(rr, ri, W, TW);
    for (int k = 0; k < int'(dl); k++) begin
      host_addr = S'(k);
      #1;
      gr = int'($signed(host_rdata[2*W-1:W]));
      gi = int'($signed(host_rdata[W-1:0]));
      check(gr == rr[k] && gi == ri[k],
            $sformatf("%0d points: X[%0d] = (%0d,%0d), expected (%0d,%0d)", dl, k, gr, gi, rr[k], ri[k]));
      if (k < 64) begin
        dft_scaled(xr, xi, k, yr, yi);
        if ($rtoi($ceil(rabs(yr - gr))) > maxerr) maxerr = $rtoi($ceil(rabs(yr - gr)));
        if ($rtoi($ceil(rabs(yi - gi))) > maxerr) maxerr = $rtoi($ceil(rabs(yi - gi)));
      end
    end
    check(maxerr <= int'(l) + 2, $sformatf("%0d points: max error vs float DFT %0d LSB", dl, maxerr));
    check(cycles == exp_cycles, $sformatf("%0d points: cycles %0d, expected %0d", dl, cycles, exp_cycles));
    check(stalls == 0, $sformatf("%0d points: %0d stalls", dl, stalls));
    $display("%0d-point transform: %0d cycles, %0d stalls, %0d bypasses, max error %0d LSB",
             dl, cycles, stalls, bypasses, maxerr);
  endtask

  initial begin
    checks = 0; failures = 0;
    rst_n = 0; start = 0; host_we = 0; host_addr = '0; host_wdata = '0; log2_len = 4'(S);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(S, 5121, 7);
    run(3, 13, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
