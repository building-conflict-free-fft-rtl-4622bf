// fft_runner: drives one cfs_fft configuration through complete transforms.
//
// Loads random samples through the host port (sample n into datapoint
// bitrev(n)), starts the engine, waits for done, reads every datapoint back
// and compares it with the bit-exact reference and, within a small tolerance,
// with a floating-point DFT. Runs RUNS transforms back to back. If EXP_CYCLES
// is not negative the transform length must equal it; in any case it must be
// the operation count plus stalls plus the pipeline fill. Also counts how
// often the engine's mechanisms fired, for the calling testbench. LEN, if
// not zero, runs every transform at the shorter length 2^LEN on the engine
// built for D points. R selects radix-2 or radix-4 butterflies.
module fft_runner #(
  parameter int unsigned D       = 8,
  parameter int unsigned B       = 1,
  parameter int unsigned R       = 2,
  parameter int unsigned P       = 2,
  parameter bit          OVERLAP = 1'b1,
  parameter bit          BYPASS  = 1'b1,
  parameter int          EXP_CYCLES = -1,
  parameter int unsigned RUNS    = 2,
  parameter int unsigned SEED    = 1,
  parameter int unsigned LEN     = 0
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_stall,
  output int   n_bypass,
  output int   n_drain,
  output int   n_overlap,
  output int   n_hazard,
  output int   n_stage,
  output bit   finished
);
  import fft_ref_pkg::*;
  localparam int unsigned W = 16, TW = 16;
  localparam int unsigned S  = $clog2(D);
  localparam int unsigned L  = LEN != 0 ? LEN : S;   // stages of each run
  localparam int unsigned DL = 1 << L;               // points of each run
  localparam int unsigned LW = $clog2(S + 1);

  logic           rst_n, start, busy, done, host_we;
  logic [S-1:0]   host_addr;
  logic [2*W-1:0] host_wdata, host_rdata;
  logic [31:0]    cycles, stalls, bypasses;

  cfs_fft #(.D(D), .B(B), .R(R), .P(P), .OVERLAP(OVERLAP), .BYPASS(BYPASS), .W(W), .TW(TW)) u_dut (
    .clk, .rst_n, .start, .log2_len(LW'(L)), .busy, .done, .host_we, .host_addr, .host_wdata, .host_rdata,
    .cycles, .stalls, .bypasses
  );

  // Mechanism counters, read from inside the engine.
  logic [S-1:0] last_stage;
  always @(posedge clk) begin
    if (rst_n && busy) begin
      if (u_dut.stall)                   n_stall++;
      if (u_dut.defer)                   n_bypass++;
      if (u_dut.drain)                   n_drain++;
      if (u_dut.issue && u_dut.wr_valid) n_overlap++;
      if (u_dut.want_issue && u_dut.hazard) n_hazard++;
      if (u_dut.issue && S'(u_dut.ag_stage) != last_stage) n_stage++;
      if (u_dut.issue) last_stage <= S'(u_dut.ag_stage);
    end
  end

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL D=%0d/%0d B=%0d P=%0d OV=%0d BY=%0d: %s",
                                  DL, D, R, B, P, OVERLAP, BYPASS, what);
    end
  endtask

  initial begin
    int xr[], xi[], rr[], ri[];
    int unsigned seed;
    int unsigned ops;
    seed = SEED;
    checks = 0; failures = 0; n_stall = 0; n_bypass = 0; n_drain = 0;
    n_overlap = 0; n_hazard = 0; n_stage = 0; finished = 0;
    last_stage = '0;
    rst_n = 0; start = 0; host_we = 0; host_addr = '0; host_wdata = '0;
    xr = new[DL]; xi = new[DL]; rr = new[DL]; ri = new[DL];
    repeat (3) @(posedge clk);
    rst_n = 1;
    ops = (L / $clog2(R)) * DL / (R * B);
    for (int run = 0; run < int'(RUNS); run++) begin
      int maxerr;
      maxerr = 0;
      void'($urandom(seed + run));
      for (int n = 0; n < int'(DL); n++) begin
        xr[n] = int'($urandom_range(16383)) - 8192;
        xi[n] = int'($urandom_range(16383)) - 8192;
      end
      // load x[n] into datapoint bitrev(n)
      for (int n = 0; n < int'(DL); n++) begin
        int unsigned dp;
        dp = bitrev(n, L);
        @(negedge clk);
        host_we = 1; host_addr = S'(dp); host_wdata = {W'(xr[n]), W'(xi[n])};
        rr[dp] = xr[n]; ri[dp] = xi[n];
      end
      @(negedge clk) host_we = 0;
      start = 1;
      @(negedge clk) start = 0;
      check(busy, "busy after start");
      while (!done) @(negedge clk);
      check(!busy, "idle after done");
      ref_fft(rr, ri, W, TW);
      for (int k = 0; k < int'(DL); k++) begin
        real yr, yi;
        int gr, gi;
        host_addr = S'(k);
        #1;
        gr = int'($signed(host_rdata[2*W-1:W]));
        gi = int'($signed(host_rdata[W-1:0]));
        check(gr == rr[k] && gi == ri[k],
              $sformatf("X[%0d] = (%0d,%0d), expected (%0d,%0d)", k, gr, gi, rr[k], ri[k]));
        if (k < 64) begin
          dft_scaled(xr, xi, k, yr, yi);
          if ($rtoi($ceil(rabs(yr - gr))) > maxerr) maxerr = $rtoi($ceil(rabs(yr - gr)));
          if ($rtoi($ceil(rabs(yi - gi))) > maxerr) maxerr = $rtoi($ceil(rabs(yi - gi)));
        end
      end
      check(maxerr <= int'(L) + 2, $sformatf("max error vs float DFT %0d LSB", maxerr));
      begin
        int base;
        base = OVERLAP ? int'(ops) + int'(stalls) + int'(P) - 1 : int'(ops) * int'(P);
        // one extra cycle is allowed for writing back a parked word at the end
        check(int'(cycles) == base || int'(cycles) == base + 1,
              $sformatf("cycles %0d for %0d operations, %0d stalls", cycles, ops, stalls));
      end
      if (EXP_CYCLES >= 0)
        check(int'(cycles) == EXP_CYCLES, $sformatf("cycles %0d, expected %0d", cycles, EXP_CYCLES));
      $display("D=%0d (of %0d) R=%0d B=%0d P=%0d OVERLAP=%0d BYPASS=%0d G=%0d: %0d cycles, %0d stalls, %0d bypasses, max err %0d",
               DL, D, R, B, P, OVERLAP, BYPASS, u_dut.G, cycles, stalls, bypasses, maxerr);
    end
    finished = 1;
  end
endmodule
