// cfs_fft_tb: end-to-end test of the FFT engine in several configurations.
//
// Each configuration runs complete transforms against a bit-exact reference
// and a floating-point DFT. The cycle counts printed with the schedule are
// checked where they are known: 24 cycles for an 8-point transform on a
// two-stage pipeline without overlap, 13 with overlap (one fill cycle plus
// twelve butterflies), 5130 for a 1024-point transform with one butterfly and
// no bypass buffer and 5121 with it. The testbench also requires every
// mechanism to have happened at least once: overlapped read/write cycles,
// stage changes, conflict stalls, bypass deferrals, buffer drains and
// stalls when more words collide than the bypass buffer can hold, and
// transforms run at a shorter length than the engine was built for. A
// three-deep overlapped pipeline on 16 points (eight banks) is run as well,
// and three radix-4 configurations (16 points without overlap in 16 cycles,
// 64 points overlapped, 256 points with two butterflies at length 64).
module cfs_fft_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 14;
  int checks [NCFG], failures [NCFG], n_stall [NCFG], n_bypass [NCFG], n_drain [NCFG];
  int n_overlap [NCFG], n_hazard [NCFG], n_stage [NCFG];
  bit fin [NCFG];

  // 8 points, one butterfly, two-stage pipeline: without overlap (G=2), with overlap (G=4)
  fft_runner #(.D(8), .OVERLAP(0), .EXP_CYCLES(24), .SEED(11)) r0 (
    clk, checks[0], failures[0], n_stall[0], n_bypass[0], n_drain[0], n_overlap[0], n_hazard[0], n_stage[0], fin[0]);
  fft_runner #(.D(8), .OVERLAP(1), .BYPASS(1), .EXP_CYCLES(13), .SEED(12)) r1 (
    clk, checks[1], failures[1], n_stall[1], n_bypass[1], n_drain[1], n_overlap[1], n_hazard[1], n_stage[1], fin[1]);
  // 1024 points, one butterfly: with and without the bypass buffer
  fft_runner #(.D(1024), .BYPASS(0), .EXP_CYCLES(5130), .RUNS(1), .SEED(13)) r2 (
    clk, checks[2], failures[2], n_stall[2], n_bypass[2], n_drain[2], n_overlap[2], n_hazard[2], n_stage[2], fin[2]);
  fft_runner #(.D(1024), .BYPASS(1), .EXP_CYCLES(5121), .RUNS(1), .SEED(14)) r3 (
    clk, checks[3], failures[3], n_stall[3], n_bypass[3], n_drain[3], n_overlap[3], n_hazard[3], n_stage[3], fin[3]);
  // two butterflies (G=8); four-deep pipeline (G=8), which parks more words
  // than the buffer holds, so it both stalls and drains with the buffer on
  fft_runner #(.D(32), .B(2), .SEED(15)) r4 (
    clk, checks[4], failures[4], n_stall[4], n_bypass[4], n_drain[4], n_overlap[4], n_hazard[4], n_stage[4], fin[4]);
  fft_runner #(.D(16), .P(4), .SEED(16)) r5 (
    clk, checks[5], failures[5], n_stall[5], n_bypass[5], n_drain[5], n_overlap[5], n_hazard[5], n_stage[5], fin[5]);
  // four butterflies, five-deep pipeline (G=64)
  fft_runner #(.D(256), .B(4), .P(5), .SEED(17)) r6 (
    clk, checks[6], failures[6], n_stall[6], n_bypass[6], n_drain[6], n_overlap[6], n_hazard[6], n_stage[6], fin[6]);
  fft_runner #(.D(64), .B(2), .P(3), .OVERLAP(0), .SEED(18)) r7 (
    clk, checks[7], failures[7], n_stall[7], n_bypass[7], n_drain[7], n_overlap[7], n_hazard[7], n_stage[7], fin[7]);

  // shorter transforms selected at run time: 64 points on the 1024-point
  // engine, and 16 points on a 64-point engine with G=16 (the shortest length)
  fft_runner #(.D(1024), .LEN(6), .SEED(19)) r8 (
    clk, checks[8], failures[8], n_stall[8], n_bypass[8], n_drain[8], n_overlap[8], n_hazard[8], n_stage[8], fin[8]);
  fft_runner #(.D(64), .B(2), .P(3), .LEN(4), .SEED(20)) r9 (
    clk, checks[9], failures[9], n_stall[9], n_bypass[9], n_drain[9], n_overlap[9], n_hazard[9], n_stage[9], fin[9]);

  // three-deep overlapped pipeline on 16 points, G=8
  fft_runner #(.D(16), .P(3), .SEED(21)) r10 (
    clk, checks[10], failures[10], n_stall[10], n_bypass[10], n_drain[10], n_overlap[10], n_hazard[10], n_stage[10], fin[10]);
  // Radix 4: 64 points overlapped (G=8), 16 points without overlap (G=4,
  // 2 stages x 4 operations x 2 cycles), and 256 points with two radix-4
  // butterflies on a three-deep pipeline run at length 64.
  fft_runner #(.D(64), .R(4), .SEED(22)) r11 (
    clk, checks[11], failures[11], n_stall[11], n_bypass[11], n_drain[11], n_overlap[11], n_hazard[11], n_stage[11], fin[11]);
  fft_runner #(.D(16), .R(4), .OVERLAP(0), .EXP_CYCLES(16), .SEED(23)) r12 (
    clk, checks[12], failures[12], n_stall[12], n_bypass[12], n_drain[12], n_overlap[12], n_hazard[12], n_stage[12], fin[12]);
  fft_runner #(.D(256), .B(2), .R(4), .P(3), .LEN(6), .SEED(24)) r13 (
    clk, checks[13], failures[13], n_stall[13], n_bypass[13], n_drain[13], n_overlap[13], n_hazard[13], n_stage[13], fin[13]);

  int total_checks, total_failures;

  task automatic need(string what, int count);
    total_checks++;
    $display("mechanism %-28s happened %0d times", what, count);
    if (count == 0) begin
      total_failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int c = 0; c < NCFG; c++) all &= fin[c];
    end while (!all);
    total_checks = 0; total_failures = 0;
    for (int c = 0; c < NCFG; c++) begin
      total_checks += checks[c];
      total_failures += failures[c];
    end
    need("overlapped read and write", n_overlap[1] + n_overlap[3]);
    need("stage change", n_stage[0] + n_stage[3]);
    need("conflict stall", n_stall[2]);
    need("bypass deferral", n_bypass[1] + n_bypass[3]);
    need("bypass drain", n_drain[1] + n_drain[3] + n_drain[5]);
    need("stall with bypass buffer full", n_stall[5]);
    if (n_hazard[5] + n_hazard[6] + n_hazard[9] + n_hazard[10] + n_hazard[11] + n_hazard[13] != 0)
      $display("note: %0d data-hazard stalls", n_hazard[5] + n_hazard[6] + n_hazard[9] + n_hazard[10] + n_hazard[11] + n_hazard[13]);
    need("non-overlapped issue", checks[0] + checks[7]);
    need("run-time shorter length", checks[8] + checks[9]);
    need("radix-4 butterflies", checks[11] + checks[12] + checks[13]);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end
endmodule
