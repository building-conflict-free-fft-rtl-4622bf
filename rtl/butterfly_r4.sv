// butterfly_r4: radix-4 butterfly built from two layers of radix-2
// butterflies, with 1/4 overall scaling.
//
// Inputs x0..x3 are the four datapoints of one radix-4 butterfly, indexed by
// the two address bits (s+1, s) that tell them apart. The first layer does
// radix-2 stage s on the pairs (x0, x1) and (x2, x3) with twiddle w0; the
// second layer does stage s+1 on the pairs (x0', x2') with w1 and
// (x1', x3') with w2. The result is exactly what two consecutive radix-2
// stages produce, so a transform run with this butterfly gives the same
// numbers as the radix-2 engine. Each word packs a complex value as
// {real, imaginary}, W bits each; twiddles use TW bits with 1.0 = 2^(TW-2).
// Purely combinational.
//
// The radix-4 butterfly as the unit of work follows the radix-4 schedule;
// building it from radix-2 layers (rather than a twiddle-free 4-point DFT
// core) is this design's choice, made so that both radices share one
// arithmetic and one twiddle table.
// Lint note: the unused upper product bits belong to butterfly_r2.
module butterfly_r4 #(
  parameter int unsigned W  = 16,
  parameter int unsigned TW = 16
) (
  input  logic [2*W-1:0]       x0, x1, x2, x3,
  input  logic signed [TW-1:0] w0r, w0i, w1r, w1i, w2r, w2i,
  output logic [2*W-1:0]       y0, y1, y2, y3
);
  logic [2*W-1:0] a0, a1, a2, a3;   // after the first layer

  butterfly_r2 #(.W(W), .TW(TW)) u_l0 (
    .ar(x0[2*W-1:W]), .ai(x0[W-1:0]), .br(x1[2*W-1:W]), .bi(x1[W-1:0]),
    .wr(w0r), .wi(w0i),
    .xr(a0[2*W-1:W]), .xi(a0[W-1:0]), .yr(a1[2*W-1:W]), .yi(a1[W-1:0])
  );
  butterfly_r2 #(.W(W), .TW(TW)) u_l1 (
    .ar(x2[2*W-1:W]), .ai(x2[W-1:0]), .br(x3[2*W-1:W]), .bi(x3[W-1:0]),
    .wr(w0r), .wi(w0i),
    .xr(a2[2*W-1:W]), .xi(a2[W-1:0]), .yr(a3[2*W-1:W]), .yi(a3[W-1:0])
  );
  butterfly_r2 #(.W(W), .TW(TW)) u_h0 (
    .ar(a0[2*W-1:W]), .ai(a0[W-1:0]), .br(a2[2*W-1:W]), .bi(a2[W-1:0]),
    .wr(w1r), .wi(w1i),
    .xr(y0[2*W-1:W]), .xi(y0[W-1:0]), .yr(y2[2*W-1:W]), .yi(y2[W-1:0])
  );
  butterfly_r2 #(.W(W), .TW(TW)) u_h1 (
    .ar(a1[2*W-1:W]), .ai(a1[W-1:0]), .br(a3[2*W-1:W]), .bi(a3[W-1:0]),
    .wr(w2r), .wi(w2i),
    .xr(y1[2*W-1:W]), .xi(y1[W-1:0]), .yr(y3[2*W-1:W]), .yi(y3[W-1:0])
  );
endmodule
