// butterfly_r2: radix-2 decimation-in-time butterfly with 1/2 scaling.
//
//   a' = (a + w*b) / 2      b' = (a - w*b) / 2
//
// a, b and the results are complex fixed-point numbers of W bits per part;
// the twiddle w has TW bits per part with 1.0 = 2^(TW-2). The product is
// truncated (arithmetic shift) back to the data scale, the sum and difference
// are halved by an arithmetic shift and saturated to W bits. Halving in every
// stage keeps the data inside its range through all log2(D) stages, so the
// transform output is the DFT divided by D. The butterfly function follows the
// radix-2 DIT signal-flow graph; number format, truncation, scaling and
// saturation are this design's choices. Purely combinational.
// Lint note: the upper bits of the full-width products are unused because
// only the rescaled part is kept.
module butterfly_r2 #(
  parameter int unsigned W  = 16,
  parameter int unsigned TW = 16
) (
  input  logic signed [W-1:0]  ar, ai, br, bi,
  input  logic signed [TW-1:0] wr, wi,
  output logic signed [W-1:0]  xr, xi, yr, yi
);
  localparam int unsigned PW = W + TW + 1;   // product-sum width
  localparam int unsigned SW = W + 3;        // scaled-sum width
  localparam logic signed [SW-1:0] MAXV = SW'((1 << (W - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(1 << (W - 1));

  logic signed [PW-1:0] brx, bix, wrx, wix;  // sign-extended operands
  logic signed [PW-1:0] pr, pi;              // w*b at twiddle scale
  logic signed [PW-1:0] trx, tix;
  logic signed [SW-1:0] tr, ti;              // w*b at data scale
  logic signed [SW-1:0] arx, aix;
  logic signed [SW-1:0] sr, si, dr, di;      // a +/- w*b, halved

  function automatic logic signed [W-1:0] sat(input logic signed [SW-1:0] v);
    if (v > MAXV) return MAXV[W-1:0];
    if (v < MINV) return MINV[W-1:0];
    return v[W-1:0];
  endfunction

  always_comb begin
    brx = PW'(br);
    bix = PW'(bi);
    wrx = PW'(wr);
    wix = PW'(wi);
    arx = SW'(ar);
    aix = SW'(ai);
    pr  = brx * wrx - bix * wix;
    pi  = brx * wix + bix * wrx;
    trx = pr >>> (TW - 2);
    tix = pi >>> (TW - 2);
    tr  = trx[SW-1:0];
    ti  = tix[SW-1:0];
    sr  = (arx + tr) >>> 1;
    si  = (aix + ti) >>> 1;
    dr  = (arx - tr) >>> 1;
    di  = (aix - ti) >>> 1;
    xr  = sat(sr);
    xi  = sat(si);
    yr  = sat(dr);
    yi  = sat(di);
  end
endmodule
