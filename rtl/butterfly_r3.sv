// butterfly_r3: radix-3 butterfly with twiddles on its second and third
// inputs and 1/4 scaling.
//
//   u0 = a0, u1 = w1*a1, u2 = w2*a2
//   y_k = (u0 + W3^k u1 + W3^(2k) u2) / 4,  k = 0, 1, 2,  W3 = exp(-j*2*pi/3)
//
// With s = u1 + u2 and d = u1 - u2 the outputs are
//   y0 = (u0 + s)/4,  y1/y2 = (u0 - s/2 -/+ j*(sqrt(3)/2)*d)/4,
// computed at twice the scale so that s/2 stays exact: one constant multiply
// by K = round(sqrt(3)*2^(TW-2)) per part of d. Data are complex, W bits per
// part; twiddles TW bits per part with 1.0 = 2^(TW-2). Products are truncated
// back to the data scale, the result is shifted right and saturated. The
// scale 1/4 keeps the sum of three unit-bounded terms in range. The
// butterfly function is that of the radix-3 signal-flow graph; number format,
// scaling and the s/d factoring are this design's choices. Purely
// combinational.
//
// Lint note: the upper bits of the full-width products are unused because
// only the rescaled part is kept.
module butterfly_r3 #(
  parameter int unsigned W  = 16,
  parameter int unsigned TW = 16
) (
  input  logic signed [W-1:0]  a0r, a0i, a1r, a1i, a2r, a2i,
  input  logic signed [TW-1:0] w1r, w1i, w2r, w2i,
  output logic signed [W-1:0]  y0r, y0i, y1r, y1i, y2r, y2i
);
  localparam int unsigned PW = W + TW + 4;   // product width
  localparam int unsigned XW = W + 5;        // data-scale working width
  localparam logic signed [PW-1:0] K = PW'($rtoi($floor($sqrt(3.0) * (2.0 ** (TW - 2)) + 0.5)));
  localparam logic signed [XW-1:0] MAXV = XW'((1 << (W - 1)) - 1);
  localparam logic signed [XW-1:0] MINV = -XW'(1 << (W - 1));

  logic signed [PW-1:0] p1r, p1i, p2r, p2i, kr, ki;
  logic signed [XW-1:0] u0r, u0i, u1r, u1i, u2r, u2i;
  logic signed [XW-1:0] sr, si, dr, di, cr, ci, qr, qi;
  logic signed [XW-1:0] z0r, z0i, z1r, z1i, z2r, z2i;   // 2*y*4

  function automatic logic signed [W-1:0] sat(input logic signed [XW-1:0] v);
    if (v > MAXV) return MAXV[W-1:0];
    if (v < MINV) return MINV[W-1:0];
    return v[W-1:0];
  endfunction

  // parts of the complex product (x + jy)(u + jv) at data scale
  function automatic logic signed [PW-1:0] mre(input logic signed [W-1:0] x, y,
                                               input logic signed [TW-1:0] u, v);
    return (PW'(x) * PW'(u) - PW'(y) * PW'(v)) >>> (TW - 2);
  endfunction
  function automatic logic signed [PW-1:0] mim(input logic signed [W-1:0] x, y,
                                               input logic signed [TW-1:0] u, v);
    return (PW'(x) * PW'(v) + PW'(y) * PW'(u)) >>> (TW - 2);
  endfunction

  always_comb begin
    p1r = mre(a1r, a1i, w1r, w1i);
    p1i = mim(a1r, a1i, w1r, w1i);
    p2r = mre(a2r, a2i, w2r, w2i);
    p2i = mim(a2r, a2i, w2r, w2i);
    u0r = XW'(a0r);
    u0i = XW'(a0i);
    u1r = p1r[XW-1:0];
    u1i = p1i[XW-1:0];
    u2r = p2r[XW-1:0];
    u2i = p2i[XW-1:0];
    sr  = u1r + u2r;
    si  = u1i + u2i;
    dr  = u1r - u2r;
    di  = u1i - u2i;
    kr  = (PW'(dr) * K) >>> (TW - 2);     // sqrt(3) * d
    ki  = (PW'(di) * K) >>> (TW - 2);
    qr  = kr[XW-1:0];
    qi  = ki[XW-1:0];
    cr  = (u0r <<< 1) - sr;                // 2*u0 - s
    ci  = (u0i <<< 1) - si;
    z0r = (u0r + sr) <<< 1;
    z0i = (u0i + si) <<< 1;
    z1r = cr + qi;
    z1i = ci - qr;
    z2r = cr - qi;
    z2i = ci + qr;
    y0r = sat(z0r >>> 3);
    y0i = sat(z0i >>> 3);
    y1r = sat(z1r >>> 3);
    y1i = sat(z1i >>> 3);
    y2r = sat(z2r >>> 3);
    y2i = sat(z2i >>> 3);
  end
endmodule
