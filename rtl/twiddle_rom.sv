// twiddle_rom: read-only table of the radix-2 twiddle factors.
//
// Entry k (0 <= k < D/2) holds W_D^k = exp(-j*2*pi*k/D):
//   wr = round( cos(2*pi*k/D) * 2^(TW-2))
//   wi = round(-sin(2*pi*k/D) * 2^(TW-2))
// so 1.0 is 2^(TW-2). The table is computed at elaboration by a constant
// function and read asynchronously. One ROM holding precomputed twiddles is
// what the schedule's reference implementation used; its format is this
// design's choice. The engine instantiates one copy per butterfly.
module twiddle_rom #(
  parameter int unsigned D  = 1024,
  parameter int unsigned TW = 16,
  localparam int unsigned KW = $clog2(D) - 1
) (
  input  logic [KW-1:0]        k,
  output logic signed [TW-1:0] wr,
  output logic signed [TW-1:0] wi
);
  localparam real PI = 3.14159265358979323846;
  typedef logic [2*TW-1:0] table_t [D/2];

  function automatic table_t make_table();
    table_t t;
    real a;
    for (int n = 0; n < int'(D / 2); n++) begin
      a = 2.0 * PI * n / D;
      t[n] = {TW'($rtoi($floor( $cos(a) * (2.0 ** (TW - 2)) + 0.5))),
              TW'($rtoi($floor(-$sin(a) * (2.0 ** (TW - 2)) + 0.5)))};
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  assign {wr, wi} = TABLE[k];
endmodule
