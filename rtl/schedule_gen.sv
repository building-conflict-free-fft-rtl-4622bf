// schedule_gen: "generate" step of the conflict-free schedule.
//
// Maps schedule position i of stage s to the datapoint index d that the
// modified Cooley-Tukey schedule visits there. In stages 0..S-T the index is
// i rotated left by s bits (the classic in-place order; the pair partner of a
// datapoint sits 2^s away). In the last T-1 stages the plain rotation would
// split the toggle bits, so instead the low T bits of i (the toggle count t)
// are rotated left by s-(S-T) within T bits and placed on top of the high
// S-T bits of i: d = {rot_T(t, s-(S-T)), i[S-1:T]}. This keeps the T toggle
// bits adjacent in every stage. Purely combinational.
//
// The schedule is built for up to S stages; `len` (T..S) selects a shorter
// transform of 2^len points at run time, which uses the same logic with the
// datapoint bits above len held at zero. Position i must then be below
// 2^len. The run-time length follows the schedule's remark that one map
// serves any length up to the maximum; applying it to this step too is this
// design's choice.
// Lint note: the short rotation is formed as a shift of a doubled word; the
// half that is not the rotated result is unused by construction.
module schedule_gen #(
  parameter int unsigned S  = 10,
  parameter int unsigned T  = 2,
  parameter int unsigned SW = (S > 1) ? $clog2(S) : 1, // width of the stage number
  parameter int unsigned LW = $clog2(S + 1)             // width of the length
) (
  input  logic [LW-1:0] len,
  input  logic [SW-1:0] stage,
  input  logic [S-1:0]  i,
  output logic [S-1:0]  d
);
  logic [S-1:0]   mask;     // the low len bits
  logic [S-1:0]   rot_s;    // rot_len(i, s)
  logic [2*T-1:0] rot_t;    // {t,t} << r, upper half is rot_T(t, r)
  logic [SW-1:0]  r;

  always_comb begin
    mask  = S'((S + 1)'(1) << len) - S'(1);
    rot_s = ((i << stage) | (i >> (LW'(len) - LW'(stage)))) & mask;
    r     = stage - SW'(len - LW'(T));
    rot_t = {i[T-1:0], i[T-1:0]} << r;
    if (int'(stage) <= int'(len) - int'(T)) d = rot_s;
    else                                    d = (i >> T) | (S'(rot_t[2*T-1:T]) << (len - LW'(T)));
  end
endmodule
