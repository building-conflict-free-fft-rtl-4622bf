// addr_gen: schedule controller of the conflict-free FFT.
//
// Walks the transform one operation at a time. An operation runs B
// butterflies of radix R (2 or 4) and covers R*B consecutive schedule
// positions: operation k covers positions RBk .. RBk+RB-1 and butterfly j
// takes positions RBk+Rj .. RBk+Rj+R-1. Each position goes through the
// generate step (schedule_gen) and the reorder step (reorder_unit) of stage
// s.
//
// Radix 2: stages s = 0..S-1. The two datapoints of a butterfly are 2^s
// apart; dp[2j] is the one with bit s clear (upper input), dp[2j+1] the
// other. The twiddle exponent is (dp[2j] mod 2^s) * 2^(S-1-s), the radix-2
// DIT rule for data stored in bit-reversed order.
//
// Radix 4: the operation does the work of radix-2 stages s and s+1 at once,
// for s = 0, 2, 4, ... (S must be even). Four consecutive positions of a
// stage-s group differ exactly in bits s and s+1, before and after the
// reorder step, so they are the four inputs of one radix-4 butterfly; the
// group of G >= 4B keeps them conflict free. dp[4j+v] is the datapoint whose
// bits (s+1, s) equal v. With a = dp[4j] mod 2^s the butterfly needs three
// twiddle exponents: a * 2^(S-1-s) for its first radix-2 layer (stage s) and
// a * 2^(S-2-s), (a + 2^s) * 2^(S-2-s) for its second (stage s+1).
//
// Interface: `start` (while idle or not) clears the counters and makes the
// first operation valid on the next cycle; the current operation is shown
// combinationally while `valid` is high and is consumed by `advance`; `last`
// marks the final operation of the transform. After it is consumed `valid`
// falls. Counters reset synchronously with rst_n.
//
// `len` is sampled with `start` and selects a transform of 2^len points
// (T <= len <= S, even for radix 4) on the same logic, with datapoint bits
// above len zero. Twiddle exponents stay in units of the full-size table,
// since W_(2^len)^k = W_D^(k*D/2^len).
//
// The schedule follows the generate/reorder construction; operating radix 4
// as two fused radix-2 stages on the radix-2 schedule is this design's
// reading of the rule that G = B*R covers one radix-4 butterfly.
// Lint notes: reorder_unit's `bank` output is not needed here and is left
// open; the top bits of the shifted twiddle indices are always discarded.
module addr_gen #(
  parameter int unsigned D = 1024,
  parameter int unsigned B = 1,
  parameter int unsigned G = 4,
  parameter int unsigned R = 2,
  localparam int unsigned S    = $clog2(D),
  localparam int unsigned T    = $clog2(G),
  localparam int unsigned SW   = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned OPS  = D / (R * B),
  localparam int unsigned OW   = (OPS > 1) ? $clog2(OPS) : 1,
  localparam int unsigned LW   = $clog2(S + 1),
  localparam int unsigned NP   = R * B,
  localparam int unsigned NT   = R - 1          // twiddles per butterfly
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] len,
  input  logic          advance,
  output logic          valid,
  output logic          last,
  output logic [SW-1:0] stage,
  output logic [OW-1:0] op,
  output logic [S-1:0]  dp [NP],
  output logic [S-2:0]  tw [B][NT]
);
  localparam int unsigned LR = $clog2(R);      // radix-2 stages per operation

  logic          active_q;
  logic [SW-1:0] stage_q;
  logic [OW-1:0] op_q;
  logic [LW-1:0] len_q;
  logic [OW-1:0] op_last;   // operations per stage - 1 at the running length
  logic          stage_last;

  // 2^len / (RB) - 1, computed in a wider word so that len = S does not wrap
  assign op_last    = OW'((((S + 1)'(1) << len_q) >> $clog2(R * B)) - (S + 1)'(1));
  assign stage_last = int'(stage_q) == int'(len_q) - int'(LR);

  logic [S-1:0] pos   [NP];
  logic [S-1:0] dgen  [NP];
  logic [S-1:0] delta [NP];

  assign valid = active_q;
  assign stage = stage_q;
  assign op    = op_q;
  assign last  = active_q && stage_last && op_q == op_last;

  for (genvar n = 0; n < int'(NP); n++) begin : g_pos
    assign pos[n] = S'(op_q) * S'(NP) + S'(n);
    schedule_gen #(.S(S), .T(T)) u_gen (.len(len_q), .stage(stage_q), .i(pos[n]), .d(dgen[n]));
    reorder_unit #(.S(S), .T(T)) u_reo (.len(len_q), .stage(stage_q), .d(dgen[n]), .delta(delta[n]), .bank());
  end

  for (genvar j = 0; j < int'(B); j++) begin : g_bf
    logic [S-1:0] mask;
    logic [S-1:0] base;
    logic [S-1:0] twx [NT];
    logic [1:0]   v;   // position of a datapoint inside its butterfly
    always_comb begin
      mask = (S'(1) << stage_q) - S'(1);
      base = '0;
      for (int e = 0; e < int'(R); e++) begin
        v = 2'(delta[R*j+e] >> stage_q);
        if (R == 2) v[1] = 1'b0;
        dp[R*j + int'(v)] = delta[R*j+e];
        base = delta[R*j+e] & mask;
      end
      twx[0] = base << (SW'(S - 1) - stage_q);
      if (R == 4) begin
        twx[NT-2] = base << (SW'(S - 2) - stage_q);
        twx[NT-1] = (base | (S'(1) << stage_q)) << (SW'(S - 2) - stage_q);
      end
      for (int t = 0; t < int'(NT); t++) tw[j][t] = twx[t][S-2:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      stage_q  <= '0;
      op_q     <= '0;
      len_q    <= LW'(S);
    end else if (start) begin
      active_q <= 1'b1;
      stage_q  <= '0;
      op_q     <= '0;
      len_q    <= len;
    end else if (advance && active_q) begin
      if (last) begin
        active_q <= 1'b0;
        stage_q  <= '0;
        op_q     <= '0;
      end else if (op_q == op_last) begin
        op_q    <= '0;
        stage_q <= stage_q + SW'(LR);
      end else begin
        op_q <= op_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && start)
      assert (int'(len) >= int'(T) && int'(len) <= int'(S) && (1 << len) >= int'(NP) &&
              int'(len) % int'(LR) == 0)
        else $error("unsupported transform length 2^%0d", len);
  end
endmodule
