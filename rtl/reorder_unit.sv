// reorder_unit: "reorder" step of the conflict-free schedule (LREP / RREP).
//
// Takes the datapoint d produced by schedule_gen for stage s and replaces
// each of its T toggle bits at position b by bank bit m_(b mod T) of d.
// Toggle bits sit at positions s..s+T-1 in stages 0..S-T (LREP) and at the
// top, positions S-T..S-1, in the remaining stages (RREP). Each bank bit is
// the toggle bit XOR a constant of the group, so the result is still the same
// group, only visited in an order in which the bank numbers follow one fixed
// sequence in every aligned group of a stage. That strict order is what makes
// every window of G consecutive accesses, aligned or not, conflict free.
// Purely combinational; `bank` is the bank number of the input d. `len` is
// the stage count of the running transform (T..S); the top toggle bits of
// the last stages sit just below bit len.
// Lint note: bank_map's `row` output is not needed here and is left open.
module reorder_unit #(
  parameter int unsigned S  = 10,
  parameter int unsigned T  = 2,
  parameter int unsigned SW = (S > 1) ? $clog2(S) : 1,
  parameter int unsigned LW = $clog2(S + 1)
) (
  input  logic [LW-1:0] len,
  input  logic [SW-1:0] stage,
  input  logic [S-1:0]  d,
  output logic [S-1:0]  delta,
  output logic [T-1:0]  bank
);
  bank_map #(.S(S), .T(T)) u_map (.d(d), .bank(bank), .row());

  always_comb begin
    delta = d;
    for (int unsigned b = 0; b < S; b++) begin
      if (int'(stage) <= int'(len) - int'(T)) begin
        if (b >= int'(stage) && b < int'(stage) + T) delta[b] = bank[b % T];
      end else if (int'(b) >= int'(len) - int'(T) && int'(b) < int'(len)) begin
        delta[b] = bank[b % T];
      end
    end
  end
endmodule
