// bank_map: datapoint index -> (bank, row) for the conflict-free layout.
//
// Bank bit k is the parity (XOR) of every datapoint bit whose position is
// congruent to k modulo T, T = log2(number of banks):
//   m_k = d_k ^ d_(k+T) ^ d_(k+2T) ^ ...
// so the hardware is T XOR trees of fan-in about S/T. Because a group of G
// operands in the schedule differs only in T adjacent "toggle" bits, which
// cover every residue mod T exactly once, such a group always lands in G
// different banks. The row inside the bank is the upper S-T bits of d; this
// is a choice of this design (the bank number and the upper bits together
// determine the lower T bits, so the pair is unique).
// Purely combinational.
module bank_map #(
  parameter int unsigned S = 10,  // log2(D), bits of a datapoint index
  parameter int unsigned T = 2    // log2(G), bits of a bank number
) (
  input  logic [S-1:0]   d,
  output logic [T-1:0]   bank,
  output logic [S-T-1:0] row
);
  always_comb begin
    bank = '0;
    for (int unsigned b = 0; b < S; b++) bank[b % T] ^= d[b];
  end
  assign row = d[S-1:T];
endmodule
