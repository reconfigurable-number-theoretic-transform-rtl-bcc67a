// mod_normalize: canonical form of a residue modulo 2^n - 1.
//
// Mersenne arithmetic lets all-ones (2^n - 1) stand for zero inside the
// network. At the transform output an all-ones detector (an AND tree) clears
// such a word to 0, so every output is in 0..2^n - 2. Combinational.
//
// The published design budgets such a post-processing unit per output; its
// contents (detector plus clear) are this implementation's reading.
module mod_normalize #(
  parameter int N = 19
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);
  assign y = (&x) ? '0 : x;
endmodule
