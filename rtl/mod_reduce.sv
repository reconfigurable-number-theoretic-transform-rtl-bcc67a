// mod_reduce: reduction of a 2n-bit value modulo 2^n - 1 or 2^n + 1.
//
// A mod (2^n -+ 1) = (A mod 2^n  -+  floor(A / 2^n)) mod (2^n -+ 1).
// Mersenne (FERMAT = 0): the high half is added to the low half and the
// end-around carry is added back; the result is n bits and may be 2^n - 1,
// which is a second code for zero. Fermat (FERMAT = 1): the high half is
// subtracted from the low half and the borrow is added back (a negative
// difference plus 2^n + 1), giving a value 0..2^n in n+1 bits.
// Purely combinational: two n-bit adders in series.
//
// The fold-and-correct algorithm is the published one; keeping Fermat residues
// in n+1 bits is this implementation's choice.
module mod_reduce #(
  parameter int N      = 19,
  parameter bit FERMAT = 1'b0,
  localparam int W     = FERMAT ? N + 1 : N
) (
  input  logic [2*N-1:0] a,
  output logic [W-1:0]   r
);
  logic [N-1:0] lo, hi, tmp;
  logic         cb;  // carry (Mersenne) or borrow (Fermat) of the first adder

  assign lo = a[N-1:0];
  assign hi = a[2*N-1:N];

  always_comb begin
    if (FERMAT) begin
      {cb, tmp} = {1'b0, lo} - {1'b0, hi};
      r = W'({1'b0, tmp} + (N+1)'(cb));
    end else begin
      {cb, tmp} = {1'b0, lo} + {1'b0, hi};
      r = W'(tmp + N'(cb));
    end
  end
endmodule
