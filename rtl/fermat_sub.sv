// fermat_sub: subtraction modulo 2^n + 1 of two residues in 0..2^n.
//
// The (n+2)-bit two's complement difference gives two top bits c0 (bit n+1)
// and c1 (bit n) and low bits t1. A negative difference has c0 = c1 = 1, and
// adding one to t1 (n+1 bits) adds q = 2^n + 1 modulo 2^(n+1). A difference of
// exactly 2^n has c0 = 0, c1 = 1 and gets bit n set back:
//   t2 = t1 + (c0 & c1);  r = t2 + (~c0 & c1) * 2^n
// Combinational.
//
// Follows the published algorithm, with the same carry naming as fermat_add.
module fermat_sub #(
  parameter int N = 20
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] r
);
  logic [N-1:0] t1;
  logic [N:0]   t2;
  logic         c0, c1;

  always_comb begin
    {c0, c1, t1} = {1'b0, a} - {1'b0, b};
    t2 = {1'b0, t1} + (N+1)'(c0 & c1);
    r  = t2 | {(~c0 & c1), {N{1'b0}}};
  end
endmodule
