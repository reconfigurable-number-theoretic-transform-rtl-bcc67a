// fermat_add: addition modulo 2^n + 1 of two residues in 0..2^n.
//
// The (n+2)-bit sum is split into its two carry bits c0 (bit n+1), c1 (bit n)
// and the low n bits t. A zero flag on t separates the exact sums 2^n and
// 2^(n+1) from ordinary overflow:
//   flag1 = (t == 0) & (c0 ^ c1)       -- bit n of the result before correction
//   flag2 = c0 | ((t != 0) & ~c0 & c1) -- subtract one (i.e. subtract 2^n + 1)
//   r     = {flag1, t} - flag2
// Combinational: one (n+2)-bit adder, a zero detector and a decrementer.
//
// Follows the published algorithm; which carry is c0 and which c1 was fixed
// here as the only assignment for which it is correct.
module fermat_add #(
  parameter int N = 20
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] r
);
  logic [N-1:0] t;
  logic         c0, c1, flag0, flag1, flag2;

  always_comb begin
    {c0, c1, t} = {1'b0, a} + {1'b0, b};
    flag0 = |t;
    flag1 = ~flag0 & (c0 ^ c1);
    flag2 = c0 | (flag0 & ~c0 & c1);
    r = {flag1, t} - (N+1)'(flag2);
  end
endmodule
