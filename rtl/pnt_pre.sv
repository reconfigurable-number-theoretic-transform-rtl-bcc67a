// pnt_pre: pre-processing of the pseudo Fermat/Mersenne number transform.
//
// A pseudo transform works modulo q/p, with q = 2^n +- 1 and p a divisor of q.
// Each input x (already reduced mod q/p) is multiplied by the constant p, so
// that the transform can then run with the cheap mod-q arithmetic. The product
// is a sum of shifted copies of x, one per set bit of p (hamming(p) - 1
// adders). Since x < q/p, x * p < q and no reduction is needed.
// Combinational.
//
// Multiplying by p before the transform follows the published design; the
// value p = 5 is inferred, not published.
module pnt_pre #(
  parameter int N      = 22,
  parameter bit FERMAT = 1'b1,
  parameter int P      = 5,
  localparam int W     = FERMAT ? N + 1 : N
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  always_comb begin
    y = '0;
    for (int b = 0; b < W; b++)
      if (((P >> b) & 1) != 0) y = y + (x << b);
  end
endmodule
