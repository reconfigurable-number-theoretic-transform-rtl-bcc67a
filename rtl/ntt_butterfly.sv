// ntt_butterfly: one radix-2 butterfly, s = a + b and d = a - b modulo q.
//
// For q = 2^n - 1 the two halves are mersenne_addsub instances; for
// q = 2^n + 1 they are fermat_add and fermat_sub. Twiddle multiplication is
// not part of the butterfly: the networks attach it to the node that feeds
// it. Combinational.
//
// Follows the published node pairing (square = add, circle = subtract).
module ntt_butterfly #(
  parameter int N      = 19,
  parameter bit FERMAT = 1'b0,
  localparam int W     = FERMAT ? N + 1 : N
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic [W-1:0] d
);
  if (FERMAT) begin : g_fermat
    fermat_add #(.N(N)) u_add (.a(a), .b(b), .r(s));
    fermat_sub #(.N(N)) u_sub (.a(a), .b(b), .r(d));
  end else begin : g_mersenne
    mersenne_addsub #(.N(N), .SUB(1'b0)) u_add (.a(a), .b(b), .r(s));
    mersenne_addsub #(.N(N), .SUB(1'b1)) u_sub (.a(a), .b(b), .r(d));
  end
endmodule
