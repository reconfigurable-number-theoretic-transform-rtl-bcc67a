// mod_const_mul: multiplication of a residue by the constant 2^EXP modulo
// 2^n - 1 or 2^n + 1 (a twiddle factor of the transform, omega^k = 2^EXP).
//
// Mersenne: 2^n = 1, so the product is the n-bit residue rotated left by
// EXP mod n -- pure wiring, no logic. Fermat: 2^n = -1, so with
// e = EXP mod 2n the residue is shifted left by e mod n (wiring), the 2n-bit
// result is folded by mod_reduce, and for e >= n the result is negated
// (subtracted from zero). A zero exponent is a plain connection. The
// defaults are the 2^20 + 1 ring with omega = 32 = 2^5.
// Combinational.
//
// Shift-as-wiring and reduction follow the published design; the negation for
// exponents >= n is this implementation's addition (needed by the inverse).
module mod_const_mul #(
  parameter int N      = 20,
  parameter bit FERMAT = 1'b1,
  parameter int EXP    = 5,
  localparam int W     = FERMAT ? N + 1 : N
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  localparam int ORDER = FERMAT ? 2 * N : N;
  localparam int E     = EXP % ORDER;
  localparam bit NEG   = FERMAT && (E >= N);
  localparam int S     = NEG ? E - N : E;

  if (E == 0) begin : g_pass
    assign y = x;
  end else if (!FERMAT) begin : g_rot
    assign y = (x << S) | (x >> (N - S));
  end else begin : g_shift_reduce
    logic [2*N-1:0] prod;
    logic [W-1:0]   red;
    assign prod = (2*N)'(x) << S;
    mod_reduce #(.N(N), .FERMAT(1'b1)) u_red (.a(prod), .r(red));
    if (NEG) begin : g_neg
      fermat_sub #(.N(N)) u_neg (.a('0), .b(red), .r(y));
    end else begin : g_pos
      assign y = red;
    end
  end
endmodule
