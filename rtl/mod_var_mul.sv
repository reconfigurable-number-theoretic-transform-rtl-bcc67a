// mod_var_mul: multiplication of a residue by 2^e for a run-time exponent e,
// modulo 2^n - 1 or 2^n + 1. Used where the twiddle changes from cycle to
// cycle (the area-compressed transform).
//
// Mersenne: a barrel rotator, e in 0..n-1. Fermat: e in 0..2n-1; a barrel
// shifter by e mod n feeds mod_reduce, and for e >= n the reduced value is
// subtracted from zero (2^n = -1). Out-of-range exponents are the caller's
// responsibility. Combinational.
//
// The published design only asks for 'a shifter plus reduction'; the plain
// barrel shifter is this implementation's choice.
module mod_var_mul #(
  parameter int N      = 19,
  parameter bit FERMAT = 1'b0,
  localparam int W     = FERMAT ? N + 1 : N,
  localparam int EW    = $clog2(FERMAT ? 2 * N : N)
) (
  input  logic [W-1:0]  x,
  input  logic [EW-1:0] e,
  output logic [W-1:0]  y
);
  if (!FERMAT) begin : g_rot
    assign y = (x << e) | (x >> (N - 32'(e)));
  end else begin : g_shift_reduce
    logic           neg;
    logic [EW-1:0]  s;
    logic [2*N-1:0] prod;
    logic [W-1:0]   red, negd;
    assign neg  = 32'(e) >= N;
    assign s    = neg ? EW'(32'(e) - N) : e;
    assign prod = (2*N)'(x) << s;
    mod_reduce #(.N(N), .FERMAT(1'b1)) u_red (.a(prod), .r(red));
    fermat_sub #(.N(N)) u_neg (.a('0), .b(red), .r(negd));
    assign y = neg ? negd : red;
  end
endmodule
