// pnt_ntt: combinational pseudo Fermat/Mersenne number transform, the
// D-point NTT modulo q/p with q = 2^n +- 1 and p | q.
//
// NTT_q(p * x) = p * (NTT(x) mod q/p) because p divides q. So each input is
// multiplied by p (pnt_pre), the transform runs in the mod-q network
// (ntt_comb, shifts and mod 2^n +- 1 adders only), and each output is divided
// exactly by p (pnt_post). Inputs must be reduced mod q/p; outputs are in
// 0..q/p - 1. Natural order in and out. No clock.
//
// The pre-multiply / mod-q transform / divide chain follows the published
// design; the 16-point size and p = 5 are inferred defaults.
module pnt_ntt #(
  parameter int N         = 22,
  parameter bit FERMAT    = 1'b1,
  parameter int D         = 16,
  parameter int OMEGA_EXP = 2,
  parameter int P         = 5,
  parameter int BETA      = 3,
  parameter int SIGMA     = 4,
  localparam int W        = FERMAT ? N + 1 : N
) (
  input  logic [D-1:0][W-1:0] x,
  output logic [D-1:0][W-1:0] y
);
  logic [D-1:0][W-1:0] xp, yp;

  for (genvar i = 0; i < D; i++) begin : g_pre
    pnt_pre #(.N(N), .FERMAT(FERMAT), .P(P)) u_pre (.x(x[i]), .y(xp[i]));
  end

  ntt_comb #(.N(N), .FERMAT(FERMAT), .D(D), .OMEGA_EXP(OMEGA_EXP)) u_ntt (.x(xp), .y(yp));

  for (genvar i = 0; i < D; i++) begin : g_post
    pnt_post #(.N(N), .FERMAT(FERMAT), .P(P), .BETA(BETA), .SIGMA(SIGMA)) u_post (
      .a(yp[i]), .b(y[i])
    );
  end
endmodule
