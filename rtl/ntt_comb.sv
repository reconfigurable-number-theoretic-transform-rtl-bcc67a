// ntt_comb: combinational D-point number theoretic transform,
//   y_i = sum_j x_j * omega^(i*j) mod q,  omega = 2^OMEGA_EXP,
// for q = 2^n - 1 (FERMAT = 0) or q = 2^n + 1 (FERMAT = 1).
//
// The input is bit-reverse permuted (wiring only) and passed through log2(D)
// decimation-in-time layers (ntt_layer). Every twiddle is a constant power of
// two, so it costs a rotation (Mersenne) or a shift plus reduction (Fermat);
// the logic is essentially the modular adders and subtractors. For the
// Mersenne ring the outputs are normalised (all-ones -> 0). Inputs and outputs
// are in natural order, residues of W bits (n, or n+1 for Fermat). The result
// equals the transform above when omega has order D in Z_q; otherwise it is
// the same radix-2 network evaluated with that omega. No clock.
//
// The network follows the published combinational design; the input bit
// reversal by wiring and natural-order ports are this implementation's choice.
module ntt_comb
  import ntt_pkg::*;
#(
  parameter int N         = 19,
  parameter bit FERMAT    = 1'b0,
  parameter int D         = 16,
  parameter int OMEGA_EXP = 1,
  localparam int W        = FERMAT ? N + 1 : N
) (
  input  logic [D-1:0][W-1:0] x,
  output logic [D-1:0][W-1:0] y
);
  localparam int M = $clog2(D);

  logic [D-1:0][W-1:0] lv [M+1];

  for (genvar i = 0; i < D; i++) begin : g_in
    assign lv[0][i] = x[bitrev(i, M)];
  end

  for (genvar l = 0; l < M; l++) begin : g_layer
    ntt_layer #(
      .N(N), .FERMAT(FERMAT), .D(D), .OMEGA_EXP(OMEGA_EXP), .LAYER(l)
    ) u_layer (.v(lv[l]), .o(lv[l+1]));
  end

  for (genvar i = 0; i < D; i++) begin : g_out
    if (FERMAT) begin : g_f
      assign y[i] = lv[M][i];
    end else begin : g_m
      mod_normalize #(.N(N)) u_norm (.x(lv[M][i]), .y(y[i]));
    end
  end
endmodule
