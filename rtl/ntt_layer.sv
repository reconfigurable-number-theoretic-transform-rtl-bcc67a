// ntt_layer: one layer of the radix-2 decimation-in-time NTT network.
//
// Layer L pairs positions i and i + 2^L inside blocks of 2^(L+1) and puts the
// sum at i and the difference at i + 2^L. Each output that enters the next
// layer as the twiddled element of a pair is then multiplied by its constant
// twiddle omega^k = 2^(OMEGA_EXP*k) (mod_const_mul: a rotation for 2^n - 1,
// shift and reduction for 2^n + 1), so layer L+1 receives ready operands.
// In a network of log2(D) layers, the last layer has no twiddles.
// Combinational.
//
// The layer spans and the placement of twiddle reductions on the producing
// node follow the published 16-point network figure.
module ntt_layer
  import ntt_pkg::*;
#(
  parameter int N         = 19,
  parameter bit FERMAT    = 1'b0,
  parameter int D         = 16,
  parameter int OMEGA_EXP = 1,
  parameter int LAYER     = 0,
  localparam int W        = FERMAT ? N + 1 : N
) (
  input  logic [D-1:0][W-1:0] v,
  output logic [D-1:0][W-1:0] o
);
  localparam int M     = $clog2(D);
  localparam int H     = 1 << LAYER;
  localparam int ORDER = two_order(N, FERMAT);

  logic [D-1:0][W-1:0] bf;  // butterfly outputs before twiddling

  for (genvar i = 0; i < D; i++) begin : g_node
    if ((i & H) == 0) begin : g_bfly
      ntt_butterfly #(.N(N), .FERMAT(FERMAT)) u_bf (
        .a(v[i]), .b(v[i+H]), .s(bf[i]), .d(bf[i+H])
      );
    end
    mod_const_mul #(
      .N(N), .FERMAT(FERMAT), .EXP(dit_next_exp(LAYER, i, M, OMEGA_EXP, ORDER))
    ) u_tw (.x(bf[i]), .y(o[i]));
  end
endmodule
