// intt: pipelined inverse number theoretic transform,
//   y_i = D^-1 * sum_j x_j * omega^(-i*j) mod q.
//
// omega^-1 = 2^(order - OMEGA_EXP) and D^-1 = 2^(order - log2 D) are powers of
// two as well (order = n for 2^n - 1, 2n for 2^n + 1), so the inverse is the
// forward pipelined network (ntt_pipelined) run with the inverse root,
// followed by one constant shift per output for the scaling. Same timing as
// ntt_pipelined: one transform per clock, STAGES clocks of latency.
// Meaningful when omega has order D in Z_q.
//
// Only the inverse formula is published; this structure is this
// implementation's.
module intt
  import ntt_pkg::*;
#(
  parameter int N         = 20,
  parameter bit FERMAT    = 1'b1,
  parameter int D         = 8,
  parameter int OMEGA_EXP = 5,
  parameter int STAGES    = 3,
  localparam int W        = FERMAT ? N + 1 : N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [D-1:0][W-1:0] x,
  output logic                out_valid,
  output logic [D-1:0][W-1:0] y
);
  localparam int ORDER   = two_order(N, FERMAT);
  localparam int INV_EXP = ORDER - (OMEGA_EXP % ORDER);
  localparam int SCALE   = ORDER - $clog2(D);

  logic [D-1:0][W-1:0] t;

  ntt_pipelined #(
    .N(N), .FERMAT(FERMAT), .D(D), .OMEGA_EXP(INV_EXP), .STAGES(STAGES)
  ) u_net (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .out_valid(out_valid), .y(t)
  );

  for (genvar i = 0; i < D; i++) begin : g_scale
    mod_const_mul #(.N(N), .FERMAT(FERMAT), .EXP(SCALE)) u_scale (.x(t[i]), .y(y[i]));
  end
endmodule
