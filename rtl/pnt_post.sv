// pnt_post: post-processing of the pseudo number transform, an exact
// division of a multiple of p by the constant p.
//
// With beta * p = 2^SIGMA - 1,
//   1/p = beta / 2^SIGMA * (1 + 2^-SIGMA)(1 + 2^-2SIGMA)(1 + 2^-4SIGMA)...
// The input is multiplied by beta, then K = ceil(log2(n/SIGMA)) shift-add
// passes z <- z + z * 2^(-2^i * SIGMA) build the series in fixed point with
// FRAC extra fraction bits (right shifts truncate), and the binary point is
// moved SIGMA places. Truncation leaves z just below the exact integer
// quotient, so the quotient is the integer part plus one when any fraction
// bit is set. For 2^n - 1 the all-ones code of zero is cleared first.
// The quotient is below 2^W, so the bits of z above FRAC + SIGMA + W are
// always zero and are left unused. Combinational.
//
// The series and the final round-up follow the published division algorithm;
// the guard-bit count FRAC and the defaults p = 5, beta = 3, sigma = 4 are
// this implementation's choices.
module pnt_post #(
  parameter int N      = 22,
  parameter bit FERMAT = 1'b1,
  parameter int P      = 5,
  parameter int BETA   = 3,
  parameter int SIGMA  = 4,
  parameter int FRAC   = 8,
  localparam int W     = FERMAT ? N + 1 : N
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] b
);
  function automatic int passes(int n, int sigma);
    int k;
    k = 0;
    while ((sigma << k) < n) k++;
    return k;
  endfunction

  localparam int K  = passes(N, SIGMA);
  localparam int BW = $clog2(BETA + 1);
  localparam int ZW = W + BW + 1 + FRAC + SIGMA;

  logic [W-1:0]  an;
  logic [ZW-1:0] z [K+1];
  logic [W-1:0]  ip;
  logic          fr;

  if (FERMAT) begin : g_f
    assign an = a;
  end else begin : g_m
    mod_normalize #(.N(N)) u_norm (.x(a), .y(an));
  end

  assign z[0] = (ZW'(an) * ZW'(BETA)) << FRAC;
  for (genvar i = 0; i < K; i++) begin : g_pass
    assign z[i+1] = z[i] + (z[i] >> (SIGMA << i));
  end

  assign ip = z[K][FRAC+SIGMA +: W];
  assign fr = |z[K][FRAC+SIGMA-1:0];
  assign b  = ip + W'(fr);

  initial begin
    assert (BETA * P == (1 << SIGMA) - 1)
      else $error("pnt_post: BETA*P must equal 2^SIGMA-1");
  end
endmodule
