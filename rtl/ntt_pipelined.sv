// ntt_pipelined: the decimation-in-time NTT network of ntt_comb with
// pipeline registers.
//
// A bank of D residue registers follows every log2(D)/STAGES layers (the last
// bank sits after the last layer, behind the Mersenne output normalisation),
// so the unit accepts one D-point transform per clock and delivers it STAGES
// clocks later. in_valid travels alongside as out_valid. log2(D) must be a
// multiple of STAGES. rst_n (asynchronous, active low) clears the valid bits;
// the data registers are not reset.
//
// Register banks of D residues per stage follow the published register
// counts; their placement and the valid bit are this implementation's choice.
module ntt_pipelined
  import ntt_pkg::*;
#(
  parameter int N         = 19,
  parameter bit FERMAT    = 1'b0,
  parameter int D         = 16,
  parameter int OMEGA_EXP = 1,
  parameter int STAGES    = 4,
  localparam int W        = FERMAT ? N + 1 : N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [D-1:0][W-1:0] x,
  output logic                out_valid,
  output logic [D-1:0][W-1:0] y
);
  localparam int M   = $clog2(D);
  localparam int PER = M / STAGES;  // layers per pipeline stage

  logic [D-1:0][W-1:0] lin  [M+1];  // input of each layer (lin[M]: output)
  logic [D-1:0][W-1:0] lout [M];    // combinational output of each layer
  logic [STAGES-1:0]   vld;

  for (genvar i = 0; i < D; i++) begin : g_in
    assign lin[0][i] = x[bitrev(i, M)];
  end

  for (genvar l = 0; l < M; l++) begin : g_layer
    logic [D-1:0][W-1:0] raw;
    ntt_layer #(
      .N(N), .FERMAT(FERMAT), .D(D), .OMEGA_EXP(OMEGA_EXP), .LAYER(l)
    ) u_layer (.v(lin[l]), .o(raw));

    if (l == M - 1 && !FERMAT) begin : g_norm
      for (genvar i = 0; i < D; i++) begin : g_n
        mod_normalize #(.N(N)) u_norm (.x(raw[i]), .y(lout[l][i]));
      end
    end else begin : g_raw
      assign lout[l] = raw;
    end

    if ((l + 1) % PER == 0) begin : g_reg
      always_ff @(posedge clk) lin[l+1] <= lout[l];
    end else begin : g_wire
      assign lin[l+1] = lout[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
    end else begin
      vld[0] <= in_valid;
      for (int s = 1; s < STAGES; s++) vld[s] <= vld[s-1];
    end
  end

  assign out_valid = vld[STAGES-1];
  assign y         = lin[M];

  initial begin
    assert (STAGES >= 1 && M % STAGES == 0)
      else $error("ntt_pipelined: log2(D)=%0d must be a multiple of STAGES=%0d", M, STAGES);
  end
endmodule
