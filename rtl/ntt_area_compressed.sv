// ntt_area_compressed: iterative D-point NTT built from a single layer of the
// constant-geometry FFT.
//
// In a constant-geometry network every layer has the same wiring: butterfly k
// reads positions k and k + D/2 and writes the sum to 2k and the difference,
// multiplied by the twiddle 2^(OMEGA_EXP * ((k >> s) << s)) of stage s, to
// 2k + 1 (decimation in frequency). One such layer, D/2 butterflies and D/2
// run-time shifters (mod_var_mul), is built once; its D outputs are
// registered and fed back, and a stage counter selects the twiddles. After
// log2(D) clocks the registers hold the transform in bit-reversed order,
// which the output wiring undoes; Mersenne outputs are normalised.
//
// Handshake: start (sampled when busy is low) loads x and computes stage 0 in
// the same clock; busy stays high for the remaining log2(D) - 1 clocks; done
// pulses for one clock when y becomes valid. y holds until the next start,
// which may be given in the clock that done is high, so a new transform can
// begin every log2(D) clocks. rst_n is asynchronous, active low.
//
// One constant-geometry layer with registered feedback, run-time shifters and
// a stage counter follows the published design; the twiddle formula, the
// input multiplexer and the handshake are this implementation's choices.
module ntt_area_compressed
  import ntt_pkg::*;
#(
  parameter int N         = 19,
  parameter bit FERMAT    = 1'b0,
  parameter int D         = 16,
  parameter int OMEGA_EXP = 1,
  localparam int W        = FERMAT ? N + 1 : N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [D-1:0][W-1:0] x,
  output logic                busy,
  output logic                done,
  output logic [D-1:0][W-1:0] y
);
  localparam int M     = $clog2(D);
  localparam int ORDER = two_order(N, FERMAT);
  localparam int EW    = $clog2(ORDER);
  localparam int SW    = $clog2(M + 1);

  logic [D-1:0][W-1:0] r, src, nxt;
  logic [SW-1:0]       stage, cur;
  logic                running;

  // Layer input: the new data on the first stage, the registers afterwards.
  assign src = running ? r : x;
  assign cur = running ? stage : '0;

  for (genvar k = 0; k < D / 2; k++) begin : g_bfly
    logic [W-1:0]  dif;
    logic [EW-1:0] e;
    ntt_butterfly #(.N(N), .FERMAT(FERMAT)) u_bf (
      .a(src[k]), .b(src[k+D/2]), .s(nxt[2*k]), .d(dif)
    );
    // Twiddle exponent of this butterfly for the current stage.
    always_comb begin
      e = '0;
      for (int s = 0; s < M; s++)
        if (32'(cur) == s) e = EW'(cg_exp(s, k, OMEGA_EXP, ORDER));
    end
    mod_var_mul #(.N(N), .FERMAT(FERMAT)) u_tw (.x(dif), .e(e), .y(nxt[2*k+1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r       <= '0;
      stage   <= '0;
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          r <= nxt;
          if (M == 1) begin
            done <= 1'b1;
          end else begin
            running <= 1'b1;
            stage   <= SW'(1);
          end
        end
      end else begin
        r <= nxt;
        if (32'(stage) == M - 1) begin
          running <= 1'b0;
          done    <= 1'b1;
          stage   <= '0;
        end else begin
          stage <= stage + SW'(1);
        end
      end
    end
  end

  assign busy = running;

  // done marks the end of a run: never while busy, never twice in a row.
  a_done_not_busy: assert property (@(posedge clk) done |-> !busy);
  a_done_single:   assert property (@(posedge clk) done |=> !done || $past(start));

  for (genvar i = 0; i < D; i++) begin : g_out
    if (FERMAT) begin : g_f
      assign y[i] = r[bitrev(i, M)];
    end else begin : g_m
      mod_normalize #(.N(N)) u_norm (.x(r[bitrev(i, M)]), .y(y[i]));
    end
  end
endmodule
