// sma_ntt_top: the transform units of a spectral modular arithmetic (SMA)
// processor.
//
// SMA multiplies long integers in the spectral domain: an initial NTT takes
// the operand polynomials into the transform domain, a spectral processing
// unit works on them pointwise, and a final inverse NTT returns the result.
// This top contains
//   * the SMA front and back end: Init NTT (ntt_pipelined) -> sma_spec_* ports
//     to an external spectral unit -> sma_proc_* ports back -> Final INTT
//     (intt), on the Fermat ring 2^20 + 1 with omega = 32, D = 8;
//   * side by side, the transform architectures with their own ports:
//     combinational NTTs modulo 2^20 + 1 (D = 8, omega = 32) and 2^19 - 1
//     (D = 16, omega = 2), the pipelined (PIPE_STAGES register banks) and
//     area-compressed NTTs modulo 2^19 - 1, and the combinational pseudo
//     Fermat transform modulo (2^22 + 1)/5 (D = 16, omega = 4).
// All vectors are D residues in natural order, element i in bits
// [i*W +: W] of the packed array. Timing is that of each unit: combinational
// paths for comb_* and pnt_*, PIPE_STAGES / SMA_STAGES clocks of latency at
// one transform per clock for pipe_* and sma_*, log2(MNT_D) clocks per
// transform for ac_*. clk and rst_n (asynchronous, active low) are shared.
//
// The SMA chain follows the published processor diagram; placing the
// evaluated architectures side by side and using pipelined units in the
// chain are this implementation's choices.
module sma_ntt_top #(
  parameter int MNT_N         = 19,
  parameter int MNT_D         = 16,
  parameter int MNT_OMEGA_EXP = 1,
  parameter int PIPE_STAGES   = 4,
  parameter int FNT_N         = 20,
  parameter int FNT_D         = 8,
  parameter int FNT_OMEGA_EXP = 5,
  parameter int SMA_STAGES    = 3,
  parameter int PNT_N         = 22,
  parameter int PNT_D         = 16,
  parameter int PNT_OMEGA_EXP = 2,
  parameter int PNT_P         = 5,
  parameter int PNT_BETA      = 3,
  parameter int PNT_SIGMA     = 4,
  localparam int MW           = MNT_N,
  localparam int FW           = FNT_N + 1,
  localparam int PW           = PNT_N + 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // SMA front end (Init NTT)
  input  logic                        sma_in_valid,
  input  logic [FNT_D-1:0][FW-1:0]    sma_x,
  output logic                        sma_spec_valid,
  output logic [FNT_D-1:0][FW-1:0]    sma_spec,
  // SMA back end (Final INTT)
  input  logic                        sma_proc_valid,
  input  logic [FNT_D-1:0][FW-1:0]    sma_proc,
  output logic                        sma_out_valid,
  output logic [FNT_D-1:0][FW-1:0]    sma_y,
  // combinational NTTs
  input  logic [FNT_D-1:0][FW-1:0]    comb_fnt_x,
  output logic [FNT_D-1:0][FW-1:0]    comb_fnt_y,
  input  logic [MNT_D-1:0][MW-1:0]    comb_mnt_x,
  output logic [MNT_D-1:0][MW-1:0]    comb_mnt_y,
  // pipelined NTT
  input  logic                        pipe_in_valid,
  input  logic [MNT_D-1:0][MW-1:0]    pipe_x,
  output logic                        pipe_out_valid,
  output logic [MNT_D-1:0][MW-1:0]    pipe_y,
  // area-compressed NTT
  input  logic                        ac_start,
  input  logic [MNT_D-1:0][MW-1:0]    ac_x,
  output logic                        ac_busy,
  output logic                        ac_done,
  output logic [MNT_D-1:0][MW-1:0]    ac_y,
  // pseudo Fermat number transform
  input  logic [PNT_D-1:0][PW-1:0]    pnt_x,
  output logic [PNT_D-1:0][PW-1:0]    pnt_y
);
  ntt_pipelined #(
    .N(FNT_N), .FERMAT(1'b1), .D(FNT_D), .OMEGA_EXP(FNT_OMEGA_EXP), .STAGES(SMA_STAGES)
  ) u_init_ntt (
    .clk(clk), .rst_n(rst_n), .in_valid(sma_in_valid), .x(sma_x),
    .out_valid(sma_spec_valid), .y(sma_spec)
  );

  intt #(
    .N(FNT_N), .FERMAT(1'b1), .D(FNT_D), .OMEGA_EXP(FNT_OMEGA_EXP), .STAGES(SMA_STAGES)
  ) u_final_intt (
    .clk(clk), .rst_n(rst_n), .in_valid(sma_proc_valid), .x(sma_proc),
    .out_valid(sma_out_valid), .y(sma_y)
  );

  ntt_comb #(
    .N(FNT_N), .FERMAT(1'b1), .D(FNT_D), .OMEGA_EXP(FNT_OMEGA_EXP)
  ) u_comb_fnt (.x(comb_fnt_x), .y(comb_fnt_y));

  ntt_comb #(
    .N(MNT_N), .FERMAT(1'b0), .D(MNT_D), .OMEGA_EXP(MNT_OMEGA_EXP)
  ) u_comb_mnt (.x(comb_mnt_x), .y(comb_mnt_y));

  ntt_pipelined #(
    .N(MNT_N), .FERMAT(1'b0), .D(MNT_D), .OMEGA_EXP(MNT_OMEGA_EXP), .STAGES(PIPE_STAGES)
  ) u_pipe_mnt (
    .clk(clk), .rst_n(rst_n), .in_valid(pipe_in_valid), .x(pipe_x),
    .out_valid(pipe_out_valid), .y(pipe_y)
  );

  ntt_area_compressed #(
    .N(MNT_N), .FERMAT(1'b0), .D(MNT_D), .OMEGA_EXP(MNT_OMEGA_EXP)
  ) u_ac_mnt (
    .clk(clk), .rst_n(rst_n), .start(ac_start), .x(ac_x),
    .busy(ac_busy), .done(ac_done), .y(ac_y)
  );

  pnt_ntt #(
    .N(PNT_N), .FERMAT(1'b1), .D(PNT_D), .OMEGA_EXP(PNT_OMEGA_EXP),
    .P(PNT_P), .BETA(PNT_BETA), .SIGMA(PNT_SIGMA)
  ) u_pnt (.x(pnt_x), .y(pnt_y));
endmodule
