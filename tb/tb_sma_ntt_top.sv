// tb_sma_ntt_top: end-to-end test of sma_ntt_top at its default parameters.
//
//  * SMA round trip: polynomials a and b (8 coefficients mod 2^20 + 1) are
//    transformed, a by the Init NTT (pipelined) and b by the combinational
//    FNT; a behavioural spectral unit in this testbench multiplies the spectra
//    pointwise and feeds them to the Final INTT, whose output must be the
//    cyclic convolution of a and b, computed directly.
//  * combinational MNT and FNT, pipelined MNT (streamed back to back) and
//    area-compressed MNT (with ignored starts while busy and restarts in the
//    done clock) against the reference transforms; pseudo FNT against the FFT
//    modulo (2^22 + 1)/5.
// Each mechanism is counted and must occur at least once: redundant-zero
// (all-ones) Mersenne inputs, the Fermat value 2^n, back-to-back pipeline
// outputs, ignored starts, restarts at done, SMA round trips.
module tb_sma_ntt_top;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam longint QF = 1048577;  // 2^20 + 1
  localparam longint QM = 524287;   // 2^19 - 1
  localparam longint QP = 838861;   // (2^22 + 1) / 5
  localparam int     NV = 24;

  logic             sma_in_valid = 0, sma_spec_valid, sma_proc_valid = 0, sma_out_valid;
  logic [7:0][20:0] sma_x = '0, sma_spec, sma_proc = '0, sma_y;
  logic [7:0][20:0] comb_fnt_x = '0, comb_fnt_y;
  logic [15:0][18:0] comb_mnt_x = '0, comb_mnt_y;
  logic             pipe_in_valid = 0, pipe_out_valid;
  logic [15:0][18:0] pipe_x = '0, pipe_y;
  logic             ac_start = 0, ac_busy, ac_done;
  logic [15:0][18:0] ac_x = '0, ac_y;
  logic [15:0][22:0] pnt_x = '0, pnt_y;

  sma_ntt_top dut (.*);

  // mechanism counters
  int n_roundtrip = 0, n_allones = 0, n_fermat_top = 0, n_b2b = 0, n_ignored = 0, n_restart = 0;
  int n_pipe = 0, n_pnt = 0, n_comb = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---- pipelined MNT stream with an output monitor ----
  vec_t pexp [NV];
  int   ptin [NV];
  int   cyc = 0, pout = 0;
  logic pv_q = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    pv_q <= pipe_out_valid;
    if (pipe_out_valid) begin
      chk(cyc - ptin[pout] == 4, $sformatf("pipe latency %0d", cyc - ptin[pout]));
      for (int i = 0; i < 16; i++) chk(longint'(pipe_y[i]) == pexp[pout][i], $sformatf("pipe v%0d X%0d", pout, i));
      if (pv_q) n_b2b++;
      pout++;
      n_pipe++;
    end
  end

  task automatic run_pipe();
    vec_t a;
    for (int k = 0; k < NV; k++) begin
      @(negedge clk);
      for (int i = 0; i < 64; i++) a[i] = 0;
      for (int i = 0; i < 16; i++) begin
        pipe_x[i] = (k == 3) ? '1 : 19'($urandom);
        a[i] = longint'(pipe_x[i]);
      end
      if (k == 3) n_allones++;
      pexp[k] = fft(a, 16, QM, 2);
      ptin[k] = cyc;
      pipe_in_valid = 1;
    end
    @(negedge clk);
    pipe_in_valid = 0;
    repeat (6) @(posedge clk);
    chk(pout == NV, $sformatf("pipe outputs %0d", pout));
  endtask

  // ---- SMA round trip ----
  task automatic run_sma(int k);
    vec_t a, b, fa, fb, c;
    int lat;
    for (int i = 0; i < 64; i++) begin a[i] = 0; b[i] = 0; end
    for (int i = 0; i < 8; i++) begin
      a[i] = urand_mod(QF);
      b[i] = urand_mod(QF);
      if (k == 0) a[i] = QF - 1;  // the value 2^n
    end
    if (k == 0) n_fermat_top++;
    c = cconv(a, b, 8, QF);
    // b through the combinational FNT
    for (int i = 0; i < 8; i++) comb_fnt_x[i] = 21'(b[i]);
    #1;
    fb = dft(b, 8, QF, 32);
    for (int i = 0; i < 8; i++) chk(longint'(comb_fnt_y[i]) == fb[i], $sformatf("comb fnt X%0d", i));
    // a through the Init NTT
    @(negedge clk);
    for (int i = 0; i < 8; i++) sma_x[i] = 21'(a[i]);
    sma_in_valid = 1;
    @(negedge clk);
    sma_in_valid = 0;
    lat = 1;
    while (!sma_spec_valid && lat < 20) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("init ntt latency %0d", lat));
    fa = dft(a, 8, QF, 32);
    for (int i = 0; i < 8; i++) chk(longint'(sma_spec[i]) == fa[i], $sformatf("init ntt X%0d", i));
    // behavioural spectral unit: pointwise product
    for (int i = 0; i < 8; i++) sma_proc[i] = 21'(mulm(longint'(sma_spec[i]), longint'(comb_fnt_y[i]), QF));
    sma_proc_valid = 1;
    @(negedge clk);
    sma_proc_valid = 0;
    lat = 1;
    while (!sma_out_valid && lat < 20) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("final intt latency %0d", lat));
    for (int i = 0; i < 8; i++) chk(longint'(sma_y[i]) == c[i], $sformatf("sma conv c%0d got %0d exp %0d", i, sma_y[i], c[i]));
    n_roundtrip++;
  endtask

  // ---- combinational MNT and PNT ----
  task automatic run_comb(int k);
    vec_t a, p, ea, ep;
    for (int i = 0; i < 64; i++) begin a[i] = 0; p[i] = 0; end
    for (int i = 0; i < 16; i++) begin
      comb_mnt_x[i] = (k == 1) ? '1 : 19'($urandom);
      a[i] = longint'(comb_mnt_x[i]);
      pnt_x[i] = 23'(urand_mod(QP));
      p[i] = longint'(pnt_x[i]);
    end
    if (k == 1) n_allones++;
    #1;
    ea = fft(a, 16, QM, 2);
    ep = fft(p, 16, QP, 4);
    for (int i = 0; i < 16; i++) begin
      chk(longint'(comb_mnt_y[i]) == ea[i], $sformatf("comb mnt X%0d", i));
      chk(longint'(pnt_y[i]) == ep[i], $sformatf("pnt X%0d", i));
    end
    n_comb++;
    n_pnt++;
  endtask

  // ---- area-compressed MNT ----
  task automatic run_ac(int k);
    vec_t a, e;
    int lat;
    for (int i = 0; i < 64; i++) a[i] = 0;
    for (int i = 0; i < 16; i++) begin
      ac_x[i] = 19'($urandom);
      a[i] = longint'(ac_x[i]);
    end
    e = fft(a, 16, QM, 2);
    if (!ac_done) @(negedge clk);
    else n_restart++;  // start given in the done clock
    ac_start = 1;
    @(negedge clk);
    ac_start = 0;
    lat = 1;
    if (k % 2 == 0) begin  // a start while busy, with other data: ignored
      chk(ac_busy, "ac busy");
      for (int i = 0; i < 16; i++) ac_x[i] = 19'($urandom);
      ac_start = 1;
      @(negedge clk);
      ac_start = 0;
      lat++;
      n_ignored++;
    end
    while (!ac_done && lat < 20) begin @(negedge clk); lat++; end
    chk(lat == 4, $sformatf("ac latency %0d", lat));
    for (int i = 0; i < 16; i++) chk(longint'(ac_y[i]) == e[i], $sformatf("ac k=%0d X%0d", k, i));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) run_sma(k);
    for (int k = 0; k < 6; k++) run_comb(k);
    for (int k = 0; k < 8; k++) run_ac(k);
    run_pipe();
    chk(n_roundtrip > 0, "no SMA round trip");
    chk(n_allones > 0, "no all-ones Mersenne input");
    chk(n_fermat_top > 0, "no Fermat 2^n input");
    chk(n_b2b > 0, "no back-to-back pipeline outputs");
    chk(n_ignored > 0, "no ignored start");
    chk(n_restart > 0, "no restart in done clock");
    chk(n_pipe > 0 && n_pnt > 0 && n_comb > 0, "unit not exercised");
    $display("mechanisms: sma_roundtrips=%0d allones_inputs=%0d fermat_2n_inputs=%0d pipe_back_to_back=%0d ac_ignored_starts=%0d ac_restarts_at_done=%0d pipe=%0d comb=%0d pnt=%0d",
             n_roundtrip, n_allones, n_fermat_top, n_b2b, n_ignored, n_restart, n_pipe, n_comb, n_pnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
