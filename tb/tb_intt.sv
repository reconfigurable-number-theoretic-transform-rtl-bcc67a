// tb_intt: the pipelined inverse transform.
//  * default 8-point, 2^20 + 1, omega = 32: a random sequence is transformed
//    by the reference, fed to the INTT, and must come back unchanged; random
//    spectra are also compared with x_i = d^-1 sum_j X_j omega^(-ij).
//  * 16-point, 2^8 + 1, omega = 2, 4 stages: same round trip.
// Inputs are streamed on consecutive clocks; latency must be STAGES clocks.
module tb_intt;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NV = 40;
  localparam longint QA = 1048577;
  localparam longint QB = 257;

  logic             vin, va, vb;
  logic [7:0][20:0] xa, ya;
  logic [15:0][8:0] xb, yb;

  intt                                                              u_a (.clk, .rst_n, .in_valid(vin), .x(xa), .out_valid(va), .y(ya));
  intt #(.N(8), .FERMAT(1'b1), .D(16), .OMEGA_EXP(1), .STAGES(4))   u_b (.clk, .rst_n, .in_valid(vin), .x(xb), .out_valid(vb), .y(yb));

  vec_t ea [NV], eb [NV];
  int   tin [NV];
  int   na = 0, nb = 0, cyc = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (va) begin
      chk(cyc - tin[na] == 3, $sformatf("latency a %0d", cyc - tin[na]));
      for (int i = 0; i < 8; i++) chk(longint'(ya[i]) == ea[na][i], $sformatf("a v%0d x%0d got %0d exp %0d", na, i, ya[i], ea[na][i]));
      na++;
    end
    if (vb) begin
      chk(cyc - tin[nb] == 4, $sformatf("latency b %0d", cyc - tin[nb]));
      for (int i = 0; i < 16; i++) chk(longint'(yb[i]) == eb[nb][i], $sformatf("b v%0d x%0d", nb, i));
      nb++;
    end
  end

  initial begin
    vec_t s, f;
    vin = 0; xa = '0; xb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NV; k++) begin
      @(negedge clk);
      for (int i = 0; i < 64; i++) s[i] = 0;
      if (k % 2 == 0) begin
        // round trip: x -> reference transform -> INTT -> x
        for (int i = 0; i < 8; i++) s[i] = urand_mod(QA);
        f = dft(s, 8, QA, 32);
        ea[k] = s;
      end else begin
        // spectrum -> definition of the inverse
        for (int i = 0; i < 8; i++) f[i] = urand_mod(QA);
        if (k == 1) for (int i = 0; i < 8; i++) f[i] = QA - 1;
        ea[k] = idft(f, 8, QA, pow_mod(32, 7, QA), pow_mod(2, 37, QA));
      end
      for (int i = 0; i < 8; i++) xa[i] = 21'(f[i]);
      for (int i = 0; i < 64; i++) s[i] = 0;
      for (int i = 0; i < 16; i++) s[i] = urand_mod(QB);
      f = dft(s, 16, QB, 2);
      eb[k] = s;
      for (int i = 0; i < 16; i++) xb[i] = 9'(f[i]);
      tin[k] = cyc;
      vin = 1;
    end
    @(negedge clk);
    vin = 0;
    repeat (8) @(posedge clk);
    chk(na == NV && nb == NV, $sformatf("output count %0d %0d", na, nb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
