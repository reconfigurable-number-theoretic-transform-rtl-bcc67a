// tb_ntt_comb: the combinational transform against references.
//  * 8-point FNT modulo 2^20 + 1, omega = 32: compared with the definition
//    X_i = sum_j x_j omega^(ij).
//  * 16-point MNT modulo 2^19 - 1, omega = 2 (default parameters): 2 is not a
//    16th root of unity there, so compared with the textbook radix-2 FFT;
//    outputs must be canonical (never all-ones).
//  * 16-point FNT modulo 2^8 + 1, omega = 2 (a true 16th root): definition.
module tb_ntt_comb;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0][20:0]  xf, yf;
  logic [15:0][18:0] xm, ym;
  logic [15:0][8:0]  xs, ys;

  ntt_comb #(.N(20), .FERMAT(1'b1), .D(8), .OMEGA_EXP(5)) u_fnt (.x(xf), .y(yf));
  ntt_comb                                                u_mnt (.x(xm), .y(ym));
  ntt_comb #(.N(8), .FERMAT(1'b1), .D(16), .OMEGA_EXP(1)) u_f16 (.x(xs), .y(ys));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    vec_t a, b, c, ea, eb, ec;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 64; i++) begin a[i] = 0; b[i] = 0; c[i] = 0; end
      for (int i = 0; i < 8; i++) begin
        xf[i] = 21'(urand_mod(1048577));
        if (t == 0) xf[i] = 21'd1048576;
        if (t == 1) xf[i] = (i == 0) ? 21'd1 : 21'd0;
        a[i] = longint'(xf[i]);
      end
      for (int i = 0; i < 16; i++) begin
        xm[i] = 19'($urandom);
        if (t == 0) xm[i] = '1;
        b[i] = longint'(xm[i]);
        xs[i] = 9'(urand_mod(257));
        c[i] = longint'(xs[i]);
      end
      #1;
      ea = dft(a, 8, 1048577, 32);
      eb = fft(b, 16, 524287, 2);
      ec = dft(c, 16, 257, 2);
      for (int i = 0; i < 8; i++)
        chk(longint'(yf[i]) == ea[i], $sformatf("fnt8 t=%0d X%0d got %0d exp %0d", t, i, yf[i], ea[i]));
      for (int i = 0; i < 16; i++) begin
        chk(longint'(ym[i]) == eb[i], $sformatf("mnt16 t=%0d X%0d got %0d exp %0d", t, i, ym[i], eb[i]));
        chk(longint'(ys[i]) == ec[i], $sformatf("fnt16 t=%0d X%0d got %0d exp %0d", t, i, ys[i], ec[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
