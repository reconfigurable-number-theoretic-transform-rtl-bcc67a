// tb_pnt_ntt: the pseudo number transform against the textbook FFT computed
// directly modulo q/p.
//  * default: q = 2^22 + 1, p = 5, q/p = 838861, 16 points, omega = 4;
//  * pseudo Mersenne: q = 2^12 - 1, p = 5, q/p = 819, 8 points, omega = 2.
// Inputs are random residues mod q/p (plus the largest residue).
module tb_pnt_ntt;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0][22:0] xf, yf;
  logic [7:0][11:0]  xm, ym;

  pnt_ntt                                                  u_f (.x(xf), .y(yf));
  pnt_ntt #(.N(12), .FERMAT(1'b0), .D(8), .OMEGA_EXP(1))   u_m (.x(xm), .y(ym));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    vec_t a, b, ea, eb;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 64; i++) begin a[i] = 0; b[i] = 0; end
      for (int i = 0; i < 16; i++) begin
        xf[i] = 23'(urand_mod(838861));
        if (t == 0) xf[i] = 23'd838860;
        a[i] = longint'(xf[i]);
      end
      for (int i = 0; i < 8; i++) begin
        xm[i] = 12'(urand_mod(819));
        if (t == 0) xm[i] = 12'd818;
        b[i] = longint'(xm[i]);
      end
      #1;
      ea = fft(a, 16, 838861, 4);
      eb = fft(b, 8, 819, 2);
      for (int i = 0; i < 16; i++)
        chk(longint'(yf[i]) == ea[i], $sformatf("pfnt t=%0d X%0d got %0d exp %0d", t, i, yf[i], ea[i]));
      for (int i = 0; i < 8; i++)
        chk(longint'(ym[i]) == eb[i], $sformatf("pmnt t=%0d X%0d got %0d exp %0d", t, i, ym[i], eb[i]));
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
