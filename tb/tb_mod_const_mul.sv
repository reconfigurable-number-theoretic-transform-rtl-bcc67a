// tb_mod_const_mul: checks multiplication by constant powers of two for
// several exponents, modulo 2^19 - 1 (rotations, including an exponent
// larger than n) and modulo 2^20 + 1 (shift and reduce, and exponents >= n
// that need the negation). Random and corner residues; results compared with
// x * 2^EXP mod q.
module tb_mod_const_mul;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NM = 5;
  localparam int NF = 6;
  localparam int ME [NM] = '{0, 1, 3, 18, 25};
  localparam int FE [NF] = '{0, 5, 19, 20, 25, 45};

  logic [18:0] xm;
  logic [20:0] xf;
  logic [18:0] ym [NM];
  logic [20:0] yf [NF];

  for (genvar i = 0; i < NM; i++) begin : g_m
    mod_const_mul #(.N(19), .FERMAT(1'b0), .EXP(ME[i])) u (.x(xm), .y(ym[i]));
  end
  for (genvar i = 0; i < NF; i++) begin : g_f
    mod_const_mul #(.N(20), .FERMAT(1'b1), .EXP(FE[i])) u (.x(xf), .y(yf[i]));
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      xm = 19'($urandom);
      xf = 21'(urand_mod(1048577));
      if (t == 0) begin xm = '1; xf = 21'd1048576; end
      if (t == 1) begin xm = '0; xf = 21'd0; end
      if (t == 2) begin xm = 19'd1; xf = 21'd1048575; end
      #1;
      for (int i = 0; i < NM; i++)
        chk(mod_q(longint'(ym[i]), 524287) == mulm(longint'(xm), pow2_mod(ME[i], 524287), 524287),
            $sformatf("mersenne e=%0d x=%0d y=%0d", ME[i], xm, ym[i]));
      for (int i = 0; i < NF; i++)
        chk(longint'(yf[i]) == mulm(longint'(xf), pow2_mod(FE[i], 1048577), 1048577),
            $sformatf("fermat e=%0d x=%0d y=%0d", FE[i], xf, yf[i]));
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
