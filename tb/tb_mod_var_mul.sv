// tb_mod_var_mul: checks the run-time power-of-two multiplier for every legal
// exponent, modulo 2^19 - 1 (e = 0..18) and 2^20 + 1 (e = 0..39), with random
// and corner residues, against x * 2^e mod q.
module tb_mod_var_mul;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [18:0] xm, ym;
  logic [4:0]  em;
  logic [20:0] xf, yf;
  logic [5:0]  ef;

  mod_var_mul                         u_m (.x(xm), .e(em), .y(ym));
  mod_var_mul #(.N(20), .FERMAT(1'b1)) u_f (.x(xf), .e(ef), .y(yf));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      xm = 19'($urandom);
      xf = 21'(urand_mod(1048577));
      if (t == 0) begin xm = '1; xf = 21'd1048576; end
      if (t == 1) begin xm = '0; xf = 21'd0; end
      for (int e = 0; e < 40; e++) begin
        em = 5'(e % 19);
        ef = 6'(e);
        #1;
        chk(mod_q(longint'(ym), 524287) == mulm(longint'(xm), pow2_mod(e % 19, 524287), 524287),
            $sformatf("mersenne e=%0d x=%0d y=%0d", e % 19, xm, ym));
        chk(longint'(yf) == mulm(longint'(xf), pow2_mod(e, 1048577), 1048577),
            $sformatf("fermat e=%0d x=%0d y=%0d", e, xf, yf));
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
