// tb_fermat_sub: checks fermat_sub, (a - b) mod 2^n + 1 on residues 0..2^n,
// exhaustively for n = 5 (including the operand 2^n, which exercises the
// sum/difference 2^n and 2^(n+1) special cases) and with random and corner
// operands for n = 20. The result must be the canonical residue.
module tb_fermat_sub;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0]  sa, sb, sr;
  logic [20:0] la, lb, lr;

  fermat_sub #(.N(5)) u_s (.a(sa), .b(sb), .r(sr));
  fermat_sub          u_l (.a(la), .b(lb), .r(lr));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int a = 0; a <= 32; a++)
      for (int b = 0; b <= 32; b++) begin
        sa = 6'(a); sb = 6'(b);
        #1;
        chk(longint'(sr) == mod_q(a - b, 33), $sformatf("%0d - %0d -> %0d", a, b, sr));
      end
    for (int t = 0; t < 3000; t++) begin
      la = 21'(urand_mod(1048577)); lb = 21'(urand_mod(1048577));
      if (t == 0) begin la = 21'd1048576; lb = 21'd1048576; end
      if (t == 1) begin la = 21'd1048576; lb = 21'd0; end
      if (t == 2) begin la = 21'd0; lb = 21'd1048576; end
      if (t == 3) begin la = 21'd1; lb = 21'd1048575; end
      #1;
      chk(longint'(lr) == mod_q(longint'(la) - longint'(lb), 1048577),
          $sformatf("n20 %0d - %0d -> %0d", la, lb, lr));
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
