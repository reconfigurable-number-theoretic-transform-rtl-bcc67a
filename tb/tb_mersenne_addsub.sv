// tb_mersenne_addsub: checks addition and subtraction modulo 2^n - 1,
// exhaustively for n = 5 (all operand codes including the all-ones zero) and
// with random and corner operands for n = 19. Results must be congruent to
// a + b and a - b modulo 2^n - 1.
module tb_mersenne_addsub;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [4:0]  sa, sb, ss, sd;
  logic [18:0] la, lb, ls, ld;

  mersenne_addsub #(.N(5), .SUB(1'b0)) u_sadd (.a(sa), .b(sb), .r(ss));
  mersenne_addsub #(.N(5), .SUB(1'b1)) u_ssub (.a(sa), .b(sb), .r(sd));
  mersenne_addsub                      u_ladd (.a(la), .b(lb), .r(ls));
  mersenne_addsub #(.SUB(1'b1))        u_lsub (.a(la), .b(lb), .r(ld));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        sa = 5'(a); sb = 5'(b);
        #1;
        chk(mod_q(longint'(ss), 31) == mod_q(a + b, 31), $sformatf("add %0d %0d -> %0d", a, b, ss));
        chk(mod_q(longint'(sd), 31) == mod_q(a - b, 31), $sformatf("sub %0d %0d -> %0d", a, b, sd));
      end
    for (int t = 0; t < 2000; t++) begin
      la = 19'($urandom); lb = 19'($urandom);
      if (t == 0) begin la = '1; lb = '1; end
      if (t == 1) begin la = '0; lb = '1; end
      if (t == 2) begin la = '1; lb = '0; end
      #1;
      chk(mod_q(longint'(ls), 524287) == mod_q(longint'(la) + longint'(lb), 524287), "add19");
      chk(mod_q(longint'(ld), 524287) == mod_q(longint'(la) - longint'(lb), 524287), "sub19");
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
