// tb_pnt_post: the exact divider by p.
//  * p = 5 (beta = 3, sigma = 4) on 2^22 + 1: every multiple of 5 up to 2^22.
//  * p = 3 (beta = 1, sigma = 2) on 2^21 + 1: random multiples of 3.
//  * p = 5 on the Mersenne ring 2^12 - 1: every multiple of 5, and the
//    all-ones code of zero, which must give 0.
module tb_pnt_post;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [22:0] a5, b5;
  logic [21:0] a3, b3;
  logic [11:0] am, bm;

  pnt_post                                              u5 (.a(a5), .b(b5));
  pnt_post #(.N(21), .P(3), .BETA(1), .SIGMA(2))         u3 (.a(a3), .b(b3));
  pnt_post #(.N(12), .FERMAT(1'b0))                      um (.a(am), .b(bm));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int qv = 0; qv <= 838860; qv++) begin
      a5 = 23'(qv * 5);
      a3 = 22'(urand_mod(699051) * 3);
      am = 12'((qv % 820) * 5);
      #1;
      chk(longint'(b5) == longint'(qv), $sformatf("p5 %0d -> %0d", a5, b5));
      if (qv % 16 == 0) begin
        chk(longint'(b3) * 3 == longint'(a3), $sformatf("p3 %0d -> %0d", a3, b3));
        chk(longint'(bm) == ((qv % 820 == 819) ? 0 : longint'(qv % 820)), $sformatf("m12 %0d -> %0d", am, bm));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
