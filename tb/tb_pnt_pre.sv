// tb_pnt_pre: the pre-processing multiplier must return x * p for every x
// below q/p: p = 5 on 2^22 + 1 (exhaustively over a stride) and p = 3 on
// 2^21 + 1 (random).
module tb_pnt_pre;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [22:0] x5, y5;
  logic [21:0] x3, y3;

  pnt_pre                       u5 (.x(x5), .y(y5));
  pnt_pre #(.N(21), .P(3))      u3 (.x(x3), .y(y3));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 838861; v += 97) begin
      x5 = 23'(v);
      x3 = 22'(urand_mod(699051));
      #1;
      chk(longint'(y5) == longint'(v) * 5, $sformatf("p5 %0d -> %0d", v, y5));
      chk(longint'(y3) == longint'(x3) * 3, $sformatf("p3 %0d -> %0d", x3, y3));
    end
    x5 = 23'd838860; #1;
    chk(longint'(y5) == 64'd4194300, "p5 max");
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
