// tb_mod_normalize: the all-ones code must become 0 and every other value
// must pass unchanged; exhaustive for n = 8, random and corners for n = 19.
module tb_mod_normalize;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  xs, ys;
  logic [18:0] xl, yl;

  mod_normalize #(.N(8)) u_s (.x(xs), .y(ys));
  mod_normalize          u_l (.x(xl), .y(yl));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 256; v++) begin
      xs = 8'(v);
      #1;
      chk(ys == ((v == 255) ? 8'd0 : 8'(v)), $sformatf("n8 %0d -> %0d", v, ys));
    end
    for (int t = 0; t < 1000; t++) begin
      xl = 19'($urandom);
      if (t == 0) xl = '1;
      if (t == 1) xl = 19'h7fffe;
      if (t == 2) xl = '0;
      if (t == 3) xl = 19'h3ffff;
      #1;
      chk(yl == ((xl == '1) ? 19'd0 : xl), $sformatf("n19 %0d -> %0d", xl, yl));
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
