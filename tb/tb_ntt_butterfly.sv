// tb_ntt_butterfly: checks the sum and difference outputs of the butterfly
// for the Mersenne ring 2^19 - 1 and the Fermat ring 2^20 + 1 with random and
// corner operands.
module tb_ntt_butterfly;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [18:0] am, bm, sm, dm;
  logic [20:0] af, bf, sf, df;

  ntt_butterfly                         u_m (.a(am), .b(bm), .s(sm), .d(dm));
  ntt_butterfly #(.N(20), .FERMAT(1'b1)) u_f (.a(af), .b(bf), .s(sf), .d(df));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      am = 19'($urandom); bm = 19'($urandom);
      af = 21'(urand_mod(1048577)); bf = 21'(urand_mod(1048577));
      if (t == 0) begin am = '1; bm = '1; af = 21'd1048576; bf = 21'd1048576; end
      if (t == 1) begin am = '0; bm = '1; af = 21'd0; bf = 21'd1048576; end
      if (t == 2) begin am = 19'd5; bm = 19'd5; af = 21'd1048576; bf = 21'd0; end
      #1;
      chk(mod_q(longint'(sm), 524287) == mod_q(longint'(am) + longint'(bm), 524287), "mersenne sum");
      chk(mod_q(longint'(dm), 524287) == mod_q(longint'(am) - longint'(bm), 524287), "mersenne diff");
      chk(longint'(sf) == mod_q(longint'(af) + longint'(bf), 1048577), "fermat sum");
      chk(longint'(df) == mod_q(longint'(af) - longint'(bf), 1048577), "fermat diff");
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
