// tb_mod_reduce: checks mod_reduce for both rings. Small rings (n = 6) are
// checked exhaustively over all 12-bit inputs, the document's ring sizes
// (2^19 - 1 and 2^20 + 1) with random and corner inputs. The Mersenne result
// must be congruent to the input (all-ones allowed for zero); the Fermat
// result must be the canonical residue 0..2^n.
module tb_mod_reduce;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [11:0] sa;  logic [5:0] sm;  logic [6:0] sf;
  logic [37:0] la;  logic [18:0] lm;
  logic [39:0] fa;  logic [20:0] lf;

  mod_reduce #(.N(6),  .FERMAT(1'b0)) u_sm (.a(sa), .r(sm));
  mod_reduce #(.N(6),  .FERMAT(1'b1)) u_sf (.a(sa), .r(sf));
  mod_reduce                          u_lm (.a(la), .r(lm));
  mod_reduce #(.N(20), .FERMAT(1'b1)) u_lf (.a(fa), .r(lf));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int v = 0; v < 4096; v++) begin
      sa = 12'(v);
      #1;
      chk(mod_q(longint'(sm), 63) == mod_q(v, 63), $sformatf("m6 a=%0d r=%0d", v, sm));
      chk(longint'(sf) == mod_q(v, 65), $sformatf("f6 a=%0d r=%0d", v, sf));
    end
    for (int t = 0; t < 3000; t++) begin
      la = {$urandom, $urandom};
      fa = {$urandom, $urandom};
      if (t == 0) begin la = '1; fa = '1; end
      if (t == 1) begin la = '0; fa = {20'd0, 20'hfffff}; end
      if (t == 2) begin fa = {20'hfffff, 20'd0}; end
      #1;
      chk(mod_q(longint'(lm), 524287) == mod_q(longint'(la), 524287),
          $sformatf("m19 a=%0d r=%0d", la, lm));
      chk(longint'(lf) == mod_q(longint'(fa), 1048577), $sformatf("f20 a=%0d r=%0d", fa, lf));
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
