// tb_ntt_layer: checks every layer of the 16-point network modulo 2^19 - 1
// (omega = 2) and of the 8-point network modulo 2^20 + 1 (omega = 32).
// Expected outputs are built the textbook way: the butterfly of span 2^L,
// then, for the element that is the lower input of a next-layer pair
// (length len = 2^(L+2) blocks), the twiddle omega^(j * d / len) with j its
// offset in that block's lower half.
module tb_ntt_layer;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam longint QM = 524287;
  localparam longint QF = 1048577;

  logic [15:0][18:0] vm;
  logic [15:0][18:0] om [4];
  logic [7:0][20:0]  vf;
  logic [7:0][20:0]  of [3];

  for (genvar l = 0; l < 4; l++) begin : g_m
    ntt_layer #(.LAYER(l)) u (.v(vm), .o(om[l]));
  end
  for (genvar l = 0; l < 3; l++) begin : g_f
    ntt_layer #(.N(20), .FERMAT(1'b1), .D(8), .OMEGA_EXP(5), .LAYER(l)) u (.v(vf), .o(of[l]));
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic longint expect_out(vec_t v, int d, int l, int i, longint q, longint w);
    int h, len, m;
    longint r;
    m = 0;
    while ((1 << m) < d) m++;
    h = 1 << l;
    r = ((i & h) == 0) ? mod_q(v[i] + v[i+h], q) : mod_q(v[i-h] - v[i], q);
    len = 1 << (l + 2);
    if (l + 1 < m && (i % len) >= len / 2)
      r = mulm(r, pow_mod(w, longint'(((i % len) - len / 2) * (d / len)), q), q);
    return r;
  endfunction

  initial begin
    vec_t rm, rf;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < 16; i++) begin
        vm[i] = 19'($urandom);
        if (t == 0) vm[i] = '1;
        rm[i] = longint'(vm[i]);
      end
      for (int i = 0; i < 8; i++) begin
        vf[i] = 21'(urand_mod(QF));
        if (t == 0) vf[i] = 21'd1048576;
        rf[i] = longint'(vf[i]);
      end
      #1;
      for (int l = 0; l < 4; l++)
        for (int i = 0; i < 16; i++)
          chk(mod_q(longint'(om[l][i]), QM) == expect_out(rm, 16, l, i, QM, 2),
              $sformatf("mnt layer %0d out %0d", l, i));
      for (int l = 0; l < 3; l++)
        for (int i = 0; i < 8; i++)
          chk(longint'(of[l][i]) == expect_out(rf, 8, l, i, QF, 32),
              $sformatf("fnt layer %0d out %0d", l, i));
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
