// tb_ntt_pipelined: streams transforms through the pipelined NTT and checks
// results, latency and throughput.
//  * default 16-point MNT (2^19 - 1, omega = 2), 4 stages, and a 2-stage
//    instance: random vectors on consecutive clocks with gaps, compared with
//    the textbook FFT; each result must appear exactly STAGES clocks after its
//    input, and back-to-back inputs must give back-to-back outputs.
//  * 8-point FNT (2^20 + 1, omega = 32), 3 stages: compared with the
//    definition of the transform.
module tb_ntt_pipelined;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NV = 60;

  logic              v_in;
  logic [15:0][18:0] xm;
  logic [7:0][20:0]  xf;
  logic              v4, v2, vf;
  logic [15:0][18:0] y4, y2;
  logic [7:0][20:0]  yf;

  ntt_pipelined                                                      u_p4 (.clk, .rst_n, .in_valid(v_in), .x(xm), .out_valid(v4), .y(y4));
  ntt_pipelined #(.STAGES(2))                                        u_p2 (.clk, .rst_n, .in_valid(v_in), .x(xm), .out_valid(v2), .y(y2));
  ntt_pipelined #(.N(20), .FERMAT(1'b1), .D(8), .OMEGA_EXP(5), .STAGES(3)) u_pf (.clk, .rst_n, .in_valid(v_in), .x(xf), .out_valid(vf), .y(yf));

  vec_t em [NV], ef [NV];
  int   tin [NV];
  int   n4 = 0, n2 = 0, nf = 0, cyc = 0, b2b = 0;
  logic v4_q = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // Output monitors: compare in arrival order, check latency.
  always @(posedge clk) if (rst_n) begin
    v4_q <= v4;
    if (v4) begin
      chk(cyc - tin[n4] == 4, $sformatf("4-stage latency %0d", cyc - tin[n4]));
      for (int i = 0; i < 16; i++) chk(longint'(y4[i]) == em[n4][i], $sformatf("4-stage v%0d X%0d", n4, i));
      if (v4_q) b2b++;
      n4++;
    end
    if (v2) begin
      chk(cyc - tin[n2] == 2, $sformatf("2-stage latency %0d", cyc - tin[n2]));
      for (int i = 0; i < 16; i++) chk(longint'(y2[i]) == em[n2][i], $sformatf("2-stage v%0d X%0d", n2, i));
      n2++;
    end
    if (vf) begin
      chk(cyc - tin[nf] == 3, $sformatf("fnt latency %0d", cyc - tin[nf]));
      for (int i = 0; i < 8; i++) chk(longint'(yf[i]) == ef[nf][i], $sformatf("fnt v%0d X%0d", nf, i));
      nf++;
    end
  end

  initial begin
    vec_t a, b;
    v_in = 0; xm = '0; xf = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NV; k++) begin
      @(negedge clk);
      // gaps every 7th vector, otherwise back to back
      if (k % 7 == 6) begin
        v_in = 0;
        @(negedge clk);
      end
      for (int i = 0; i < 64; i++) begin a[i] = 0; b[i] = 0; end
      for (int i = 0; i < 16; i++) begin
        xm[i] = 19'($urandom);
        if (k == 0) xm[i] = '1;
        a[i] = longint'(xm[i]);
      end
      for (int i = 0; i < 8; i++) begin
        xf[i] = 21'(urand_mod(1048577));
        b[i] = longint'(xf[i]);
      end
      em[k] = fft(a, 16, 524287, 2);
      ef[k] = dft(b, 8, 1048577, 32);
      tin[k] = cyc;  // edge count seen by the monitor at the sampling edge
      v_in = 1;
    end
    @(negedge clk);
    v_in = 0;
    repeat (10) @(posedge clk);
    chk(n4 == NV && n2 == NV && nf == NV, $sformatf("output count %0d %0d %0d", n4, n2, nf));
    chk(b2b > NV / 2, $sformatf("back-to-back outputs %0d", b2b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
