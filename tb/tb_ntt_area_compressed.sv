// tb_ntt_area_compressed: runs transforms through the iterative
// constant-geometry NTT.
//  * default 16-point MNT (2^19 - 1, omega = 2): results against the textbook
//    FFT; done must come exactly log2(16) = 4 clocks after start, busy must be
//    high in between, a start while busy must be ignored, and a start given
//    in the clock of done must begin the next transform at once (one
//    transform per 4 clocks).
//  * 8-point FNT (2^20 + 1, omega = 32): against the definition, 3 clocks.
module tb_ntt_area_compressed;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              sm, sf;
  logic [15:0][18:0] xm, ym;
  logic [7:0][20:0]  xf, yf;
  logic              bm, dm, bff, df;

  ntt_area_compressed                                               u_m (.clk, .rst_n, .start(sm), .x(xm), .busy(bm), .done(dm), .y(ym));
  ntt_area_compressed #(.N(20), .FERMAT(1'b1), .D(8), .OMEGA_EXP(5)) u_f (.clk, .rst_n, .start(sf), .x(xf), .busy(bff), .done(df), .y(yf));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    vec_t a, e;
    int   lat;
    sm = 0; sf = 0; xm = '0; xf = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // MNT: 40 transforms; odd ones start in the clock of the previous done.
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      while (bm) @(negedge clk);
      if (k % 4 == 0) @(negedge clk);
      for (int i = 0; i < 64; i++) a[i] = 0;
      for (int i = 0; i < 16; i++) begin
        xm[i] = 19'($urandom);
        if (k == 0) xm[i] = '1;
        a[i] = longint'(xm[i]);
      end
      e = fft(a, 16, 524287, 2);
      sm = 1;
      @(negedge clk);
      sm = 0;
      lat = 1;
      // a start pulse with other data while busy must be ignored
      if (k % 3 == 0) begin
        for (int i = 0; i < 16; i++) xm[i] = 19'($urandom);
        sm = 1;
        chk(bm, "busy after start");
        @(negedge clk);
        sm = 0;
        lat++;
      end
      while (!dm) begin
        chk(bm, "busy while running");
        @(negedge clk);
        lat++;
        if (lat > 20) break;
      end
      chk(lat == 4, $sformatf("mnt latency %0d", lat));
      for (int i = 0; i < 16; i++)
        chk(longint'(ym[i]) == e[i], $sformatf("mnt k=%0d X%0d got %0d exp %0d", k, i, ym[i], e[i]));
      // after an even k, the next transform is started in the clock in
      // which done is high
      if (k % 2 == 0 && k + 1 < 40) begin
        for (int i = 0; i < 64; i++) a[i] = 0;
        for (int i = 0; i < 16; i++) begin
          xm[i] = 19'($urandom);
          a[i] = longint'(xm[i]);
        end
        e = fft(a, 16, 524287, 2);
        sm = 1;
        @(negedge clk);
        sm = 0;
        lat = 1;
        chk(!dm && bm, "restart in done clock accepted");
        while (!dm) begin
          @(negedge clk);
          lat++;
          if (lat > 20) break;
        end
        chk(lat == 4, $sformatf("mnt back-to-back latency %0d", lat));
        for (int i = 0; i < 16; i++)
          chk(longint'(ym[i]) == e[i], $sformatf("mnt b2b k=%0d X%0d", k, i));
        k++;
      end
    end
    // FNT
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      for (int i = 0; i < 64; i++) a[i] = 0;
      for (int i = 0; i < 8; i++) begin
        xf[i] = 21'(urand_mod(1048577));
        if (k == 0) xf[i] = 21'd1048576;
        a[i] = longint'(xf[i]);
      end
      e = dft(a, 8, 1048577, 32);
      sf = 1;
      @(negedge clk);
      sf = 0;
      lat = 1;
      while (!df) begin
        @(negedge clk);
        lat++;
        if (lat > 20) break;
      end
      chk(lat == 3, $sformatf("fnt latency %0d", lat));
      for (int i = 0; i < 8; i++)
        chk(longint'(yf[i]) == e[i], $sformatf("fnt k=%0d X%0d got %0d exp %0d", k, i, yf[i], e[i]));
    end
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
