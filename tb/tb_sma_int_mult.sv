// tb_sma_int_mult: long-integer multiplication through the SMA transform
// chain of sma_ntt_top (default parameters).
//
// Two 32-bit integers are split into four 8-bit digits and zero-padded to
// eight coefficients mod 2^20 + 1. Operand a goes through the Init NTT, b
// through the combinational FNT; this testbench plays the spectral unit and
// multiplies the spectra pointwise; the Final INTT returns the linear
// convolution of the digit sequences (every coefficient is below
// 4 * 255^2 < 2^20 + 1, so nothing wraps). Propagating the carries of the
// eight coefficients gives the 64-bit product, which must equal a * b.
module tb_sma_int_mult;
  import ntt_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NT = 200;

  logic             sma_in_valid = 0, sma_spec_valid, sma_proc_valid = 0, sma_out_valid;
  logic [7:0][20:0] sma_x = '0, sma_spec, sma_proc = '0, sma_y;
  logic [7:0][20:0] comb_fnt_x = '0, comb_fnt_y;
  logic [15:0][18:0] comb_mnt_x = '0, comb_mnt_y;
  logic             pipe_in_valid = 0, pipe_out_valid;
  logic [15:0][18:0] pipe_x = '0, pipe_y;
  logic             ac_start = 0, ac_busy, ac_done;
  logic [15:0][18:0] ac_x = '0, ac_y;
  logic [15:0][22:0] pnt_x = '0, pnt_y;

  sma_ntt_top dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [31:0]  a, b;
    logic [63:0]  prod, expect_p;
    int           wait_c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      a = $urandom;
      b = $urandom;
      if (t == 0) begin a = '1; b = '1; end
      if (t == 1) begin a = '0; b = 32'd12345; end
      @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        sma_x[i]      = (i < 4) ? 21'(a[8*i +: 8]) : 21'd0;
        comb_fnt_x[i] = (i < 4) ? 21'(b[8*i +: 8]) : 21'd0;
      end
      sma_in_valid = 1;
      @(negedge clk);
      sma_in_valid = 0;
      wait_c = 0;
      while (!sma_spec_valid && wait_c < 20) begin @(negedge clk); wait_c++; end
      for (int i = 0; i < 8; i++)
        sma_proc[i] = 21'(mulm(longint'(sma_spec[i]), longint'(comb_fnt_y[i]), 1048577));
      sma_proc_valid = 1;
      @(negedge clk);
      sma_proc_valid = 0;
      wait_c = 0;
      while (!sma_out_valid && wait_c < 20) begin @(negedge clk); wait_c++; end
      prod = '0;
      for (int i = 0; i < 8; i++) prod = prod + (64'(sma_y[i]) << (8 * i));
      expect_p = 64'(a) * 64'(b);
      chk(prod == expect_p, $sformatf("%0d * %0d: got %0d exp %0d", a, b, prod, expect_p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
