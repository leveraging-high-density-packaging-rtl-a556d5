// tb_cmul: checks the complex multiplier against double-precision products.
// Random 25-bit samples times random unit-circle coefficients; the result must
// be within 2 LSB of the exact product and appear one clock after the operands.
module tb_cmul;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0, out_valid;
  cplx_t a, w, y;
  int checks = 0, failures = 0;

  cmul dut (.clk, .rst_n, .in_valid, .a, .w, .out_valid, .y);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ph, er, ei, ar, ai, wr, wi;
    a = '0; w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a.re = $signed($urandom_range(0, 1 << 25)) - (1 << 24);
      a.im = $signed($urandom_range(0, 1 << 25)) - (1 << 24);
      if (t < 4) ph = 3.14159265358979 * t / 2.0;          // 1, j, -1, -j exactly
      else       ph = 6.283185307179586 * ($urandom % 100000) / 100000.0;
      w.re = $rtoi($floor($cos(ph) * 1073741824.0 + 0.5));
      w.im = $rtoi($floor($sin(ph) * 1073741824.0 + 0.5));
      in_valid = 1;
      ar = a.re; ai = a.im; wr = w.re / 1073741824.0; wi = w.im / 1073741824.0;
      er = ar * wr - ai * wi;
      ei = ar * wi + ai * wr;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid after one clock"); end
      checks++;
      if ((y.re - er) > 2.0 || (er - y.re) > 2.0 || (y.im - ei) > 2.0 || (ei - y.im) > 2.0) begin
        failures++;
        if (failures < 10) $display("t=%0d y=(%0d,%0d) exp=(%f,%f)", t, y.re, y.im, er, ei);
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
