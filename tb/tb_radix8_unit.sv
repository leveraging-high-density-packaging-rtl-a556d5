// tb_radix8_unit: streams random 8-point transforms, one per clock, and
// compares every output with a double-precision DFT (tolerance 4 LSB). Checks
// the three-clock latency and that consecutive transforms do not interfere.
module tb_radix8_unit;
  import fft_pkg::*;
  localparam int NT = 500;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0, out_valid;
  cplx_t x [R8], y [R8];
  int checks = 0, failures = 0;
  real ref_re [NT][R8], ref_im [NT][R8];
  int  in_cyc [NT];
  int  cyc = 0, nout = 0;

  radix8_unit dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (cyc - in_cyc[nout] != 3) begin
      failures++; $display("latency %0d", cyc - in_cyc[nout]);
    end
    for (int k = 0; k < R8; k++) begin
      checks++;
      if ((y[k].re - ref_re[nout][k]) > 4.0 || (ref_re[nout][k] - y[k].re) > 4.0 ||
          (y[k].im - ref_im[nout][k]) > 4.0 || (ref_im[nout][k] - y[k].im) > 4.0) begin
        failures++;
        if (failures < 10) $display("t=%0d k=%0d y=(%0d,%0d) exp=(%f,%f)", nout, k,
                                    y[k].re, y[k].im, ref_re[nout][k], ref_im[nout][k]);
      end
    end
    nout++;
  end

  initial begin
    for (int n = 0; n < R8; n++) x[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      for (int n = 0; n < R8; n++) begin
        if (t == 0) begin x[n].re = (n == 1) ? 1000 : 0; x[n].im = 0; end
        else begin
          x[n].re = $signed($urandom_range(0, 1 << 25)) - (1 << 24);
          x[n].im = $signed($urandom_range(0, 1 << 25)) - (1 << 24);
        end
      end
      for (int k = 0; k < R8; k++) begin
        ref_re[t][k] = 0.0; ref_im[t][k] = 0.0;
        for (int n = 0; n < R8; n++) begin
          real ph;
          ph = -6.283185307179586 * ((n * k) % 8) / 8.0;
          ref_re[t][k] += x[n].re * $cos(ph) - x[n].im * $sin(ph);
          ref_im[t][k] += x[n].re * $sin(ph) + x[n].im * $cos(ph);
        end
      end
      in_cyc[t] = cyc;
      in_valid = 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (nout != NT) begin failures++; $display("got %0d transforms", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
