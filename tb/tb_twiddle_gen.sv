// tb_twiddle_gen: loads the coarse and fine tables with exp(-2*pi*j*e/N)
// values, then requests random exponents (and the corner cases 0, 1, N/4,
// N-1) on every clock and compares the generated factor with double-precision
// cos/sin within 4 LSB of 2^30. Checks the two-clock latency.
module tb_twiddle_gen;
  import fft_pkg::*;
  localparam int LOG_N = 20, LOG_FINE = 10;
  localparam real TWO_PI = 6.283185307179586;
  localparam real ONE = 1073741824.0;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic wr_en = 0, wr_coarse = 0;
  logic [LOG_FINE-1:0] wr_addr_fine = '0;
  logic [LOG_N-LOG_FINE-1:0] wr_addr_coarse = '0;
  cplx_t wr_data = '0, w;
  logic in_valid = 0, out_valid;
  logic [LOG_N-1:0] e = '0;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [LOG_N-1:0] e_q [$];
  int c_q [$];

  twiddle_gen #(.LOG_N(LOG_N), .LOG_FINE(LOG_FINE)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  function automatic cplx_t tw(longint ex);
    real ph;
    ph = -TWO_PI * ex / real'(1 << LOG_N);
    tw.re = $rtoi($floor($cos(ph) * ONE + 0.5));
    tw.im = $rtoi($floor($sin(ph) * ONE + 0.5));
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    logic [LOG_N-1:0] ex;
    real ph, er, ei;
    ex = e_q.pop_front();
    checks++;
    if (cyc - c_q.pop_front() != 2) begin failures++; $display("latency"); end
    ph = -TWO_PI * ex / real'(1 << LOG_N);
    er = $cos(ph) * ONE; ei = $sin(ph) * ONE;
    checks++;
    if ((w.re - er) > 4.0 || (er - w.re) > 4.0 || (w.im - ei) > 4.0 || (ei - w.im) > 4.0) begin
      failures++;
      if (failures < 10) $display("e=%0d w=(%0d,%0d) exp=(%f,%f)", ex, w.re, w.im, er, ei);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << LOG_FINE); i++) begin
      @(negedge clk);
      wr_en = 1; wr_coarse = 0; wr_addr_fine = LOG_FINE'(i); wr_data = tw(i);
    end
    for (int i = 0; i < (1 << (LOG_N - LOG_FINE)); i++) begin
      @(negedge clk);
      wr_en = 1; wr_coarse = 1; wr_addr_coarse = (LOG_N-LOG_FINE)'(i); wr_data = tw(longint'(i) << LOG_FINE);
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      case (t)
        0: e = 0;
        1: e = 1;
        2: e = 1 << (LOG_N - 2);
        3: e = '1;
        default: e = LOG_N'($urandom);
      endcase
      in_valid = 1;
      e_q.push_back(e);
      c_q.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (e_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
