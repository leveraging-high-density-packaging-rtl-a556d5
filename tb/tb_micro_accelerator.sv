// tb_micro_accelerator: checks both chip roles at the full table size
// (N = 2^20). Loads the twiddle tables, then streams random transforms, one
// per clock, into a first-level chip (CHIP 1) and a second-level chip (CHIP 0,
// tw_shift 8, so its factors are those of a 4096-point transform, random
// tw_m). Every output is compared with a double-precision 8-point DFT times
// the expected twiddle (tolerance 8 LSB); the latency must be four clocks and
// the meta word must follow the data.
module tb_micro_accelerator;
  import fft_pkg::*;
  localparam int LOG_N = 20, LOG_FINE = 10, NT = 300;
  localparam real TWO_PI = 6.283185307179586;
  localparam real ONE = 1073741824.0;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic tw_wr_en = 0, tw_wr_coarse = 0;
  logic [LOG_FINE-1:0] tw_wr_addr_fine = '0;
  logic [LOG_N-LOG_FINE-1:0] tw_wr_addr_coarse = '0;
  cplx_t tw_wr_data = '0;
  logic [4:0] tw_shift = 5'd8;
  logic in_valid = 0;
  cplx_t in_data [32];
  meta_t in_meta = '0;
  logic  ov [2];
  cplx_t od [2][32];
  meta_t om [2];
  int checks = 0, failures = 0, cyc = 0;
  int nout [2] = '{0, 0};
  real ref_re [2][NT][32], ref_im [2][NT][32];
  meta_t mref [NT];
  int cin [NT];

  micro_accelerator #(.ROLE(0), .CHIP(1), .LOG_N(LOG_N), .LOG_FINE(LOG_FINE)) dut0 (
    .clk, .rst_n, .tw_wr_en, .tw_wr_coarse, .tw_wr_addr_fine, .tw_wr_addr_coarse, .tw_wr_data,
    .tw_shift, .in_valid, .in_data, .in_meta,
    .out_valid (ov[0]), .out_data (od[0]), .out_meta (om[0]));
  micro_accelerator #(.ROLE(1), .CHIP(0), .LOG_N(LOG_N), .LOG_FINE(LOG_FINE)) dut1 (
    .clk, .rst_n, .tw_wr_en, .tw_wr_coarse, .tw_wr_addr_fine, .tw_wr_addr_coarse, .tw_wr_data,
    .tw_shift, .in_valid, .in_data, .in_meta,
    .out_valid (ov[1]), .out_data (od[1]), .out_meta (om[1]));

  always @(posedge clk) cyc <= cyc + 1;

  function automatic cplx_t tw(longint ex);
    real ph;
    ph = -TWO_PI * ex / real'(1 << LOG_N);
    tw.re = $rtoi($floor($cos(ph) * ONE + 0.5));
    tw.im = $rtoi($floor($sin(ph) * ONE + 0.5));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar r = 0; r < 2; r++) begin : g_chk
    always @(negedge clk) if (rst_n && ov[r]) begin
      int t;
      t = nout[r];
      checks++;
      if (cyc - cin[t] != 4 || om[r] != mref[t]) begin failures++; $display("role %0d latency/meta", r); end
      for (int i = 0; i < 32; i++) begin
        checks++;
        if ((od[r][i].re - ref_re[r][t][i]) > 8.0 || (ref_re[r][t][i] - od[r][i].re) > 8.0 ||
            (od[r][i].im - ref_im[r][t][i]) > 8.0 || (ref_im[r][t][i] - od[r][i].im) > 8.0) begin
          failures++;
          if (failures < 10) $display("role %0d t=%0d lane %0d got (%0d,%0d) exp (%f,%f)", r, t, i,
                                      od[r][i].re, od[r][i].im, ref_re[r][t][i], ref_im[r][t][i]);
        end
      end
      nout[r]++;
    end
  end

  initial begin
    for (int i = 0; i < 32; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << LOG_FINE); i++) begin
      @(negedge clk);
      tw_wr_en = 1; tw_wr_coarse = 0; tw_wr_addr_fine = LOG_FINE'(i); tw_wr_data = tw(i);
    end
    for (int i = 0; i < (1 << (LOG_N - LOG_FINE)); i++) begin
      @(negedge clk);
      tw_wr_en = 1; tw_wr_coarse = 1; tw_wr_addr_coarse = (LOG_N-LOG_FINE)'(i);
      tw_wr_data = tw(longint'(i) << LOG_FINE);
    end
    @(negedge clk);
    tw_wr_en = 0;
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      for (int i = 0; i < 32; i++) begin
        in_data[i].re = $signed($urandom_range(0, 1 << 25)) - (1 << 24);
        in_data[i].im = $signed($urandom_range(0, 1 << 25)) - (1 << 24);
      end
      in_meta = '{fft: 20'($urandom), tw_m: 20'($urandom_range(0, 63)), rot: 6'($urandom)};
      mref[t] = in_meta;
      cin[t] = cyc;
      for (int l = 0; l < 4; l++)
        for (int k = 0; k < 8; k++) begin
          real sr, si, ph;
          longint e0, e1;
          sr = 0; si = 0;
          for (int n = 0; n < 8; n++) begin
            ph = -TWO_PI * ((n * k) % 8) / 8.0;
            sr += in_data[l*8+n].re * $cos(ph) - in_data[l*8+n].im * $sin(ph);
            si += in_data[l*8+n].re * $sin(ph) + in_data[l*8+n].im * $cos(ph);
          end
          e0 = (4 + l) * k;                          // W64^(u*k1), u = 4 + l
          ph = -TWO_PI * e0 / 64.0;
          ref_re[0][t][l*8+k] = sr * $cos(ph) - si * $sin(ph);
          ref_im[0][t][l*8+k] = sr * $sin(ph) + si * $cos(ph);
          e1 = ((l + 8 * k) * longint'(in_meta.tw_m)) % 4096;   // W4096^(i*m), i = k1 + 8*k2
          ph = -TWO_PI * e1 / 4096.0;
          ref_re[1][t][l*8+k] = sr * $cos(ph) - si * $sin(ph);
          ref_im[1][t][l*8+k] = sr * $sin(ph) + si * $cos(ph);
        end
      in_valid = 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (nout[0] != NT || nout[1] != NT) begin failures++; $display("outputs %0d %0d", nout[0], nout[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
