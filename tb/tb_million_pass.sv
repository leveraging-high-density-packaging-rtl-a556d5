// tb_million_pass: first pass of a million-point (2^20) FFT through the engine
// at its default parameters. The transform is split as 64 x 16384: the pass
// runs 16,384 64-point transforms, transform g taking x[16384*e + g],
// e = 0..63, and multiplies output i by W_(2^20)^(g*i) (tw_en = 1,
// tw_shift = 0). The read memory is a function, not an array: the word in
// slot f of channel c is x[16384*((c - f) mod 64) + f], a fixed pseudo-random
// value, so the staggered input layout needs no storage. Every written word is
// checked, as it arrives, against a double-precision 64-point DFT times the
// twiddle (tolerance 32 LSB), and the pass must take 4 clocks per transform
// plus a fixed latency: at a 5 ns memory beat, 16,384 transforms take
// 327.68 us, and four such passes 1.31 ms.
module tb_million_pass;
  import fft_pkg::*;
  localparam int  LOG_N = 20, LOG_FINE = 10, RD_LAT = 3, NF = 16384;
  localparam real TWO_PI = 6.283185307179586;
  localparam real ONE = 1073741824.0;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        start = 0, transposed = 0, tw_en = 1, busy, done;
  logic [19:0] num_fft = 20'(NF);
  logic [4:0]  tw_shift = '0;
  logic [11:0] rd_row_base = 12'd0, wr_row_base = 12'd64;
  logic        tw_wr_en = 0, tw_wr_coarse = 0;
  logic [LOG_FINE-1:0] tw_wr_addr_fine = '0;
  logic [LOG_N-LOG_FINE-1:0] tw_wr_addr_coarse = '0;
  cplx_t       tw_wr_data = '0;
  logic        rd_cmd_valid, rd_beat_valid, wr_valid;
  dram_addr_t  rd_addr [NPT], wr_addr;
  logic [15:0] rd_dq [NPT], wr_dq [NPT];

  fft64_engine dut (.*);

  int checks = 0, failures = 0, cyc = 0, nwords = 0;
  real maxerr = 0.0;
  always @(posedge clk) cyc <= cyc + 1;

  // input sample x[16384*e + g], 23-bit signed, from an integer hash
  function automatic cplx_t xin(int g, int e);
    logic [31:0] h;
    cplx_t w;
    h = 32'(g) * 32'h9e3779b1 ^ 32'(e) * 32'h85ebca77;
    h = h ^ (h >> 15); h = h * 32'h2c1b3c6d; h = h ^ (h >> 12);
    w.re = $signed({{9{h[22]}}, h[22:0]}) >>> 1;
    h = h * 32'h297a2d39; h = h ^ (h >> 15);
    w.im = $signed({{9{h[22]}}, h[22:0]}) >>> 1;
    return w;
  endfunction

  function automatic int slot_of(dram_addr_t a, int base);
    return (int'(a.row) - base) * 256 + int'(a.col[7:2]) * 4 + int'(a.bank);
  endfunction

  // ---------------- read memory ----------------
  logic [15:0] rpipe [RD_LAT][NPT];
  logic        rvpipe [RD_LAT];
  always @(posedge clk) begin
    for (int c = 0; c < NPT; c++) begin
      int f;
      cplx_t w;
      f = slot_of(rd_addr[c], 0);
      w = xin(f, ((c - f) % 64 + 64) % 64);
      case (rd_addr[c].col[1:0])
        2'd0: rpipe[0][c] <= w.re[15:0];
        2'd1: rpipe[0][c] <= w.re[31:16];
        2'd2: rpipe[0][c] <= w.im[15:0];
        default: rpipe[0][c] <= w.im[31:16];
      endcase
      for (int s = 1; s < RD_LAT; s++) rpipe[s][c] <= rpipe[s-1][c];
    end
    rvpipe[0] <= rst_n && rd_cmd_valid;
    for (int s = 1; s < RD_LAT; s++) rvpipe[s] <= rvpipe[s-1];
  end
  assign rd_beat_valid = rvpipe[RD_LAT-1];
  assign rd_dq         = rpipe[RD_LAT-1];

  // ---------------- write checker ----------------
  real   c64 [64], s64 [64];
  real   ex_re [64], ex_im [64];
  cplx_t acc [NPT];
  int    wslot;

  always @(posedge clk) if (rst_n && wr_valid) begin
    int bt;
    bt = int'(wr_addr.col[1:0]);
    if (bt == 0) begin
      wslot = slot_of(wr_addr, 64);
      // reference: 64-point DFT of transform wslot, times W_(2^20)^(g*i)
      for (int i = 0; i < 64; i++) begin
        real sr, si, ph;
        sr = 0; si = 0;
        for (int e = 0; e < 64; e++) begin
          cplx_t x;
          int k;
          x = xin(wslot, e);
          k = (e * i) % 64;
          sr += x.re * c64[k] - x.im * s64[k];
          si += x.re * s64[k] + x.im * c64[k];
        end
        ph = -TWO_PI * real'((longint'(wslot) * i) % (1 << LOG_N)) / real'(1 << LOG_N);
        ex_re[i] = sr * $cos(ph) - si * $sin(ph);
        ex_im[i] = sr * $sin(ph) + si * $cos(ph);
      end
    end
    for (int c = 0; c < NPT; c++) begin
      case (bt)
        0: acc[c].re[15:0]  = wr_dq[c];
        1: acc[c].re[31:16] = wr_dq[c];
        2: acc[c].im[15:0]  = wr_dq[c];
        default: acc[c].im[31:16] = wr_dq[c];
      endcase
    end
    if (bt == 3) begin
      for (int c = 0; c < NPT; c++) begin
        int i;
        real dr, di;
        i = ((c - wslot) % 64 + 64) % 64;
        dr = acc[c].re - ex_re[i]; if (dr < 0) dr = -dr;
        di = acc[c].im - ex_im[i]; if (di < 0) di = -di;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        checks++;
        if (dr > 32.0 || di > 32.0) begin
          failures++;
          if (failures < 10) $display("slot %0d element %0d: got (%0d,%0d) exp (%f,%f)",
                                      wslot, i, acc[c].re, acc[c].im, ex_re[i], ex_im[i]);
        end
      end
      nwords++;
    end
  end

  function automatic cplx_t tw(longint ex);
    real ph;
    ph = -TWO_PI * ex / real'(1 << LOG_N);
    tw.re = $rtoi($floor($cos(ph) * ONE + 0.5));
    tw.im = $rtoi($floor($sin(ph) * ONE + 0.5));
  endfunction

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, clocks;
    for (int k = 0; k < 64; k++) begin
      c64[k] = $cos(-TWO_PI * k / 64.0);
      s64[k] = $sin(-TWO_PI * k / 64.0);
    end
    for (int s = 0; s < RD_LAT; s++) rvpipe[s] = 0;
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
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    clocks = cyc - t0;
    $display("%0d transforms in %0d clocks; largest error %f LSB", NF, clocks, maxerr);
    checks += 2;
    if (nwords != NF) begin failures++; $display("%0d transforms written", nwords); end
    if (clocks < 4 * NF || clocks > 4 * NF + 40) begin failures++; $display("rate"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
