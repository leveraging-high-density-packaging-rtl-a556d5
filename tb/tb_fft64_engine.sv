// tb_fft64_engine: end-to-end test of the engine at its default parameters,
// with a behavioural model of the two DRAM groups (64 channels each, data
// returned RD_LAT clocks after the read command).
//  Run A: 320 independent 64-point transforms in one linear pass. Input
//         element e of transform g is placed on DRAM (g + e) mod 64 in slot g;
//         output element i must appear on DRAM (g + i) mod 64 in slot g of the
//         write group. The pass must sustain one transform per four clocks.
//  Run B: one 4096-point transform as two passes: pass 1 does the 64-point
//         transforms over n1 (x[64*n1 + n2], transform g = n2) and multiplies
//         output k1 by W4096^(g*k1); the written group is then handed back as
//         read group (the chips' roles swap) and pass 2 reads it transposed,
//         so X[h + 64*k2] lands on DRAM (h + k2) mod 64 in slot h.
// Every result is compared with a double-precision DFT. Counted mechanisms
// (each must occur): lane rotation on read, stagger on write, transposed read,
// inter-accelerator bus blocks, non-trivial inter-pass twiddles, bank
// interleaving and row changes (each at least four transform cycles after the
// bank's previous access).
module tb_fft64_engine;
  import fft_pkg::*;
  localparam int  LOG_N = 20, LOG_FINE = 10, RD_LAT = 3;
  localparam real TWO_PI = 6.283185307179586;
  localparam real ONE = 1073741824.0;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        start = 0, transposed = 0, tw_en = 0, busy, done;
  logic [19:0] num_fft = '0;
  logic [4:0]  tw_shift = '0;
  logic [11:0] rd_row_base = '0, wr_row_base = '0;
  logic        tw_wr_en = 0, tw_wr_coarse = 0;
  logic [LOG_FINE-1:0] tw_wr_addr_fine = '0;
  logic [LOG_N-LOG_FINE-1:0] tw_wr_addr_coarse = '0;
  cplx_t       tw_wr_data = '0;
  logic        rd_cmd_valid, rd_beat_valid, wr_valid;
  dram_addr_t  rd_addr [NPT], wr_addr;
  logic [15:0] rd_dq [NPT], wr_dq [NPT];

  fft64_engine dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- DRAM model ----------------
  logic [15:0] mem_rd [longint];
  logic [15:0] mem_wr [longint];
  logic [15:0] rpipe [RD_LAT][NPT];
  logic        rvpipe [RD_LAT];

  function automatic longint key(int ch, dram_addr_t a);
    return (longint'(ch) << 22) | longint'(a);
  endfunction

  always @(posedge clk) begin
    for (int c = 0; c < NPT; c++) begin
      logic [15:0] v;
      v = 16'hdead;
      if (mem_rd.exists(key(c, rd_addr[c]))) v = mem_rd[key(c, rd_addr[c])];
      rpipe[0][c] <= v;
      for (int s = 1; s < RD_LAT; s++) rpipe[s][c] <= rpipe[s-1][c];
    end
    rvpipe[0] <= rst_n && rd_cmd_valid;
    for (int s = 1; s < RD_LAT; s++) rvpipe[s] <= rvpipe[s-1];
    if (rst_n && wr_valid)
      for (int c = 0; c < NPT; c++) mem_wr[key(c, wr_addr)] = wr_dq[c];
  end
  assign rd_beat_valid = rvpipe[RD_LAT-1];
  assign rd_dq         = rpipe[RD_LAT-1];

  // slot f of channel ch, beat b
  function automatic longint skey(int ch, int f, int b, int base);
    dram_addr_t a;
    a.bank = 2'(f % 4);
    a.col  = 8'(4 * ((f / 4) % 64) + b);
    a.row  = 12'(base + f / 256);
    return key(ch, a);
  endfunction

  task automatic put_word(int ch, int f, int base, cplx_t w);
    mem_rd[skey(ch, f, 0, base)] = w.re[15:0];
    mem_rd[skey(ch, f, 1, base)] = w.re[31:16];
    mem_rd[skey(ch, f, 2, base)] = w.im[15:0];
    mem_rd[skey(ch, f, 3, base)] = w.im[31:16];
  endtask

  function automatic cplx_t get_word(int ch, int f, int base);
    cplx_t w;
    w = '0;
    if (!mem_wr.exists(skey(ch, f, 0, base))) return {32'h7fffffff, 32'h7fffffff};
    w.re[15:0]  = mem_wr[skey(ch, f, 0, base)];
    w.re[31:16] = mem_wr[skey(ch, f, 1, base)];
    w.im[15:0]  = mem_wr[skey(ch, f, 2, base)];
    w.im[31:16] = mem_wr[skey(ch, f, 3, base)];
    return w;
  endfunction

  // ---------------- mechanism monitors ----------------
  int n_sort_rot = 0, n_stagger = 0, n_transposed = 0, n_bus = 0, n_twiddle = 0;
  int n_bank_switch = 0, n_row_hop = 0, n_rd_gap = 0;
  int last_row [4], last_start [4], last_bank;
  logic rd_prev;

  always @(posedge clk) if (rst_n) begin
    if (dut.asm_valid && dut.rd_meta.rot != 0) n_sort_rot++;
    if (dut.stg_valid && dut.stg_meta.fft[5:0] != 0) n_stagger++;
    if (rd_cmd_valid && rd_addr[0] != rd_addr[1]) n_transposed++;
    if (dut.rx_valid) n_bus++;
    if (dut.rx_valid && dut.rx_meta.tw_m != 0) n_twiddle++;
    if (busy && rd_prev && !rd_cmd_valid && dut.u_ctrl.issuing) n_rd_gap++;
    rd_prev <= rd_cmd_valid;
    // write side: bank interleave and row changes
    if (wr_valid && dut.wbeat == 2'd0) begin
      if (int'(wr_addr.bank) != last_bank) n_bank_switch++;
      if (last_row[wr_addr.bank] >= 0 && last_row[wr_addr.bank] != int'(wr_addr.row)) begin
        n_row_hop++;
        checks++;
        if (cyc - last_start[wr_addr.bank] < 16) begin
          failures++;
          $display("row change in bank %0d only %0d clocks after its last access",
                   wr_addr.bank, cyc - last_start[wr_addr.bank]);
        end
      end
      last_row[wr_addr.bank]   = wr_addr.row;
      last_start[wr_addr.bank] = cyc;
      last_bank = wr_addr.bank;
    end
  end

  // ---------------- helpers ----------------
  function automatic cplx_t tw(longint ex);
    real ph;
    ph = -TWO_PI * ex / real'(1 << LOG_N);
    tw.re = $rtoi($floor($cos(ph) * ONE + 0.5));
    tw.im = $rtoi($floor($sin(ph) * ONE + 0.5));
  endfunction

  task automatic run_pass(int n, bit tr, bit twe, int sh, int rb, int wb, output int clocks);
    int t0;
    @(negedge clk);
    num_fft = 20'(n); transposed = tr; tw_en = twe; tw_shift = 5'(sh);
    rd_row_base = 12'(rb); wr_row_base = 12'(wb);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    clocks = cyc - t0;
  endtask

  function automatic bit close(cplx_t g, real er, real ei, real tol);
    return !((g.re - er) > tol || (er - g.re) > tol || (g.im - ei) > tol || (ei - g.im) > tol);
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  localparam int NA = 320;
  cplx_t xa [NA][64];
  cplx_t xb [4096];
  real   c4k [4096], s4k [4096];
  real   maxerr = 0.0;

  initial begin
    int clocks;
    for (int b = 0; b < 4; b++) begin last_row[b] = -1; last_start[b] = -1000; end
    last_bank = -1;
    rd_prev = 0;
    for (int s = 0; s < RD_LAT; s++) rvpipe[s] = 0;
    for (int i = 0; i < 4096; i++) begin
      c4k[i] = $cos(-TWO_PI * i / 4096.0);
      s4k[i] = $sin(-TWO_PI * i / 4096.0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // twiddle tables
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

    // ---------- run A ----------
    for (int g = 0; g < NA; g++)
      for (int e = 0; e < 64; e++) begin
        if (g == 0) begin
          xa[g][e].re = (e == 0) ? 32'sd1000 : 32'sd0; xa[g][e].im = 0;   // impulse
        end else begin
          xa[g][e].re = $signed($urandom_range(0, 1 << 23)) - (1 << 22);
          xa[g][e].im = $signed($urandom_range(0, 1 << 23)) - (1 << 22);
        end
        put_word((g + e) % 64, g, 0, xa[g][e]);
      end
    run_pass(NA, 0, 0, 0, 0, 0, clocks);
    $display("run A: %0d transforms in %0d clocks", NA, clocks);
    checks++;
    if (clocks > 4 * NA + 40 || clocks < 4 * NA) begin
      failures++; $display("run A rate: %0d clocks for %0d transforms", clocks, NA);
    end
    for (int g = 0; g < NA; g++)
      for (int i = 0; i < 64; i++) begin
        real er, ei;
        cplx_t got;
        er = 0; ei = 0;
        for (int e = 0; e < 64; e++) begin
          int k;
          k = ((e * i) % 64) * 64;
          er += xa[g][e].re * c4k[k] - xa[g][e].im * s4k[k];
          ei += xa[g][e].re * s4k[k] + xa[g][e].im * c4k[k];
        end
        got = get_word((g + i) % 64, g, 0);
        checks++;
        if (!close(got, er, ei, 32.0)) begin
          failures++;
          if (failures < 10) $display("A g=%0d i=%0d got (%0d,%0d) exp (%f,%f)", g, i, got.re, got.im, er, ei);
        end
      end

    // ---------- run B: 4096-point transform ----------
    mem_rd.delete();
    mem_wr.delete();
    for (int n = 0; n < 4096; n++) begin
      xb[n].re = $signed($urandom_range(0, 1 << 18)) - (1 << 17);
      xb[n].im = $signed($urandom_range(0, 1 << 18)) - (1 << 17);
    end
    for (int g = 0; g < 64; g++)
      for (int e = 0; e < 64; e++) put_word((g + e) % 64, g, 100, xb[64 * e + g]);
    run_pass(64, 0, 1, LOG_N - 12, 100, 200, clocks);
    $display("run B pass 1: %0d clocks", clocks);
    mem_rd = mem_wr;          // written group becomes the read group
    mem_wr.delete();
    run_pass(64, 1, 0, 0, 200, 300, clocks);
    $display("run B pass 2: %0d clocks", clocks);
    for (int h = 0; h < 64; h++)
      for (int k2 = 0; k2 < 64; k2++) begin
        real er, ei, err;
        cplx_t got;
        int kk;
        kk = h + 64 * k2;
        er = 0; ei = 0;
        for (int n = 0; n < 4096; n++) begin
          int p;
          p = (n * kk) % 4096;
          er += xb[n].re * c4k[p] - xb[n].im * s4k[p];
          ei += xb[n].re * s4k[p] + xb[n].im * c4k[p];
        end
        got = get_word((h + k2) % 64, h, 300);
        err = (got.re > er) ? got.re - er : er - got.re;
        if (err > maxerr) maxerr = err;
        checks++;
        if (!close(got, er, ei, 256.0)) begin
          failures++;
          if (failures < 10) $display("B X[%0d] got (%0d,%0d) exp (%f,%f)", kk, got.re, got.im, er, ei);
        end
      end
    $display("run B: largest error %f LSB", maxerr);

    // ---------- mechanisms ----------
    $display("sort rotations %0d, staggered writes %0d, transposed reads %0d, bus blocks %0d,",
             n_sort_rot, n_stagger, n_transposed, n_bus);
    $display("twiddled blocks %0d, bank switches %0d, row changes %0d, read gaps %0d",
             n_twiddle, n_bank_switch, n_row_hop, n_rd_gap);
    checks += 8;
    if (n_sort_rot == 0)    begin failures++; $display("no read rotation"); end
    if (n_stagger == 0)     begin failures++; $display("no staggered write"); end
    if (n_transposed == 0)  begin failures++; $display("no transposed read"); end
    if (n_bus != NA + 128)  begin failures++; $display("bus blocks %0d", n_bus); end
    if (n_twiddle == 0)     begin failures++; $display("no inter-pass twiddle"); end
    if (n_bank_switch == 0) begin failures++; $display("no bank switch"); end
    if (n_row_hop == 0)     begin failures++; $display("no row change"); end
    if (n_rd_gap != 0)      begin failures++; $display("read stream had gaps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
