// tb_fft_ctrl: runs a linear pass of 70 transforms and a transposed pass of
// 130 transforms (crossing a 64-transform group). For every read beat it checks
// each channel's address against the expected slot (g, or
// 64*(g/64) + ((d - g) mod 64)) mapped to bank/row/column; it checks that a new
// transform starts every fourth clock without gaps, that the meta words come
// out in order with rot = g mod 64 and tw_m = g (or 0), and that done rises
// after the last write is reported, not before.
module tb_fft_ctrl;
  import fft_pkg::*;
  localparam int CH = 64;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic start = 0, transposed = 0, tw_en = 0, busy, done, rd_cmd_valid, meta_pop = 0, wr_last = 0;
  logic [19:0] num_fft = '0;
  logic [11:0] rd_row_base = '0;
  dram_addr_t rd_addr [CH];
  meta_t meta_out;
  int checks = 0, failures = 0;

  fft_ctrl #(.CH(CH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pass(int n, bit tr, bit twe, int base);
    int popped;
    popped = 0;
    @(negedge clk);
    num_fft = 20'(n); transposed = tr; tw_en = twe; rd_row_base = 12'(base);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int g = 0; g < n; g++) begin
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (!rd_cmd_valid) begin failures++; $display("gap at g=%0d b=%0d", g, b); end
        for (int d = 0; d < CH; d++) begin
          int f;
          f = tr ? 64 * (g / 64) + (((d - g) % 64 + 64) % 64) : g;
          checks++;
          if (rd_addr[d].bank != f % 4 || rd_addr[d].col != 4 * ((f / 4) % 64) + b ||
              rd_addr[d].row != base + f / 256) begin
            failures++;
            if (failures < 10) $display("g=%0d b=%0d d=%0d", g, b, d);
          end
        end
        // pop the meta word of the transform read two transforms ago
        if (b == 3 && g >= 2) begin
          checks++;
          if (meta_out.fft != 20'(popped) || meta_out.rot != 6'(popped % 64) ||
              meta_out.tw_m != (twe ? 20'(popped) : 20'd0)) failures++;
          meta_pop = 1;
          popped++;
        end
        @(negedge clk);
        meta_pop = 0;
      end
    end
    checks++;
    if (rd_cmd_valid) failures++;
    while (popped < n) begin
      checks++;
      if (meta_out.fft != 20'(popped)) failures++;
      meta_pop = 1; popped++;
      @(negedge clk);
      meta_pop = 0;
    end
    for (int w = 0; w < n; w++) begin
      checks++;
      if (done || !busy) failures++;
      wr_last = 1;
      @(negedge clk);
      wr_last = 0;
      @(negedge clk);
    end
    checks++;
    if (!done || busy) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_pass(70, 0, 1, 5);
    run_pass(130, 1, 0, 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
