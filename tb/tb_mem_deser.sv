// tb_mem_deser: sends random complex words as four 16-bit beats per channel
// (re low, re high, im low, im high), sometimes with idle clocks between beats,
// and checks that the assembled words appear once, one clock after the fourth
// beat.
module tb_mem_deser;
  import fft_pkg::*;
  localparam int CH = 32;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic beat_valid = 0, out_valid;
  logic [15:0] dq [CH];
  cplx_t out_data [CH], words [CH];
  int checks = 0, failures = 0, nout = 0;

  mem_deser #(.CH(CH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) nout++;

  initial begin
    for (int c = 0; c < CH; c++) dq[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int c = 0; c < CH; c++) words[c] = {$urandom, $urandom};
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        checks++;
        if (out_valid) failures++;   // nothing while beats are arriving
        if (t % 3 == 2 && b == 2) begin
          beat_valid = 0;
          @(negedge clk);
        end
        beat_valid = 1;
        for (int c = 0; c < CH; c++)
          case (b)
            0: dq[c] = words[c].re[15:0];
            1: dq[c] = words[c].re[31:16];
            2: dq[c] = words[c].im[15:0];
            default: dq[c] = words[c].im[31:16];
          endcase
      end
      @(negedge clk);
      beat_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int c = 0; c < CH; c++) begin
        checks++;
        if (out_data[c] != words[c]) begin
          failures++;
          if (failures < 10) $display("t=%0d c=%0d got %h exp %h", t, c, out_data[c], words[c]);
        end
      end
      if (t % 2 == 1) @(negedge clk);   // an idle clock after odd words
    end
    @(negedge clk);
    checks++;
    if (nout != 300) begin failures++; $display("nout=%0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
