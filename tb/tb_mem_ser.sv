// tb_mem_ser: hands random 32-word vectors to the write interface every fourth
// clock (the engine's rate) and, after a gap, once more; checks the four beats
// of every channel (re low, re high, im low, im high), their beat numbers, the
// slot number shown with them, and that beat_valid is low when idle.
module tb_mem_ser;
  import fft_pkg::*;
  localparam int CH = 32;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0, beat_valid;
  cplx_t in_data [CH], words [CH];
  logic [19:0] in_slot = '0, slot;
  logic [1:0] beat;
  logic [15:0] dq [CH];
  int checks = 0, failures = 0;

  mem_ser #(.CH(CH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] s;
    for (int c = 0; c < CH; c++) in_data[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (beat_valid) failures++;
    for (int t = 0; t < 300; t++) begin
      for (int c = 0; c < CH; c++) begin words[c] = {$urandom, $urandom}; in_data[c] = words[c]; end
      s = 20'($urandom);
      in_slot = s;
      in_valid = 1;
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!beat_valid || beat != 2'(b) || slot != s) failures++;
        for (int c = 0; c < CH; c++) begin
          logic [15:0] e;
          case (b)
            0: e = words[c].re[15:0];
            1: e = words[c].re[31:16];
            2: e = words[c].im[15:0];
            default: e = words[c].im[31:16];
          endcase
          checks++;
          if (dq[c] != e) begin
            failures++;
            if (failures < 10) $display("t=%0d b=%0d c=%0d got %h exp %h", t, b, c, dq[c], e);
          end
        end
      end
      if (t % 5 == 4) begin
        @(negedge clk);
        checks++;
        if (beat_valid) failures++;
      end
      // otherwise the next vector is presented now, during the last beat's clock
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
