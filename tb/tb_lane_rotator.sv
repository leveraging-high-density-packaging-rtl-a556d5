// tb_lane_rotator: random 64-lane vectors with random rotation amounts, one per
// clock; each output must equal in[(d + amt) mod 64] one clock later, with the
// meta word unchanged.
module tb_lane_rotator;
  import fft_pkg::*;
  localparam int L = 64;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0, out_valid;
  cplx_t in_data [L], out_data [L], exp_d [L];
  meta_t in_meta = '0, out_meta, exp_m;
  logic [5:0] amt = '0;
  int checks = 0, failures = 0;

  lane_rotator #(.LANES(L)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < L; d++) in_data[d] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (t > 0) begin
        checks++;
        if (!out_valid || out_meta != exp_m) failures++;
        for (int d = 0; d < L; d++) begin
          checks++;
          if (out_data[d] != exp_d[d]) begin
            failures++;
            if (failures < 10) $display("t=%0d d=%0d", t, d);
          end
        end
      end
      amt = (t < 64) ? 6'(t) : 6'($urandom);
      for (int d = 0; d < L; d++) in_data[d] = {$urandom, $urandom};
      in_meta = meta_t'({$urandom, $urandom});
      for (int d = 0; d < L; d++) exp_d[d] = in_data[(d + amt) % L];
      exp_m = in_meta;
      in_valid = 1;
    end
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
