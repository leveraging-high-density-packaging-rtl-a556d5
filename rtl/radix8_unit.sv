// radix8_unit: 8-point FFT as three pipelined radix-2 stages
// (decimation in time).
//
// x[0..7] in natural order, X[0..7] out in natural order,
// X[k] = sum_n x[n] * exp(-2*pi*j*n*k/8). The first two stages need only
// additions and swaps (factors +-1, +-j); each is one register stage. The third
// stage multiplies the odd half by W8^k (k = 1, 3 use cos(pi/4)) and then adds,
// in one register stage. Latency is three clocks, one transform per clock.
// The split into "first two stages without multiplications" and "third stage"
// follows the source architecture's operation sequence; the register placement
// per stage and the absence of scaling are this design's choices.
module radix8_unit
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x [R8],
  output logic  out_valid,
  output cplx_t y [R8]
);
  cplx_t s1 [R8];   // after stage 1
  cplx_t s2 [R8];   // after stage 2: 4-point DFTs of even (0..3) and odd (4..7) inputs
  logic  v1, v2;

  cplx_t s1_n [R8], s2_n [R8], y_n [R8];
  cplx_t t [4];

  always_comb begin
    // stage 1: pairs (0,4) (2,6) (1,5) (3,7)
    s1_n[0] = c_add(x[0], x[4]);  s1_n[1] = c_sub(x[0], x[4]);
    s1_n[2] = c_add(x[2], x[6]);  s1_n[3] = c_sub(x[2], x[6]);
    s1_n[4] = c_add(x[1], x[5]);  s1_n[5] = c_sub(x[1], x[5]);
    s1_n[6] = c_add(x[3], x[7]);  s1_n[7] = c_sub(x[3], x[7]);
    // stage 2: factors 1 and -j
    s2_n[0] = c_add(s1[0], s1[2]);         s2_n[2] = c_sub(s1[0], s1[2]);
    s2_n[1] = c_add(s1[1], c_mnj(s1[3]));  s2_n[3] = c_sub(s1[1], c_mnj(s1[3]));
    s2_n[4] = c_add(s1[4], s1[6]);         s2_n[6] = c_sub(s1[4], s1[6]);
    s2_n[5] = c_add(s1[5], c_mnj(s1[7]));  s2_n[7] = c_sub(s1[5], c_mnj(s1[7]));
    // stage 3: t[k] = W8^k * O[k]
    t[0]    = s2[4];
    t[1].re = q_mul(s2[5].re + s2[5].im, C45);
    t[1].im = q_mul(s2[5].im - s2[5].re, C45);
    t[2]    = c_mnj(s2[6]);
    t[3].re = q_mul(s2[7].im - s2[7].re, C45);
    t[3].im = q_mul(-(s2[7].re + s2[7].im), C45);
    for (int k = 0; k < 4; k++) begin
      y_n[k]   = c_add(s2[k], t[k]);
      y_n[k+4] = c_sub(s2[k], t[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      for (int i = 0; i < R8; i++) begin
        s1[i] <= '0; s2[i] <= '0; y[i] <= '0;
      end
    end else begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
      s1 <= s1_n;
      s2 <= s2_n;
      y  <= y_n;
    end
  end
endmodule
