// cmul: one complex multiplier, the engine's 32-bit multiply-accumulate unit
// used for twiddling.
//
// y = a * w, where a is a 32-bit integer complex sample and w a coefficient
// with 30 fraction bits. Each part is two 32x32 products followed by one
// addition (re = ar*wr - ai*wi, im = ar*wi + ai*wr), rounded to nearest and
// truncated back to 32 bits. The result is registered: latency one clock, one
// product per clock. The multiply-then-add in one 2 ns cycle follows the source
// architecture; the rounding is this design's choice.
module cmul
  import fft_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t a,
  input  cplx_t w,
  output logic  out_valid,
  output cplx_t y
);
  localparam int unsigned PW = 2*CW + 2;

  logic signed [PW-1:0] pr, pi;
  always_comb begin
    pr = PW'(a.re) * PW'(w.re) - PW'(a.im) * PW'(w.im) + (PW'(1) <<< (TW_FRAC-1));
    pi = PW'(a.re) * PW'(w.im) + PW'(a.im) * PW'(w.re) + (PW'(1) <<< (TW_FRAC-1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      y.re      <= CW'(pr >>> TW_FRAC);
      y.im      <= CW'(pi >>> TW_FRAC);
    end
  end
endmodule
