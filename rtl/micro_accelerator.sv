// micro_accelerator: the arithmetic of one accelerator chip: four radix-8
// units whose outputs are twiddled, with a twiddle generator per output lane.
//
// A 64-point transform is done as 8 x 8 (X[k1 + 8*k2] from x[8*n1 + n2]) by
// two chips of each ROLE:
//   ROLE 0 (first level): unit u = 4*CHIP + l takes x[8*n1 + u], n1 = 0..7, and
//     multiplies its output k1 by W64^(u*k1).
//   ROLE 1 (second level): unit k1 = 4*CHIP + l takes the first level's results
//     for n2 = 0..7 and multiplies its output k2, i.e. X[i] with i = k1 + 8*k2,
//     by the inter-pass twiddle W_N^((i*tw_m) << tw_shift), N = 2^LOG_N.
// Lane l*8 + n of in_data is input n of unit l; lane l*8 + k of out_data is
// output k of unit l. Twiddle factors are requested when the data enters, are
// ready after the two multiplication-free radix-8 stages, and wait one clock for
// the third stage. Latency: three clocks of radix-8 stages plus one of
// twiddling, four in all; one transform per clock at most. The meta word follows
// the data. All table writes go to every generator of the chip.
// Four radix-8 units per chip, twiddling after each stage, and twiddle
// generation during the first two stages follow the source architecture; the
// lane numbering and the per-lane generators are this design's choices.
module micro_accelerator
  import fft_pkg::*;
#(
  parameter int unsigned ROLE     = 0,
  parameter int unsigned CHIP     = 0,
  parameter int unsigned LOG_N    = 20,
  parameter int unsigned LOG_FINE = 10
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tw_wr_en,
  input  logic                      tw_wr_coarse,
  input  logic [LOG_FINE-1:0]       tw_wr_addr_fine,
  input  logic [LOG_N-LOG_FINE-1:0] tw_wr_addr_coarse,
  input  cplx_t                     tw_wr_data,
  input  logic [4:0]                tw_shift,
  input  logic                      in_valid,
  input  cplx_t                     in_data [32],
  input  meta_t                     in_meta,
  output logic                      out_valid,
  output cplx_t                     out_data [32],
  output meta_t                     out_meta
);
  localparam int unsigned LANES = 32;

  // twiddle exponents for this transform
  logic [LOG_N-1:0] e [LANES];
  logic [63:0] u, prod;
  always_comb begin
    u    = '0;
    prod = '0;
    for (int l = 0; l < 4; l++) begin
      for (int k = 0; k < R8; k++) begin
        u = 64'(CHIP * 4 + l);
        if (ROLE == 0) prod = (u * 64'(k)) << (LOG_N - 6);
        else           prod = ((u + 64'(8 * k)) * 64'(in_meta.tw_m)) << tw_shift;
        e[l*R8 + k] = prod[LOG_N-1:0];
      end
    end
  end

  cplx_t tw   [LANES];
  cplx_t tw_q [LANES];
  logic  tw_v [LANES];
  cplx_t r8_y [LANES];
  logic  r8_v [4];
  logic  mul_v [LANES];

  for (genvar g = 0; g < LANES; g++) begin : g_lane
    twiddle_gen #(.LOG_N(LOG_N), .LOG_FINE(LOG_FINE)) u_tw (
      .clk, .rst_n,
      .wr_en          (tw_wr_en),
      .wr_coarse      (tw_wr_coarse),
      .wr_addr_fine   (tw_wr_addr_fine),
      .wr_addr_coarse (tw_wr_addr_coarse),
      .wr_data        (tw_wr_data),
      .in_valid       (in_valid),
      .e              (e[g]),
      .out_valid      (tw_v[g]),
      .w              (tw[g])
    );

    always_ff @(posedge clk) tw_q[g] <= tw[g];

    cmul u_mul (
      .clk, .rst_n,
      .in_valid  (r8_v[g / R8]),
      .a         (r8_y[g]),
      .w         (tw_q[g]),
      .out_valid (mul_v[g]),
      .y         (out_data[g])
    );
  end

  for (genvar l = 0; l < 4; l++) begin : g_unit
    cplx_t x [R8];
    cplx_t y [R8];
    always_comb begin
      for (int n = 0; n < R8; n++) x[n] = in_data[l*R8 + n];
      for (int n = 0; n < R8; n++) r8_y[l*R8 + n] = y[n];
    end
    radix8_unit u_r8 (
      .clk, .rst_n,
      .in_valid  (in_valid),
      .x         (x),
      .out_valid (r8_v[l]),
      .y         (y)
    );
  end

  assign out_valid = mul_v[0];

  // meta word delay line, four clocks
  meta_t meta_d [4];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) meta_d[i] <= '0;
    end else begin
      meta_d[0] <= in_meta;
      for (int i = 1; i < 4; i++) meta_d[i] <= meta_d[i-1];
    end
  end
  assign out_meta = meta_d[3];

  // the twiddle factor and the radix-8 result must meet in the same clock
  a_tw_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                 r8_v[0] == $past(tw_v[0]));
endmodule
