// twiddle_gen: produces W_N^e = exp(-2*pi*j*e/N), N = 2^LOG_N, from a base
// vector set held in on-chip SRAM.
//
// The exponent is split e = eh*2^LOG_FINE + el. A coarse table holds W_N^(eh*2^LOG_FINE)
// (2^(LOG_N-LOG_FINE) words) and a fine table holds W_N^el (2^LOG_FINE words); the
// factor is their complex product. Cycle 1 reads both tables, cycle 2 multiplies:
// latency two clocks, one factor per clock. The two cycles line up with the two
// multiplication-free radix-8 stages, as in the source architecture. Tables are
// loaded through the write port (wr_coarse selects the table) before use.
// The coarse/fine split and the table sizes are this design's choices; the
// source only says a base vector set in SRAM and multipliers are used.
module twiddle_gen
  import fft_pkg::*;
#(
  parameter int unsigned LOG_N    = 20,
  parameter int unsigned LOG_FINE = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // table load port
  input  logic                         wr_en,
  input  logic                         wr_coarse,
  input  logic [LOG_FINE-1:0]          wr_addr_fine,
  input  logic [LOG_N-LOG_FINE-1:0]    wr_addr_coarse,
  input  cplx_t                        wr_data,
  // factor request
  input  logic                         in_valid,
  input  logic [LOG_N-1:0]             e,
  output logic                         out_valid,
  output cplx_t                        w
);
  localparam int unsigned NC = 1 << (LOG_N - LOG_FINE);
  localparam int unsigned NF = 1 << LOG_FINE;

  cplx_t coarse_mem [NC];
  cplx_t fine_mem   [NF];
  cplx_t rd_c, rd_f;
  logic  rd_v;

  always_ff @(posedge clk) begin
    if (wr_en && wr_coarse)  coarse_mem[wr_addr_coarse] <= wr_data;
    if (wr_en && !wr_coarse) fine_mem[wr_addr_fine]     <= wr_data;
    rd_c <= coarse_mem[e[LOG_N-1:LOG_FINE]];
    rd_f <= fine_mem[e[LOG_FINE-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_v <= 1'b0;
    else        rd_v <= in_valid;
  end

  cmul u_mul (
    .clk, .rst_n,
    .in_valid (rd_v),
    .a        (rd_c),
    .w        (rd_f),
    .out_valid,
    .y        (w)
  );
endmodule
