// lane_rotator: registered cyclic rotation of LANES complex lanes.
//
// out[d] = in[(d + amt) mod LANES]. The engine uses one instance on the write
// side, with amt = -f mod 64, so that element i of transform f lands on DRAM
// (f + i) mod 64 (the staggered placement of the source architecture), and one
// on the read side, with amt = r, to put the staggered lanes back in element
// order before the arithmetic (the source's on-chip "shift register stage").
// It is built as log2(LANES) conditional shift stages (a barrel shifter) and
// ends in one register: latency one clock, one vector per clock. The meta word
// is carried along unchanged. The barrel structure is this design's choice.
module lane_rotator
  import fft_pkg::*;
#(
  parameter int unsigned LANES = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  cplx_t                    in_data [LANES],
  input  meta_t                    in_meta,
  input  logic [$clog2(LANES)-1:0] amt,
  output logic                     out_valid,
  output cplx_t                    out_data [LANES],
  output meta_t                    out_meta
);
  localparam int unsigned LG = $clog2(LANES);

  // one generate block per shift stage; stage s moves lanes by 2^s when amt[s] is set
  for (genvar s = 0; s < LG; s++) begin : g_stage
    cplx_t v [LANES];
    for (genvar d = 0; d < LANES; d++) begin : g_lane
      if (s == 0) begin : g_first
        assign v[d] = amt[0] ? in_data[(d + 1) % LANES] : in_data[d];
      end else begin : g_next
        assign v[d] = amt[s] ? g_stage[s-1].v[(d + (1 << s)) % LANES] : g_stage[s-1].v[d];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_meta  <= '0;
      for (int d = 0; d < LANES; d++) out_data[d] <= '0;
    end else begin
      out_valid <= in_valid;
      out_meta  <= in_meta;
      out_data  <= g_stage[LG-1].v;
    end
  end
endmodule
