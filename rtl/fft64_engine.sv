// fft64_engine: radix-64 FFT engine built from four accelerator chips and two
// groups of 64 DDR SDRAM channels.
//
// One pass streams 64-point transforms from the read-side DRAMs to the
// write-side DRAMs, one transform per four memory beats:
//   read interface (2 x 32 channels, four 16-bit beats per complex word)
//   -> sort rotator (undoes the stagger of the stored data)
//   -> two first-level chips (eight radix-8 units, twiddles W64^(n2*k1))
//   -> inter-accelerator bus (256 bits, four bus beats per core clock)
//   -> two second-level chips (eight radix-8 units, inter-pass twiddles)
//   -> stagger rotator (element i of transform f goes to DRAM (f+i) mod 64)
//   -> write interface (2 x 32 channels).
// fft_ctrl generates the read addresses; the write address of every channel is
// that of the transform's slot (dram_addr_gen). A larger transform is built from
// several passes, the next pass reading transposed (see fft_ctrl). The DRAMs
// are outside: the read side gets rd_cmd_valid and an address per channel and
// returns the data as four beats marked by rd_beat_valid, in order, after any
// fixed latency; the write side gets wr_valid, one address for all channels
// and the 64 beats. Twiddle tables are loaded through tw_wr_* before a pass.
// Latency from the last read beat to the first write beat: 1 (assemble) +
// 1 (sort) + 4 (chip) + 5 (bus) + 4 (chip) + 1 (stagger) + 1 (serialise) = 17
// clocks. Two first-level and two second-level chips joined by a bus, 64 DRAM
// channels per side and the DRAM numbering follow the source architecture;
// placing the sort and stagger rotators across both chips of a level, the
// pass control and all handshakes are this design's choices.
module fft64_engine
  import fft_pkg::*;
#(
  parameter int unsigned LOG_N    = 20,
  parameter int unsigned LOG_FINE = 10,
  parameter int unsigned BUS_W    = 256,
  parameter int unsigned BUS_RATIO = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // pass control
  input  logic                      start,
  input  logic [19:0]               num_fft,
  input  logic                      transposed,
  input  logic                      tw_en,
  input  logic [4:0]                tw_shift,
  input  logic [11:0]               rd_row_base,
  input  logic [11:0]               wr_row_base,
  output logic                      busy,
  output logic                      done,
  // twiddle table load
  input  logic                      tw_wr_en,
  input  logic                      tw_wr_coarse,
  input  logic [LOG_FINE-1:0]       tw_wr_addr_fine,
  input  logic [LOG_N-LOG_FINE-1:0] tw_wr_addr_coarse,
  input  cplx_t                     tw_wr_data,
  // read-side DRAM group
  output logic                      rd_cmd_valid,
  output dram_addr_t                rd_addr [NPT],
  input  logic                      rd_beat_valid,
  input  logic [15:0]               rd_dq [NPT],
  // write-side DRAM group
  output logic                      wr_valid,
  output dram_addr_t                wr_addr,
  output logic [15:0]               wr_dq [NPT]
);
  // ---------------- control ----------------
  logic  asm_valid;
  meta_t rd_meta;
  logic  wr_last;

  fft_ctrl #(.CH(NPT)) u_ctrl (
    .clk, .rst_n,
    .start, .num_fft, .transposed, .tw_en, .rd_row_base,
    .busy, .done,
    .rd_cmd_valid, .rd_addr,
    .meta_pop (asm_valid),
    .meta_out (rd_meta),
    .wr_last
  );

  // ---------------- read interface ----------------
  logic  [15:0] dq_lo [32], dq_hi [32];
  cplx_t asm_lo [32], asm_hi [32], asm_all [NPT];
  logic  asm_v_hi;
  always_comb begin
    for (int c = 0; c < 32; c++) begin
      dq_lo[c] = rd_dq[c];
      dq_hi[c] = rd_dq[32 + c];
      asm_all[c]      = asm_lo[c];
      asm_all[32 + c] = asm_hi[c];
    end
  end

  mem_deser #(.CH(32)) u_rd0 (.clk, .rst_n, .beat_valid(rd_beat_valid), .dq(dq_lo),
                              .out_valid(asm_valid), .out_data(asm_lo));
  mem_deser #(.CH(32)) u_rd1 (.clk, .rst_n, .beat_valid(rd_beat_valid), .dq(dq_hi),
                              .out_valid(asm_v_hi), .out_data(asm_hi));

  // ---------------- sort (undo stagger) ----------------
  logic  srt_valid;
  cplx_t srt [NPT];
  meta_t srt_meta;
  lane_rotator #(.LANES(NPT)) u_sort (
    .clk, .rst_n,
    .in_valid (asm_valid), .in_data (asm_all), .in_meta (rd_meta), .amt (rd_meta.rot),
    .out_valid (srt_valid), .out_data (srt), .out_meta (srt_meta)
  );

  // ---------------- first level ----------------
  cplx_t a_in [2][32], a_out [2][32];
  logic  a_v [2];
  meta_t a_meta [2];
  always_comb begin
    for (int c = 0; c < 2; c++)
      for (int l = 0; l < 4; l++)
        for (int n = 0; n < R8; n++)
          a_in[c][l*R8 + n] = srt[8*n + 4*c + l];
  end

  for (genvar c = 0; c < 2; c++) begin : g_lvl1
    micro_accelerator #(.ROLE(0), .CHIP(c), .LOG_N(LOG_N), .LOG_FINE(LOG_FINE)) u_chip (
      .clk, .rst_n,
      .tw_wr_en, .tw_wr_coarse, .tw_wr_addr_fine, .tw_wr_addr_coarse, .tw_wr_data,
      .tw_shift,
      .in_valid (srt_valid), .in_data (a_in[c]), .in_meta (srt_meta),
      .out_valid (a_v[c]), .out_data (a_out[c]), .out_meta (a_meta[c])
    );
  end

  // ---------------- inter-accelerator bus ----------------
  logic  bus_active;
  cplx_t bus_word [BUS_W*BUS_RATIO/64];
  logic  rx_valid;
  cplx_t rx [NPT];
  meta_t rx_meta;
  pe_bus #(.BUS_W(BUS_W), .RATIO(BUS_RATIO), .NV(32)) u_bus (
    .clk, .rst_n,
    .in_valid (a_v[0]), .src0 (a_out[0]), .src1 (a_out[1]), .in_meta (a_meta[0]),
    .bus_active, .bus_word,
    .rx_valid, .rx_data (rx), .rx_meta
  );

  // ---------------- second level ----------------
  cplx_t b_in [2][32], b_out [2][32];
  logic  b_v [2];
  meta_t b_meta [2];
  cplx_t xf [NPT];
  always_comb begin
    for (int c = 0; c < 2; c++)
      for (int l = 0; l < 4; l++)
        for (int n = 0; n < R8; n++) begin
          b_in[c][l*R8 + n]     = rx[n*R8 + 4*c + l];   // from first-level unit n, output k1
          xf[4*c + l + 8*n]     = b_out[c][l*R8 + n];   // X[k1 + 8*k2]
        end
  end

  for (genvar c = 0; c < 2; c++) begin : g_lvl2
    micro_accelerator #(.ROLE(1), .CHIP(c), .LOG_N(LOG_N), .LOG_FINE(LOG_FINE)) u_chip (
      .clk, .rst_n,
      .tw_wr_en, .tw_wr_coarse, .tw_wr_addr_fine, .tw_wr_addr_coarse, .tw_wr_data,
      .tw_shift,
      .in_valid (rx_valid), .in_data (b_in[c]), .in_meta (rx_meta),
      .out_valid (b_v[c]), .out_data (b_out[c]), .out_meta (b_meta[c])
    );
  end

  // ---------------- stagger and write interface ----------------
  logic  stg_valid;
  cplx_t stg [NPT];
  meta_t stg_meta;
  lane_rotator #(.LANES(NPT)) u_stagger (
    .clk, .rst_n,
    .in_valid (b_v[0]), .in_data (xf), .in_meta (b_meta[0]), .amt (6'd0 - b_meta[0].fft[5:0]),
    .out_valid (stg_valid), .out_data (stg), .out_meta (stg_meta)
  );

  cplx_t stg_lo [32], stg_hi [32];
  logic [15:0] wdq_lo [32], wdq_hi [32];
  logic        wv_hi;
  logic [1:0]  wbeat, wbeat_hi;
  logic [19:0] wslot, wslot_hi;
  always_comb begin
    for (int c = 0; c < 32; c++) begin
      stg_lo[c]     = stg[c];
      stg_hi[c]     = stg[32 + c];
      wr_dq[c]      = wdq_lo[c];
      wr_dq[32 + c] = wdq_hi[c];
    end
  end

  mem_ser #(.CH(32)) u_wr0 (.clk, .rst_n, .in_valid(stg_valid), .in_data(stg_lo), .in_slot(stg_meta.fft),
                            .beat_valid(wr_valid), .beat(wbeat), .slot(wslot), .dq(wdq_lo));
  mem_ser #(.CH(32)) u_wr1 (.clk, .rst_n, .in_valid(stg_valid), .in_data(stg_hi), .in_slot(stg_meta.fft),
                            .beat_valid(wv_hi), .beat(wbeat_hi), .slot(wslot_hi), .dq(wdq_hi));

  dram_addr_gen u_wag (.slot(wslot), .beat(wbeat), .row_base(wr_row_base), .addr(wr_addr));

  assign wr_last = wr_valid && (wbeat == 2'd3);

  // both halves of each level run in step
  a_rd_halves:  assert property (@(posedge clk) disable iff (!rst_n) asm_valid == asm_v_hi);
  a_lvl1_step:  assert property (@(posedge clk) disable iff (!rst_n) a_v[0] == a_v[1]);
  a_lvl2_step:  assert property (@(posedge clk) disable iff (!rst_n) b_v[0] == b_v[1]);
  a_wr_halves:  assert property (@(posedge clk) disable iff (!rst_n) wr_valid == wv_hi);
endmodule
