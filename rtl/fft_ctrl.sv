// fft_ctrl: sequences one pass of 64-point transforms through the engine.
//
// After start, transform g = 0 .. num_fft-1 is read from the 64 read-side
// DRAMs as four beats on four consecutive clocks, so a new transform starts
// every fourth clock (one 64-point transform per four memory accesses). Two
// read patterns exist:
//   linear     (transposed = 0): every channel reads slot g;
//   transposed (transposed = 1): channel d reads slot 64*(g/64) + ((d - g) mod 64),
//     i.e. element g mod 64 of each of 64 transforms of the previous pass, which
//     the staggered placement put on 64 different DRAMs.
// In both cases the lanes arrive rotated by r = g mod 64; r goes into the meta
// word with g (the write slot) and the twiddle multiplier (g when tw_en, else 0).
// The meta words wait in a FIFO until the read interface has assembled the
// transform (meta_pop). Written transforms are counted on wr_last; done rises
// when all num_fft are written and stays until the next start.
// The read patterns realise the source architecture's DRAM numbering
// DRAM = (FFT mod 64 + index mod 64) mod 64; the FIFO, handshake and counters
// are this design's choices.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int unsigned CH      = 64,
  parameter int unsigned FIFO_LG = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [19:0] num_fft,
  input  logic        transposed,
  input  logic        tw_en,
  input  logic [11:0] rd_row_base,
  output logic        busy,
  output logic        done,
  // read commands
  output logic        rd_cmd_valid,
  output dram_addr_t  rd_addr [CH],
  // meta words for assembled transforms
  input  logic        meta_pop,
  output meta_t       meta_out,
  // writes completed
  input  logic        wr_last
);
  localparam int unsigned DEPTH = 1 << FIFO_LG;

  logic [19:0] g, wr_cnt, n_q;
  logic [1:0]  beat;
  logic        issuing, tr_q, twen_q;
  logic [11:0] rbase_q;

  // per-channel slot and address
  logic [19:0] slot [CH];
  for (genvar d = 0; d < CH; d++) begin : g_ch
    always_comb begin
      logic [5:0] dl;
      dl = 6'(d) - g[5:0];
      slot[d] = tr_q ? {g[19:6], dl} : g;
    end
    dram_addr_gen u_ag (
      .slot     (slot[d]),
      .beat     (beat),
      .row_base (rbase_q),
      .addr     (rd_addr[d])
    );
  end

  assign rd_cmd_valid = issuing;
  assign busy         = issuing || (wr_cnt != n_q);

  // meta FIFO
  meta_t              fifo [DEPTH];
  logic [FIFO_LG:0]   wp, rp;
  assign meta_out = fifo[rp[FIFO_LG-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g       <= '0;
      beat    <= '0;
      issuing <= 1'b0;
      tr_q    <= 1'b0;
      twen_q  <= 1'b0;
      rbase_q <= '0;
      n_q     <= '0;
      wr_cnt  <= '0;
      done    <= 1'b0;
      wp      <= '0;
      rp      <= '0;
      for (int i = 0; i < DEPTH; i++) fifo[i] <= '0;
    end else begin
      if (start && !busy) begin
        g       <= '0;
        beat    <= '0;
        issuing <= (num_fft != '0);
        tr_q    <= transposed;
        twen_q  <= tw_en;
        rbase_q <= rd_row_base;
        n_q     <= num_fft;
        wr_cnt  <= '0;
        done    <= (num_fft == '0);
      end else begin
        if (issuing) begin
          beat <= beat + 2'd1;
          if (beat == 2'd0) begin
            fifo[wp[FIFO_LG-1:0]] <= '{fft: g, tw_m: twen_q ? g : '0, rot: g[5:0]};
            wp <= wp + 1'b1;
          end
          if (beat == 2'd3) begin
            g <= g + 20'd1;
            if (g + 20'd1 == n_q) issuing <= 1'b0;
          end
        end
        if (wr_last) begin
          wr_cnt <= wr_cnt + 20'd1;
          if (wr_cnt + 20'd1 == n_q) done <= 1'b1;
        end
      end
      if (meta_pop) rp <= rp + 1'b1;
    end
  end

  a_fifo_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                        (wp - rp) <= (FIFO_LG+1)'(DEPTH));
  a_fifo_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                        meta_pop |-> (wp != rp));
endmodule
