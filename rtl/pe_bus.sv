// pe_bus: the high speed inter-accelerator bus that carries the 64 twiddled
// results of the two first-level chips to the two second-level chips.
//
// The bus is BUS_W bits wide and runs RATIO times faster than the core clock,
// so BUS_W*RATIO bits (16 complex words at the defaults) cross it per core
// clock; this model moves that amount once per core clock on bus_word. Access
// is time-division multiplexed: after in_valid the block of 2*NV words is sent
// in fixed slots, sender 0's words first, then sender 1's. Both receivers see
// every slot (broadcast) and each keeps the whole block. rx_valid marks the
// complete block one clock after its last slot; at the defaults a block takes
// four core clocks, which is the rate of one 64-point transform per four memory
// beats. A new block may be accepted in the clock of the last slot at the
// earliest; an assertion checks this. Width 256 bits and a 2 GHz bus clock
// against a 2 ns core cycle follow the source architecture; the slot order and
// the broadcast are this design's choices.
module pe_bus
  import fft_pkg::*;
#(
  parameter int unsigned BUS_W = 256,
  parameter int unsigned RATIO = 4,
  parameter int unsigned NV    = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t src0 [NV],
  input  cplx_t src1 [NV],
  input  meta_t in_meta,
  // what is on the bus wires during the current core clock
  output logic  bus_active,
  output cplx_t bus_word [BUS_W*RATIO/64],
  // assembled block at the receivers
  output logic  rx_valid,
  output cplx_t rx_data [2*NV],
  output meta_t rx_meta
);
  localparam int unsigned SW    = BUS_W * RATIO / 64;  // words per slot
  localparam int unsigned SLOTS = 2 * NV / SW;
  localparam int unsigned SB    = (SLOTS > 1) ? $clog2(SLOTS) : 1;

  cplx_t            tx_buf [2*NV];
  meta_t            tx_meta;
  logic [SB-1:0]    slot;
  logic             last;
  logic             busy_q;

  assign last       = (32'(slot) == SLOTS - 1);
  assign bus_active = busy_q;

  always_comb begin
    for (int w = 0; w < SW; w++) bus_word[w] = tx_buf[32'(slot) * SW + w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q   <= 1'b0;
      slot     <= '0;
      tx_meta  <= '0;
      rx_valid <= 1'b0;
      rx_meta  <= '0;
      for (int i = 0; i < 2*NV; i++) begin
        tx_buf[i]  <= '0;
        rx_data[i] <= '0;
      end
    end else begin
      rx_valid <= busy_q && last;
      if (busy_q) begin
        for (int w = 0; w < SW; w++) rx_data[32'(slot) * SW + w] <= bus_word[w];
        if (last) rx_meta <= tx_meta;
      end
      if (in_valid) begin
        for (int i = 0; i < NV; i++) begin
          tx_buf[i]      <= src0[i];
          tx_buf[NV + i] <= src1[i];
        end
        tx_meta <= in_meta;
        busy_q  <= 1'b1;
        slot    <= '0;
      end else if (busy_q) begin
        if (last) begin
          busy_q <= 1'b0;
          slot   <= '0;
        end else begin
          slot <= slot + 1'b1;
        end
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> (!busy_q || last));
endmodule
