// mem_ser: memory write interface of CH DRAM channels.
//
// On in_valid the CH complex words are captured and sent on the 16-bit channel
// buses as four beats on the next four clocks, in the order re[15:0],
// re[31:16], im[15:0], im[31:16]; beat_valid and beat (0..3) mark each one.
// The slot number of the transform (in_slot) is held with the words and
// presented with every beat so that the address can be formed. A new vector
// may arrive on the clock of the last beat at the earliest (every fourth
// clock); an assertion checks this. Beat order and handshake are this design's
// choice.
module mem_ser
  import fft_pkg::*;
#(
  parameter int unsigned CH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_data [CH],
  input  logic [19:0] in_slot,
  output logic        beat_valid,
  output logic [1:0]  beat,
  output logic [19:0] slot,
  output logic [15:0] dq [CH]
);
  cplx_t hold [CH];
  logic  busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      beat       <= '0;
      beat_valid <= 1'b0;
      slot       <= '0;
      for (int c = 0; c < CH; c++) hold[c] <= '0;
    end else begin
      if (in_valid) begin
        hold       <= in_data;
        slot       <= in_slot;
        busy       <= 1'b1;
        beat_valid <= 1'b1;
        beat       <= 2'd0;
      end else if (busy) begin
        beat <= beat + 2'd1;
        if (beat == 2'd3) begin
          busy       <= 1'b0;
          beat_valid <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < CH; c++) dq[c] = hold[c][16*{~beat[1], beat[0]} +: 16];
  end

  // the words of one vector must be out before the next one arrives
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> (!busy || beat == 2'd3));
endmodule
