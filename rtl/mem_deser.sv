// mem_deser: memory read interface of CH DRAM channels.
//
// Each channel is a 16-bit memory bus. A complex word arrives as four beats,
// in the order re[15:0], re[31:16], im[15:0], im[31:16], all channels in step;
// beat_valid marks a beat. After the fourth beat the CH assembled words are
// presented for one clock with out_valid, one clock after that beat. Four beats
// per word follow the source architecture (32 complex numbers in 4 cycles per
// chip); the beat order is this design's choice.
module mem_deser
  import fft_pkg::*;
#(
  parameter int unsigned CH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        beat_valid,
  input  logic [15:0] dq [CH],
  output logic        out_valid,
  output cplx_t       out_data [CH]
);
  logic [1:0]  cnt;
  logic [47:0] part [CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      for (int c = 0; c < CH; c++) begin
        part[c]     <= '0;
        out_data[c] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (beat_valid) begin
        cnt <= cnt + 2'd1;
        for (int c = 0; c < CH; c++) begin
          if (cnt == 2'd3) begin
            out_data[c] <= {part[c][31:16], part[c][15:0], dq[c], part[c][47:32]};
          end else begin
            part[c][16*cnt +: 16] <= dq[c];
          end
        end
        if (cnt == 2'd3) out_valid <= 1'b1;
      end
    end
  end
endmodule
