// tb_pe_bus: sends blocks of 2 x 32 random words from the two senders, back to
// back every four clocks and with gaps; checks that each slot on the bus wires
// carries the expected 16 words (sender 0 first), that the receivers assemble
// the whole block with its meta word, and that rx_valid comes five clocks after
// in_valid.
module tb_pe_bus;
  import fft_pkg::*;
  localparam int NV = 32, SW = 16;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic in_valid = 0, bus_active, rx_valid;
  cplx_t src0 [NV], src1 [NV], bus_word [SW], rx_data [2*NV];
  meta_t in_meta = '0, rx_meta;
  int checks = 0, failures = 0, cyc = 0, nrx = 0;
  cplx_t blk [200][2*NV];
  meta_t mq [$];
  int cq [$];

  pe_bus #(.BUS_W(256), .RATIO(4), .NV(NV)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receivers
  always @(negedge clk) if (rst_n && rx_valid) begin
    checks++;
    if (rx_meta != mq.pop_front()) failures++;
    checks++;
    if (cyc - cq.pop_front() != 5) begin failures++; $display("latency"); end
    for (int i = 0; i < 2*NV; i++) begin
      checks++;
      if (rx_data[i] != blk[nrx][i]) begin
        failures++;
        if (failures < 4) $display("block %0d word %0d got %h exp %h", nrx, i, rx_data[i], blk[nrx][i]);
      end
    end
    nrx++;
  end

  initial begin
    cplx_t b [2*NV];
    for (int i = 0; i < NV; i++) begin src0[i] = '0; src1[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NV; i++) begin
        src0[i] = {$urandom, $urandom}; src1[i] = {$urandom, $urandom};
        b[i] = src0[i]; b[NV + i] = src1[i];
      end
      in_meta = meta_t'({$urandom, $urandom});
      blk[t] = b; mq.push_back(in_meta); cq.push_back(cyc);
      in_valid = 1;
      for (int s = 0; s < 4; s++) begin
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!bus_active) failures++;
        for (int w = 0; w < SW; w++) begin
          checks++;
          if (bus_word[w] != b[s*SW + w]) failures++;
        end
      end
      // the next block is offered during the last slot, or after an idle clock
      if (t % 4 == 3) begin
        @(negedge clk);
        checks++;
        if (bus_active) failures++;
      end
    end
    repeat (8) @(negedge clk);
    checks++;
    if (nrx != 200) begin failures++; $display("nrx=%0d", nrx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
