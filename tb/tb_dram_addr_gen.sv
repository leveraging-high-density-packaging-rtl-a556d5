// tb_dram_addr_gen: walks slots 0..4095 with all four beats, as the engine does
// when writing one transform per slot, and checks
//  - each address against bank = f mod 4, column = 4*((f/4) mod 64) + beat,
//    row = base + f/256, worked out with division and modulo;
//  - that every row change within a bank comes at least four transform cycles
//    after that bank's previous access, and that four consecutive slots use
//    four different banks;
//  - that no two slots share an address (no data is overwritten).
module tb_dram_addr_gen;
  import fft_pkg::*;
  logic [19:0] slot;
  logic [1:0]  beat;
  logic [11:0] row_base;
  dram_addr_t  addr;
  int checks = 0, failures = 0;
  int last_row [4], last_slot [4];
  bit seen [logic [21:0]];
  int row_hops = 0;

  dram_addr_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++) begin last_row[b] = -1; last_slot[b] = -100; end
    row_base = 12'd100;
    for (int f = 0; f < 4096; f++) begin
      for (int bt = 0; bt < 4; bt++) begin
        slot = 20'(f); beat = 2'(bt);
        #1;
        checks++;
        if (addr.bank != f % 4 || addr.col != 4 * ((f / 4) % 64) + bt || addr.row != 100 + f / 256) begin
          failures++;
          if (failures < 10) $display("f=%0d beat=%0d: bank %0d row %0d col %0d", f, bt, addr.bank, addr.row, addr.col);
        end
        checks++;
        if (seen.exists({addr.bank, addr.row, addr.col})) failures++;
        seen[{addr.bank, addr.row, addr.col}] = 1;
      end
      if (last_row[addr.bank] != -1 && last_row[addr.bank] != int'(addr.row)) begin
        row_hops++;
        checks++;
        if (f - last_slot[addr.bank] < 4) failures++;
      end
      if (f >= 3) begin
        checks++;
        if (f - last_slot[addr.bank] != 4 && last_slot[addr.bank] >= 0) failures++;
      end
      last_row[addr.bank] = addr.row;
      last_slot[addr.bank] = f;
    end
    checks++;
    if (row_hops == 0) begin failures++; $display("no row change seen"); end
    $display("row changes: %0d", row_hops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
