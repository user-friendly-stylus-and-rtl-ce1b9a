// Testbench for flushing_unit (8-bit address space): a memory model is
// filled with garbage, then a reset press must write zero to every address
// exactly once while reset_sync is high, and release reset_sync with
// flush_done after 2^8 writes. A second press must restart the sweep.
module tb_flushing_unit;
  localparam int AW = 8;
  logic clk = 0, comb_reset = 0, reset_sync, flush_done, we_b;
  logic [AW-1:0] addr;
  logic [8:0] wdata;
  logic [8:0] mem [2**AW];
  int hits [2**AW];
  int checks = 0, failures = 0, n_wr = 0;
  always #5 clk = ~clk;
  flushing_unit #(.ADDR_W(AW), .DATA_W(9)) dut (.clk, .comb_reset, .reset_sync, .flush_done,
    .sram_addr(addr), .sram_wdata(wdata), .sram_we_b(we_b));
  always @(posedge clk) if (!we_b) begin mem[addr] <= wdata; hits[addr]++; n_wr++; end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int run = 0; run < 2; run++) begin
      int cyc;
      @(negedge clk); comb_reset = 1; @(negedge clk); comb_reset = 0;
      foreach (mem[i]) begin mem[i] = 9'($urandom) | 9'd1; hits[i] = 0; end
      n_wr = 0;
      cyc = 0;
      while (!flush_done) begin
        checks++; if (!reset_sync) begin failures++; $display("FAIL reset_sync low during flush"); end
        @(negedge clk); cyc++;
      end
      checks++; if (cyc != 2**AW) begin failures++; $display("FAIL flush took %0d", cyc); end
      checks++; if (reset_sync) begin failures++; $display("FAIL reset_sync after flush"); end
      repeat (5) @(negedge clk);
      checks++; if (n_wr != 2**AW) begin failures++; $display("FAIL %0d writes", n_wr); end
      foreach (mem[i]) begin
        checks++;
        if (mem[i] != 0 || hits[i] != 1) begin failures++; $display("FAIL addr %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
