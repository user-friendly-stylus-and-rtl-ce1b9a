// flushing_unit: clears the frame memory after a reset button press.
// `comb_reset` (the button) restarts the sweep: the unit then owns the memory
// port and writes zero to every address, one per clock, from 0 up to
// 2^ADDR_W-1. While it does so `reset_sync` is high and holds the rest of the
// video output in reset; the cycle after the last write `flush_done` goes high
// and `reset_sync` low, handing the memory back to the control unit.
// A full 19-bit sweep takes 524,288 clocks, about 21 ms at 25 MHz.
module flushing_unit #(
  parameter int unsigned ADDR_W = 19,
  parameter int unsigned DATA_W = 9
) (
  input  logic              clk,
  input  logic              comb_reset,
  output logic              reset_sync,
  output logic              flush_done,
  output logic [ADDR_W-1:0] sram_addr,
  output logic [DATA_W-1:0] sram_wdata,
  output logic              sram_we_b
);
  always_ff @(posedge clk) begin
    if (comb_reset) begin
      sram_addr  <= '0;
      flush_done <= 1'b0;
      reset_sync <= 1'b1;
      sram_we_b  <= 1'b0;
    end else if (!flush_done) begin
      if (sram_addr == '1) begin
        flush_done <= 1'b1;
        reset_sync <= 1'b0;
        sram_we_b  <= 1'b1;
      end else begin
        sram_addr <= sram_addr + 1'b1;
      end
    end
  end
  assign sram_wdata = '0;
endmodule
