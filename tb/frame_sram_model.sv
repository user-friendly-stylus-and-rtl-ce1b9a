// frame_sram_model: behavioural model of the 512K x 9 frame memory (not
// synthesizable intent; for simulation only). Writes happen at the clock
// edge when we_b is low. Reads are pipelined: the word at the address
// presented in one clock is on `rdata` two clocks later. oe_b is accepted
// but not modelled (the data bus is split into wdata and rdata).
module frame_sram_model #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 9
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic          we_b,
  input  logic          oe_b,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] d1;
  always_ff @(posedge clk) begin
    if (!we_b) mem[addr] <= wdata;
    d1    <= mem[addr];
    rdata <= d1;
  end
  wire unused = oe_b;
endmodule
