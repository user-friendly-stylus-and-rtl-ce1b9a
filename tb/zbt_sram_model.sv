// zbt_sram_model: behavioural model of the 512K x 36 pipelined ZBT SRAM
// (simulation only). The address and write strobe are taken at a clock
// edge; two clocks later the data phase of that access comes: a write takes
// `wdata` at the edge that ends the data phase, a read shows the word on
// `rdata` during it. AW may be reduced to save simulation memory (upper
// address bits are then ignored).
module zbt_sram_model #(
  parameter int unsigned AW = 19
) (
  input  logic        clk,
  input  logic [18:0] addr,
  input  logic        we_b,
  input  logic [35:0] wdata,
  input  logic        oe,
  output logic [35:0] rdata
);
  logic [35:0] mem [2**AW];
  logic [AW-1:0] a1, a2;
  logic w1 = 0, w2 = 0;
  always_ff @(posedge clk) begin
    a1 <= addr[AW-1:0]; w1 <= !we_b;
    a2 <= a1;           w2 <= w1;
    if (w2) mem[a2] <= wdata;
  end
  assign rdata = mem[a2];
  // the controller must drive the bus in, and only in, write data phases
  // (checked once the controller has had time to come out of reset)
  int age = 0;
  always_ff @(posedge clk) if (age < 16) age <= age + 1;
  a_bus: assert property (@(posedge clk) age >= 16 |-> oe == w2);
  task automatic clear();
    foreach (mem[i]) mem[i] = '0;
  endtask
endmodule
