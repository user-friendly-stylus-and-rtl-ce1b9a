// ram_interface: drives the external ZBT (zero-bus-turnaround) SRAM from
// registered outputs, and feeds the pixel FIFO.
// Requests (mem_req, mem_we, mem_addr, mem_in) may arrive every clock. The
// address and write strobe are registered onto the pins. The memory is
// pipelined by two clocks, so write data is put on the bus two clocks after
// its address and the bus is driven (`sram_oe`) only then; read data is
// captured from the bus two clocks after the address and registered, so
// `rvalid`/`mem_out` follow a read request by RD_LAT = 4 clocks and
// `mem_out` holds its value until the next read returns. Reads come back in
// order. The bidirectional data bus is split into `sram_wdata`, `sram_oe`
// (drive enable for the pad tristate) and `sram_rdata`.
// After reset the whole memory is flushed: every address from 0 to
// 2^ADDR_W-1 is written with zero, one per clock, while `flushing` is high;
// requests are ignored then. Every accepted write to an on-screen address
// (x < 640, y < 480) is also pushed to the FIFO as {address, display colour}
// one clock later.
module ram_interface
  import cad_pkg::*;
#(
  parameter int unsigned ADDR_W = 19
) (
  input  logic        clk,
  input  logic        rst,
  output logic        flushing,
  input  logic        mem_req,
  input  logic        mem_we,
  input  pos_t        mem_addr,
  input  logic [35:0] mem_in,
  input  color_t      disp_color,
  output logic        rvalid,
  output logic [35:0] mem_out,
  // ZBT SRAM pins
  output logic [18:0] sram_addr,
  output logic        sram_we_b,
  output logic [35:0] sram_wdata,
  output logic        sram_oe,
  input  logic [35:0] sram_rdata,
  // pixel FIFO
  output logic        fifo_wr,
  output pixel_info_t fifo_din
);
  localparam int unsigned ZBT_LAT = 2;
  logic [ADDR_W-1:0] flush_addr;
  logic [35:0] wd_pipe [ZBT_LAT+1];   // [0] travels with the address
  logic [ZBT_LAT:0]   we_pipe, rd_pipe;

  always_ff @(posedge clk) begin
    if (rst) begin
      flushing <= 1'b1; flush_addr <= '0;
      sram_addr <= '0; sram_we_b <= 1'b1;
      we_pipe <= '0; rd_pipe <= '0;
      for (int i = 0; i <= ZBT_LAT; i++) wd_pipe[i] <= '0;
      rvalid <= 1'b0; mem_out <= '0;
      fifo_wr <= 1'b0; fifo_din <= '0;
    end else begin
      fifo_wr <= 1'b0;
      if (flushing) begin
        sram_addr <= 19'(flush_addr);
        sram_we_b <= 1'b0;
        we_pipe   <= {we_pipe[ZBT_LAT-1:0], 1'b1};
        rd_pipe   <= {rd_pipe[ZBT_LAT-1:0], 1'b0};
        wd_pipe[0] <= '0;
        flush_addr <= flush_addr + 1'b1;
        if (flush_addr == '1) flushing <= 1'b0;
      end else begin
        sram_addr <= mem_addr;
        sram_we_b <= !(mem_req && mem_we);
        we_pipe   <= {we_pipe[ZBT_LAT-1:0], mem_req && mem_we};
        rd_pipe   <= {rd_pipe[ZBT_LAT-1:0], mem_req && !mem_we};
        wd_pipe[0] <= mem_in;
        if (mem_req && mem_we && mem_addr.x < 10'(H_ACTIVE) && mem_addr.y < 9'(V_ACTIVE)) begin
          fifo_wr  <= 1'b1;
          fifo_din <= '{addr: mem_addr, color: disp_color};
        end
      end
      for (int i = 1; i <= ZBT_LAT; i++) wd_pipe[i] <= wd_pipe[i-1];
      rvalid <= rd_pipe[ZBT_LAT];
      if (rd_pipe[ZBT_LAT]) mem_out <= sram_rdata;
    end
  end

  // the write data of the access whose address went out two clocks ago
  assign sram_wdata = wd_pipe[ZBT_LAT];
  assign sram_oe    = we_pipe[ZBT_LAT];
endmodule
