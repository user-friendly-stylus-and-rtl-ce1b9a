// video_output: the VGA side of the system around one 512K x 9 frame memory.
// A reset press first runs the flushing unit, which clears the whole frame
// memory while holding the rest of this subsystem in reset (reset_sync).
// Then the control unit copies the toolbar from ROM into the memory and from
// then on alternates between showing the memory on screen (active video) and
// writing changed pixels from the FIFO into it (vertical blanking).
// Memory ports are split (write data out, read data in) instead of one
// bidirectional bus; the memory port belongs to the flushing unit while
// reset_sync is high and to the control unit otherwise.
// flush_done and the control unit's initialise flag are internal status
// that nothing outside needs; they are left unconnected on purpose.
module video_output
  import cad_pkg::*;
(
  input  logic        clk,
  input  logic        comb_reset,
  output logic        reset_sync,
  // FIFO
  output logic        fifo_re,
  input  pixel_info_t fifo_data,
  input  logic        fifo_empty,
  // frame SRAM
  output logic [18:0] sram_addr,
  output color_t      sram_wdata,
  output logic        sram_we_b,
  output logic        sram_oe_b,
  input  color_t      sram_rdata,
  input  pos_t        stylus_pos,
  output logic        display_busy,
  output logic [23:0] vga_rgb,
  output logic        vga_blank_b, vga_sync_b, vga_hsync, vga_vsync
);
  logic        flush_done, sync_start, blank, hsync, vsync, vblank, rom_vblank, initialise;
  logic [9:0]  pixel_count, line_count;
  logic [4:0]  rom_pixel_count;
  logic [8:0]  rom_line_count;
  logic [10:0] rom_addr;
  logic [7:0]  rom_data;
  logic [18:0] f_addr, c_addr;
  color_t      f_wdata, c_wdata;
  logic        f_we_b, c_we_b, c_oe_b;

  flushing_unit #(.ADDR_W(19), .DATA_W(9)) u_flush (
    .clk, .comb_reset, .reset_sync, .flush_done,
    .sram_addr(f_addr), .sram_wdata(f_wdata), .sram_we_b(f_we_b));

  sync_gen u_sync (
    .clk, .rst(reset_sync), .sync_start, .pixel_count, .line_count,
    .blank, .hsync, .vsync, .vblank, .rom_pixel_count, .rom_line_count, .rom_vblank);

  toolbar_rom u_rom (.clk, .addr(rom_addr), .data(rom_data));

  vga_control_unit u_ctrl (
    .clk, .rst(reset_sync), .sync_start, .pixel_count, .line_count,
    .blank, .hsync, .vsync, .vblank, .rom_pixel_count, .rom_line_count, .rom_vblank,
    .rom_addr, .rom_data, .fifo_re, .fifo_data, .fifo_empty,
    .sram_addr(c_addr), .sram_wdata(c_wdata), .sram_we_b(c_we_b), .sram_oe_b(c_oe_b),
    .sram_rdata, .stylus_pos, .display_busy, .initialise,
    .vga_rgb, .vga_blank_b, .vga_sync_b, .vga_hsync, .vga_vsync);

  always_comb begin
    if (reset_sync) begin
      sram_addr = f_addr; sram_wdata = f_wdata; sram_we_b = f_we_b; sram_oe_b = 1'b1;
    end else begin
      sram_addr = c_addr; sram_wdata = c_wdata; sram_we_b = c_we_b; sram_oe_b = c_oe_b;
    end
  end
endmodule
