// vga_control_unit: runs the frame memory and drives the video DAC.
// FSM (states and per-state outputs as in the document's state table):
//   RESET        : initialise and sync_start high, FIFO not read.
//   ROM_SCREEN   : copies the toolbar from ROM to frame memory, one pixel per
//                  clock, at address {rom_line, 5'b0, rom_pixel}; leaves for
//                  ACTIVE_VIDEO when the sync generator raises rom_vblank.
//   ACTIVE_VIDEO : reads the frame memory at {line, pixel}; display_busy high;
//                  goes to TRANSFER_DATA when vblank rises.
//   TRANSFER_DATA: while the FIFO is not empty, pops a changed pixel each clock
//                  and writes it to frame memory; back to ACTIVE_VIDEO when
//                  vblank falls.
// Memory address, write data and strobes are registered. The toolbar ROM read
// takes one clock, so the ROM_SCREEN write address is delayed by one clock to
// meet its data. Reads return SRAM_LAT clocks after the registered address;
// the 9-bit word is widened to 24 bits by using each 3-bit field as the MSBs
// of an 8-bit channel, and a grid dot every GRID pixels (where the memory
// holds 0) and a cross-shaped cursor at the stylus position are overlaid.
// blank and composite sync reach the DAC aligned with that RGB; hsync and
// vsync bypass the DAC and so are delayed DAC_LAT=2 clocks more, to match the
// DAC's pipeline. Sync outputs are active low. The grid spacing, cursor shape
// and memory latency are this design's choices.
module vga_control_unit
  import cad_pkg::*;
#(
  parameter int unsigned SRAM_LAT = 2,
  parameter int unsigned DAC_LAT = 2,
  parameter int unsigned GRID = 16
) (
  input  logic        clk,
  input  logic        rst,
  // sync generator
  output logic        sync_start,
  input  logic [9:0]  pixel_count, line_count,
  input  logic        blank, hsync, vsync, vblank,
  input  logic [4:0]  rom_pixel_count,
  input  logic [8:0]  rom_line_count,
  input  logic        rom_vblank,
  // toolbar ROM
  output logic [10:0] rom_addr,
  input  logic [7:0]  rom_data,
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
  // stylus
  input  pos_t        stylus_pos,
  output logic        display_busy,
  output logic        initialise,
  // DAC
  output logic [23:0] vga_rgb,
  output logic        vga_blank_b,
  output logic        vga_sync_b,
  output logic        vga_hsync,
  output logic        vga_vsync
);
  typedef enum logic [1:0] {S_RESET, S_ROM_SCREEN, S_ACTIVE, S_TRANSFER} state_t;
  state_t state;

  // ROM-to-memory path: ROM address now, memory write one clock later.
  logic [8:0] rl_q;
  logic [4:0] rp_q;
  logic       rom_wr_q;
  color_t     init_color;
  assign rom_addr = {rom_line_count, rom_pixel_count[4:3]};
  initialise_mod u_init (.rom_data, .bit_sel(rp_q[2:0]), .line(rl_q), .color(init_color));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_RESET;
      rl_q <= '0; rp_q <= '0; rom_wr_q <= 1'b0;
      sram_addr <= '0; sram_wdata <= '0; sram_we_b <= 1'b1; sram_oe_b <= 1'b1;
    end else begin
      rl_q <= rom_line_count;
      rp_q <= rom_pixel_count;
      rom_wr_q <= (state == S_ROM_SCREEN) && !rom_vblank;
      sram_we_b <= 1'b1;
      sram_oe_b <= 1'b0;
      unique case (state)
        S_RESET: state <= S_ROM_SCREEN;
        S_ROM_SCREEN: begin
          sram_oe_b <= 1'b1;
          if (rom_wr_q) begin
            sram_we_b  <= 1'b0;
            sram_addr  <= {rl_q, 5'b0, rp_q};
            sram_wdata <= init_color;
          end
          if (rom_vblank && !rom_wr_q) state <= S_ACTIVE;
        end
        S_ACTIVE: begin
          sram_addr <= {line_count[8:0], pixel_count};
          if (vblank) state <= S_TRANSFER;
        end
        S_TRANSFER: begin
          if (!vblank) begin
            // first visible pixel of the frame: read it already
            sram_addr <= {line_count[8:0], pixel_count};
            state <= S_ACTIVE;
          end else if (!fifo_empty) begin
            sram_we_b  <= 1'b0;
            sram_oe_b  <= 1'b1;
            sram_addr  <= fifo_data.addr;
            sram_wdata <= fifo_data.color;
          end
        end
        default: state <= S_RESET;
      endcase
    end
  end

  always_comb begin
    sync_start   = (state == S_RESET);
    initialise   = (state == S_RESET);
    fifo_re      = (state == S_TRANSFER) && vblank && !fifo_empty;
    display_busy = (state == S_ACTIVE);
  end

  // Video pipeline: counters -> registered address (1) -> memory (SRAM_LAT)
  // -> registered RGB (1).
  localparam int unsigned PIX_LAT = SRAM_LAT + 2;
  typedef struct packed {
    logic [9:0] px;
    logic [9:0] ln;
    logic       blank, hsync, vsync;
  } vid_t;
  vid_t vpipe [PIX_LAT];
  logic hs_d [DAC_LAT], vs_d [DAC_LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < PIX_LAT; i++) vpipe[i] <= '{default: '0, blank: 1'b1};
      for (int i = 0; i < DAC_LAT; i++) begin hs_d[i] <= 1'b0; vs_d[i] <= 1'b0; end
    end else begin
      vpipe[0] <= '{px: pixel_count, ln: line_count, blank: blank,
                    hsync: hsync, vsync: vsync};
      for (int i = 1; i < PIX_LAT; i++) vpipe[i] <= vpipe[i-1];
      hs_d[0] <= vpipe[PIX_LAT-1].hsync;
      vs_d[0] <= vpipe[PIX_LAT-1].vsync;
      for (int i = 1; i < DAC_LAT; i++) begin hs_d[i] <= hs_d[i-1]; vs_d[i] <= vs_d[i-1]; end
    end
  end

  // Overlay, computed for the pixel whose memory data arrives this clock.
  vid_t   cur;
  color_t pix;
  logic   on_cursor, on_grid;
  always_comb begin
    cur = vpipe[PIX_LAT-2];
    on_cursor = ((cur.px == stylus_pos.x) && (cur.ln[8:0] >= stylus_pos.y - 9'd4) &&
                 (cur.ln[8:0] <= stylus_pos.y + 9'd4)) ||
                ((cur.ln[8:0] == stylus_pos.y) && (cur.px >= stylus_pos.x - 10'd4) &&
                 (cur.px <= stylus_pos.x + 10'd4));
    on_grid = (cur.px >= 10'(TOOLBAR_W)) && (cur.px % 10'(GRID) == 0) &&
              (cur.ln % 10'(GRID) == 0) && (sram_rdata == '0);
    pix = sram_rdata;
    if (on_grid)   pix = 9'b011_011_011;
    if (on_cursor) pix = 9'b111_000_000;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vga_rgb <= '0; vga_blank_b <= 1'b0; vga_sync_b <= 1'b1;
    end else begin
      vga_rgb <= cur.blank ? 24'h0 :
                 {pix[8:6], 5'b0, pix[5:3], 5'b0, pix[2:0], 5'b0};
      vga_blank_b <= !cur.blank;
      vga_sync_b  <= !(cur.hsync || cur.vsync);
    end
  end
  assign vga_hsync = !hs_d[DAC_LAT-1];
  assign vga_vsync = !vs_d[DAC_LAT-1];
endmodule
