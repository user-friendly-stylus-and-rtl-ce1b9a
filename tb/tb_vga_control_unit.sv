// Testbench for vga_control_unit, with the sync generator, toolbar ROM, a
// frame memory model and a queue standing in for the FIFO. Checks:
//  - the toolbar copied into memory matches ROM bits and button colours;
//  - FIFO pixels are popped only during vertical blanking and land in memory;
//  - over a full frame, every DAC output (RGB, blank, composite sync)
//    equals the memory word, grid and cursor overlay, expanded to 24 bits,
//    for the pixel the counters showed 4 clocks earlier, and hsync/vsync
//    follow the generator's by 6 clocks (4 + the DAC's 2), active low.
module tb_vga_control_unit;
  import cad_pkg::*;
  logic clk = 0, rst = 1;
  logic sync_start, blank, hsync, vsync, vblank, rom_vblank, fifo_re, fifo_empty;
  logic [9:0] px, ln;
  logic [4:0] rpx;
  logic [8:0] rln;
  logic [10:0] rom_addr;
  logic [7:0] rom_data;
  pixel_info_t fifo_data;
  logic [18:0] sram_addr;
  color_t sram_wdata, sram_rdata;
  logic sram_we_b, sram_oe_b, display_busy, initialise;
  pos_t stylus_pos;
  logic [23:0] vga_rgb;
  logic vga_blank_b, vga_sync_b, vga_hsync, vga_vsync;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sync_gen u_sync (.clk, .rst, .sync_start, .pixel_count(px), .line_count(ln), .blank, .hsync,
    .vsync, .vblank, .rom_pixel_count(rpx), .rom_line_count(rln), .rom_vblank);
  toolbar_rom u_rom (.clk, .addr(rom_addr), .data(rom_data));
  frame_sram_model u_mem (.clk, .addr(sram_addr), .wdata(sram_wdata), .we_b(sram_we_b),
    .oe_b(sram_oe_b), .rdata(sram_rdata));
  vga_control_unit dut (.clk, .rst, .sync_start, .pixel_count(px), .line_count(ln), .blank,
    .hsync, .vsync, .vblank, .rom_pixel_count(rpx), .rom_line_count(rln), .rom_vblank,
    .rom_addr, .rom_data, .fifo_re, .fifo_data, .fifo_empty, .sram_addr, .sram_wdata,
    .sram_we_b, .sram_oe_b, .sram_rdata, .stylus_pos, .display_busy, .initialise,
    .vga_rgb, .vga_blank_b, .vga_sync_b, .vga_hsync, .vga_vsync);

  pixel_info_t fq [$];
  logic fifo_wr = 0, fifo_full, fifo_ovf;
  pixel_info_t fifo_din;
  logic [10:0] fifo_count;
  pixel_fifo u_fifo (.clk, .rst, .wr_en(fifo_wr), .din(fifo_din), .rd_en(fifo_re),
    .dout(fifo_data), .empty(fifo_empty), .full(fifo_full), .overflow(fifo_ovf), .count(fifo_count));
  int n_pop_active = 0, n_pop = 0;
  always @(posedge clk) if (fifo_re) begin
    n_pop++;
    if (!vblank) n_pop_active++;
  end

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", m, $time); end
  endtask

  function automatic color_t expect_pix(input int x, input int y);
    color_t m;
    logic cur, grid;
    m = u_mem.mem[{y[8:0], x[9:0]}];
    cur = (x == stylus_pos.x && y >= stylus_pos.y - 4 && y <= stylus_pos.y + 4) ||
          (y == stylus_pos.y && x >= stylus_pos.x - 4 && x <= stylus_pos.x + 4);
    grid = x >= 32 && x % 16 == 0 && y % 16 == 0 && m == 0;
    return cur ? 9'o700 : grid ? 9'o333 : m;
  endfunction

  // history of the generator outputs, indexed by clock
  localparam int HN = 8;
  typedef struct packed { logic [9:0] px, ln; logic blank, hsync, vsync; } hist_t;
  hist_t hist [HN];
  int cyc = 0;
  logic checking = 0;
  int n_checked = 0;
  always @(posedge clk) begin
    hist[cyc % HN] <= '{px, ln, blank, hsync, vsync};
    cyc <= cyc + 1;
    if (checking && cyc >= HN) begin
      hist_t h4, h6;
      color_t e;
      h4 = hist[(cyc - 4) % HN];
      h6 = hist[(cyc - 6) % HN];
      e = expect_pix(h4.px, h4.ln);
      chk(vga_blank_b == !h4.blank, "blank_b");
      chk(vga_sync_b == !(h4.hsync || h4.vsync), "sync_b");
      chk(vga_rgb == (h4.blank ? 24'h0 : {e[8:6], 5'b0, e[5:3], 5'b0, e[2:0], 5'b0}), "rgb");
      chk(vga_hsync == !h6.hsync && vga_vsync == !h6.vsync, "hsync/vsync");
      n_checked++;
    end
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (u_mem.mem[i]) u_mem.mem[i] = '0;
    stylus_pos = '{y: 9'd200, x: 10'd100};
    // pixels waiting to be drawn, all in the drawing area
    for (int i = 0; i < 300; i++)
      fq.push_back('{addr: '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(32, 639))},
                     color: 9'($urandom_range(1, 511))});
    begin
      pixel_info_t exp_q [$];
      exp_q = fq;
      repeat (3) @(negedge clk); rst = 0;
      foreach (exp_q[i]) begin
        fifo_din = exp_q[i]; fifo_wr = 1; @(negedge clk);
      end
      fifo_wr = 0;
      wait (rom_vblank);
      repeat (10) @(negedge clk);
      // toolbar in memory
      for (int y = 0; y < 480; y++)
        for (int x = 0; x < 32; x++) begin
          logic b;
          int btn;
          color_t e;
          b = u_rom.mem[y * 4 + x / 8][7 - x % 8];
          btn = y / 32;
          e = !b ? 9'o222 : (btn < 4) ? 9'o777 : (btn < 9) ? 9'o077 : 9'o070;
          chk(u_mem.mem[{9'(y), 10'(x)}] == e, "toolbar pixel");
        end
      chk(display_busy, "display_busy in active video");
      // first vertical blanking: the FIFO is drained
      wait (vblank); wait (!vblank);
      chk(n_pop == 300 && n_pop_active == 0, "FIFO drained in vblank only");
      foreach (exp_q[i]) begin
        logic later;
        later = 0;
        for (int j = i + 1; j < exp_q.size(); j++) if (exp_q[j].addr == exp_q[i].addr) later = 1;
        if (!later && u_mem.mem[exp_q[i].addr] != exp_q[i].color) $display("i=%0d addr=%h mem=%o exp=%o", i, exp_q[i].addr, u_mem.mem[exp_q[i].addr], exp_q[i].color);
        if (!later) chk(u_mem.mem[exp_q[i].addr] == exp_q[i].color, "FIFO pixel in memory");
      end
      // one whole frame of DAC output
      while (!(px == 0 && ln == 0)) @(negedge clk);
      checking = 1;
      repeat (800 * 525 + 10) @(negedge clk);
      checking = 0;
      chk(n_checked > 800 * 525, "frame checked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
