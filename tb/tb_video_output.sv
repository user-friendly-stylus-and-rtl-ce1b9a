// Testbench for video_output with a full-size frame memory model that
// starts full of garbage. Checks that reset_sync stays high for the 2^19
// clocks of the flush, that afterwards the memory holds only the toolbar
// (x < 32) and zeros, that pixels sent through the FIFO are written during
// the next vertical blanking, and that the VGA output then shows them at
// their place on screen (cursor and grid overlay included).
module tb_video_output;
  import cad_pkg::*;
  logic clk = 0, comb_reset = 0, reset_sync, fifo_re, fifo_empty, fifo_full, fifo_ovf;
  logic fifo_wr = 0, rst_fifo = 1;
  pixel_info_t fifo_din, fifo_data;
  logic [10:0] fifo_count;
  logic [18:0] sram_addr;
  color_t sram_wdata, sram_rdata;
  logic sram_we_b, sram_oe_b, display_busy;
  pos_t stylus_pos;
  logic [23:0] vga_rgb;
  logic vga_blank_b, vga_sync_b, vga_hsync, vga_vsync;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pixel_fifo u_fifo (.clk, .rst(rst_fifo), .wr_en(fifo_wr), .din(fifo_din), .rd_en(fifo_re),
    .dout(fifo_data), .empty(fifo_empty), .full(fifo_full), .overflow(fifo_ovf), .count(fifo_count));
  frame_sram_model u_mem (.clk, .addr(sram_addr), .wdata(sram_wdata), .we_b(sram_we_b),
    .oe_b(sram_oe_b), .rdata(sram_rdata));
  video_output dut (.clk, .comb_reset, .reset_sync, .fifo_re, .fifo_data, .fifo_empty,
    .sram_addr, .sram_wdata, .sram_we_b, .sram_oe_b, .sram_rdata, .stylus_pos, .display_busy,
    .vga_rgb, .vga_blank_b, .vga_sync_b, .vga_hsync, .vga_vsync);

  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s @%0t", m, $time); end
  endtask

  // screen position of the RGB now at the DAC: the counters 4 clocks ago
  logic [9:0] pxh [4], lnh [4];
  always @(posedge clk) begin
    pxh[0] <= dut.pixel_count; lnh[0] <= dut.line_count;
    for (int i = 1; i < 4; i++) begin pxh[i] <= pxh[i-1]; lnh[i] <= lnh[i-1]; end
  end
  pixel_info_t pts [4];
  int seen [4];
  logic watch = 0;
  always @(posedge clk) if (vga_blank_b && watch)
    for (int i = 0; i < 4; i++)
      if (pxh[3] == pts[i].addr.x && lnh[3] == 10'(pts[i].addr.y)) begin
        chk(vga_rgb == {pts[i].color[8:6], 5'b0, pts[i].color[5:3], 5'b0, pts[i].color[2:0], 5'b0},
            "pixel on screen");
        seen[i]++;
      end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    foreach (u_mem.mem[i]) u_mem.mem[i] = 9'($urandom) | 9'd1;
    stylus_pos = '{y: 9'd10, x: 10'd600};
    pts[0] = '{addr: '{y: 9'd100, x: 10'd100}, color: 9'o700};
    pts[1] = '{addr: '{y: 9'd479, x: 10'd639}, color: 9'o070};
    pts[2] = '{addr: '{y: 9'd0,   x: 10'd32},  color: 9'o007};
    pts[3] = '{addr: '{y: 9'd250, x: 10'd333}, color: 9'o123};
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk); comb_reset = 1; rst_fifo = 1; @(negedge clk); comb_reset = 0; rst_fifo = 0;
    cyc = 0;
    while (reset_sync) begin @(negedge clk); cyc++; end
    chk(cyc == 2**19, "flush length");
    foreach (pts[i]) begin fifo_din = pts[i]; fifo_wr = 1; @(negedge clk); end
    fifo_wr = 0;
    wait (dut.rom_vblank); repeat (5) @(negedge clk);
    begin
      int bad;
      bad = 0;
      for (int y = 0; y < 512; y++)
        for (int x = 32; x < 1024; x++) if (u_mem.mem[{9'(y), 10'(x)}] != 0) bad++;
      chk(bad == 0, "memory flushed outside toolbar");
    end
    chk(u_mem.mem[{9'd0, 10'd0}] != 0, "toolbar written");
    wait (dut.vblank); wait (!dut.vblank);
    watch = 1;
    chk(fifo_empty, "FIFO drained");
    foreach (pts[i]) chk(u_mem.mem[pts[i].addr] == pts[i].color, "FIFO pixel stored");
    wait (dut.vblank); repeat (10) @(negedge clk);
    foreach (seen[i]) chk(seen[i] == 1, "pixel shown once per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
