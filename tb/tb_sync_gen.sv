// Testbench for sync_gen: over two full frames checks the line length (800),
// frame length (525 lines), sync pulse positions and widths, blank and
// vblank against the 640x480@60 timing, and that rom_vblank rises exactly
// 32*480 clocks after sync_start.
module tb_sync_gen;
  logic clk = 0, rst = 1, sync_start = 0;
  logic [9:0] px, ln;
  logic blank, hsync, vsync, vblank, rom_vblank;
  logic [4:0] rpx;
  logic [8:0] rln;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sync_gen dut (.clk, .rst, .sync_start, .pixel_count(px), .line_count(ln), .blank, .hsync,
    .vsync, .vblank, .rom_pixel_count(rpx), .rom_line_count(rln), .rom_vblank);
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s px=%0d ln=%0d", m, px, ln); end
  endtask
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n, ep, el, nh, nv;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk); sync_start = 1; @(negedge clk); sync_start = 0;
    // rom counters
    n = 0;
    while (!rom_vblank) begin
      chk(rpx == 5'(n % 32) && rln == 9'(n / 32), "rom counters");
      @(negedge clk); n++;
    end
    chk(n == 32 * 480, "rom sweep length");
    // main counters: walk from the next (0,0) through two frames
    while (!(px == 0 && ln == 0)) @(negedge clk);
    ep = 0; el = 0; nh = 0; nv = 0;
    for (int c = 0; c < 2 * 800 * 525; c++) begin
      chk(px == 10'(ep) && ln == 10'(el), "counter");
      chk(blank == (ep >= 640 || el >= 480), "blank");
      chk(vblank == (el >= 480), "vblank");
      chk(hsync == (ep >= 656 && ep < 752), "hsync");
      chk(vsync == (el >= 490 && el < 492), "vsync");
      if (hsync) nh++;
      if (vsync) nv++;
      @(negedge clk);
      ep++;
      if (ep == 800) begin ep = 0; el = (el == 524) ? 0 : el + 1; end
    end
    chk(nh == 2 * 525 * 96, "hsync total");
    chk(nv == 2 * 2 * 800, "vsync total");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
