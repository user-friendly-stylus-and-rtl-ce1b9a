// Shared scaffolding for the command-subsystem testbenches: command_top at
// its default size with the full 512K-word ZBT SRAM model, a model of the
// screen built from the pixel FIFO pushes, and stylus tasks.
  import cad_pkg::*;
  logic clk = 0, rst = 1, click_in = 0;
  logic [9:0] pos_x_in = 10'd320, pos_y_in = 10'd240;
  logic [18:0] sram_addr; logic sram_we_b, sram_oe; logic [35:0] sram_wdata, sram_rdata;
  logic fifo_wr; pixel_info_t fifo_din;
  pos_t cursor_pos; command_t command; mode_t mode; color_t color;
  logic sel_valid, busy, flushing;
  int checks = 0, failures = 0, cyc = 0;
  color_t scr [pos_t];          // what the screen shows (absent = never written)
  int n_push = 0;
  always #5 clk = ~clk;
  command_top dut (.*);
  zbt_sram_model #(.AW(19)) zbt (.clk, .addr(sram_addr), .we_b(sram_we_b), .wdata(sram_wdata),
                                 .oe(sram_oe), .rdata(sram_rdata));
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && fifo_wr && !flushing) begin scr[fifo_din.addr] = fifo_din.color; n_push++; end
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 30) $display("FAIL %s", m); end
  endtask
  function automatic pos_t P(input int x, input int y);
    pos_t p; p.x = 10'(x); p.y = 9'(y); return p;
  endfunction
  function automatic pix_word_t word(input int x, input int y);
    return pix_word_t'(zbt.mem[P(x, y)]);
  endfunction
  function automatic color_t shown(input int x, input int y);
    return scr.exists(P(x, y)) ? scr[P(x, y)] : 9'd0;
  endfunction
  // wait until the subsystem has been idle for 30 clocks
  task automatic settle();
    int idle = 0;
    while (idle < 30) begin @(negedge clk); idle = busy ? 0 : idle + 1; end
  endtask
  task automatic click_at(input int x, input int y);
    pos_x_in = 10'(x); pos_y_in = 10'(y);
    repeat (4) @(negedge clk);
    click_in = 1; repeat (4) @(negedge clk); click_in = 0;
    settle();
  endtask
  task automatic button(input int b);
    click_at(8, b * 32 + 16);
  endtask
  task automatic reset_and_flush();
    for (int i = 0; i < (1 << 19); i++) zbt.mem[i] = {4'h5, 32'($urandom)};
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    chk(flushing, "flush starts after reset");
    while (flushing) @(negedge clk);
    settle();
    for (int i = 0; i < (1 << 19); i += 1013) chk(zbt.mem[i] == '0, "memory flushed");
  endtask
  // pixels of a colour on screen
  function automatic int count_color(input color_t c);
    int n = 0;
    foreach (scr[p]) if (scr[p] == c) n++;
    return n;
  endfunction
