// Testbench for pixel_fifo: random writes and reads against a queue model,
// including filling it completely (full, dropped write, overflow flag) and
// draining it (empty, first-word fall-through).
module tb_pixel_fifo;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, empty, full, overflow;
  logic [27:0] din = 0, dout;
  logic [10:0] count;
  logic [27:0] q [$];
  int checks = 0, failures = 0, n_full = 0;
  always #5 clk = ~clk;
  pixel_fifo dut (.clk, .rst, .wr_en, .din, .rd_en, .dout, .empty, .full, .overflow, .count);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic step(input int pw, input int pr);
    @(negedge clk);
    checks++;
    if (empty != (q.size() == 0) || full != (q.size() == 1024) || count != 11'(q.size()) ||
        (q.size() > 0 && dout != q[0])) begin
      failures++;
      if (failures < 10) $display("FAIL size %0d empty %0d full %0d count %0d", q.size(), empty, full, count);
    end
    wr_en = ($urandom_range(0, 99) < pw);
    rd_en = ($urandom_range(0, 99) < pr) && !empty;
    din = 28'($urandom);
    if (full) n_full++;
    if (rd_en) void'(q.pop_front());
    if (wr_en && q.size() + (rd_en ? 1 : 0) < 1025 && !(q.size() == 1024 && !rd_en)) begin
      if (!full) q.push_back(din);
    end
  endtask
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) step(60, 50);
    for (int i = 0; i < 3000; i++) step(90, 5);
    for (int i = 0; i < 4000; i++) step(10, 90);
    @(negedge clk); wr_en = 0; rd_en = 0;
    checks++; if (n_full == 0) begin failures++; $display("FAIL never full"); end
    checks++; if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
