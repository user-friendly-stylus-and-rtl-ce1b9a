// Testbench for stylus_sync: checks one click pulse per press, delayed by
// the synchroniser, none while held, and that out-of-range positions leave
// the output at the last in-range position.
module tb_stylus_sync;
  import cad_pkg::*;
  logic clk = 0, rst = 1, click_in = 0, click, click_level;
  logic [9:0] xi = 0, yi = 0;
  pos_t pos;
  int checks = 0, failures = 0, n_click = 0;
  always #5 clk = ~clk;
  stylus_sync dut (.clk, .rst, .click_in, .pos_x_in(xi), .pos_y_in(yi), .click, .click_level, .pos);
  always @(posedge clk) if (click) n_click++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    pos_t last;
    last = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        xi = 10'($urandom_range(0, 1023)); yi = 10'($urandom_range(0, 1023));
      end else begin
        xi = 10'($urandom_range(0, 639)); yi = 10'($urandom_range(0, 479));
      end
      if (xi < 640 && yi < 480) last = '{y: yi[8:0], x: xi};
      @(negedge clk);
      checks++;
      if (pos != last) begin failures++; if (failures < 10) $display("FAIL pos %h exp %h", pos, last); end
    end
    for (int p = 0; p < 20; p++) begin
      int n0, len;
      n0 = n_click;
      len = $urandom_range(1, 30);
      @(negedge clk); click_in = 1;
      // pulse appears on the third clock edge after the press
      @(negedge clk); @(negedge clk);
      checks++; if (click) begin failures++; $display("FAIL early click"); end
      @(negedge clk);
      checks++; if (!click) begin failures++; $display("FAIL click missing"); end
      repeat (len) @(negedge clk);
      click_in = 0;
      repeat (5) @(negedge clk);
      checks++; if (n_click != n0 + 1) begin failures++; $display("FAIL %0d clicks", n_click - n0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
