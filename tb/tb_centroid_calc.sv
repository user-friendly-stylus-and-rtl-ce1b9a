// Testbench for centroid_calc: accumulates random point sets, divides, and
// compares with the integer means computed here; also checks that clr
// empties the sums and that zero points leave the result unchanged.
module tb_centroid_calc;
  logic clk = 0, rst = 1, clr = 0, acc_en = 0, div_en = 0, valid;
  logic [9:0] x, cx;
  logic [8:0] y, cy;
  logic [18:0] n;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  centroid_calc dut (.clk, .rst, .clr, .acc_en, .x, .y, .div_en, .n_passed(n), .cx, .cy, .valid);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint sx, sy;
    x = 0; y = 0; n = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int r = 0; r < 30; r++) begin
      int cnt;
      cnt = $urandom_range(1, 500);
      sx = 0; sy = 0;
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      for (int i = 0; i < cnt; i++) begin
        x = 10'($urandom_range(0, 719)); y = 9'($urandom_range(0, 479));
        sx += x; sy += y; acc_en = 1;
        @(negedge clk);
        acc_en = 0;
        if ($urandom_range(0, 1)) @(negedge clk);
      end
      n = 19'(cnt); div_en = 1; @(negedge clk); div_en = 0;
      checks++;
      if (!valid || cx != 10'(sx / cnt) || cy != 9'(sy / cnt)) begin
        failures++; $display("FAIL (%0d,%0d) exp (%0d,%0d)", cx, cy, sx / cnt, sy / cnt);
      end
    end
    begin
      logic [9:0] ox; logic [8:0] oy;
      ox = cx; oy = cy;
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      n = 0; div_en = 1; @(negedge clk); div_en = 0;
      checks++;
      if (valid || cx != ox || cy != oy) begin failures++; $display("FAIL zero points"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
