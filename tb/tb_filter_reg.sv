// Testbench for filter_reg: checks the reset window, that values load only
// with `load`, and that they are held afterwards.
module tb_filter_reg;
  logic clk = 0, rst = 1, load = 0;
  logic [9:0] in [6];
  logic [9:0] out [6];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  filter_reg dut (.clk, .rst, .load,
    .y_min_in(in[0]), .y_max_in(in[1]), .cr_min_in(in[2]), .cr_max_in(in[3]),
    .cb_min_in(in[4]), .cb_max_in(in[5]),
    .y_min(out[0]), .y_max(out[1]), .cr_min(out[2]), .cr_max(out[3]),
    .cb_min(out[4]), .cb_max(out[5]));
  task automatic chk(input logic [9:0] got, input logic [9:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [9:0] v [6];
    foreach (in[i]) in[i] = 10'(i * 100 + 7);
    repeat (2) @(posedge clk); rst <= 0; @(posedge clk); #1;
    chk(out[0], 600, "y_min rst"); chk(out[1], 1023, "y_max rst");
    chk(out[2], 640, "cr_min rst"); chk(out[3], 1023, "cr_max rst");
    chk(out[4], 0, "cb_min rst"); chk(out[5], 560, "cb_max rst");
    for (int t = 0; t < 20; t++) begin
      foreach (v[i]) v[i] = 10'($urandom);
      @(negedge clk); foreach (in[i]) in[i] = v[i]; load = 1;
      @(negedge clk); load = 0; foreach (in[i]) in[i] = ~v[i];
      @(negedge clk);
      foreach (out[i]) chk(out[i], v[i], "loaded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
