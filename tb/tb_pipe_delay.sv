// Testbench for pipe_delay: random words must reappear exactly four clocks
// later.
module tb_pipe_delay;
  logic clk = 0, rst = 1;
  logic [18:0] d, q;
  logic [18:0] hist [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pipe_delay #(.WIDTH(19), .DEPTH(4)) dut (.clk, .rst, .d, .q);
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    d = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int t = 0; t < 500; t++) begin
      d = 19'($urandom);
      hist.push_back(d);
      @(negedge clk);
      if (hist.size() > 3) begin
        logic [18:0] e;
        e = hist.pop_front();
        checks++;
        if (q !== e) begin failures++; $display("FAIL t=%0d q=%h exp=%h", t, q, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
