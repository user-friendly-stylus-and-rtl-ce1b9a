// Testbench for isqrt: random and edge-case 20-bit radicands; the result
// must satisfy r*r <= n < (r+1)*(r+1), and `done` must come 10 clocks after
// `start`.
module tb_isqrt;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [19:0] n;
  logic [9:0] root;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  isqrt #(.W(20)) dut (.clk, .rst, .start, .radicand(n), .busy, .done, .root);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int t;
      longint r;
      if (i < 40) n = 20'(i); else if (i < 60) n = 20'((1 << 20) - 1 - (i - 40));
      else if (i < 100) n = 20'((i - 60) * (i - 60) * 600 % (1 << 20));
      else n = 20'($urandom);
      start = 1; @(negedge clk); start = 0;
      t = 1;
      while (!done) begin @(negedge clk); t++; end
      r = root;
      checks++;
      if (!(r * r <= n && (r + 1) * (r + 1) > n)) begin failures++; $display("FAIL sqrt(%0d)=%0d", n, r); end
      checks++;
      if (t != 11) begin failures++; $display("FAIL latency %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
