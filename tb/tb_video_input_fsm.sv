// Testbench for video_input_fsm: random pass pulses (at least two clocks
// apart, as the comparator gives them) then frame done; checks that acc_en
// follows each pass by two clocks, that the count equals the number of
// passes, and the order div_en -> out_le -> clr with one clock between each.
module tb_video_input_fsm;
  logic clk = 0, rst = 1, pass = 0, frame_done = 0;
  logic acc_en, div_en, out_le, clr;
  logic [18:0] n_passed;
  int checks = 0, failures = 0;
  int t = 0, t_div = -1, t_le = -1, t_clr = -1, n_acc = 0;
  int pass_times [$];
  always #5 clk = ~clk;
  video_input_fsm dut (.clk, .rst, .pass, .frame_done, .acc_en, .div_en, .out_le, .clr, .n_passed);
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) begin
    t++;
    if (!rst) begin
      if (acc_en) begin
        n_acc++;
        checks++;
        if (pass_times.size() == 0 || t - pass_times.pop_front() != 2) begin
          failures++; $display("FAIL acc_en timing at %0d", t);
        end
      end
      if (div_en) t_div = t;
      if (out_le) t_le = t;
      if (clr) t_clr = t;
    end
  end
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    for (int fr = 0; fr < 5; fr++) begin
      int np;
      np = 0;
      n_acc = 0;
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        pass = ($urandom_range(0, 2) == 0);
        if (pass) begin np++; pass_times.push_back(t + 1); end
        @(negedge clk); pass = 0;
      end
      @(negedge clk); frame_done = 1; @(negedge clk); frame_done = 0;
      @(negedge clk); @(negedge clk);
      checks++;
      if (n_passed != 19'(np)) begin failures++; $display("FAIL count %0d exp %0d", n_passed, np); end
      repeat (6) @(negedge clk);
      checks++; if (n_acc != np) begin failures++; $display("FAIL acc %0d exp %0d", n_acc, np); end
      checks++;
      if (!(t_le == t_div + 1 && t_clr == t_le + 1)) begin
        failures++; $display("FAIL order div %0d le %0d clr %0d", t_div, t_le, t_clr);
      end
      checks++; if (n_passed != 0) begin failures++; $display("FAIL count not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
