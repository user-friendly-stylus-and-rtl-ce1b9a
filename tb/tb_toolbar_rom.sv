// Testbench for toolbar_rom: reads every address and checks the parts of the
// bitmap that are fixed by the layout: the one-pixel frame of every
// 32x32 button, the all-zero lines below line 480, the centre dot of the
// point button and the ring of the circle button, and the one-clock latency.
module tb_toolbar_rom;
  logic clk = 0;
  logic [10:0] addr = 0;
  logic [7:0] data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  toolbar_rom dut (.clk, .addr, .data);
  function automatic logic bitat(input logic [7:0] w [4], input int col);
    return w[col / 8][7 - col % 8];
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] w [4];
    for (int line = 0; line < 512; line++) begin
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); addr = 11'(line * 4 + k);
        @(negedge clk); w[k] = data;
      end
      checks++;
      if (line >= 480) begin
        if (w[0] | w[1] | w[2] | w[3]) begin failures++; $display("FAIL line %0d not blank", line); end
      end else if (line % 32 == 0 || line % 32 == 31) begin
        if ({w[0], w[1], w[2], w[3]} != '1) begin failures++; $display("FAIL frame row %0d", line); end
      end else begin
        if (!bitat(w, 0) || !bitat(w, 31)) begin failures++; $display("FAIL frame col %0d", line); end
      end
      if (line / 32 == 1 && line % 32 >= 1 && line % 32 <= 30) begin   // line button: diagonal
        checks++;
        if (bitat(w, line % 32) != (line % 32 >= 6 && line % 32 <= 25)) begin
          failures++; $display("FAIL line glyph row %0d", line);
        end
      end
      if (line == 16) begin
        checks++; if (!bitat(w, 16) || bitat(w, 10)) begin failures++; $display("FAIL point glyph"); end
      end
      if (line == 96 + 16) begin   // circle button, middle row: ring at +-7..8 from centre
        checks++;
        if (!bitat(w, 8) || !bitat(w, 23) || bitat(w, 15) || bitat(w, 4)) begin
          failures++; $display("FAIL circle glyph %h %h %h %h", w[0], w[1], w[2], w[3]);
        end
      end
    end
    // latency: data must not change before the clock edge
    @(negedge clk); addr = 0; @(negedge clk); addr = 11'd5; #1;
    checks++; if (data != 8'hFF) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
