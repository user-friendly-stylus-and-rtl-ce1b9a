// Shared test scaffolding for the drawing modules: clock, stimulus and the
// collection of emitted pixels. Expects the module under test to be named
// `dut` with the common drawing-module ports.
  logic clk = 0, rst = 1, cancel = 0, next = 0, load = 0;
  pos_t pos, a_in, b_in, pix_pos, a_out, b_out;
  logic busy, pending, pix_valid, done;
  int checks = 0, failures = 0;
  pos_t pix [$];
  int first_pix_t, last_pix_t, n_valid_clk;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pix_valid) begin
      if (pix.size() == 0) first_pix_t = cyc;
      last_pix_t = cyc;
      pix.push_back(pix_pos);
    end
  end
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  // two clicks (or a load), then wait for done; returns the clocks taken
  task automatic draw(input pos_t a, input pos_t b, input logic use_load, output int clocks);
    pix.delete();
    if (use_load) begin
      a_in = a; b_in = b; load = 1; @(negedge clk); load = 0;
    end else begin
      pos = a; next = 1; @(negedge clk); next = 0;
      repeat (3) @(negedge clk);
      chk(pending || $bits(a) == 0, "pending after first click");
      pos = b; next = 1; @(negedge clk); next = 0;
    end
    clocks = 0;
    while (!done) begin @(negedge clk); clocks++; if (clocks > 20000) break; end
    chk(a_out == a && b_out == b, "control points");
    @(negedge clk);
    chk(!busy && !pending, "idle after done");
  endtask
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
