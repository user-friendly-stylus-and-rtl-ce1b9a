// Testbench for snap_to_point with a memory model that answers reads 4
// clocks later. Objects are random pixels; for each random click the
// expected result is the occupied pixel within dx^2+dy^2 <= 56 that is
// nearest (ties: smaller dy, then smaller dx), or the click itself. Also
// checks that one read is issued per clock (177 reads for a click far from
// any edge and object) and the number of clocks the search takes.
module tb_snap_to_point;
  import cad_pkg::*;
  logic clk = 0, rst = 1, next = 0, busy, done, rd_req, rvalid;
  pos_t pos, sp, rd_addr;
  logic [35:0] rdata;
  int checks = 0, failures = 0, n_rd = 0;
  always #5 clk = ~clk;
  snap_to_point dut (.clk, .rst, .next, .pos, .busy, .done, .snap_pos(sp), .rd_req, .rd_addr,
                     .rvalid, .rdata);
  logic occ [pos_t];
  logic [3:0] vpipe;
  pos_t apipe [4];
  always @(posedge clk) begin
    vpipe <= {vpipe[2:0], rd_req};
    apipe[0] <= rd_addr;
    for (int i = 1; i < 4; i++) apipe[i] <= apipe[i-1];
    if (rd_req) n_rd++;
  end
  assign rvalid = vpipe[3];
  assign rdata  = {occ.exists(apipe[3]), 35'd0};
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    vpipe = '0;
    pos = '0;
    repeat (3) @(negedge clk); rst = 0;
    // far from everything: all 177 offsets read
    pos = '{y: 9'd240, x: 10'd320}; next = 1; @(negedge clk); next = 0;
    n_rd = 0;
    begin
      int t;
      t = 0;
      while (!done) begin @(negedge clk); t++; end
      checks++; if (n_rd != 177) begin failures++; $display("FAIL %0d reads", n_rd); end
      checks++; if (t > 177 + 6) begin failures++; $display("FAIL took %0d clocks", t); end
      checks++; if (sp != pos) begin failures++; $display("FAIL moved with nothing near"); end
    end
    for (int i = 0; i < 210; i++) begin
      pos_t p;
      p.y = (i < 150) ? 9'($urandom_range(0, 479)) : 9'($urandom_range(0, 20));
      p.x = (i < 150) ? 10'($urandom_range(0, 639)) : 10'($urandom_range(0, 20));
      occ[p] = 1;
    end
    for (int k = 0; k < 400; k++) begin
      int cx, cy, bd, bdy, bdx;
      pos_t e;
      if (k % 2) begin cx = $urandom_range(0, 639); cy = $urandom_range(0, 479); end
      else begin cx = $urandom_range(0, 25); cy = $urandom_range(0, 25); end
      e = '{y: 9'(cy), x: 10'(cx)};
      bd = 1000; bdy = 0; bdx = 0;
      foreach (occ[p]) begin
        int dx, dy, d2;
        dx = int'(p.x) - cx; dy = int'(p.y) - cy; d2 = dx * dx + dy * dy;
        if (d2 <= 56 && (d2 < bd || (d2 == bd && (dy < bdy || (dy == bdy && dx < bdx))))) begin
          bd = d2; bdy = dy; bdx = dx; e = p;
        end
      end
      pos = '{y: 9'(cy), x: 10'(cx)}; next = 1; @(negedge clk); next = 0;
      while (!done) @(negedge clk);
      checks++;
      if (sp != e) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) -> (%0d,%0d) exp (%0d,%0d)", cx, cy, sp.x, sp.y, e.x, e.y);
      end
      @(negedge clk);
    end
    // a single drawn pixel at each offset around the click: found exactly
    // when it lies within the search circle
    for (int dy = -8; dy <= 8; dy++)
      for (int dx = -8; dx <= 8; dx++) begin
        pos_t c, q, e;
        c = '{y: 9'(240), x: 10'(320)};
        q = '{y: 9'(240 + dy), x: 10'(320 + dx)};
        occ.delete(); occ[q] = 1;
        e = (dx * dx + dy * dy <= 56) ? q : c;
        pos = c; next = 1; @(negedge clk); next = 0;
        while (!done) @(negedge clk);
        checks++;
        if (sp != e) begin failures++; if (failures < 10) $display("FAIL offset (%0d,%0d)", dx, dy); end
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
