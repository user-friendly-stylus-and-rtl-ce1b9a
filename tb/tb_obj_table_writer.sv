// Testbench for obj_table_writer: random records and erasures; each request
// must give exactly two writes on consecutive clocks, to the object's two
// table addresses, with the expected control words (or zero).
module tb_obj_table_writer;
  import cad_pkg::*;
  logic clk = 0, rst = 1, req = 0, erase = 0, busy, wr;
  logic [10:0] num;
  obj_type_t otype;
  color_t color;
  pos_t a, b, wr_addr;
  logic [35:0] wr_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  obj_table_writer dut (.*);
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    num = '0; otype = OBJ_NONE; color = '0; a = '0; b = '0;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk);
    chk(!wr && !busy, "idle after reset");
    for (int i = 0; i < 2000; i++) begin
      logic [10:0] n; obj_type_t t; color_t c; pos_t pa, pb; logic e;
      ctrl_word_t ea, eb;
      n = 11'($urandom); t = obj_type_t'($urandom_range(1, 4)); c = 9'($urandom);
      pa = '{y: 9'($urandom), x: 10'($urandom)}; pb = '{y: 9'($urandom), x: 10'($urandom)};
      e = ($urandom_range(0, 3) == 0);
      num = n; otype = t; color = c; a = pa; b = pb; erase = e; req = 1;
      @(negedge clk); req = 0;
      // change the inputs: they must have been sampled
      num = 11'($urandom); a = '{y: 9'($urandom), x: 10'($urandom)};
      ea = '{occ: 1'b1, otype: t, color: c, rsvd: '0, pos: pa};
      eb = '{occ: 1'b1, otype: t, color: c, rsvd: '0, pos: pb};
      chk(wr && busy && wr_addr == obj_table_addr(n, 1'b0) && wr_data == (e ? 36'd0 : 36'(ea)), "first write");
      chk(wr_addr.x >= 10'd768, "table outside the screen");
      @(negedge clk);
      chk(wr && wr_addr == obj_table_addr(n, 1'b1) && wr_data == (e ? 36'd0 : 36'(eb)), "second write");
      @(negedge clk);
      chk(!wr && !busy, "two writes only");
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
