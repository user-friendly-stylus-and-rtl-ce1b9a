// Testbench for ram_interface with the ZBT SRAM model at full size (2^19
// words). The model is first filled with junk; after reset the flush must
// take 2^19 clocks and leave every checked word zero. Then random read and
// write traffic (a request on most clocks) is checked against a reference
// memory: read data in order, RD_LAT = 4 clocks after the request, and a
// FIFO push for every on-screen write. The model asserts that the bus is
// driven only in write data phases.
module tb_ram_interface;
  import cad_pkg::*;
  logic clk = 0, rst = 1, flushing, mem_req = 0, mem_we = 0, rvalid, fifo_wr;
  pos_t mem_addr; logic [35:0] mem_in, mem_out; color_t disp_color;
  logic [18:0] sram_addr; logic sram_we_b, sram_oe; logic [35:0] sram_wdata, sram_rdata;
  pixel_info_t fifo_din;
  int checks = 0, failures = 0, cyc = 0;
  logic [35:0] ref_mem [pos_t];
  logic [35:0] exp_q [$];
  int exp_t [$];
  pixel_info_t fifo_q [$];
  int n_rd = 0, n_wr = 0, n_fifo = 0;
  always #5 clk = ~clk;
  ram_interface #(.ADDR_W(19)) dut (.*);
  zbt_sram_model #(.AW(19)) mem (.clk, .addr(sram_addr), .we_b(sram_we_b), .wdata(sram_wdata),
                                 .oe(sram_oe), .rdata(sram_rdata));
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && rvalid) begin
      chk(exp_q.size() > 0, "unexpected read data");
      if (exp_q.size() > 0) begin
        chk(mem_out == exp_q[0], $sformatf("read data %h exp %h", mem_out, exp_q[0]));
        chk(cyc - exp_t[0] == 4, $sformatf("read latency %0d", cyc - exp_t[0]));
        void'(exp_q.pop_front()); void'(exp_t.pop_front());
        n_rd++;
      end
    end
    if (!rst && fifo_wr) begin
      chk(fifo_q.size() > 0 && fifo_din == fifo_q[0], "FIFO push");
      if (fifo_q.size() > 0) void'(fifo_q.pop_front());
      n_fifo++;
    end
  end
  initial begin
    int t0;
    mem_addr = '0; mem_in = '0; disp_color = '0;
    for (int i = 0; i < (1 << 19); i++) mem.mem[i] = {4'hf, 32'($urandom)};
    repeat (3) @(negedge clk); rst = 0;
    t0 = cyc;
    while (flushing) @(negedge clk);
    chk(cyc - t0 >= (1 << 19) && cyc - t0 <= (1 << 19) + 2, $sformatf("flush length %0d", cyc - t0));
    repeat (4) @(negedge clk);
    for (int i = 0; i < (1 << 19); i += 997) chk(mem.mem[i] == '0, "flushed");
    chk(mem.mem[(1 << 19) - 1] == '0 && mem.mem[0] == '0, "flushed ends");
    // random traffic over a small address set so reads hit earlier writes
    for (int i = 0; i < 40000; i++) begin
      pos_t a; logic [35:0] d; logic go, we;
      a = '{y: 9'($urandom_range(470, 490)), x: 10'($urandom_range(630, 650))};
      if (i % 7 == 0) a = obj_table_addr(11'($urandom_range(0, 15)), 1'($urandom));
      d = {4'($urandom), 32'($urandom)};
      go = ($urandom_range(0, 4) != 0); we = 1'($urandom);
      mem_req = go; mem_we = we; mem_addr = a; mem_in = d; disp_color = 9'($urandom);
      if (go && we) begin
        ref_mem[a] = d; n_wr++;
        if (a.x < 640 && a.y < 480) fifo_q.push_back('{addr: a, color: disp_color});
      end
      if (go && !we) begin
        exp_q.push_back(ref_mem.exists(a) ? ref_mem[a] : 36'd0);
        exp_t.push_back(cyc);
      end
      @(negedge clk);
    end
    mem_req = 0;
    repeat (10) @(negedge clk);
    chk(exp_q.size() == 0 && fifo_q.size() == 0, "all reads returned, all pushes seen");
    chk(n_rd > 1000 && n_wr > 1000 && n_fifo > 100, "traffic exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
