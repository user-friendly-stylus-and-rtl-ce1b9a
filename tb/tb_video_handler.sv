// Testbench for video_handler: streams two small interlaced fields (16
// pixels x 6 lines each) and checks, for every luma sample, the position
// the handler reports and the Y/Cr/Cb registers, plus one frame_done per
// frame and no strobe during blanking.
module tb_video_handler;
  localparam int W = 16, L = 6;
  logic clk = 0, rst = 1;
  logic [9:0] vid_data = 0;
  logic vid_valid = 0, f = 0, v = 1, h = 1;
  logic [9:0] y_val, cr_val, cb_val, px;
  logic [8:0] py;
  logic cmp_en, frame_done;
  int checks = 0, failures = 0, n_en = 0, n_fd = 0;
  always #5 clk = ~clk;
  video_handler dut (.clk, .rst, .vid_data, .vid_valid, .f, .v, .h, .y_val, .cr_val, .cb_val,
                     .cmp_en, .pos_x(px), .pos_y(py), .frame_done);
  typedef struct { int x, y; logic [9:0] yv, cr, cb; } exp_t;
  exp_t expq [$];
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (!rst) begin
    if (frame_done) n_fd++;
    if (cmp_en) begin
      exp_t e;
      n_en++;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected strobe"); end
      else begin
        e = expq.pop_front();
        if (px != 10'(e.x) || py != 9'(e.y) || y_val != e.yv || cr_val != e.cr || cb_val != e.cb) begin
          failures++;
          $display("FAIL pos (%0d,%0d) exp (%0d,%0d) y %0d/%0d cr %0d/%0d cb %0d/%0d",
                   px, py, e.x, e.y, y_val, e.yv, cr_val, e.cr, cb_val, e.cb);
        end
      end
    end
  end
  task automatic send(input logic [9:0] d);
    @(negedge clk); vid_data = d; vid_valid = 1;
    @(negedge clk); vid_valid = 0;     // one idle clock between samples
  endtask
  task automatic field(input logic fld, input int frame);
    f = fld; v = 1; h = 1;
    repeat (10) @(negedge clk);
    v = 0;
    for (int l = 0; l < L; l++) begin
      h = 1; repeat (6) @(negedge clk); h = 0;
      for (int p = 0; p < W; p += 2) begin
        logic [9:0] cb, y0, cr, y1;
        cb = 10'($urandom); y0 = 10'($urandom); cr = 10'($urandom); y1 = 10'($urandom);
        send(cb); send(y0);
        // at the first Y the Cr register still holds the previous pixel pair's
        expq.push_back('{p, 2*l + fld, y0, (p == 0 && l == 0 && fld == 0 && frame == 0) ? 10'd0 : last_cr, cb});
        send(cr); send(y1);
        expq.push_back('{p + 1, 2*l + fld, y1, cr, cb});
        last_cr = cr;
      end
    end
    h = 1; repeat (4) @(negedge clk);
  endtask
  logic [9:0] last_cr = 0;
  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int fr = 0; fr < 2; fr++) begin
      field(0, fr);
      field(1, fr);
    end
    v = 1; f = 0; repeat (10) @(negedge clk);
    checks++; if (n_en != 2 * 2 * L * W) begin failures++; $display("FAIL strobes %0d", n_en); end
    checks++; if (n_fd != 2) begin failures++; $display("FAIL frame_done %0d", n_fd); end
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
