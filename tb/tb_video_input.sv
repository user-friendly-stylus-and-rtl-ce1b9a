// Testbench for video_input: streams whole interlaced frames (64 x 2*20
// pixels) with a bright red blob at a random place, and checks the stylus
// position against the mean of the pixel positions that fall inside the
// colour window, computed here from the same stream. Also loads a window
// that nothing matches and checks that the result is flagged invalid.
module tb_video_input;
  localparam int W = 64, L = 20;
  logic clk = 0, rst = 1;
  logic [9:0] vid_data = 0;
  logic vid_valid = 0, f = 0, v = 1, h = 1, filt_load = 0;
  logic [9:0] win [6];
  logic [9:0] sx;
  logic [8:0] sy;
  logic svalid, sstrobe;
  int checks = 0, failures = 0, n_strobe = 0;
  always #5 clk = ~clk;
  video_input dut (.clk, .rst, .vid_data, .vid_valid, .f, .v, .h, .filt_load,
    .y_min(win[0]), .y_max(win[1]), .cr_min(win[2]), .cr_max(win[3]), .cb_min(win[4]),
    .cb_max(win[5]), .stylus_x(sx), .stylus_y(sy), .stylus_valid(svalid), .stylus_strobe(sstrobe));
  always @(posedge clk) if (sstrobe) n_strobe++;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // window the detector currently uses
  logic [9:0] ymn = 600, ymx = 1023, crmn = 640, crmx = 1023, cbmn = 0, cbmx = 560;
  longint sumx, sumy, npass;
  logic [9:0] cur_cr, cur_cb;
  task automatic send(input logic [9:0] d);
    // mostly back to back, sometimes with an idle clock in between
    if ($urandom_range(0, 3) == 0) begin vid_valid = 0; @(negedge clk); end
    vid_data = d; vid_valid = 1;
    @(negedge clk); vid_valid = 0;
  endtask
  task automatic luma(input logic [9:0] yv, input int x, input int y);
    send(yv);
    if (yv >= ymn && yv <= ymx && cur_cr >= crmn && cur_cr <= crmx && cur_cb >= cbmn && cur_cb <= cbmx) begin
      sumx += x; sumy += y; npass++;
    end
  endtask
  task automatic frame(input int bx, input int by, input int bw, input int bh);
    for (int fld = 0; fld < 2; fld++) begin
      f = fld[0]; v = 1; h = 1; repeat (8) @(negedge clk); v = 0;
      for (int l = 0; l < L; l++) begin
        h = 1; repeat (5) @(negedge clk); h = 0;
        for (int p = 0; p < W; p += 2) begin
          int yy;
          logic in0, in1;
          logic [9:0] cb, cr;
          yy = 2 * l + fld;
          in0 = p >= bx && p < bx + bw && yy >= by && yy < by + bh;
          in1 = p + 1 >= bx && p + 1 < bx + bw && yy >= by && yy < by + bh;
          cb = (in0 || in1) ? 10'($urandom_range(200, 400)) : 10'($urandom_range(450, 700));
          cr = (in0 || in1) ? 10'($urandom_range(700, 1000)) : 10'($urandom_range(300, 600));
          send(cb); cur_cb = cb;
          luma(in0 ? 10'($urandom_range(700, 1000)) : 10'($urandom_range(100, 650)), p, yy);
          send(cr); cur_cr = cr;
          luma(in1 ? 10'($urandom_range(700, 1000)) : 10'($urandom_range(100, 650)), p + 1, yy);
        end
      end
      h = 1; repeat (4) @(negedge clk);
    end
    v = 1; f = 0;
  endtask
  initial begin
    foreach (win[i]) win[i] = 0;
    cur_cr = 0; cur_cb = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int fr = 0; fr < 40; fr++) begin
      int bx, by, ns;
      bx = $urandom_range(0, W - 8); by = $urandom_range(0, 2 * L - 8);
      sumx = 0; sumy = 0; npass = 0;
      ns = n_strobe;
      frame(bx, by, $urandom_range(2, 8), $urandom_range(2, 8));
      repeat (20) @(negedge clk);
      checks++;
      if (n_strobe != ns + 1) begin failures++; $display("FAIL no result strobe"); end
      checks++;
      if (npass == 0 || !svalid || sx != 10'(sumx / npass) || sy != 9'(sumy / npass)) begin
        failures++;
        $display("FAIL frame %0d got (%0d,%0d) v=%0d exp (%0d,%0d) n=%0d", fr, sx, sy, svalid,
                 npass ? sumx / npass : 0, npass ? sumy / npass : 0, npass);
      end
    end
    // a window nothing matches
    win = '{1023, 1023, 0, 0, 0, 0};
    ymn = 1023; ymx = 1023; crmn = 0; crmx = 0; cbmn = 0; cbmx = 0;
    @(negedge clk); filt_load = 1; @(negedge clk); filt_load = 0;
    begin
      logic [9:0] ox; logic [8:0] oy;
      ox = sx; oy = sy;
      frame(10, 10, 6, 6);
      repeat (20) @(negedge clk);
      checks++;
      if (svalid || sx != ox || sy != oy) begin failures++; $display("FAIL empty frame"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
