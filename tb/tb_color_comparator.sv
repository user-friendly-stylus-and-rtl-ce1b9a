// Testbench for color_comparator: random colours against random windows,
// expected pass computed here; checks the two-clock latency and that no pass
// is given without `en`.
module tb_color_comparator;
  logic clk = 0, rst = 1, en = 0, pass;
  logic [9:0] y, cr, cb, ymn, ymx, crmn, crmx, cbmn, cbmx;
  int checks = 0, failures = 0, npass = 0;
  always #5 clk = ~clk;
  color_comparator dut (.clk, .rst, .en, .y, .cr, .cb, .y_min(ymn), .y_max(ymx),
    .cr_min(crmn), .cr_max(crmx), .cb_min(cbmn), .cb_max(cbmx), .pass);
  function automatic logic [9:0] edge_val(input logic [9:0] lo, input logic [9:0] hi);
    case ($urandom_range(0, 3))
      0: return lo - 10'd1;
      1: return lo;
      2: return hi;
      default: return hi + 10'd1;
    endcase
  endfunction
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic exp_q [3];
  initial begin
    ymn = 300; ymx = 700; crmn = 400; crmx = 900; cbmn = 100; cbmx = 500;
    y = 0; cr = 0; cb = 0;
    exp_q = '{0, 0, 0};
    repeat (2) @(posedge clk); rst <= 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // result of the inputs applied two clocks ago
      checks++;
      if (pass !== exp_q[1]) begin
        failures++; if (failures < 10) $display("FAIL t=%0d pass=%0d exp=%0d", t, pass, exp_q[1]);
      end
      if (pass) npass++;
      y = 10'($urandom_range(200, 800)); cr = 10'($urandom_range(300, 1000));
      cb = 10'($urandom_range(0, 600)); en = ($urandom_range(0, 3) != 0);
      // half of the time put one component on or next to a window edge
      case ($urandom_range(0, 5))
        0: y  = edge_val(ymn, ymx);
        1: cr = edge_val(crmn, crmx);
        2: cb = edge_val(cbmn, cbmx);
        default: ;
      endcase
      exp_q[1] = exp_q[0];
      exp_q[0] = en && y >= ymn && y <= ymx && cr >= crmn && cr <= crmx && cb >= cbmn && cb <= cbmx;
    end
    checks++; if (npass < 50) begin failures++; $display("FAIL too few passes %0d", npass); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
