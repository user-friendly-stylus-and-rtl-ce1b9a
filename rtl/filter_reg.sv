// filter_reg: the colour window the stylus detector looks for.
// Six 10-bit bounds (minimum and maximum of Y, Cr and Cb) are loaded together
// when `load` is high and held otherwise. After reset they hold a window for a
// bright red LED: high luma, high Cr, low-to-middle Cb. The reset values are
// this design's choice; the document names the register but gives no values.
// Outputs change on the clock edge after `load`.
module filter_reg #(
  parameter logic [9:0] Y_MIN_RST  = 10'd600, parameter logic [9:0] Y_MAX_RST  = 10'd1023,
  parameter logic [9:0] CR_MIN_RST = 10'd640, parameter logic [9:0] CR_MAX_RST = 10'd1023,
  parameter logic [9:0] CB_MIN_RST = 10'd0,   parameter logic [9:0] CB_MAX_RST = 10'd560
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [9:0] y_min_in, y_max_in, cr_min_in, cr_max_in, cb_min_in, cb_max_in,
  output logic [9:0] y_min, y_max, cr_min, cr_max, cb_min, cb_max
);
  always_ff @(posedge clk) begin
    if (rst) begin
      y_min <= Y_MIN_RST;  y_max <= Y_MAX_RST;
      cr_min <= CR_MIN_RST; cr_max <= CR_MAX_RST;
      cb_min <= CB_MIN_RST; cb_max <= CB_MAX_RST;
    end else if (load) begin
      y_min <= y_min_in;  y_max <= y_max_in;
      cr_min <= cr_min_in; cr_max <= cr_max_in;
      cb_min <= cb_min_in; cb_max <= cb_max_in;
    end
  end
endmodule
