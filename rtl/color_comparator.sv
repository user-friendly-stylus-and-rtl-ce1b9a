// color_comparator: decides whether a camera pixel has the stylus LED colour.
// Stage 1 registers the six bound comparisons of the latest Y, Cr and Cb
// values together with `en`; stage 2 ANDs them into a one-cycle `pass`.
// `pass` therefore follows the `en` strobe by two clock cycles. `en` comes
// from the video handler, which raises it once per luma sample in active video
// only, so no passes are registered during blanking (as the document asks).
// The two-stage split is this design's choice.
module color_comparator (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [9:0] y, cr, cb,
  input  logic [9:0] y_min, y_max, cr_min, cr_max, cb_min, cb_max,
  output logic       pass
);
  logic y_ok, cr_ok, cb_ok, en_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      {y_ok, cr_ok, cb_ok, en_q, pass} <= '0;
    end else begin
      y_ok  <= (y  >= y_min)  && (y  <= y_max);
      cr_ok <= (cr >= cr_min) && (cr <= cr_max);
      cb_ok <= (cb >= cb_min) && (cb <= cb_max);
      en_q  <= en;
      pass  <= en_q && y_ok && cr_ok && cb_ok;
    end
  end
endmodule
