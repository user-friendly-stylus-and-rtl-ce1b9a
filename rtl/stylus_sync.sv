// stylus_sync: brings the stylus inputs into the CAD clock domain.
// The click switch passes through two flip-flops and its rising edge gives a
// one-cycle `click` pulse. The position is registered every clock; when the
// incoming position lies outside the 640x480 screen (the camera side may
// report undefined values) the previous position is kept. Output position is
// a pos_t, the same {y, x} packing used as memory address.
// The two-flop synchroniser and the edge detection are this design's choices.
module stylus_sync
  import cad_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       click_in,
  input  logic [9:0] pos_x_in,
  input  logic [9:0] pos_y_in,
  output logic       click,
  output logic       click_level,
  output pos_t       pos
);
  logic s1, s2, s3;
  always_ff @(posedge clk) begin
    if (rst) begin
      {s1, s2, s3} <= '0;
      click <= 1'b0;
      pos <= '0;
    end else begin
      s1 <= click_in;
      s2 <= s1;
      s3 <= s2;
      click <= s2 && !s3;
      if (pos_x_in < 10'(H_ACTIVE) && pos_y_in < 10'(V_ACTIVE)) begin
        pos.x <= pos_x_in;
        pos.y <= pos_y_in[8:0];
      end
    end
  end
  assign click_level = s3;
endmodule
