// draw_point: the point command. A `next` click, or `load` with a stored
// control point, draws that single pixel: `pix_valid` is high with
// `pix_pos` for one clock, and `done` pulses the clock after. Both control
// points (`a_out`, `b_out`) are the point itself. `busy` is high from the
// clock after the request until `done`. Ports are the same as those of the
// other drawing modules.
module draw_point
  import cad_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic cancel,
  input  logic next,
  input  pos_t pos,
  input  logic load,
  input  pos_t a_in,
  input  pos_t b_in,
  output logic busy,
  output logic pending,
  output logic pix_valid,
  output pos_t pix_pos,
  output logic done,
  output pos_t a_out,
  output pos_t b_out
);
  always_ff @(posedge clk) begin
    if (rst || cancel) begin
      pix_valid <= 1'b0; done <= 1'b0; a_out <= '0;
    end else begin
      done      <= pix_valid;
      pix_valid <= 1'b0;
      if (next || load) begin
        a_out     <= load ? a_in : pos;
        pix_valid <= 1'b1;
      end
    end
  end
  assign pix_pos = a_out;
  assign b_out   = a_out;
  assign busy    = pix_valid || done;
  assign pending = 1'b0;
  wire unused_b = ^b_in;
endmodule
