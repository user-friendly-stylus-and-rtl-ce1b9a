// snap_to_grid: moves a position to the nearest grid point.
// Each coordinate is rounded to the nearest multiple of GRID (ties round up)
// and kept on screen: a rounded x or y past the last grid point inside the
// 640x480 area is moved back by one grid step. `next` starts it; the result
// is registered, `done` pulses one clock later and `busy` is high for that
// clock. GRID=16, the spacing of the grid the display draws, is this design's
// choice; the document does not give a spacing. GRID must be a power of two.
module snap_to_grid
  import cad_pkg::*;
#(
  parameter int unsigned GRID = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic next,
  input  pos_t pos,
  output logic busy,
  output logic done,
  output pos_t snap_pos
);
  localparam int unsigned GB = $clog2(GRID);
  logic [10:0] rx, ry;
  always_comb begin
    rx = ({1'b0, pos.x} + 11'(GRID / 2)) >> GB << GB;
    ry = ({2'b0, pos.y} + 11'(GRID / 2)) >> GB << GB;
    if (rx >= 11'(H_ACTIVE)) rx = rx - 11'(GRID);
    if (ry >= 11'(V_ACTIVE)) ry = ry - 11'(GRID);
  end
  always_ff @(posedge clk) begin
    if (rst) begin
      done <= 1'b0;
      snap_pos <= '0;
    end else begin
      done <= next;
      if (next) snap_pos <= '{y: ry[8:0], x: rx[9:0]};
    end
  end
  assign busy = done;
endmodule
