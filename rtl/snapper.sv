// snapper: the major FSM that applies the snapping mode to each click.
// On a click it latches the position and, by the mode register, either
// passes it on at once (no snapping), or starts snap-to-grid or snap-to-point
// with `next` and waits for that module's `done`. It then emits a one-cycle
// `click_out` with the snapped `pos_out`. Clicks on the toolbar (x below 32)
// are never snapped, so a button press cannot be moved into the drawing area;
// clicks that arrive while a snap is running are dropped. Between clicks
// `pos_out` follows the live stylus position. The bypass for the toolbar is
// this design's choice.
module snapper
  import cad_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  click,
  input  pos_t  pos,
  input  mode_t mode,
  // snapping modules
  output logic  grid_next,
  input  logic  grid_done,
  input  pos_t  grid_pos,
  output logic  point_next,
  input  logic  point_done,
  input  pos_t  point_pos,
  output pos_t  snap_in,
  output logic  busy,
  output logic  click_out,
  output pos_t  pos_out
);
  typedef enum logic [1:0] {S_IDLE, S_GRID, S_POINT} state_t;
  state_t state;
  pos_t   held;

  assign snap_in = held;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; held <= '0;
      grid_next <= 1'b0; point_next <= 1'b0; click_out <= 1'b0; pos_out <= '0;
    end else begin
      grid_next <= 1'b0; point_next <= 1'b0; click_out <= 1'b0;
      unique case (state)
        S_IDLE: begin
          pos_out <= pos;
          if (click) begin
            held <= pos;
            if (pos.x < 10'(TOOLBAR_W) || mode == SNAP_NONE) begin
              click_out <= 1'b1;
            end else if (mode == SNAP_GRID) begin
              grid_next <= 1'b1; state <= S_GRID;
            end else begin
              point_next <= 1'b1; state <= S_POINT;
            end
          end
        end
        S_GRID: if (grid_done) begin
          pos_out <= grid_pos; click_out <= 1'b1; state <= S_IDLE;
        end
        S_POINT: if (point_done) begin
          pos_out <= point_pos; click_out <= 1'b1; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
