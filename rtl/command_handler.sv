// command_handler: the major FSM that hands drawing clicks to the command
// modules. It keeps no state of any command; each command module (a minor
// FSM) remembers how far its own command has got, e.g. that a line has its
// start point and waits for the end point.
// A drawing click is passed, as a one-cycle `next` with the click position,
// to the module the current command selects (`sel`, one bit per module:
// 0 point, 1 line, 2 rectangle, 3 circle, 4 edit commands) if that module and
// the memory path are idle (`busy` low); otherwise the click is dropped. The
// handler then waits for that module's busy to rise and fall again before it
// takes another click. A change of command sends `cancel` to all modules so
// that a half-entered command is forgotten.
module command_handler
  import cad_pkg::*;
#(
  parameter int unsigned N_MOD = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  command_t         command,
  input  logic             cmd_changed,
  input  logic             draw_click,
  input  pos_t             draw_pos,
  input  logic [N_MOD-1:0] mod_busy,
  input  logic             path_busy,
  output logic [N_MOD-1:0] next,
  output pos_t             next_pos,
  output logic             cancel,
  output logic             busy
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} state_t;
  state_t state;
  logic [N_MOD-1:0] target, sel;

  always_comb begin
    sel = '0;
    unique case (command)
      CMD_POINT:  sel[0] = 1'b1;
      CMD_LINE:   sel[1] = 1'b1;
      CMD_RECT:   sel[2] = 1'b1;
      CMD_CIRCLE: sel[3] = 1'b1;
      CMD_SELECT, CMD_DELETE, CMD_MOVE, CMD_COPY, CMD_RESIZE: sel[4] = 1'b1;
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; target <= '0; next <= '0; next_pos <= '0; cancel <= 1'b0;
    end else begin
      next   <= '0;
      cancel <= cmd_changed;
      unique case (state)
        S_IDLE:
          if (draw_click && sel != '0 && (mod_busy & sel) == '0 && !path_busy && !cmd_changed) begin
            next <= sel; next_pos <= draw_pos; target <= sel; state <= S_START;
          end
        // one clock for the module to register the click and raise busy
        S_START: state <= S_WAIT;
        S_WAIT:  if ((mod_busy & target) == '0 && !path_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
