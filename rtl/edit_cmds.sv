// edit_cmds: object selection and the four composite commands (delete,
// move, copy, resize), as one minor FSM that drives the drawing modules.
// Every command's first click selects: the object already selected, if any,
// is redrawn in its own colour; the pixel word under the click is read and,
// if occupied, the object's number and type are taken from it and its two
// control points read from the object table; the object is then redrawn
// highlighted (screen only) and the selection register updated. Then:
//   select : done.
//   delete : the object is redrawn erased and its table entry cleared.
//   move   : waits for a second click P; new A = P, new B = B + (P - A)
//            (kept on screen); erases the old object, draws the new one under
//            the same number and rewrites its table entry.
//   resize : as move, but A stays and B = P.
//   copy   : as move, but the old object stays and the new one takes a
//            fresh number (`num_take`).
//   recolour: a `recolor` pulse while idle with an object selected (the
//            colour button was pressed) rewrites the selected object with
//            `new_color`: memory words and table entry take the new colour,
//            the screen keeps the highlight until it is deselected.
//            The document lists colour as an object property that can be
//            changed; starting the change from the colour button is this
//            design's choice.
// Redrawing uses the drawing module of the object's type: `draw_load` gives
// it both control points, `draw_style`/`draw_num`/`draw_color` say how its
// pixels are to be written, and `draw_done` ends the wait. Memory reads go
// out one at a time (rd_req) and wait for rvalid. Table writes go through
// the object table writer (tw_*). The selection register itself lives in the
// subsystem top; this module reads it (sel_*) and updates it (sel_we).
// Only the fields that are needed are read from the memory words (pixel
// word: occupied flag, type and number; table word: type, colour and
// position); the other bits are left unused.
module edit_cmds
  import cad_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        cancel,
  input  command_t    command,
  input  logic        next,
  input  logic        recolor,
  input  color_t      new_color,
  input  pos_t        pos,
  output logic        busy,
  output logic        pending,
  // selection register
  input  logic        sel_valid,
  input  obj_type_t   sel_type,
  input  logic [10:0] sel_num,
  input  color_t      sel_color,
  input  pos_t        sel_a,
  input  pos_t        sel_b,
  output logic        sel_we,
  output logic        sel_new_valid,
  output obj_type_t   sel_new_type,
  output logic [10:0] sel_new_num,
  output color_t      sel_new_color,
  output pos_t        sel_new_a,
  output pos_t        sel_new_b,
  // object numbers
  input  logic [10:0] next_num,
  output logic        num_take,
  // memory reads
  output logic        rd_req,
  output pos_t        rd_addr,
  input  logic        rvalid,
  input  logic [35:0] rdata,
  // drawing modules
  output logic        draw_load,
  output obj_type_t   draw_type,
  output pos_t        draw_a,
  output pos_t        draw_b,
  output style_t      draw_style,
  output logic [10:0] draw_num,
  output color_t      draw_color,
  input  logic        draw_done,
  // object table writer
  output logic        tw_req,
  output logic        tw_erase,
  output logic [10:0] tw_num,
  output obj_type_t   tw_type,
  output color_t      tw_color,
  output pos_t        tw_a,
  output pos_t        tw_b,
  input  logic        tw_busy
);
  typedef enum logic [3:0] {
    S_IDLE, S_DESEL, S_PROBE, S_RDA, S_RDB, S_HILITE, S_AFTER_SEL,
    S_ERASE, S_CLEAR_TBL, S_DRAW_NEW, S_NEW_TBL, S_WAIT_DRAW, S_WAIT_TW, S_WAIT_RD,
    S_RECOLOR, S_RECOLOR_TBL
  } state_t;
  state_t state, ret_state;
  logic   have_sel;
  pos_t   click_pos;
  logic [10:0] obj_num;
  obj_type_t   obj_type;
  color_t      obj_color;
  pos_t        obj_a, new_a, new_b;
  pix_word_t   pw;
  ctrl_word_t  cw;

  assign pw = pix_word_t'(rdata);
  assign cw = ctrl_word_t'(rdata);
  assign busy = (state != S_IDLE);
  assign pending = have_sel;

  // New control points for move/copy/resize, from the selection and a click.
  logic signed [11:0] bx, by;
  always_comb begin
    bx = 12'(sel_b.x) + 12'(click_pos.x) - 12'(sel_a.x);
    by = 12'(sel_b.y) + 12'(click_pos.y) - 12'(sel_a.y);
    if (bx < 0) bx = '0;
    if (bx > 12'(H_ACTIVE - 1)) bx = 12'(H_ACTIVE - 1);
    if (by < 0) by = '0;
    if (by > 12'(V_ACTIVE - 1)) by = 12'(V_ACTIVE - 1);
    if (command == CMD_RESIZE) begin
      new_a = sel_a;
      new_b = click_pos;
    end else begin
      new_a = click_pos;
      new_b = '{y: by[8:0], x: bx[9:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst || cancel) begin
      state <= S_IDLE; ret_state <= S_IDLE; have_sel <= 1'b0;
      click_pos <= '0; obj_num <= '0; obj_type <= OBJ_NONE; obj_color <= '0;
      obj_a <= '0;
      rd_req <= 1'b0; rd_addr <= '0; draw_load <= 1'b0; draw_type <= OBJ_NONE;
      draw_a <= '0; draw_b <= '0; draw_style <= STY_NORMAL; draw_num <= '0; draw_color <= '0;
      tw_req <= 1'b0; tw_erase <= 1'b0; tw_num <= '0; tw_type <= OBJ_NONE; tw_color <= '0;
      tw_a <= '0; tw_b <= '0; num_take <= 1'b0;
      sel_we <= 1'b0; sel_new_valid <= 1'b0; sel_new_type <= OBJ_NONE; sel_new_num <= '0;
      sel_new_color <= '0; sel_new_a <= '0; sel_new_b <= '0;
    end else begin
      rd_req <= 1'b0; draw_load <= 1'b0; tw_req <= 1'b0; num_take <= 1'b0; sel_we <= 1'b0;
      unique case (state)
        S_IDLE: if (next) begin
          click_pos <= pos;
          if (have_sel && sel_valid && command inside {CMD_MOVE, CMD_COPY, CMD_RESIZE}) begin
            have_sel <= 1'b0;
            state <= (command == CMD_COPY) ? S_DRAW_NEW : S_ERASE;
          end else begin
            have_sel <= 1'b0;
            state <= S_DESEL;
          end
        end else if (recolor && sel_valid) begin
          state <= S_RECOLOR;
        end
        S_RECOLOR: begin
          draw_load <= 1'b1; draw_type <= sel_type; draw_a <= sel_a; draw_b <= sel_b;
          draw_style <= STY_HILITE; draw_num <= sel_num; draw_color <= new_color;
          tw_num <= sel_num; tw_type <= sel_type; tw_color <= new_color;
          tw_a <= sel_a; tw_b <= sel_b; tw_erase <= 1'b0;
          ret_state <= S_RECOLOR_TBL; state <= S_WAIT_DRAW;
        end
        S_RECOLOR_TBL: begin
          tw_req <= 1'b1;
          sel_we <= 1'b1; sel_new_valid <= 1'b1; sel_new_type <= sel_type; sel_new_num <= sel_num;
          sel_new_color <= new_color; sel_new_a <= sel_a; sel_new_b <= sel_b;
          ret_state <= S_IDLE; state <= S_WAIT_TW;
        end
        S_DESEL: begin
          if (sel_valid) begin
            draw_load <= 1'b1; draw_type <= sel_type; draw_a <= sel_a; draw_b <= sel_b;
            draw_style <= STY_NORMAL; draw_num <= sel_num; draw_color <= sel_color;
            sel_we <= 1'b1; sel_new_valid <= 1'b0;
            ret_state <= S_PROBE; state <= S_WAIT_DRAW;
          end else state <= S_PROBE;
        end
        S_PROBE: begin
          rd_req <= 1'b1; rd_addr <= click_pos; ret_state <= S_RDA; state <= S_WAIT_RD;
        end
        S_RDA: begin
          if (!pw.occ || pw.otype == OBJ_NONE) state <= S_IDLE;   // nothing there
          else begin
            obj_num <= pw.num; obj_type <= pw.otype;
            rd_req <= 1'b1; rd_addr <= obj_table_addr(pw.num, 1'b0);
            ret_state <= S_RDB; state <= S_WAIT_RD;
          end
        end
        S_RDB: begin
          obj_a <= cw.pos; obj_color <= cw.color;
          rd_req <= 1'b1; rd_addr <= obj_table_addr(obj_num, 1'b1);
          ret_state <= S_HILITE; state <= S_WAIT_RD;
        end
        S_HILITE: begin
          draw_load <= 1'b1; draw_type <= obj_type; draw_a <= obj_a; draw_b <= cw.pos;
          draw_style <= STY_HILITE; draw_num <= obj_num; draw_color <= obj_color;
          sel_we <= 1'b1; sel_new_valid <= 1'b1; sel_new_type <= obj_type;
          sel_new_num <= obj_num; sel_new_color <= obj_color;
          sel_new_a <= obj_a; sel_new_b <= cw.pos;
          ret_state <= S_AFTER_SEL; state <= S_WAIT_DRAW;
        end
        S_AFTER_SEL: begin
          if (command == CMD_DELETE) state <= S_ERASE;
          else begin
            have_sel <= (command inside {CMD_MOVE, CMD_COPY, CMD_RESIZE});
            state <= S_IDLE;
          end
        end
        S_ERASE: begin
          draw_load <= 1'b1; draw_type <= sel_type; draw_a <= sel_a; draw_b <= sel_b;
          draw_style <= STY_ERASE; draw_num <= sel_num; draw_color <= sel_color;
          ret_state <= S_CLEAR_TBL; state <= S_WAIT_DRAW;
        end
        S_CLEAR_TBL: begin
          tw_req <= 1'b1; tw_erase <= 1'b1; tw_num <= sel_num; tw_type <= sel_type;
          tw_color <= sel_color; tw_a <= sel_a; tw_b <= sel_b;
          ret_state <= (command == CMD_DELETE) ? S_IDLE : S_DRAW_NEW;
          if (command == CMD_DELETE) begin
            sel_we <= 1'b1; sel_new_valid <= 1'b0;
          end
          state <= S_WAIT_TW;
        end
        S_DRAW_NEW: begin
          draw_load <= 1'b1; draw_type <= sel_type; draw_a <= new_a; draw_b <= new_b;
          draw_style <= STY_NORMAL; draw_color <= sel_color;
          draw_num <= (command == CMD_COPY) ? next_num : sel_num;
          num_take <= (command == CMD_COPY);
          tw_num <= (command == CMD_COPY) ? next_num : sel_num;
          tw_type <= sel_type; tw_color <= sel_color; tw_a <= new_a; tw_b <= new_b;
          tw_erase <= 1'b0;
          ret_state <= S_NEW_TBL; state <= S_WAIT_DRAW;
        end
        S_NEW_TBL: begin
          // the copy stays unselected; the original is redrawn normally
          tw_req <= 1'b1;
          sel_we <= 1'b1; sel_new_valid <= (command == CMD_COPY);
          sel_new_type <= sel_type; sel_new_num <= sel_num; sel_new_color <= sel_color;
          sel_new_a <= sel_a; sel_new_b <= sel_b;
          ret_state <= S_IDLE; state <= S_WAIT_TW;
        end
        S_WAIT_DRAW: if (draw_done) state <= ret_state;
        S_WAIT_TW:   if (!tw_req && !tw_busy) state <= ret_state;
        S_WAIT_RD:   if (rvalid) state <= ret_state;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
