// superplexer: chooses which command-side module drives the object memory
// port this clock, and forms the memory word for drawn pixels.
// Selection, in order:
//   1. snap_force_mem (snap-to-point mode) and a snap-to-point read pending
//   2. the object table writer while it writes
//   3. an edit command (select/delete/move/copy/resize) issuing a read
//   4. the drawing module of type `obj_type` (point/line/rect/circle)
// A drawn pixel becomes a write of a pix_word_t {occupied, type, number,
// colour} to the pixel's address, with the colour to show on screen beside
// it: by `style`, the object's colour (normal), the selection colour with the
// memory word unchanged (highlight), or zero in both (erase). Pixels outside
// the drawing area (x below 32 or off the 640x480 screen) are not written,
// which keeps the toolbar intact. Purely combinational.
// The document gives the superplexer's role and its select inputs (command,
// snap_force_mem, object type); the priority order is this design's.
module superplexer
  import cad_pkg::*;
(
  input  command_t    command,
  input  logic        snap_force_mem,
  input  obj_type_t   obj_type,
  // snap-to-point reads
  input  logic        spt_rd,
  input  pos_t        spt_addr,
  // object table writes
  input  logic        tw_wr,
  input  pos_t        tw_addr,
  input  logic [35:0] tw_data,
  // edit command reads
  input  logic        ed_rd,
  input  pos_t        ed_addr,
  // drawing modules, index = obj_type - 1
  input  logic [3:0]  pix_valid,
  input  pos_t        pix_pos [4],
  input  style_t      style,
  input  logic [10:0] num,
  input  color_t      color,
  // to the RAM interface
  output logic        mem_req,
  output logic        mem_we,
  output pos_t        mem_addr,
  output logic [35:0] mem_in,
  output color_t      disp_color
);
  logic       edit_cmd;
  logic [1:0] di;
  pos_t       pp;
  logic       pv, in_area;
  pix_word_t  w;

  always_comb begin
    edit_cmd = command inside {CMD_SELECT, CMD_DELETE, CMD_MOVE, CMD_COPY, CMD_RESIZE};
    di = 2'(obj_type - OBJ_POINT);
    pp = pix_pos[di];
    pv = (obj_type inside {OBJ_POINT, OBJ_LINE, OBJ_RECT, OBJ_CIRCLE}) && pix_valid[di];
    in_area = (pp.x >= 10'(TOOLBAR_W)) && (pp.x < 10'(H_ACTIVE)) && (pp.y < 9'(V_ACTIVE));
    w = '{occ: 1'b1, otype: obj_type, num: num, color: color, rsvd: '0};

    mem_req = 1'b0; mem_we = 1'b0; mem_addr = '0; mem_in = '0; disp_color = '0;
    if (snap_force_mem && spt_rd) begin
      mem_req = 1'b1; mem_addr = spt_addr;
    end else if (tw_wr) begin
      mem_req = 1'b1; mem_we = 1'b1; mem_addr = tw_addr; mem_in = tw_data;
    end else if (edit_cmd && ed_rd) begin
      mem_req = 1'b1; mem_addr = ed_addr;
    end else if (pv && in_area) begin
      mem_req = 1'b1; mem_we = 1'b1; mem_addr = pp;
      unique case (style)
        STY_HILITE: begin mem_in = w;   disp_color = SELECT_COLOR; end
        STY_ERASE:  begin mem_in = '0;  disp_color = '0; end
        default:    begin mem_in = w;   disp_color = color; end
      endcase
    end
  end
endmodule
