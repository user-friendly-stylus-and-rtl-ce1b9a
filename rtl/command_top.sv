// command_top: the CAD command subsystem. Stylus clicks and positions go in;
// object memory (an external 512K x 36 ZBT SRAM) is kept up to date and
// every changed screen pixel is sent to the video side through the FIFO.
// Path of a click: synchroniser -> snapper (optionally snapped to the grid or
// to a nearby drawn pixel) -> area map (toolbar button or drawing click) ->
// command handler -> the command module (minor FSM) of the current command.
// The drawing modules emit pixels; the superplexer turns them, and the reads
// and table writes of the other modules, into one memory request per clock
// for the RAM interface.
// Object memory holds, at each on-screen pixel's address, a pix_word_t naming
// the object drawn there (type, number, colour), and, in the off-screen part
// of the address space, an object table with the two control points of
// every object (see cad_pkg). New objects are numbered from 1 upwards.
// Pressing the colour button while an object is selected also recolours
// that object (through the edit-command module).
// The selection register (the selected object's type, number, colour and
// control points) is kept here, as in the document.
// Reset: the RAM interface first flushes the whole memory; the rest of the
// subsystem is held in reset until that is done.
module command_top
  import cad_pkg::*;
#(
  parameter int unsigned FLUSH_AW = 19,
  parameter int unsigned GRID = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        click_in,
  input  logic [9:0]  pos_x_in,
  input  logic [9:0]  pos_y_in,
  // ZBT SRAM
  output logic [18:0] sram_addr,
  output logic        sram_we_b,
  output logic [35:0] sram_wdata,
  output logic        sram_oe,
  input  logic [35:0] sram_rdata,
  // pixel FIFO
  output logic        fifo_wr,
  output pixel_info_t fifo_din,
  // status
  output pos_t        cursor_pos,
  output command_t    command,
  output mode_t       mode,
  output color_t      color,
  output logic        sel_valid,
  output logic        busy,
  output logic        flushing
);
  logic crst;
  assign crst = rst || flushing;

  // ---------------- stylus input and snapping ----------------
  logic click_s, click_lvl, snap_busy, grid_next, grid_done, grid_busy;
  logic point_next, point_done, point_busy, snapped_click, cmd_busy;
  pos_t pos_s, snap_in, grid_pos, point_pos, snapped_pos;
  logic spt_rd;
  pos_t spt_addr;
  logic rvalid;
  logic [35:0] mem_out;

  stylus_sync u_sync (.clk, .rst(crst), .click_in, .pos_x_in, .pos_y_in,
                      .click(click_s), .click_level(click_lvl), .pos(pos_s));
  assign cursor_pos = pos_s;

  snapper u_snapper (.clk, .rst(crst), .click(click_s && !cmd_busy), .pos(pos_s), .mode,
    .grid_next, .grid_done, .grid_pos, .point_next, .point_done, .point_pos,
    .snap_in, .busy(snap_busy), .click_out(snapped_click), .pos_out(snapped_pos));

  snap_to_grid #(.GRID(GRID)) u_grid (.clk, .rst(crst), .next(grid_next), .pos(snap_in),
    .busy(grid_busy), .done(grid_done), .snap_pos(grid_pos));

  snap_to_point u_point (.clk, .rst(crst), .next(point_next), .pos(snap_in),
    .busy(point_busy), .done(point_done), .snap_pos(point_pos),
    .rd_req(spt_rd), .rd_addr(spt_addr), .rvalid(rvalid && point_busy), .rdata(mem_out));

  // ---------------- area map and command handler ----------------
  logic cmd_changed, snap_force_mem, draw_click, cancel, tw_busy;
  pos_t draw_pos, next_pos;
  logic [4:0] mod_busy, next;

  area_map u_area (.clk, .rst(crst), .click(snapped_click), .pos(snapped_pos),
    .command, .cmd_changed, .mode, .color, .snap_force_mem, .draw_click, .draw_pos);

  command_handler #(.N_MOD(5)) u_handler (.clk, .rst(crst), .command, .cmd_changed,
    .draw_click, .draw_pos, .mod_busy, .path_busy(tw_busy || snap_busy),
    .next, .next_pos, .cancel, .busy(cmd_busy));

  // ---------------- drawing modules ----------------
  logic [3:0] d_busy, d_pending, d_pix_valid, d_done, d_load;
  pos_t       d_pix_pos [4];
  pos_t       d_a [4];
  pos_t       d_b [4];
  logic       ed_load, ed_busy;
  obj_type_t  ed_type;
  pos_t       ed_a, ed_b;

  for (genvar i = 0; i < 4; i++) begin : g_load
    assign d_load[i] = ed_load && (ed_type == obj_type_t'(i + 1));
  end

  draw_point u_point_draw (.clk, .rst(crst), .cancel, .next(next[0]), .pos(next_pos),
    .load(d_load[0]), .a_in(ed_a), .b_in(ed_b), .busy(d_busy[0]), .pending(d_pending[0]),
    .pix_valid(d_pix_valid[0]), .pix_pos(d_pix_pos[0]), .done(d_done[0]),
    .a_out(d_a[0]), .b_out(d_b[0]));
  draw_line u_line (.clk, .rst(crst), .cancel, .next(next[1]), .pos(next_pos),
    .load(d_load[1]), .a_in(ed_a), .b_in(ed_b), .busy(d_busy[1]), .pending(d_pending[1]),
    .pix_valid(d_pix_valid[1]), .pix_pos(d_pix_pos[1]), .done(d_done[1]),
    .a_out(d_a[1]), .b_out(d_b[1]));
  draw_rect u_rect (.clk, .rst(crst), .cancel, .next(next[2]), .pos(next_pos),
    .load(d_load[2]), .a_in(ed_a), .b_in(ed_b), .busy(d_busy[2]), .pending(d_pending[2]),
    .pix_valid(d_pix_valid[2]), .pix_pos(d_pix_pos[2]), .done(d_done[2]),
    .a_out(d_a[2]), .b_out(d_b[2]));
  draw_circle u_circle (.clk, .rst(crst), .cancel, .next(next[3]), .pos(next_pos),
    .load(d_load[3]), .a_in(ed_a), .b_in(ed_b), .busy(d_busy[3]), .pending(d_pending[3]),
    .pix_valid(d_pix_valid[3]), .pix_pos(d_pix_pos[3]), .done(d_done[3]),
    .a_out(d_a[3]), .b_out(d_b[3]));

  assign mod_busy = {ed_busy, d_busy};

  // ---------------- selection register and object numbers ----------------
  logic        sel_we, sel_new_valid, num_take;
  obj_type_t   sel_type, sel_new_type;
  logic [10:0] sel_num, sel_new_num, next_num;
  color_t      sel_color, sel_new_color;
  pos_t        sel_a, sel_b, sel_new_a, sel_new_b;
  logic        new_obj_done;

  always_ff @(posedge clk) begin
    if (crst) begin
      sel_valid <= 1'b0; sel_type <= OBJ_NONE; sel_num <= '0; sel_color <= '0;
      sel_a <= '0; sel_b <= '0;
    end else if (sel_we) begin
      sel_valid <= sel_new_valid; sel_type <= sel_new_type; sel_num <= sel_new_num;
      sel_color <= sel_new_color; sel_a <= sel_new_a; sel_b <= sel_new_b;
    end
  end

  // Active drawing type: the edit command's while it runs, else the command's.
  obj_type_t cmd_type, act_type;
  always_comb begin
    unique case (command)
      CMD_POINT:  cmd_type = OBJ_POINT;
      CMD_LINE:   cmd_type = OBJ_LINE;
      CMD_RECT:   cmd_type = OBJ_RECT;
      CMD_CIRCLE: cmd_type = OBJ_CIRCLE;
      default:    cmd_type = OBJ_NONE;
    endcase
    act_type = ed_busy ? ed_type : cmd_type;
  end

  // A drawing module finishing outside an edit command has drawn a new object.
  assign new_obj_done = !ed_busy && (cmd_type != OBJ_NONE) && d_done[2'(cmd_type - OBJ_POINT)];

  always_ff @(posedge clk) begin
    if (crst) next_num <= 11'd1;
    else if (new_obj_done || num_take) next_num <= next_num + 11'd1;
  end

  // ---------------- edit commands ----------------
  logic        ed_rd, ed_pending, ed_tw_req, ed_tw_erase;
  pos_t        ed_addr, ed_tw_a, ed_tw_b;
  style_t      ed_style;
  logic [10:0] ed_num, ed_tw_num;
  color_t      ed_color, ed_tw_color;
  obj_type_t   ed_tw_type;
  logic        ed_draw_done;
  assign ed_draw_done = (ed_type != OBJ_NONE) && d_done[2'(ed_type - OBJ_POINT)];

  // a colour change with an object selected recolours that object
  color_t color_q;
  logic   recolor;
  always_ff @(posedge clk) color_q <= color;
  assign recolor = !crst && (color != color_q);

  edit_cmds u_edit (.clk, .rst(crst), .cancel, .command, .next(next[4]), .pos(next_pos),
    .recolor, .new_color(color),
    .busy(ed_busy), .pending(ed_pending),
    .sel_valid, .sel_type, .sel_num, .sel_color, .sel_a, .sel_b,
    .sel_we, .sel_new_valid, .sel_new_type, .sel_new_num, .sel_new_color,
    .sel_new_a, .sel_new_b, .next_num, .num_take,
    .rd_req(ed_rd), .rd_addr(ed_addr), .rvalid(rvalid && !point_busy), .rdata(mem_out),
    .draw_load(ed_load), .draw_type(ed_type), .draw_a(ed_a), .draw_b(ed_b),
    .draw_style(ed_style), .draw_num(ed_num), .draw_color(ed_color), .draw_done(ed_draw_done),
    .tw_req(ed_tw_req), .tw_erase(ed_tw_erase), .tw_num(ed_tw_num), .tw_type(ed_tw_type),
    .tw_color(ed_tw_color), .tw_a(ed_tw_a), .tw_b(ed_tw_b), .tw_busy);

  // ---------------- object table writer ----------------
  logic        tw_wr;
  pos_t        tw_addr;
  logic [35:0] tw_data;
  logic [1:0]  di;
  assign di = 2'(cmd_type - OBJ_POINT);

  obj_table_writer u_tw (.clk, .rst(crst),
    .req(ed_tw_req || new_obj_done),
    .erase(ed_tw_req ? ed_tw_erase : 1'b0),
    .num(ed_tw_req ? ed_tw_num : next_num),
    .otype(ed_tw_req ? ed_tw_type : cmd_type),
    .color(ed_tw_req ? ed_tw_color : color),
    .a(ed_tw_req ? ed_tw_a : d_a[di]),
    .b(ed_tw_req ? ed_tw_b : d_b[di]),
    .busy(tw_busy), .wr(tw_wr), .wr_addr(tw_addr), .wr_data(tw_data));

  // ---------------- memory path ----------------
  logic        mem_req, mem_we;
  pos_t        mem_addr;
  logic [35:0] mem_in;
  color_t      disp_color;

  superplexer u_splex (.command, .snap_force_mem, .obj_type(act_type),
    .spt_rd, .spt_addr, .tw_wr, .tw_addr, .tw_data, .ed_rd, .ed_addr,
    .pix_valid(d_pix_valid), .pix_pos(d_pix_pos),
    .style(ed_busy ? ed_style : STY_NORMAL),
    .num(ed_busy ? ed_num : next_num),
    .color(ed_busy ? ed_color : color),
    .mem_req, .mem_we, .mem_addr, .mem_in, .disp_color);

  ram_interface #(.ADDR_W(FLUSH_AW)) u_ram (.clk, .rst, .flushing,
    .mem_req, .mem_we, .mem_addr, .mem_in, .disp_color, .rvalid, .mem_out,
    .sram_addr, .sram_we_b, .sram_wdata, .sram_oe, .sram_rdata, .fifo_wr, .fifo_din);

  assign busy = cmd_busy || snap_busy || tw_busy || ed_busy;

  wire unused = click_lvl ^ grid_busy ^ ed_pending ^ (^d_pending);
endmodule
