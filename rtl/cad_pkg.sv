// cad_pkg: types and constants shared by the stylus CAD system.
// A screen position doubles as a memory address: the upper 9 bits are the
// line (y) and the lower 10 bits the pixel in the line (x), so a 640x480
// screen fits a 19-bit address space. Colours are 9 bits, 3 each of R, G, B.
// The object-memory word layout and the command and mode encodings are this
// design's own choices; the bit widths of positions, colours, object numbers
// and memory words follow the system block diagrams.
// Compiled alone, some constants here look unused; they are used by the
// modules that import the package. BUTTON_H documents the toolbar layout.
package cad_pkg;
  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned TOOLBAR_W = 32;   // toolbar along the left edge
  localparam int unsigned BUTTON_H = 32;    // each toolbar button is 32 lines tall

  typedef struct packed {
    logic [8:0] y;
    logic [9:0] x;
  } pos_t;                                   // 19 bits

  typedef logic [8:0] color_t;               // {r[2:0], g[2:0], b[2:0]}

  typedef struct packed {
    pos_t   addr;
    color_t color;
  } pixel_info_t;                            // 28 bits, the FIFO word

  typedef enum logic [2:0] {
    OBJ_NONE = 3'd0, OBJ_POINT = 3'd1, OBJ_LINE = 3'd2,
    OBJ_RECT = 3'd3, OBJ_CIRCLE = 3'd4
  } obj_type_t;

  typedef enum logic [3:0] {
    CMD_NONE = 4'd0, CMD_POINT = 4'd1, CMD_LINE = 4'd2, CMD_RECT = 4'd3,
    CMD_CIRCLE = 4'd4, CMD_SELECT = 4'd5, CMD_DELETE = 4'd6, CMD_MOVE = 4'd7,
    CMD_COPY = 4'd8, CMD_RESIZE = 4'd9
  } command_t;

  typedef enum logic [3:0] {
    SNAP_NONE = 4'd0, SNAP_GRID = 4'd1, SNAP_POINT = 4'd2
  } mode_t;

  // Word stored at a pixel's address in object memory (36 bits).
  typedef struct packed {
    logic       occ;      // pixel belongs to an object
    obj_type_t  otype;
    logic [10:0] num;     // object number
    color_t     color;    // object's own colour
    logic [11:0] rsvd;
  } pix_word_t;

  // Word stored in the object table, one per control point (36 bits).
  typedef struct packed {
    logic       occ;
    obj_type_t  otype;
    color_t     color;
    logic [3:0] rsvd;
    pos_t       pos;
  } ctrl_word_t;

  // Object table lives in the off-screen part of the address space (x >= 768):
  // control point k of object n is at line n[8:0], pixel 768 + 2*n[10:9] + k.
  function automatic pos_t obj_table_addr(input logic [10:0] n, input logic k);
    pos_t a;
    a.y = n[8:0];
    a.x = {2'b11, 5'b0, n[10:9], k};
    return a;
  endfunction

  // How a drawing module's pixels are written: as the object itself, as the
  // object shown highlighted (memory unchanged, screen in the selection
  // colour), or erased (memory and screen cleared).
  typedef enum logic [1:0] {STY_NORMAL, STY_HILITE, STY_ERASE} style_t;

  localparam color_t SELECT_COLOR = 9'b111_111_000;   // yellow
endpackage
