// initialise_mod: colour of one toolbar pixel while the toolbar is copied
// from ROM to the frame memory.
// It picks bit `bit_sel` of the ROM word (bit_sel 0 is the word's leftmost
// pixel, bit 7) and, from the line number, the button the pixel belongs to;
// a 1 gives that button's foreground colour and a 0 the common background.
// This two-colour-per-line scheme is the document's; the colours are this
// design's choice: drawing tools white, edit tools cyan, snap and colour
// buttons green, on a dark grey background. Purely combinational.
// The low five bits of the line number are not needed: a button is 32 lines
// tall, so line[8:5] alone names it.
module initialise_mod
  import cad_pkg::*;
(
  input  logic [7:0] rom_data,
  input  logic [2:0] bit_sel,
  input  logic [8:0] line,
  output color_t     color
);
  localparam color_t BG = 9'b010_010_010;
  logic [3:0] button;
  logic       fg;
  color_t     fg_color;
  always_comb begin
    button = line[8:5];
    fg     = rom_data[3'd7 - bit_sel];
    if (button < 4'd4)      fg_color = 9'b111_111_111;
    else if (button < 4'd9) fg_color = 9'b000_111_111;
    else                    fg_color = 9'b000_111_000;
    color = fg ? fg_color : BG;
  end
endmodule
