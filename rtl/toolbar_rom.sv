// toolbar_rom: bitmap of the toolbar, 480 lines of 32 one-bit pixels.
// Each line is stored as four 8-bit words; the address is {line[8:0],
// word[1:0]} and bit 7 of a word is its leftmost pixel. A 1 is foreground.
// The read is synchronous: `data` is valid the cycle after `addr`.
// The layout follows the document (32 pixels wide on the left edge, four
// 8-bit words per line, 11-bit address, 8-bit data); the pictures are this
// design's own, computed when the memory is initialised rather than read from
// a file: the toolbar is 15 buttons of 32x32 pixels, each with a one-pixel
// frame and a glyph. Buttons 0-3 show a dot, a diagonal line, a square and a
// ring (point, line, rectangle, circle); buttons 4 and up show 1..11 short
// horizontal bars, one more per button.
module toolbar_rom (
  input  logic        clk,
  input  logic [10:0] addr,
  output logic [7:0]  data
);
  logic [7:0] mem [2048];

  function automatic logic pixel_on(input int line, input int col);
    int b, r, c, d2;
    b = line / 32;
    r = line % 32;
    c = col;
    if (line >= 480) return 1'b0;
    if (r == 0 || r == 31 || c == 0 || c == 31) return 1'b1;
    d2 = (2*r - 31) * (2*r - 31) + (2*c - 31) * (2*c - 31);
    case (b)
      0: return (r >= 14 && r <= 17 && c >= 14 && c <= 17);
      1: return (r == c && r >= 6 && r <= 25);
      2: return ((r == 8 || r == 23) && c >= 8 && c <= 23) ||
                ((c == 8 || c == 23) && r >= 8 && r <= 23);
      3: return (d2 >= 196 && d2 <= 256);
      default: return (c >= 10 && c <= 21 && r >= 4 && (r - 4) % 2 == 0 && (r - 4) / 2 < b - 3);
    endcase
  endfunction

  initial begin
    for (int a = 0; a < 2048; a++)
      for (int k = 0; k < 8; k++)
        mem[a][7-k] = pixel_on(a / 4, (a % 4) * 8 + k);
  end

  always_ff @(posedge clk) data <= mem[addr];
endmodule
