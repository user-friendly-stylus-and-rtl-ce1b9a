// Testbench for initialise_mod: random ROM words, bit selects and lines;
// the expected colour is worked out here from the button (line / 32) and
// the selected bit (bit_sel 0 = MSB).
module tb_initialise_mod;
  import cad_pkg::*;
  logic [7:0] rom_data;
  logic [2:0] bit_sel;
  logic [8:0] line;
  color_t color, exp_c;
  int checks = 0, failures = 0;
  initialise_mod dut (.rom_data, .bit_sel, .line, .color);
  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      int b;
      rom_data = 8'($urandom); bit_sel = 3'($urandom); line = 9'($urandom_range(0, 479));
      #1;
      b = line / 32;
      if (rom_data & (8'h80 >> bit_sel))
        exp_c = (b < 4) ? 9'o777 : (b < 9) ? 9'o077 : 9'o070;
      else exp_c = 9'o222;
      checks++;
      if (color !== exp_c) begin failures++; if (failures < 10) $display("FAIL %o exp %o", color, exp_c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
