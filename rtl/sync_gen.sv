// sync_gen: VGA timing for 640x480 at 60 Hz with a 25 MHz pixel clock, plus
// the counters that sweep the 32-pixel-wide toolbar once after start-up.
// Main counters: pixel_count runs 0..H_TOTAL-1 and line_count 0..V_TOTAL-1.
// `blank` is high outside the 640x480 active area, `vblank` below line 480.
// `hsync`/`vsync` are high during the sync pulse, which follows the active
// area and the front porch. Toolbar counters: after `sync_start`,
// rom_pixel_count counts 0..31 on every clock and rom_line_count advances
// each time it wraps; when the last of 480 lines is done `rom_vblank` goes high
// and stays high until the next `sync_start`. All outputs are registered.
// The porch and sync lengths are the standard VESA numbers for this mode (the
// document gives only the resolution, refresh rate and pixel clock).
module sync_gen #(
  parameter int unsigned H_ACTIVE = 640, parameter int unsigned H_FP = 16,
  parameter int unsigned H_SYNC = 96,    parameter int unsigned H_BP = 48,
  parameter int unsigned V_ACTIVE = 480, parameter int unsigned V_FP = 10,
  parameter int unsigned V_SYNC = 2,     parameter int unsigned V_BP = 33,
  parameter int unsigned ROM_W = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       sync_start,
  output logic [9:0] pixel_count,
  output logic [9:0] line_count,
  output logic       blank, hsync, vsync, vblank,
  output logic [4:0] rom_pixel_count,
  output logic [8:0] rom_line_count,
  output logic       rom_vblank
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [9:0] px_n, ln_n;
  always_comb begin
    px_n = pixel_count + 10'd1;
    ln_n = line_count;
    if (pixel_count == 10'(H_TOTAL - 1)) begin
      px_n = '0;
      ln_n = (line_count == 10'(V_TOTAL - 1)) ? '0 : line_count + 10'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || sync_start) begin
      pixel_count <= '0; line_count <= '0;
      blank <= 1'b0; hsync <= 1'b0; vsync <= 1'b0; vblank <= 1'b0;
    end else begin
      pixel_count <= px_n;
      line_count  <= ln_n;
      blank  <= (px_n >= 10'(H_ACTIVE)) || (ln_n >= 10'(V_ACTIVE));
      vblank <= (ln_n >= 10'(V_ACTIVE));
      hsync  <= (px_n >= 10'(H_ACTIVE + H_FP)) && (px_n < 10'(H_ACTIVE + H_FP + H_SYNC));
      vsync  <= (ln_n >= 10'(V_ACTIVE + V_FP)) && (ln_n < 10'(V_ACTIVE + V_FP + V_SYNC));
    end
  end

  always_ff @(posedge clk) begin
    if (rst || sync_start) begin
      rom_pixel_count <= '0; rom_line_count <= '0; rom_vblank <= 1'b0;
    end else if (!rom_vblank) begin
      rom_pixel_count <= rom_pixel_count + 5'd1;
      if (rom_pixel_count == 5'(ROM_W - 1)) begin
        if (rom_line_count == 9'(V_ACTIVE - 1)) rom_vblank <= 1'b1;
        else rom_line_count <= rom_line_count + 9'd1;
      end
    end
  end
endmodule
