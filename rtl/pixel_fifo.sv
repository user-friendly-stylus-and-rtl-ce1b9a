// pixel_fifo: synchronous first-word-fall-through FIFO between the CAD
// command side (writer) and the video output (reader).
// Each word is a changed pixel: {19-bit address, 9-bit colour}. `dout` shows
// the oldest word whenever `empty` is low; `rd_en` removes it. The writer does
// not look at `full` (the document's command side ignores it), so a write into
// a full FIFO is dropped and `overflow` is set until reset.
// Depth 1024 is the document's.
module pixel_fifo #(
  parameter int unsigned WIDTH = 28,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  assign dout  = mem[rp];
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));

  a_no_read_empty: assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty);
endmodule
