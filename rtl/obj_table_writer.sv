// obj_table_writer: records an object's two control points in the object
// table (or clears them). A `req` starts two consecutive memory writes, one
// clock each: control point A to obj_table_addr(num, 0) and B to
// obj_table_addr(num, 1), as ctrl_word_t words holding the type, colour and
// position; with `erase` both words are written as zero. `busy` is high
// during the two writes. Inputs are sampled with `req`.
module obj_table_writer
  import cad_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic        erase,
  input  logic [10:0] num,
  input  obj_type_t   otype,
  input  color_t      color,
  input  pos_t        a,
  input  pos_t        b,
  output logic        busy,
  output logic        wr,
  output pos_t        wr_addr,
  output logic [35:0] wr_data
);
  logic        second, er_q;
  logic [10:0] num_q;
  obj_type_t   type_q;
  color_t      color_q;
  pos_t        a_q, b_q;
  ctrl_word_t  w;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; second <= 1'b0; er_q <= 1'b0; num_q <= '0;
      type_q <= OBJ_NONE; color_q <= '0; a_q <= '0; b_q <= '0;
    end else if (!busy) begin
      if (req) begin
        busy <= 1'b1; second <= 1'b0; er_q <= erase; num_q <= num;
        type_q <= otype; color_q <= color; a_q <= a; b_q <= b;
      end
    end else begin
      second <= 1'b1;
      if (second) busy <= 1'b0;
    end
  end

  always_comb begin
    w = '{occ: 1'b1, otype: type_q, color: color_q, rsvd: '0, pos: second ? b_q : a_q};
    wr      = busy;
    wr_addr = obj_table_addr(num_q, second);
    wr_data = er_q ? '0 : w;
  end
endmodule
