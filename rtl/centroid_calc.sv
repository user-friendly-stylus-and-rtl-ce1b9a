// centroid_calc: running sums of the passed pixel positions and their mean.
// While `acc_en` is high the current x and y are added to two sums; `clr`
// zeroes them. On `div_en` both sums are divided by the number of passed
// points and the quotients registered, so `cx`/`cy` are valid the cycle after
// `div_en`. `valid` tells whether any point passed (no division by zero: the
// quotients are then left unchanged). The document names an accumulator and a
// divider; the single-cycle divider matches its state diagram, which spends
// one state on the divide.
// Only the low bits of the quotients are kept: a mean coordinate cannot be
// larger than the largest coordinate summed, so the upper quotient bits are
// always zero and are left unused.
module centroid_calc #(
  parameter int unsigned XW = 10,
  parameter int unsigned YW = 9,
  parameter int unsigned CW = 19,
  parameter int unsigned SW = XW + CW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  input  logic          acc_en,
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  input  logic          div_en,
  input  logic [CW-1:0] n_passed,
  output logic [XW-1:0] cx,
  output logic [YW-1:0] cy,
  output logic          valid
);
  logic [SW-1:0] sum_x, sum_y;
  logic [SW-1:0] qx, qy;

  always_comb begin
    qx = sum_x / SW'(n_passed);
    qy = sum_y / SW'(n_passed);
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      sum_x <= '0;
      sum_y <= '0;
    end else if (acc_en) begin
      sum_x <= sum_x + SW'(x);
      sum_y <= sum_y + SW'(y);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cx <= '0; cy <= '0; valid <= 1'b0;
    end else if (div_en) begin
      valid <= (n_passed != '0);
      if (n_passed != '0) begin
        cx <= qx[XW-1:0];
        cy <= qy[YW-1:0];
      end
    end
  end
endmodule
