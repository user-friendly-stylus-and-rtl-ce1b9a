// isqrt: integer square root, floor(sqrt(radicand)), one result bit per clock.
// Digit-by-digit (restoring) method: two radicand bits are brought down each
// clock and a trial subtraction decides the next root bit, so a W-bit
// radicand takes W/2 clocks after `start` before `done` pulses with `root`.
// The document names a custom square-root module after another author's
// method without describing it; this is the simplest sequential
// square root that gives the radius the circle needs.
// The top bits of the remainder register never matter to the result and
// are left unused.
module isqrt #(
  parameter int unsigned W = 20
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [W-1:0]   radicand,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  localparam int unsigned N = W / 2;
  logic [W-1:0]   rad;
  logic [N+1:0]   rem;
  logic [$clog2(N+1)-1:0] cnt;
  logic [N+1:0]   trial, rem_sh;

  always_comb begin
    rem_sh = {rem[N-1:0], rad[W-1:W-2]};
    trial  = {root, 2'b01};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; rad <= '0; rem <= '0; root <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; rad <= radicand; rem <= '0; root <= '0; cnt <= '0;
      end else if (busy) begin
        rad <= rad << 2;
        if (rem_sh >= trial) begin
          rem  <= rem_sh - trial;
          root <= {root[N-2:0], 1'b1};
        end else begin
          rem  <= rem_sh;
          root <= {root[N-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(N+1))'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
