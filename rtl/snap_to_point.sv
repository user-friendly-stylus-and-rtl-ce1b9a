// snap_to_point: moves a position onto the nearest pixel of a drawn object.
// The search pattern is every offset (dx, dy) with dx^2 + dy^2 <= 56, i.e. a
// disc reaching 7 pixels from the centre: 177 offsets, which is the size the
// document gives. They are held in an internal ROM ordered nearest first
// (by dx^2 + dy^2, then dy, then dx); the ROM is filled when the memory is
// initialised. After `next` one read of object memory is issued per clock
// (offsets that fall outside the screen are skipped), so the memory's read
// latency is hidden: responses return in order and are matched to offsets
// with a counter. The first response whose word is occupied gives
// `snap_pos`; if none is, `snap_pos` is the input position. `done` pulses
// when all issued reads have returned; `busy` is high from `next` to `done`.
// Memory port: rd_req/rd_addr out, one request per clock, rvalid/rdata in.
// Only the occupied bit (bit 35) of each memory word is needed; the rest of
// the word is left unused.
module snap_to_point
  import cad_pkg::*;
#(
  parameter int unsigned N_PTS = 177,
  parameter int unsigned R2_MAX = 56
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        next,
  input  pos_t        pos,
  output logic        busy,
  output logic        done,
  output pos_t        snap_pos,
  output logic        rd_req,
  output pos_t        rd_addr,
  input  logic        rvalid,
  input  logic [35:0] rdata
);
  typedef struct packed { logic signed [4:0] dx, dy; } ofs_t;
  ofs_t pattern [N_PTS];

  initial begin
    int k;
    k = 0;
    for (int d2 = 0; d2 <= int'(R2_MAX); d2++)
      for (int dy = -7; dy <= 7; dy++)
        for (int dx = -7; dx <= 7; dx++)
          if (dx * dx + dy * dy == d2 && k < int'(N_PTS)) begin
            pattern[k] = '{dx: 5'(dx), dy: 5'(dy)};
            k++;
          end
  end

  localparam int unsigned IW = $clog2(N_PTS + 1);
  localparam int unsigned QD = 8;             // in-flight reads remembered
  logic [IW-1:0] issue_idx;
  logic          found;
  pos_t          centre;
  ofs_t          o_iss;
  logic signed [11:0] ax, ay;
  logic          in_screen;
  pos_t          q [QD];                      // addresses of reads in flight
  logic [2:0]    q_wr, q_rd;
  logic [3:0]    outstanding;

  always_comb begin
    o_iss = pattern[issue_idx < IW'(N_PTS) ? issue_idx : '0];
    ax = $signed({2'b0, centre.x}) + 12'(o_iss.dx);
    ay = $signed({3'b0, centre.y}) + 12'(o_iss.dy);
    in_screen = ax >= 0 && ax < 12'(H_ACTIVE) && ay >= 0 && ay < 12'(V_ACTIVE);
    rd_req  = busy && !found && issue_idx < IW'(N_PTS) && in_screen &&
              outstanding < 4'(QD - 1);
    rd_addr = '{y: ay[8:0], x: ax[9:0]};
  end

  always_ff @(posedge clk) begin
    if (rd_req) q[q_wr] <= rd_addr;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; found <= 1'b0;
      issue_idx <= '0; centre <= '0; snap_pos <= '0;
      q_wr <= '0; q_rd <= '0; outstanding <= '0;
    end else begin
      done <= 1'b0;
      if (rd_req) q_wr <= q_wr + 3'd1;
      if (rvalid) q_rd <= q_rd + 3'd1;
      outstanding <= outstanding + 4'(rd_req) - 4'(rvalid);
      if (!busy) begin
        if (next) begin
          busy <= 1'b1; found <= 1'b0; issue_idx <= '0;
          centre <= pos; snap_pos <= pos;
        end
      end else begin
        // advance past an offset once it is issued or found to be off screen
        if (!found && issue_idx < IW'(N_PTS) && (rd_req || !in_screen))
          issue_idx <= issue_idx + 1'b1;
        if (rvalid && !found && rdata[35]) begin
          found <= 1'b1;
          snap_pos <= q[q_rd];
        end
        if ((found || issue_idx == IW'(N_PTS)) && outstanding + 4'(rd_req) == 4'(rvalid)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
