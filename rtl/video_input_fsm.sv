// video_input_fsm: the controller of the stylus detector (one frame per pass).
// States and actions follow the document's state diagram: after IDLE it waits
// for pass pulses; each pass goes through STORE_PASS, which counts the point
// and enables the accumulator; at frame done it goes to DIVIDE, then
// REGISTER_OUTPUT (output register load enable) and RESET (clear the count and
// the sums), and back to waiting. Two choices are this design's own: frame
// done is also accepted while waiting, not only straight after a pass, and all
// outputs are registered, so `acc_en` is high the cycle after STORE_PASS. With
// the comparator's two stages this puts `acc_en` four cycles after the
// handler's strobe, which is why the position is delayed by four cycles.
module video_input_fsm #(
  parameter int unsigned CW = 19
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          pass,
  input  logic          frame_done,
  output logic          acc_en,
  output logic          div_en,
  output logic          out_le,
  output logic          clr,
  output logic [CW-1:0] n_passed
);
  typedef enum logic [2:0] {
    S_IDLE, S_WAIT, S_STORE, S_DIVIDE, S_REGOUT, S_RESET
  } state_t;
  state_t state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:   state_n = S_WAIT;
      S_WAIT:   if (frame_done) state_n = S_DIVIDE;
                else if (pass) state_n = S_STORE;
      S_STORE:  state_n = frame_done ? S_DIVIDE : S_WAIT;
      S_DIVIDE: state_n = S_REGOUT;
      S_REGOUT: state_n = S_RESET;
      S_RESET:  state_n = S_WAIT;
      default:  state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      {acc_en, div_en, out_le} <= '0;
      clr <= 1'b1;
      n_passed <= '0;
    end else begin
      state  <= state_n;
      acc_en <= (state == S_STORE);
      div_en <= (state == S_DIVIDE);
      out_le <= (state == S_REGOUT);
      clr    <= (state == S_RESET);
      if (state == S_RESET) n_passed <= '0;
      else if (state == S_STORE) n_passed <= n_passed + 1'b1;
    end
  end
endmodule
