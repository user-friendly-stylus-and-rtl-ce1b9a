// Testbench for command_handler with stand-in command modules that stay
// busy for a random time after `next`: checks that a drawing click reaches
// only the module of the current command, that clicks are dropped while the
// target or the memory path is busy, and that a command change cancels.
module tb_command_handler;
  import cad_pkg::*;
  logic clk = 0, rst = 1, cmd_changed = 0, draw_click = 0, path_busy = 0, cancel, busy;
  command_t command;
  pos_t draw_pos, next_pos;
  logic [4:0] mod_busy, next;
  int bcnt [5];
  int nnext [5];
  int checks = 0, failures = 0, n_cancel = 0;
  always #5 clk = ~clk;
  command_handler dut (.clk, .rst, .command, .cmd_changed, .draw_click, .draw_pos, .mod_busy,
    .path_busy, .next, .next_pos, .cancel, .busy);
  always @(posedge clk) begin
    if (cancel) n_cancel++;
    for (int i = 0; i < 5; i++) begin
      if (next[i]) begin
        nnext[i]++;
        bcnt[i] = $urandom_range(0, 8);
        if (next_pos != draw_pos) begin failures++; $display("FAIL next_pos"); end
      end else if (bcnt[i] > 0) bcnt[i]--;
    end
  end
  always_comb for (int i = 0; i < 5; i++) mod_busy[i] = (bcnt[i] > 0);
  function automatic int target(input command_t c);
    case (c)
      CMD_POINT: return 0; CMD_LINE: return 1; CMD_RECT: return 2; CMD_CIRCLE: return 3;
      CMD_NONE: return -1;
      default: return 4;
    endcase
  endfunction
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (bcnt[i]) begin bcnt[i] = 0; nnext[i] = 0; end
    command = CMD_NONE; draw_pos = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 1500; i++) begin
      int n0 [5];
      int t;
      logic accept;
      if ($urandom_range(0, 4) == 0) begin
        int c0;
        c0 = n_cancel;
        command = command_t'($urandom_range(0, 9)); cmd_changed = 1;
        @(negedge clk); cmd_changed = 0; @(negedge clk);
        checks++; if (n_cancel != c0 + 1) begin failures++; $display("FAIL cancel"); end
      end
      path_busy = ($urandom_range(0, 5) == 0);
      n0 = nnext;
      t = target(command);
      accept = (t >= 0) && !busy && !path_busy && (bcnt[t] == 0);
      draw_pos = '{y: 9'($urandom), x: 10'($urandom)};
      draw_click = 1; @(negedge clk); draw_click = 0; path_busy = 0;
      @(negedge clk);
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (nnext[k] - n0[k] != ((k == t && accept) ? 1 : 0)) begin
          failures++; if (failures < 10) $display("FAIL module %0d cmd %0d got %0d", k, command, nnext[k] - n0[k]);
        end
      end
      repeat ($urandom_range(0, 12)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
