// Testbench for superplexer: random inputs every step; the output is checked
// against the priority rules (snap read, table write, edit read, drawn
// pixel), the drawing-area clip and the three write styles.
module tb_superplexer;
  import cad_pkg::*;
  command_t command; logic snap_force_mem; obj_type_t obj_type;
  logic spt_rd, tw_wr, ed_rd; pos_t spt_addr, tw_addr, ed_addr;
  logic [35:0] tw_data; logic [3:0] pix_valid; pos_t pix_pos [4];
  style_t style; logic [10:0] num; color_t color;
  logic mem_req, mem_we; pos_t mem_addr; logic [35:0] mem_in; color_t disp_color;
  int checks = 0, failures = 0;
  int hits [5];
  superplexer dut (.*);
  task automatic chk(input logic c, input string m);
    checks++; if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask
  initial begin
    #10000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 50000; i++) begin
      logic er, pv, area; pos_t pp; pix_word_t w;
      command = command_t'($urandom_range(0, 9));
      snap_force_mem = 1'($urandom); obj_type = obj_type_t'($urandom_range(0, 4));
      spt_rd = ($urandom_range(0, 3) == 0); tw_wr = ($urandom_range(0, 3) == 0);
      ed_rd = 1'($urandom); pix_valid = 4'($urandom);
      spt_addr = 19'($urandom); tw_addr = 19'($urandom); ed_addr = 19'($urandom);
      tw_data = {4'($urandom), 32'($urandom)};
      for (int k = 0; k < 4; k++)
        pix_pos[k] = ($urandom_range(0, 3) == 0) ? pos_t'(19'($urandom))
                     : '{y: 9'($urandom_range(0, 479)), x: 10'($urandom_range(0, 639))};
      style = style_t'($urandom_range(0, 2)); num = 11'($urandom); color = 9'($urandom);
      #1;
      er = command inside {CMD_SELECT, CMD_DELETE, CMD_MOVE, CMD_COPY, CMD_RESIZE};
      pv = obj_type != OBJ_NONE && pix_valid[int'(obj_type) - 1];
      pp = (obj_type != OBJ_NONE) ? pix_pos[int'(obj_type) - 1] : '0;
      area = pp.x >= 32 && pp.x < 640 && pp.y < 480;
      w = '{occ: 1'b1, otype: obj_type, num: num, color: color, rsvd: '0};
      if (snap_force_mem && spt_rd) begin
        hits[0]++; chk(mem_req && !mem_we && mem_addr == spt_addr, "snap read");
      end else if (tw_wr) begin
        hits[1]++; chk(mem_req && mem_we && mem_addr == tw_addr && mem_in == tw_data, "table write");
      end else if (er && ed_rd) begin
        hits[2]++; chk(mem_req && !mem_we && mem_addr == ed_addr, "edit read");
      end else if (pv && area) begin
        hits[3]++;
        chk(mem_req && mem_we && mem_addr == pp, "pixel write");
        case (style)
          STY_NORMAL: chk(mem_in == 36'(w) && disp_color == color, "normal style");
          STY_HILITE: chk(mem_in == 36'(w) && disp_color == SELECT_COLOR, "highlight style");
          default:    chk(mem_in == '0 && disp_color == '0, "erase style");
        endcase
      end else begin
        hits[4]++; chk(!mem_req && !mem_we, "no access");
      end
    end
    foreach (hits[k]) chk(hits[k] > 100, "every priority case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
