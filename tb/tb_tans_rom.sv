// tb_tans_rom: writes random entries into both table memories through the
// configuration port, then reads them back on both ports at once with random
// addresses and enables. Checks the one-cycle read latency and that a port
// holds its output while its enable is low.
module tb_tans_rom;
  import loco_ans_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic cfg_we, cfg_is_y; logic [P_BITS-1:0] cfg_tbl; logic [ZSYM_BITS-1:0] cfg_sym;
  logic [STATE_BITS-1:0] cfg_state; tans_entry_t cfg_entry;
  logic a_en, a_is_y, b_en, b_is_y;
  logic [P_BITS-1:0] a_tbl, b_tbl; logic [ZSYM_BITS-1:0] a_sym, b_sym;
  logic [STATE_BITS-1:0] a_state, b_state; tans_entry_t a_q, b_q;
  int checks = 0, failures = 0;
  tans_entry_t zm [15][16][64];
  tans_entry_t ym [32][2][64];

  tans_rom dut (.clk, .cfg_we, .cfg_is_y, .cfg_tbl, .cfg_sym, .cfg_state, .cfg_entry,
    .a_en, .a_is_y, .a_tbl, .a_sym, .a_state, .a_q,
    .b_en, .b_is_y, .b_tbl, .b_sym, .b_state, .b_q);

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic tans_entry_t model(input bit is_y, input int t, input int s, input int st);
    return is_y ? ym[t][s & 1][st] : zm[t][s][st];
  endfunction

  initial begin
    tans_entry_t ea, eb;
    cfg_we = 0; a_en = 0; b_en = 0;
    @(negedge clk);
    for (int t = 0; t < 15; t++) for (int s = 0; s < 16; s++) for (int st = 0; st < 64; st++) begin
      zm[t][s][st] = tans_entry_t'($urandom);
      cfg_we = 1; cfg_is_y = 0; cfg_tbl = P_BITS'(t); cfg_sym = ZSYM_BITS'(s);
      cfg_state = STATE_BITS'(st); cfg_entry = zm[t][s][st];
      @(negedge clk);
    end
    for (int t = 0; t < 32; t++) for (int s = 0; s < 2; s++) for (int st = 0; st < 64; st++) begin
      ym[t][s][st] = tans_entry_t'($urandom);
      cfg_we = 1; cfg_is_y = 1; cfg_tbl = P_BITS'(t); cfg_sym = ZSYM_BITS'(s);
      cfg_state = STATE_BITS'(st); cfg_entry = ym[t][s][st];
      @(negedge clk);
    end
    cfg_we = 0;
    ea = a_q; eb = b_q;
    for (int i = 0; i < 4000; i++) begin
      bit ya, yb;
      ya = 1'($urandom); yb = 1'($urandom);
      a_en = 1'($urandom_range(0, 3) != 0); b_en = 1'($urandom_range(0, 3) != 0);
      a_is_y = ya; b_is_y = yb;
      a_tbl = P_BITS'(ya ? $urandom_range(0, 31) : $urandom_range(0, 14));
      b_tbl = P_BITS'(yb ? $urandom_range(0, 31) : $urandom_range(0, 14));
      a_sym = ZSYM_BITS'($urandom); b_sym = ZSYM_BITS'($urandom);
      a_state = STATE_BITS'($urandom); b_state = STATE_BITS'($urandom);
      if (a_en) ea = model(ya, int'(a_tbl), int'(a_sym), int'(a_state));
      if (b_en) eb = model(yb, int'(b_tbl), int'(b_sym), int'(b_state));
      @(negedge clk);
      checks += 2;
      if (a_q !== ea) begin failures++; if (failures < 10) $display("port A got %p exp %p", a_q, ea); end
      if (b_q !== eb) begin failures++; if (failures < 10) $display("port B got %p exp %p", b_q, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
