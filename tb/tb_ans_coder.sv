// tb_ans_coder: an ans_coder reads valid tANS tables from a tans_rom (loaded
// with the reference tables). Random blocks of y, z and bypass subsymbols go
// in with random stalls on both sides; every code (bits and length) and the
// final-state code at each block end are compared with a reference tANS
// encoder. Without stalls it checks one subsymbol per cycle.
module tb_ans_coder;
  import loco_ans_pkg::*;
  import loco_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  subsym_t in_data; logic in_valid, in_ready;
  code_t out_data; logic out_valid, out_ready;
  logic rom_en, rom_is_y; logic [P_BITS-1:0] rom_tbl; logic [ZSYM_BITS-1:0] rom_sym;
  logic [STATE_BITS-1:0] rom_state; tans_entry_t rom_q, unused_q;
  logic cfg_we, cfg_is_y; logic [P_BITS-1:0] cfg_tbl; logic [ZSYM_BITS-1:0] cfg_sym;
  logic [STATE_BITS-1:0] cfg_state; tans_entry_t cfg_entry;
  int checks = 0, failures = 0;
  code_t exp_q [$];
  bit stalls = 0;
  int st_model = 0;

  tans_rom u_rom (.clk, .cfg_we, .cfg_is_y, .cfg_tbl, .cfg_sym, .cfg_state, .cfg_entry,
    .a_en(rom_en), .a_is_y(rom_is_y), .a_tbl(rom_tbl), .a_sym(rom_sym), .a_state(rom_state), .a_q(rom_q),
    .b_en(1'b0), .b_is_y(1'b0), .b_tbl('0), .b_sym('0), .b_state('0), .b_q(unused_q));

  ans_coder dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready,
    .rom_en, .rom_is_y, .rom_tbl, .rom_sym, .rom_state, .rom_q);

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("got %p exp %p", out_data, exp_q.size() ? exp_q[0] : '0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end
  always @(negedge clk) out_ready <= stalls ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic send(input subsym_t s);
    code_t e;
    e = '0; e.img_end = s.img_end;
    if (s.kind == SS_BYPASS) begin
      e.bits = CODE_BITS'(s.value); e.len = CODE_LEN_W'(8);
    end else begin
      tans_entry_t t;
      t = (s.kind == SS_Y) ? yt[s.tbl][s.value[0]][st_model] : zt[s.tbl][s.value][st_model];
      e.bits = CODE_BITS'(st_model & ((1 << int'(t.nbits)) - 1)); e.len = CODE_LEN_W'(t.nbits);
      st_model = int'(t.next);
    end
    exp_q.push_back(e);
    if (s.blk_end) begin
      e.bits = CODE_BITS'(st_model); e.len = CODE_LEN_W'(STATE_BITS); e.blk_end = 1;
      exp_q.push_back(e);
      st_model = 0;
    end
    @(negedge clk);
    while (stalls && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_data = s;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  function automatic subsym_t rnd(input bit last);
    subsym_t s;
    s = '0;
    case ($urandom_range(0, 4))
      0, 1: begin s.kind = SS_Y; s.value = Z_BITS'($urandom_range(0, 1)); s.tbl = P_BITS'($urandom_range(0, 31)); end
      2, 3: begin
        int t;
        t = $urandom_range(0, 14);
        s.kind = SS_Z; s.tbl = P_BITS'(t); s.value = Z_BITS'($urandom_range(0, 1 << log2c[t]));
      end
      default: begin s.kind = SS_BYPASS; s.value = Z_BITS'($urandom); end
    endcase
    s.blk_end = last; s.img_end = 1'($urandom);
    return s;
  endfunction

  int busy_cycles = 0, cnt_cycles = 0;
  initial begin
    int t0, t1;
    cfg_we = 0; in_valid = 0; in_data = '0;
    build_tables();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 15; t++) for (int s = 0; s < 16; s++) for (int x = 0; x < 64; x++) begin
      @(negedge clk); cfg_we = 1; cfg_is_y = 0; cfg_tbl = P_BITS'(t); cfg_sym = ZSYM_BITS'(s);
      cfg_state = STATE_BITS'(x); cfg_entry = zt[t][s][x];
    end
    for (int t = 0; t < 32; t++) for (int s = 0; s < 2; s++) for (int x = 0; x < 64; x++) begin
      @(negedge clk); cfg_we = 1; cfg_is_y = 1; cfg_tbl = P_BITS'(t); cfg_sym = ZSYM_BITS'(s);
      cfg_state = STATE_BITS'(x); cfg_entry = yt[t][s][x];
    end
    @(negedge clk); cfg_we = 0;
    // throughput: 200 subsymbols in one block, no stalls -> 200 + 1 cycles
    t0 = int'($time / 10);
    for (int i = 0; i < 200; i++) send(rnd(i == 199));
    t1 = int'($time / 10);
    checks++;
    if (t1 - t0 > 200 + 2) begin failures++; $display("200 subsymbols took %0d cycles", t1 - t0); end
    stalls = 1;
    for (int b = 0; b < 60; b++) begin
      int n;
      n = $urandom_range(1, 60);
      for (int i = 0; i < n; i++) send(rnd(i == n - 1));
    end
    @(negedge clk); in_valid = 0; stalls = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d codes missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
