// tb_tsg_coder: both lanes of the TSG coder code independent symbol streams
// at the same time (BS = 16 to get many blocks), with random gaps on the
// inputs and random stalls on the byte outputs. Each lane's byte stream is
// compared with the reference lane model (block reversal, subsymbols, tANS
// with the shared tables, packing, byte reversal), including blk_end and
// img_end. Escapes, multi-block images and short last blocks are counted.
module tb_tsg_coder;
  import loco_ans_pkg::*;
  import loco_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  localparam int BS = 16;
  logic cfg_tans_we, cfg_is_y, cfg_c_we; logic [P_BITS-1:0] cfg_tbl; logic [ZSYM_BITS-1:0] cfg_sym;
  logic [STATE_BITS-1:0] cfg_state; tans_entry_t cfg_entry;
  logic [THETA_BITS-1:0] cfg_theta; logic [LOG2C_BITS-1:0] cfg_log2c;
  tsg_sym_t sym_data [2]; logic [1:0] sym_valid, sym_ready;
  obyte_t byte_data [2]; logic [1:0] byte_valid, byte_ready;
  int checks = 0, failures = 0;
  int exp_b [2][$];
  int exp_end [2][$];
  int tot_blk = 0, tot_esc = 0, short_last = 0;

  tsg_coder #(.BS(BS), .OS_DEPTH(256)) dut (.clk, .rst_n,
    .cfg_tans_we, .cfg_is_y, .cfg_tbl, .cfg_sym, .cfg_state, .cfg_entry,
    .cfg_c_we, .cfg_theta, .cfg_log2c, .sym_data, .sym_valid, .sym_ready,
    .byte_data, .byte_valid, .byte_ready);

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar l = 0; l < 2; l++) begin : g_chk
    always @(posedge clk) begin
      if (byte_valid[l] && byte_ready[l]) begin
        checks++;
        if (exp_b[l].size() == 0 || int'(byte_data[l].data) != exp_b[l][0] ||
            {byte_data[l].blk_end, byte_data[l].img_end} != 2'(exp_end[l][0])) begin
          failures++;
          if (failures < 10) $display("lane %0d got %p exp %0d/%0d", l, byte_data[l],
                                      exp_b[l].size() ? exp_b[l][0] : -1, exp_end[l].size() ? exp_end[l][0] : -1);
        end
        if (exp_b[l].size()) begin void'(exp_b[l].pop_front()); void'(exp_end[l].pop_front()); end
      end
    end
    always @(negedge clk) byte_ready[l] <= ($urandom_range(0, 3) != 0);
  end

  function automatic tsg_sym_t rnd();
    tsg_sym_t s;
    s.theta_q = THETA_BITS'($urandom_range(0, 14));
    s.p_q = P_BITS'($urandom_range(0, 31));
    s.y = 1'($urandom);
    s.z = ($urandom_range(0, 9) == 0) ? Z_BITS'($urandom) : Z_BITS'($urandom_range(0, 3) << (s.theta_q / 4));
    s.last = 0;
    return s;
  endfunction

  task automatic lane_image(input int l, input int n);
    tsg_sym_t q [$];
    int by [$], nb, ne, ns;
    for (int i = 0; i < n; i++) begin
      tsg_sym_t s;
      s = rnd(); s.last = (i == n - 1);
      q.push_back(s);
    end
    code_lane(q, BS, 7, by, nb, ne, ns);
    tot_blk += nb; tot_esc += ne;
    if (n % BS != 0 && n > BS) short_last++;
    // byte flags: blk_end on the last byte of each block, img_end on the last byte
    begin
      int pos;
      tsg_sym_t blk [$];
      pos = 0;
      for (int i = 0; i < n; i++) begin
        blk.push_front(q[i]);
        if (blk.size() == BS || q[i].last) begin
          int cb [$], cl [$], bb [$];
          code_block(blk, 7, cb, cl);
          pack(cb, cl, bb);
          for (int j = 0; j < bb.size(); j++) begin
            exp_b[l].push_back(by[pos + j]);
            exp_end[l].push_back((j == bb.size() - 1) ? (q[i].last ? 3 : 2) : 0);
          end
          pos += bb.size();
          blk = {};
        end
      end
    end
    foreach (q[i]) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin sym_valid[l] = 0; @(negedge clk); end
      sym_valid[l] = 1; sym_data[l] = q[i];
      @(posedge clk);
      while (!sym_ready[l]) @(posedge clk);
    end
    @(negedge clk); sym_valid[l] = 0;
  endtask

  initial begin
    cfg_tans_we = 0; cfg_c_we = 0; sym_valid = 0; sym_data[0] = '0; sym_data[1] = '0;
    build_tables();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 15; t++) begin
      for (int s = 0; s < 16; s++) for (int x = 0; x < 64; x++) begin
        @(negedge clk); cfg_tans_we = 1; cfg_is_y = 0; cfg_tbl = P_BITS'(t); cfg_sym = ZSYM_BITS'(s);
        cfg_state = STATE_BITS'(x); cfg_entry = zt[t][s][x];
      end
      cfg_c_we = 1; cfg_theta = THETA_BITS'(t); cfg_log2c = LOG2C_BITS'(log2c[t]);
    end
    @(negedge clk); cfg_c_we = 0;
    for (int t = 0; t < 32; t++) for (int s = 0; s < 2; s++) for (int x = 0; x < 64; x++) begin
      @(negedge clk); cfg_tans_we = 1; cfg_is_y = 1; cfg_tbl = P_BITS'(t); cfg_sym = ZSYM_BITS'(s);
      cfg_state = STATE_BITS'(x); cfg_entry = yt[t][s][x];
    end
    @(negedge clk); cfg_tans_we = 0;
    fork
      begin lane_image(0, 100); lane_image(0, 16); lane_image(0, 7); lane_image(0, 333); end
      begin lane_image(1, 250); lane_image(1, 1); lane_image(1, 48); lane_image(1, 200); end
    join
    repeat (3000) @(negedge clk);
    for (int l = 0; l < 2; l++) begin
      checks++;
      if (exp_b[l].size() != 0) begin failures++; $display("lane %0d: %0d bytes missing", l, exp_b[l].size()); end
    end
    checks++;
    if (tot_esc == 0 || short_last == 0) begin failures++; $display("escape or short block not exercised"); end
    $display("blocks %0d escapes %0d short last blocks %0d", tot_blk, tot_esc, short_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
