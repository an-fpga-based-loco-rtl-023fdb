// tb_loco_ans_encoder: end-to-end test of the two-lane encoder at its default
// parameters (8192-pixel rows, 2048-symbol blocks, NI = 7, 6-bit tANS state).
// The pixel clock runs at 12 ns and the coder clock at 5.5 ns, close to the
// 81 / 180 MHz pair of the low-end FPGA implementation.
//
// Lane 0 compresses a 64x40 smooth image losslessly (2559 symbols: one full
// 2048-symbol block and a short one), then a 48x20 image with NEAR = 2. Lane
// 1 compresses a 40x60 noisy image with NEAR = 1, which makes the coder the
// bottleneck and fills the clock-crossing FIFO. Both lanes run at once with
// random pixel gaps and random output stalls. Every output byte (with its
// block and image flags) is compared with the reference chain: equation-level
// decorrelator, St quantizer, block reversal, subsymbols, tANS, packing and
// byte reversal. The first pixels are checked too.
//
// Mechanisms counted (a failure is counted for any that never happens):
// context forwarding between consecutive pixels, escape + bypass, multi-block
// images with a short last block, FIFO back-pressure on the decorrelator side,
// output stalls, two-byte block flush in the packer, and a NEAR change.
module tb_loco_ans_encoder;
  import loco_ans_pkg::*;
  import loco_ref_pkg::*;

  logic clk0 = 0, clk1 = 0, rst0_n = 1, rst1_n = 1;
  initial #1 begin rst0_n = 0; rst1_n = 0; end
  always #6 clk0 = ~clk0;
  always #2.75 clk1 = ~clk1;

  logic [1:0] start, busy, done, px_valid, px_ready, first_px_valid;
  logic [4:0] cfg_near [2]; logic [13:0] cfg_width [2]; logic [15:0] cfg_height [2];
  logic [7:0] px_data [2], first_px [2];
  logic cfg_tans_we, cfg_is_y, cfg_c_we; logic [P_BITS-1:0] cfg_tbl; logic [ZSYM_BITS-1:0] cfg_sym;
  logic [STATE_BITS-1:0] cfg_state; tans_entry_t cfg_entry;
  logic [THETA_BITS-1:0] cfg_theta; logic [LOG2C_BITS-1:0] cfg_log2c;
  obyte_t byte_data [2]; logic [1:0] byte_valid, byte_ready;

  int checks = 0, failures = 0;
  int exp_b [2][$];
  int exp_f [2][$];
  int n_fwd = 0, n_esc = 0, n_blk = 0, n_short = 0, n_fifo_full = 0, n_out_stall = 0, n_flush2 = 0, n_near = 0;
  bit tables_ready = 0;

  loco_ans_encoder dut (.clk0, .rst0_n, .start, .cfg_near, .cfg_width, .cfg_height, .busy, .done,
    .px_data, .px_valid, .px_ready, .first_px, .first_px_valid,
    .clk1, .rst1_n, .cfg_tans_we, .cfg_is_y, .cfg_tbl, .cfg_sym, .cfg_state, .cfg_entry,
    .cfg_c_we, .cfg_theta, .cfg_log2c, .byte_data, .byte_valid, .byte_ready);

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- observation ----------------
  for (genvar l = 0; l < 2; l++) begin : g_obs
    always @(posedge clk1) begin
      if (byte_valid[l] && byte_ready[l]) begin
        checks++;
        if (exp_b[l].size() == 0 || int'(byte_data[l].data) != exp_b[l][0] ||
            {byte_data[l].blk_end, byte_data[l].img_end} != 2'(exp_f[l][0])) begin
          failures++;
          if (failures < 10) $display("lane %0d byte got %p exp %0d/%0d", l, byte_data[l],
                                      exp_b[l].size() ? exp_b[l][0] : -1, exp_f[l].size() ? exp_f[l][0] : -1);
        end
        if (exp_b[l].size()) begin void'(exp_b[l].pop_front()); void'(exp_f[l].pop_front()); end
      end
      if (byte_valid[l] && !byte_ready[l]) n_out_stall++;
      if (dut.u_coder.g_lane[l].u_bp.flush_pend && dut.u_coder.g_lane[l].u_bp.out_ready) n_flush2++;
    end
    always @(negedge clk1) byte_ready[l] <= ($urandom_range(0, 4) != 0);
    always @(posedge clk0) begin
      if (dut.g_lane[l].g_dec.u_dec.fwd && dut.g_lane[l].g_dec.u_dec.state == 3'd5) n_fwd++;
      if (dut.stq_valid[l] && !dut.stq_ready[l]) n_fifo_full++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic encode(input int l, input int w, input int h, input int n, input int kind);
    int img [];
    dec_sym_t ds [$];
    tsg_sym_t ts [$];
    int by [$], nb, ne, ns, same;
    img = new[w * h];
    for (int i = 0; i < w * h; i++) begin
      int r, c;
      r = i / w; c = i % w;
      img[i] = (kind == 0) ? ((r * 3 + c * 2 + $urandom_range(0, 3)) & 255) : $urandom_range(0, 255);
    end
    decorrelate(img, w, h, n, ds, same);
    foreach (ds[i]) ts.push_back(to_tsg(ds[i]));
    code_lane(ts, 2048, 7, by, nb, ne, ns);
    n_esc += ne; n_blk += nb;
    if (nb > 1 && (ts.size() % 2048) != 0) n_short++;
    // flags: per block, blk_end on its last byte, img_end on the image's last byte
    begin
      tsg_sym_t blk [$];
      int pos;
      pos = 0;
      for (int i = 0; i < ts.size(); i++) begin
        blk.push_front(ts[i]);
        if (blk.size() == 2048 || ts[i].last) begin
          int cb [$], cl [$], bb [$];
          code_block(blk, 7, cb, cl);
          pack(cb, cl, bb);
          for (int j = 0; j < bb.size(); j++) begin
            exp_b[l].push_back(by[pos + j]);
            exp_f[l].push_back((j == bb.size() - 1) ? (ts[i].last ? 3 : 2) : 0);
          end
          pos += bb.size();
          blk = {};
        end
      end
    end
    @(negedge clk0);
    cfg_near[l] = 5'(n); cfg_width[l] = 14'(w); cfg_height[l] = 16'(h); start[l] = 1;
    @(negedge clk0); start[l] = 0;
    for (int i = 0; i < w * h; i++) begin
      @(negedge clk0);
      while ($urandom_range(0, 7) == 0) begin px_valid[l] = 0; @(negedge clk0); end
      px_valid[l] = 1; px_data[l] = 8'(img[i]);
      @(posedge clk0);
      while (!px_ready[l]) @(posedge clk0);
    end
    @(negedge clk0); px_valid[l] = 0;
    while (!done[l]) @(posedge clk0);
    checks++;
    if (!first_px_valid[l] || first_px[l] != 8'(img[0])) begin failures++; $display("lane %0d first pixel wrong", l); end
    $display("lane %0d: %0dx%0d NEAR=%0d -> %0d bytes, %0d blocks, %0d escapes, %0d subsymbols",
             l, w, h, n, by.size(), nb, ne, ns);
  endtask

  initial begin
    start = 0; px_valid = 0; px_data[0] = 0; px_data[1] = 0;
    cfg_tans_we = 0; cfg_c_we = 0;
    for (int l = 0; l < 2; l++) begin cfg_near[l] = 0; cfg_width[l] = 0; cfg_height[l] = 0; end
    build_tables();
    repeat (3) @(negedge clk1);
    rst0_n = 1; rst1_n = 1;
    // load the tANS tables and C values (coder clock)
    for (int t = 0; t < 15; t++) begin
      for (int s = 0; s < 16; s++) for (int x = 0; x < 64; x++) begin
        @(negedge clk1); cfg_tans_we = 1; cfg_is_y = 0; cfg_tbl = P_BITS'(t); cfg_sym = ZSYM_BITS'(s);
        cfg_state = STATE_BITS'(x); cfg_entry = zt[t][s][x];
      end
      cfg_c_we = 1; cfg_theta = THETA_BITS'(t); cfg_log2c = LOG2C_BITS'(log2c[t]);
    end
    @(negedge clk1); cfg_c_we = 0;
    for (int t = 0; t < 32; t++) for (int s = 0; s < 2; s++) for (int x = 0; x < 64; x++) begin
      @(negedge clk1); cfg_tans_we = 1; cfg_is_y = 1; cfg_tbl = P_BITS'(t); cfg_sym = ZSYM_BITS'(s);
      cfg_state = STATE_BITS'(x); cfg_entry = yt[t][s][x];
    end
    @(negedge clk1); cfg_tans_we = 0;
    fork
      begin encode(0, 64, 40, 0, 0); encode(0, 48, 20, 2, 0); n_near++; end
      begin encode(1, 40, 60, 1, 1); end
    join
    // drain the coder
    repeat (200000) begin
      @(posedge clk1);
      if (exp_b[0].size() == 0 && exp_b[1].size() == 0) break;
    end
    repeat (20) @(posedge clk1);
    for (int l = 0; l < 2; l++) begin
      checks++;
      if (exp_b[l].size() != 0) begin failures++; $display("lane %0d: %0d bytes missing", l, exp_b[l].size()); end
    end
    $display("mechanisms: forwarding %0d, escapes %0d, blocks %0d, short last blocks %0d, fifo full %0d, output stalls %0d, two-byte flushes %0d, NEAR changes %0d",
             n_fwd, n_esc, n_blk, n_short, n_fifo_full, n_out_stall, n_flush2, n_near);
    if (n_fwd == 0)       begin failures++; $display("context forwarding never happened"); end
    if (n_esc == 0)       begin failures++; $display("no escape"); end
    if (n_short == 0)     begin failures++; $display("no multi-block image"); end
    if (n_fifo_full == 0) begin failures++; $display("FIFO never filled"); end
    if (n_out_stall == 0) begin failures++; $display("no output stall"); end
    if (n_flush2 == 0)    begin failures++; $display("no two-byte flush"); end
    if (n_near == 0)      begin failures++; $display("no NEAR change"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
