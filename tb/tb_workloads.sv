// tb_workloads: the encoder at its default parameters on the image shapes the
// LOCO-ANS evaluation uses, checked byte for byte against the reference chain.
//
// Lane 0 codes a 8192 x 2 image (the widest row the row buffer holds, three
// blocks) and then a 2268 x 3 strip (the row width of the 2268 x 1512 test
// photograph; the full picture is too long to simulate, and every row uses
// the same logic). Lane 1 codes the worst-case latency image: 64 x 32 pixels
// of uniform noise at NEAR = 0, which fits in one 2048-symbol block.
//
// For the latency image the coder latency is measured from the cycle the last
// symbol enters the coder to the cycle the last coded byte leaves (output
// never stalled on that lane). The analytic estimate is
// (1 + subsymbols per z) * BS + bytes per block cycles: one subsymbol per
// cycle through the generator, then the whole block of bytes out of the
// reversing output stack. The measured value must lie within a small
// pipeline margin of that count. The bpp and subsymbols per z are printed;
// they depend on the loaded tANS tables, and the simple test tables built by
// the reference package code noise far worse (about 34 bpp, mostly escapes)
// than tuned tables would, which makes this a harder case for the output
// stack than the evaluated one (about 9.8 bpp). Lane 0's output is stalled at
// random; lane 1's is never stalled so the latency is the coder's own.
module tb_workloads;
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
  longint cyc1 = 0, t_last_in = -1, t_last_out = -1;
  int lat_nsub = 0, lat_bytes = 0;

  loco_ans_encoder dut (.clk0, .rst0_n, .start, .cfg_near, .cfg_width, .cfg_height, .busy, .done,
    .px_data, .px_valid, .px_ready, .first_px, .first_px_valid,
    .clk1, .rst1_n, .cfg_tans_we, .cfg_is_y, .cfg_tbl, .cfg_sym, .cfg_state, .cfg_entry,
    .cfg_c_we, .cfg_theta, .cfg_log2c, .byte_data, .byte_valid, .byte_ready);

  initial begin
    #20000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk1) cyc1 <= cyc1 + 1;
  // last symbol of lane 1 entering the coder, last byte of lane 1 leaving it
  always @(posedge clk1) begin
    if (dut.cod_valid[1] && dut.cod_ready[1] && dut.cod_data[1].last) t_last_in = cyc1;
    if (byte_valid[1] && byte_ready[1] && byte_data[1].img_end) t_last_out = cyc1;
  end

  for (genvar l = 0; l < 2; l++) begin : g_obs
    always @(posedge clk1) begin
      if (byte_valid[l] && byte_ready[l]) begin
        checks++;
        if (exp_b[l].size() == 0 || int'(byte_data[l].data) != exp_b[l][0] ||
            {byte_data[l].blk_end, byte_data[l].img_end} != 2'(exp_f[l][0])) begin
          failures++;
          if (failures < 10) $display("lane %0d byte mismatch", l);
        end
        if (exp_b[l].size()) begin void'(exp_b[l].pop_front()); void'(exp_f[l].pop_front()); end
      end
    end
  end
  always @(negedge clk1) begin
    byte_ready[0] <= ($urandom_range(0, 3) != 0);
    byte_ready[1] <= 1'b1;
  end

  task automatic encode(input int l, input int w, input int h, input int n, input int kind);
    int img [];
    dec_sym_t ds [$];
    tsg_sym_t ts [$], blk [$];
    int by [$], nb, ne, ns, same, pos;
    img = new[w * h];
    for (int i = 0; i < w * h; i++) begin
      int r, c;
      r = i / w; c = i % w;
      img[i] = (kind == 0) ? ((r * 5 + c / 3 + $urandom_range(0, 6)) & 255) : $urandom_range(0, 255);
    end
    decorrelate(img, w, h, n, ds, same);
    foreach (ds[i]) ts.push_back(to_tsg(ds[i]));
    code_lane(ts, 2048, 7, by, nb, ne, ns);
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
    if (l == 1) begin lat_nsub = ns; lat_bytes = by.size(); end
    $display("lane %0d: %0dx%0d NEAR=%0d: %0d symbols, %0d blocks, %0d bytes (%0.3f bpp), %0d escapes, %0.2f subsymbols per z",
             l, w, h, n, ts.size(), nb, by.size(), 8.0 * by.size() / ts.size(), ne, real'(ns - ts.size()) / ts.size());
    @(negedge clk0);
    cfg_near[l] = 5'(n); cfg_width[l] = 14'(w); cfg_height[l] = 16'(h); start[l] = 1;
    @(negedge clk0); start[l] = 0;
    for (int i = 0; i < w * h; i++) begin
      @(negedge clk0);
      px_valid[l] = 1; px_data[l] = 8'(img[i]);
      @(posedge clk0);
      while (!px_ready[l]) @(posedge clk0);
    end
    @(negedge clk0); px_valid[l] = 0;
    while (!done[l]) @(posedge clk0);
    checks++;
    if (first_px[l] != 8'(img[0])) begin failures++; $display("lane %0d first pixel wrong", l); end
  endtask

  initial begin
    start = 0; px_valid = 0; px_data[0] = 0; px_data[1] = 0;
    cfg_tans_we = 0; cfg_c_we = 0;
    for (int l = 0; l < 2; l++) begin cfg_near[l] = 0; cfg_width[l] = 0; cfg_height[l] = 0; end
    build_tables();
    repeat (3) @(negedge clk1);
    rst0_n = 1; rst1_n = 1;
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
      begin encode(0, 8192, 2, 0, 0); encode(0, 2268, 3, 1, 0); end
      begin encode(1, 64, 32, 0, 1); end
    join
    repeat (100000) begin
      @(posedge clk1);
      if (exp_b[0].size() == 0 && exp_b[1].size() == 0) break;
    end
    repeat (20) @(posedge clk1);
    for (int l = 0; l < 2; l++) begin
      checks++;
      if (exp_b[l].size() != 0) begin failures++; $display("lane %0d: %0d bytes missing", l, exp_b[l].size()); end
    end
    // coder latency of the single-block worst-case image
    checks++;
    begin
      longint lat;
      lat = t_last_out - t_last_in;
      $display("worst-case image coder latency %0d cycles; subsymbols + bytes = %0d", lat, lat_nsub + lat_bytes);
      if (t_last_in < 0 || t_last_out < 0 || lat < longint'(lat_nsub + lat_bytes) || lat > longint'(lat_nsub + lat_bytes + 40)) begin
        failures++; $display("latency outside the expected window");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
