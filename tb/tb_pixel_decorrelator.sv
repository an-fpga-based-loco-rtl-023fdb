// tb_pixel_decorrelator: checks the decorrelator symbol by symbol against the
// equation-level reference model, for a smooth image and a noisy one, in
// lossless (NEAR = 0) and near-lossless (NEAR = 1, 3) modes, with random
// stalls on the pixel input and the symbol output. It also checks the first
// pixel, the last flag, the start-up time (about 512 cycles) and that the
// loop sustains one pixel per two cycles when nothing stalls.
module tb_pixel_decorrelator;
  import loco_ans_pkg::*;
  import loco_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic start; logic [4:0] near; logic [13:0] width; logic [15:0] height;
  logic busy, done;
  logic [7:0] px_data; logic px_valid, px_ready;
  logic [7:0] first_px; logic first_px_valid;
  dec_sym_t sym_data; logic sym_valid, sym_ready;

  int checks = 0, failures = 0;
  int img [];
  dec_sym_t exp_syms [$];
  int same_ctx;
  bit stall_en;

  pixel_decorrelator #(.MAX_WIDTH(64)) dut (
    .clk, .rst_n, .start, .cfg_near(near), .cfg_width(width), .cfg_height(height),
    .busy, .done, .px_data, .px_valid, .px_ready, .first_px, .first_px_valid,
    .sym_data, .sym_valid, .sym_ready);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // symbol sink with optional stalls
  int got;
  always @(posedge clk) begin
    if (sym_valid && sym_ready) begin
      checks++;
      if (got >= exp_syms.size() || sym_data !== exp_syms[got]) begin
        failures++;
        if (failures < 10)
          $display("mismatch symbol %0d: got %p exp %p", got, sym_data,
                   (got < exp_syms.size()) ? exp_syms[got] : '0);
      end
      got++;
    end
    sym_ready <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic run(input int w, input int h, input int n, input int kind, input bit stalls);
    int pi, t0, t_init, t_end, f_seen;
    longint now;
    img = new[w * h];
    for (int i = 0; i < w * h; i++) begin
      int r, c;
      r = i / w; c = i % w;
      if (kind == 0) img[i] = (r * 7 + c * 3 + $urandom_range(0, 4)) & 255;   // smooth ramp
      else           img[i] = $urandom_range(0, 255);                          // noise
    end
    decorrelate(img, w, h, n, exp_syms, same_ctx);
    got = 0; stall_en = stalls;
    @(negedge clk);
    near = 5'(n); width = 14'(w); height = 16'(h); start = 1;
    @(negedge clk); start = 0;
    t0 = int'($time / 10);
    pi = 0; px_valid = 0; f_seen = 0; t_init = 0;
    while (!done) begin
      @(posedge clk);
      if (px_valid && px_ready) pi++;   // accepted at this edge
      @(negedge clk);
      if (pi == 1 && f_seen == 0) begin f_seen = 1; t_init = int'($time / 10) - t0; end
      px_valid = (pi < w * h) && (!stalls || $urandom_range(0, 4) != 0);
      px_data  = (pi < w * h) ? 8'(img[pi]) : 8'd0;
    end
    t_end = int'($time / 10) - t0;
    // let the sink take the last symbol
    while (sym_valid) @(posedge clk);
    @(negedge clk);
    checks++;
    if (got != exp_syms.size()) begin
      failures++; $display("symbol count %0d, expected %0d", got, exp_syms.size());
    end
    checks++;
    if (!first_px_valid || first_px != 8'(img[0])) begin failures++; $display("first pixel wrong"); end
    checks++;
    if (t_init < 512 || t_init > 540) begin failures++; $display("init took %0d cycles", t_init); end
    if (!stalls) begin
      checks++;
      // II = 2: (w*h - 1) coded pixels, a few cycles of pipeline
      if (t_end - t_init > 2 * (w * h - 1) + 8) begin
        failures++; $display("loop took %0d cycles for %0d pixels", t_end - t_init, w * h - 1);
      end
    end
    $display("run %0dx%0d NEAR=%0d kind=%0d stalls=%0d: %0d symbols, %0d same-context pairs, init %0d, total %0d cycles",
             w, h, n, kind, stalls, got, same_ctx, t_init, t_end);
  endtask

  initial begin
    start = 0; near = 0; width = 0; height = 0; px_valid = 0; px_data = 0; stall_en = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16, 8, 0, 0, 0);
    run(16, 8, 0, 1, 0);
    run(16, 8, 0, 0, 1);
    run(16, 8, 0, 1, 1);
    run(13, 9, 1, 0, 1);
    run(20, 6, 3, 1, 0);
    run(3, 5, 2, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
