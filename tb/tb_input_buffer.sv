// tb_input_buffer: streams images of several lengths (a multiple of the block
// size, a short last block, a single-symbol image) through the input buffer
// with BS = 8 and random stalls on both sides. Every block must come out in
// reverse order, with blk_end on its last output symbol and img_end on the
// blocks that close an image. Also checks that, without stalls, a full block
// starts coming out one cycle after its last symbol went in and that the
// buffer keeps accepting symbols while it outputs (ping-pong overlap).
module tb_input_buffer;
  import loco_ans_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  localparam int BS = 8;
  tsg_sym_t in_data; logic in_valid, in_ready;
  blk_sym_t out_data; logic out_valid, out_ready;
  int checks = 0, failures = 0;
  blk_sym_t exp_q [$];
  bit stalls;
  int overlap = 0;

  input_buffer #(.BS(BS)) dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready);

  initial begin
    #2000000; failures++; $display("watchdog expired");
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
    if (out_valid && in_valid && in_ready) overlap++;
  end
  always @(negedge clk) out_ready <= stalls ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic image(input int n);
    tsg_sym_t blk [$];
    tsg_sym_t s;
    for (int i = 0; i < n; i++) begin
      s = tsg_sym_t'($urandom);
      s.last = (i == n - 1);
      blk.push_back(s);
      if (blk.size() == BS || s.last) begin
        for (int j = blk.size() - 1; j >= 0; j--) begin
          blk_sym_t e;
          e.sym = blk[j]; e.blk_end = (j == 0); e.img_end = s.last;
          exp_q.push_back(e);
        end
        blk = {};
      end
      @(negedge clk);
      while (stalls && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = s;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int t_in, t_out;
    in_valid = 0; in_data = '0; stalls = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // timing: one block, no stalls
    image(BS);
    t_in = int'($time / 10);
    while (!out_valid) @(posedge clk);
    t_out = int'($time / 10);
    checks++;
    if (t_out - t_in > 2) begin failures++; $display("first output %0d cycles after block end", t_out - t_in); end
    repeat (BS + 4) @(negedge clk);
    image(3 * BS);
    stalls = 1;
    image(2 * BS + 3);
    image(1);
    image(5 * BS - 1);
    stalls = 0;
    repeat (4 * BS) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d symbols never came out", exp_q.size()); end
    checks++;
    if (overlap == 0) begin failures++; $display("no overlap of input and output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
