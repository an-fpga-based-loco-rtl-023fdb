// tb_output_stack: pushes byte blocks of random lengths (1 to 40 bytes, plus
// one longer than the bank so it is split) through the output stack with
// OS_DEPTH = 32 and random stalls on both sides, and checks that each block
// comes out byte-reversed with blk_end on its last output byte and img_end on
// the image's last byte.
module tb_output_stack;
  import loco_ans_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  localparam int D = 32;
  obyte_t in_data; logic in_valid, in_ready;
  obyte_t out_data; logic out_valid, out_ready;
  int checks = 0, failures = 0;
  obyte_t exp_q [$];
  bit stalls = 0;

  output_stack #(.OS_DEPTH(D)) dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready);

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
  end
  always @(negedge clk) out_ready <= stalls ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic block(input int n, input bit img_last);
    obyte_t b [$];
    for (int i = 0; i < n; i++) begin
      obyte_t x;
      x.data = 8'($urandom); x.blk_end = (i == n - 1); x.img_end = img_last && (i == n - 1);
      b.push_back(x);
    end
    // expected: reversed, in pieces of at most D bytes
    for (int p = 0; p < n; p += D) begin
      int e;
      e = (p + D < n) ? p + D : n;
      for (int j = e - 1; j >= p; j--) begin
        obyte_t x;
        x.data = b[j].data; x.blk_end = (j == p); x.img_end = (j == p) && (e == n) && img_last;
        exp_q.push_back(x);
      end
    end
    foreach (b[i]) begin
      @(negedge clk);
      while (stalls && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = b[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    block(5, 0); block(1, 0); block(32, 0); block(17, 1);
    stalls = 1;
    for (int k = 0; k < 40; k++) block($urandom_range(1, 40), k == 39);
    block(70, 1);
    stalls = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d bytes never came out", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
