// tb_bit_packer: random codes of 0..8 bits, grouped in blocks that end with a
// 6-bit final-state code, go through the packer with random stalls; the byte
// stream is compared with an LSB-first reference packing that pads each block
// to a whole byte. Blocks whose end needs two bytes at once are counted.
module tb_bit_packer;
  import loco_ans_pkg::*;
  import loco_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  code_t in_data; logic in_valid, in_ready;
  obyte_t out_data; logic out_valid, out_ready;
  int checks = 0, failures = 0, two_byte_ends = 0;
  obyte_t exp_q [$];
  bit stalls = 1;

  bit_packer dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready);

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

  task automatic block(input int n, input bit img);
    int cb [$], cl [$], by [$], tot;
    code_t c [$];
    tot = 0;
    for (int i = 0; i <= n; i++) begin
      code_t x;
      x.len = (i == n) ? CODE_LEN_W'(6) : CODE_LEN_W'($urandom_range(0, 8));
      x.bits = 8'($urandom);
      x.blk_end = (i == n); x.img_end = img;
      c.push_back(x);
      cb.push_back(int'(x.bits)); cl.push_back(int'(x.len));
      tot += int'(x.len);
    end
    if ((tot - 6) % 8 > 2) two_byte_ends++;
    pack(cb, cl, by);
    foreach (by[i]) begin
      obyte_t e;
      e.data = 8'(by[i]); e.blk_end = (i == by.size() - 1); e.img_end = img && e.blk_end;
      exp_q.push_back(e);
    end
    foreach (c[i]) begin
      @(negedge clk);
      while (stalls && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = c[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) block($urandom_range(0, 30), k == 299);
    stalls = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d bytes missing", exp_q.size()); end
    checks++;
    if (two_byte_ends == 0) begin failures++; $display("two-byte block end never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
