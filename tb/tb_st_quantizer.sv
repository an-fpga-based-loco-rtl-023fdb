// tb_st_quantizer: drives random (St, t) pairs, including values around the
// thresholds t * 2^(i-1), through the St quantizer with random output stalls
// and compares each theta_q (and the fields carried alongside) with the
// reference quantizer. Also checks the two-cycle latency.
module tb_st_quantizer;
  import loco_ans_pkg::*;
  import loco_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  dec_sym_t in_data; logic in_valid, in_ready;
  tsg_sym_t out_data; logic out_valid, out_ready;
  int checks = 0, failures = 0;
  tsg_sym_t exp_q [$];
  int sent = 0, rcvd = 0, lat_first = -1, cyc = 0;

  st_quantizer dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready);

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic dec_sym_t rnd_sym();
    dec_sym_t d;
    int t, sh;
    t = $urandom_range(1, 64);
    sh = $urandom_range(0, 15);
    d.t = T_BITS'(t);
    case ($urandom_range(0, 2))
      0: d.st = ST_BITS'($urandom_range(0, 65535));
      1: d.st = ST_BITS'((t << sh) & 16'hffff);                 // on a threshold
      default: d.st = ST_BITS'(((t << sh) + 1) & 16'hffff);     // just above
    endcase
    d.y = 1'($urandom); d.z = Z_BITS'($urandom); d.p_q = P_BITS'($urandom);
    d.last = 1'($urandom_range(0, 9) == 0);
    return d;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_ready) begin
      tsg_sym_t e;
      e.last = in_data.last; e.y = in_data.y; e.z = in_data.z; e.p_q = in_data.p_q;
      e.theta_q = THETA_BITS'(theta_of(int'(in_data.st), int'(in_data.t), 14));
      exp_q.push_back(e);
      sent++;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (lat_first < 0) lat_first = cyc;
      if (out_data !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: got %p exp %p", rcvd, out_data, exp_q[0]);
      end
      void'(exp_q.pop_front());
      rcvd++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency check on the first symbol: accepted at edge k, output at edge k+2
    @(negedge clk); in_valid = 1; in_data = rnd_sym();
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    checks++;
    if (!out_valid) begin failures++; $display("latency is not two cycles"); end
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_data  = rnd_sym();
      end
      out_ready = (i < 1000) ? 1'b1 : ($urandom_range(0, 2) != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (10) @(negedge clk);
    checks++;
    if (sent != rcvd) begin failures++; $display("sent %0d received %0d", sent, rcvd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
