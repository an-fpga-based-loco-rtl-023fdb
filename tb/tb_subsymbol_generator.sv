// tb_subsymbol_generator: loads C for each theta table, feeds random symbols
// (small z, z on multiples of C, z large enough to force escapes) with random
// stalls, and compares every subsymbol with the reference decomposition.
// Without stalls it also checks one subsymbol per cycle: a run of symbols
// must take exactly as many output cycles as it has subsymbols.
module tb_subsymbol_generator;
  import loco_ans_pkg::*;
  import loco_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we; logic [THETA_BITS-1:0] cfg_theta; logic [LOG2C_BITS-1:0] cfg_log2c;
  blk_sym_t in_data; logic in_valid, in_ready;
  subsym_t out_data; logic out_valid, out_ready;
  int checks = 0, failures = 0, nesc = 0, nout = 0;
  subsym_t exp_q [$];
  bit stalls = 0;

  subsymbol_generator dut (.clk, .rst_n, .cfg_we, .cfg_theta, .cfg_log2c,
    .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready);

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      checks++; nout++;
      if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("got %p exp %p", out_data, exp_q.size() ? exp_q[0] : '0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end
  always @(negedge clk) out_ready <= stalls ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic send(input blk_sym_t s);
    int k [$], v [$], tb [$];
    subsyms(s.sym, 7, k, v, tb);
    if (k[k.size() - 1] == 2) nesc++;
    foreach (k[j]) begin
      subsym_t e;
      e.kind = ss_kind_e'(k[j]); e.value = Z_BITS'(v[j]); e.tbl = P_BITS'(tb[j]);
      e.blk_end = s.blk_end && (j == k.size() - 1); e.img_end = s.img_end;
      exp_q.push_back(e);
    end
    @(negedge clk);
    while (stalls && $urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_data = s;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  function automatic blk_sym_t rnd(input int zmax);
    blk_sym_t s;
    s = blk_sym_t'({$urandom, $urandom});
    s.sym.theta_q = THETA_BITS'($urandom_range(0, 14));
    s.sym.z = Z_BITS'($urandom_range(0, zmax));
    return s;
  endfunction

  initial begin
    int t0, n0, nsub;
    cfg_we = 0; in_valid = 0; in_data = '0;
    build_tables();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 15; i++) begin
      @(negedge clk); cfg_we = 1; cfg_theta = THETA_BITS'(i); cfg_log2c = LOG2C_BITS'(log2c[i]);
    end
    @(negedge clk); cfg_we = 0;
    // throughput: 50 symbols, no stalls
    n0 = nout; nsub = 0;
    fork
      begin
        for (int i = 0; i < 50; i++) begin
          int k [$], v [$], tb [$];
          blk_sym_t s;
          s = rnd(20);
          subsyms(s.sym, 7, k, v, tb);
          nsub += k.size();
          send(s);
        end
        @(negedge clk); in_valid = 0;
      end
    join
    t0 = int'($time / 10);
    wait (exp_q.size() == 0);
    @(negedge clk);
    stalls = 1;
    for (int i = 0; i < 600; i++) send(rnd((i % 3 == 0) ? 255 : 40));
    @(negedge clk); in_valid = 0;
    stalls = 0;
    repeat (3000) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d subsymbols missing", exp_q.size()); end
    checks++;
    if (nesc == 0) begin failures++; $display("no escape was exercised"); end
    $display("escapes: %0d", nesc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one subsymbol per cycle: while the first 50 symbols are in flight and the
  // output is never stalled, out_valid must not drop between subsymbols
  int gaps = 0; bit seen = 0;
  always @(posedge clk) if (!stalls && rst_n) begin
    if (out_valid) seen = 1;
    else if (seen && exp_q.size() != 0) gaps++;
  end
  final if (gaps != 0) $display("output gaps: %0d", gaps);
  initial begin
    wait (stalls == 1);
    checks++;
    if (gaps != 0) begin failures++; $display("%0d idle output cycles without stalls", gaps); end
  end
endmodule
