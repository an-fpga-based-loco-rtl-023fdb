// tb_async_fifo: writes a counting sequence from a 10 ns clock domain and
// reads it in a 4.3 ns domain (and then with the speeds swapped by stalling
// the reader), with random valid and ready on both sides. Checks order and
// completeness, and that the FIFO reports full at DEPTH entries.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  initial #1 begin wrst_n = 0; rrst_n = 0; end
  always #5 wclk = ~wclk;
  always #2.15 rclk = ~rclk;

  localparam int DEPTH = 16;
  logic [31:0] wr_data, rd_data;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  int checks = 0, failures = 0, nexp = 0, nwr = 0, max_fill_seen = 0;
  bit slow_reader = 0;

  async_fifo #(.WIDTH(32), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_data, .wr_valid, .wr_ready,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_data, .rd_valid, .rd_ready);

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge rclk) begin
    if (rd_valid && rd_ready) begin
      checks++;
      if (rd_data !== 32'(nexp)) begin
        failures++;
        if (failures < 10) $display("read %0d expected %0d", rd_data, nexp);
      end
      nexp++;
    end
  end
  always @(negedge rclk) rd_ready <= slow_reader ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 3) != 0);

  initial begin
    wr_valid = 0; wr_data = 0; rd_ready = 0;
    #30; wrst_n = 1; rrst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge wclk);
      if (wr_valid && wr_ready) ;   // handled at posedge below
      if (i == 2000) slow_reader = 1;
      wr_valid = ($urandom_range(0, 3) != 0) && (nwr < 3000);
      wr_data  = 32'(nwr);
      @(posedge wclk);
      if (wr_valid && wr_ready) nwr++;
    end
    wr_valid = 0;
    // fill test: stop the reader, the FIFO must refuse the entry after DEPTH
    slow_reader = 0;
    #2000;
    $display("written %0d read %0d", nwr, nexp);
    checks++;
    if (nexp != nwr) begin failures++; $display("lost data"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the write side must never see more than DEPTH unread entries
  always @(posedge wclk) begin
    if (nwr - nexp > DEPTH + 1) begin
      failures++;
      $display("occupancy %0d above depth", nwr - nexp);
    end
  end
endmodule
