// async_fifo: dual-clock FIFO carrying the symbol stream from the pixel
// decorrelator clock domain to the faster TSG-coder clock domain.
//
// Classic Gray-coded pointer design: each side keeps a binary pointer with
// one extra wrap bit, publishes its Gray-coded copy, and the other side
// samples that copy through a two-flop synchronizer. Full and empty are
// derived from the synchronized pointers, so both are conservative.
// Storage is a DEPTH-entry array written in the write domain and read
// asynchronously in the read domain (show-ahead output).
//
// Interface: write side valid/ready (wr_ready = not full), read side
// valid/ready (rd_valid = not empty). DEPTH must be a power of two. The
// document only says that FIFOs move data between the two clocks; the depth
// and the Gray-pointer structure are this design's choice.
module async_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  input  logic             rd_ready
);

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2;   // write pointer seen by the read side
  logic [AW:0] rgray_s1, rgray_s2;   // read pointer seen by the write side
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  assign wr_ready = (wgray != {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});
  assign wbin_nx  = wbin + (AW+1)'(wr_valid && wr_ready);

  always_ff @(posedge wr_clk) begin
    if (wr_valid && wr_ready) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
    end
  end

  // ---------------- read domain ----------------
  assign rd_valid = (rgray != wgray_s2);
  assign rd_data  = mem[rbin[AW-1:0]];
  assign rbin_nx  = rbin + (AW+1)'(rd_valid && rd_ready);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
    end
  end

endmodule
