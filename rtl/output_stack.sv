// output_stack: last stage of a TSG-coder lane. It reverses the byte order
// of every coded block so that the decoder, which must read a tANS stream
// from its end, receives each block's bytes last-written-first.
//
// Same ping-pong structure as the input buffer: two banks of OS_DEPTH bytes.
// The write side stores a block's bytes in order and closes the bank on the
// byte flagged blk_end; the read side then emits the bank from its highest
// address down to zero while the next block is being written into the other
// bank. The output byte at address 0 (the block's first coded byte) carries
// blk_end, and img_end is copied from the block that closes the image.
//
// Interface: valid/ready in and out (obyte_t). One byte per cycle each way;
// the read is registered into the output register. OS_DEPTH = 16384 holds a
// worst-case 2048-symbol block (at most 62 bits per symbol with NI = 7, a
// 6-bit state and 8-bit bypass, plus the final state), which is this
// design's own sizing: the document gives the structure, not the size.
module output_stack
  import loco_ans_pkg::*;
#(
  parameter int OS_DEPTH = 16384
) (
  input  logic   clk,
  input  logic   rst_n,
  input  obyte_t in_data,
  input  logic   in_valid,
  output logic   in_ready,
  output obyte_t out_data,
  output logic   out_valid,
  input  logic   out_ready
);

  localparam int IW = $clog2(OS_DEPTH);

  logic [7:0] mem [2*OS_DEPTH];

  logic          wbank, rbank;
  logic [IW-1:0] wcnt, ridx;
  logic [1:0]    full;
  logic [IW-1:0] blen [2];
  logic [1:0]    bimg;
  logic          rd_active;
  logic          wr_fire, rd_fire, en, close_w;

  assign in_ready = !full[wbank];
  assign wr_fire  = in_valid && in_ready;
  // a block also closes when the bank is full, so that a block longer than
  // the bank cannot overwrite it (it then comes out as several pieces)
  assign close_w  = wr_fire && (in_data.blk_end || wcnt == IW'(OS_DEPTH-1));
  assign en       = !out_valid || out_ready;
  assign rd_fire  = en && rd_active;

  always_ff @(posedge clk) begin
    if (wr_fire) mem[{wbank, wcnt}] <= in_data.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      wcnt      <= '0;
      ridx      <= '0;
      full      <= '0;
      blen[0]   <= '0;
      blen[1]   <= '0;
      bimg      <= '0;
      rd_active <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (wr_fire) begin
        if (close_w) begin
          wcnt        <= '0;
          wbank       <= ~wbank;
          blen[wbank] <= wcnt;
          bimg[wbank] <= in_data.img_end && in_data.blk_end;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (en) out_valid <= rd_active;
      if (rd_fire) begin
        out_data.data    <= mem[{rbank, ridx}];
        out_data.blk_end <= (ridx == '0);
        out_data.img_end <= (ridx == '0) && bimg[rbank];
      end
      if (!rd_active && full[rbank]) begin
        rd_active <= 1'b1;
        ridx      <= blen[rbank];
      end else if (rd_fire) begin
        if (ridx == '0) begin
          rd_active <= 1'b0;
          rbank     <= ~rbank;
        end else begin
          ridx <= ridx - 1'b1;
        end
      end
      for (int b = 0; b < 2; b++) begin
        if (close_w && wbank == 1'(b)) full[b] <= 1'b1;
        else if (rd_fire && ridx == '0 && rbank == 1'(b)) full[b] <= 1'b0;
      end
    end
  end

endmodule
