// input_buffer: first stage of a TSG-coder lane. It cuts the symbol stream
// into blocks of BS symbols and hands each block on in reverse order, because
// the tANS bitstream is a stack: coding a block backwards lets the decoder
// recover symbols in the order the decorrelator produced them.
//
// Two banks of BS entries form a ping-pong buffer. The write side fills one
// bank in order; a bank is closed when it holds BS symbols or when the
// image's last symbol arrives (the last block of an image may be short).
// The read side empties closed banks from the highest address down, so
// writing the next block and reading the previous one overlap. The first
// symbol written to a block leaves last and carries blk_end; img_end marks
// every symbol of the block that closes the image.
//
// Interface: valid/ready in (tsg_sym_t), valid/ready out (blk_sym_t). The
// memory read is registered and is also the output register: one symbol per
// cycle in and out, a block's first output one cycle after it is closed.
// The ping-pong structure follows the document; flags and bank handover are
// this design's choice.
module input_buffer
  import loco_ans_pkg::*;
#(
  parameter int BS = 2048
) (
  input  logic     clk,
  input  logic     rst_n,
  input  tsg_sym_t in_data,
  input  logic     in_valid,
  output logic     in_ready,
  output blk_sym_t out_data,
  output logic     out_valid,
  input  logic     out_ready
);

  localparam int IW = $clog2(BS);

  tsg_sym_t mem [2*BS];

  logic          wbank, rbank;
  logic [IW-1:0] wcnt, ridx;
  logic [1:0]    full;
  logic [IW-1:0] blen [2];     // index of the last entry of a closed bank
  logic [1:0]    bimg;         // closed bank ends the image
  logic          rd_active;    // reading a bank, ridx valid
  logic          wr_fire, rd_fire, en, close_w;

  assign in_ready = !full[wbank];
  assign wr_fire  = in_valid && in_ready;
  assign close_w  = wr_fire && (wcnt == IW'(BS-1) || in_data.last);
  assign en       = !out_valid || out_ready;
  assign rd_fire  = en && rd_active;

  always_ff @(posedge clk) begin
    if (wr_fire) mem[{wbank, wcnt}] <= in_data;
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
      // ---- write side ----
      if (wr_fire) begin
        if (close_w) begin
          wcnt        <= '0;
          wbank       <= ~wbank;
          blen[wbank] <= wcnt;
          bimg[wbank] <= in_data.last;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      // ---- read side ----
      if (en) out_valid <= rd_active;
      if (rd_fire) begin
        out_data.sym     <= mem[{rbank, ridx}];
        out_data.blk_end <= (ridx == '0);
        out_data.img_end <= bimg[rbank];
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
      // ---- bank ownership ----
      for (int b = 0; b < 2; b++) begin
        if (close_w && wbank == 1'(b)) full[b] <= 1'b1;
        else if (rd_fire && ridx == '0 && rbank == 1'(b)) full[b] <= 1'b0;
      end
    end
  end

endmodule
