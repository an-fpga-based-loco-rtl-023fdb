// bit_packer: packs the variable-length codes of the tANS coder into bytes.
//
// Codes (0 to 8 bits) are appended LSB-first to an accumulator of at most 15
// bits; whenever 8 or more bits are held the low byte is sent on. A code that
// ends a block (the coder's final state) forces the remaining bits out,
// padded with zeros to a whole byte, so every block ends on a byte boundary
// and its last byte carries blk_end. If that flush needs a second byte the
// packer takes one extra cycle and holds off its input.
//
// Interface: valid/ready codes in, valid/ready bytes out, registered output,
// one code per cycle. LSB-first order and zero padding are this design's
// choices; the document only states that codes are packed into bytes.
module bit_packer
  import loco_ans_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  code_t  in_data,
  input  logic   in_valid,
  output logic   in_ready,
  output obyte_t out_data,
  output logic   out_valid,
  input  logic   out_ready
);

  logic        en, flush_pend, fl_img;
  logic [14:0] acc;
  logic [3:0]  cnt;
  logic [15:0] nacc;
  logic [4:0]  ncnt;
  logic [15:0] mask;

  assign en       = !out_valid || out_ready;
  assign in_ready = en && !flush_pend;

  always_comb begin
    mask = (16'd1 << in_data.len) - 16'd1;
    nacc = {1'b0, acc} | ((16'(in_data.bits) & mask) << cnt);
    ncnt = 5'(cnt) + 5'(in_data.len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      cnt        <= '0;
      flush_pend <= 1'b0;
      fl_img     <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else if (en) begin
      out_valid <= 1'b0;
      if (flush_pend) begin
        out_valid  <= 1'b1;
        out_data   <= '{data: acc[7:0], blk_end: 1'b1, img_end: fl_img};
        acc        <= '0;
        cnt        <= '0;
        flush_pend <= 1'b0;
      end else if (in_valid) begin
        if (ncnt >= 5'd8) begin
          out_valid <= 1'b1;
          out_data  <= '{data: nacc[7:0],
                         blk_end: in_data.blk_end && ncnt == 5'd8,
                         img_end: in_data.img_end && in_data.blk_end && ncnt == 5'd8};
          acc       <= 15'(nacc >> 8);
          cnt       <= 4'(ncnt - 5'd8);
          if (in_data.blk_end && ncnt > 5'd8) begin
            flush_pend <= 1'b1;
            fl_img     <= in_data.img_end;
          end else if (in_data.blk_end) begin
            acc <= '0;
          end
        end else if (in_data.blk_end) begin
          out_valid <= 1'b1;
          out_data  <= '{data: nacc[7:0], blk_end: 1'b1, img_end: in_data.img_end};
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= 15'(nacc);
          cnt <= 4'(ncnt);
        end
      end
    end
  end

endmodule
