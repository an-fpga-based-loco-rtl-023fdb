// st_quantizer: turns the per-context statistics (St, t) of each decorrelated
// symbol into the quantized geometric-distribution parameter theta_q.
//
// theta_q is the largest i in [1, MAX_THETA_ID] for which St > (t << (i-1)),
// or 0 when no i qualifies; this is the coarse-grained LOCO-I style
// quantizer of the document. Symbols are independent, so the unit is a plain
// two-stage pipeline: stage 1 registers the MAX_THETA_ID comparisons, stage 2
// picks the highest one that holds. y, z, p_q and the end-of-image flag travel
// alongside.
//
// Interface: valid/ready streams in and out (dec_sym_t in, tsg_sym_t out).
// The whole pipeline advances when the output register is free or being
// taken, so the unit accepts one symbol per cycle with a latency of two.
// The stage count is this design's choice.
module st_quantizer
  import loco_ans_pkg::*;
#(
  parameter int MAX_THETA_ID = 14
) (
  input  logic     clk,
  input  logic     rst_n,
  input  dec_sym_t in_data,
  input  logic     in_valid,
  output logic     in_ready,
  output tsg_sym_t out_data,
  output logic     out_valid,
  input  logic     out_ready
);

  logic                    en;
  logic                    s1_valid;
  dec_sym_t                s1_sym;
  logic [MAX_THETA_ID:1]   s1_gt;
  logic [MAX_THETA_ID:1]   gt;
  logic [THETA_BITS-1:0]   theta;

  assign en       = !out_valid || out_ready;
  assign in_ready = en;

  // Stage 1 comparisons: St > t * 2^(i-1)
  always_comb begin
    for (int i = 1; i <= MAX_THETA_ID; i++) begin
      gt[i] = {8'd0, in_data.st} > ({17'd0, in_data.t} << (i - 1));
    end
  end

  // Stage 2: last i whose comparison holds (loop order of the algorithm)
  always_comb begin
    theta = '0;
    for (int i = 1; i <= MAX_THETA_ID; i++) begin
      if (s1_gt[i]) theta = THETA_BITS'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_sym    <= '0;
      s1_gt     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (en) begin
      s1_valid  <= in_valid;
      s1_sym    <= in_data;
      s1_gt     <= gt;
      out_valid <= s1_valid;
      out_data  <= '{last: s1_sym.last, y: s1_sym.y, z: s1_sym.z,
                     theta_q: theta, p_q: s1_sym.p_q};
    end
  end

endmodule
