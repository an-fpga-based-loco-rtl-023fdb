// pixel_decorrelator_ls: the lossless-only LOCO-ANS pixel decorrelator. It
// produces exactly the symbols of pixel_decorrelator with NEAR = 0, but codes
// one pixel per clock cycle instead of one per two.
//
// With NEAR = 0 the reconstructed pixel is the pixel itself, so the causal
// neighbourhood (a, b, c, d), the gradients and the context id of a pixel
// are known as soon as the pixel arrives; nothing waits for the previous
// pixel's quantization. The quantization tables disappear too: the error
// reduced modulo 256 is simply its low 8 bits read as a signed number, and
// the re-scaled error equals the error. The only loop left is the context
// statistics: when two consecutive pixels share a context, the second one
// takes the record just computed for the first (forwarding) instead of the
// stale memory word.
//
// Pipeline (one pixel per cycle):
//   accept  neighbourhood from registers and the row buffer, gradients,
//           context id and sign, MED prediction; context memory read
//   s1      bias-corrected prediction, error, modulo reduction, y and z,
//           context update written back (or forwarded to the next pixel)
//   s2      p_q = floor(32 * -B / t) by a 5-bit restoring division
//   out     symbol register
// The row buffer is read two columns ahead with a registered read (at the
// end of a row it wraps to column 1, which gives d of the next row's first
// pixel); the first pixel of each row and the b used at the previous row's
// first pixel are kept in registers, which covers the column-0 neighbours.
//
// Start-up: 365 cycles to reset the context memory, then the first pixel is
// read and handed out on first_px without being coded.
//
// Interface: as pixel_decorrelator without cfg_near: start with
// cfg_width (>= 3) and cfg_height; pixels and symbols valid/ready; done
// pulses when the last symbol enters the output register. The whole
// pipeline advances together when the output register is free.
//
// The document gives this variant's purpose (lossless only, II = 1, a
// 4-stage pipeline, start-up of 365 cycles plus the pipeline); the stage
// split, the register-based border handling and everything shared with the
// near-lossless decorrelator (p_q estimator, St start value, RESET = 64) are
// this design's choices.
module pixel_decorrelator_ls
  import loco_ans_pkg::*;
#(
  parameter int MAX_WIDTH = 8192,
  parameter int P_TABLES  = 32,
  parameter int RESET     = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // control
  input  logic                  start,
  input  logic [13:0]           cfg_width,
  input  logic [15:0]           cfg_height,
  output logic                  busy,
  output logic                  done,
  // pixels in
  input  logic [PIXEL_BITS-1:0] px_data,
  input  logic                  px_valid,
  output logic                  px_ready,
  // first pixel, sent uncoded
  output logic [PIXEL_BITS-1:0] first_px,
  output logic                  first_px_valid,
  // symbols out
  output dec_sym_t              sym_data,
  output logic                  sym_valid,
  input  logic                  sym_ready
);

  localparam int MAXVAL = (1 << PIXEL_BITS) - 1;
  localparam int NCTX   = 365;
  localparam int CW     = $clog2(MAX_WIDTH);
  // JPEG-LS default thresholds for NEAR = 0, 8-bit pixels; St starts at
  // max(2, (RANGE + 32) / 64) with RANGE = 256
  localparam logic signed [9:0] T1 = 10'sd3, T2 = 10'sd7, T3 = 10'sd21;
  localparam logic [ST_BITS-1:0] ST_INIT = ST_BITS'(4);

  typedef struct packed {
    logic signed [7:0]  c;
    logic signed [15:0] b;
    logic [T_BITS-1:0]  t;
    logic [ST_BITS-1:0] st;
  } ctx_t;

  typedef enum logic [1:0] {S_IDLE, S_INIT, S_FIRST, S_LOOP} state_e;
  state_e state;

  logic [PIXEL_BITS-1:0] rowbuf [MAX_WIDTH];
  ctx_t                  ctxmem [NCTX];

  logic [CW:0]  width, col;
  logic [15:0]  height, row;
  logic [8:0]   init_cnt;
  logic         more;                               // pixels left to accept
  logic [PIXEL_BITS-1:0] prev_x, nb_b, nb_c, first0, b0, rb_q;
  logic         en, accept, loop_acc;

  // stage 1
  logic         s1_valid, s1_sign, s1_last, fwd;
  logic [8:0]   s1_ctx;
  logic [PIXEL_BITS-1:0] s1_med, s1_x;
  ctx_t         ctx_q, upd_r, rec, upd;
  // stage 2
  logic         s2_valid, s2_last, s2_y;
  logic [Z_BITS-1:0] s2_z;
  ctx_t         s2_rec;

  assign en       = !sym_valid || sym_ready;
  assign px_ready = (state == S_FIRST) || (state == S_LOOP && more && en);
  assign accept   = px_valid && px_ready;
  assign loop_acc = accept && (state == S_LOOP);
  assign busy     = (state != S_IDLE) || s1_valid || s2_valid;

  function automatic logic signed [3:0] qgrad(input logic signed [9:0] g);
    if (g <= -T3)      return -4;
    else if (g <= -T2) return -3;
    else if (g <= -T1) return -2;
    else if (g < 0)    return -1;
    else if (g == 0)   return 0;
    else if (g < T1)   return 1;
    else if (g < T2)   return 2;
    else if (g < T3)   return 3;
    else               return 4;
  endfunction

  // ---------------- accept stage ----------------
  logic [PIXEL_BITS-1:0] a_i, b_i, c_i, d_i, med;
  logic signed [9:0] g1, g2, g3;
  logic signed [3:0] q1, q2, q3;
  logic         sgn, is_row0, is_col0, is_lastcol;
  logic [8:0]   ctx_id;
  logic [CW:0]  rb_raddr;

  assign is_row0    = (row == '0);
  assign is_col0    = (col == '0);
  assign is_lastcol = (col == width - 1'b1);

  always_comb begin
    if (is_row0) begin
      b_i = '0; c_i = '0; d_i = '0; a_i = prev_x;
    end else begin
      b_i = nb_b;
      c_i = nb_c;
      d_i = is_lastcol ? nb_b : rb_q;
      a_i = is_col0 ? nb_b : prev_x;
    end
    g1 = $signed({2'b0, d_i}) - $signed({2'b0, b_i});
    g2 = $signed({2'b0, b_i}) - $signed({2'b0, c_i});
    g3 = $signed({2'b0, c_i}) - $signed({2'b0, a_i});
    q1 = qgrad(g1);
    q2 = qgrad(g2);
    q3 = qgrad(g3);
    sgn = (q1 < 0) || (q1 == 0 && q2 < 0) || (q1 == 0 && q2 == 0 && q3 < 0);
    if (sgn) ctx_id = 9'(-(int'(q1) * 81 + int'(q2) * 9 + int'(q3)));
    else     ctx_id = 9'(int'(q1) * 81 + int'(q2) * 9 + int'(q3));
    if (c_i >= ((a_i > b_i) ? a_i : b_i))      med = (a_i < b_i) ? a_i : b_i;
    else if (c_i <= ((a_i < b_i) ? a_i : b_i)) med = (a_i > b_i) ? a_i : b_i;
    else                                        med = PIXEL_BITS'(int'(a_i) + int'(b_i) - int'(c_i));
    // row buffer word two columns ahead: d of the next pixel (wraps to column 1)
    if (col + 2 >= width) rb_raddr = col + 2 - width;
    else                  rb_raddr = col + 2;
  end

  // ---------------- stage 1: error and context update ----------------
  logic signed [7:0] eq;
  logic signed [16:0] bsum, nt_s;
  logic [ST_BITS:0] st_sum;
  logic [T_BITS-1:0] t_n;
  logic         y1;
  logic [Z_BITS-1:0] z1;

  always_comb begin
    int pcv;
    logic signed [9:0] err;
    rec = fwd ? upd_r : ctx_q;
    pcv = int'(s1_med) + (s1_sign ? -int'(rec.c) : int'(rec.c));
    if (pcv < 0) pcv = 0; else if (pcv > MAXVAL) pcv = MAXVAL;
    err = $signed({2'b0, s1_x}) - $signed(10'(pcv));
    if (s1_sign) err = -err;
    eq  = $signed(err[7:0]);                       // modulo-256 reduction
    y1  = eq[7];
    z1  = y1 ? Z_BITS'(~eq) : Z_BITS'(eq);         // |eq| - y
    upd    = rec;
    bsum   = 17'(rec.b) + 17'(eq);
    st_sum = (ST_BITS+1)'(rec.st) + (ST_BITS+1)'(z1);
    t_n    = rec.t;
    if (int'(rec.t) == RESET) begin
      bsum   = bsum >>> 1;
      st_sum = st_sum >> 1;
      t_n    = t_n >> 1;
    end
    t_n    = t_n + 1'b1;
    nt_s   = 17'(t_n);
    upd.t  = t_n;
    upd.st = (st_sum > (ST_BITS+1)'({ST_BITS{1'b1}})) ? {ST_BITS{1'b1}} : ST_BITS'(st_sum);
    if (bsum <= -nt_s) begin
      bsum = bsum + nt_s;
      if (upd.c > -8'sd128) upd.c = upd.c - 1'b1;
      if (bsum <= -nt_s) bsum = -nt_s + 1;
    end else if (bsum > 0) begin
      bsum = bsum - nt_s;
      if (upd.c < 8'sd127) upd.c = upd.c + 1'b1;
      if (bsum > 0) bsum = 0;
    end
    upd.b = 16'(bsum);
  end

  // ---------------- stage 2: p_q ----------------
  logic [P_BITS-1:0] p_est;
  always_comb begin
    logic [T_BITS+P_BITS:0] num, rem;
    logic signed [15:0] nb;
    nb  = -s2_rec.b;
    rem = '0;
    num = (nb > 0) ? (T_BITS+P_BITS+1)'(nb) << $clog2(P_TABLES) : '0;
    p_est = '0;
    for (int k = T_BITS + P_BITS; k >= 0; k--) begin
      rem = {rem[T_BITS+P_BITS-1:0], num[k]};
      if (rem >= (T_BITS+P_BITS+1)'(s2_rec.t)) begin
        rem = rem - (T_BITS+P_BITS+1)'(s2_rec.t);
        if (k < P_BITS) p_est[k] = 1'b1;
        else            p_est = {P_BITS{1'b1}};
      end
    end
  end

  // ---------------- memories ----------------
  always_ff @(posedge clk) begin
    if (state == S_INIT) ctxmem[init_cnt] <= '{c: '0, b: '0, t: T_BITS'(1), st: ST_INIT};
    if (en && s1_valid)  ctxmem[s1_ctx] <= upd;
    if (loop_acc)        ctx_q <= ctxmem[ctx_id];
    if (accept) begin
      rowbuf[col[CW-1:0]] <= px_data;
      rb_q <= rowbuf[rb_raddr[CW-1:0]];
    end
  end

  // ---------------- control and pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      width <= '0; height <= '0; col <= '0; row <= '0; init_cnt <= '0; more <= 1'b0;
      prev_x <= '0; nb_b <= '0; nb_c <= '0; first0 <= '0; b0 <= '0;
      first_px <= '0; first_px_valid <= 1'b0; done <= 1'b0;
      s1_valid <= 1'b0; s1_sign <= 1'b0; s1_last <= 1'b0; s1_ctx <= '0; s1_med <= '0; s1_x <= '0;
      fwd <= 1'b0; upd_r <= '0;
      s2_valid <= 1'b0; s2_last <= 1'b0; s2_y <= 1'b0; s2_z <= '0; s2_rec <= '0;
      sym_valid <= 1'b0; sym_data <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          width  <= (CW+1)'(cfg_width);
          height <= cfg_height;
          init_cnt <= '0;
          first_px_valid <= 1'b0;
          state  <= S_INIT;
        end
        S_INIT: begin
          init_cnt <= init_cnt + 1'b1;
          if (int'(init_cnt) == NCTX - 1) state <= S_FIRST;
        end
        default: ;
      endcase

      // pixel acceptance: neighbourhood registers and position
      if (accept) begin
        prev_x <= px_data;
        if (is_col0) first0 <= px_data;
        if (state == S_FIRST) begin
          first_px       <= px_data;
          first_px_valid <= 1'b1;
          state          <= S_LOOP;
        end
        if (is_lastcol) begin
          col  <= '0;
          row  <= row + 1'b1;
          nb_b <= is_col0 ? px_data : first0;       // b of the next row's column 0
          nb_c <= b0;                               // c of column 0: b of the row above's column 0
          b0   <= is_col0 ? px_data : first0;
          if (row == height - 1'b1) more <= 1'b0;
        end else begin
          col  <= col + 1'b1;
          nb_c <= b_i;
          nb_b <= d_i;
        end
      end
      if (state == S_FIRST && accept) more <= !(width == 1 && height == 1);
      if (state == S_IDLE && start) begin
        col <= '0; row <= '0; nb_b <= '0; nb_c <= '0; b0 <= '0; prev_x <= '0;
      end

      // pipeline
      if (en) begin
        s1_valid <= loop_acc;
        if (loop_acc) begin
          s1_ctx  <= ctx_id;
          s1_sign <= sgn;
          s1_med  <= med;
          s1_x    <= px_data;
          s1_last <= is_lastcol && (row == height - 1'b1);
        end
        fwd <= loop_acc && s1_valid && (s1_ctx == ctx_id);
        if (s1_valid) upd_r <= upd;
        s2_valid <= s1_valid;
        if (s1_valid) begin
          s2_y <= y1; s2_z <= z1; s2_rec <= rec; s2_last <= s1_last;
        end
        sym_valid <= s2_valid;
        if (s2_valid) begin
          sym_data <= '{last: s2_last, y: s2_y, z: s2_z, p_q: p_est, t: s2_rec.t, st: s2_rec.st};
          if (s2_last) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
      end
    end
  end

endmodule
