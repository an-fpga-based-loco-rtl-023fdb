// pixel_decorrelator: the near-lossless LOCO-ANS pixel decorrelator. It turns
// a raster-scan stream of 8-bit pixels into a stream of prediction-error
// symbols (y, z) plus the per-context statistics the TSG coder needs (p_q for
// y, and t, St from which theta_q is derived for z).
//
// Algorithm (JPEG-LS regular mode, no run mode, with LOCO-ANS statistics):
//  * neighbours a (left), b (above), c (above-left), d (above-right) come from
//    reconstructed pixels; one row buffer holds the previous row;
//  * gradients g1 = d-b, g2 = b-c, g3 = c-a are quantized to -4..4 with the
//    NEAR-dependent thresholds, the context id is Q(g1)*81+Q(g2)*9+Q(g3) after
//    sign merging (365 contexts);
//  * the median (MED) prediction is corrected by the context bias C and
//    clamped; the error eps = x - Px is sign-corrected;
//  * three tables indexed by the 9-bit error replace all division and
//    multiplication: EQ gives the quantized, modulo-reduced error eps_q, ERE
//    gives eps_q*(2*NEAR+1) for the bias update, QERR gives the quantization
//    error of the exact (not sign-corrected) error, so the reconstructed pixel
//    is simply clamp(x + QERR[eps]);
//  * y = (eps_q < 0), z = |eps_q| - y; each context keeps C, B, the counter t
//    and St = sum of z, updated as in JPEG-LS (halving at t = 64); p_q is
//    floor(32 * -B / t), the quantized probability that y = 1.
//
// Start-up: on start the unit computes RANGE with a short divider, then
// sweeps the error range 0..255 and 0..-255 (512 cycles) keeping a running
// quotient and remainder to fill the three tables, and initializes the 365
// contexts during the same sweep. The first pixel is then read and handed
// out on first_px without being coded.
//
// Pixel loop: initiation interval 2. Phase A consumes pixel i, finishes
// pixel i-1 (reconstruction from the QERR table, symbol output, context
// write-back) and addresses the context memory for pixel i; phase B corrects
// the prediction, forms the error, addresses the three tables and the row
// buffer. A context written in phase A is forwarded to the next pixel when
// both pixels share it, which is what allows II = 2 with registered
// memories. The symbol of the last pixel carries last.
//
// Interface: start with cfg_near/cfg_width/cfg_height (width >= 3); pixels
// valid/ready; symbols valid/ready (dec_sym_t, registered); done pulses when
// the last symbol has been produced. The two-phase loop (instead of the
// five-stage schedule), the p_q estimator, the start value of St, RESET = 64
// and the image-border rules of JPEG-LS are this design's choices.
module pixel_decorrelator
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
  input  logic [4:0]            cfg_near,
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
  localparam int EW     = PIXEL_BITS + 1;          // error / table address width

  typedef struct packed {
    logic signed [7:0]  c;     // bias correction
    logic signed [15:0] b;     // accumulated error for the bias
    logic [T_BITS-1:0]  t;     // counter
    logic [ST_BITS-1:0] st;    // sum of z
  } ctx_t;

  typedef enum logic [2:0] {S_IDLE, S_DIV, S_SWEEP, S_FIRST, S_A, S_B} state_e;

  state_e state;

  // ---------------- memories ----------------
  logic [PIXEL_BITS-1:0] rowbuf  [MAX_WIDTH];
  ctx_t                  ctxmem  [NCTX];
  logic signed [8:0]     eq_tab  [1 << EW];
  logic signed [10:0]    ere_tab [1 << EW];
  logic signed [5:0]     qe_tab  [1 << EW];

  // ---------------- configuration ----------------
  logic [4:0]  near;
  logic [6:0]  twonp1;                 // 2*NEAR+1
  logic [8:0]  range_q;                // RANGE
  logic [8:0]  t1, t2, t3;
  logic signed [9:0] max_err, min_err;
  logic [ST_BITS-1:0] st_init;
  logic [CW:0]  width;
  logic [15:0]  height;

  // divider for RANGE - 1 = (MAXVAL + 2*NEAR) / (2*NEAR+1)
  logic [9:0]  div_rem;
  logic [8:0]  div_quo;
  logic [3:0]  div_cnt;

  // table sweep
  logic [9:0]  sw;                     // 0..511
  logic [8:0]  sw_q;                   // running quotient
  logic [6:0]  sw_r;                   // running remainder

  // ---------------- pixel loop state ----------------
  logic [CW:0]  col;                   // column of the new pixel i
  logic [15:0]  row;
  logic         more;                  // pixel i exists
  logic         prev_live;             // pixel i-1 waits for completion
  logic         prev_first;            // pixel i-1 is the uncoded first pixel
  logic         prev_last;
  logic [CW:0]  prev_col;
  logic [PIXEL_BITS-1:0] prev_x;
  logic [PIXEL_BITS-1:0] pb, pd_raw, first_b;
  logic [PIXEL_BITS-1:0] rb_rdata;     // row buffer word read in phase B
  ctx_t         ctx_q;                 // context memory read data
  logic [8:0]   prev_ctx;
  ctx_t         prev_ctxv;             // context values of pixel i-1 (pre-update)
  logic [P_BITS-1:0] prev_p;
  logic signed [8:0] eq_q;
  logic signed [10:0] ere_q;
  logic signed [5:0] qe_q;

  // phase-A registers for phase B
  logic [8:0]   cur_ctx;
  logic         cur_sign;
  logic [PIXEL_BITS-1:0] cur_x, cur_pred;
  logic         cur_last, fwd;
  ctx_t         upd_ctx;               // context written in the last phase A

  // ---------------- combinational: phase A ----------------
  logic [PIXEL_BITS-1:0] a_i, b_i, c_i, d_i, rx_prev;
  logic signed [9:0] g1, g2, g3;
  logic signed [3:0] q1, q2, q3, m1, m2, m3;
  logic         sgn;
  logic [8:0]   ctx_id;
  logic [PIXEL_BITS-1:0] med;
  logic         a_go, out_en;
  logic         is_row0, is_col0, is_lastcol;
  ctx_t         upd;
  logic         y_o;
  logic [Z_BITS-1:0] z_o;
  logic signed [16:0] bsum, nt_s;
  logic [ST_BITS:0] st_sum;
  logic [T_BITS-1:0] t_n;

  function automatic logic signed [3:0] qgrad(input logic signed [9:0] g,
                                              input logic [8:0] t1v, input logic [8:0] t2v,
                                              input logic [8:0] t3v, input logic [4:0] nv);
    if (g <= -$signed({1'b0, t3v}))      return -4;
    else if (g <= -$signed({1'b0, t2v})) return -3;
    else if (g <= -$signed({1'b0, t1v})) return -2;
    else if (g < -$signed({5'd0, nv}))   return -1;
    else if (g <= $signed({5'd0, nv}))   return 0;
    else if (g < $signed({1'b0, t1v}))   return 1;
    else if (g < $signed({1'b0, t2v}))   return 2;
    else if (g < $signed({1'b0, t3v}))   return 3;
    else                                  return 4;
  endfunction

  assign out_en   = !sym_valid || sym_ready;
  assign is_row0  = (row == '0);
  assign is_col0  = (col == '0);
  assign is_lastcol = (col == width - 1'b1);

  // reconstruction of pixel i-1 through the quantization-error table
  always_comb begin
    int rx;
    rx = int'(prev_x) + int'(qe_q);
    if (prev_first)        rx = int'(prev_x);
    if (rx < 0)            rx = 0;
    else if (rx > MAXVAL)  rx = MAXVAL;
    rx_prev = PIXEL_BITS'(rx);
  end

  // causal neighbourhood of pixel i
  always_comb begin
    if (is_row0) begin
      b_i = '0; c_i = '0; d_i = '0;
      a_i = rx_prev;
    end else begin
      b_i = pd_raw;                        // rowbuf[col], read two steps ago
      c_i = is_col0 ? first_b : pb;
      d_i = is_lastcol ? b_i : rb_rdata;   // rowbuf[col+1], read last step
      a_i = is_col0 ? b_i : rx_prev;
    end
  end

  always_comb begin
    g1 = $signed({2'b0, d_i}) - $signed({2'b0, b_i});
    g2 = $signed({2'b0, b_i}) - $signed({2'b0, c_i});
    g3 = $signed({2'b0, c_i}) - $signed({2'b0, a_i});
    q1 = qgrad(g1, t1, t2, t3, near);
    q2 = qgrad(g2, t1, t2, t3, near);
    q3 = qgrad(g3, t1, t2, t3, near);
    sgn = (q1 < 0) || (q1 == 0 && q2 < 0) || (q1 == 0 && q2 == 0 && q3 < 0);
    m1 = sgn ? -q1 : q1;
    m2 = sgn ? -q2 : q2;
    m3 = sgn ? -q3 : q3;
    ctx_id = 9'(int'(m1) * 81 + int'(m2) * 9 + int'(m3));
    if (c_i >= ((a_i > b_i) ? a_i : b_i))      med = (a_i < b_i) ? a_i : b_i;
    else if (c_i <= ((a_i < b_i) ? a_i : b_i)) med = (a_i > b_i) ? a_i : b_i;
    else                                        med = PIXEL_BITS'(int'(a_i) + int'(b_i) - int'(c_i));
  end

  // symbol and context update of pixel i-1
  always_comb begin
    y_o = eq_q < 0;
    z_o = y_o ? Z_BITS'(-int'(eq_q) - 1) : Z_BITS'(eq_q);
    upd    = prev_ctxv;
    bsum   = 17'(prev_ctxv.b) + 17'(ere_q);
    st_sum = (ST_BITS+1)'(prev_ctxv.st) + (ST_BITS+1)'(z_o);
    t_n    = prev_ctxv.t;
    if (int'(prev_ctxv.t) == RESET) begin
      bsum   = bsum >>> 1;
      st_sum = st_sum >> 1;
      t_n    = t_n >> 1;
    end
    t_n   = t_n + 1'b1;
    nt_s  = 17'(t_n);
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

  assign a_go = (state == S_A) && (!more || px_valid) && (!prev_live || prev_first || out_en);
  assign px_ready = ((state == S_A) && more && a_go) || (state == S_FIRST);
  assign busy = (state != S_IDLE);

  // ---------------- combinational: phase B ----------------
  ctx_t         ctx_b;
  logic [PIXEL_BITS-1:0] pred_c;
  logic signed [9:0] err, err_s;
  logic [P_BITS-1:0] p_est;
  logic [CW:0]  rb_raddr;

  always_comb begin
    int pcv;
    ctx_b = fwd ? upd_ctx : ctx_q;
    pcv   = int'(cur_pred) + (cur_sign ? -int'(ctx_b.c) : int'(ctx_b.c));
    if (pcv < 0) pcv = 0; else if (pcv > MAXVAL) pcv = MAXVAL;
    pred_c = PIXEL_BITS'(pcv);
    err    = $signed({2'b0, cur_x}) - $signed({2'b0, pred_c});
    err_s  = cur_sign ? -err : err;
    // p_q = floor(P_TABLES * (-B) / t), restoring division
    begin
      logic [T_BITS+P_BITS:0] num, rem;
      logic [T_BITS-1:0] den;
      logic signed [15:0] nb;
      nb  = -ctx_b.b;
      den = ctx_b.t;
      rem = '0;
      num = (nb > 0) ? (T_BITS+P_BITS+1)'(nb) << $clog2(P_TABLES) : '0;
      p_est = '0;
      for (int k = T_BITS + P_BITS; k >= 0; k--) begin
        rem = {rem[T_BITS+P_BITS-1:0], num[k]};
        if (rem >= (T_BITS+P_BITS+1)'(den)) begin
          rem = rem - (T_BITS+P_BITS+1)'(den);
          if (k < P_BITS) p_est[k] = 1'b1;
          else            p_est = {P_BITS{1'b1}};    // saturate
        end
      end
    end
    // row buffer address for the pixel two columns ahead (wraps to the next row)
    if (col + 2 >= width) rb_raddr = col + 2 - width;
    else                  rb_raddr = col + 2;
  end

  // ---------------- RANGE divider step ----------------
  logic [9:0] div_r2;
  logic [8:0] div_qn, div_rq;
  always_comb begin
    logic [9:0] r2;
    r2 = {div_rem[8:0], div_quo[8]};
    if (r2 >= 10'(twonp1)) begin
      div_r2 = r2 - 10'(twonp1);
      div_qn = {div_quo[7:0], 1'b1};
    end else begin
      div_r2 = r2;
      div_qn = {div_quo[7:0], 1'b0};
    end
    div_rq = div_qn + 1'b1;
  end

  // ---------------- init sweep values ----------------
  logic [8:0]  sw_e;
  logic signed [9:0] sw_qs, sw_qm;
  logic signed [5:0] sw_qerr;
  logic        sw_neg;
  always_comb begin
    sw_neg = sw[8];
    sw_e   = sw_neg ? 9'(-int'(sw[7:0])) : {1'b0, sw[7:0]};
    sw_qs  = sw_neg ? -$signed({1'b0, sw_q}) : $signed({1'b0, sw_q});
    sw_qerr = sw_neg ? 6'(int'(sw_r) - int'(near)) : 6'(int'(near) - int'(sw_r));
    sw_qm  = sw_qs;
    if (sw_qs < min_err)      sw_qm = sw_qs + $signed({1'b0, range_q});
    else if (sw_qs > max_err) sw_qm = sw_qs - $signed({1'b0, range_q});
  end

  // ---------------- memories ----------------
  always_ff @(posedge clk) begin
    if (state == S_SWEEP) begin
      eq_tab[sw_e]  <= 9'(sw_qm);
      ere_tab[sw_e] <= 11'(int'(sw_qm) * int'(twonp1));
      qe_tab[sw_e]  <= sw_qerr;
      if (int'(sw) < NCTX) ctxmem[sw[8:0]] <= '{c: '0, b: '0, t: T_BITS'(1), st: st_init};
    end
    // phase A: write back pixel i-1, read context of pixel i
    if (a_go) begin
      if (prev_live && !prev_first) ctxmem[prev_ctx] <= upd;
      if (prev_live) rowbuf[prev_col[CW-1:0]] <= rx_prev;
      if (more) ctx_q <= ctxmem[ctx_id];
    end
    // phase B: table and row buffer reads
    if (state == S_B) begin
      eq_q  <= eq_tab[err_s[EW-1:0]];
      ere_q <= ere_tab[err_s[EW-1:0]];
      qe_q  <= qe_tab[err[EW-1:0]];
      rb_rdata <= rowbuf[rb_raddr[CW-1:0]];
    end
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      near <= '0; twonp1 <= 7'd1; range_q <= 9'd256;
      t1 <= 9'd3; t2 <= 9'd7; t3 <= 9'd21;
      max_err <= 10'sd127; min_err <= -10'sd128; st_init <= 16'd4;
      width <= '0; height <= '0;
      div_rem <= '0; div_quo <= '0; div_cnt <= '0;
      sw <= '0; sw_q <= '0; sw_r <= '0;
      col <= '0; row <= '0; more <= 1'b0;
      prev_live <= 1'b0; prev_first <= 1'b0; prev_last <= 1'b0; prev_col <= '0;
      prev_x <= '0; pb <= '0; pd_raw <= '0; first_b <= '0;
      prev_ctx <= '0; prev_ctxv <= '0; prev_p <= '0;
      cur_ctx <= '0; cur_sign <= 1'b0; cur_x <= '0; cur_pred <= '0; cur_last <= 1'b0;
      fwd <= 1'b0; upd_ctx <= '0;
      first_px <= '0; first_px_valid <= 1'b0;
      sym_valid <= 1'b0; sym_data <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (sym_valid && sym_ready) sym_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            near    <= cfg_near;
            twonp1  <= 7'(2 * int'(cfg_near) + 1);
            t1      <= 9'(3 + 3 * int'(cfg_near));
            t2      <= 9'(7 + 5 * int'(cfg_near));
            t3      <= 9'(21 + 7 * int'(cfg_near));
            width   <= (CW+1)'(cfg_width);
            height  <= cfg_height;
            div_rem <= '0;
            div_quo <= 9'(MAXVAL + 2 * int'(cfg_near));   // dividend, shifted out MSB first
            div_cnt <= 4'd9;
            first_px_valid <= 1'b0;
            state   <= S_DIV;
          end
        end
        S_DIV: begin
          // restoring division, one quotient bit per cycle
          div_rem <= div_r2;
          div_quo <= div_qn;
          div_cnt <= div_cnt - 1'b1;
          if (div_cnt == 4'd1) begin
            range_q <= div_rq;
            max_err <= 10'((int'(div_rq) + 1) / 2 - 1);
            min_err <= 10'((int'(div_rq) + 1) / 2 - int'(div_rq));
            st_init <= ((int'(div_rq) + 32) / 64 > 2) ? ST_BITS'((int'(div_rq) + 32) / 64) : ST_BITS'(2);
            sw   <= '0;
            sw_q <= '0;
            sw_r <= 7'(near);
            state <= S_SWEEP;
          end
        end
        S_SWEEP: begin
          sw <= sw + 1'b1;
          if (sw == 10'd255) begin
            sw_q <= '0;
            sw_r <= 7'(near);
          end else if (sw_r + 1'b1 == twonp1) begin
            sw_r <= '0;
            sw_q <= sw_q + 1'b1;
          end else begin
            sw_r <= sw_r + 1'b1;
          end
          if (sw == 10'd511) state <= S_FIRST;
        end
        S_FIRST: begin
          if (px_valid) begin
            first_px       <= px_data;
            first_px_valid <= 1'b1;
            prev_x     <= px_data;
            prev_first <= 1'b1;
            prev_live  <= 1'b1;
            prev_col   <= '0;
            prev_last  <= 1'b0;
            col        <= (CW+1)'(1);
            row        <= '0;
            more       <= 1'b1;
            pd_raw     <= '0;
            pb         <= '0;
            first_b    <= '0;
            fwd        <= 1'b0;
            state      <= S_A;
          end
        end
        S_A: begin
          if (a_go) begin
            // finish pixel i-1
            if (prev_live && !prev_first) begin
              sym_valid <= 1'b1;
              sym_data  <= '{last: prev_last, y: y_o, z: z_o, p_q: prev_p,
                             t: prev_ctxv.t, st: prev_ctxv.st};
            end
            upd_ctx <= upd;
            fwd     <= prev_live && !prev_first && more && (prev_ctx == ctx_id);
            prev_first <= 1'b0;
            if (!more) begin
              prev_live <= 1'b0;
              done      <= 1'b1;
              state     <= S_IDLE;
            end else begin
              // start pixel i
              cur_ctx  <= ctx_id;
              cur_sign <= sgn;
              cur_x    <= px_data;
              cur_pred <= med;
              cur_last <= is_lastcol && (row == height - 1'b1);
              pb       <= b_i;
              pd_raw   <= rb_rdata;
              if (is_col0) first_b <= b_i;
              prev_live <= 1'b0;
              state    <= S_B;
            end
          end
        end
        S_B: begin
          prev_live  <= 1'b1;
          prev_ctx   <= cur_ctx;
          prev_ctxv  <= ctx_b;
          prev_p     <= p_est;
          prev_x     <= cur_x;
          prev_col   <= col;
          prev_last  <= cur_last;
          if (cur_last) begin
            more <= 1'b0;
          end else if (is_lastcol) begin
            col <= '0;
            row <= row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
          state <= S_A;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
