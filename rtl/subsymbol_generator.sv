// subsymbol_generator: turns each TSG symbol (y, z and their table indices)
// into the sequence of subsymbols the tANS coder consumes, one per cycle.
//
// For the z table chosen by theta_q the tANS alphabet is 0..C, with C a power
// of two. z is written as z = z0 + n*C with z0 = z mod C and n = z div C, and
// coded as z0 followed by n subsymbols equal to C. If that sequence would be
// longer than NI subsymbols, an escape is sent instead: NI+1 subsymbols equal
// to C, followed by z itself as an 8-bit bypass code. y, coded with the p_q
// table, is serialised ahead of z (coupled Bernoulli and geometric coders).
//
// Two stages, as in the document: a metadata stage that looks up C for
// theta_q and registers z0, n and the escape decision, and a decomposition
// state machine that emits one subsymbol per cycle and loads the next
// symbol's metadata on the cycle it emits the current symbol's last
// subsymbol, so there are no bubbles between symbols.
//
// Interface: valid/ready in (blk_sym_t) and out (subsym_t); the subsymbol
// that ends a block carries blk_end. log2 C per theta table is written
// through the cfg port (C is part of each table's definition). The order
// y, z0, C..., bypass and the escape pattern are this design's reading.
module subsymbol_generator
  import loco_ans_pkg::*;
#(
  parameter int NI           = 7,
  parameter int THETA_TABLES = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration: log2 of C for each theta table
  input  logic                  cfg_we,
  input  logic [THETA_BITS-1:0] cfg_theta,
  input  logic [LOG2C_BITS-1:0] cfg_log2c,
  // symbols
  input  blk_sym_t              in_data,
  input  logic                  in_valid,
  output logic                  in_ready,
  // subsymbols
  output subsym_t               out_data,
  output logic                  out_valid,
  input  logic                  out_ready
);

  typedef enum logic [1:0] {PH_Y, PH_Z0, PH_CREP, PH_BYP} phase_e;

  typedef struct packed {
    logic                  y;
    logic [Z_BITS-1:0]     z;
    logic [THETA_BITS-1:0] theta;
    logic [P_BITS-1:0]     p;
    logic                  blk_end;
    logic                  img_end;
    logic [Z_BITS-1:0]     z0;
    logic [Z_BITS-1:0]     n;
    logic                  esc;
    logic [ZSYM_BITS-1:0]  c;
  } meta_t;

  logic [LOG2C_BITS-1:0] log2c_tab [THETA_TABLES];

  meta_t              m_d, m_q, cur;
  logic               m_valid, cur_valid;
  phase_e             phase;
  logic [Z_BITS-1:0]  cnt;
  logic               en, emit, sub_last, load_cur, m_take;
  subsym_t            sub;
  logic [LOG2C_BITS-1:0] l2c;

  always_ff @(posedge clk) begin
    if (cfg_we) log2c_tab[cfg_theta] <= cfg_log2c;
  end

  // ---------------- metadata ----------------
  always_comb begin
    l2c           = (int'(in_data.sym.theta_q) < THETA_TABLES) ? log2c_tab[in_data.sym.theta_q] : '0;
    m_d.y         = in_data.sym.y;
    m_d.z         = in_data.sym.z;
    m_d.theta     = in_data.sym.theta_q;
    m_d.p         = in_data.sym.p_q;
    m_d.blk_end   = in_data.blk_end;
    m_d.img_end   = in_data.img_end;
    m_d.c         = ZSYM_BITS'(1) << l2c;
    m_d.z0        = in_data.sym.z & ((Z_BITS'(1) << l2c) - 1'b1);
    m_d.n         = in_data.sym.z >> l2c;
    m_d.esc       = (32'(in_data.sym.z >> l2c) >= 32'(NI));   // n + 1 > NI
  end

  // ---------------- decomposition ----------------
  assign en   = !out_valid || out_ready;
  assign emit = en && cur_valid;

  always_comb begin
    sub          = '0;
    sub.img_end  = cur.img_end;
    sub_last     = 1'b0;
    unique case (phase)
      PH_Y: begin
        sub.kind  = SS_Y;
        sub.value = Z_BITS'(cur.y);
        sub.tbl   = cur.p;
      end
      PH_Z0: begin
        sub.kind  = SS_Z;
        sub.value = cur.z0;
        sub.tbl   = P_BITS'(cur.theta);
        sub_last  = (cur.n == '0);
      end
      PH_CREP: begin
        sub.kind  = SS_Z;
        sub.value = Z_BITS'(cur.c);
        sub.tbl   = P_BITS'(cur.theta);
        sub_last  = (cnt == Z_BITS'(1)) && !cur.esc;
      end
      default: begin
        sub.kind  = SS_BYPASS;
        sub.value = cur.z;
        sub.tbl   = '0;
        sub_last  = 1'b1;
      end
    endcase
    sub.blk_end = sub_last && cur.blk_end;
  end

  assign load_cur = !cur_valid || (emit && sub_last);
  assign m_take   = load_cur && m_valid;
  assign in_ready = !m_valid || m_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid   <= 1'b0;
      m_q       <= '0;
      cur_valid <= 1'b0;
      cur       <= '0;
      phase     <= PH_Y;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        m_valid <= 1'b1;
        m_q     <= m_d;
      end else if (m_take) begin
        m_valid <= 1'b0;
      end

      if (en) begin
        out_valid <= cur_valid;
        out_data  <= sub;
      end

      if (load_cur) begin
        cur_valid <= m_valid;
        cur       <= m_q;
        phase     <= PH_Y;
      end else if (emit) begin
        unique case (phase)
          PH_Y: begin
            if (cur.esc) begin
              phase <= PH_CREP;
              cnt   <= Z_BITS'(NI + 1);
            end else begin
              phase <= PH_Z0;
            end
          end
          PH_Z0: begin
            phase <= PH_CREP;
            cnt   <= cur.n;
          end
          PH_CREP: begin
            if (cnt == Z_BITS'(1)) phase <= PH_BYP;
            cnt <= cnt - 1'b1;
          end
          default: phase <= PH_Y;
        endcase
      end
    end
  end

endmodule
