// tans_rom: the tANS encoding tables shared by the two coder lanes.
//
// tANS keeps a state x in [L, 2L), L = 2^STATE_BITS. To code a symbol s from
// state x the coder emits the nbits low bits of x and moves to a new state;
// both depend only on (table, s, x), so each table is a memory indexed by the
// symbol and the state offset x - L that returns {nbits, next - L}. There is
// one such table per z distribution (THETA_TABLES tables over the symbols
// 0..C, C <= 8) and per y distribution (P_TABLES tables over {0, 1}); they
// live in two memories, a z memory addressed {theta, symbol, state} with a
// 16-symbol stride and a y memory addressed {p, y, state}.
//
// Each lane owns one read port of both memories (true dual-port use, so the
// lanes never wait for each other). Reads are registered and hold their
// value while the port's enable is low, which lets a stalled coder keep its
// table output. The contents are not fixed here: they are written once
// through the cfg port (typically at power-up) with tables built for the
// LOCO-ANS6 distributions. The memory shapes follow the document's
// configuration; the loading port and the address layout are this
// design's choice.
module tans_rom
  import loco_ans_pkg::*;
#(
  parameter int THETA_TABLES = 15,
  parameter int P_TABLES     = 32
) (
  input  logic                  clk,
  // configuration write port
  input  logic                  cfg_we,
  input  logic                  cfg_is_y,
  input  logic [P_BITS-1:0]     cfg_tbl,
  input  logic [ZSYM_BITS-1:0]  cfg_sym,
  input  logic [STATE_BITS-1:0] cfg_state,
  input  tans_entry_t           cfg_entry,
  // read port A (lane 0)
  input  logic                  a_en,
  input  logic                  a_is_y,
  input  logic [P_BITS-1:0]     a_tbl,
  input  logic [ZSYM_BITS-1:0]  a_sym,
  input  logic [STATE_BITS-1:0] a_state,
  output tans_entry_t           a_q,
  // read port B (lane 1)
  input  logic                  b_en,
  input  logic                  b_is_y,
  input  logic [P_BITS-1:0]     b_tbl,
  input  logic [ZSYM_BITS-1:0]  b_sym,
  input  logic [STATE_BITS-1:0] b_state,
  output tans_entry_t           b_q
);

  localparam int ZAW = THETA_BITS + ZSYM_BITS + STATE_BITS;
  localparam int YAW = P_BITS + 1 + STATE_BITS;

  tans_entry_t zmem [THETA_TABLES << (ZSYM_BITS + STATE_BITS)];
  tans_entry_t ymem [P_TABLES << (1 + STATE_BITS)];

  logic [ZAW-1:0] cfg_za, a_za, b_za;
  logic [YAW-1:0] cfg_ya, a_ya, b_ya;

  assign cfg_za = {THETA_BITS'(cfg_tbl), cfg_sym, cfg_state};
  assign cfg_ya = {cfg_tbl, cfg_sym[0], cfg_state};
  assign a_za   = {THETA_BITS'(a_tbl), a_sym, a_state};
  assign a_ya   = {a_tbl, a_sym[0], a_state};
  assign b_za   = {THETA_BITS'(b_tbl), b_sym, b_state};
  assign b_ya   = {b_tbl, b_sym[0], b_state};

  always_ff @(posedge clk) begin
    if (cfg_we && !cfg_is_y && int'(cfg_za) < (THETA_TABLES << (ZSYM_BITS + STATE_BITS)))
      zmem[cfg_za] <= cfg_entry;
    if (cfg_we && cfg_is_y && int'(cfg_ya) < (P_TABLES << (1 + STATE_BITS)))
      ymem[cfg_ya] <= cfg_entry;
  end

  // registered reads; out-of-range z tables read as a zero entry
  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_is_y) a_q <= ymem[a_ya];
      else        a_q <= (int'(a_za) < (THETA_TABLES << (ZSYM_BITS + STATE_BITS))) ? zmem[a_za] : '0;
    end
    if (b_en) begin
      if (b_is_y) b_q <= ymem[b_ya];
      else        b_q <= (int'(b_za) < (THETA_TABLES << (ZSYM_BITS + STATE_BITS))) ? zmem[b_za] : '0;
    end
  end

endmodule
