// loco_ans_pkg: constants and record types shared by the LOCO-ANS encoder.
//
// The codec configuration is the balanced "LOCO-ANS6" one: 6-bit tANS state,
// at most NI = 7 geometric-coder iterations per z symbol, blocks of 2048
// symbols, largest z-table symbol C = 8, 15 tables for theta and 32 for p.
// Pixels are 8-bit grey levels. The record layouts (field order and widths)
// are this design's own choice.
package loco_ans_pkg;

  localparam int PIXEL_BITS   = 8;
  localparam int Z_BITS       = PIXEL_BITS;      // |eps_q| <= 2^(PIXEL_BITS-1)
  localparam int ST_BITS      = 16;              // per-context sum of z
  localparam int T_BITS       = 7;               // per-context counter (RESET = 64)
  localparam int THETA_BITS   = 4;               // 15 theta tables -> ids 0..14
  localparam int P_BITS       = 5;               // 32 p tables
  localparam int STATE_BITS   = 6;               // tANS state bits
  localparam int NBITS_W      = 3;               // 0..STATE_BITS bits per tANS step
  localparam int ZSYM_BITS    = 4;               // z subsymbol 0..C, C <= 8
  localparam int LOG2C_BITS   = 2;               // C = 1,2,4,8
  localparam int CODE_BITS    = 8;               // widest code: bypass of z
  localparam int CODE_LEN_W   = 4;               // 0..8

  // Decorrelator output: one coded symbol plus its model statistics.
  typedef struct packed {
    logic                  last;   // last symbol of the image
    logic                  y;      // sign bit of eps_q (1 = negative)
    logic [Z_BITS-1:0]     z;      // |eps_q| - y
    logic [P_BITS-1:0]     p_q;    // quantized Bernoulli parameter
    logic [T_BITS-1:0]     t;      // context counter
    logic [ST_BITS-1:0]    st;     // context sum of z
  } dec_sym_t;

  // St-quantizer output, the symbol as the TSG coder sees it.
  typedef struct packed {
    logic                  last;   // last symbol of the image
    logic                  y;
    logic [Z_BITS-1:0]     z;
    logic [THETA_BITS-1:0] theta_q;
    logic [P_BITS-1:0]     p_q;
  } tsg_sym_t;

  // Input-buffer output: block-reversed symbol with block delimiters.
  typedef struct packed {
    logic                  blk_end;  // last symbol of the reversed block
    logic                  img_end;  // this block ends the image
    tsg_sym_t              sym;
  } blk_sym_t;

  typedef enum logic [1:0] {SS_Y = 2'd0, SS_Z = 2'd1, SS_BYPASS = 2'd2} ss_kind_e;

  // Subsymbol: what the ANS coder consumes, one per cycle.
  typedef struct packed {
    ss_kind_e              kind;
    logic [Z_BITS-1:0]     value;    // y, z subsymbol, or raw z for bypass
    logic [P_BITS-1:0]     tbl;      // theta_q or p_q
    logic                  blk_end;  // last subsymbol of the block
    logic                  img_end;
  } subsym_t;

  // Variable-length code, LSB-first, len bits of bits are valid.
  typedef struct packed {
    logic [CODE_BITS-1:0]  bits;
    logic [CODE_LEN_W-1:0] len;
    logic                  blk_end;  // last code of the block (final state)
    logic                  img_end;
  } code_t;

  // Packed byte with block delimiters.
  typedef struct packed {
    logic [7:0]            data;
    logic                  blk_end;
    logic                  img_end;
  } obyte_t;

  // tANS table entry: bits to emit and the next state (minus 2^STATE_BITS).
  typedef struct packed {
    logic [NBITS_W-1:0]    nbits;
    logic [STATE_BITS-1:0] next;
  } tans_entry_t;

endpackage
