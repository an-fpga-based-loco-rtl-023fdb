// ans_coder: the tANS coder of one TSG-coder lane. It turns subsymbols into
// variable-length codes, one subsymbol per cycle.
//
// The coder state x in [L, 2L), L = 2^STATE_BITS, is held as x - L. For a y
// or z subsymbol the table entry for (table, symbol, state) is read from the
// shared tans_rom; one cycle later the coder emits the entry's nbits low bits
// of the state it addressed with and takes entry.next as its new state. To
// keep one subsymbol per cycle the next read is addressed straight from the
// table output (table data -> table address is the tightest loop, as in the
// document). A bypass subsymbol (raw z after an escape) is emitted as an
// 8-bit code and leaves the state alone. After the last subsymbol of a
// block the coder emits the final state as a STATE_BITS-bit code flagged
// blk_end and restarts the next block from x = L.
//
// Interface: valid/ready subsymbols in, valid/ready codes out, and a table
// read port (rom_*) whose data returns one cycle after rom_en, held while
// rom_en is low. Latency is one cycle; each block costs two idle input cycles
// for the final-state code. The initial state L and the final-state format
// are this design's choices. rom_is_y, rom_tbl and rom_sym are the incoming
// subsymbol's fields wired straight to the table address, so that the read
// starts in the cycle the subsymbol is accepted.
module ans_coder
  import loco_ans_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  subsym_t               in_data,
  input  logic                  in_valid,
  output logic                  in_ready,
  output code_t                 out_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  // table read port
  output logic                  rom_en,
  output logic                  rom_is_y,
  output logic [P_BITS-1:0]     rom_tbl,
  output logic [ZSYM_BITS-1:0]  rom_sym,
  output logic [STATE_BITS-1:0] rom_state,
  input  tans_entry_t           rom_q
);

  logic                  en, s1_valid, s1_rom, flush;
  subsym_t               s1;
  logic [STATE_BITS-1:0] s1_state, state_reg, state_now;
  logic                  accept;
  code_t                 code;

  assign en        = !out_valid || out_ready;
  assign s1_rom    = s1_valid && (s1.kind != SS_BYPASS);
  assign state_now = s1_rom ? rom_q.next : state_reg;
  assign in_ready  = en && !flush && !(s1_valid && s1.blk_end);
  assign accept    = in_valid && in_ready;

  assign rom_en    = accept && (in_data.kind != SS_BYPASS);
  assign rom_is_y  = (in_data.kind == SS_Y);
  assign rom_tbl   = in_data.tbl;
  assign rom_sym   = ZSYM_BITS'(in_data.value);
  assign rom_state = state_now;

  always_comb begin
    code         = '0;
    code.img_end = s1.img_end;
    if (flush) begin
      code.bits    = CODE_BITS'(state_reg);
      code.len     = CODE_LEN_W'(STATE_BITS);
      code.blk_end = 1'b1;
    end else if (s1.kind == SS_BYPASS) begin
      code.bits = CODE_BITS'(s1.value);
      code.len  = CODE_LEN_W'(Z_BITS);
    end else begin
      code.bits = CODE_BITS'({2'b00, s1_state} & ((CODE_BITS'(1) << rom_q.nbits) - 1'b1));
      code.len  = CODE_LEN_W'(rom_q.nbits);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1        <= '0;
      s1_state  <= '0;
      state_reg <= '0;
      flush     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (en) begin
      out_valid <= s1_valid || flush;
      out_data  <= code;
      if (flush) begin
        flush     <= 1'b0;
        state_reg <= '0;
      end else begin
        state_reg <= state_now;
        flush     <= s1_valid && s1.blk_end;
      end
      s1_valid <= accept;
      if (accept) begin
        s1       <= in_data;
        s1_state <= state_now;
      end
    end
  end

endmodule
