// tsg_coder: the double-lane Two-Sided-Geometric coder. Each lane turns the
// symbol stream of one pixel decorrelator into a byte stream; both lanes share
// one set of tANS tables, each lane using one port of the dual-port memories,
// so neither lane ever waits for the other.
//
// Lane pipeline (every stage is a free-running valid/ready unit, as in a
// dataflow region synchronized only by its streams):
//   input_buffer        blocks of BS symbols, block order reversed
//   subsymbol_generator y, then z as z0 and C-valued subsymbols (or escape)
//   ans_coder           tANS codes from the shared tables, final state per block
//   bit_packer          codes packed LSB-first into bytes
//   output_stack        bytes of each block reversed
//
// Interface: tANS table and C configuration ports (written before coding),
// per-lane symbol inputs and byte outputs, all in the coder clock domain.
// Byte outputs carry blk_end on the last byte of each block and img_end on
// the last byte of the image.
module tsg_coder
  import loco_ans_pkg::*;
#(
  parameter int BS           = 2048,
  parameter int NI           = 7,
  parameter int OS_DEPTH     = 16384,
  parameter int THETA_TABLES = 15,
  parameter int P_TABLES     = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // table configuration
  input  logic                  cfg_tans_we,
  input  logic                  cfg_is_y,
  input  logic [P_BITS-1:0]     cfg_tbl,
  input  logic [ZSYM_BITS-1:0]  cfg_sym,
  input  logic [STATE_BITS-1:0] cfg_state,
  input  tans_entry_t           cfg_entry,
  input  logic                  cfg_c_we,
  input  logic [THETA_BITS-1:0] cfg_theta,
  input  logic [LOG2C_BITS-1:0] cfg_log2c,
  // symbol inputs, one per lane
  input  tsg_sym_t              sym_data  [2],
  input  logic [1:0]            sym_valid,
  output logic [1:0]            sym_ready,
  // byte outputs, one per lane
  output obyte_t                byte_data [2],
  output logic [1:0]            byte_valid,
  input  logic [1:0]            byte_ready
);

  blk_sym_t    ib_data  [2];
  logic [1:0]  ib_valid, ib_ready;
  subsym_t     ss_data  [2];
  logic [1:0]  ss_valid, ss_ready;
  code_t       cd_data  [2];
  logic [1:0]  cd_valid, cd_ready;
  obyte_t      bp_data  [2];
  logic [1:0]  bp_valid, bp_ready;

  logic [1:0]                  rom_en, rom_is_y;
  logic [P_BITS-1:0]           rom_tbl   [2];
  logic [ZSYM_BITS-1:0]        rom_sym   [2];
  logic [STATE_BITS-1:0]       rom_state [2];
  tans_entry_t                 rom_q     [2];

  tans_rom #(.THETA_TABLES(THETA_TABLES), .P_TABLES(P_TABLES)) u_rom (
    .clk,
    .cfg_we    (cfg_tans_we),
    .cfg_is_y, .cfg_tbl, .cfg_sym, .cfg_state, .cfg_entry,
    .a_en (rom_en[0]), .a_is_y (rom_is_y[0]), .a_tbl (rom_tbl[0]),
    .a_sym(rom_sym[0]), .a_state(rom_state[0]), .a_q(rom_q[0]),
    .b_en (rom_en[1]), .b_is_y (rom_is_y[1]), .b_tbl (rom_tbl[1]),
    .b_sym(rom_sym[1]), .b_state(rom_state[1]), .b_q(rom_q[1])
  );

  for (genvar l = 0; l < 2; l++) begin : g_lane
    input_buffer #(.BS(BS)) u_ib (
      .clk, .rst_n,
      .in_data (sym_data[l]), .in_valid (sym_valid[l]), .in_ready (sym_ready[l]),
      .out_data(ib_data[l]),  .out_valid(ib_valid[l]),  .out_ready(ib_ready[l])
    );

    subsymbol_generator #(.NI(NI), .THETA_TABLES(THETA_TABLES)) u_ssg (
      .clk, .rst_n,
      .cfg_we (cfg_c_we), .cfg_theta, .cfg_log2c,
      .in_data (ib_data[l]), .in_valid (ib_valid[l]), .in_ready (ib_ready[l]),
      .out_data(ss_data[l]), .out_valid(ss_valid[l]), .out_ready(ss_ready[l])
    );

    ans_coder u_ans (
      .clk, .rst_n,
      .in_data (ss_data[l]), .in_valid (ss_valid[l]), .in_ready (ss_ready[l]),
      .out_data(cd_data[l]), .out_valid(cd_valid[l]), .out_ready(cd_ready[l]),
      .rom_en (rom_en[l]), .rom_is_y (rom_is_y[l]), .rom_tbl (rom_tbl[l]),
      .rom_sym(rom_sym[l]), .rom_state(rom_state[l]), .rom_q (rom_q[l])
    );

    bit_packer u_bp (
      .clk, .rst_n,
      .in_data (cd_data[l]), .in_valid (cd_valid[l]), .in_ready (cd_ready[l]),
      .out_data(bp_data[l]), .out_valid(bp_valid[l]), .out_ready(bp_ready[l])
    );

    output_stack #(.OS_DEPTH(OS_DEPTH)) u_os (
      .clk, .rst_n,
      .in_data (bp_data[l]),   .in_valid (bp_valid[l]),   .in_ready (bp_ready[l]),
      .out_data(byte_data[l]), .out_valid(byte_valid[l]), .out_ready(byte_ready[l])
    );
  end

endmodule
