// loco_ans_encoder: two-lane LOCO-ANS lossless / near-lossless image encoder.
//
// Each lane compresses one image (or one vertical tile of an image): a pixel
// decorrelator turns pixels into prediction-error symbols with their context
// statistics, an St quantizer maps the statistics of z to a table index
// theta_q, and a dual-clock FIFO hands the symbols to the coder clock domain.
// There the double-lane TSG coder blocks, reverses, decomposes and tANS-codes
// the symbols of both lanes, sharing one set of tANS tables.
//
// Clocks: clk0 runs the decorrelators and St quantizers (initiation interval
// 2 pixels per cycle pair); clk1 runs the coder, which needs about 2.3 cycles
// per pixel on photographic images and therefore runs at roughly twice the
// frequency. Each domain has its own active-low reset.
//
// Interface (per lane l): start[l] with cfg_near/width/height (clk0), pixel
// stream px_* (clk0), the uncoded first pixel first_px* (clk0), done (clk0),
// and the coded byte stream byte_* (clk1). The tANS tables and the C value
// of each theta table are written through cfg_* on clk1 before coding. Header
// generation and DMA control, which sit after the coder, are left to the
// system around this block.
//
// LOSSLESS_ONLY = 1 builds the lossless-only variant: each lane then uses
// pixel_decorrelator_ls (NEAR fixed at 0, one pixel per cycle) and cfg_near
// is ignored. The default is the near-lossless encoder.
module loco_ans_encoder
  import loco_ans_pkg::*;
#(
  parameter int MAX_WIDTH    = 8192,
  parameter int BS           = 2048,
  parameter int NI           = 7,
  parameter int OS_DEPTH     = 16384,
  parameter int FIFO_DEPTH   = 16,
  parameter int MAX_THETA_ID = 14,
  parameter int P_TABLES     = 32,
  parameter bit LOSSLESS_ONLY = 1'b0
) (
  // ---- pixel clock domain ----
  input  logic                  clk0,
  input  logic                  rst0_n,
  input  logic [1:0]            start,
  input  logic [4:0]            cfg_near   [2],
  input  logic [13:0]           cfg_width  [2],
  input  logic [15:0]           cfg_height [2],
  output logic [1:0]            busy,
  output logic [1:0]            done,
  input  logic [PIXEL_BITS-1:0] px_data    [2],
  input  logic [1:0]            px_valid,
  output logic [1:0]            px_ready,
  output logic [PIXEL_BITS-1:0] first_px   [2],
  output logic [1:0]            first_px_valid,
  // ---- coder clock domain ----
  input  logic                  clk1,
  input  logic                  rst1_n,
  input  logic                  cfg_tans_we,
  input  logic                  cfg_is_y,
  input  logic [P_BITS-1:0]     cfg_tbl,
  input  logic [ZSYM_BITS-1:0]  cfg_sym,
  input  logic [STATE_BITS-1:0] cfg_state,
  input  tans_entry_t           cfg_entry,
  input  logic                  cfg_c_we,
  input  logic [THETA_BITS-1:0] cfg_theta,
  input  logic [LOG2C_BITS-1:0] cfg_log2c,
  output obyte_t                byte_data  [2],
  output logic [1:0]            byte_valid,
  input  logic [1:0]            byte_ready
);

  localparam int TSW = $bits(tsg_sym_t);

  dec_sym_t    dec_data [2];
  logic [1:0]  dec_valid, dec_ready;
  tsg_sym_t    stq_data [2];
  logic [1:0]  stq_valid, stq_ready;
  logic [TSW-1:0] cdc_data [2];
  tsg_sym_t    cod_data [2];
  logic [1:0]  cod_valid, cod_ready;

  for (genvar l = 0; l < 2; l++) begin : g_lane
    if (LOSSLESS_ONLY) begin : g_dec
      pixel_decorrelator_ls #(.MAX_WIDTH(MAX_WIDTH), .P_TABLES(P_TABLES)) u_dec (
        .clk (clk0), .rst_n (rst0_n),
        .start (start[l]), .cfg_width (cfg_width[l]),
        .cfg_height (cfg_height[l]), .busy (busy[l]), .done (done[l]),
        .px_data (px_data[l]), .px_valid (px_valid[l]), .px_ready (px_ready[l]),
        .first_px (first_px[l]), .first_px_valid (first_px_valid[l]),
        .sym_data (dec_data[l]), .sym_valid (dec_valid[l]), .sym_ready (dec_ready[l])
      );
    end else begin : g_dec
      pixel_decorrelator #(.MAX_WIDTH(MAX_WIDTH), .P_TABLES(P_TABLES)) u_dec (
        .clk (clk0), .rst_n (rst0_n),
        .start (start[l]), .cfg_near (cfg_near[l]), .cfg_width (cfg_width[l]),
        .cfg_height (cfg_height[l]), .busy (busy[l]), .done (done[l]),
        .px_data (px_data[l]), .px_valid (px_valid[l]), .px_ready (px_ready[l]),
        .first_px (first_px[l]), .first_px_valid (first_px_valid[l]),
        .sym_data (dec_data[l]), .sym_valid (dec_valid[l]), .sym_ready (dec_ready[l])
      );
    end

    st_quantizer #(.MAX_THETA_ID(MAX_THETA_ID)) u_stq (
      .clk (clk0), .rst_n (rst0_n),
      .in_data (dec_data[l]), .in_valid (dec_valid[l]), .in_ready (dec_ready[l]),
      .out_data(stq_data[l]), .out_valid(stq_valid[l]), .out_ready(stq_ready[l])
    );

    async_fifo #(.WIDTH(TSW), .DEPTH(FIFO_DEPTH)) u_cdc (
      .wr_clk (clk0), .wr_rst_n (rst0_n),
      .wr_data (stq_data[l]), .wr_valid (stq_valid[l]), .wr_ready (stq_ready[l]),
      .rd_clk (clk1), .rd_rst_n (rst1_n),
      .rd_data (cdc_data[l]), .rd_valid (cod_valid[l]), .rd_ready (cod_ready[l])
    );
    assign cod_data[l] = tsg_sym_t'(cdc_data[l]);
  end

  tsg_coder #(.BS(BS), .NI(NI), .OS_DEPTH(OS_DEPTH),
              .THETA_TABLES(MAX_THETA_ID + 1), .P_TABLES(P_TABLES)) u_coder (
    .clk (clk1), .rst_n (rst1_n),
    .cfg_tans_we, .cfg_is_y, .cfg_tbl, .cfg_sym, .cfg_state, .cfg_entry,
    .cfg_c_we, .cfg_theta, .cfg_log2c,
    .sym_data (cod_data), .sym_valid (cod_valid), .sym_ready (cod_ready),
    .byte_data, .byte_valid, .byte_ready
  );

endmodule
