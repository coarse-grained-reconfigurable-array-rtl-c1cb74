// syscore_top: the SYSCORE coarse-grained reconfigurable array with its DMAs.
//
// BLOCKS blocks of ROWS x 4 CFUs are placed side by side (two 8x4 blocks make
// the 8x8 array), the East outputs of one block feeding the West inputs of the
// next. Physical columns, West to East, for the default size:
//   CFU CFU RAI CFU CFU | CFU CFU RAI CFU CFU
// A West input DMA drives In0/In1 of the first CFU of every row (lane 2r+k is
// row r, port In k). A North input DMA drives the top row: for block b, lane
// 10b+2c+k is In(2+k) of CFU column c, and lanes 10b+8 and 10b+9 are I4/I5 of
// the block's top RAI element. An output DMA captures Out0/Out1 of the last
// CFU of every row (lane 2r+k is row r, Out k). mode_ctrl turns host commands
// into Config_en, Flush_en, Coeff_sel and per-row Global_en for all blocks.
// The O2/O3 outputs of each block's top RAI element are brought out as
// north_out.
//
// Using the array: (1) load the DMA buffers; (2) issue a configuration command
// of ROWS+1 cycles and start the North DMA (configuration words, bottom row
// first) and West DMA (coefficients, last column first) in the same cycle;
// (3) issue an execution command and start the input DMAs with the operands;
// (4) issue a flush command and start the output DMA to collect accumulated
// results. Any input DMA beat k started with a command appears at the array
// inputs for its (k+2)-th active edge, because the DMA registers its output.
// The host processor that issues these commands is outside this module.
module syscore_top
  import syscore_pkg::*;
#(
  parameter int unsigned ROWS      = 8,
  parameter int unsigned BLOCKS    = 2,
  parameter int unsigned DATA_W    = DATA_W_DEF,
  parameter int unsigned FRAC_W    = 0,
  parameter int unsigned DMA_DEPTH = 256,
  parameter int unsigned CW        = 16,
  localparam int unsigned W_LANES  = 2 * ROWS,
  localparam int unsigned N_LANES  = 10 * BLOCKS,
  localparam int unsigned O_LANES  = 2 * ROWS,
  localparam int unsigned AW       = $clog2(DMA_DEPTH),
  localparam int unsigned WLW      = $clog2(W_LANES),
  localparam int unsigned NLW      = $clog2(N_LANES),
  localparam int unsigned OLW      = $clog2(O_LANES)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // mode control
  input  logic                              row_on_we,
  input  logic [ROWS-1:0]                   row_on_in,
  input  logic                              cmd_valid,
  output logic                              cmd_ready,
  input  mode_e                             cmd_mode,
  input  logic [CW-1:0]                     cmd_cycles,
  input  logic                              cmd_coeff_sel,
  output logic                              array_busy,
  // West input DMA
  input  logic                              wdma_wr_en,
  input  logic [AW-1:0]                     wdma_wr_addr,
  input  logic [WLW-1:0]                    wdma_wr_lane,
  input  logic [DATA_W-1:0]                 wdma_wr_data,
  input  logic                              wdma_start,
  input  logic [AW-1:0]                     wdma_base,
  input  logic [AW:0]                       wdma_len,
  output logic                              wdma_busy,
  // North input DMA
  input  logic                              ndma_wr_en,
  input  logic [AW-1:0]                     ndma_wr_addr,
  input  logic [NLW-1:0]                    ndma_wr_lane,
  input  logic [DATA_W-1:0]                 ndma_wr_data,
  input  logic                              ndma_start,
  input  logic [AW-1:0]                     ndma_base,
  input  logic [AW:0]                       ndma_len,
  output logic                              ndma_busy,
  // East output DMA
  input  logic                              odma_start,
  input  logic [AW-1:0]                     odma_base,
  input  logic [AW:0]                       odma_len,
  output logic                              odma_busy,
  output logic                              odma_done,
  input  logic [AW-1:0]                     odma_rd_addr,
  input  logic [OLW-1:0]                    odma_rd_lane,
  output logic [DATA_W-1:0]                 odma_rd_data,
  // North outputs of the RAI columns
  output logic [BLOCKS-1:0][1:0][DATA_W-1:0] north_out
);

  logic            config_en, flush_en, coeff_sel;
  logic [ROWS-1:0] row_en;

  logic [W_LANES-1:0][DATA_W-1:0] w_lanes;
  logic [N_LANES-1:0][DATA_W-1:0] n_lanes;
  logic [ROWS-1:0][1:0][DATA_W-1:0] blk_west [BLOCKS];
  logic [ROWS-1:0][1:0][DATA_W-1:0] blk_east [BLOCKS];

  mode_ctrl #(.ROWS(ROWS), .CW(CW)) u_ctrl (
    .clk, .rst_n,
    .row_on_we, .row_on_in,
    .cmd_valid, .cmd_ready, .cmd_mode, .cmd_cycles, .cmd_coeff_sel,
    .config_en, .flush_en, .coeff_sel, .row_en,
    .busy (array_busy)
  );

  input_dma #(.LANES(W_LANES), .DATA_W(DATA_W), .DEPTH(DMA_DEPTH)) u_wdma (
    .clk, .rst_n,
    .wr_en (wdma_wr_en), .wr_addr (wdma_wr_addr), .wr_lane (wdma_wr_lane),
    .wr_data (wdma_wr_data),
    .start (wdma_start), .base (wdma_base), .len (wdma_len), .busy (wdma_busy),
    .lanes (w_lanes)
  );

  input_dma #(.LANES(N_LANES), .DATA_W(DATA_W), .DEPTH(DMA_DEPTH)) u_ndma (
    .clk, .rst_n,
    .wr_en (ndma_wr_en), .wr_addr (ndma_wr_addr), .wr_lane (ndma_wr_lane),
    .wr_data (ndma_wr_data),
    .start (ndma_start), .base (ndma_base), .len (ndma_len), .busy (ndma_busy),
    .lanes (n_lanes)
  );

  for (genvar b = 0; b < BLOCKS; b++) begin : g_blk
    logic [3:0][1:0][DATA_W-1:0] n_cfu;
    logic [1:0][DATA_W-1:0]      n_rai;

    for (genvar c = 0; c < 4; c++) begin : g_nc
      assign n_cfu[c][0] = n_lanes[10*b + 2*c];
      assign n_cfu[c][1] = n_lanes[10*b + 2*c + 1];
    end
    assign n_rai[0] = n_lanes[10*b + 8];
    assign n_rai[1] = n_lanes[10*b + 9];

    if (b == 0) begin : g_w_dma
      assign blk_west[b] = w_lanes;
    end else begin : g_w_blk
      assign blk_west[b] = blk_east[b-1];
    end

    syscore_block #(.ROWS(ROWS), .DATA_W(DATA_W), .FRAC_W(FRAC_W)) u_block (
      .clk, .rst_n,
      .row_en, .config_en, .flush_en, .coeff_sel,
      .west_in   (blk_west[b]),
      .north_cfu (n_cfu),
      .north_rai (n_rai),
      .east_out  (blk_east[b]),
      .north_out (north_out[b])
    );
  end

  output_dma #(.LANES(O_LANES), .DATA_W(DATA_W), .DEPTH(DMA_DEPTH)) u_odma (
    .clk, .rst_n,
    .lanes (blk_east[BLOCKS-1]),
    .start (odma_start), .base (odma_base), .len (odma_len),
    .busy (odma_busy), .done (odma_done),
    .rd_addr (odma_rd_addr), .rd_lane (odma_rd_lane), .rd_data (odma_rd_data)
  );

endmodule
