// syscore_block: one ROWS x 4 block of the SYSCORE array.
//
// Each row holds four CFUs with a RAI element between the second and third:
//   CFU0 -> CFU1 -> RAI -> CFU2 -> CFU3
// Out0/Out1 of a CFU feed In0/In1 of its East neighbour (through the RAI
// after CFU1). Out1/Out2 of a CFU feed In2/In3 of the CFU below it. The RAI
// elements of a block form a column linked both ways: O0/O1 feed I4/I5 of the
// RAI below, O2/O3 feed I0/I1 of the RAI above.
// Edges: the West DMA drives In0/In1 of CFU0 in every row (west_in), the North
// DMA drives In2/In3 of each top-row CFU (north_cfu) and I4/I5 of the top RAI
// (north_rai). Out0/Out1 of CFU3 leave on the East edge (east_out). The top
// RAI's O2/O3 leave on the North edge (north_out). The bottom RAI's I0/I1 are
// tied to zero, and the South outputs of the bottom row are left unused.
// The block layout (8x4, RAI column after every second CFU column, West and
// North injection, East collection) is the published SYSCORE architecture's; which output port
// feeds which neighbour input is read from the block diagram's arrow count
// and is otherwise this design's choice.
// Control: config_en, flush_en and coeff_sel are shared by all elements,
// row_en is the per-row Global_en. No combinational path crosses a CFU or a
// RAI element, so every hop costs one clock cycle.
module syscore_block
  import syscore_pkg::*;
#(
  parameter int unsigned ROWS   = 8,
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned FRAC_W = 0
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [ROWS-1:0]                   row_en,
  input  logic                              config_en,
  input  logic                              flush_en,
  input  logic                              coeff_sel,
  input  logic [ROWS-1:0][1:0][DATA_W-1:0]  west_in,
  input  logic [3:0][1:0][DATA_W-1:0]       north_cfu,
  input  logic [1:0][DATA_W-1:0]            north_rai,
  output logic [ROWS-1:0][1:0][DATA_W-1:0]  east_out,
  output logic [1:0][DATA_W-1:0]            north_out
);

  // cfu_o[r][c][k]: output port k of CFU c in row r
  logic [DATA_W-1:0] cfu_o [ROWS][4][3];
  logic [DATA_W-1:0] cfu_i [ROWS][4][4];
  logic [5:0][DATA_W-1:0] rai_i [ROWS];
  logic [5:0][DATA_W-1:0] rai_o [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      // West inputs
      if (c == 0) begin : g_w_edge
        assign cfu_i[r][c][0] = west_in[r][0];
        assign cfu_i[r][c][1] = west_in[r][1];
      end else if (c == 2) begin : g_w_rai
        assign cfu_i[r][c][0] = rai_o[r][4];
        assign cfu_i[r][c][1] = rai_o[r][5];
      end else begin : g_w_cfu
        assign cfu_i[r][c][0] = cfu_o[r][c-1][0];
        assign cfu_i[r][c][1] = cfu_o[r][c-1][1];
      end
      // North inputs
      if (r == 0) begin : g_n_edge
        assign cfu_i[r][c][2] = north_cfu[c][0];
        assign cfu_i[r][c][3] = north_cfu[c][1];
      end else begin : g_n_cfu
        assign cfu_i[r][c][2] = cfu_o[r-1][c][1];
        assign cfu_i[r][c][3] = cfu_o[r-1][c][2];
      end

      cfu #(.DATA_W(DATA_W), .FRAC_W(FRAC_W)) u_cfu (
        .clk, .rst_n,
        .global_en (row_en[r]),
        .config_en, .flush_en, .coeff_sel,
        .in0  (cfu_i[r][c][0]),
        .in1  (cfu_i[r][c][1]),
        .in2  (cfu_i[r][c][2]),
        .in3  (cfu_i[r][c][3]),
        .out0 (cfu_o[r][c][0]),
        .out1 (cfu_o[r][c][1]),
        .out2 (cfu_o[r][c][2])
      );
    end

    // RAI element of this row
    assign rai_i[r][2] = cfu_o[r][1][0];
    assign rai_i[r][3] = cfu_o[r][1][1];
    if (r == 0) begin : g_rai_top
      assign rai_i[r][4] = north_rai[0];
      assign rai_i[r][5] = north_rai[1];
    end else begin : g_rai_mid
      assign rai_i[r][4] = rai_o[r-1][0];
      assign rai_i[r][5] = rai_o[r-1][1];
    end
    if (r == ROWS - 1) begin : g_rai_bot
      assign rai_i[r][0] = '0;
      assign rai_i[r][1] = '0;
    end else begin : g_rai_up
      assign rai_i[r][0] = rai_o[r+1][2];
      assign rai_i[r][1] = rai_o[r+1][3];
    end

    rai #(.DATA_W(DATA_W)) u_rai (
      .clk, .rst_n,
      .global_en (row_en[r]),
      .config_en, .flush_en,
      .i (rai_i[r]),
      .o (rai_o[r])
    );

    assign east_out[r][0] = cfu_o[r][3][0];
    assign east_out[r][1] = cfu_o[r][3][1];
  end

  assign north_out[0] = rai_o[0][2];
  assign north_out[1] = rai_o[0][3];

endmodule
