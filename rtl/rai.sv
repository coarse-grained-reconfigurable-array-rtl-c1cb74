// rai: RoundAbout Interconnect element.
//
// A RAI element sits in the RAI column of the array, between the second and
// third CFU columns of a block, one per row. It has six inputs and six
// outputs and a 16-bit configuration register that selects, for each output,
// which input it carries. Ports, as placed around the element:
//   I2, I3  from the West CFU (its Out0, Out1)      O4, O5  to the East CFU (In0, In1)
//   I4, I5  from the RAI to the North (its O0, O1)  O0, O1  to the RAI to the South
//   I0, I1  from the RAI to the South (its O2, O3)  O2, O3  to the RAI to the North
// The permitted sources are the published SYSCORE architecture's: O0/O1 take any of I2-I5, O2/O3
// any of I0-I3, O4/O5 any of I0-I5. Data can therefore travel up or down the
// RAI column to reach a CFU in another row, which gives non-nearest-neighbour
// transfers such as FFT butterflies without a dense network.
//
// This design registers every output, so each hop through a RAI element costs
// one cycle like a hop through a CFU; this keeps the column free of long
// combinational paths. The code layout of the configuration word (rai_cfg_t)
// is this design's choice. In configuration mode cfg <= I4 and O0 shows cfg,
// so configuration words shift down the RAI column one element per cycle; in
// configuration and flush modes O4/O5 forward I2/I3 so the CFU row shift
// chains cross the RAI column. With global_en low all registers hold and all
// outputs are zero. Reset is asynchronous, active low.
module rai
  import syscore_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   global_en,
  input  logic                   config_en,
  input  logic                   flush_en,
  input  logic [5:0][DATA_W-1:0] i,
  output logic [5:0][DATA_W-1:0] o
);

  if (DATA_W < RAI_CFG_W) begin : g_width_check
    $error("rai: DATA_W must carry the %0d-bit configuration word", RAI_CFG_W);
  end

  rai_cfg_t                cfg;
  logic [5:0][DATA_W-1:0]  o_q;
  logic [5:0][DATA_W-1:0]  o_d;

  function automatic logic [DATA_W-1:0] pick6(logic [5:0][DATA_W-1:0] v, logic [2:0] s);
    return (s < 3'd6) ? v[s] : '0;
  endfunction

  always_comb begin
    o_d[0] = i[2 + 32'(cfg.o0)];
    o_d[1] = i[2 + 32'(cfg.o1)];
    o_d[2] = i[cfg.o2];
    o_d[3] = i[cfg.o3];
    o_d[4] = pick6(i, cfg.o4);
    o_d[5] = pick6(i, cfg.o5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
      o_q <= '0;
    end else if (global_en) begin
      if (config_en || flush_en) begin
        o_q    <= '0;
        o_q[4] <= i[2];
        o_q[5] <= i[3];
        if (config_en) cfg <= rai_cfg_t'(i[4][RAI_CFG_W-1:0]);
      end else begin
        o_q <= o_d;
      end
    end
  end

  always_comb begin
    o = '0;
    if (global_en) begin
      o = o_q;
      if (config_en) o[0] = DATA_W'(cfg);
    end
  end

endmodule
