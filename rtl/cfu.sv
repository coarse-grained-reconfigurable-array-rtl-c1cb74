// cfu: Configurable Function Unit, the processing element of the SYSCORE array.
//
// A CFU has four input ports (In0, In1 from the West neighbour, In2, In3 from
// the North neighbour) and three output ports (Out0, Out1 to the East, Out1
// and Out2 to the South). It holds two general purpose registers (GPR0 loads
// from In0 or In1, GPR1 from In2 or In3), two coefficient registers (CER0,
// CER1), a compute unit (CU) with a result register (CU_reg) and a 32-bit
// configuration register whose field layout is defined in syscore_pkg. All
// data registers are DATA_W bits wide, 22 by default. Each output port is a
// multiplexer over CU_reg, GPR0 and GPR1, so the unit can forward two data
// words in the same cycle as it computes one result.
//
// The CU takes three operands A, B, C chosen by the ALU0/1/2 fields and
// computes ADD (A+B), SUB (A-B), MUL (A*B), MAD (A*B+C) or MSU (C-A*B) in one
// cycle, two's complement with wrap-around. Products are shifted right by
// FRAC_W bits (0 = integer arithmetic) before the add. Choosing C = CU_reg
// turns MAD into a multiply-accumulate.
//
// Modes (control inputs are shared by the whole array, global_en per row):
//   configuration (config_en=1): cfg <= In2, CER[coeff_sel] <= In0, GPRs and
//     CU_reg cleared. Out1 shows cfg and Out0 shows CER[coeff_sel], so the
//     configuration words shift down each column and coefficients shift along
//     each row, one unit per cycle.
//   execution: registers update as configured.
//   flush (flush_en=1): CU_reg <= In0 and Out0 = CU_reg, so accumulated
//     results shift East one unit per cycle towards the output DMA.
//   power off (global_en=0): every register holds and all outputs are zero.
// The four modes and their control signals are the published SYSCORE architecture's; the shift
// chains used for configuration and flush, the operand encodings, clearing
// on configuration and zeroed outputs when off are this design's choices.
// Outputs are combinational functions of registers only, so each unit is one
// pipeline stage. Reset is asynchronous, active low, and clears all registers.
module cfu
  import syscore_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned FRAC_W = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              global_en,
  input  logic              config_en,
  input  logic              flush_en,
  input  logic              coeff_sel,
  input  logic [DATA_W-1:0] in0,
  input  logic [DATA_W-1:0] in1,
  input  logic [DATA_W-1:0] in2,
  input  logic [DATA_W-1:0] in3,
  output logic [DATA_W-1:0] out0,
  output logic [DATA_W-1:0] out1,
  output logic [DATA_W-1:0] out2
);

  if (DATA_W < CFG_USED_W) begin : g_width_check
    $error("cfu: DATA_W must carry the %0d-bit configuration word", CFG_USED_W);
  end

  typedef logic signed [DATA_W-1:0]   word_t;
  typedef logic signed [2*DATA_W-1:0] prod_t;

  cfu_cfg_t cfg;
  word_t    gpr0, gpr1, cer0, cer1, cu_reg;
  word_t    opa, opb, opc, cu_res;
  prod_t    prod;
  word_t    prod_w;

  // Operand multiplexers
  always_comb begin
    unique case (cfg.alu0)
      A_IN0:   opa = in0;
      A_IN1:   opa = in1;
      A_IN2:   opa = in2;
      A_IN3:   opa = in3;
      A_GPR0:  opa = gpr0;
      A_GPR1:  opa = gpr1;
      default: opa = '0;
    endcase
    unique case (cfg.alu1)
      B_IN0:   opb = in0;
      B_IN1:   opb = in1;
      B_IN2:   opb = in2;
      B_IN3:   opb = in3;
      B_CER0:  opb = cer0;
      B_CER1:  opb = cer1;
      B_GPR0:  opb = gpr0;
      default: opb = gpr1;
    endcase
    unique case (cfg.alu2)
      C_IN0:   opc = in0;
      C_IN1:   opc = in1;
      C_IN2:   opc = in2;
      C_IN3:   opc = in3;
      C_CER0:  opc = cer0;
      C_GPR0:  opc = gpr0;
      C_GPR1:  opc = gpr1;
      default: opc = cu_reg;
    endcase
  end

  // Compute unit: one multiplier and one adder
  always_comb begin
    prod   = prod_t'(opa) * prod_t'(opb);
    prod_w = word_t'(prod >>> FRAC_W);
    unique case (cfg.op)
      OP_ADD:  cu_res = opa + opb;
      OP_SUB:  cu_res = opa - opb;
      OP_MUL:  cu_res = prod_w;
      OP_MAD:  cu_res = prod_w + opc;
      OP_MSU:  cu_res = opc - prod_w;
      default: cu_res = cu_reg;
    endcase
  end

  // Registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg    <= '0;
      gpr0   <= '0;
      gpr1   <= '0;
      cer0   <= '0;
      cer1   <= '0;
      cu_reg <= '0;
    end else if (global_en) begin
      if (config_en) begin
        cfg    <= cfu_cfg_t'(CFG_W'(in2[CFG_USED_W-1:0]));
        if (coeff_sel) cer1 <= in0;
        else           cer0 <= in0;
        gpr0   <= '0;
        gpr1   <= '0;
        cu_reg <= '0;
      end else if (flush_en) begin
        cu_reg <= in0;
      end else begin
        cu_reg <= cu_res;
        unique case (cfg.reg0_sel)
          R_LO:    gpr0 <= in0;
          R_HI:    gpr0 <= in1;
          default: ;
        endcase
        unique case (cfg.reg1_sel)
          R_LO:    gpr1 <= in2;
          R_HI:    gpr1 <= in3;
          default: ;
        endcase
      end
    end
  end

  function automatic word_t out_mux(out_sel_e s, word_t r, word_t g0, word_t g1);
    unique case (s)
      O_CUREG: return r;
      O_GPR0:  return g0;
      O_GPR1:  return g1;
      default: return '0;
    endcase
  endfunction

  // Output multiplexers
  always_comb begin
    out0 = '0;
    out1 = '0;
    out2 = '0;
    if (global_en) begin
      if (config_en) begin
        out0 = coeff_sel ? cer1 : cer0;
        out1 = DATA_W'(cfg[CFG_USED_W-1:0]);
      end else begin
        out0 = flush_en ? cu_reg : out_mux(cfg.op0_sel, cu_reg, gpr0, gpr1);
        out1 = out_mux(cfg.op1_sel, cu_reg, gpr0, gpr1);
        out2 = out_mux(cfg.op2_sel, cu_reg, gpr0, gpr1);
      end
    end
  end

endmodule
