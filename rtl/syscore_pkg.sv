// syscore_pkg: types and constants shared by the SYSCORE array.
//
// The CFU configuration word follows the bit map of the CFU configuration
// register: 22 used bits in a 32-bit register, upper 10 bits reserved. Field
// positions and the option lists of each field are the published SYSCORE architecture's; the
// numeric code given to each option is this design's choice. The RAI
// configuration word packs six output-source selectors into 14 of its 16
// bits; that layout is this design's own.
package syscore_pkg;

  // Datapath width: the published architecture settles on 22 bits as its bitwidth/SNR trade-off.
  localparam int unsigned DATA_W_DEF = 22;
  localparam int unsigned CFG_W      = 32;  // CFU configuration register
  localparam int unsigned CFG_USED_W = 22;  // bits of it that are defined
  localparam int unsigned RAI_CFG_W  = 16;  // RAI configuration register

  // CU operation (bits 2:0)
  typedef enum logic [2:0] {
    OP_ADD = 3'd0,   // A + B
    OP_SUB = 3'd1,   // A - B
    OP_MUL = 3'd2,   // A * B
    OP_MAD = 3'd3,   // A * B + C
    OP_MSU = 3'd4,   // C - A * B
    OP_NOP = 3'd7    // CU register holds
  } cu_op_e;

  // Operand A selector (ALU0, bits 5:3): In0-In3, GPR0, GPR1
  typedef enum logic [2:0] {
    A_IN0 = 3'd0, A_IN1 = 3'd1, A_IN2 = 3'd2, A_IN3 = 3'd3,
    A_GPR0 = 3'd4, A_GPR1 = 3'd5, A_ZERO = 3'd6, A_ZERO2 = 3'd7
  } alu0_sel_e;

  // Operand B selector (ALU1, bits 8:6): In0-In3, CER0, CER1, GPR0, GPR1
  typedef enum logic [2:0] {
    B_IN0 = 3'd0, B_IN1 = 3'd1, B_IN2 = 3'd2, B_IN3 = 3'd3,
    B_CER0 = 3'd4, B_CER1 = 3'd5, B_GPR0 = 3'd6, B_GPR1 = 3'd7
  } alu1_sel_e;

  // Operand C selector (ALU2, bits 11:9): In0-In3, CER0, GPR0, GPR1, CU register.
  // The published architecture lists nine sources for this 3-bit field; CER1 is left out.
  typedef enum logic [2:0] {
    C_IN0 = 3'd0, C_IN1 = 3'd1, C_IN2 = 3'd2, C_IN3 = 3'd3,
    C_CER0 = 3'd4, C_GPR0 = 3'd5, C_GPR1 = 3'd6, C_CUREG = 3'd7
  } alu2_sel_e;

  // GPR0 load source (bits 13:12) and GPR1 load source (bits 15:14)
  typedef enum logic [1:0] {
    R_LO = 2'd0,     // GPR0 <- In0, GPR1 <- In2
    R_HI = 2'd1,     // GPR0 <- In1, GPR1 <- In3
    R_HOLD = 2'd2,   // register keeps its value
    R_HOLD2 = 2'd3
  } reg_sel_e;

  // Output port source (bits 17:16, 19:18, 21:20)
  typedef enum logic [1:0] {
    O_CUREG = 2'd0, O_GPR0 = 2'd1, O_GPR1 = 2'd2, O_ZERO = 2'd3
  } out_sel_e;

  typedef struct packed {
    logic [CFG_W-CFG_USED_W-1:0] rsvd;  // 31:22
    out_sel_e  op2_sel;                 // 21:20
    out_sel_e  op1_sel;                 // 19:18
    out_sel_e  op0_sel;                 // 17:16
    reg_sel_e  reg1_sel;                // 15:14
    reg_sel_e  reg0_sel;                // 13:12
    alu2_sel_e alu2;                    // 11:9
    alu1_sel_e alu1;                    // 8:6
    alu0_sel_e alu0;                    // 5:3
    cu_op_e    op;                      // 2:0
  } cfu_cfg_t;

  // RAI: each output selects one of the inputs allowed for it.
  //   O0, O1 (to the South):  2-bit code k selects I(2+k)   (I2..I5)
  //   O2, O3 (to the North):  2-bit code k selects I(k)     (I0..I3)
  //   O4, O5 (to the East):   3-bit code k selects I(k), 6 and 7 give zero
  typedef struct packed {
    logic [1:0] rsvd;   // 15:14
    logic [2:0] o5;     // 13:11
    logic [2:0] o4;     // 10:8
    logic [1:0] o3;     // 7:6
    logic [1:0] o2;     // 5:4
    logic [1:0] o1;     // 3:2
    logic [1:0] o0;     // 1:0
  } rai_cfg_t;

  // Array operating modes (the power-off mode is applied per row).
  typedef enum logic [1:0] {
    MODE_CONFIG = 2'd0,
    MODE_EXEC   = 2'd1,
    MODE_FLUSH  = 2'd2,
    MODE_IDLE   = 2'd3
  } mode_e;

endpackage
