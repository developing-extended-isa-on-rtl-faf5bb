// rv32_pkg: types and constants shared by the RV32IM core.
//
// Holds the RV32I/RV32M opcodes, the ALU operation encoding (bit 2 = subtract, which inverts
// operand B and sets the adder carry-in; bits 1:0 pick AND/OR/XOR/ADD), the ALU result select,
// the branch comparison select, and the two control bundles the control unit hands to the
// datapath: main_ctrl_t (register write, write-back select, jump, memory and M-extension
// controls) and alu_ctrl_t (everything the ALU needs). The encodings of the ALU operation,
// result select and branch select follow the document; grouping the control wires into
// structs is this design's own choice.
//
// Some constants (XLEN, funct3 codes that are only compared through their bits) are given for
// completeness and are not referenced by every module.
package rv32_pkg;

  localparam int XLEN = 32;

  // Major opcodes (instruction bits 6:0)
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;

  // M-extension funct3 values
  localparam logic [2:0] F3_MUL    = 3'b000;
  localparam logic [2:0] F3_MULH   = 3'b001;
  localparam logic [2:0] F3_MULHSU = 3'b010;
  localparam logic [2:0] F3_MULHU  = 3'b011;
  localparam logic [2:0] F3_DIV    = 3'b100;
  localparam logic [2:0] F3_DIVU   = 3'b101;
  localparam logic [2:0] F3_REM    = 3'b110;
  localparam logic [2:0] F3_REMU   = 3'b111;

  // ALU operation: bit 2 = subtract, bits 1:0 = function
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_XOR = 3'b010,
    ALU_ADD = 3'b011,
    ALU_SUB = 3'b111
  } alu_op_e;

  // ALU output select
  typedef enum logic [1:0] {
    RES_ALU   = 2'b00,
    RES_SLT   = 2'b01,
    RES_SHIFT = 2'b10
  } result_sel_e;

  // Branch comparison (unsigned variants use uns_ctrl)
  typedef enum logic [1:0] {
    BR_EQ = 2'b00,
    BR_NE = 2'b01,
    BR_LT = 2'b10,
    BR_GE = 2'b11
  } br_sel_e;

  // Controls from the main control block
  typedef struct packed {
    logic reg_wr_en;     // write rd
    logic wb_ctrl;       // 1: write back data memory, 0: ALU
    logic j_ctrl;        // JAL / JALR
    logic ld_en;         // load
    logic st_en;         // store
    logic byte_ctrl;     // 8-bit access
    logic half_ctrl;     // 16-bit access
    logic word_ctrl;     // 32-bit access
    logic uns_ctrl;      // zero-extend load
    logic m_ext_en;      // M-extension instruction
    logic m_ext_wb_ctrl; // write back the M-extension result
  } main_ctrl_t;

  // Controls from the ALU control block
  typedef struct packed {
    alu_op_e     alu_ctrl;
    result_sel_e result_ctrl;
    br_sel_e     br_ctrl;
    logic        uns_ctrl;   // unsigned compare / logical right shift
    logic        imm_ctrl;   // operand B is the immediate
    logic        slt_ctrl;   // set-less-than
    logic        sh_ctrl;    // 0: shift left, 1: shift right
    logic        imm_en;     // I-type ALU instruction
    logic        lui_en;
    logic        auipc_en;
    logic        jal_en;
    logic        jalr_en;
    logic        br_en;      // conditional branch
    logic        ld_ctrl;    // load
    logic        st_ctrl;    // store
  } alu_ctrl_t;

endpackage
