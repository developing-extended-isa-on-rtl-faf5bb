// b_alu_ctrl: ALU control block of the RV32IM core.
//
// Decodes opcode, funct3 and funct7 into the ALU control bundle: the ALU operation
// (AND/OR/XOR/ADD/SUB), which result leaves the ALU (logic/adder, set-less-than or barrel shifter),
// the branch comparison, signedness, whether operand B is the immediate, the shift direction, and
// one enable per instruction class (I-type, LUI, AUIPC, JAL, JALR, branch, load, store).
//
// The table follows the document's ALU control function table and model. Where they disagree this
// block takes the model: right shifts are logical when funct7[5] = 0 (SRL, SRLI) and arithmetic
// otherwise, and left shifts use shift direction 0 for both SLL and SLLI. Branch signedness is
// funct3[1]. M-extension instructions share the OP opcode; their ALU controls are unused.
//
// Timing: purely combinational.
//
// Of funct7 only bit 5 (SUB, SRA/SRAI) matters to the ALU; the other bits are unused.
module b_alu_ctrl
  import rv32_pkg::*;
(
  input  logic [6:0] ip_opcode,
  input  logic [2:0] ip_funct_3,
  input  logic [6:0] ip_funct_7,
  output alu_ctrl_t  op_ctrl
);

  // decode of funct3 shared by OP-IMM and OP (reg) instructions
  function automatic alu_ctrl_t arith_decode(input logic [2:0] f3, input logic f7_5, input logic is_reg);
    alu_ctrl_t c;
    c = '0;
    c.alu_ctrl    = ALU_ADD;
    c.result_ctrl = RES_ALU;
    unique case (f3)
      3'b000: c.alu_ctrl = (is_reg && f7_5) ? ALU_SUB : ALU_ADD;
      3'b001: begin c.result_ctrl = RES_SHIFT; c.sh_ctrl = 1'b0; end
      3'b010: begin c.alu_ctrl = ALU_SUB; c.result_ctrl = RES_SLT; c.slt_ctrl = 1'b1; end
      3'b011: begin c.alu_ctrl = ALU_SUB; c.result_ctrl = RES_SLT; c.slt_ctrl = 1'b1; c.uns_ctrl = 1'b1; end
      3'b100: c.alu_ctrl = ALU_XOR;
      3'b101: begin c.result_ctrl = RES_SHIFT; c.sh_ctrl = 1'b1; c.uns_ctrl = ~f7_5; end
      3'b110: c.alu_ctrl = ALU_OR;
      3'b111: c.alu_ctrl = ALU_AND;
    endcase
    return c;
  endfunction

  always_comb begin
    op_ctrl = '0;
    op_ctrl.alu_ctrl    = ALU_ADD;
    op_ctrl.result_ctrl = RES_ALU;
    op_ctrl.br_ctrl     = BR_EQ;
    unique case (ip_opcode)
      OP_LUI: begin
        op_ctrl.alu_ctrl = ALU_OR;
        op_ctrl.imm_ctrl = 1'b1;
        op_ctrl.lui_en   = 1'b1;
      end
      OP_AUIPC: begin
        op_ctrl.imm_ctrl = 1'b1;
        op_ctrl.auipc_en = 1'b1;
      end
      OP_JAL: begin
        op_ctrl.imm_ctrl = 1'b1;
        op_ctrl.jal_en   = 1'b1;
      end
      OP_JALR: begin
        op_ctrl.imm_ctrl = 1'b1;
        op_ctrl.jalr_en  = 1'b1;
      end
      OP_BRANCH: begin
        op_ctrl.alu_ctrl = ALU_SUB;
        op_ctrl.br_en    = 1'b1;
        op_ctrl.uns_ctrl = ip_funct_3[1];
        unique case (ip_funct_3)
          3'b001:         op_ctrl.br_ctrl = BR_NE;
          3'b100, 3'b110: op_ctrl.br_ctrl = BR_LT;
          3'b101, 3'b111: op_ctrl.br_ctrl = BR_GE;
          default:        op_ctrl.br_ctrl = BR_EQ;
        endcase
      end
      OP_LOAD: begin
        op_ctrl.imm_ctrl = 1'b1;
        op_ctrl.uns_ctrl = ip_funct_3[2];
        op_ctrl.ld_ctrl  = 1'b1;
      end
      OP_STORE: begin
        op_ctrl.imm_ctrl = 1'b1;
        op_ctrl.st_ctrl  = 1'b1;
      end
      OP_IMM: begin
        op_ctrl          = arith_decode(ip_funct_3, ip_funct_7[5], 1'b0);
        op_ctrl.imm_ctrl = 1'b1;
        op_ctrl.imm_en   = 1'b1;
      end
      OP_REG: op_ctrl = arith_decode(ip_funct_3, ip_funct_7[5], 1'b1);
      default: ;
    endcase
  end

endmodule
