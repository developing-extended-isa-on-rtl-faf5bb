// b_main_ctrl: main control block of the RV32IM core.
//
// Decodes the opcode, funct3 and funct7 of an instruction into the controls that steer the
// datapath outside the ALU: register write enable, write-back source (ALU or data memory), jump,
// load and store enables with the access size (byte/half/word from funct3[1:0]) and load
// zero-extension (funct3[2]), and the M-extension enable and write-back select (OP register-register
// with funct7[0] = 1). It also passes opcode, funct3 and funct7 on to the ALU control block, as the
// document's interface does.
//
// The decode follows the document's function table and model; branches and stores write no
// register (the table writes one, the model does not for stores, RV32I writes none), and unknown
// opcodes produce no action: both are this design's reading.
//
// Timing: purely combinational.
module b_main_ctrl
  import rv32_pkg::*;
(
  input  logic [6:0] ip_opcode,
  input  logic [2:0] ip_funct_3,
  input  logic [6:0] ip_funct_7,
  output logic [6:0] op_opcode,
  output logic [2:0] op_funct_3,
  output logic [6:0] op_funct_7,
  output main_ctrl_t op_ctrl
);

  assign op_opcode  = ip_opcode;
  assign op_funct_3 = ip_funct_3;
  assign op_funct_7 = ip_funct_7;

  always_comb begin
    op_ctrl = '0;
    unique case (ip_opcode)
      OP_LUI, OP_AUIPC, OP_IMM: op_ctrl.reg_wr_en = 1'b1;
      OP_JAL, OP_JALR: begin
        op_ctrl.reg_wr_en = 1'b1;
        op_ctrl.j_ctrl    = 1'b1;
      end
      OP_BRANCH: ;
      OP_LOAD: begin
        op_ctrl.reg_wr_en = 1'b1;
        op_ctrl.wb_ctrl   = 1'b1;
        op_ctrl.ld_en     = 1'b1;
        op_ctrl.uns_ctrl  = ip_funct_3[2];
        op_ctrl.byte_ctrl = (ip_funct_3[1:0] == 2'b00);
        op_ctrl.half_ctrl = (ip_funct_3[1:0] == 2'b01);
        op_ctrl.word_ctrl = (ip_funct_3[1:0] == 2'b10);
      end
      OP_STORE: begin
        op_ctrl.st_en     = 1'b1;
        op_ctrl.byte_ctrl = (ip_funct_3[1:0] == 2'b00);
        op_ctrl.half_ctrl = (ip_funct_3[1:0] == 2'b01);
        op_ctrl.word_ctrl = (ip_funct_3[1:0] == 2'b10);
      end
      OP_REG: begin
        op_ctrl.reg_wr_en = 1'b1;
        if (ip_funct_7[0]) begin
          op_ctrl.m_ext_en      = 1'b1;
          op_ctrl.m_ext_wb_ctrl = 1'b1;
        end
      end
      default: ;
    endcase
  end

endmodule
