// u_ctrl: control unit of the RV32IM core.
//
// Splits the instruction into opcode (bits 6:0), funct3 (bits 14:12) and funct7 (bits 31:25) and
// decodes them in the main control block, whose copies of those fields feed the ALU control block,
// as in the document's block hierarchy. op_main steers register write-back, memory and the M
// extension; op_alu steers the ALU.
//
// Timing: purely combinational.
//
// Only the opcode, funct3 and funct7 fields are decoded; the register fields of ip_instr are
// left to the datapath and are unused here.
module u_ctrl
  import rv32_pkg::*;
(
  input  logic [31:0] ip_instr,
  output main_ctrl_t  op_main,
  output alu_ctrl_t   op_alu
);

  logic [6:0] opcode, funct_7;
  logic [2:0] funct_3;

  b_main_ctrl u_main_ctrl (
    .ip_opcode  (ip_instr[6:0]),
    .ip_funct_3 (ip_instr[14:12]),
    .ip_funct_7 (ip_instr[31:25]),
    .op_opcode  (opcode),
    .op_funct_3 (funct_3),
    .op_funct_7 (funct_7),
    .op_ctrl    (op_main)
  );

  b_alu_ctrl u_alu_ctrl (
    .ip_opcode  (opcode),
    .ip_funct_3 (funct_3),
    .ip_funct_7 (funct_7),
    .op_ctrl    (op_alu)
  );

endmodule
