// b_alu: arithmetic logic unit of the RV32IM core, with its immediate extender and the
// branch/jump target adder.
//
// ip_instr_imm carries instruction bits 31:7, from which the I, S, B, U and J immediates are cut
// and sign-extended from bit 31. Operand A is rs1, the PC (AUIPC, JAL, JALR) or zero (LUI); operand B is
// rs2, the immediate (ip_imm_ctrl) or the constant 4 (JAL, JALR, which write PC + 4). The unit
// computes AND, OR, XOR, ADD or SUB on them (SUB inverts operand B and sets the carry-in), a barrel
// shifter shifts rs1 left, right logical or right arithmetic by operand B bits 4:0, and
// set-less-than takes sign XOR overflow (signed) or the inverted carry (unsigned) of the
// subtraction. ip_result_ctrl selects which of the three is op_result. For conditional branches the
// same subtraction and compare decide op_br_ctrl (BEQ, BNE, BLT(U), BGE(U)). A second adder forms
// op_br_addr = PC + B/J offset, or rs1 + I offset with bit 0 cleared for JALR. op_imm passes rs2
// to the data memory on stores. op_overflow flags signed overflow of an ADD/ADDI/SUB, and a register
// shift whose amount does not fit in 5 bits.
//
// The control encodings, the operand multiplexers and the SLT rule follow the document. Using the
// SLT rule also for BLT/BGE, the RV32I immediate layout (sign-extended, branch offsets in units of 2
// bytes) and a combinational block without a clock are this design's choices, see the README.
//
// Timing: purely combinational.
//
// The I-type enable of the control bundle is not needed here (the immediate select covers it).
module b_alu
  import rv32_pkg::*;
(
  input  logic [31:0] ip_rs1,
  input  logic [31:0] ip_rs2,
  input  logic [31:0] ip_pc,
  input  logic [24:0] ip_instr_imm,
  input  alu_ctrl_t   ip_ctrl,
  output logic [31:0] op_result,
  output logic [31:0] op_imm,
  output logic        op_overflow,
  output logic [31:0] op_br_addr,
  output logic        op_br_ctrl
);

  // instruction bit n is ip_instr_imm[n-7]
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;
  assign imm_i = {{20{ip_instr_imm[24]}}, ip_instr_imm[24:13]};
  assign imm_s = {{20{ip_instr_imm[24]}}, ip_instr_imm[24:18], ip_instr_imm[4:0]};
  assign imm_b = {{20{ip_instr_imm[24]}}, ip_instr_imm[0], ip_instr_imm[23:18], ip_instr_imm[4:1], 1'b0};
  assign imm_u = {ip_instr_imm[24:5], 12'b0};
  assign imm_j = {{12{ip_instr_imm[24]}}, ip_instr_imm[12:5], ip_instr_imm[13], ip_instr_imm[23:14], 1'b0};

  logic [31:0] imm_ext;
  always_comb begin
    if (ip_ctrl.st_ctrl)                          imm_ext = imm_s;
    else if (ip_ctrl.lui_en || ip_ctrl.auipc_en)  imm_ext = imm_u;
    else                                          imm_ext = imm_i;
  end

  // operand selection
  logic [31:0] operand_a, operand_b;
  always_comb begin
    if (ip_ctrl.lui_en)                         operand_a = '0;
    else if (ip_ctrl.auipc_en || ip_ctrl.jal_en || ip_ctrl.jalr_en) operand_a = ip_pc;
    else                                        operand_a = ip_rs1;

    if (ip_ctrl.jal_en || ip_ctrl.jalr_en) operand_b = 32'd4;
    else if (ip_ctrl.imm_ctrl)             operand_b = imm_ext;
    else                                   operand_b = ip_rs2;
  end

  // logic unit and adder / subtractor
  logic        sub;
  logic [31:0] b_in;
  logic [32:0] sum;
  logic [31:0] result_alu;
  logic        carry_out, add_ovf;
  assign sub  = ip_ctrl.alu_ctrl[2];
  assign b_in = operand_b ^ {32{sub}};
  assign sum  = {1'b0, operand_a} + {1'b0, b_in} + 33'(sub);
  assign carry_out = sum[32];
  assign add_ovf   = (operand_a[31] == b_in[31]) && (sum[31] != operand_a[31]);

  always_comb begin
    unique case (ip_ctrl.alu_ctrl[1:0])
      2'b00:   result_alu = operand_a & operand_b;
      2'b01:   result_alu = operand_a | operand_b;
      2'b10:   result_alu = operand_a ^ operand_b;
      default: result_alu = sum[31:0];
    endcase
  end

  // less-than of the subtraction: signed = sign ^ overflow, unsigned = borrow
  logic less;
  assign less = ip_ctrl.uns_ctrl ? ~carry_out : (sum[31] ^ add_ovf);

  // barrel shifter
  logic [4:0]  shamt;
  logic [31:0] result_sh;
  assign shamt = operand_b[4:0];
  always_comb begin
    if (!ip_ctrl.sh_ctrl)      result_sh = ip_rs1 << shamt;
    else if (ip_ctrl.uns_ctrl) result_sh = ip_rs1 >> shamt;
    else                       result_sh = 32'($signed(ip_rs1) >>> shamt);
  end

  always_comb begin
    unique case (ip_ctrl.result_ctrl)
      RES_SLT:   op_result = {31'b0, less & ip_ctrl.slt_ctrl};
      RES_SHIFT: op_result = result_sh;
      default:   op_result = result_alu;
    endcase
  end

  // overflow flag for arithmetic instructions
  logic arith;
  assign arith = !(ip_ctrl.lui_en || ip_ctrl.auipc_en || ip_ctrl.jal_en || ip_ctrl.jalr_en ||
                   ip_ctrl.br_en || ip_ctrl.ld_ctrl || ip_ctrl.st_ctrl);
  always_comb begin
    op_overflow = 1'b0;
    if (arith && ip_ctrl.result_ctrl == RES_ALU && ip_ctrl.alu_ctrl[1:0] == 2'b11)
      op_overflow = add_ovf;
    else if (arith && ip_ctrl.result_ctrl == RES_SHIFT && !ip_ctrl.imm_ctrl)
      op_overflow = (ip_rs2[31:5] != '0);
  end

  // branch decision
  always_comb begin
    op_br_ctrl = 1'b0;
    if (ip_ctrl.br_en) begin
      unique case (ip_ctrl.br_ctrl)
        BR_EQ: op_br_ctrl = (sum[31:0] == '0);
        BR_NE: op_br_ctrl = (sum[31:0] != '0);
        BR_LT: op_br_ctrl = less;
        BR_GE: op_br_ctrl = ~less;
      endcase
    end
  end

  // branch / jump target adder
  logic [31:0] br_base, br_offset, br_sum;
  always_comb begin
    br_base = ip_ctrl.jalr_en ? ip_rs1 : ip_pc;
    if (ip_ctrl.jalr_en)     br_offset = imm_i;
    else if (ip_ctrl.jal_en) br_offset = imm_j;
    else                     br_offset = imm_b;
  end
  assign br_sum     = br_base + br_offset;
  assign op_br_addr = ip_ctrl.jalr_en ? {br_sum[31:1], 1'b0} : br_sum;

  assign op_imm = ip_ctrl.st_ctrl ? ip_rs2 : '0;

endmodule
