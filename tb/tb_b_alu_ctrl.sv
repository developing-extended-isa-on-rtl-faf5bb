// tb_b_alu_ctrl: self-checking testbench for the ALU control block.
//
// Walks every RV32I opcode/funct3 (and funct7[5] where it matters) and compares the ALU control
// bundle with the expected row of the ALU-control function table: ALU operation, result select,
// branch select, unsigned flag, immediate select, set-less-than, shift direction and the
// instruction-class enables.
module tb_b_alu_ctrl;
  import rv32_pkg::*;

  logic [6:0] opcode, funct_7;
  logic [2:0] funct_3;
  alu_ctrl_t  c, e;
  int checks = 0, failures = 0;

  b_alu_ctrl dut (.ip_opcode(opcode), .ip_funct_3(funct_3), .ip_funct_7(funct_7), .op_ctrl(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected fields compared: alu_ctrl (when used), result_ctrl, br_ctrl (branches), uns, imm_ctrl,
  // slt, sh (shifts), and the class enables
  task automatic expect_row(input logic [6:0] op, input logic [2:0] f3, input logic f7_5);
    alu_ctrl_t x;
    bit care_alu, care_sh;
    x = '0; care_alu = 1; care_sh = 0;
    x.alu_ctrl = ALU_ADD; x.result_ctrl = RES_ALU; x.br_ctrl = BR_EQ;
    case (op)
      7'b0110111: begin x.alu_ctrl = ALU_OR; x.imm_ctrl = 1; x.lui_en = 1; end
      7'b0010111: begin x.imm_ctrl = 1; x.auipc_en = 1; end
      7'b1101111: begin x.imm_ctrl = 1; x.jal_en = 1; end
      7'b1100111: begin x.imm_ctrl = 1; x.jalr_en = 1; end
      7'b1100011: begin
        x.alu_ctrl = ALU_SUB; x.br_en = 1; x.uns_ctrl = f3[1];
        x.br_ctrl = (f3 == 3'b001) ? BR_NE : (f3 == 3'b100 || f3 == 3'b110) ? BR_LT :
                    (f3 == 3'b101 || f3 == 3'b111) ? BR_GE : BR_EQ;
      end
      7'b0000011: begin x.imm_ctrl = 1; x.ld_ctrl = 1; x.uns_ctrl = f3[2]; end
      7'b0100011: begin x.imm_ctrl = 1; x.st_ctrl = 1; end
      7'b0010011, 7'b0110011: begin
        if (op == 7'b0010011) begin x.imm_ctrl = 1; x.imm_en = 1; end
        case (f3)
          3'b000: x.alu_ctrl = (op == 7'b0110011 && f7_5) ? ALU_SUB : ALU_ADD;
          3'b001: begin x.result_ctrl = RES_SHIFT; care_alu = 0; care_sh = 1; x.sh_ctrl = 0; end
          3'b010: begin x.alu_ctrl = ALU_SUB; x.result_ctrl = RES_SLT; x.slt_ctrl = 1; end
          3'b011: begin x.alu_ctrl = ALU_SUB; x.result_ctrl = RES_SLT; x.slt_ctrl = 1; x.uns_ctrl = 1; end
          3'b100: x.alu_ctrl = ALU_XOR;
          3'b101: begin x.result_ctrl = RES_SHIFT; care_alu = 0; care_sh = 1; x.sh_ctrl = 1; x.uns_ctrl = ~f7_5; end
          3'b110: x.alu_ctrl = ALU_OR;
          3'b111: x.alu_ctrl = ALU_AND;
        endcase
      end
      default: ;
    endcase
    opcode = op; funct_3 = f3; funct_7 = {1'b0, f7_5, 5'b0};
    #1;
    e = c;
    if (!care_alu) e.alu_ctrl = x.alu_ctrl;
    if (!care_sh)  e.sh_ctrl  = x.sh_ctrl;
    if (op != 7'b1100011) e.br_ctrl = x.br_ctrl;
    check(e == x, $sformatf("op=%b f3=%b f7_5=%b: %p, expected %p", op, f3, f7_5, c, x));
  endtask

  initial begin
    logic [6:0] ops [9] = '{7'b0110111, 7'b0010111, 7'b1101111, 7'b1100111, 7'b1100011,
                            7'b0000011, 7'b0100011, 7'b0010011, 7'b0110011};
    foreach (ops[i])
      for (int f = 0; f < 8; f++)
        for (int s = 0; s < 2; s++) expect_row(ops[i], 3'(f), 1'(s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
