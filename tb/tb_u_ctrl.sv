// tb_u_ctrl: self-checking testbench for the control unit (main control + ALU control).
//
// Feeds whole 32-bit instructions built with the encoders and checks that the control unit cuts
// the opcode, funct3 and funct7 fields from the right bits and that the main and ALU control
// bundles both react: a sample of every instruction class, with random register fields.
module tb_u_ctrl;
  import rv32_pkg::*;
  import rv32_tb_pkg::*;

  logic [31:0] instr;
  main_ctrl_t  m;
  alu_ctrl_t   a;
  int checks = 0, failures = 0;

  u_ctrl dut (.ip_instr(instr), .op_main(m), .op_alu(a));

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

  initial begin
    for (int n = 0; n < 200; n++) begin
      int rd = $urandom_range(0, 31), r1 = $urandom_range(0, 31), r2 = $urandom_range(0, 31);
      instr = LUI(rd, 20'($urandom)); #1;
      check(m.reg_wr_en && a.lui_en && a.alu_ctrl == ALU_OR && !m.j_ctrl, "LUI");
      instr = JAL(rd, 2 * $urandom_range(0, 1000)); #1;
      check(m.reg_wr_en && m.j_ctrl && a.jal_en, "JAL");
      instr = JALR(rd, r1, $urandom_range(0, 2000)); #1;
      check(m.j_ctrl && a.jalr_en && !a.jal_en, "JALR");
      instr = enc_b(8, r2, r1, 3'b111); #1;
      check(!m.reg_wr_en && a.br_en && a.br_ctrl == BR_GE && a.uns_ctrl, "BGEU");
      instr = enc_i($urandom_range(0, 2047), r1, 3'b100, rd, 7'b0000011); #1;
      check(m.ld_en && m.byte_ctrl && m.uns_ctrl && m.wb_ctrl && a.ld_ctrl, "LBU");
      instr = enc_s($urandom_range(0, 2047), r2, r1, 3'b001); #1;
      check(m.st_en && m.half_ctrl && !m.reg_wr_en && a.st_ctrl, "SH");
      instr = enc_i($urandom_range(0, 31) | 32'h400, r1, 3'b101, rd, 7'b0010011); #1;
      check(a.result_ctrl == RES_SHIFT && a.sh_ctrl && !a.uns_ctrl && a.imm_ctrl, "SRAI");
      instr = SUB(rd, r1, r2); #1;
      check(a.alu_ctrl == ALU_SUB && !a.imm_ctrl && m.reg_wr_en && !m.m_ext_en, "SUB");
      instr = MEXT(3'($urandom), rd, r1, r2); #1;
      check(m.m_ext_en && m.m_ext_wb_ctrl && m.reg_wr_en, "M instruction");
      instr = {25'($urandom), 7'b1110011}; #1;
      check(m == '0 && !a.br_en && !a.ld_ctrl && !a.st_ctrl, "unknown opcode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
