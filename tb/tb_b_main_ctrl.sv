// tb_b_main_ctrl: self-checking testbench for the main control block.
//
// For every opcode/funct3 combination of RV32IM (and some invalid opcodes) with random other
// instruction bits, compares the control bundle with the expected row of the main-control function
// table: register write, write-back source, jump, load/store enables, access size, load
// zero-extension and the M-extension enables. Also checks that opcode, funct3 and funct7 are
// passed on unchanged.
module tb_b_main_ctrl;
  import rv32_pkg::*;

  logic [6:0] opcode, funct_7, o_opcode, o_funct_7;
  logic [2:0] funct_3, o_funct_3;
  main_ctrl_t c;
  int checks = 0, failures = 0;

  b_main_ctrl dut (.ip_opcode(opcode), .ip_funct_3(funct_3), .ip_funct_7(funct_7),
                   .op_opcode(o_opcode), .op_funct_3(o_funct_3), .op_funct_7(o_funct_7), .op_ctrl(c));

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

  // expected {reg_wr_en, wb_ctrl, j_ctrl, ld_en, st_en, byte, half, word, uns, m_ext_en, m_ext_wb}
  function automatic logic [10:0] expected(input logic [6:0] op, input logic [2:0] f3, input logic [6:0] f7);
    logic [2:0] sz;
    sz = (f3[1:0] == 2'b00) ? 3'b100 : (f3[1:0] == 2'b01) ? 3'b010 : (f3[1:0] == 2'b10) ? 3'b001 : 3'b000;
    case (op)
      7'b0110111, 7'b0010111, 7'b0010011: return 11'b1_0_0_0_0_000_0_0_0;
      7'b1101111, 7'b1100111:             return 11'b1_0_1_0_0_000_0_0_0;
      7'b1100011:                         return 11'b0_0_0_0_0_000_0_0_0;
      7'b0000011:                         return {5'b1_1_0_1_0, sz, f3[2], 2'b00};
      7'b0100011:                         return {5'b0_0_0_0_1, sz, 1'b0, 2'b00};
      7'b0110011:                         return f7[0] ? 11'b1_0_0_0_0_000_0_1_1 : 11'b1_0_0_0_0_000_0_0_0;
      default:                            return '0;
    endcase
  endfunction

  initial begin
    logic [6:0] ops [12] = '{7'b0110111, 7'b0010111, 7'b1101111, 7'b1100111, 7'b1100011, 7'b0000011,
                             7'b0100011, 7'b0010011, 7'b0110011, 7'b0000000, 7'b1111111, 7'b0001111};
    for (int rep = 0; rep < 20; rep++) begin
      foreach (ops[i]) begin
        for (int f = 0; f < 8; f++) begin
          opcode = ops[i]; funct_3 = 3'(f);
          funct_7 = (ops[i] == 7'b0110011) ? {1'b0, 1'($urandom), 4'b0000, 1'($urandom)} : 7'($urandom);
          #1;
          check(c == expected(opcode, funct_3, funct_7),
                $sformatf("op=%b f3=%b f7=%b: controls %b, expected %b", opcode, funct_3, funct_7, c, expected(opcode, funct_3, funct_7)));
          check(o_opcode == opcode && o_funct_3 == funct_3 && o_funct_7 == funct_7, "fields not passed on");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
