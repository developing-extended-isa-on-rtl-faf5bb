// tb_b_alu: self-checking testbench for the ALU (with its immediate extender and target adder).
//
// The ALU controls come from the ALU control block decoding real RV32I instructions. For 20000
// random instructions of every RV32I class (LUI, AUIPC, JAL, JALR, the six branches, loads, stores,
// register-immediate and register-register operations, with random and corner-case operands) the
// outputs are compared with the reference model of the RISC-V definitions: the result (or load/store
// address), the branch decision, the branch/jump target, the store data and the overflow flag.
module tb_b_alu;
  import rv32_pkg::*;
  import rv32_tb_pkg::*;

  logic [31:0] rs1, rs2, pc, instr, result, st_data, br_addr;
  logic        ovf, br;
  alu_ctrl_t   ctrl;
  int checks = 0, failures = 0;
  int n_class [9];

  b_alu_ctrl u_alu_ctrl (.ip_opcode(instr[6:0]), .ip_funct_3(instr[14:12]), .ip_funct_7(instr[31:25]), .op_ctrl(ctrl));
  b_alu dut (
    .ip_rs1(rs1), .ip_rs2(rs2), .ip_pc(pc), .ip_instr_imm(instr[31:7]), .ip_ctrl(ctrl),
    .op_result(result), .op_imm(st_data), .op_overflow(ovf), .op_br_addr(br_addr), .op_br_ctrl(br)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] corner();
    case ($urandom_range(0, 7))
      0: return 32'h0000_0000;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      3: return 32'h7FFF_FFFF;
      4: return 32'($urandom_range(0, 40));
      default: return $urandom;
    endcase
  endfunction

  function automatic logic [31:0] rand_instr(output int cls);
    logic [31:0] w = $urandom;
    logic [2:0] f3 = w[14:12];
    cls = $urandom_range(0, 8);
    case (cls)
      0: return {w[31:7], 7'b0110111};
      1: return {w[31:7], 7'b0010111};
      2: return {w[31:7], 7'b1101111};
      3: return {w[31:15], 3'b000, w[11:7], 7'b1100111};
      4: begin
        if (f3 == 3'b010 || f3 == 3'b011) f3 = 3'b000;
        return {w[31:15], f3, w[11:7], 7'b1100011};
      end
      5: begin
        if (f3 == 3'b011 || f3 == 3'b110 || f3 == 3'b111) f3 = 3'b010;
        return {w[31:15], f3, w[11:7], 7'b0000011};
      end
      6: return {w[31:15], 3'(w[13:12] == 2'b11 ? 2'b10 : w[13:12]), w[11:7], 7'b0100011};
      7: begin
        if (f3 == 3'b001) return {7'b0000000, w[24:15], f3, w[11:7], 7'b0010011};
        if (f3 == 3'b101) return {1'b0, w[30], 5'b00000, w[24:15], f3, w[11:7], 7'b0010011};
        return {w[31:15], f3, w[11:7], 7'b0010011};
      end
      default: begin
        logic f7_5 = (f3 == 3'b000 || f3 == 3'b101) ? w[30] : 1'b0;
        return {1'b0, f7_5, 5'b00000, w[24:15], f3, w[11:7], 7'b0110011};
      end
    endcase
  endfunction

  initial begin
    iss_t e;
    int cls;
    for (int n = 0; n < 20000; n++) begin
      instr = rand_instr(cls);
      rs1 = corner();
      rs2 = ($urandom_range(0, 3) == 0) ? rs1 : corner();
      pc  = {$urandom_range(0, 32'h3FFF_FFFF), 2'b00};
      #1;
      n_class[cls]++;
      e = iss_exec(instr, pc, rs1, rs2);
      if (e.ld || e.st)
        check(result == e.addr, $sformatf("%h: address %h, expected %h", instr, result, e.addr));
      else if (!e.branch)
        check(result == e.val, $sformatf("%h rs1=%h rs2=%h: result %h, expected %h", instr, rs1, rs2, result, e.val));
      check(br == e.taken, $sformatf("%h rs1=%h rs2=%h: branch %0b, expected %0b", instr, rs1, rs2, br, e.taken));
      if (e.branch || e.jump)
        check(br_addr == ((e.branch && !e.taken) ? pc + ({{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0}) : e.next_pc),
              $sformatf("%h: target %h, expected %h", instr, br_addr, e.next_pc));
      check(st_data == (e.st ? rs2 : 32'd0), $sformatf("%h: store data %h", instr, st_data));
      check(ovf == e.alu_ovf, $sformatf("%h rs1=%h rs2=%h: overflow %0b, expected %0b", instr, rs1, rs2, ovf, e.alu_ovf));
    end
    foreach (n_class[i]) check(n_class[i] > 0, $sformatf("instruction class %0d never generated", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
