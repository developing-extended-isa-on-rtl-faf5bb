// tb_workloads: clock counts of multiplication and division in software (RV32I only) and with the
// M extension, measured on the full-size processor.
//
// The program, loaded through the flash port, contains four measured regions:
//  1. a shift-and-add multiply loop, 10 x 3 over 32 iterations: shift the multiplier right, test its
//     low bit, add the (left-shifted) multiplicand when set. 7 instructions per iteration, plus one
//     per set bit of the multiplier: 32*7 + 2 = 226 clocks;
//  2. MUL of the same operands: 34 clocks;
//  3. a restoring shift-and-subtract division, 100 / 10 over 32 iterations: 8 instructions per
//     iteration plus 2 per set bit of the quotient: 32*8 + 2*2 = 260 clocks;
//  4. DIVU 100 / 10 (10 + 4 = 14 clocks) and DIVU 100000 / 7 (14285 + 4 = 14289 clocks), which shows
//     that the repeated-subtraction divider is only faster when the quotient is small.
// The clock count of each region (from the first clock of its first instruction to the first clock
// of the instruction after it) and the results, observed on the write-back bus, are checked
// against these numbers, and the multiply speed-up is checked to be at least 6.
module tb_workloads;
  import rv32_tb_pkg::*;

  localparam logic [31:0] RESET_PC = 32'h0000_8000;

  logic        clk = 0, rst = 1, en = 0, wr_en = 0;
  logic [31:0] wr_addr = '0, wr_data = '0;
  logic [31:0] pc, instr, rd_data;
  logic        retire, rd_wr_en, alu_ovf, m_ovf, stall;
  logic [4:0]  rd_addr;

  c_processor dut (
    .ip_clk(clk), .ip_rst(rst), .ip_en(en), .ip_wr_en(wr_en), .ip_wr_addr(wr_addr), .ip_wr_data(wr_data),
    .op_pc(pc), .op_instr(instr), .op_retire(retire), .op_rd_wr_en(rd_wr_en), .op_rd_addr(rd_addr),
    .op_rd_data(rd_data), .op_alu_overflow(alu_ovf), .op_m_overflow(m_ovf), .op_stall(stall)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] SLLI(input int rd, input int rs1, input int sh);
    return enc_i(sh, rs1, 3'b001, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] OR(input int rd, input int rs1, input int rs2);
    return enc_r(7'b0, rs2, rs1, 3'b110, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] ORI(input int rd, input int rs1, input int imm);
    return enc_i(imm, rs1, 3'b110, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] BLTU(input int rs1, input int rs2, input int off);
    return enc_b(off, rs2, rs1, 3'b110);
  endfunction

  logic [31:0] prog[$];
  int          mark[8];                 // program index of each region boundary
  longint      first_seen[8];
  logic [31:0] xr[32];                  // registers as seen on the write-back bus
  longint      cyc = 0;
  bit          done = 0;

  task automatic build_program();
    // region 1: software multiply x5 = x7 * x29 (10 * 3)
    prog.push_back(ADDI(7, 0, 10));
    prog.push_back(ADDI(29, 0, 3));
    prog.push_back(ADDI(5, 0, 0));
    prog.push_back(ADDI(30, 0, 32));
    mark[0] = prog.size();
    prog.push_back(ANDI(28, 7, 1));      // loop: low bit of the multiplier
    prog.push_back(BEQ(28, 0, 8));       //   skip the add when 0
    prog.push_back(ADD(5, 5, 29));       //   accumulate
    prog.push_back(SRLI(7, 7, 1));       // skip: next multiplier bit
    prog.push_back(SLLI(29, 29, 1));     //   multiplicand * 2
    prog.push_back(ADDI(30, 30, -1));    //   iteration count
    prog.push_back(ADDI(0, 0, 0));       //   (keeps 7 instructions per iteration)
    prog.push_back(BNE(30, 0, -28));
    mark[1] = prog.size();
    // region 2: MUL x6 = 10 * 3
    prog.push_back(ADDI(7, 0, 10));
    prog.push_back(ADDI(29, 0, 3));
    mark[2] = prog.size();
    prog.push_back(MEXT(3'b000, 6, 7, 29));
    mark[3] = prog.size();
    // region 3: software division x13 = x10 / x11, remainder x14 (100 / 10)
    prog.push_back(ADDI(10, 0, 100));
    prog.push_back(ADDI(11, 0, 10));
    prog.push_back(ADDI(13, 0, 0));
    prog.push_back(ADDI(14, 0, 0));
    prog.push_back(ADDI(30, 0, 32));
    mark[4] = prog.size();
    prog.push_back(SLLI(14, 14, 1));     // loop: remainder * 2
    prog.push_back(SRLI(15, 10, 31));    //   next dividend bit
    prog.push_back(OR(14, 14, 15));
    prog.push_back(SLLI(10, 10, 1));
    prog.push_back(SLLI(13, 13, 1));     //   quotient * 2
    prog.push_back(BLTU(14, 11, 12));    //   remainder below divisor: no subtraction
    prog.push_back(SUB(14, 14, 11));
    prog.push_back(ORI(13, 13, 1));
    prog.push_back(ADDI(30, 30, -1));
    prog.push_back(BNE(30, 0, -36));
    mark[5] = prog.size();
    // region 4: DIVU 100 / 10 and 100000 / 7
    prog.push_back(ADDI(10, 0, 100));
    mark[6] = prog.size();
    prog.push_back(MEXT(3'b101, 16, 10, 11));
    mark[7] = prog.size();
    prog.push_back(LUI(20, 20'd24));     // 24 << 12 = 98304
    prog.push_back(ADDI(20, 20, 1696));  // 100000
    prog.push_back(ADDI(21, 0, 7));
    prog.push_back(MEXT(3'b101, 17, 20, 21));
    prog.push_back(MEXT(3'b111, 18, 20, 21));
    prog.push_back(JAL(0, 0));
  endtask

  int     idx;
  longint div_big_start = -1, div_big_end = -1;

  always @(negedge clk) begin
    if (en && !done) begin
      cyc++;
      idx = int'((pc - RESET_PC) >> 2);
      foreach (mark[k]) if (idx == mark[k] && first_seen[k] < 0) first_seen[k] = cyc;
      if (idx == prog.size() - 3 && div_big_start < 0) div_big_start = cyc;
      if (idx == prog.size() - 2 && div_big_end < 0) div_big_end = cyc;
      if (retire && rd_wr_en && rd_addr != 0) xr[rd_addr] = rd_data;
      if (retire && idx == prog.size() - 1) done = 1;
    end
  end

  initial begin
    longint sw_mul, hw_mul, sw_div, hw_div, hw_div_big;
    foreach (xr[i]) xr[i] = '0;
    foreach (first_seen[i]) first_seen[i] = -1;
    build_program();
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < prog.size(); i++) begin
      wr_en = 1; wr_addr = RESET_PC + 32'(4 * i); wr_data = prog[i];
      @(negedge clk);
    end
    wr_en = 0;
    en    = 1;
    wait (done);
    sw_mul     = first_seen[1] - first_seen[0];
    hw_mul     = first_seen[3] - first_seen[2];
    sw_div     = first_seen[5] - first_seen[4];
    hw_div     = first_seen[7] - first_seen[6];
    hw_div_big = div_big_end - div_big_start;
    $display("multiply 10 x 3:  software %0d clocks, MUL %0d clocks (%0.1f times faster)",
             sw_mul, hw_mul, real'(sw_mul) / real'(hw_mul));
    $display("divide 100 / 10:  software %0d clocks, DIVU %0d clocks", sw_div, hw_div);
    $display("divide 100000 / 7: DIVU %0d clocks", hw_div_big);
    check(xr[5] == 30 && xr[6] == 30, $sformatf("products %0d and %0d, expected 30", xr[5], xr[6]));
    check(sw_mul == 226, $sformatf("software multiply took %0d clocks, expected 226", sw_mul));
    check(hw_mul == 34, $sformatf("MUL took %0d clocks, expected 34", hw_mul));
    check(sw_mul >= 6 * hw_mul, "MUL is not at least 6 times faster than the software loop");
    check(xr[13] == 10 && xr[14] == 0 && xr[16] == 10, "quotient or remainder of 100 / 10");
    check(sw_div == 260, $sformatf("software division took %0d clocks, expected 260", sw_div));
    check(hw_div == 14, $sformatf("DIVU 100 / 10 took %0d clocks, expected 14", hw_div));
    check(xr[17] == 14285 && xr[18] == 5, "quotient or remainder of 100000 / 7");
    check(hw_div_big == 14289, $sformatf("DIVU 100000 / 7 took %0d clocks, expected 14289", hw_div_big));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
