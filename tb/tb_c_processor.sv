// tb_c_processor: end-to-end, self-checking testbench of the RV32IM processor at its full size.
//
// The processor is built with its default parameters (the full memory map). The testbench builds a
// program, loads it through the flash port while the core is held, and lets it run. The program
// is a fixed opening followed by several hundred randomly chosen instructions:
//  - opening: base register for the data window, clearing of a 256-byte data window, random
//    register values, an ALU overflow, an M-extension division by zero and the one signed division
//    overflow, and a software shift-and-add multiply loop whose result is compared with MUL;
//  - body: every RV32I/RV32M instruction kind, loads and stores of all sizes within the window,
//    forward branches and jumps over the next group of instructions, JALR through AUIPC, and
//    divides whose dividend is masked to 10 bits so the repeated-subtraction divider stays short;
//  - end: JAL x0, 0 (a jump to itself), which ends the run.
// Every retired instruction is executed again on a reference instruction-set model with its own
// registers and data memory: PC, write-back register, data and both overflow flags are compared.
// The number of clocks each instruction takes is checked: 1, M multiply 34, divide quotient+4,
// divide error 3. The run enable is also dropped at random moments to check that the core holds.
// Each mechanism (stall, taken and not-taken branch, backward branch, jump, load, store, ALU
// overflow, M overflow, multiply, divide, hold) is counted and counts as a failure if it never
// happened.
module tb_c_processor;
  import rv32_tb_pkg::*;

  localparam logic [31:0] RESET_PC = 32'h0000_8000;
  localparam logic [31:0] DBASE    = 32'h0200_0000;

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
  int n_stall = 0, n_taken = 0, n_not_taken = 0, n_back = 0, n_jump = 0, n_load = 0, n_store = 0;
  int n_alu_ovf = 0, n_m_ovf = 0, n_mul = 0, n_div = 0, n_hold = 0, n_retired = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at pc %h (%h): %s", pc, instr, what);
    end
  endtask

  task automatic report();
    $display("retired %0d: stall clocks %0d, taken %0d, not taken %0d, backward %0d, jumps %0d, loads %0d, stores %0d",
             n_retired, n_stall, n_taken, n_not_taken, n_back, n_jump, n_load, n_store);
    $display("  ALU overflow %0d, M overflow %0d, multiplies %0d, divides %0d, holds %0d",
             n_alu_ovf, n_m_ovf, n_mul, n_div, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish");
    report();
  end

  // ---------------------------------------------------------------- program construction
  logic [31:0] prog[$];

  function automatic logic [31:0] SLLI(input int rd, input int rs1, input int sh);
    return enc_i(sh, rs1, 3'b001, rd, 7'b0010011);
  endfunction

  function automatic int rnd_rd();
    return $urandom_range(1, 26);
  endfunction

  function automatic int rnd_rs();
    return $urandom_range(0, 31);
  endfunction

  function automatic int rnd_imm12();
    int v = int'($urandom_range(0, 4095));
    return (v > 2047) ? v - 4096 : v;
  endfunction

  // one group of instructions that must stay together (a branch or jump skips whole groups)
  task automatic gen_group(output logic [31:0] g[$]);
    int kind = $urandom_range(0, 99);
    logic [2:0] f3;
    g = {};
    if (kind < 22) begin                    // register-register ALU
      f3 = 3'($urandom);
      g.push_back(enc_r(((f3 == 3'b000 || f3 == 3'b101) && $urandom_range(0, 1) != 0) ? 7'b0100000 : 7'b0,
                        rnd_rs(), rnd_rs(), f3, rnd_rd(), 7'b0110011));
    end else if (kind < 44) begin           // register-immediate ALU
      f3 = 3'($urandom);
      if (f3 == 3'b001)      g.push_back(enc_i($urandom_range(0, 31), rnd_rs(), f3, rnd_rd(), 7'b0010011));
      else if (f3 == 3'b101) g.push_back(enc_i($urandom_range(0, 31) | ($urandom_range(0, 1) << 10),
                                               rnd_rs(), f3, rnd_rd(), 7'b0010011));
      else                   g.push_back(enc_i(rnd_imm12(), rnd_rs(), f3, rnd_rd(), 7'b0010011));
    end else if (kind < 48) begin           // LUI / AUIPC
      g.push_back(enc_u(20'($urandom), rnd_rd(), $urandom_range(0, 1) != 0 ? 7'b0110111 : 7'b0010111));
    end else if (kind < 58) begin           // load from the data window
      int sz = $urandom_range(0, 2);
      int uns = (sz < 2) ? $urandom_range(0, 1) : 0;
      g.push_back(enc_i($urandom_range(0, 255) & ~((1 << sz) - 1), 31, 3'((uns << 2) | sz), rnd_rd(), 7'b0000011));
    end else if (kind < 68) begin           // store into the data window
      int sz = $urandom_range(0, 2);
      g.push_back(enc_s($urandom_range(0, 255) & ~((1 << sz) - 1), rnd_rs(), 31, 3'(sz)));
    end else if (kind < 78) begin           // forward branch over the next group
      logic [31:0] nxt[$];
      logic [2:0] bf3s[6] = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b110, 3'b111};
      gen_group(nxt);
      // compare two random registers, or a register with itself for an always-equal case
      begin
        int a = rnd_rs();
        int b = $urandom_range(0, 3) == 0 ? a : rnd_rs();
        g.push_back(enc_b(4 * (1 + nxt.size()), b, a, bf3s[$urandom_range(0, 5)]));
      end
      foreach (nxt[i]) g.push_back(nxt[i]);
    end else if (kind < 81) begin           // JAL over the next group
      logic [31:0] nxt[$];
      gen_group(nxt);
      g.push_back(JAL(rnd_rd(), 4 * (1 + nxt.size())));
      foreach (nxt[i]) g.push_back(nxt[i]);
    end else if (kind < 84) begin           // JALR over one instruction
      g.push_back(enc_u(20'd0, 30, 7'b0010111));          // AUIPC x30, 0
      g.push_back(JALR(rnd_rd(), 30, 12));
      g.push_back(ADDI(rnd_rd(), rnd_rs(), rnd_imm12())); // skipped
    end else if (kind < 92) begin           // multiply family
      g.push_back(MEXT(3'($urandom_range(0, 3)), rnd_rd(), rnd_rs(), rnd_rs()));
    end else begin                          // divide family with a 10-bit dividend
      g.push_back(ANDI(28, rnd_rs(), 1023));
      g.push_back(MEXT(3'($urandom_range(4, 7)), rnd_rd(), 28, rnd_rs()));
    end
  endtask

  task automatic build_program();
    logic [31:0] g[$];
    prog.push_back(LUI(31, DBASE[31:12]));
    for (int i = 0; i < 64; i++) prog.push_back(SW(0, 31, 4 * i));
    for (int r = 1; r <= 29; r++) begin
      prog.push_back(LUI(r, 20'($urandom)));
      prog.push_back(ADDI(r, r, rnd_imm12()));
    end
    // corner values: x1 = 0x8000_0000, x2 = -1, x3 = 0x7FFF_FFFF
    prog.push_back(LUI(1, 20'h80000));
    prog.push_back(ADDI(2, 0, -1));
    prog.push_back(ADDI(3, 1, -1));
    prog.push_back(ADD(4, 3, 3));                  // ALU overflow
    prog.push_back(SUB(5, 1, 3));                  // ALU overflow
    prog.push_back(MEXT(3'b100, 6, 1, 2));         // DIV 0x8000_0000 / -1: M overflow
    prog.push_back(MEXT(3'b101, 7, 3, 0));         // DIVU by zero
    prog.push_back(MEXT(3'b110, 8, 3, 0));         // REM by zero
    prog.push_back(MEXT(3'b000, 9, 1, 2));         // MUL
    // software multiply x12 = x10 * x11 by shift and add, then MUL x14 = x15 * x16
    prog.push_back(ADDI(10, 0, 1234));
    prog.push_back(ADDI(11, 0, 567));
    prog.push_back(ADDI(15, 10, 0));
    prog.push_back(ADDI(16, 11, 0));
    prog.push_back(ADDI(12, 0, 0));
    prog.push_back(ANDI(13, 11, 1));               // loop:
    prog.push_back(BEQ(13, 0, 8));
    prog.push_back(ADD(12, 12, 10));
    prog.push_back(SLLI(10, 10, 1));
    prog.push_back(SRLI(11, 11, 1));
    prog.push_back(BNE(11, 0, -20));               // back to loop
    prog.push_back(MEXT(3'b000, 14, 15, 16));
    prog.push_back(SUB(27, 14, 12));               // 0 when both agree (x27 is kept)
    for (int i = 0; i < 500; i++) begin
      gen_group(g);
      foreach (g[j]) prog.push_back(g[j]);
    end
    prog.push_back(JAL(0, 0));
  endtask

  // ---------------------------------------------------------------- reference model
  logic [31:0] x[32];
  logic [31:0] mpc;
  logic [7:0]  dm[logic [31:0]];
  int          cyc = 0;
  bit          done = 0;
  bit          run = 0;

  function automatic logic [31:0] mem_read(input logic [31:0] a, input int size);
    logic [31:0] v = '0;
    for (int i = 0; i < size; i++) begin
      if (!dm.exists(a + i)) begin
        checks++; failures++;
        $display("FAIL: load of an unwritten byte %h", a + i);
      end else v[8*i +: 8] = dm[a + i];
    end
    return v;
  endfunction

  function automatic int m_cycles(input logic [31:0] ins, input logic [31:0] a, input logic [31:0] b);
    logic [2:0]  f3 = ins[14:12];
    logic [31:0] ma, mb;
    bit sa;
    if (!f3[2]) return 34;
    sa = !f3[0];
    if (b == 0 || (sa && a == 32'h8000_0000 && b == 32'hFFFF_FFFF)) return 3;
    ma = (sa && a[31]) ? -a : a;
    mb = (sa && b[31]) ? -b : b;
    return int'(ma / mb) + 4;
  endfunction

  always @(negedge clk) begin
    // random holds, never inside a multi-clock instruction; decided before the clock is checked
    if (done) en = 0;
    else if (run) begin
      if (en && !stall && $urandom_range(0, 49) == 0 && !(instr[6:0] == 7'b0110011 && instr[25])) begin
        en = 0; n_hold++;
      end else en = 1;
    end
    #1;
    if (!rst && en && !done) begin
      iss_t r;
      cyc++;
      if (stall) n_stall++;
      if (retire) begin
        logic [31:0] xa, xb;
        xa = x[instr[19:15]];
        xb = x[instr[24:20]];
        n_retired++;
        check(pc == mpc, $sformatf("PC %h, expected %h", pc, mpc));
        r = iss_exec(instr, pc, xa, xb);
        check(r.valid, "unknown instruction executed");
        if (r.ld) r.val = load_ext(mem_read(r.addr, r.size), r.size, r.uns);
        check(rd_wr_en == r.wr, "register write enable");
        if (r.wr && r.rd != 0) begin
          check(rd_addr == r.rd, $sformatf("rd %0d, expected %0d", rd_addr, r.rd));
          check(rd_data == r.val, $sformatf("rd data %h, expected %h", rd_data, r.val));
          x[r.rd] = r.val;
        end
        check(alu_ovf == r.alu_ovf, $sformatf("ALU overflow %b, expected %b", alu_ovf, r.alu_ovf));
        check(m_ovf == r.m_ovf, $sformatf("M overflow %b, expected %b", m_ovf, r.m_ovf));
        if (r.is_m) begin
          check(cyc == m_cycles(instr, xa, xb),
                $sformatf("M instruction took %0d clocks, expected %0d", cyc, m_cycles(instr, xa, xb)));
          if (r.is_div) n_div++; else n_mul++;
        end else check(cyc == 1, $sformatf("instruction took %0d clocks", cyc));
        if (r.st) begin
          for (int i = 0; i < r.size; i++) dm[r.addr + i] = r.st_data[8*i +: 8];
          n_store++;
        end
        if (r.ld) n_load++;
        if (r.branch) begin
          if (r.taken) n_taken++; else n_not_taken++;
          if (r.taken && r.next_pc < pc) n_back++;
        end
        if (r.jump) n_jump++;
        if (r.alu_ovf) n_alu_ovf++;
        if (r.m_ovf) n_m_ovf++;
        if (instr == JAL(0, 0)) done = 1;
        mpc = r.next_pc;
        cyc = 0;
      end
    end
  end

  initial begin
    for (int i = 0; i < 32; i++) x[i] = '0;
    mpc = RESET_PC;
    build_program();
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // load the program through the flash port while the core is held
    for (int i = 0; i < prog.size(); i++) begin
      wr_en   = 1;
      wr_addr = RESET_PC + 32'(4 * i);
      wr_data = prog[i];
      @(negedge clk);
    end
    wr_en = 0;
    run   = 1;
    // the holding process above raises the enable from now on
    wait (done);
    check(x[27] == 0, "software multiply and MUL disagree");
    check(n_stall > 0, "no stall happened");
    check(n_taken > 0 && n_not_taken > 0, "branches not taken both ways");
    check(n_back > 0, "no backward branch");
    check(n_jump > 0, "no jump");
    check(n_load > 0 && n_store > 0, "no load or no store");
    check(n_alu_ovf > 0, "no ALU overflow");
    check(n_m_ovf > 0, "no M-extension overflow");
    check(n_mul > 0 && n_div > 0, "no multiply or no divide");
    check(n_hold > 0, "no hold");
    check(n_retired > 500, "too few instructions retired");
    repeat (5) @(negedge clk);
    check(pc == mpc && !retire, "core did not stop at the final jump");
    report();
  end
endmodule
