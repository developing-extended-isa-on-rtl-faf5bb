// tb_u_datapath: self-checking testbench for the datapath (register file, ALU, data memory and
// M extension), driven through the control unit.
//
// The testbench plays the role of the instruction fetch unit: it presents one instruction and a
// random PC, waits while the datapath stalls, and moves on after the clock in which the
// instruction completes. A reference instruction-set model with its own registers and data memory
// predicts, for every instruction, the write-back (enable, register, data), the branch decision and
// target, the ALU and M-extension overflow flags and the number of clocks (1; multiply 34; divide
// quotient+4; divide error 3). Random instructions of every class are used; loads and stores go
// to a 256-byte data window (the data memory is built with that size here), and divides use a
// dividend below 1024 to keep them short. The enable input is dropped now and then to check that
// nothing is written while it is low.
module tb_u_datapath;
  import rv32_pkg::*;
  import rv32_tb_pkg::*;

  localparam logic [31:0] DBASE = 32'h0200_0000;

  logic        clk = 0, rst = 1, en = 0;
  logic [31:0] instr = '0, pc = '0, br_addr, rd_data;
  main_ctrl_t  mc;
  alu_ctrl_t   ac;
  logic        br_ctrl, stall, rd_wr_en, alu_ovf, m_ovf;
  logic [4:0]  rd_addr;

  u_ctrl u_ctrl (.ip_instr(instr), .op_main(mc), .op_alu(ac));
  u_datapath #(.DMEM_BASE(DBASE), .DMEM_LAST(DBASE + 32'hFF)) dut (
    .ip_clk(clk), .ip_rst(rst), .ip_en(en), .ip_instr(instr), .ip_pc(pc), .ip_main(mc), .ip_alu(ac),
    .op_br_addr(br_addr), .op_br_ctrl(br_ctrl), .op_stall(stall), .op_rd_wr_en(rd_wr_en),
    .op_rd_addr(rd_addr), .op_rd_data(rd_data), .op_alu_overflow(alu_ovf), .op_m_overflow(m_ovf)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_taken = 0, n_ld = 0, n_st = 0, n_aovf = 0, n_movf = 0, n_hold = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL (%h): %s", instr, what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] x[32];
  logic [7:0]  dm[256];

  function automatic int rnd_imm12();
    int v = int'($urandom_range(0, 4095));
    return (v > 2047) ? v - 4096 : v;
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

  // execute one instruction on the datapath and the model; called just after a falling edge
  task automatic run(input logic [31:0] ins);
    iss_t r;
    logic [31:0] xa, xb, raw;
    int cyc = 0;
    instr = ins;
    pc    = $urandom & ~32'd3;
    xa = x[ins[19:15]];
    xb = x[ins[24:20]];
    r = iss_exec(ins, pc, xa, xb);
    if (r.ld) begin
      raw = '0;
      for (int i = 0; i < r.size; i++) raw[8*i +: 8] = dm[(r.addr - DBASE + i) & 255];
      r.val = load_ext(raw, r.size, r.uns);
    end
    // a held clock first, now and then: nothing may change
    if ($urandom_range(0, 9) == 0 && !r.is_m) begin
      en = 0; n_hold++;
      #1 check(!rd_wr_en, "register write while disabled");
      @(negedge clk);
    end
    en = 1;
    forever begin
      #1;
      cyc++;
      if (!stall) break;
      n_stall++;
      check(!rd_wr_en, "register write during a stall");
      @(negedge clk);
    end
    check(rd_wr_en == r.wr, "write enable");
    if (r.wr && r.rd != 0) begin
      check(rd_addr == r.rd, "destination register");
      check(rd_data == r.val, $sformatf("write data %h, expected %h", rd_data, r.val));
      x[r.rd] = r.val;
    end
    if (r.branch || r.jump) begin
      check((br_ctrl || r.jump) && (br_addr == r.next_pc) || (!r.taken && !br_ctrl && !r.jump),
            $sformatf("branch/jump %b target %h, expected taken %b to %h", br_ctrl, br_addr, r.taken, r.next_pc));
      if (r.taken) n_taken++;
    end else check(!br_ctrl, "branch taken by a non-branch");
    check(alu_ovf == r.alu_ovf, "ALU overflow flag");
    check(m_ovf == r.m_ovf, "M overflow flag");
    if (r.alu_ovf) n_aovf++;
    if (r.m_ovf) n_movf++;
    if (r.is_m) check(cyc == m_cycles(ins, xa, xb), $sformatf("took %0d clocks, expected %0d", cyc, m_cycles(ins, xa, xb)));
    else check(cyc == 1, "single-clock instruction stalled");
    if (r.st) begin
      for (int i = 0; i < r.size; i++) dm[(r.addr - DBASE + i) & 255] = r.st_data[8*i +: 8];
      n_st++;
    end
    if (r.ld) n_ld++;
    @(negedge clk);
  endtask

  initial begin
    logic [2:0] f3;
    int sz, kind, a;
    logic [2:0] bf[6];
    bf = '{3'b000, 3'b001, 3'b100, 3'b101, 3'b110, 3'b111};
    for (int i = 0; i < 32; i++) x[i] = '0;
    for (int i = 0; i < 256; i++) dm[i] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(LUI(31, DBASE[31:12]));
    for (int i = 0; i < 64; i++) run(SW(0, 31, 4 * i));
    for (int r = 1; r < 31; r++) begin
      run(LUI(r, 20'($urandom)));
      run(ADDI(r, r, rnd_imm12()));
    end
    // corner cases: overflow of ADD, signed division overflow, division by zero
    run(LUI(1, 20'h80000));
    run(ADDI(2, 0, -1));
    run(ADD(3, 1, 2));
    run(MEXT(3'b100, 4, 1, 2));
    run(MEXT(3'b111, 5, 3, 0));
    for (int n = 0; n < 3000; n++) begin
      kind = $urandom_range(0, 99);
      f3 = 3'($urandom);
      if (kind < 25) run(enc_r(((f3 == 0 || f3 == 5) && $urandom_range(0, 1) != 0) ? 7'b0100000 : 7'b0,
                              $urandom_range(0, 31), $urandom_range(0, 31), f3, $urandom_range(0, 30), 7'b0110011));
      else if (kind < 45) begin
        if (f3 == 1 || f3 == 5) run(enc_i($urandom_range(0, 31) | (f3 == 5 ? $urandom_range(0, 1) << 10 : 0),
                                          $urandom_range(0, 31), f3, $urandom_range(0, 30), 7'b0010011));
        else run(enc_i(rnd_imm12(), $urandom_range(0, 31), f3, $urandom_range(0, 30), 7'b0010011));
      end else if (kind < 50) run(enc_u(20'($urandom), $urandom_range(0, 30), $urandom_range(0, 1) != 0 ? 7'b0110111 : 7'b0010111));
      else if (kind < 60) begin
        sz = $urandom_range(0, 2);
        run(enc_i($urandom_range(0, 255) & ~((1 << sz) - 1), 31, 3'(((sz < 2 ? $urandom_range(0, 1) : 0) << 2) | sz),
                  $urandom_range(0, 30), 7'b0000011));
      end else if (kind < 70) begin
        sz = $urandom_range(0, 2);
        run(enc_s($urandom_range(0, 255) & ~((1 << sz) - 1), $urandom_range(0, 31), 31, 3'(sz)));
      end else if (kind < 80) begin
        a = $urandom_range(0, 31);
        run(enc_b(2 * rnd_imm12(), $urandom_range(0, 3) == 0 ? a : $urandom_range(0, 31), a, bf[$urandom_range(0, 5)]));
      end else if (kind < 85) begin
        if ($urandom_range(0, 1) != 0) run(JAL($urandom_range(0, 30), 2 * int'($urandom_range(0, 1048575)) - 1048576));
        else run(JALR($urandom_range(0, 30), $urandom_range(0, 31), rnd_imm12()));
      end else if (kind < 92) run(MEXT(3'($urandom_range(0, 3)), $urandom_range(0, 30), $urandom_range(0, 31), $urandom_range(0, 31)));
      else begin
        run(ANDI(30, $urandom_range(0, 31), 1023));
        run(MEXT(3'($urandom_range(4, 7)), $urandom_range(0, 29), 30, $urandom_range(0, 31)));
      end
    end
    check(n_stall > 0 && n_taken > 0 && n_ld > 0 && n_st > 0 && n_aovf > 0 && n_movf > 0 && n_hold > 0,
          "a mechanism never happened");
    $display("stall clocks %0d, taken %0d, loads %0d, stores %0d, ALU overflow %0d, M overflow %0d, holds %0d",
             n_stall, n_taken, n_ld, n_st, n_aovf, n_movf, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
