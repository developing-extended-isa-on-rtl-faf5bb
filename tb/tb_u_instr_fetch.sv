// tb_u_instr_fetch: self-checking testbench for the instruction fetch unit.
//
// Uses a 1 KiB instruction memory at the document's reset address 0x0000_8000. Flashes 256 random
// words through the write port, then walks the program counter with random mixes of stall, branch,
// jump and plain steps and checks after every clock that the PC follows the fetch flowchart
// (stall holds, jump/branch load the target, otherwise PC + 4) and that op_instr is the flashed
// word at the PC. Also checks reset, the run enable and reads outside the memory.
module tb_u_instr_fetch;
  localparam logic [31:0] BASE = 32'h0000_8000;
  localparam logic [31:0] LAST = 32'h0000_83FF;

  logic        clk = 1'b0, rst, en, we, br, j, nop;
  logic [31:0] wdata, waddr, br_addr, pc, instr;
  logic [31:0] words [256];
  logic [31:0] exp_pc;
  int checks = 0, failures = 0;
  int n_stall = 0, n_br = 0, n_j = 0, n_seq = 0;

  always #5 clk = ~clk;

  u_instr_fetch #(.INITIAL_ADDR(BASE), .LAST_ADDR(LAST)) dut (
    .ip_clk(clk), .ip_rst(rst), .ip_en(en), .ip_wr_data(wdata), .ip_wr_addr(waddr), .ip_wr_en(we),
    .ip_br_addr(br_addr), .ip_br_ctrl(br), .ip_j_ctrl(j), .ip_nop_ctrl(nop), .op_addr(pc), .op_instr(instr)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] exp_instr(input logic [31:0] a);
    if (a < BASE || a > LAST - 3 || a[1:0] != 0) return 'x;
    return words[(a - BASE) >> 2];
  endfunction

  initial begin
    rst = 1; en = 0; we = 0; br = 0; j = 0; nop = 0; wdata = 0; waddr = 0; br_addr = 0;
    @(posedge clk); #1;
    check(pc == BASE, "reset address");
    rst = 0;
    for (int i = 0; i < 256; i++) begin
      words[i] = $urandom;
      we = 1; waddr = BASE + 32'(4 * i); wdata = words[i];
      @(posedge clk); #1;
    end
    we = 0;
    check(pc == BASE, "PC moved while ip_en low");
    en = 1;
    exp_pc = BASE;
    for (int n = 0; n < 3000; n++) begin
      int kind;
      check(pc == exp_pc && instr == exp_instr(pc), $sformatf("pc %h instr %h, expected %h %h", pc, instr, exp_pc, exp_instr(exp_pc)));
      kind = $urandom_range(0, 9);
      nop = (kind == 0);
      br  = (kind == 1 || kind == 2);
      j   = (kind == 3);
      if (kind == 2) nop = 1;   // stall has priority over a branch
      br_addr = BASE + 32'(4 * $urandom_range(0, 255));
      @(posedge clk);
      if (nop)          begin exp_pc = exp_pc; n_stall++; end
      else if (br || j) begin exp_pc = br_addr; if (br) n_br++; else n_j++; end
      else              begin exp_pc = exp_pc + 4; n_seq++; end
      if (exp_pc > LAST - 3) begin
        #1;
        check(pc == exp_pc && instr == 0, "read past the end of memory");
        br = 1; nop = 0; j = 0; br_addr = BASE; exp_pc = BASE;
        @(posedge clk);
      end
      #1;
    end
    check(n_stall > 0 && n_br > 0 && n_j > 0 && n_seq > 0, "all next-address cases seen");
    rst = 1; @(posedge clk); #1 rst = 0;
    check(pc == BASE && instr == words[0], "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
