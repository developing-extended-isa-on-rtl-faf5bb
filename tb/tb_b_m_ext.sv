// tb_b_m_ext: self-checking testbench for the RV32M multiply/divide unit.
//
// Runs the 18 operand sets of the unit's reference test plan (signed/unsigned multiply and divide,
// divide by zero, most negative number / -1) and 400 random operations, and compares every result
// and error flag with a reference computed here with SystemVerilog's own 64-bit arithmetic. It also
// checks the timing of every operation, counting the start clock as clock 1: multiply results in
// clock 34, divides in clock q+4 (q = quotient magnitude), divide errors in clock 3, with the stall
// output high from clock 2 until the clock before the result, and the result visible for one clock
// only. Random divides use operands whose quotient is below 64 so that the repeated-subtraction
// divider finishes quickly.
module tb_b_m_ext;
  import rv32_pkg::*;

  logic        clk = 1'b0, rst;
  logic [31:0] a, b, result;
  logic [2:0]  f3;
  logic        en, nop, ovf, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  b_m_ext dut (
    .ip_clk(clk), .ip_rst(rst), .ip_operand_a(a), .ip_operand_b(b), .ip_funct_3(f3),
    .ip_m_ext_en(en), .op_result(result), .op_nop_ctrl(nop), .op_overflow(ovf), .op_done(done)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference: {overflow, result} and the clock in which the result appears
  task automatic reference(input logic [31:0] x, input logic [31:0] y, input logic [2:0] op,
                           output logic [31:0] r, output logic e, output int clk_no);
    longint sx, sy, ux, uy, p;
    logic [63:0] pu;
    logic [31:0] mx, my;
    sx = longint'($signed(x));
    sy = longint'($signed(y));
    ux = longint'({32'b0, x});
    uy = longint'({32'b0, y});
    e = 1'b0;
    r = '0;
    clk_no = 34;
    unique case (op)
      F3_MUL:    begin p = sx * sy; r = p[31:0];  end
      F3_MULH:   begin p = sx * sy; r = p[63:32]; end
      F3_MULHSU: begin p = sx * uy; r = p[63:32]; end
      F3_MULHU:  begin pu = {32'b0, x} * {32'b0, y}; r = pu[63:32]; end
      default: begin
        if (y == 0 || (!op[0] && x == 32'h8000_0000 && y == 32'hFFFF_FFFF)) begin
          e = 1'b1;
          r = '0;
          clk_no = 3;
        end else begin
          if (op[0]) begin
            r = op[1] ? x % y : x / y;
            clk_no = int'(x / y) + 4;
          end else begin
            p = op[1] ? sx % sy : sx / sy;
            r = p[31:0];
            mx = x[31] ? -x : x;
            my = y[31] ? -y : y;
            clk_no = int'(mx / my) + 4;
          end
        end
      end
    endcase
  endtask

  task automatic run(input logic [31:0] x, input logic [31:0] y, input logic [2:0] op);
    logic [31:0] r_exp;
    logic        e_exp;
    int          clk_exp, clk_no;
    bit          stall_ok;
    reference(x, y, op, r_exp, e_exp, clk_exp);
    // clock 1: start
    a = x; b = y; f3 = op; en = 1'b1;
    @(posedge clk); #1;
    a = '0; b = '0; f3 = '0; en = 1'b0;
    clk_no   = 2;
    stall_ok = 1'b1;
    while (!done && clk_no < 2000) begin
      if (!nop) stall_ok = 1'b0;
      if (result != 0 || ovf) stall_ok = 1'b0;
      @(posedge clk); #1;
      clk_no++;
    end
    check(done && result == r_exp && ovf == e_exp,
          $sformatf("f3=%0d a=%h b=%h: result %h ovf %0b, expected %h ovf %0b", op, x, y, result, ovf, r_exp, e_exp));
    check(clk_no == clk_exp, $sformatf("f3=%0d a=%h b=%h: result in clock %0d, expected %0d", op, x, y, clk_no, clk_exp));
    check(stall_ok, $sformatf("f3=%0d a=%h b=%h: stall low or output early before the result", op, x, y));
    check(!nop, "stall still high in the result clock");
    @(posedge clk); #1;
    check(!done && result == 0 && !ovf, "result held for more than one clock");
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; a = '0; b = '0; f3 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // reference test plan
    run(32'h00015C7B, 32'h0000058A, F3_MUL);
    check(result == 0, "idle");
    run(32'hFFFEA385, 32'h0000058A, F3_MUL);
    run(32'hFFFEA385, 32'hFFFFFA76, F3_MUL);
    run(32'h00015C7B, 32'h000426C4, F3_MULH);
    run(32'hFFFEA385, 32'h000426C4, F3_MULH);
    run(32'h00015C7B, 32'h9EC4BA46, F3_MULHSU);
    run(32'hFFFEA385, 32'h9EC4BA46, F3_MULHSU);
    run(32'hCAF1B84E, 32'h8841A4E9, F3_MULHU);
    run(32'h000000BF, 32'h00000017, F3_DIV);
    run(32'h000000BF, 32'hFFFFFFE9, F3_DIV);
    run(32'hFFFFFF41, 32'hFFFFFFE9, F3_DIV);
    run(32'hC7485D8D, 32'h15A51D1A, F3_DIVU);
    run(32'h00001C72, 32'h00000272, F3_REM);
    run(32'h00001C72, 32'hFFFFFD8E, F3_REM);
    run(32'hFFFFE38E, 32'hFFFFFD8E, F3_REM);
    run(32'hC7485D8D, 32'h15A51D1A, F3_REMU);
    run(32'h003AE27C, 32'h00000000, F3_DIV);
    run(32'h80000000, 32'hFFFFFFFF, F3_DIV);
    // values printed in the test plan, checked directly
    run(32'h00015C7B, 32'h0000058A, F3_MUL);
    // random operations
    for (int i = 0; i < 400; i++) begin
      logic [2:0]  op;
      logic [31:0] x, y, q, rr;
      op = 3'($urandom_range(0, 7));
      if (!op[2]) begin
        x = $urandom; y = $urandom;
      end else begin
        y  = $urandom_range(1, 32'h00FF_FFFF) >> $urandom_range(0, 20);
        if (y == 0) y = 1;
        q  = $urandom_range(0, 63);
        rr = $urandom_range(0, 32'hFFFF) % y;
        x  = y * q + rr;
        if (!op[0] && x[31]) x = x >> 1;
        if (!op[0] && $urandom_range(0, 1)) x = -x;
        if (!op[0] && $urandom_range(0, 1)) y = -y;
        if ($urandom_range(0, 30) == 0) y = 0;
      end
      run(x, y, op);
    end
    // a start request while busy is ignored
    a = 32'd7; b = 32'd6; f3 = F3_MUL; en = 1'b1;
    @(posedge clk); #1;
    a = 32'd100; b = 32'd1; f3 = F3_DIV;   // en stays high
    repeat (32) @(posedge clk);
    #1 en = 1'b0;
    check(done && result == 32'd42, $sformatf("start while busy: result %0d, expected 42", result));
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
