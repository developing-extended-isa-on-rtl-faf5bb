// tb_b_reg_file: self-checking testbench for the 32 x 32-bit register file.
//
// Checks that reset clears every register, that x0 reads zero even after a write, and runs 2000
// random clocks of writes and reads on both ports against a register model kept in the testbench.
// Reads are combinational: a written value is visible right after the clock edge.
module tb_b_reg_file;
  logic        clk = 1'b0, rst, we;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] wd, rd1, rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  b_reg_file dut (
    .ip_clk(clk), .ip_rst(rst), .ip_rs1_addr(ra1), .ip_rs2_addr(ra2), .ip_wr_addr(wa),
    .ip_wr_data(wd), .ip_wr_en(we), .op_rs1(rd1), .op_rs2(rd2)
  );

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
    @(posedge clk); #1 rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(31 - i); #1;
      check(rd1 == 0 && rd2 == 0, $sformatf("x%0d not cleared by reset", i));
    end
    // x0 is hardwired
    we = 1'b1; wa = 5'd0; wd = 32'hDEAD_BEEF;
    @(posedge clk); #1 we = 1'b0; ra1 = 5'd0; ra2 = 5'd0; #1;
    check(rd1 == 0 && rd2 == 0, "x0 written");
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom_range(0, 1)); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1;
      check(rd1 == model[ra1] && rd2 == model[ra2],
            $sformatf("read x%0d=%h x%0d=%h, expected %h %h", ra1, rd1, ra2, rd2, model[ra1], model[ra2]));
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
    end
    // reset clears written registers
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    for (int i = 1; i < 32; i++) begin
      ra1 = 5'(i); #1;
      check(rd1 == 0, $sformatf("x%0d not cleared by second reset", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
