// tb_b_data_mem: self-checking testbench for the byte-addressed data memory.
//
// Uses a 256-byte window at the document's data base address (0x0200_0000) so that a byte model
// in the testbench covers all of it. Performs 3000 random byte/half/word stores and signed or
// unsigned loads, including misaligned ones and ones that straddle the end of the memory, and
// compares each load with the model (little-endian, out-of-range bytes read 0 and are not
// written). Also checks that op_rd_data is 0 without a load and that no store happens in reset.
module tb_b_data_mem;
  localparam logic [31:0] BASE = 32'h0200_0000;
  localparam logic [31:0] LAST = 32'h0200_00FF;

  logic        clk = 1'b0, rst;
  logic [31:0] addr, st_data, rd_data;
  logic        st, ld, bt, hf, wd, uns;
  logic [7:0]  model [256];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  b_data_mem #(.BASE_ADDR(BASE), .LAST_ADDR(LAST)) dut (
    .ip_clk(clk), .ip_rst(rst), .ip_addr(addr), .ip_st_data(st_data), .ip_st_ctrl(st), .ip_ld_ctrl(ld),
    .ip_byte_ctrl(bt), .ip_half_ctrl(hf), .ip_word_ctrl(wd), .ip_uns_ctrl(uns), .op_rd_data(rd_data)
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

  function automatic logic [7:0] mbyte(input logic [31:0] a);
    return (a >= BASE && a <= LAST) ? model[a - BASE] : 8'h00;
  endfunction

  task automatic set_size(input int sz);
    bt = (sz == 1); hf = (sz == 2); wd = (sz == 4);
  endtask

  initial begin
    rst = 1'b0; st = 0; ld = 0; uns = 0; addr = BASE; st_data = 0; set_size(0);
    // fill the whole window with known bytes
    for (int i = 0; i < 256; i += 4) begin
      addr = BASE + 32'(i); st_data = $urandom; st = 1; set_size(4);
      @(posedge clk);
      for (int k = 0; k < 4; k++) model[i + k] = st_data[8*k +: 8];
      #1;
    end
    st = 0;
    for (int n = 0; n < 3000; n++) begin
      int sz;
      logic [31:0] exp;
      sz = 1 << $urandom_range(0, 2);
      addr = BASE - 4 + 32'($urandom_range(0, 263));
      set_size(sz);
      if ($urandom_range(0, 1)) begin
        st_data = $urandom; st = 1; ld = 0;
        @(posedge clk);
        for (int k = 0; k < sz; k++)
          if (addr + 32'(k) >= BASE && addr + 32'(k) <= LAST) model[addr + 32'(k) - BASE] = st_data[8*k +: 8];
        #1 st = 0;
      end else begin
        ld = 1; uns = 1'($urandom_range(0, 1));
        #1;
        exp = {mbyte(addr + 3), mbyte(addr + 2), mbyte(addr + 1), mbyte(addr)};
        if (sz == 1) exp = uns ? {24'b0, exp[7:0]}  : {{24{exp[7]}}, exp[7:0]};
        if (sz == 2) exp = uns ? {16'b0, exp[15:0]} : {{16{exp[15]}}, exp[15:0]};
        check(rd_data == exp, $sformatf("load size %0d uns %0b @%h = %h, expected %h", sz, uns, addr, rd_data, exp));
        @(posedge clk); #1 ld = 0;
      end
    end
    // no load selected: output 0
    ld = 0; set_size(4); addr = BASE; #1;
    check(rd_data == 0, "load data without a load");
    // no store during reset
    rst = 1; st = 1; st_data = ~{model[3], model[2], model[1], model[0]};
    @(posedge clk); #1 rst = 0; st = 0; ld = 1; #1;
    check(rd_data == {model[3], model[2], model[1], model[0]}, "store during reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
