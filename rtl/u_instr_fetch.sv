// u_instr_fetch: instruction fetch unit of the RV32IM core (program counter and instruction memory).
//
// The program counter starts at INITIAL_ADDR (0x0000_8000, the start of the text segment in the
// document's memory map). Each clock in which ip_en is high it moves on, in the priority order of
// the document's fetch flowchart: it holds when ip_nop_ctrl (stall) is high, loads ip_br_addr when
// ip_j_ctrl or ip_br_ctrl is high (the OR gate and multiplexer of the fetch schematic), and
// otherwise adds 4. The instruction memory is byte-addressed over INITIAL_ADDR..LAST_ADDR and is
// filled through a flash port: with ip_wr_en high, the four bytes of ip_wr_data are written
// little-endian at ip_wr_addr..ip_wr_addr+3 at the clock edge.
//
// Timing: op_addr is the PC register and op_instr the word stored at it, read combinationally, so
// the current instruction is available throughout the clock in which it executes. ip_rst is
// synchronous and active high and returns the PC to INITIAL_ADDR; memory contents are not reset.
// Addresses outside the memory read 0 and are not written (this design's choice).
module u_instr_fetch #(
  parameter logic [31:0] INITIAL_ADDR = 32'h0000_8000,
  parameter logic [31:0] LAST_ADDR    = 32'h01FF_FFFF
) (
  input  logic        ip_clk,
  input  logic        ip_rst,
  input  logic        ip_en,
  input  logic [31:0] ip_wr_data,
  input  logic [31:0] ip_wr_addr,
  input  logic        ip_wr_en,
  input  logic [31:0] ip_br_addr,
  input  logic        ip_br_ctrl,
  input  logic        ip_j_ctrl,
  input  logic        ip_nop_ctrl,
  output logic [31:0] op_addr,
  output logic [31:0] op_instr
);

  localparam longint unsigned DEPTH = longint'(LAST_ADDR) - longint'(INITIAL_ADDR) + 1;
  localparam int AW = $clog2(DEPTH);

  logic [7:0]  instr_mem [DEPTH];
  logic [31:0] pc;
  logic [31:0] pc_next;

  function automatic logic in_mem(input logic [31:0] a);
    return (a >= INITIAL_ADDR) && (a <= LAST_ADDR);
  endfunction

  // next-address selection: stall, then jump/branch, then PC + 4
  always_comb begin
    if (ip_nop_ctrl)                   pc_next = pc;
    else if (ip_j_ctrl || ip_br_ctrl)  pc_next = ip_br_addr;
    else                               pc_next = pc + 32'd4;
  end

  always_ff @(posedge ip_clk) begin
    if (ip_rst)     pc <= INITIAL_ADDR;
    else if (ip_en) pc <= pc_next;
  end

  // flash port
  always_ff @(posedge ip_clk) begin
    if (ip_wr_en) begin
      for (int k = 0; k < 4; k++) begin
        if (in_mem(ip_wr_addr + 32'(k)))
          instr_mem[AW'(ip_wr_addr + 32'(k) - INITIAL_ADDR)] <= ip_wr_data[8*k +: 8];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      op_instr[8*k +: 8] = in_mem(pc + 32'(k)) ? instr_mem[AW'(pc + 32'(k) - INITIAL_ADDR)] : 8'h00;
    end
  end

  assign op_addr = pc;

endmodule
