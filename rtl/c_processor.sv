// c_processor: RV32IM processor, top level.
//
// A single-cycle RV32I core with the RV32M multiply/divide extension. Each clock the instruction
// fetch unit presents the instruction at the program counter, the control unit decodes it, and the
// datapath reads registers, computes in the ALU, accesses data memory and writes the result back,
// all within the clock; the fetch unit then moves to PC + 4 or to the branch/jump target. An
// M-extension instruction holds the program counter (stall) until its multi-clock result is written
// back: 34 clocks for a multiply, quotient + 4 clocks for a divide.
//
// Memory map (parameters): instructions from RESET_PC (0x0000_8000) to IMEM_LAST (0x01FF_FFFF),
// data from DMEM_BASE (0x0200_0000) to DMEM_LAST (0x0FFF_FFFF, the top of the stack segment), as in
// the document. A program is loaded through the flash port (ip_wr_en, ip_wr_addr, ip_wr_data: one
// word per clock) while ip_en is low; ip_en high lets the core run. ip_rst is synchronous and
// active high: it returns the PC to RESET_PC and clears the registers, but not the memories.
//
// Outputs for observation (this design's own): op_pc/op_instr (instruction executing), op_retire
// (it completes this clock), the register write-back bus op_rd_*, the ALU and M-extension overflow
// flags, and op_stall.
module c_processor
  import rv32_pkg::*;
#(
  parameter logic [31:0] RESET_PC  = 32'h0000_8000,
  parameter logic [31:0] IMEM_LAST = 32'h01FF_FFFF,
  parameter logic [31:0] DMEM_BASE = 32'h0200_0000,
  parameter logic [31:0] DMEM_LAST = 32'h0FFF_FFFF
) (
  input  logic        ip_clk,
  input  logic        ip_rst,
  input  logic        ip_en,
  input  logic        ip_wr_en,
  input  logic [31:0] ip_wr_addr,
  input  logic [31:0] ip_wr_data,
  output logic [31:0] op_pc,
  output logic [31:0] op_instr,
  output logic        op_retire,
  output logic        op_rd_wr_en,
  output logic [4:0]  op_rd_addr,
  output logic [31:0] op_rd_data,
  output logic        op_alu_overflow,
  output logic        op_m_overflow,
  output logic        op_stall
);

  main_ctrl_t  main_ctrl;
  alu_ctrl_t   alu_ctrl;
  logic [31:0] br_addr;
  logic        br_ctrl;

  u_instr_fetch #(
    .INITIAL_ADDR (RESET_PC),
    .LAST_ADDR    (IMEM_LAST)
  ) u_instr_fetch (
    .ip_clk      (ip_clk),
    .ip_rst      (ip_rst),
    .ip_en       (ip_en),
    .ip_wr_data  (ip_wr_data),
    .ip_wr_addr  (ip_wr_addr),
    .ip_wr_en    (ip_wr_en),
    .ip_br_addr  (br_addr),
    .ip_br_ctrl  (br_ctrl),
    .ip_j_ctrl   (main_ctrl.j_ctrl),
    .ip_nop_ctrl (op_stall),
    .op_addr     (op_pc),
    .op_instr    (op_instr)
  );

  u_ctrl u_ctrl (
    .ip_instr (op_instr),
    .op_main  (main_ctrl),
    .op_alu   (alu_ctrl)
  );

  u_datapath #(
    .DMEM_BASE (DMEM_BASE),
    .DMEM_LAST (DMEM_LAST)
  ) u_datapath (
    .ip_clk          (ip_clk),
    .ip_rst          (ip_rst),
    .ip_en           (ip_en),
    .ip_instr        (op_instr),
    .ip_pc           (op_pc),
    .ip_main         (main_ctrl),
    .ip_alu          (alu_ctrl),
    .op_br_addr      (br_addr),
    .op_br_ctrl      (br_ctrl),
    .op_stall        (op_stall),
    .op_rd_wr_en     (op_rd_wr_en),
    .op_rd_addr      (op_rd_addr),
    .op_rd_data      (op_rd_data),
    .op_alu_overflow (op_alu_overflow),
    .op_m_overflow   (op_m_overflow)
  );

  assign op_retire = ip_en & ~ip_rst & ~op_stall;

endmodule
