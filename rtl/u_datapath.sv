// u_datapath: datapath unit of the RV32IM core: register file, ALU, data memory and M extension.
//
// For the instruction at ip_pc the register file supplies rs1 (bits 19:15) and rs2 (bits 24:20),
// the ALU computes the result, the branch decision and the branch/jump target, the data memory
// loads or stores at the ALU result, and the write-back multiplexer returns to rd (bits 11:7)
// either the M-extension result (op_m_ext_wb_ctrl), the loaded data (op_wb_ctrl) or the ALU result.
//
// M-extension instructions take several clocks. In the first clock of such an instruction the unit
// is started; op_stall is high from then until the clock in which the unit presents its one-clock
// result (op_done), and the register write is held back until that clock. Nothing is written, stored
// or started while ip_en is low. The write-back bus (op_rd_*) and the overflow flags are brought out
// for observation.
//
// Timing: single-cycle for RV32I (register and memory writes at the rising edge that ends the
// instruction's clock); M instructions as described in b_m_ext. ip_rst is synchronous, active high.
//
// The opcode bits of ip_instr and the jump control of ip_main are decoded or used elsewhere (control
// unit, fetch unit) and are unused here.
module u_datapath
  import rv32_pkg::*;
#(
  parameter logic [31:0] DMEM_BASE = 32'h0200_0000,
  parameter logic [31:0] DMEM_LAST = 32'h0FFF_FFFF
) (
  input  logic        ip_clk,
  input  logic        ip_rst,
  input  logic        ip_en,
  input  logic [31:0] ip_instr,
  input  logic [31:0] ip_pc,
  input  main_ctrl_t  ip_main,
  input  alu_ctrl_t   ip_alu,
  output logic [31:0] op_br_addr,
  output logic        op_br_ctrl,
  output logic        op_stall,
  output logic        op_rd_wr_en,
  output logic [4:0]  op_rd_addr,
  output logic [31:0] op_rd_data,
  output logic        op_alu_overflow,
  output logic        op_m_overflow
);

  logic [31:0] rs1, rs2, alu_result, st_data, ld_data, m_result;
  logic        m_busy, m_done, m_start, alu_overflow;

  b_reg_file u_reg_file (
    .ip_clk      (ip_clk),
    .ip_rst      (ip_rst),
    .ip_rs1_addr (ip_instr[19:15]),
    .ip_rs2_addr (ip_instr[24:20]),
    .ip_wr_addr  (op_rd_addr),
    .ip_wr_data  (op_rd_data),
    .ip_wr_en    (op_rd_wr_en),
    .op_rs1      (rs1),
    .op_rs2      (rs2)
  );

  b_alu u_alu (
    .ip_rs1       (rs1),
    .ip_rs2       (rs2),
    .ip_pc        (ip_pc),
    .ip_instr_imm (ip_instr[31:7]),
    .ip_ctrl      (ip_alu),
    .op_result    (alu_result),
    .op_imm       (st_data),
    .op_overflow  (alu_overflow),
    .op_br_addr   (op_br_addr),
    .op_br_ctrl   (op_br_ctrl)
  );

  b_data_mem #(
    .BASE_ADDR (DMEM_BASE),
    .LAST_ADDR (DMEM_LAST)
  ) u_data_mem (
    .ip_clk       (ip_clk),
    .ip_rst       (ip_rst),
    .ip_addr      (alu_result),
    .ip_st_data   (st_data),
    .ip_st_ctrl   (ip_en & ip_main.st_en),
    .ip_ld_ctrl   (ip_main.ld_en),
    .ip_byte_ctrl (ip_main.byte_ctrl),
    .ip_half_ctrl (ip_main.half_ctrl),
    .ip_word_ctrl (ip_main.word_ctrl),
    .ip_uns_ctrl  (ip_main.uns_ctrl),
    .op_rd_data   (ld_data)
  );

  // start the M extension in the first clock of an M instruction
  assign m_start  = ip_en & ip_main.m_ext_en & ~m_busy & ~m_done;
  assign op_stall = ip_main.m_ext_en & ~m_done;

  b_m_ext u_m_ext (
    .ip_clk       (ip_clk),
    .ip_rst       (ip_rst),
    .ip_operand_a (rs1),
    .ip_operand_b (rs2),
    .ip_funct_3   (ip_instr[14:12]),
    .ip_m_ext_en  (m_start),
    .op_result    (m_result),
    .op_nop_ctrl  (m_busy),
    .op_overflow  (op_m_overflow),
    .op_done      (m_done)
  );

  // the ALU also sees M instructions (same opcode as register-register ALU operations); its
  // overflow flag only counts for the instructions it executes
  assign op_alu_overflow = alu_overflow & ~ip_main.m_ext_en;

  // write-back
  assign op_rd_addr  = ip_instr[11:7];
  assign op_rd_wr_en = ip_en & ip_main.reg_wr_en & ~op_stall;
  always_comb begin
    if (ip_main.m_ext_wb_ctrl) op_rd_data = m_result;
    else if (ip_main.wb_ctrl)  op_rd_data = ld_data;
    else                       op_rd_data = alu_result;
  end

endmodule
