// b_reg_file: the 32 x 32-bit general-purpose register file of the RV32IM core.
//
// Register x0 always reads zero and ignores writes; x1..x31 are ordinary registers. A 5-to-32
// decoder gated by ip_wr_en selects the register written at the rising clock edge, and two
// 32-way read multiplexers drive op_rs1 and op_rs2 combinationally from ip_rs1_addr and
// ip_rs2_addr, as in the register-file schematic of the document. A synchronous, active-high
// ip_rst clears every register, as the document's model does.
//
// Timing: reads are combinational (a write is visible to reads from the next clock on). The
// document's own model registers the read data; this design reads combinationally so that the
// single-cycle datapath can execute an instruction in one clock.
module b_reg_file #(
  parameter int XLEN = 32,
  parameter int NREG = 32
) (
  input  logic                    ip_clk,
  input  logic                    ip_rst,
  input  logic [$clog2(NREG)-1:0] ip_rs1_addr,
  input  logic [$clog2(NREG)-1:0] ip_rs2_addr,
  input  logic [$clog2(NREG)-1:0] ip_wr_addr,
  input  logic [XLEN-1:0]         ip_wr_data,
  input  logic                    ip_wr_en,
  output logic [XLEN-1:0]         op_rs1,
  output logic [XLEN-1:0]         op_rs2
);

  logic [XLEN-1:0] regs [1:NREG-1];

  always_ff @(posedge ip_clk) begin
    if (ip_rst) begin
      for (int i = 1; i < NREG; i++) regs[i] <= '0;
    end else if (ip_wr_en && ip_wr_addr != '0) begin
      regs[ip_wr_addr] <= ip_wr_data;
    end
  end

  assign op_rs1 = (ip_rs1_addr == '0) ? '0 : regs[ip_rs1_addr];
  assign op_rs2 = (ip_rs2_addr == '0) ? '0 : regs[ip_rs2_addr];

endmodule
