// b_data_mem: byte-addressed data memory of the RV32IM core (static data, heap and stack).
//
// The memory covers byte addresses BASE_ADDR..LAST_ADDR, by default 0x0200_0000..0x0FFF_FFFF,
// the data and stack segments of the document's memory map. Each location holds one byte;
// half-words and words are little-endian (byte at ip_addr is bits 7:0). ip_byte_ctrl,
// ip_half_ctrl and ip_word_ctrl pick the access size; loads are sign-extended unless ip_uns_ctrl
// is set (LBU, LHU). op_rd_data is 0 when ip_ld_ctrl is low, as in the document.
//
// Timing: stores are written at the rising clock edge when ip_st_ctrl is high; loads are
// combinational, so a load completes in the same clock (the document's model registers the load
// data; a combinational read is this design's choice for the single-cycle datapath). Bytes outside
// the range read 0 and are not written. The contents are not cleared by ip_rst (the document's
// model clears every byte on reset, which a memory of this size cannot do in one clock); while
// ip_rst is high stores are blocked.
module b_data_mem #(
  parameter logic [31:0] BASE_ADDR = 32'h0200_0000,
  parameter logic [31:0] LAST_ADDR = 32'h0FFF_FFFF
) (
  input  logic        ip_clk,
  input  logic        ip_rst,
  input  logic [31:0] ip_addr,
  input  logic [31:0] ip_st_data,
  input  logic        ip_st_ctrl,
  input  logic        ip_ld_ctrl,
  input  logic        ip_byte_ctrl,
  input  logic        ip_half_ctrl,
  input  logic        ip_word_ctrl,
  input  logic        ip_uns_ctrl,
  output logic [31:0] op_rd_data
);

  localparam longint unsigned DEPTH = longint'(LAST_ADDR) - longint'(BASE_ADDR) + 1;
  localparam int AW = $clog2(DEPTH);

  logic [7:0] mem [DEPTH];

  // byte k of the access (k = 0..3)
  logic [3:0]  in_range;
  logic [31:0] byte_addr [4];
  logic [7:0]  rd_byte [4];
  logic [3:0]  byte_en;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      byte_addr[k] = ip_addr + 32'(k);
      in_range[k]  = (byte_addr[k] >= BASE_ADDR) && (byte_addr[k] <= LAST_ADDR);
      rd_byte[k]   = in_range[k] ? mem[AW'(byte_addr[k] - BASE_ADDR)] : 8'h00;
    end
    unique case (1'b1)
      ip_word_ctrl: byte_en = 4'b1111;
      ip_half_ctrl: byte_en = 4'b0011;
      ip_byte_ctrl: byte_en = 4'b0001;
      default:      byte_en = 4'b0000;
    endcase
  end

  always_ff @(posedge ip_clk) begin
    if (ip_st_ctrl && !ip_rst) begin
      for (int k = 0; k < 4; k++) begin
        if (byte_en[k] && in_range[k]) mem[AW'(byte_addr[k] - BASE_ADDR)] <= ip_st_data[8*k +: 8];
      end
    end
  end

  always_comb begin
    op_rd_data = '0;
    if (ip_ld_ctrl) begin
      if (ip_word_ctrl)
        op_rd_data = {rd_byte[3], rd_byte[2], rd_byte[1], rd_byte[0]};
      else if (ip_half_ctrl)
        op_rd_data = {{16{~ip_uns_ctrl & rd_byte[1][7]}}, rd_byte[1], rd_byte[0]};
      else if (ip_byte_ctrl)
        op_rd_data = {{24{~ip_uns_ctrl & rd_byte[0][7]}}, rd_byte[0]};
    end
  end

endmodule
