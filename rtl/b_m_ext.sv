// b_m_ext: RV32M multiply/divide unit of the core (MUL, MULH, MULHSU, MULHU, DIV, DIVU, REM, REMU).
//
// A start pulse (ip_m_ext_en while idle) latches the operation and the operands. Operands that the
// operation treats as signed and that are negative are converted to their magnitude, and their
// signs are kept. The unit then works on magnitudes only:
//  - Multiply, "add and shift": for 32 clocks, bit [counter] of operand B decides whether operand A
//    is added to the upper half of the 64-bit register reg_mul_div, which is then shifted right by
//    one with the adder's carry entering at the top. After the 32nd step the product is negated if
//    the operand signs differ, and the low (MUL) or high (MULH/MULHSU/MULHU) word is output.
//  - Divide, "subtract and compare": each clock, while the remainder (initially the dividend) is at
//    least the divisor, the divisor is subtracted from it and the quotient counts up by one. The
//    clock in which the remainder falls below the divisor marks the quotient ready, and the next
//    clock outputs the quotient (DIV, DIVU; negated if the signs differ) or remainder (REM, REMU;
//    with the dividend's sign). A zero divisor, or the most negative number divided by -1, ends the
//    operation at once with result 0 and op_overflow high.
//
// Timing, with the start clock counted as clock 1 (as in the document's test plan):
//  - multiply: op_nop_ctrl high in clocks 2..33, result in clock 34;
//  - divide with quotient magnitude q: op_nop_ctrl high in clocks 2..q+3, result in clock q+4;
//  - divide error: op_nop_ctrl high in clock 2, op_overflow in clock 3.
// op_result and op_overflow are valid for one clock only and 0 otherwise; op_done marks that clock.
// op_done is this design's own addition, the rest follows the document. ip_m_ext_en is ignored
// while busy. Reset is synchronous and active high.
//
// Bit 0 of the product register is shifted out in the last multiply step and is never read.
module b_m_ext
  import rv32_pkg::*;
(
  input  logic        ip_clk,
  input  logic        ip_rst,
  input  logic [31:0] ip_operand_a,
  input  logic [31:0] ip_operand_b,
  input  logic [2:0]  ip_funct_3,
  input  logic        ip_m_ext_en,
  output logic [31:0] op_result,
  output logic        op_nop_ctrl,
  output logic        op_overflow,
  output logic        op_done
);

  logic        busy;          // the document's "switch"
  logic        ready_div_op;
  logic [2:0]  funct_3;
  logic        sign_a, sign_b;
  logic [31:0] operand_a, operand_b;
  logic [63:0] reg_mul_div;
  logic [4:0]  counter;
  logic [31:0] quotient, remainder;

  // which operands are signed for this operation
  logic a_signed, b_signed;
  always_comb begin
    a_signed = (ip_funct_3 != F3_MULHU) && (ip_funct_3 != F3_DIVU) && (ip_funct_3 != F3_REMU);
    b_signed = (ip_funct_3 == F3_MUL) || (ip_funct_3 == F3_MULH) ||
               (ip_funct_3 == F3_DIV) || (ip_funct_3 == F3_REM);
  end

  logic        neg_a_in, neg_b_in;
  logic [31:0] mag_a, mag_b;
  assign neg_a_in = a_signed & ip_operand_a[31];
  assign neg_b_in = b_signed & ip_operand_b[31];
  assign mag_a    = neg_a_in ? (~ip_operand_a + 32'd1) : ip_operand_a;
  assign mag_b    = neg_b_in ? (~ip_operand_b + 32'd1) : ip_operand_b;

  // one add-and-shift step
  logic [32:0] mul_sum;
  logic [63:0] mul_next, product;
  assign mul_sum  = {1'b0, reg_mul_div[63:32]} + (operand_b[counter] ? {1'b0, operand_a} : 33'd0);
  assign mul_next = {mul_sum, reg_mul_div[31:1]};
  assign product  = (sign_a ^ sign_b) ? (~mul_next + 64'd1) : mul_next;

  // one subtract-and-compare step
  logic [32:0] diff;
  logic        div_error;
  assign diff      = {1'b0, remainder} - {1'b0, operand_b};
  assign div_error = (operand_b == '0) ||
                     (sign_a && sign_b && operand_a == 32'h8000_0000 && operand_b == 32'd1);

  logic [31:0] div_out;
  always_comb begin
    if (!funct_3[1]) div_out = (sign_a ^ sign_b) ? (~quotient + 32'd1) : quotient;
    else             div_out = sign_a ? (~remainder + 32'd1) : remainder;
  end

  always_ff @(posedge ip_clk) begin
    if (ip_rst) begin
      busy         <= 1'b0;
      ready_div_op <= 1'b0;
      funct_3      <= '0;
      sign_a       <= 1'b0;
      sign_b       <= 1'b0;
      operand_a    <= '0;
      operand_b    <= '0;
      reg_mul_div  <= '0;
      counter      <= '0;
      quotient     <= '0;
      remainder    <= '0;
      op_result    <= '0;
      op_overflow  <= 1'b0;
      op_done      <= 1'b0;
    end else begin
      op_result   <= '0;
      op_overflow <= 1'b0;
      op_done     <= 1'b0;
      if (!busy) begin
        if (ip_m_ext_en) begin
          busy         <= 1'b1;
          ready_div_op <= 1'b0;
          funct_3      <= ip_funct_3;
          sign_a       <= neg_a_in;
          sign_b       <= neg_b_in;
          operand_a    <= mag_a;
          operand_b    <= mag_b;
          remainder    <= mag_a;
          quotient     <= '0;
          reg_mul_div  <= '0;
          counter      <= '0;
        end
      end else if (!funct_3[2]) begin
        // multiplication
        reg_mul_div <= mul_next;
        counter     <= counter + 5'd1;
        if (counter == 5'd31) begin
          busy      <= 1'b0;
          op_done   <= 1'b1;
          op_result <= (funct_3 == F3_MUL) ? product[31:0] : product[63:32];
        end
      end else begin
        // division
        if (ready_div_op) begin
          busy      <= 1'b0;
          op_done   <= 1'b1;
          op_result <= div_out;
        end else if (div_error) begin
          busy        <= 1'b0;
          op_done     <= 1'b1;
          op_overflow <= 1'b1;
          op_result   <= '0;
        end else if (!diff[32]) begin
          remainder <= diff[31:0];
          quotient  <= quotient + 32'd1;
        end else begin
          ready_div_op <= 1'b1;
        end
      end
    end
  end

  assign op_nop_ctrl = busy;

  // a result is only ever presented once the unit has gone idle
  assert property (@(posedge ip_clk) disable iff (ip_rst) op_done |-> !op_nop_ctrl);

endmodule
