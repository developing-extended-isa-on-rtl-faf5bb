// rv32_tb_pkg: testbench helpers for the RV32IM core: instruction encoders and a reference model
// of one instruction's effect, written from the RISC-V RV32I/RV32M definitions and independent of
// the RTL. Divide by zero and the most negative number divided by -1 return 0 and set the error
// flag, as the design's M extension does.
package rv32_tb_pkg;

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_i(input int imm, input int rs1, input logic [2:0] f3,
                                        input int rd, input logic [6:0] op);
    logic [31:0] v = 32'(imm);
    return {v[11:0], 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_s(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [31:0] v = 32'(imm);
    return {v[11:5], 5'(rs2), 5'(rs1), f3, v[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(input int off, input int rs2, input int rs1, input logic [2:0] f3);
    logic [31:0] v = 32'(off);
    return {v[12], v[10:5], 5'(rs2), 5'(rs1), f3, v[4:1], v[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(input logic [19:0] imm, input int rd, input logic [6:0] op);
    return {imm, 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_j(input int off, input int rd);
    logic [31:0] v = 32'(off);
    return {v[20], v[10:1], v[11], v[19:12], 5'(rd), 7'b1101111};
  endfunction

  // common mnemonics
  function automatic logic [31:0] ADDI(input int rd, input int rs1, input int imm);
    return enc_i(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] ADD(input int rd, input int rs1, input int rs2);
    return enc_r(7'b0000000, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] SUB(input int rd, input int rs1, input int rs2);
    return enc_r(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] ANDI(input int rd, input int rs1, input int imm);
    return enc_i(imm, rs1, 3'b111, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] SRLI(input int rd, input int rs1, input int sh);
    return enc_i(sh, rs1, 3'b101, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] LUI(input int rd, input logic [19:0] imm);
    return enc_u(imm, rd, 7'b0110111);
  endfunction
  function automatic logic [31:0] MEXT(input logic [2:0] f3, input int rd, input int rs1, input int rs2);
    return enc_r(7'b0000001, rs2, rs1, f3, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] BEQ(input int rs1, input int rs2, input int off);
    return enc_b(off, rs2, rs1, 3'b000);
  endfunction
  function automatic logic [31:0] BNE(input int rs1, input int rs2, input int off);
    return enc_b(off, rs2, rs1, 3'b001);
  endfunction
  function automatic logic [31:0] JAL(input int rd, input int off);
    return enc_j(off, rd);
  endfunction
  function automatic logic [31:0] JALR(input int rd, input int rs1, input int imm);
    return enc_i(imm, rs1, 3'b000, rd, 7'b1100111);
  endfunction
  function automatic logic [31:0] SW(input int rs2, input int rs1, input int imm);
    return enc_s(imm, rs2, rs1, 3'b010);
  endfunction
  function automatic logic [31:0] LW(input int rd, input int rs1, input int imm);
    return enc_i(imm, rs1, 3'b010, rd, 7'b0000011);
  endfunction

  // ---------------------------------------------------------------- reference model
  typedef struct {
    bit          valid;     // a known instruction
    bit          wr;        // writes rd
    logic [4:0]  rd;
    logic [31:0] val;       // value written (loads: filled by the caller with load_ext)
    logic [31:0] next_pc;
    bit          ld, st;
    logic [31:0] addr;      // load/store address
    int          size;      // 1, 2, 4
    bit          uns;
    logic [31:0] st_data;
    bit          is_m, is_div;
    bit          branch, taken, jump;
    bit          alu_ovf, m_ovf;
  } iss_t;

  function automatic logic [31:0] load_ext(input logic [31:0] raw, input int size, input bit uns);
    if (size == 1) return uns ? {24'b0, raw[7:0]} : {{24{raw[7]}}, raw[7:0]};
    if (size == 2) return uns ? {16'b0, raw[15:0]} : {{16{raw[15]}}, raw[15:0]};
    return raw;
  endfunction

  function automatic iss_t iss_exec(input logic [31:0] ins, input logic [31:0] pc,
                                    input logic [31:0] x, input logic [31:0] y);
    iss_t r;
    logic [6:0]  op = ins[6:0];
    logic [2:0]  f3 = ins[14:12];
    logic [6:0]  f7 = ins[31:25];
    logic [31:0] ii = {{20{ins[31]}}, ins[31:20]};
    logic [31:0] is = {{20{ins[31]}}, ins[31:25], ins[11:7]};
    logic [31:0] ib = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
    logic [31:0] iu = {ins[31:12], 12'b0};
    logic [31:0] ij = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
    logic [31:0] b;
    longint sx, sy, ux, uy, p;
    r = '{default: 0};
    r.valid = 1;
    r.rd = ins[11:7];
    r.next_pc = pc + 4;
    case (op)
      7'b0110111: begin r.wr = 1; r.val = iu; end
      7'b0010111: begin r.wr = 1; r.val = pc + iu; end
      7'b1101111: begin r.wr = 1; r.val = pc + 4; r.next_pc = pc + ij; r.jump = 1; end
      7'b1100111: begin r.wr = 1; r.val = pc + 4; r.next_pc = (x + ii) & ~32'd1; r.jump = 1; end
      7'b1100011: begin
        r.branch = 1;
        case (f3)
          3'b000: r.taken = (x == y);
          3'b001: r.taken = (x != y);
          3'b100: r.taken = ($signed(x) < $signed(y));
          3'b101: r.taken = ($signed(x) >= $signed(y));
          3'b110: r.taken = (x < y);
          3'b111: r.taken = (x >= y);
          default: r.valid = 0;
        endcase
        if (r.taken) r.next_pc = pc + ib;
      end
      7'b0000011: begin
        r.wr = 1; r.ld = 1; r.addr = x + ii; r.uns = f3[2];
        r.size = (f3[1:0] == 0) ? 1 : (f3[1:0] == 1) ? 2 : 4;
      end
      7'b0100011: begin
        r.st = 1; r.addr = x + is; r.st_data = y;
        r.size = (f3[1:0] == 0) ? 1 : (f3[1:0] == 1) ? 2 : 4;
      end
      7'b0010011, 7'b0110011: begin
        r.wr = 1;
        if (op == 7'b0110011 && f7 == 7'b0000001) begin
          r.is_m = 1;
          r.is_div = f3[2];
          sx = longint'($signed(x)); sy = longint'($signed(y));
          ux = longint'({32'b0, x}); uy = longint'({32'b0, y});
          case (f3)
            3'b000: begin p = sx * sy; r.val = p[31:0]; end
            3'b001: begin p = sx * sy; r.val = p[63:32]; end
            3'b010: begin p = sx * uy; r.val = p[63:32]; end
            3'b011: begin p = ux * uy; r.val = p[63:32]; end
            default: begin
              if (y == 0 || (!f3[0] && x == 32'h8000_0000 && y == 32'hFFFF_FFFF)) begin
                r.val = 0; r.m_ovf = 1;
              end else if (f3[0]) r.val = f3[1] ? x % y : x / y;
              else begin p = f3[1] ? sx % sy : sx / sy; r.val = p[31:0]; end
            end
          endcase
        end else begin
          b = (op == 7'b0010011) ? ii : y;
          case (f3)
            3'b000: begin
              if (op == 7'b0110011 && f7[5]) begin
                r.val = x - y; r.alu_ovf = (x[31] != y[31]) && (r.val[31] != x[31]);
              end else begin
                r.val = x + b; r.alu_ovf = (x[31] == b[31]) && (r.val[31] != x[31]);
              end
            end
            3'b001: begin r.val = x << b[4:0]; r.alu_ovf = (op == 7'b0110011) && (y[31:5] != 0); end
            3'b010: r.val = {31'b0, $signed(x) < $signed(b)};
            3'b011: r.val = {31'b0, x < b};
            3'b100: r.val = x ^ b;
            3'b101: begin
              r.val = f7[5] ? 32'($signed(x) >>> b[4:0]) : x >> b[4:0];
              r.alu_ovf = (op == 7'b0110011) && (y[31:5] != 0);
            end
            3'b110: r.val = x | b;
            3'b111: r.val = x & b;
          endcase
        end
      end
      default: r.valid = 0;
    endcase
    return r;
  endfunction

endpackage
