// bp3_alu: the 8BP3 arithmetic and logic unit.
//
// Purely combinational. `op` is one of the 24 ALU select codes (00..17 hex)
// of the architecture: pass A, pass B, A-B, -A, A+B, AND, OR, XOR, XNOR,
// low and high byte of A*B, A%B, A/B, rotate left, rotate right, shift left
// filling with bit 0, arithmetic shift right, A+1, A-1, ~A, binary to BCD,
// BCD to binary, A+B+carry and A-B-carry. The functions follow the
// architecture's table, including its shift-left definition, which copies
// bit 0 into the vacated bit.
//
// Flags: S, Z and P (even parity) are produced for every code. C, H and V
// are produced only by the add and subtract codes (`cvh_valid`); C is the
// carry out for additions and the borrow for subtractions, H the carry or
// borrow across bit 3/4, V the two's-complement overflow. D is produced
// only by A/B and A%B (`d_valid`): it is set on a zero divisor, when the
// quotient reads FF and the remainder reads A. Which flags each code
// affects, the divide-by-zero results and the range handling of BCD and
// BIN are this implementation's choices: BCD(A) gives the two packed BCD
// digits of A mod 100, BIN(A) gives 10*A[7:4] + A[3:0] truncated to 8 bits.
// The interrupt-enable field E of `flags_out` is always 0: no ALU
// operation affects it.
module bp3_alu
  import bp3_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       carry_in,
  output logic [7:0] y,
  output flags_t     flags_out,   // valid fields: see cvh_valid, d_valid
  output logic       cvh_valid,
  output logic       d_valid
);

  logic [8:0]  sum9;
  logic [8:0]  dif9;
  logic [7:0]  sa, sb;
  logic        sc;
  logic [15:0] prod;
  logic [7:0]  a_mod100;
  logic [7:0]  tens;

  always_comb begin
    // Operands of the shared adder/subtractor.
    sa = a; sb = b; sc = 1'b0;
    unique case (op)
      ALU_INC:  begin sb = 8'd1; end
      ALU_DEC:  begin sb = 8'd1; end
      ALU_NEG:  begin sa = 8'd0; sb = a; end
      ALU_SUB:  begin end
      ALU_ADDC: begin sc = carry_in; end
      ALU_SUBC: begin sc = carry_in; end
      default:  ;
    endcase
  end

  assign sum9 = {1'b0, sa} + {1'b0, sb} + {8'd0, sc};
  assign dif9 = {1'b0, sa} - {1'b0, sb} - {8'd0, sc};
  assign prod = a * b;
  assign a_mod100 = a % 8'd100;
  assign tens = a_mod100 / 8'd10;

  always_comb begin
    y = 8'h00;
    cvh_valid = 1'b0;
    d_valid = 1'b0;
    flags_out = '0;
    unique case (op)
      ALU_A:    y = a;
      ALU_B:    y = b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_XNOR: y = a ~^ b;
      ALU_MULL: y = prod[7:0];
      ALU_MULH: y = prod[15:8];
      ALU_MOD:  begin
        d_valid = 1'b1;
        flags_out.d = (b == 8'd0);
        y = (b == 8'd0) ? a : a % b;
      end
      ALU_DIV:  begin
        d_valid = 1'b1;
        flags_out.d = (b == 8'd0);
        y = (b == 8'd0) ? 8'hFF : a / b;
      end
      ALU_ROL:  y = {a[6:0], a[7]};
      ALU_ROR:  y = {a[0], a[7:1]};
      ALU_ASL:  y = {a[6:0], a[0]};
      ALU_ASR:  y = {a[7], a[7:1]};
      ALU_NOT:  y = ~a;
      ALU_BCD:  y = {tens[3:0], 4'(a_mod100 - tens * 8'd10)};
      ALU_BIN:  y = 8'(a[7:4] * 8'd10 + {4'd0, a[3:0]});
      ALU_ADD, ALU_INC, ALU_ADDC: begin
        y = sum9[7:0];
        cvh_valid = 1'b1;
        flags_out.c = sum9[8];
        flags_out.h = sa[4] ^ sb[4] ^ sum9[4];   // carry into bit 4
        flags_out.v = (sa[7] == sb[7]) && (sum9[7] != sa[7]);
      end
      ALU_SUB, ALU_DEC, ALU_NEG, ALU_SUBC: begin
        y = dif9[7:0];
        cvh_valid = 1'b1;
        flags_out.c = dif9[8];
        flags_out.h = sa[4] ^ sb[4] ^ dif9[4];   // borrow into bit 4
        flags_out.v = (sa[7] != sb[7]) && (dif9[7] != sa[7]);
      end
      default:  y = a;   // select codes above 17 hex are unused
    endcase
    flags_out.s = y[7];
    flags_out.z = (y == 8'h00);
    flags_out.p = even_parity(y);
  end

endmodule
