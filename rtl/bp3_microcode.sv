// bp3_microcode: the 8BP3 control store.
//
// Maps an opcode to a sequence of one-clock micro-operations (bp3_pkg::uop_e)
// and, for each step, the ALU select code and whether the step writes the
// ALU flags. The CPU spends one clock fetching the opcode and then one
// clock per micro-operation, so an instruction takes 1 + len clocks
// (U_SHIFT repeats while its count is non-zero; U_CHK and U_INTCHK may end
// an instruction early).
//
// Every operand byte fetched from the program takes one clock, every read
// of a register (an I/O location) takes one clock, and a write of a result
// takes one clock. A byte moving between memory and a register does so in a
// single clock over the shared data bus. With this rule the cycle counts
// the architecture quotes come out exactly: LDI 3, JMP ## 3, MOV 5, CMPI 5,
// LDD 5, STD 5, ADCI 6, ANDI 6.
//
// Operand order and byte order follow the instruction set: for a
// three-operand "X,Y,Z" form the first operand is A, the second B and the
// third the destination; 16-bit values and register pairs are little
// endian (register r holds the low byte, r+1 the high byte). Encodings that
// the instruction descriptions print are used as printed, including LDI
// (00,rd,#), ST (02,rd,rs: pointer first) and LDD (44,#l,#h,rd); the
// encodings of the other instructions follow the order of their operand
// lists. Stack and interrupt micro-sequences are this implementation's
// reading of the one-line descriptions in the instruction set; the stack
// grows downwards, a push stores at SP then decrements it, a pop increments
// SP then loads, and a word is pushed high byte first. Opcodes the
// instruction set leaves empty have an empty sequence (len = 0).
//
// Purely combinational.
module bp3_microcode
  import bp3_pkg::*;
(
  input  logic [7:0] opcode,
  input  logic [3:0] step,
  output uop_e       uop,
  output alu_op_e    alu_op,
  output logic       flag_upd,   // U_WR_ALU of this step writes the flags
  output logic [3:0] len,        // number of micro-operations
  output logic       last        // `step` is the final micro-operation
);

  localparam int unsigned N = 10;

  uop_e    seq [N];
  logic [3:0] n;
  alu_op_e op_main;
  alu_op_e op_second;
  logic    is_alu;      // arithmetic instruction: writes the flags
  logic    is_shift;    // repeated single-bit shift

  // Append one micro-operation to the sequence being built.
`define BP3_PUSH(x) seq[n] = x; n = n + 4'd1

  always_comb begin
    logic [7:0] grp;
    logic [1:0] mode;
    for (int i = 0; i < N; i++) seq[i] = U_NOP;
    n = 4'd0;
    op_main = ALU_A;
    op_second = ALU_A;
    is_alu = 1'b0;
    is_shift = 1'b0;
    grp = 8'd0;
    mode = 2'd0;

    if (opcode >= 8'h04 && opcode <= 8'h27 || opcode >= 8'h30 && opcode <= 8'h35) begin
      // Three-operand arithmetic: A op B -> C (MULT and DIV: C and C+1).
      grp  = (opcode >= 8'h30) ? (opcode - 8'h30) / 8'd3 + 8'd12 : (opcode - 8'h04) / 8'd3;
      mode = (opcode >= 8'h30) ? 2'((opcode - 8'h30) % 8'd3) : 2'((opcode - 8'h04) % 8'd3);
      is_alu = 1'b1;
      unique case (grp)
        8'd0:  op_main = ALU_ADD;
        8'd1:  op_main = ALU_SUB;
        8'd2:  op_main = ALU_AND;
        8'd3:  op_main = ALU_OR;
        8'd4:  op_main = ALU_XOR;
        8'd5:  op_main = ALU_XNOR;
        8'd6:  begin op_main = ALU_MULL; op_second = ALU_MULH; end
        8'd7:  begin op_main = ALU_DIV;  op_second = ALU_MOD;  end
        8'd8:  begin op_main = ALU_ROL; is_shift = 1'b1; end
        8'd9:  begin op_main = ALU_ROR; is_shift = 1'b1; end
        8'd10: begin op_main = ALU_ASL; is_shift = 1'b1; end
        8'd11: begin op_main = ALU_ASR; is_shift = 1'b1; end
        8'd12: op_main = ALU_ADDC;
        default: op_main = ALU_SUBC;
      endcase
      unique case (mode)
        2'd0:    begin `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_B); end
        2'd1:    begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_IMM_B); end
        default: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A);
                       `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_B); end
      endcase
      if (is_shift) begin `BP3_PUSH(U_SHIFT); end
      `BP3_PUSH(U_IMM_T);
      `BP3_PUSH(U_WR_ALU);
      if (grp == 8'd6 || grp == 8'd7) begin `BP3_PUSH(U_WR_ALU1); end
    end else if (opcode >= 8'h28 && opcode <= 8'h2F || opcode >= 8'h3A && opcode <= 8'h3D) begin
      // Two-operand arithmetic: f(A) -> B.
      is_alu = 1'b1;
      unique case (opcode[7:1])
        7'h14:   op_main = ALU_INC;
        7'h15:   op_main = ALU_DEC;
        7'h16:   op_main = ALU_NOT;
        7'h17:   op_main = ALU_NEG;
        7'h1D:   op_main = ALU_BCD;
        default: op_main = ALU_BIN;
      endcase
      if (!opcode[0]) begin `BP3_PUSH(U_IMM_A); end
      else begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); end
      `BP3_PUSH(U_IMM_T);
      `BP3_PUSH(U_WR_ALU);
    end else begin
      unique case (opcode)
        8'h00: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_IMM_IO); end                 // LDI
        8'h01: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A);                        // MOV
                     `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_WR_ALU); end
        8'h02: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); // ST
                     `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_IO_MEM); end
        8'h03: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); // LD
                     `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_MEM_IO); end
        8'h36: begin `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_SETF); end                   // SETF #
        8'h37: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_SETF); end
        8'h38: begin `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_CLRF); end                   // CLRF #
        8'h39: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_CLRF); end
        8'h3E: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_IMM_IO); `BP3_PUSH(U_IMM_IO1); end // LDIW
        8'h3F: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); // MOVW
                     `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_WR_A); `BP3_PUSH(U_WR_B1); end
        8'h40: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); // STW
                     `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_IO_MEM); `BP3_PUSH(U_IO_MEM1); end
        8'h41: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); // LDW
                     `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_MEM_IO); `BP3_PUSH(U_MEM_IO1); end
        8'h42: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_IMM_B); // STD
                     `BP3_PUSH(U_IO_MEM); end
        8'h43: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_IMM_B); // STDW
                     `BP3_PUSH(U_IO_MEM); `BP3_PUSH(U_IO_MEM1); end
        8'h44: begin `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_IMM_B); `BP3_PUSH(U_IMM_T); // LDD
                     `BP3_PUSH(U_MEM_IO); end
        // Compare: A - B, flags only.
        8'h80: begin op_main = ALU_SUB; `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_IMM_T);
                     `BP3_PUSH(U_RD_B); `BP3_PUSH(U_FLAGS); end
        8'h81: begin op_main = ALU_SUB; `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A);
                     `BP3_PUSH(U_IMM_B); `BP3_PUSH(U_FLAGS); end
        8'h82: begin op_main = ALU_SUB; `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A);
                     `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_B); `BP3_PUSH(U_FLAGS); end
        // Jumps. The condition latch holds "always" unless a cc is fetched.
        8'h83: begin `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_JMP_IMM); end
        8'h84: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_JMP_IO); end
        8'h85: begin `BP3_PUSH(U_IMM_C); `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_JMP_IMM); end
        8'h86: begin `BP3_PUSH(U_IMM_C); `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A);
                     `BP3_PUSH(U_JMP_IO); end
        8'h87: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_C); `BP3_PUSH(U_IMM_A);
                     `BP3_PUSH(U_JMP_IMM); end
        8'h88: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_C); `BP3_PUSH(U_IMM_T);
                     `BP3_PUSH(U_RD_A); `BP3_PUSH(U_JMP_IO); end
        // Subroutine calls: target into {B, A}, push return address, jump.
        8'h89: begin `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_IMM_B);
                     `BP3_PUSH(U_PUSH_PCH); `BP3_PUSH(U_PUSH_PCL); `BP3_PUSH(U_JMP_PTR); end
        8'h8A: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1);
                     `BP3_PUSH(U_PUSH_PCH); `BP3_PUSH(U_PUSH_PCL); `BP3_PUSH(U_JMP_PTR); end
        8'h8B: begin `BP3_PUSH(U_IMM_C); `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_IMM_B);
                     `BP3_PUSH(U_CHK);
                     `BP3_PUSH(U_PUSH_PCH); `BP3_PUSH(U_PUSH_PCL); `BP3_PUSH(U_JMP_PTR); end
        8'h8C: begin `BP3_PUSH(U_IMM_C); `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A);
                     `BP3_PUSH(U_RD_B1); `BP3_PUSH(U_CHK);
                     `BP3_PUSH(U_PUSH_PCH); `BP3_PUSH(U_PUSH_PCL); `BP3_PUSH(U_JMP_PTR); end
        8'h8D: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_C); `BP3_PUSH(U_IMM_A);
                     `BP3_PUSH(U_IMM_B); `BP3_PUSH(U_CHK);
                     `BP3_PUSH(U_PUSH_PCH); `BP3_PUSH(U_PUSH_PCL); `BP3_PUSH(U_JMP_PTR); end
        8'h8E: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_C); `BP3_PUSH(U_IMM_T);
                     `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); `BP3_PUSH(U_CHK);
                     `BP3_PUSH(U_PUSH_PCH); `BP3_PUSH(U_PUSH_PCL); `BP3_PUSH(U_JMP_PTR); end
        8'h8F: begin `BP3_PUSH(U_POP_A); `BP3_PUSH(U_POP_PC); end                  // RET
        8'h90: begin `BP3_PUSH(U_INTCHK); `BP3_PUSH(U_PUSH_PCH);                    // INT
                     `BP3_PUSH(U_PUSH_PCL); `BP3_PUSH(U_JMP_ISR); end
        8'h91: begin `BP3_PUSH(U_POP_A); `BP3_PUSH(U_POP_PC); `BP3_PUSH(U_SETE); end // RETI
        8'h92: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_TEST); end   // TEST
        8'h93: begin `BP3_PUSH(U_IMM_C); `BP3_PUSH(U_CHK); `BP3_PUSH(U_INTCHK); // INTcc
                     `BP3_PUSH(U_PUSH_PCH); `BP3_PUSH(U_PUSH_PCL); `BP3_PUSH(U_JMP_ISR); end
        // Stack.
        8'hC0: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_POP_IO); end                  // POPB r
        8'hC1: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); // POPB (r)
                     `BP3_PUSH(U_POP_X); `BP3_PUSH(U_X_MEM); end
        8'hC2: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_POP_IO); `BP3_PUSH(U_POP_IO1); end // POPW
        8'hC3: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); // POPW (rr)
                     `BP3_PUSH(U_POP_X); `BP3_PUSH(U_X_MEM);
                     `BP3_PUSH(U_POP_X); `BP3_PUSH(U_X_MEM1); end
        8'hC4: begin `BP3_PUSH(U_POP_F); end                                          // POPF
        8'hC5: begin `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_PUSH_A); end                  // PSHB #
        8'hC6: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_PUSH_IO); end                 // PSHB r
        8'hC7: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); // PSHB (r)
                     `BP3_PUSH(U_MEM_X); `BP3_PUSH(U_PUSH_X); end
        8'hC8: begin `BP3_PUSH(U_IMM_A); `BP3_PUSH(U_IMM_B);                       // PSHW ##
                     `BP3_PUSH(U_PUSH_B); `BP3_PUSH(U_PUSH_A); end
        8'hC9: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_PUSH_IO1); `BP3_PUSH(U_PUSH_IO); end // PSHW rr
        8'hCA: begin `BP3_PUSH(U_IMM_T); `BP3_PUSH(U_RD_A); `BP3_PUSH(U_RD_B1); // PSHW (rr)
                     `BP3_PUSH(U_MEM_X1); `BP3_PUSH(U_PUSH_X);
                     `BP3_PUSH(U_MEM_X); `BP3_PUSH(U_PUSH_X); end
        8'hCB: begin `BP3_PUSH(U_PUSH_F); end                                          // PSHF
        default: ;  // unassigned opcode: no-op
      endcase
    end
  end

  assign len  = n;
  assign last = (step == n - 4'd1);
  assign uop  = (step < n) ? seq[step] : U_NOP;

  always_comb begin
    alu_op = ALU_A;
    flag_upd = 1'b0;
    unique case (uop)
      U_SHIFT:   alu_op = op_main;
      U_FLAGS:   alu_op = op_main;
      U_WR_ALU:  begin alu_op = is_shift ? ALU_A : op_main; flag_upd = is_alu; end
      U_WR_ALU1: alu_op = op_second;
      default:   ;
    endcase
  end

`undef BP3_PUSH

endmodule
