// bp3_pkg: types and constants shared by the 8BP3 CPU.
//
// The 8BP3 is an 8-bit CPU with a 16-bit memory address bus whose general
// registers live in a 256-entry I/O space. This package holds the flag byte
// layout (S Z C H V P D E, bit 7 down to bit 0, as the architecture defines
// for internal register 0), the 5-bit ALU select codes (numbered as the
// architecture numbers them), the internal register addresses 0..6, and the
// micro-operation set used by the control store. The micro-operation set,
// and the fact that each one takes exactly one clock, are this
// implementation's own: the architecture lists instructions and a few cycle
// counts, not the control signals.
package bp3_pkg;

  // Flag byte, reg 0. Bit 7 .. bit 0.
  typedef struct packed {
    logic s;  // sign
    logic z;  // zero
    logic c;  // carry / borrow
    logic h;  // half carry (out of bit 3)
    logic v;  // signed overflow
    logic p;  // parity, 1 = even number of ones
    logic d;  // divide by zero
    logic e;  // interrupt enable
  } flags_t;

  // ALU select codes.
  typedef enum logic [4:0] {
    ALU_A     = 5'h00,
    ALU_B     = 5'h01,
    ALU_SUB   = 5'h02,
    ALU_NEG   = 5'h03,
    ALU_ADD   = 5'h04,
    ALU_AND   = 5'h05,
    ALU_OR    = 5'h06,
    ALU_XOR   = 5'h07,
    ALU_XNOR  = 5'h08,
    ALU_MULL  = 5'h09,
    ALU_MULH  = 5'h0A,
    ALU_MOD   = 5'h0B,
    ALU_DIV   = 5'h0C,
    ALU_ROL   = 5'h0D,
    ALU_ROR   = 5'h0E,
    ALU_ASL   = 5'h0F,
    ALU_ASR   = 5'h10,
    ALU_INC   = 5'h11,
    ALU_DEC   = 5'h12,
    ALU_NOT   = 5'h13,
    ALU_BCD   = 5'h14,
    ALU_BIN   = 5'h15,
    ALU_ADDC  = 5'h16,
    ALU_SUBC  = 5'h17
  } alu_op_e;

  // Internal (I/O-mapped) register addresses.
  localparam logic [7:0] REG_FLAGS = 8'd0;
  localparam logic [7:0] REG_SPL   = 8'd1;
  localparam logic [7:0] REG_SPH   = 8'd2;
  localparam logic [7:0] REG_ISRL  = 8'd3;
  localparam logic [7:0] REG_ISRH  = 8'd4;
  localparam logic [7:0] REG_PCL   = 8'd5;
  localparam logic [7:0] REG_PCH   = 8'd6;
  localparam int unsigned NUM_INTERNAL = 7;

  // Micro-operations. Names: source_destination. PTR is the 16-bit pointer
  // {B, A}; T is the I/O address latch; C the condition-code latch; X a
  // byte buffer for memory-to-memory moves; SP the stack pointer.
  // Every one takes one clock and uses the memory and the I/O bus at most
  // once each.
  typedef enum logic [5:0] {
    U_NOP,
    U_IMM_A,      // A  <- mem[PC], PC++
    U_IMM_B,      // B  <- mem[PC], PC++
    U_IMM_T,      // T  <- mem[PC], PC++
    U_IMM_C,      // C  <- mem[PC], PC++
    U_RD_A,       // A  <- io[T]
    U_RD_A1,      // A  <- io[T+1]
    U_RD_B,       // B  <- io[T]
    U_RD_B1,      // B  <- io[T+1]
    U_RD_C,       // C  <- io[T]
    U_WR_ALU,     // io[T]   <- ALU(op1), flags updated for ALU instructions
    U_WR_ALU1,    // io[T+1] <- ALU(op2)
    U_FLAGS,      // flags <- ALU(op1) flags, nothing written
    U_SHIFT,      // while B != 0: A <- ALU(op1), B-- ; one clock per step
    U_IMM_IO,     // io[T]   <- mem[PC], PC++
    U_IMM_IO1,    // io[T+1] <- mem[PC], PC++
    U_MEM_IO,     // io[T]   <- mem[PTR]
    U_MEM_IO1,    // io[T+1] <- mem[PTR+1]
    U_IO_MEM,     // mem[PTR]   <- io[T]
    U_IO_MEM1,    // mem[PTR+1] <- io[T+1]
    U_WR_A,       // io[T]   <- A
    U_WR_B1,      // io[T+1] <- B
    U_SETF,       // flags <- flags | A
    U_CLRF,       // flags <- flags & ~A
    U_TEST,       // S, Z <- from A
    U_JMP_IMM,    // if cond(C): PC <- {mem[PC], A} else PC++
    U_JMP_IO,     // if cond(C): PC <- {io[T+1], A}
    U_JMP_PTR,    // PC <- PTR
    U_JMP_ISR,    // PC <- ISR address
    U_CHK,        // if !cond(C): end the instruction
    U_INTCHK,     // if !E: end the instruction, else E <- 0
    U_PUSH_PCH,   // mem[SP] <- PC[15:8], SP--
    U_PUSH_PCL,   // mem[SP] <- PC[7:0],  SP--
    U_PUSH_A,     // mem[SP] <- A, SP--
    U_PUSH_B,     // mem[SP] <- B, SP--
    U_PUSH_X,     // mem[SP] <- X, SP--
    U_PUSH_IO,    // mem[SP] <- io[T], SP--
    U_PUSH_IO1,   // mem[SP] <- io[T+1], SP--
    U_PUSH_F,     // mem[SP] <- flags, SP--
    U_POP_A,      // SP++, A <- mem[SP]
    U_POP_PC,     // SP++, PC <- {mem[SP], A}
    U_POP_IO,     // SP++, io[T] <- mem[SP]
    U_POP_IO1,    // SP++, io[T+1] <- mem[SP]
    U_POP_X,      // SP++, X <- mem[SP]
    U_POP_F,      // SP++, flags <- mem[SP]
    U_MEM_X,      // X <- mem[PTR]
    U_MEM_X1,     // X <- mem[PTR+1]
    U_X_MEM,      // mem[PTR] <- X
    U_X_MEM1,     // mem[PTR+1] <- X
    U_SETE        // E <- 1
  } uop_e;

  // Parity flag convention: 1 when the byte holds an even number of ones.
  function automatic logic even_parity(input logic [7:0] v);
    return ~(^v);
  endfunction

endpackage
