// tb_bp3_microcode: self-checking testbench for bp3_microcode.
//
// Checks, opcode by opcode:
//  * the sequence length against the cycle counts the architecture quotes
//    (LDI 3, JMP 3, MOV 5, CMPI 5, LDD 5, STD 5, ADCI 6, ANDI 6 clocks,
//    i.e. one fetch clock plus len micro-operations);
//  * complete micro-operation sequences for representative instructions;
//  * for every arithmetic opcode, the ALU select code of its result step,
//    from a table written here from the instruction set;
//  * that `last` marks the final step and that unassigned opcodes are empty.
module tb_bp3_microcode;
  import bp3_pkg::*;

  logic [7:0] opcode;
  logic [3:0] step, len;
  uop_e       uop;
  alu_op_e    alu_op;
  logic       flag_upd, last;
  int checks = 0, failures = 0;

  bp3_microcode dut (.*);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (opcode %0h step %0d): got %0h expected %0h", what, opcode, step, got, exp);
    end
  endtask

  task automatic check_seq(input logic [7:0] opc, input uop_e exp [], input string name);
    opcode = opc;
    step = 0; #1;
    check({name, " len"}, len, exp.size());
    foreach (exp[i]) begin
      step = 4'(i); #1;
      check({name, " uop"}, uop, exp[i]);
      check({name, " last"}, last, i == exp.size() - 1);
    end
  endtask

  // Expected result-step select code of each arithmetic opcode.
  function automatic int exp_alu(input int opc);
    if (opc >= 'h04 && opc <= 'h27) begin
      case ((opc - 'h04) / 3)
        0: return 'h04;  1: return 'h02;  2: return 'h05;  3: return 'h06;
        4: return 'h07;  5: return 'h08;  6: return 'h09;  7: return 'h0C;
        default: return 'h00;   // shifts: shifted value written as is
      endcase
    end
    if (opc >= 'h30 && opc <= 'h32) return 'h16;
    if (opc >= 'h33 && opc <= 'h35) return 'h17;
    case (opc)
      'h28, 'h29: return 'h11;  'h2A, 'h2B: return 'h12;
      'h2C, 'h2D: return 'h13;  'h2E, 'h2F: return 'h03;
      'h3A, 'h3B: return 'h14;  'h3C, 'h3D: return 'h15;
      default: return -1;
    endcase
  endfunction

  localparam logic [7:0] UNUSED [6] = '{8'h45, 8'h7F, 8'h94, 8'hBF, 8'hCC, 8'hFF};

  initial begin
    // Quoted cycle counts.
    check_seq(8'h00, '{U_IMM_T, U_IMM_IO}, "LDI");
    check_seq(8'h83, '{U_IMM_A, U_JMP_IMM}, "JMP");
    check_seq(8'h01, '{U_IMM_T, U_RD_A, U_IMM_T, U_WR_ALU}, "MOV");
    check_seq(8'h81, '{U_IMM_T, U_RD_A, U_IMM_B, U_FLAGS}, "CMPI");
    check_seq(8'h44, '{U_IMM_A, U_IMM_B, U_IMM_T, U_MEM_IO}, "LDD");
    check_seq(8'h42, '{U_IMM_T, U_IMM_A, U_IMM_B, U_IO_MEM}, "STD");
    check_seq(8'h30, '{U_IMM_A, U_IMM_T, U_RD_B, U_IMM_T, U_WR_ALU}, "ADCI");
    check_seq(8'h0A, '{U_IMM_A, U_IMM_T, U_RD_B, U_IMM_T, U_WR_ALU}, "ANDI");
    // Other forms.
    check_seq(8'h06, '{U_IMM_T, U_RD_A, U_IMM_T, U_RD_B, U_IMM_T, U_WR_ALU}, "ADD r,r,r");
    check_seq(8'h17, '{U_IMM_T, U_RD_A, U_IMM_B, U_IMM_T, U_WR_ALU, U_WR_ALU1}, "MULT r,#,rr");
    check_seq(8'h1C, '{U_IMM_A, U_IMM_T, U_RD_B, U_SHIFT, U_IMM_T, U_WR_ALU}, "ROL #,r,r");
    check_seq(8'h29, '{U_IMM_T, U_RD_A, U_IMM_T, U_WR_ALU}, "INC r");
    check_seq(8'h03, '{U_IMM_T, U_RD_A, U_RD_B1, U_IMM_T, U_MEM_IO}, "LD");
    check_seq(8'h85, '{U_IMM_C, U_IMM_A, U_JMP_IMM}, "BR.cc ##");
    check_seq(8'h86, '{U_IMM_C, U_IMM_T, U_RD_A, U_JMP_IO}, "BR.cc rs");
    check_seq(8'h89, '{U_IMM_A, U_IMM_B, U_PUSH_PCH, U_PUSH_PCL, U_JMP_PTR}, "JSR");
    check_seq(8'h8F, '{U_POP_A, U_POP_PC}, "RET");
    check_seq(8'h90, '{U_INTCHK, U_PUSH_PCH, U_PUSH_PCL, U_JMP_ISR}, "INT");
    check_seq(8'hC8, '{U_IMM_A, U_IMM_B, U_PUSH_B, U_PUSH_A}, "PSHW ##");
    check_seq(8'hC2, '{U_IMM_T, U_POP_IO, U_POP_IO1}, "POPW");
    // Arithmetic select codes on the result step, and flag writing.
    for (int opc = 0; opc < 256; opc++) begin
      int e;
      e = exp_alu(opc);
      if (e < 0) continue;
      opcode = 8'(opc);
      step = 0; #1;
      step = len - 4'd1; #1;
      if (uop == U_WR_ALU1) begin step = len - 4'd2; #1; end
      check("result uop", uop, U_WR_ALU);
      check("alu op", alu_op, e);
      check("flag write", flag_upd, 1'b1);
    end
    // Second byte of MULT and DIV.
    opcode = 8'h18; step = 6; #1; check("MULT hi", {uop, alu_op}, {U_WR_ALU1, ALU_MULH});
    opcode = 8'h1B; step = 6; #1; check("DIV rem", {uop, alu_op}, {U_WR_ALU1, ALU_MOD});
    // MOV does not touch the flags; CMP subtracts.
    opcode = 8'h01; step = 3; #1; check("MOV flags", {alu_op, flag_upd}, {ALU_A, 1'b0});
    opcode = 8'h82; step = 4; #1; check("CMP op", {uop, alu_op}, {U_FLAGS, ALU_SUB});
    // Shift loop step uses the shift select code.
    opcode = 8'h25; step = 3; #1; check("ASR loop", {uop, alu_op}, {U_SHIFT, ALU_ASR});
    // Unassigned opcodes.
    foreach (UNUSED[i]) begin
      opcode = UNUSED[i]; step = 0; #1;
      check("empty", len, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
