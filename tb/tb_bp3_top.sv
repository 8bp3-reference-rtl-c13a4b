// tb_bp3_top: end-to-end testbench for the 8BP3 system, at full size.
//
// Loads the program of tb_bp3_prog_pkg through the memory load port while
// the CPU is in reset, releases reset and runs it to its final self-jump.
// Results are taken from the system's ports only: every OUT write is
// mirrored into a shadow register file and every memory write into a
// shadow memory, and these are compared with the hand-worked values. The
// testbench also counts how often each mechanism of the design occurred
// and fails if any never did: taken and not-taken conditional branches,
// multi-clock shift loops, subroutine call and return, pushes and pops, a
// masked and a taken software interrupt with its return, a divide by zero,
// reads of internal registers (IN held low), writes to internal registers
// (OUT still pulsed), memory-to-memory stack moves, a register-indirect
// jump, a result written to the flags register, a conditional call or
// interrupt that is skipped, and flag pushes and pops.
module tb_bp3_top;
  import bp3_pkg::*;
  import tb_bp3_prog_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        ld_we = 0;
  logic [15:0] ld_addr = 0;
  logic [7:0]  ld_data = 0;
  logic [7:0]  io_addr, io_wdata, mem_wdata;
  logic        io_in, io_out, mem_we, fetch;
  logic [15:0] mem_addr, pc;
  flags_t      flags;

  bp3_top dut (.*);

  logic [7:0] shadow_io [256];
  logic [7:0] shadow_mem [logic [15:0]];
  int checks = 0, failures = 0, cycles = 0;

  typedef enum int {
    M_BR_TAKEN, M_BR_NOT_TAKEN, M_SHIFT_LOOP, M_CALL, M_RETURN, M_PUSH, M_POP,
    M_INT_MASKED, M_INT_TAKEN, M_RETI, M_DIV_ZERO, M_INTERNAL_READ,
    M_INTERNAL_WRITE, M_MEM_TO_MEM, M_INDIRECT_JUMP, M_FLAGS_DEST, M_COND_SKIP,
    M_FLAGS_PUSH_POP, M_NUM
  } mech_e;
  int mech [M_NUM];

  always #5 clk = ~clk;

  // Mechanism counters (internal micro-operation is observed for the
  // classification only; the results are checked from the ports).
  always @(posedge clk) begin
    cycles++;
    if (rst_n) begin
      if (io_out) shadow_io[io_addr] <= io_wdata;
      if (mem_we) shadow_mem[mem_addr] = mem_wdata;
      unique case (dut.u_cpu.u)
        U_JMP_IMM, U_JMP_IO: if (dut.u_cpu.c != 8'h01) begin
          if (dut.u_cpu.take) mech[M_BR_TAKEN]++; else mech[M_BR_NOT_TAKEN]++;
        end
        U_SHIFT:    if (dut.u_cpu.b != 0) mech[M_SHIFT_LOOP]++;
        U_PUSH_PCH: if (dut.u_cpu.ir inside {8'h90, 8'h93}) mech[M_INT_TAKEN]++; else mech[M_CALL]++;
        U_CHK:      if (!dut.u_cpu.take) mech[M_COND_SKIP]++;
        U_POP_PC:   if (dut.u_cpu.ir == 8'h91) mech[M_RETI]++; else mech[M_RETURN]++;
        U_INTCHK:   if (!flags.e) mech[M_INT_MASKED]++;
        U_PUSH_A, U_PUSH_B, U_PUSH_IO, U_PUSH_IO1: mech[M_PUSH]++;
        U_POP_IO, U_POP_IO1: mech[M_POP]++;
        U_PUSH_F, U_POP_F: mech[M_FLAGS_PUSH_POP]++;
        U_PUSH_X:   begin mech[M_PUSH]++; mech[M_MEM_TO_MEM]++; end
        U_POP_X:    begin mech[M_POP]++;  mech[M_MEM_TO_MEM]++; end
        default: ;
      endcase
      if (dut.u_cpu.u == U_JMP_IO && dut.u_cpu.c == 8'h01) mech[M_INDIRECT_JUMP]++;
      if (dut.u_cpu.u == U_WR_ALU && dut.u_cpu.alu_op == ALU_DIV && flags.d == 0
          && dut.u_cpu.b == 0) mech[M_DIV_ZERO]++;
      if (dut.u_cpu.io_rd && io_addr < 7) begin
        mech[M_INTERNAL_READ]++;
        if (io_in) begin failures++; $display("FAIL IN asserted for register %0d", io_addr); end
      end
      if (io_out && io_addr < 7) mech[M_INTERNAL_WRITE]++;
      if (io_out && io_addr == REG_FLAGS && dut.u_cpu.u == U_WR_ALU) mech[M_FLAGS_DEST]++;
    end
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  exp_t e [$];
  int   run_start;

  task automatic final_checks();
    expected_regs(e);
    foreach (e[i]) check($sformatf("r%0h", e[i].addr), shadow_io[e[i].addr[7:0]], e[i].value);
    check("r15 untouched", shadow_io[8'h15], 8'h00);
    expected_mem(e);
    foreach (e[i]) check($sformatf("mem[%0h]", e[i].addr), shadow_mem[e[i].addr], e[i].value);
    check("final flags", flags, 8'h00);
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-18s %0d", mech_e'(m), mech[m]);
      check($sformatf("mechanism %s seen", mech_e'(m)), mech[m] > 0, 1);
    end
  endtask

  initial begin
    build();
    foreach (shadow_io[i]) shadow_io[i] = 8'h00;
    foreach (mech[i]) mech[i] = 0;
    // Load the program, zero the data words it checks.
    for (int i = 0; i < int'(here); i++) begin
      @(negedge clk); ld_we = 1; ld_addr = 16'(i); ld_data = image[i];
    end
    @(negedge clk); ld_addr = 16'h8000; ld_data = 8'h00;
    @(negedge clk); ld_addr = 16'h1234; ld_data = 8'h00;
    @(negedge clk); ld_we = 0;
    rst_n = 1;
    run_start = cycles;
    wait (fetch && pc == l_halt);
    $display("program reached halt after %0d clocks", cycles - run_start);
    repeat (4) @(negedge clk);
    final_checks();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 30000);
    failures++;
    $display("FAIL watchdog");
    final_checks();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
