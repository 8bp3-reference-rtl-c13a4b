// tb_bp3_cpu: self-checking testbench for the bp3_cpu core.
//
// The core is connected to a 64 KiB memory array and a 256-byte I/O array
// modelled here. The program of tb_bp3_prog_pkg is run to its final
// self-jump; then every register and memory result is compared with the
// hand-worked values, r15 (written only on wrong paths) must be untouched,
// and the clocks between consecutive opcode fetches give the cycle counts
// of the instructions whose timing the architecture quotes (LDI 3, JMP 3,
// MOV 5, CMPI 5, LDD 5, STD 5, ADCI 6, ANDI 6), plus the multi-bit rotate
// (7 clocks + 1 per bit). The I/O bus is checked every clock: IN must never
// be asserted for the internal addresses 0..6, and never together with OUT.
module tb_bp3_cpu;
  import bp3_pkg::*;
  import tb_bp3_prog_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] mem_addr, pc_o;
  logic [7:0]  mem_rdata, mem_wdata, io_addr, io_rdata, io_wdata;
  logic        mem_we, io_in, io_out, fetch;
  flags_t      flags_o;

  logic [7:0]  mem [65536];
  logic [7:0]  io  [256];
  int          fetch_cycle [65536];
  int          cost [65536];
  int checks = 0, failures = 0, cycles = 0;

  bp3_cpu dut (.*);

  assign mem_rdata = mem[mem_addr];
  assign io_rdata  = io_in ? io[io_addr] : 8'h00;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (rst_n) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      if (io_out) io[io_addr] <= io_wdata;
      if (io_in && io_addr < 8'd7) begin
        failures++;
        $display("FAIL IN asserted for internal register %0d", io_addr);
      end
      if (io_in && io_out) begin
        failures++;
        $display("FAIL IN and OUT together");
      end
    end
  end

  // Clocks from the fetch of an instruction to the next fetch.
  logic [15:0] last_fetch_pc;
  int          last_fetch_cycle;
  initial last_fetch_cycle = -1;
  bit executed [256];
  always @(posedge clk) if (rst_n && fetch) begin
    executed[mem_rdata] = 1;
    if (last_fetch_cycle >= 0 && cost[last_fetch_pc] == 0)
      cost[last_fetch_pc] = cycles - last_fetch_cycle;
    last_fetch_pc = pc_o;
    last_fetch_cycle = cycles;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  exp_t e [$];

  task automatic final_checks();
    string missing;
    missing = "";
    for (int op = 0; op < 256; op++)
      if (!executed[op] && (op <= 'h44 || (op >= 'h80 && op <= 'h93) || (op >= 'hC0 && op <= 'hCB)))
        missing = {missing, $sformatf(" %02h", op)};
    $display("instruction opcodes not executed by the program:%s", missing);
    check("stays in halt loop", pc_o >= l_halt && pc_o <= l_halt + 16'd3, 1);
    expected_regs(e);
    foreach (e[i]) check($sformatf("r%0h", e[i].addr), io[e[i].addr[7:0]], e[i].value);
    check("r15 untouched", io[8'h15], 8'h00);
    expected_mem(e);
    foreach (e[i]) check($sformatf("mem[%0h]", e[i].addr), mem[e[i].addr], e[i].value);
    check("final flags", flags_o, 8'h00);
    check("LDI cycles",  cost[l_ldi],  3);
    check("JMP cycles",  cost[l_jmp],  3);
    check("MOV cycles",  cost[l_mov],  5);
    check("CMPI cycles", cost[l_cmpi], 5);
    check("LDD cycles",  cost[l_ldd],  5);
    check("STD cycles",  cost[l_std],  5);
    check("ADCI cycles", cost[l_adci], 6);
    check("ANDI cycles", cost[l_andi], 6);
    check("ROL by 3 cycles", cost[l_rol], 10);
    check("ROL by 0 cycles", cost[l_rol0], 7);
  endtask

  initial begin
    build();
    foreach (mem[i]) mem[i] = image[i];
    foreach (io[i]) io[i] = 8'h00;
    foreach (cost[i]) cost[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fetch && pc_o == l_halt && cycles > 10);
    repeat (4) @(negedge clk);
    final_checks();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    final_checks();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
