// bp3_memory: program and data memory on the 8BP3 16-bit address bus.
//
// 2**AW bytes (64 KiB by default, the whole 16-bit address space). The CPU
// port reads combinationally and writes on the rising clock edge while
// `we` is high, which matches the CPU's one-access-per-clock bus. A second
// write-only port (`ld_*`) loads a program, for instance while the CPU is
// held in reset; if both write in the same clock the load port wins. The
// memory organisation is this implementation's choice: the architecture
// only fixes the 16-bit address bus.
module bp3_memory #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  // CPU port
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata,
  // Load port
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [7:0]    ld_data
);

  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we)   mem[ld_addr] <= ld_data;
    else if (we) mem[addr]    <= wdata;
  end

  assign rdata = mem[addr];

endmodule
