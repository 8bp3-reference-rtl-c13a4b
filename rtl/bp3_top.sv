// bp3_top: an 8BP3 system: CPU, 64 KiB memory and the I/O register file.
//
// The CPU (bp3_cpu) fetches and executes from bp3_memory over the 16-bit
// address bus and keeps its general registers in bp3_ioregs, the 256-entry
// I/O space; internal registers 0..6 sit inside the CPU. Programs are
// loaded through the memory's load port while `rst_n` is low; releasing
// reset starts execution at address 0000. The I/O bus strobes, the program
// counter, the flags and the opcode-fetch strobe are brought out so that
// software activity can be observed. Assembling these three blocks into one
// system is this implementation's choice; the architecture describes the
// CPU and its buses.
module bp3_top
  import bp3_pkg::*;
#(
  parameter int unsigned MEM_AW = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // Program load port
  input  logic        ld_we,
  input  logic [15:0] ld_addr,
  input  logic [7:0]  ld_data,
  // Observation
  output logic [7:0]  io_addr,
  output logic [7:0]  io_wdata,
  output logic        io_in,
  output logic        io_out,
  output logic [15:0] mem_addr,
  output logic        mem_we,
  output logic [7:0]  mem_wdata,
  output logic        fetch,
  output logic [15:0] pc,
  output flags_t      flags
);

  logic [7:0] mem_rdata, io_rdata;

  bp3_cpu u_cpu (
    .clk       (clk),
    .rst_n     (rst_n),
    .mem_addr  (mem_addr),
    .mem_rdata (mem_rdata),
    .mem_wdata (mem_wdata),
    .mem_we    (mem_we),
    .io_addr   (io_addr),
    .io_rdata  (io_rdata),
    .io_wdata  (io_wdata),
    .io_in     (io_in),
    .io_out    (io_out),
    .fetch     (fetch),
    .pc_o      (pc),
    .flags_o   (flags)
  );

  bp3_memory #(.AW(MEM_AW)) u_mem (
    .clk     (clk),
    .addr    (mem_addr[MEM_AW-1:0]),
    .we      (mem_we),
    .wdata   (mem_wdata),
    .rdata   (mem_rdata),
    .ld_we   (ld_we),
    .ld_addr (ld_addr[MEM_AW-1:0]),
    .ld_data (ld_data)
  );

  bp3_ioregs u_io (
    .clk   (clk),
    .addr  (io_addr),
    .in    (io_in),
    .out   (io_out),
    .wdata (io_wdata),
    .rdata (io_rdata)
  );

endmodule
