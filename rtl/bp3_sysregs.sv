// bp3_sysregs: the 8BP3 internal registers, mapped into I/O space.
//
//   0  flags  (S Z C H V P D E)  read/write
//   1  stack pointer, low byte   read/write
//   2  stack pointer, high byte  read/write
//   3  ISR address, low byte     read/write
//   4  ISR address, high byte    read/write
//   5  program counter, low      read only
//   6  program counter, high     read only
//
// `hit` is high when the I/O address is one of these seven; the CPU then
// takes read data from `rdata` and keeps the external IN strobe low, so an
// external register at the same address does not drive the bus. Writes
// still pulse OUT externally (the CPU does that), so outside logic may keep
// a copy. This follows the architecture.
//
// Besides the I/O write port the CPU updates the flags and the stack
// pointer directly (`flags_we`, `sp_we`) while executing instructions. If
// both write the same register in one clock the I/O write wins: an
// instruction whose destination register is the flags register stores its
// result there. Writes are on the rising clock edge; reads are
// combinational. Reset clears every register except the stack pointer,
// which resets to FFFF. The priority rule and the reset values are this
// implementation's choices.
module bp3_sysregs
  import bp3_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // I/O-mapped access
  input  logic [7:0]  io_addr,
  input  logic        io_we,
  input  logic [7:0]  io_wdata,
  output logic [7:0]  io_rdata,
  output logic        hit,
  // Direct access from the CPU
  input  logic        flags_we,
  input  flags_t      flags_d,
  output flags_t      flags_q,
  input  logic        sp_we,
  input  logic [15:0] sp_d,
  output logic [15:0] sp_q,
  output logic [15:0] isr_q,
  input  logic [15:0] pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flags_q <= '0;
      sp_q    <= 16'hFFFF;
      isr_q   <= 16'h0000;
    end else begin
      if (flags_we) flags_q <= flags_d;
      if (sp_we)    sp_q    <= sp_d;
      if (io_we) begin
        unique case (io_addr)
          REG_FLAGS: flags_q      <= flags_t'(io_wdata);
          REG_SPL:   sp_q[7:0]    <= io_wdata;
          REG_SPH:   sp_q[15:8]   <= io_wdata;
          REG_ISRL:  isr_q[7:0]   <= io_wdata;
          REG_ISRH:  isr_q[15:8]  <= io_wdata;
          default:   ;  // PC bytes are read only; others are external
        endcase
      end
    end
  end

  assign hit = (io_addr < 8'(NUM_INTERNAL));

  always_comb begin
    unique case (io_addr)
      REG_FLAGS: io_rdata = flags_q;
      REG_SPL:   io_rdata = sp_q[7:0];
      REG_SPH:   io_rdata = sp_q[15:8];
      REG_ISRL:  io_rdata = isr_q[7:0];
      REG_ISRH:  io_rdata = isr_q[15:8];
      REG_PCL:   io_rdata = pc[7:0];
      REG_PCH:   io_rdata = pc[15:8];
      default:   io_rdata = 8'h00;
    endcase
  end

endmodule
