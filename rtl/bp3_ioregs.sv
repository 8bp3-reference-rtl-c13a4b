// bp3_ioregs: the 8BP3 I/O register file.
//
// The 8BP3 has 256 I/O ports/registers; its instructions name their
// register operands by I/O address. This block is that register space:
// 2**AW locations of 8 bits with a combinational read port (valid while the
// CPU's IN strobe selects it) and a write port clocked on the rising edge
// while OUT is high. Locations 0..6 are shadowed by the CPU's internal
// registers: the CPU never asserts IN for them, but still pulses OUT, so a
// copy of each internal register written over the bus is kept here too, as
// the architecture allows. The array is not reset; software loads
// registers before using them. Making every location a plain read/write
// register (rather than some being ports to outside devices) is this
// implementation's choice.
module bp3_ioregs #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          in,      // read strobe
  input  logic          out,     // write strobe
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] regs [2**AW];

  always_ff @(posedge clk) begin
    if (out) regs[addr] <= wdata;
  end

  assign rdata = in ? regs[addr] : 8'h00;

endmodule
