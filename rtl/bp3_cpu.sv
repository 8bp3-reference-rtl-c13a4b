// bp3_cpu: the 8BP3 processor core.
//
// An 8-bit CPU with a 16-bit memory address bus and an 8-bit I/O bus of 256
// locations. The general registers live in that I/O space; addresses 0..6
// are the CPU's own internal registers (flags, stack pointer, ISR address,
// program counter read-back, see bp3_sysregs), and reads of them keep the
// external IN strobe low while writes still pulse OUT, as the architecture
// specifies.
//
// How it works: a micro-sequenced, non-pipelined datapath. One clock
// fetches the opcode into IR (and sets the condition latch C to "always");
// bp3_microcode then supplies one micro-operation per clock. The datapath
// holds the ALU operand latches A and B (which together also form the
// 16-bit pointer {B, A}), the I/O address latch T, the condition latch C, a
// byte buffer X for memory-to-memory moves, and the program counter. Each
// clock makes at most one memory access and at most one I/O access, and a
// byte can go from memory straight into a register (or back) in a single
// clock over the shared data bus. The datapath structure and micro-
// operations are this implementation's own; the instruction behaviour and
// the cycle counts of LDI, JMP, MOV, CMPI, LDD, STD, ADCI and ANDI are the
// architecture's. Opcodes with no instruction assigned take two clocks
// (fetch plus one idle clock) and do nothing.
//
// Interface and timing: memory and I/O reads are combinational (address
// out, data back in the same clock); writes happen at the rising edge at
// the end of the clock in which the write enable is high. `io_in` is high in
// a clock that reads an external I/O location, `io_out` in a clock that
// writes any I/O location. `fetch` is high in the clock that fetches an
// opcode, so the distance between two `fetch` clocks is an instruction's
// cycle count. Active-low asynchronous reset; execution starts at address
// 0000 with all flags clear (interrupts disabled) and SP = FFFF. Hardware
// interrupt requests are not part of this core; INT and INTcc are the
// software interrupt instructions. The I/O-exclusivity assertion is
// disabled during reset, which is why rst_n also appears in a synchronous
// context; the flip-flops themselves use it only asynchronously.
module bp3_cpu
  import bp3_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Memory bus
  output logic [15:0] mem_addr,
  input  logic [7:0]  mem_rdata,
  output logic [7:0]  mem_wdata,
  output logic        mem_we,
  // I/O bus
  output logic [7:0]  io_addr,
  input  logic [7:0]  io_rdata,
  output logic [7:0]  io_wdata,
  output logic        io_in,
  output logic        io_out,
  // Status
  output logic        fetch,
  output logic [15:0] pc_o,
  output flags_t      flags_o
);

  typedef enum logic {S_FETCH, S_EXEC} state_e;

  state_e      state;
  logic [15:0] pc;
  logic [7:0]  ir, a, b, t, c, x;
  logic [3:0]  step;

  // Control store
  logic [7:0]  opcode;
  uop_e        uop_raw, u;
  alu_op_e     alu_op;
  logic        flag_upd, last;
  logic [3:0]  len;

  assign opcode = ir;

  bp3_microcode u_mc (
    .opcode   (opcode),
    .step     (step),
    .uop      (uop_raw),
    .alu_op   (alu_op),
    .flag_upd (flag_upd),
    .len      (len),
    .last     (last)
  );

  assign u = (state == S_EXEC) ? uop_raw : U_NOP;

  // Internal registers
  flags_t      flags_q, flags_d;
  logic        flags_we;
  logic [15:0] sp_q, sp_d, isr_q;
  logic        sp_we;
  logic [7:0]  sys_rdata;
  logic        sys_hit;
  logic        io_wr;

  bp3_sysregs u_sys (
    .clk      (clk),
    .rst_n    (rst_n),
    .io_addr  (io_addr),
    .io_we    (io_wr),
    .io_wdata (io_wdata),
    .io_rdata (sys_rdata),
    .hit      (sys_hit),
    .flags_we (flags_we),
    .flags_d  (flags_d),
    .flags_q  (flags_q),
    .sp_we    (sp_we),
    .sp_d     (sp_d),
    .sp_q     (sp_q),
    .isr_q    (isr_q),
    .pc       (pc)
  );

  // ALU and condition evaluation. The ALU never produces the E flag, so
  // alu_f.e is left unused.
  logic [7:0] alu_y;
  flags_t     alu_f;
  logic       alu_cvh, alu_d;
  logic       take;

  bp3_alu u_alu (
    .op        (alu_op),
    .a         (a),
    .b         (b),
    .carry_in  (flags_q.c),
    .y         (alu_y),
    .flags_out (alu_f),
    .cvh_valid (alu_cvh),
    .d_valid   (alu_d)
  );

  bp3_cond u_cond (
    .cc    (c),
    .flags (flags_q),
    .take  (take)
  );

  logic [15:0] ptr;
  logic [7:0]  io_data;   // read data seen by the core
  logic        io_rd;

  assign ptr = {b, a};
  assign io_data = sys_hit ? sys_rdata : io_rdata;

  // Bus control
  always_comb begin
    mem_addr  = pc;
    mem_wdata = 8'h00;
    mem_we    = 1'b0;
    io_addr   = t;
    io_wdata  = 8'h00;
    io_rd     = 1'b0;
    io_wr     = 1'b0;
    unique case (u)
      U_RD_A, U_RD_B, U_RD_C:   io_rd = 1'b1;
      U_RD_A1, U_RD_B1:         begin io_addr = t + 8'd1; io_rd = 1'b1; end
      U_WR_ALU:                 begin io_wdata = alu_y; io_wr = 1'b1; end
      U_WR_ALU1:                begin io_addr = t + 8'd1; io_wdata = alu_y; io_wr = 1'b1; end
      U_WR_A:                   begin io_wdata = a; io_wr = 1'b1; end
      U_WR_B1:                  begin io_addr = t + 8'd1; io_wdata = b; io_wr = 1'b1; end
      U_IMM_IO:                 begin io_wdata = mem_rdata; io_wr = 1'b1; end
      U_IMM_IO1:                begin io_addr = t + 8'd1; io_wdata = mem_rdata; io_wr = 1'b1; end
      U_MEM_IO:                 begin mem_addr = ptr; io_wdata = mem_rdata; io_wr = 1'b1; end
      U_MEM_IO1:                begin mem_addr = ptr + 16'd1; io_addr = t + 8'd1;
                                      io_wdata = mem_rdata; io_wr = 1'b1; end
      U_IO_MEM:                 begin mem_addr = ptr; io_rd = 1'b1;
                                      mem_wdata = io_data; mem_we = 1'b1; end
      U_IO_MEM1:                begin mem_addr = ptr + 16'd1; io_addr = t + 8'd1; io_rd = 1'b1;
                                      mem_wdata = io_data; mem_we = 1'b1; end
      U_JMP_IO:                 begin io_addr = t + 8'd1; io_rd = take; end
      U_MEM_X:                  mem_addr = ptr;
      U_MEM_X1:                 mem_addr = ptr + 16'd1;
      U_X_MEM:                  begin mem_addr = ptr; mem_wdata = x; mem_we = 1'b1; end
      U_X_MEM1:                 begin mem_addr = ptr + 16'd1; mem_wdata = x; mem_we = 1'b1; end
      U_PUSH_PCH:               begin mem_addr = sp_q; mem_wdata = pc[15:8]; mem_we = 1'b1; end
      U_PUSH_PCL:               begin mem_addr = sp_q; mem_wdata = pc[7:0]; mem_we = 1'b1; end
      U_PUSH_A:                 begin mem_addr = sp_q; mem_wdata = a; mem_we = 1'b1; end
      U_PUSH_B:                 begin mem_addr = sp_q; mem_wdata = b; mem_we = 1'b1; end
      U_PUSH_X:                 begin mem_addr = sp_q; mem_wdata = x; mem_we = 1'b1; end
      U_PUSH_F:                 begin mem_addr = sp_q; mem_wdata = flags_q; mem_we = 1'b1; end
      U_PUSH_IO:                begin mem_addr = sp_q; io_rd = 1'b1;
                                      mem_wdata = io_data; mem_we = 1'b1; end
      U_PUSH_IO1:               begin mem_addr = sp_q; io_addr = t + 8'd1; io_rd = 1'b1;
                                      mem_wdata = io_data; mem_we = 1'b1; end
      U_POP_A, U_POP_PC, U_POP_X, U_POP_F: mem_addr = sp_q + 16'd1;
      U_POP_IO:                 begin mem_addr = sp_q + 16'd1; io_wdata = mem_rdata; io_wr = 1'b1; end
      U_POP_IO1:                begin mem_addr = sp_q + 16'd1; io_addr = t + 8'd1;
                                      io_wdata = mem_rdata; io_wr = 1'b1; end
      default:                  ;
    endcase
  end

  assign io_in  = io_rd && !sys_hit;
  assign io_out = io_wr;

  // Flag and stack-pointer updates
  always_comb begin
    flags_d  = flags_q;
    flags_we = 1'b0;
    sp_d     = sp_q;
    sp_we    = 1'b0;
    unique case (u)
      U_WR_ALU, U_FLAGS: begin
        if (u == U_FLAGS || flag_upd) begin
          flags_we  = 1'b1;
          flags_d.s = alu_f.s;
          flags_d.z = alu_f.z;
          flags_d.p = alu_f.p;
          if (alu_cvh) begin
            flags_d.c = alu_f.c;
            flags_d.h = alu_f.h;
            flags_d.v = alu_f.v;
          end
          if (alu_d) flags_d.d = alu_f.d;
        end
      end
      U_SETF:   begin flags_we = 1'b1; flags_d = flags_q | flags_t'(a); end
      U_CLRF:   begin flags_we = 1'b1; flags_d = flags_q & ~flags_t'(a); end
      U_TEST:   begin flags_we = 1'b1; flags_d.s = a[7]; flags_d.z = (a == 8'h00); end
      U_INTCHK: begin flags_we = flags_q.e; flags_d.e = 1'b0; end
      U_SETE:   begin flags_we = 1'b1; flags_d.e = 1'b1; end
      U_POP_F:  begin flags_we = 1'b1; flags_d = flags_t'(mem_rdata); end
      default:  ;
    endcase
    unique case (u)
      U_PUSH_PCH, U_PUSH_PCL, U_PUSH_A, U_PUSH_B, U_PUSH_X, U_PUSH_F,
      U_PUSH_IO, U_PUSH_IO1: begin sp_we = 1'b1; sp_d = sp_q - 16'd1; end
      U_POP_A, U_POP_PC, U_POP_IO, U_POP_IO1, U_POP_X, U_POP_F:
                             begin sp_we = 1'b1; sp_d = sp_q + 16'd1; end
      default: ;
    endcase
  end

  // Sequencer and datapath registers
  logic end_early;   // a failed U_CHK / U_INTCHK
  logic hold;        // U_SHIFT with a non-zero count repeats

  assign end_early = (u == U_CHK && !take) || (u == U_INTCHK && !flags_q.e);
  assign hold      = (u == U_SHIFT) && (b != 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_FETCH;
      pc    <= 16'h0000;
      ir    <= 8'h00;
      a     <= 8'h00;
      b     <= 8'h00;
      t     <= 8'h00;
      c     <= 8'h00;
      x     <= 8'h00;
      step  <= 4'd0;
    end else if (state == S_FETCH) begin
      ir    <= mem_rdata;
      pc    <= pc + 16'd1;
      c     <= 8'h01;          // "always" until a condition code is fetched
      step  <= 4'd0;
      state <= S_EXEC;
    end else begin
      unique case (u)
        U_IMM_A:   begin a <= mem_rdata; pc <= pc + 16'd1; end
        U_IMM_B:   begin b <= mem_rdata; pc <= pc + 16'd1; end
        U_IMM_T:   begin t <= mem_rdata; pc <= pc + 16'd1; end
        U_IMM_C:   begin c <= mem_rdata; pc <= pc + 16'd1; end
        U_IMM_IO, U_IMM_IO1: pc <= pc + 16'd1;
        U_RD_A, U_RD_A1: a <= io_data;
        U_RD_B, U_RD_B1: b <= io_data;
        U_RD_C:    c <= io_data;
        U_SHIFT:   if (hold) begin a <= alu_y; b <= b - 8'd1; end
        U_JMP_IMM: pc <= take ? {mem_rdata, a} : pc + 16'd1;
        U_JMP_IO:  if (take) pc <= {io_data, a};
        U_JMP_PTR: pc <= ptr;
        U_JMP_ISR: pc <= isr_q;
        U_POP_A:   a <= mem_rdata;
        U_POP_PC:  pc <= {mem_rdata, a};
        U_POP_X, U_MEM_X, U_MEM_X1: x <= mem_rdata;
        default:   ;
      endcase
      if (end_early || len == 4'd0 || (last && !hold)) begin
        state <= S_FETCH;
      end else if (!hold) begin
        step <= step + 4'd1;
      end
    end
  end

  assign fetch   = (state == S_FETCH);
  assign pc_o    = pc;
  assign flags_o = flags_q;

  // A micro-operation never both reads and writes the I/O bus.
  a_io_exclusive : assert property (@(posedge clk) disable iff (!rst_n) !(io_rd && io_wr));

endmodule
