// tb_bp3_sysregs: self-checking testbench for bp3_sysregs.
//
// Checks reset values, I/O writes and reads of registers 0..4, that the
// program-counter bytes 5 and 6 are read-only views of `pc`, that `hit`
// covers exactly addresses 0..6, the direct flag and stack-pointer update
// ports, and that an I/O write wins over a direct update in the same clock.
module tb_bp3_sysregs;
  import bp3_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [7:0]  io_addr = 0, io_wdata = 0, io_rdata;
  logic        io_we = 0, hit;
  logic        flags_we = 0, sp_we = 0;
  flags_t      flags_d = '0, flags_q;
  logic [15:0] sp_d = 0, sp_q, isr_q, pc = 16'h1234;
  int checks = 0, failures = 0, cycles = 0;

  bp3_sysregs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic io_write(input logic [7:0] ad, input logic [7:0] d);
    @(negedge clk); io_addr = ad; io_wdata = d; io_we = 1;
    @(negedge clk); io_we = 0;
  endtask

  task automatic io_read(input logic [7:0] ad, output logic [7:0] d);
    @(negedge clk); io_addr = ad; #1; d = io_rdata;
  endtask

  logic [7:0] d;
  logic [7:0] model [7];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check("reset flags", flags_q, 8'h00);
    check("reset sp", sp_q, 16'hFFFF);
    check("reset isr", isr_q, 16'h0000);
    model = '{8'h00, 8'hFF, 8'hFF, 8'h00, 8'h00, 8'h34, 8'h12};
    for (int n = 0; n < 200; n++) begin
      logic [7:0] ad, v;
      ad = 8'($urandom_range(0, 6));
      v  = 8'($urandom);
      io_write(ad, v);
      if (ad < 5) model[ad] = v;
      for (int r = 0; r < 7; r++) begin
        io_read(8'(r), d);
        check($sformatf("reg %0d", r), d, model[r]);
      end
    end
    check("sp view", sp_q, {model[2], model[1]});
    check("isr view", isr_q, {model[4], model[3]});
    for (int ad = 0; ad < 256; ad++) begin
      @(negedge clk); io_addr = 8'(ad); #1;
      check("hit", hit, ad < 7);
    end
    // Direct updates.
    @(negedge clk); flags_d = flags_t'(8'hA5); flags_we = 1; sp_d = 16'h8000; sp_we = 1;
    @(negedge clk); flags_we = 0; sp_we = 0;
    check("direct flags", flags_q, 8'hA5);
    check("direct sp", sp_q, 16'h8000);
    // Same-clock conflict: the I/O write wins.
    @(negedge clk); flags_d = flags_t'(8'h11); flags_we = 1;
    io_addr = REG_FLAGS; io_wdata = 8'h3C; io_we = 1;
    sp_d = 16'h4444; sp_we = 1;
    @(negedge clk); flags_we = 0; io_we = 0; sp_we = 0;
    check("io wins", flags_q, 8'h3C);
    check("sp direct same clock", sp_q, 16'h4444);
    // PC bytes are read only.
    io_write(REG_PCL, 8'h00);
    io_read(REG_PCL, d);
    check("pc read only", d, 8'h34);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
