// tb_bp3_memory: self-checking testbench for bp3_memory at its full 64 KiB.
//
// Fills memory through the load port, then mixes random CPU-port writes and
// reads (of written locations only), and a load-port write colliding with a CPU write (the load port
// must win), checking every read against a model array.
module tb_bp3_memory;
  logic        clk = 0;
  logic [15:0] addr = 0, ld_addr = 0;
  logic [7:0]  wdata = 0, rdata, ld_data = 0;
  logic        we = 0, ld_we = 0;
  logic [7:0]  model [65536];
  bit          valid [65536];
  int checks = 0, failures = 0, cycles = 0;

  bp3_memory dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0h: got %0h expected %0h", what, addr, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 65536; i += 251) begin
      @(negedge clk); ld_addr = 16'(i); ld_data = 8'(i ^ (i >> 8)); ld_we = 1;
      model[i] = ld_data; valid[i] = 1;
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 65536; i += 251) begin
      addr = 16'(i); #1; check("loaded", rdata, model[i]);
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      addr = 16'($urandom_range(0, 255)) * 16'd256 + 16'($urandom_range(0, 3));
      wdata = 8'($urandom);
      if ($urandom_range(0, 1) == 0) begin we = 1; model[addr] = wdata; valid[addr] = 1; end
      else begin
        we = 0; #1;
        if (valid[addr]) check("read", rdata, model[addr]);
      end
    end
    @(negedge clk);
    addr = 16'h0100; wdata = 8'h11; we = 1;
    ld_addr = 16'h0100; ld_data = 8'h22; ld_we = 1;
    @(negedge clk); we = 0; ld_we = 0; addr = 16'h0100; #1;
    check("load port wins", rdata, 8'h22);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
