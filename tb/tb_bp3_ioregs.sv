// tb_bp3_ioregs: self-checking testbench for bp3_ioregs.
//
// Random OUT writes and IN reads over all 256 addresses against a model
// array; also checks that nothing is written without OUT and that the read
// port returns 0 without IN.
module tb_bp3_ioregs;
  logic       clk = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic       in = 0, out = 0;
  logic [7:0] model [256];
  int checks = 0, failures = 0, cycles = 0;

  bp3_ioregs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); addr = 8'(i); wdata = 8'(i * 7 + 3); out = 1; model[i] = wdata;
    end
    @(negedge clk); out = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = 8'($urandom); wdata = 8'($urandom);
      case ($urandom_range(0, 2))
        0: begin out = 1; in = 0; model[addr] = wdata; end
        1: begin out = 0; in = 1; #1; check("read", rdata, model[addr]); end
        default: begin out = 0; in = 0; #1; check("idle read", rdata, 8'h00); end
      endcase
    end
    @(negedge clk); out = 0; in = 1;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); #1; check("final", rdata, model[i]);
    end
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
