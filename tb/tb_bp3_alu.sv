// tb_bp3_alu: self-checking testbench for bp3_alu.
//
// Drives every ALU select code with directed corner values and random
// operands and compares the result and the flags with a reference written
// here from the select-code table (using wide integer arithmetic, not the
// unit's shared adder). No clock is needed; a watchdog still bounds the run.
module tb_bp3_alu;
  import bp3_pkg::*;

  alu_op_e    op;
  logic [7:0] a, b, y;
  logic       cin, cvh, dv;
  flags_t     f;
  int checks = 0, failures = 0;

  bp3_alu dut (.op(op), .a(a), .b(b), .carry_in(cin), .y(y), .flags_out(f),
               .cvh_valid(cvh), .d_valid(dv));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%0h a=%0h b=%0h cin=%0b: got %0h expected %0h", what, op, a, b, cin, got, exp);
    end
  endtask

  // Reference model.
  task automatic ref_model(output logic [7:0] ry, output logic rc, output logic rh,
                           output logic rv, output logic rcvh, output logic rd, output logic rdv);
    int ia, ib, ic, r, hr;
    ia = a; ib = b; ic = cin;
    ry = 0; rc = 0; rh = 0; rv = 0; rcvh = 0; rd = 0; rdv = 0;
    case (op)
      ALU_A:    ry = a;
      ALU_B:    ry = b;
      ALU_AND:  ry = a & b;
      ALU_OR:   ry = a | b;
      ALU_XOR:  ry = a ^ b;
      ALU_XNOR: ry = ~(a ^ b);
      ALU_MULL: ry = 8'((ia * ib) % 256);
      ALU_MULH: ry = 8'((ia * ib) / 256);
      ALU_DIV:  begin rdv = 1; rd = (ib == 0); ry = (ib == 0) ? 8'hFF : 8'(ia / ib); end
      ALU_MOD:  begin rdv = 1; rd = (ib == 0); ry = (ib == 0) ? a : 8'(ia % ib); end
      ALU_ROL:  ry = 8'((ia * 2) % 256 + ia / 128);
      ALU_ROR:  ry = 8'(ia / 2 + (ia % 2) * 128);
      ALU_ASL:  ry = 8'((ia * 2) % 256 + ia % 2);
      ALU_ASR:  ry = 8'(ia / 2 + (ia / 128) * 128);
      ALU_NOT:  ry = 8'(255 - ia);
      ALU_BCD:  ry = 8'(((ia % 100) / 10) * 16 + ia % 10);
      ALU_BIN:  ry = 8'((ia / 16) * 10 + ia % 16);
      ALU_ADD, ALU_INC, ALU_ADDC: begin
        if (op == ALU_INC) ib = 1;
        if (op != ALU_ADDC) ic = 0;
        r = ia + ib + ic; hr = ia % 16 + ib % 16 + ic;
        ry = 8'(r % 256); rc = (r > 255); rh = (hr > 15); rcvh = 1;
        rv = ((ia >= 128) == (ib >= 128)) && ((r % 256 >= 128) != (ia >= 128));
      end
      ALU_SUB, ALU_DEC, ALU_NEG, ALU_SUBC: begin
        if (op == ALU_DEC) ib = 1;
        if (op == ALU_NEG) begin ib = ia; ia = 0; end
        if (op != ALU_SUBC) ic = 0;
        r = ia - ib - ic; hr = ia % 16 - ib % 16 - ic;
        ry = 8'((r + 512) % 256); rc = (r < 0); rh = (hr < 0); rcvh = 1;
        rv = ((ia >= 128) != (ib >= 128)) && ((((r + 512) % 256) >= 128) != (ia >= 128));
      end
      default: ry = a;
    endcase
  endtask

  task automatic run_one();
    logic [7:0] ry;
    logic rc, rh, rv, rcvh, rd, rdv, par;
    #1;
    ref_model(ry, rc, rh, rv, rcvh, rd, rdv);
    par = 1'b1;
    for (int i = 0; i < 8; i++) par ^= ry[i];
    check("y", y, ry);
    check("S", f.s, ry[7]);
    check("Z", f.z, ry == 0);
    check("P", f.p, par);
    check("cvh_valid", cvh, rcvh);
    check("d_valid", dv, rdv);
    if (rcvh) begin
      check("C", f.c, rc);
      check("H", f.h, rh);
      check("V", f.v, rv);
    end
    if (rdv) check("D", f.d, rd);
  endtask

  localparam logic [7:0] CORNER [8] = '{8'h00, 8'h01, 8'h0F, 8'h7F, 8'h80, 8'h99, 8'hFE, 8'hFF};

  initial begin
    for (int o = 0; o <= 5'h17; o++) begin
      op = alu_op_e'(o);
      foreach (CORNER[i]) foreach (CORNER[j]) for (int k = 0; k < 2; k++) begin
        a = CORNER[i]; b = CORNER[j]; cin = k[0];
        run_one();
      end
      for (int n = 0; n < 300; n++) begin
        a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
        run_one();
      end
    end
    // A few values worked out by hand.
    op = ALU_ADD;  a = 8'h7F; b = 8'h01; cin = 0; #1;
    check("7F+01", {y, f.v, f.h, f.c}, {8'h80, 1'b1, 1'b1, 1'b0});
    op = ALU_SUB;  a = 8'h10; b = 8'h20; #1;
    check("10-20", {y, f.c}, {8'hF0, 1'b1});
    op = ALU_BCD;  a = 8'd57; #1;  check("BCD(57)", y, 8'h57);
    op = ALU_BIN;  a = 8'h42; #1;  check("BIN(42h)", y, 8'd42);
    op = ALU_MULH; a = 8'd200; b = 8'd3; #1; check("200*3 hi", y, 8'h02);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
