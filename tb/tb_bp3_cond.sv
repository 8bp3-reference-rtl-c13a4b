// tb_bp3_cond: self-checking testbench for bp3_cond.
//
// For all 32 condition codes and all 256 flag bytes, compares the branch
// decision with a table written here from the condition-code list
// (one entry per code, not the even/odd folding the unit uses).
module tb_bp3_cond;
  import bp3_pkg::*;

  logic [7:0] cc;
  flags_t     f;
  logic       take;
  int checks = 0, failures = 0;

  bp3_cond dut (.cc(cc), .flags(f), .take(take));

  function automatic logic expected(input logic [4:0] code, input flags_t fl);
    case (code)
      5'h00: return 0;              5'h01: return 1;
      5'h02: return fl.e;           5'h03: return !fl.e;
      5'h04: return fl.d;           5'h05: return !fl.d;
      5'h06: return fl.p;           5'h07: return !fl.p;
      5'h08: return fl.v;           5'h09: return !fl.v;
      5'h0A: return fl.c && fl.h;   5'h0B: return !(fl.c && fl.h);
      5'h0C: return fl.c || fl.h;   5'h0D: return !(fl.c || fl.h);
      5'h0E: return fl.h;           5'h0F: return !fl.h;
      5'h10: return fl.c;           5'h11: return !fl.c;
      5'h12: return fl.z;           5'h13: return !fl.z;
      5'h14: return fl.s;           5'h15: return !fl.s;
      default: return code[0];      // 16..1F: don't jump / jump
    endcase
  endfunction

  initial begin
    for (int code = 0; code < 32; code++) begin
      for (int fv = 0; fv < 256; fv++) begin
        cc = 8'(code) | (8'($urandom) & 8'hE0);
        f  = flags_t'(8'(fv));
        #1;
        checks++;
        if (take !== expected(5'(code), f)) begin
          failures++;
          $display("FAIL cc=%0h flags=%0h take=%0b", cc, f, take);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
