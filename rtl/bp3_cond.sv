// bp3_cond: condition-code evaluation for the 8BP3 branch instructions.
//
// Combinational. The 5-bit condition code selects a flag test; odd codes
// are the negation of the even code below them, which is how the
// architecture's condition table is laid out:
//   00/01 never/always     02/03 E (interrupts enabled) / not
//   04/05 D (divide by 0)  06/07 even parity (P) / odd parity
//   08/09 V                0A/0B C and H
//   0C/0D C or H           0E/0F H
//   10/11 C                12/13 Z (equal)
//   14/15 S (negative) / positive
//   16..1F alternate never/always.
// Only the low five bits of the condition byte are used; the upper three
// are ignored (this implementation's choice).
module bp3_cond
  import bp3_pkg::*;
(
  input  logic [7:0] cc,
  input  flags_t     flags,
  output logic       take
);

  logic base;

  always_comb begin
    unique case (cc[4:1])
      4'h1:    base = flags.e;
      4'h2:    base = flags.d;
      4'h3:    base = flags.p;
      4'h4:    base = flags.v;
      4'h5:    base = flags.c & flags.h;
      4'h6:    base = flags.c | flags.h;
      4'h7:    base = flags.h;
      4'h8:    base = flags.c;
      4'h9:    base = flags.z;
      4'hA:    base = flags.s;
      default: base = 1'b0;   // 00 and 16..1F: never (even) / always (odd)
    endcase
  end

  assign take = base ^ cc[0];

endmodule
