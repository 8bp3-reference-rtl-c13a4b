// tb_bp3_prog_pkg: a test program for the 8BP3 and the results it must give.
//
// build() assembles the program into `image` (two passes, so forward labels
// resolve) and expected() lists the register and memory contents it must
// leave behind, worked out by hand from the instruction set. The program
// runs most instruction forms: immediate loads, moves, three-operand
// arithmetic with carry, compare and conditional branches (taken and not),
// direct and indirect loads and stores, multiply, divide and divide by
// zero, multi-bit rotate, BCD, subroutine call and return, word push and
// pop, byte push/pop through memory pointers, a software interrupt while
// disabled and while enabled, register-indirect jump, reads of the
// internal registers and a result written to the flags register; a second
// part covers the remaining logic, shift, word-transfer, compare, branch,
// conditional-call, flag push/pop and conditional-interrupt forms. It ends
// in a jump to itself at label `halt`.
package tb_bp3_prog_pkg;

  logic [7:0]  image [65536];
  logic [15:0] here;
  logic [15:0] l_l1, l_l2, l_l3, l_l4, l_l5, l_bad, l_halt, l_isr, l_sub;
  logic [15:0] l_ldi, l_jmp, l_mov, l_cmpi, l_ldd, l_std, l_adci, l_andi;
  logic [15:0] l_rol, l_rol0, l_l6, l_l7, l_sub2, l_sub3, l_sub4;

  function automatic void b(input logic [7:0] v);
    image[here] = v;
    here = here + 16'd1;
  endfunction

  function automatic void w(input logic [15:0] v);
    b(v[7:0]);
    b(v[15:8]);
  endfunction

  function automatic void pass();
    here = 16'h0000;
    w(16'h013E); w(16'h7FFF);                   // LDIW SP <- 7FFF
    b(8'h3E); b(8'h03); w(l_isr);               // LDIW ISR <- isr
    b(8'h00); b(8'h5B); b(8'h00);               // LDI  #00 -> r5B (interrupt count)
    l_ldi = here;
    b(8'h00); b(8'h10); b(8'h25);               // LDI  #25 -> r10
    b(8'h00); b(8'h11); b(8'h5A);               // LDI  #5A -> r11
    l_mov = here;
    b(8'h01); b(8'h10); b(8'h12);               // MOV  r10 -> r12
    l_adci = here;
    b(8'h30); b(8'h03); b(8'h11); b(8'h13);     // ADCI #3, r11 -> r13
    l_andi = here;
    b(8'h0A); b(8'h0F); b(8'h11); b(8'h14);     // ANDI #0F, r11 -> r14
    l_cmpi = here;
    b(8'h81); b(8'h10); b(8'h25);               // CMPI r10, #25
    b(8'h85); b(8'h12); w(l_l1);                // BR.Z l1      (taken)
    b(8'h00); b(8'h15); b(8'hFF);               // skipped
    l_l1 = here;
    b(8'h85); b(8'h13); w(l_bad);               // BR.NZ bad    (not taken)
    l_std = here;
    b(8'h42); b(8'h12); w(16'h8000);            // STD  r12 -> (8000)
    l_ldd = here;
    b(8'h44); w(16'h8000); b(8'h16);            // LDD  (8000) -> r16
    l_jmp = here;
    b(8'h83); w(l_l2);                          // JMP  l2
    b(8'h00); b(8'h15); b(8'hEE);               // skipped
    l_l2 = here;
    b(8'h09); b(8'h11); b(8'h10); b(8'h17);     // SUB  r11 - r10 -> r17
    b(8'h17); b(8'h11); b(8'h03); b(8'h18);     // MULT r11 * #3 -> r18, r19
    b(8'h1B); b(8'h11); b(8'h10); b(8'h1A);     // DIV  r11 / r10 -> r1A, r1B
    b(8'h1A); b(8'h11); b(8'h00); b(8'h1C);     // DIV  r11 / #0 -> r1C, r1D
    b(8'h85); b(8'h04); w(l_l3);                // BR.D l3      (taken)
    b(8'h00); b(8'h15); b(8'hDD);               // skipped
    l_l3 = here;
    l_rol = here;
    b(8'h1D); b(8'h10); b(8'h03); b(8'h1E);     // ROL  r10 by #3 -> r1E
    b(8'h29); b(8'h1E); b(8'h1F);               // INC  r1E -> r1F
    b(8'h2E); b(8'h05); b(8'h20);               // NEG  #5 -> r20
    b(8'h3A); b(8'h2D); b(8'h21);               // BCD  #45 -> r21
    b(8'h3E); b(8'h22); w(16'h1234);            // LDIW #1234 -> r22, r23
    b(8'h02); b(8'h22); b(8'h10);               // ST   r10 -> (r22)
    b(8'h03); b(8'h22); b(8'h24);               // LD   (r22) -> r24
    b(8'h89); w(l_sub);                         // JSR  sub
    b(8'hC8); w(16'hABCD);                      // PSHW #ABCD
    b(8'hC2); b(8'h26);                         // POPW -> r26, r27
    b(8'h92); b(8'h20);                         // TEST r20
    b(8'h85); b(8'h14); w(l_l4);                // BR.NEG l4    (taken)
    b(8'h00); b(8'h15); b(8'hCC);               // skipped
    l_l4 = here;
    b(8'h01); b(8'h05); b(8'h28);               // MOV  r5 (PC low) -> r28
    b(8'h90);                                   // INT  (disabled: no effect)
    b(8'h36); b(8'h01);                         // SETF #01 (E)
    b(8'h90);                                   // INT  -> isr
    b(8'h00); b(8'h2B); b(8'h01);               // LDI  #01 -> r2B
    b(8'h36); b(8'h20);                         // SETF #20 (C)
    b(8'h32); b(8'h10); b(8'h11); b(8'h2C);     // ADDC r10 + r11 + C -> r2C
    b(8'hC6); b(8'h11);                         // PSHB r11
    b(8'hC1); b(8'h22);                         // POPB -> (r22)
    b(8'hC7); b(8'h22);                         // PSHB (r22)
    b(8'hC0); b(8'h2D);                         // POPB -> r2D
    b(8'h3E); b(8'h2E); w(l_l5);                // LDIW l5 -> r2E, r2F
    b(8'h84); b(8'h2E);                         // JMP  (r2E)
    b(8'h00); b(8'h15); b(8'hBB);               // skipped
    l_l5 = here;
    l_rol0 = here;
    b(8'h1D); b(8'h10); b(8'h00); b(8'h30);     // ROL  r10 by #0 -> r30
    b(8'h01); b(8'h01); b(8'h31);               // MOV  r1 (SP low)  -> r31
    b(8'h01); b(8'h02); b(8'h32);               // MOV  r2 (SP high) -> r32
    b(8'h04); b(8'h01); b(8'h11); b(8'h33);     // ADD  #01 + r11 -> r33
    b(8'h04); b(8'h01); b(8'h11); b(8'h00);     // ADD  #01 + r11 -> flags
    b(8'h01); b(8'h00); b(8'h34);               // MOV  flags -> r34
    b(8'h38); b(8'hFF);                         // CLRF #FF
    // Second part: the remaining instruction forms.
    b(8'h3F); b(8'h22); b(8'h40);               // MOVW r22 -> r40, r41
    b(8'h00); b(8'h42); b(8'hF0);               // LDI  #F0 -> r42
    b(8'h13); b(8'h0F); b(8'h42); b(8'h43);     // XNOR #0F, r42 -> r43
    b(8'h0E); b(8'h42); b(8'h0C); b(8'h44);     // OR   r42, #0C -> r44
    b(8'h12); b(8'h42); b(8'h11); b(8'h45);     // XOR  r42, r11 -> r45
    b(8'h20); b(8'h42); b(8'h02); b(8'h46);     // ROR  r42 by #2 -> r46
    b(8'h23); b(8'h42); b(8'h01); b(8'h47);     // ASL  r42 by #1 -> r47
    b(8'h26); b(8'h42); b(8'h03); b(8'h48);     // ASR  r42 by #3 -> r48
    b(8'h2B); b(8'h42); b(8'h49);               // DEC  r42 -> r49
    b(8'h2D); b(8'h42); b(8'h4A);               // NOT  r42 -> r4A
    b(8'h3C); b(8'h37); b(8'h4B);               // BIN  #37 -> r4B
    b(8'h00); b(8'h4C); b(8'h20);               // LDI  #20 -> r4C
    b(8'h37); b(8'h4C);                         // SETF r4C (C)
    b(8'h35); b(8'h11); b(8'h10); b(8'h4D);     // SUBC r11 - r10 - C -> r4D
    b(8'h39); b(8'h4C);                         // CLRF r4C
    b(8'h40); b(8'h22); b(8'h40);               // STW  r40 -> (r22)
    b(8'h41); b(8'h22); b(8'h4E);               // LDW  (r22) -> r4E, r4F
    b(8'h43); b(8'h40); w(16'h9000);            // STDW r40 -> (9000)
    b(8'h00); b(8'h50); b(8'h12);               // LDI  #12 (Z) -> r50
    b(8'h80); b(8'h5A); b(8'h11);               // CMP  #5A, r11
    b(8'h87); b(8'h50); w(l_l6);                // BR.(r50) l6   (taken)
    b(8'h00); b(8'h15); b(8'hAA);               // skipped
    l_l6 = here;
    b(8'h82); b(8'h10); b(8'h11);               // CMP  r10, r11 (flags B0)
    b(8'h00); b(8'h51); b(8'h11);               // LDI  #11 (!C) -> r51
    b(8'h3E); b(8'h52); w(l_bad);               // LDIW bad -> r52, r53
    b(8'h88); b(8'h51); b(8'h52);               // BR.(r51) (r52)  (not taken)
    b(8'h3E); b(8'h54); w(l_l7);                // LDIW l7 -> r54, r55
    b(8'h86); b(8'h10); b(8'h54);               // BR.C (r54)      (taken)
    b(8'h00); b(8'h15); b(8'hA9);               // skipped
    l_l7 = here;
    b(8'h8B); b(8'h13); w(l_sub2);              // SR.NZ sub2      (taken)
    b(8'h8B); b(8'h12); w(l_sub3);              // SR.Z  sub3      (not taken)
    b(8'h00); b(8'h57); b(8'h00);               // LDI  #00 -> r57 (call count)
    b(8'h3E); b(8'h58); w(l_sub4);              // LDIW sub4 -> r58, r59
    b(8'h8A); b(8'h58);                         // JSR  (r58)
    b(8'h00); b(8'h5C); b(8'h01);               // LDI  #01 (always) -> r5C
    b(8'h8E); b(8'h5C); b(8'h58);               // SR.(r5C) (r58)  (taken)
    b(8'h82); b(8'h10); b(8'h11);               // CMP  r10, r11 (flags B0 again)
    b(8'hCB);                                   // PSHF
    b(8'h38); b(8'hFF);                         // CLRF #FF
    b(8'hC4);                                   // POPF
    b(8'h01); b(8'h00); b(8'h5A);               // MOV  flags -> r5A
    b(8'h36); b(8'h01);                         // SETF #01 (E)
    b(8'h93); b(8'h13);                         // INT.NZ          (taken)
    b(8'h93); b(8'h12);                         // INT.Z           (not taken)
    b(8'hCA); b(8'h22);                         // PSHW (r22)
    b(8'h3E); b(8'h5C); w(16'h9100);            // LDIW #9100 -> r5C, r5D
    b(8'hC3); b(8'h5C);                         // POPW -> (r5C)
    b(8'hC9); b(8'h40);                         // PSHW r40
    b(8'hC2); b(8'h5E);                         // POPW -> r5E, r5F
    b(8'h16); b(8'h10); b(8'h11); b(8'h60);     // MULT #10, r11 -> r60, r61
    b(8'h19); b(8'hFF); b(8'h10); b(8'h62);     // DIV  #FF, r10 -> r62, r63
    b(8'h07); b(8'h10); b(8'h11); b(8'h64);     // SUB  #10, r11 -> r64
    b(8'h0C); b(8'h10); b(8'h11); b(8'h65);     // AND  r10, r11 -> r65
    b(8'h05); b(8'h11); b(8'h80); b(8'h66);     // ADD  r11, #80 -> r66
    b(8'h2C); b(8'h0F); b(8'h67);               // NOT  #0F -> r67
    b(8'h2A); b(8'h00); b(8'h68);               // DEC  #00 -> r68
    b(8'h3B); b(8'h11); b(8'h69);               // BCD  r11 -> r69
    b(8'h01); b(8'h01); b(8'h6A);               // MOV  r1 (SP low)  -> r6A
    b(8'h01); b(8'h02); b(8'h6B);               // MOV  r2 (SP high) -> r6B
    // Third part: the remaining operand forms.
    b(8'h06); b(8'h10); b(8'h11); b(8'h70);     // ADD  r10, r11 -> r70
    b(8'h08); b(8'h10); b(8'h05); b(8'h71);     // SUB  r10, #05 -> r71
    b(8'h0B); b(8'h11); b(8'h0F); b(8'h72);     // AND  r11, #0F -> r72
    b(8'h0D); b(8'h0F); b(8'h10); b(8'h73);     // OR   #0F, r10 -> r73
    b(8'h0F); b(8'h10); b(8'h11); b(8'h74);     // OR   r10, r11 -> r74
    b(8'h10); b(8'hFF); b(8'h11); b(8'h75);     // XOR  #FF, r11 -> r75
    b(8'h11); b(8'h11); b(8'hFF); b(8'h76);     // XOR  r11, #FF -> r76
    b(8'h14); b(8'h11); b(8'h0F); b(8'h77);     // XNOR r11, #0F -> r77
    b(8'h15); b(8'h10); b(8'h11); b(8'h78);     // XNOR r10, r11 -> r78
    b(8'h18); b(8'h10); b(8'h11); b(8'h79);     // MULT r10, r11 -> r79, r7A
    b(8'h1C); b(8'h81); b(8'h10); b(8'h7B);     // ROL  #81 by r10 (37) -> r7B
    b(8'h1E); b(8'h42); b(8'h4C); b(8'h7C);     // ROL  r42 by r4C (32) -> r7C
    b(8'h00); b(8'h7D); b(8'h03);               // LDI  #03 -> r7D
    b(8'h1F); b(8'h81); b(8'h7D); b(8'h7E);     // ROR  #81 by r7D -> r7E
    b(8'h21); b(8'h42); b(8'h7D); b(8'h7F);     // ROR  r42 by r7D -> r7F
    b(8'h22); b(8'h01); b(8'h7D); b(8'h80);     // ASL  #01 by r7D -> r80
    b(8'h24); b(8'h42); b(8'h7D); b(8'h81);     // ASL  r42 by r7D -> r81
    b(8'h25); b(8'h80); b(8'h7D); b(8'h82);     // ASR  #80 by r7D -> r82
    b(8'h27); b(8'h11); b(8'h7D); b(8'h83);     // ASR  r11 by r7D -> r83
    b(8'h28); b(8'hFF); b(8'h84);               // INC  #FF -> r84
    b(8'h2F); b(8'h11); b(8'h85);               // NEG  r11 -> r85
    b(8'h36); b(8'h20);                         // SETF #20 (C)
    b(8'h31); b(8'h10); b(8'h05); b(8'h86);     // ADDC r10, #05 -> r86 (C out 0)
    b(8'h33); b(8'h05); b(8'h10); b(8'h87);     // SUBC #05, r10 -> r87 (borrow)
    b(8'h34); b(8'h10); b(8'h05); b(8'h88);     // SUBC r10, #05 -> r88
    b(8'h3D); b(8'h7B); b(8'h89);               // BIN  r7B -> r89
    b(8'h8C); b(8'h01); b(8'h58);               // SR.always (r58)  (taken)
    b(8'h8D); b(8'h50); w(l_sub3);              // SR.(r50 = Z) sub3 (not taken)
    b(8'h00); b(8'h8A); b(8'h01);               // LDI  #01 -> r8A
    b(8'h8D); b(8'h8A); w(l_sub4);              // SR.(r8A) sub4    (taken)
    b(8'hC5); b(8'h66);                         // PSHB #66
    b(8'hC0); b(8'h8B);                         // POPB -> r8B
    b(8'h38); b(8'hFF);                         // CLRF #FF
    l_halt = here;
    b(8'h83); w(l_halt);                        // halt: JMP halt
    l_bad = here;
    b(8'h00); b(8'h15); b(8'hBA);
    b(8'h83); w(l_halt);
    l_isr = here;
    b(8'hCB);                                   // PSHF
    b(8'h00); b(8'h29); b(8'h99);               // LDI  #99 -> r29
    b(8'h29); b(8'h5B); b(8'h5B);               // INC  r5B -> r5B
    b(8'hC4);                                   // POPF
    b(8'h91);                                   // RETI
    l_sub = here;
    b(8'h00); b(8'h2A); b(8'h42);               // LDI  #42 -> r2A
    b(8'h8F);                                   // RET
    l_sub2 = here;
    b(8'h00); b(8'h56); b(8'h77);               // LDI  #77 -> r56
    b(8'h8F);                                   // RET
    l_sub3 = here;
    b(8'h00); b(8'h15); b(8'hAB);               // LDI  #AB -> r15 (must not run)
    b(8'h8F);                                   // RET
    l_sub4 = here;
    b(8'h29); b(8'h57); b(8'h57);               // INC  r57 -> r57
    b(8'h8F);                                   // RET
  endfunction

  function automatic void build();
    for (int i = 0; i < 65536; i++) image[i] = 8'h00;
    pass();
    pass();
  endfunction

  typedef struct { logic [15:0] addr; logic [7:0] value; } exp_t;

  // Register results (I/O addresses). r15 must never be written.
  function automatic void expected_regs(output exp_t e [$]);
    e = '{};
    e.push_back('{16'h10, 8'h25}); e.push_back('{16'h11, 8'h5A});
    e.push_back('{16'h12, 8'h25}); e.push_back('{16'h13, 8'h5D});
    e.push_back('{16'h14, 8'h0A}); e.push_back('{16'h16, 8'h25});
    e.push_back('{16'h17, 8'h35}); e.push_back('{16'h18, 8'h0E});
    e.push_back('{16'h19, 8'h01}); e.push_back('{16'h1A, 8'h02});
    e.push_back('{16'h1B, 8'h10}); e.push_back('{16'h1C, 8'hFF});
    e.push_back('{16'h1D, 8'h5A}); e.push_back('{16'h1E, 8'h29});
    e.push_back('{16'h1F, 8'h2A}); e.push_back('{16'h20, 8'hFB});
    e.push_back('{16'h21, 8'h45}); e.push_back('{16'h22, 8'h34});
    e.push_back('{16'h23, 8'h12}); e.push_back('{16'h24, 8'h25});
    e.push_back('{16'h26, 8'hCD}); e.push_back('{16'h27, 8'hAB});
    e.push_back('{16'h28, 8'(l_l4 + 16'd2)});
    e.push_back('{16'h29, 8'h99}); e.push_back('{16'h2A, 8'h42});
    e.push_back('{16'h2B, 8'h01}); e.push_back('{16'h2C, 8'h80});
    e.push_back('{16'h2D, 8'h5A});
    e.push_back('{16'h2E, l_l5[7:0]}); e.push_back('{16'h2F, l_l5[15:8]});
    e.push_back('{16'h30, 8'h25});
    e.push_back('{16'h31, 8'hFF}); e.push_back('{16'h32, 8'h7F});
    e.push_back('{16'h33, 8'h5B});
    e.push_back('{16'h34, 8'h5B});   // the written value wins over the ALU flags
    e.push_back('{16'h40, 8'h34}); e.push_back('{16'h41, 8'h12});
    e.push_back('{16'h43, 8'h00}); e.push_back('{16'h44, 8'hFC});
    e.push_back('{16'h45, 8'hAA}); e.push_back('{16'h46, 8'h3C});
    e.push_back('{16'h47, 8'hE0}); e.push_back('{16'h48, 8'hFE});
    e.push_back('{16'h49, 8'hEF}); e.push_back('{16'h4A, 8'h0F});
    e.push_back('{16'h4B, 8'h25}); e.push_back('{16'h4D, 8'h34});
    e.push_back('{16'h4E, 8'h34}); e.push_back('{16'h4F, 8'h12});
    e.push_back('{16'h56, 8'h77}); e.push_back('{16'h57, 8'h04});
    e.push_back('{16'h5A, 8'hB0}); e.push_back('{16'h5B, 8'h02});
    e.push_back('{16'h5E, 8'h34}); e.push_back('{16'h5F, 8'h12});
    e.push_back('{16'h60, 8'hA0}); e.push_back('{16'h61, 8'h05});
    e.push_back('{16'h62, 8'h06}); e.push_back('{16'h63, 8'h21});
    e.push_back('{16'h64, 8'hB6}); e.push_back('{16'h65, 8'h00});
    e.push_back('{16'h66, 8'hDA}); e.push_back('{16'h67, 8'hF0});
    e.push_back('{16'h68, 8'hFF}); e.push_back('{16'h69, 8'h90});
    e.push_back('{16'h6A, 8'hFF}); e.push_back('{16'h6B, 8'h7F});
    e.push_back('{16'h70, 8'h7F}); e.push_back('{16'h71, 8'h20});
    e.push_back('{16'h72, 8'h0A}); e.push_back('{16'h73, 8'h2F});
    e.push_back('{16'h74, 8'h7F}); e.push_back('{16'h75, 8'hA5});
    e.push_back('{16'h76, 8'hA5}); e.push_back('{16'h77, 8'hAA});
    e.push_back('{16'h78, 8'h80}); e.push_back('{16'h79, 8'h02});
    e.push_back('{16'h7A, 8'h0D}); e.push_back('{16'h7B, 8'h30});
    e.push_back('{16'h7C, 8'hF0}); e.push_back('{16'h7E, 8'h30});
    e.push_back('{16'h7F, 8'h1E}); e.push_back('{16'h80, 8'h0F});
    e.push_back('{16'h81, 8'h80}); e.push_back('{16'h82, 8'hF0});
    e.push_back('{16'h83, 8'h0B}); e.push_back('{16'h84, 8'h00});
    e.push_back('{16'h85, 8'hA6}); e.push_back('{16'h86, 8'h2B});
    e.push_back('{16'h87, 8'hE0}); e.push_back('{16'h88, 8'h1F});
    e.push_back('{16'h89, 8'h1E}); e.push_back('{16'h8B, 8'h66});
  endfunction

  function automatic void expected_mem(output exp_t e [$]);
    e = '{};
    e.push_back('{16'h8000, 8'h25});
    e.push_back('{16'h1234, 8'h34}); e.push_back('{16'h1235, 8'h12});
    e.push_back('{16'h9000, 8'h34}); e.push_back('{16'h9001, 8'h12});
    e.push_back('{16'h9100, 8'h34}); e.push_back('{16'h9101, 8'h12});
  endfunction

endpackage
