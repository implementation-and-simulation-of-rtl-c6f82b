// tb_hc11_instr_program: runs the instruction and addressing-mode test program
// on the complete microcontroller at its default sizes.
//
// The program (assembled by hand into the ROM from $D003) tests arithmetic,
// logic, shifts and rotates, increment/decrement, MUL, IDIV, SUBD, XGDX, stack
// push/pull and the bit instructions in immediate, direct, extended and indexed
// addressing. Each test compares its result and, on a mismatch, loads its own
// number into A and jumps to FAILED, which sets B=$EE and stops. When every
// test passes it clears A and B and stops at its first STOP.
// The program does not set the stack pointer; the board it was written for
// left S=$0041, so the image starts with LDS #$0041 at $D000.
// STOP acts as a no-op here because S stays set after reset, so the testbench
// watches the opcode fetches instead. It checks:
//   - the success STOP at $D1D1 is fetched and FAILED ($D1D2) never is;
//   - A=$00 and B=$00 there, and 148 instructions were executed on the way
//     (the LDS and the 147 instructions of the passing path);
//   - the RAM bytes the program leaves behind, worked out from the listing.
module tb_hc11_instr_program;
  import hc11_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        load_we = 1'b0;
  logic [13:0] load_addr = '0;
  logic [7:0]  load_data = '0;
  logic [7:0]  pa_out, pa_oe, pb_out, pc_out, pc_oe;
  logic        strb;
  logic [5:0]  pd_out, pd_oe;
  logic        eclk, ph1clk, ph2clk, as_out, rw_out, opcode_fetch, int_taken;
  logic        eeprom_busy, reset_out;
  logic [15:0] addr_bus;
  logic [7:0]  data_bus;
  cpu_state_e  cpu_state;
  regs_t       cpu_regs;

  hc11_mcu u_dut (
    .clk, .rst_n, .irq_n(1'b1), .xirq_n(1'b1), .cop_enable(1'b0), .expanded(1'b0), .load_we, .load_addr,
    .load_data, .pa_in(8'h00), .pa_out, .pa_oe, .pb_out, .pc_in(8'h00), .pc_out, .pc_oe,
    .stra(1'b0), .strb, .pd_in(6'h3F), .pd_out, .pd_oe, .pe_in(8'h00), .eclk, .ph1clk,
    .ph2clk, .as_out, .addr_bus, .data_bus, .rw_out, .cpu_state, .cpu_regs, .opcode_fetch,
    .int_taken, .eeprom_busy, .reset_out
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [15:0] A_PASS = 16'hD1D1;
  localparam logic [15:0] A_FAIL = 16'hD1D2;

  // program image
  logic [7:0] img [12288];
  int pc;
  task automatic put(input int unsigned b);
    img[pc - 'hD000] = b[7:0];
    pc++;
  endtask

  function automatic logic [7:0] ram(input int a);
    return u_dut.u_ram.mem[a];
  endfunction

  // opcode fetches, seen at the E falling edge that ends the fetch cycle
  int n_fetch = 0;
  logic done = 1'b0, passed = 1'b0;
  logic [7:0] a_at_end, b_at_end;
  always @(posedge clk) begin
    if (rst_n && u_dut.e_fall_en && opcode_fetch && !done) begin
      n_fetch++;
      if (addr_bus == A_PASS || addr_bus == A_FAIL) begin
        done     <= 1'b1;
        passed   <= (addr_bus == A_PASS);
        a_at_end <= cpu_regs.a;
        b_at_end <= cpu_regs.b;
      end
    end
  end

  initial begin
    for (int i = 0; i < 12288; i++) img[i] = 8'h00;
    pc = 'hD000;
    put('h8E); put('h00); put('h41);                    // D000 LDS #$0041
    put('h86); put('h20);                               // D003 LDAA #$20
    put('hC6); put('h30);                               // D005 LDAB #$30
    put('hD7); put('h01);                               // D007 STAB $0001
    put('h9B); put('h01);                               // D009 ADDA $0001
    put('hC6); put('h50);                               // D00B LDAB #$50
    put('hD7); put('h02);                               // D00D STAB $0002
    put('h90); put('h02);                               // D00F SUBA $0002
    put('h27); put('h05);                               // D011 BEQ OK01
    put('h86); put('h01);                               // D013 LDAA #$01
    put('h7E); put('hD1); put('hD2);                    // D015 JMP FAILED
    // OK01:
    put('h86); put('h50);                               // D018 LDAA #$50
    put('h8B); put('h40);                               // D01A ADDA #$40
    put('h80); put('h90);                               // D01C SUBA #$90
    put('h27); put('h05);                               // D01E BEQ OK02
    put('h86); put('h02);                               // D020 LDAA #$02
    put('h7E); put('hD1); put('hD2);                    // D022 JMP FAILED
    // OK02:
    put('h86); put('h90);                               // D025 LDAA #$90
    put('hC6); put('h10);                               // D027 LDAB #$10
    put('hF7); put('h01); put('h00);                    // D029 STAB $0100
    put('hBB); put('h01); put('h00);                    // D02C ADDA $0100
    put('hC6); put('hA0);                               // D02F LDAB #$A0
    put('hF7); put('h01); put('h01);                    // D031 STAB $0101
    put('hB0); put('h01); put('h01);                    // D034 SUBA $0101
    put('h27); put('h05);                               // D037 BEQ OK03
    put('h86); put('h03);                               // D039 LDAA #$03
    put('h7E); put('hD1); put('hD2);                    // D03B JMP FAILED
    // OK03:
    put('h86); put('hA0);                               // D03E LDAA #$A0
    put('hC6); put('h05);                               // D040 LDAB #$05
    put('hF7); put('h01); put('h02);                    // D042 STAB $0102
    put('hCE); put('h01); put('h00);                    // D045 LDX #$0100
    put('hAB); put('h02);                               // D048 ADDA $02,X
    put('hC6); put('hA5);                               // D04A LDAB #$A5
    put('hF7); put('h01); put('h03);                    // D04C STAB $0103
    put('hA0); put('h03);                               // D04F SUBA $03,X
    put('h27); put('h05);                               // D051 BEQ OK04
    put('h86); put('h04);                               // D053 LDAA #$04
    put('h7E); put('hD1); put('hD2);                    // D055 JMP FAILED
    // OK04:
    put('h86); put('hA5);                               // D058 LDAA #$A5
    put('h4C);                                          // D05A INCA
    put('h81); put('hA6);                               // D05B CMPA #$A6
    put('h27); put('h05);                               // D05D BEQ OK05
    put('h86); put('h05);                               // D05F LDAA #$05
    put('h7E); put('hD1); put('hD2);                    // D061 JMP FAILED
    // OK05:
    put('h4A);                                          // D064 DECA
    put('h81); put('hA5);                               // D065 CMPA #$A5
    put('h27); put('h05);                               // D067 BEQ OK06
    put('h86); put('h06);                               // D069 LDAA #$06
    put('h7E); put('hD1); put('hD2);                    // D06B JMP FAILED
    // OK06:
    put('h7C); put('h01); put('h01);                    // D06E INC $0101
    put('hC6); put('hA1);                               // D071 LDAB #$A1
    put('hF1); put('h01); put('h01);                    // D073 CMPB $0101
    put('h27); put('h05);                               // D076 BEQ OK07
    put('h86); put('h07);                               // D078 LDAA #$07
    put('h7E); put('hD1); put('hD2);                    // D07A JMP FAILED
    // OK07:
    put('h7A); put('h01); put('h01);                    // D07D DEC $0101
    put('hC6); put('hA0);                               // D080 LDAB #$A0
    put('hF1); put('h01); put('h01);                    // D082 CMPB $0101
    put('h27); put('h05);                               // D085 BEQ OK08
    put('h86); put('h08);                               // D087 LDAA #$08
    put('h7E); put('hD1); put('hD2);                    // D089 JMP FAILED
    // OK08:
    put('h6C); put('h02);                               // D08C INC $02,X
    put('hC6); put('h06);                               // D08E LDAB #$06
    put('hF1); put('h01); put('h02);                    // D090 CMPB $0102
    put('h27); put('h05);                               // D093 BEQ OK09
    put('h86); put('h09);                               // D095 LDAA #$09
    put('h7E); put('hD1); put('hD2);                    // D097 JMP FAILED
    // OK09:
    put('h6A); put('h02);                               // D09A DEC $02,X
    put('hC6); put('h05);                               // D09C LDAB #$05
    put('hF1); put('h01); put('h02);                    // D09E CMPB $0102
    put('h27); put('h05);                               // D0A1 BEQ OK0A
    put('h86); put('h0A);                               // D0A3 LDAA #$0A
    put('h7E); put('hD1); put('hD2);                    // D0A5 JMP FAILED
    // OK0A:
    put('h86); put('h23);                               // D0A8 LDAA #$23
    put('hC6); put('h17);                               // D0AA LDAB #$17
    put('h3D);                                          // D0AC MUL
    put('h83); put('h03); put('h25);                    // D0AD SUBD #$0325
    put('h27); put('h05);                               // D0B0 BEQ OK0B
    put('h86); put('h0B);                               // D0B2 LDAA #$0B
    put('h7E); put('hD1); put('hD2);                    // D0B4 JMP FAILED
    // OK0B:
    put('hCC); put('h03); put('h25);                    // D0B7 LDD #$0325
    put('hCE); put('h00); put('h13);                    // D0BA LDX #$0013
    put('h02);                                          // D0BD IDIV
    put('h83); put('h00); put('h07);                    // D0BE SUBD #$0007
    put('h27); put('h05);                               // D0C1 BEQ OK0C
    put('h86); put('h0C);                               // D0C3 LDAA #$0C
    put('h7E); put('hD1); put('hD2);                    // D0C5 JMP FAILED
    // OK0C:
    put('h8F);                                          // D0C8 XGDX
    put('h83); put('h00); put('h2A);                    // D0C9 SUBD #$002A
    put('h27); put('h05);                               // D0CC BEQ OK0D
    put('h86); put('h0D);                               // D0CE LDAA #$0D
    put('h7E); put('hD1); put('hD2);                    // D0D0 JMP FAILED
    // OK0D:
    put('h86); put('h25);                               // D0D3 LDAA #$25
    put('h84); put('hF0);                               // D0D5 ANDA #$F0
    put('hC6); put('h20);                               // D0D7 LDAB #$20
    put('h10);                                          // D0D9 SBA
    put('h27); put('h05);                               // D0DA BEQ OK0E
    put('h86); put('h0E);                               // D0DC LDAA #$0E
    put('h7E); put('hD1); put('hD2);                    // D0DE JMP FAILED
    // OK0E:
    put('h8A); put('h97);                               // D0E1 ORAA #$97
    put('hC6); put('h0F);                               // D0E3 LDAB #$0F
    put('hD7); put('h04);                               // D0E5 STAB $0004
    put('h94); put('h04);                               // D0E7 ANDA $0004
    put('h81); put('h07);                               // D0E9 CMPA #$07
    put('h27); put('h05);                               // D0EB BEQ OK0F
    put('h86); put('h0F);                               // D0ED LDAA #$0F
    put('h7E); put('hD1); put('hD2);                    // D0EF JMP FAILED
    // OK0F:
    put('hC6); put('hA0);                               // D0F2 LDAB #$A0
    put('hD7); put('h05);                               // D0F4 STAB $0005
    put('h9A); put('h05);                               // D0F6 ORAA $0005
    put('h48);                                          // D0F8 ASLA
    put('h81); put('h4E);                               // D0F9 CMPA #$4E
    put('h27); put('h05);                               // D0FB BEQ OK10
    put('h86); put('h10);                               // D0FD LDAA #$10
    put('h7E); put('hD1); put('hD2);                    // D0FF JMP FAILED
    // OK10:
    put('h0D);                                          // D102 SEC
    put('h46);                                          // D103 RORA
    put('h81); put('hA7);                               // D104 CMPA #$A7
    put('h27); put('h05);                               // D106 BEQ OK11
    put('h86); put('h11);                               // D108 LDAA #$11
    put('h7E); put('hD1); put('hD2);                    // D10A JMP FAILED
    // OK11:
    put('h0D);                                          // D10D SEC
    put('h86); put('h25);                               // D10E LDAA #$25
    put('hB7); put('h01); put('h05);                    // D110 STAA $0105
    put('h79); put('h01); put('h05);                    // D113 ROL $0105
    put('hC6); put('h4B);                               // D116 LDAB #$4B
    put('hF1); put('h01); put('h05);                    // D118 CMPB $0105
    put('h27); put('h05);                               // D11B BEQ OK12
    put('h86); put('h12);                               // D11D LDAA #$12
    put('h7E); put('hD1); put('hD2);                    // D11F JMP FAILED
    // OK12:
    put('hCE); put('h01); put('h00);                    // D122 LDX #$0100
    put('h60); put('h05);                               // D125 NEG $05,X
    put('h86); put('hB5);                               // D127 LDAA #$B5
    put('hA1); put('h05);                               // D129 CMPA $05,X
    put('h27); put('h05);                               // D12B BEQ OK13
    put('h86); put('h13);                               // D12D LDAA #$13
    put('h7E); put('hD1); put('hD2);                    // D12F JMP FAILED
    // OK13:
    put('h77); put('h01); put('h05);                    // D132 ASR $0105
    put('hA6); put('h05);                               // D135 LDAA $05,X
    put('h81); put('hDA);                               // D137 CMPA #$DA
    put('h27); put('h05);                               // D139 BEQ OK14
    put('h86); put('h14);                               // D13B LDAA #$14
    put('h7E); put('hD1); put('hD2);                    // D13D JMP FAILED
    // OK14:
    put('h64); put('h05);                               // D140 LSR $05,X
    put('h86); put('h6D);                               // D142 LDAA #$6D
    put('hB1); put('h01); put('h05);                    // D144 CMPA $0105
    put('h27); put('h05);                               // D147 BEQ OK15
    put('h86); put('h15);                               // D149 LDAA #$15
    put('h7E); put('hD1); put('hD2);                    // D14B JMP FAILED
    // OK15:
    put('h43);                                          // D14E COMA
    put('h81); put('h92);                               // D14F CMPA #$92
    put('h27); put('h05);                               // D151 BEQ OK16
    put('h86); put('h16);                               // D153 LDAA #$16
    put('h7E); put('hD1); put('hD2);                    // D155 JMP FAILED
    // OK16:
    put('h73); put('h01); put('h05);                    // D158 COM $0105
    put('hC6); put('h92);                               // D15B LDAB #$92
    put('hE1); put('h05);                               // D15D CMPB $05,X
    put('h27); put('h05);                               // D15F BEQ OK17
    put('h86); put('h17);                               // D161 LDAA #$17
    put('h7E); put('hD1); put('hD2);                    // D163 JMP FAILED
    // OK17:
    put('h88); put('hF0);                               // D166 EORA #$F0
    put('h81); put('h62);                               // D168 CMPA #$62
    put('h27); put('h05);                               // D16A BEQ OK18
    put('h86); put('h18);                               // D16C LDAA #$18
    put('h7E); put('hD1); put('hD2);                    // D16E JMP FAILED
    // OK18:
    put('h6F); put('h05);                               // D171 CLR $05,X
    put('h4F);                                          // D173 CLRA
    put('hB1); put('h01); put('h05);                    // D174 CMPA $0105
    put('h27); put('h05);                               // D177 BEQ OK19
    put('h86); put('h19);                               // D179 LDAA #$19
    put('h7E); put('hD1); put('hD2);                    // D17B JMP FAILED
    // OK19:
    put('h1C); put('h05); put('hAA);                    // D17E BSET $05,X #$AA
    put('h86); put('hAA);                               // D181 LDAA #$AA
    put('hB1); put('h01); put('h05);                    // D183 CMPA $0105
    put('h27); put('h05);                               // D186 BEQ OK1A
    put('h86); put('h1A);                               // D188 LDAA #$1A
    put('h7E); put('hD1); put('hD2);                    // D18A JMP FAILED
    // OK1A:
    put('h1D); put('h05); put('h0F);                    // D18D BCLR $05,X #$0F
    put('h86); put('hA0);                               // D190 LDAA #$A0
    put('hA1); put('h05);                               // D192 CMPA $05,X
    put('h27); put('h05);                               // D194 BEQ OK1B
    put('h86); put('h1B);                               // D196 LDAA #$1B
    put('h7E); put('hD1); put('hD2);                    // D198 JMP FAILED
    // OK1B:
    put('h86); put('h45);                               // D19B LDAA #$45
    put('hC6); put('hCD);                               // D19D LDAB #$CD
    put('h36);                                          // D19F PSHA
    put('h37);                                          // D1A0 PSHB
    put('h4F);                                          // D1A1 CLRA
    put('h5F);                                          // D1A2 CLRB
    put('h33);                                          // D1A3 PULB
    put('h32);                                          // D1A4 PULA
    put('h81); put('h45);                               // D1A5 CMPA #$45
    put('h27); put('h05);                               // D1A7 BEQ OK1C
    put('h86); put('h1C);                               // D1A9 LDAA #$1C
    put('h7E); put('hD1); put('hD2);                    // D1AB JMP FAILED
    // OK1C:
    put('hC1); put('hCD);                               // D1AE CMPB #$CD
    put('h27); put('h05);                               // D1B0 BEQ OK1D
    put('h86); put('h1D);                               // D1B2 LDAA #$1D
    put('h7E); put('hD1); put('hD2);                    // D1B4 JMP FAILED
    // OK1D:
    put('hC6); put('h15);                               // D1B7 LDAB #$15
    put('hD7); put('h10);                               // D1B9 STAB $0010
    put('h13); put('h10); put('hEA); put('h05);         // D1BB BRCLR $0010 #$EA OK1E
    put('h86); put('h1E);                               // D1BF LDAA #$1E
    put('h7E); put('hD1); put('hD2);                    // D1C1 JMP FAILED
    // OK1E:
    put('h12); put('h10); put('h05); put('h05);         // D1C4 BRSET $0010 #$05 OK1F
    put('h86); put('h1F);                               // D1C8 LDAA #$1F
    put('h7E); put('hD1); put('hD2);                    // D1CA JMP FAILED
    // OK1F:
    put('h86); put('h00);                               // D1CD LDAA #$00
    put('hC6); put('h00);                               // D1CF LDAB #$00
    put('hCF);                                          // D1D1 STOP
    // FAILED:
    put('hC6); put('hEE);                               // D1D2 LDAB #$EE
    put('hCF);                                          // D1D4 STOP
    img['hFFFE - 'hD000] = 8'hD0;
    img['hFFFF - 'hD000] = 8'h00;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 12288; i++) begin
      load_we = 1'b1; load_addr = 14'(i); load_data = img[i];
      @(negedge clk);
    end
    load_we = 1'b0;
    rst_n = 1'b1;

    wait (done);
    repeat (8) @(negedge clk);
    check(passed, $sformatf("program reached FAILED with test number A=$%h", a_at_end));
    check(a_at_end == 8'h00 && b_at_end == 8'h00,
          $sformatf("A=%h B=%h at the end, expected 00 00", a_at_end, b_at_end));
    check(n_fetch == 148, $sformatf("%0d instructions executed, expected 148", n_fetch));
    check(ram('h0001) == 8'h30 && ram('h0002) == 8'h50, "direct operands at $0001, $0002");
    check(ram('h0100) == 8'h10, "extended operand at $0100");
    check(ram('h0101) == 8'hA0, "INC then DEC extended leaves $0101 at $A0");
    check(ram('h0102) == 8'h05, "INC then DEC indexed leaves $0102 at $05");
    check(ram('h0103) == 8'hA5, "indexed operand at $0103");
    check(ram('h0004) == 8'h0F && ram('h0005) == 8'hA0, "logic operands at $0004, $0005");
    check(ram('h0105) == 8'hA0, "BSET #$AA then BCLR #$0F leave $0105 at $A0");
    check(ram('h0010) == 8'h15, "bit-test operand at $0010");
    check(ram('h0040) == 8'hCD && ram('h0041) == 8'h45, "PSHA/PSHB bytes below $0041");
    check(cpu_regs.sp == 16'h0041, "stack pointer balanced after PULB/PULA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
