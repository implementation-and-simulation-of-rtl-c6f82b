// tb_hc11_cpu: self-checking test of the CPU (controller, register file, ALU).
//
// The CPU runs with the clock generator and the address bus controller against
// a flat 64 KB memory model kept in this testbench: reads return the addressed
// byte during the bus cycle, writes are stored at the E falling edge. A short
// hand-assembled program exercises loads, stores, 8- and 16-bit arithmetic, MUL,
// IDIV, FDIV, indexed read-modify-write, bit set/clear and test-and-branch,
// stack push/pull, subroutine call/return, SWI/RTI and an IRQ interrupt.
// Checks:
//   - the number of E cycles between consecutive opcode fetches equals the
//     M68HC11 instruction-table count of each executed instruction;
//   - memory and register contents worked out by hand from the program;
//   - an IRQ request is taken once the I bit is cleared and its handler runs.
module tb_hc11_cpu;
  import hc11_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ph1clk, ph2clk, eclk, as_out, e_fall_en, ph2_rise_en, e_rise_en, ph2_fall_en;
  logic [1:0] phase;
  hc11_clock_divider u_clk (.clk, .rst_n, .ph1clk, .ph2clk, .eclk, .as_out, .phase,
                            .e_fall_en, .ph2_rise_en, .e_rise_en, .ph2_fall_en);

  addr_hi_sel_e hi_sel;
  addr_lo_sel_e lo_sel;
  logic [15:0] rf_addr, addr;
  logic [7:0]  vec_lo, alu_result, data_out, data_bus;
  logic        rw, init_timeout, opcode_fetch, int_taken;
  logic [14:0] int_src;
  cpu_state_e  state;
  regs_t       regs;

  hc11_cpu u_dut (
    .clk, .rst_n, .e_fall_en, .ph2_fall_en, .data_in(data_bus), .xirq_n(1'b1),
    .int_src, .reset_vec_lo(VEC_RESET), .hi_sel, .lo_sel, .rf_addr, .vec_lo,
    .alu_result, .rw, .data_out, .init_timeout, .state, .regs, .opcode_fetch, .int_taken
  );

  hc11_addr_ctrl u_ac (
    .clk, .rst_n, .e_fall_en, .hi_sel, .lo_sel, .rf_addr, .alu_result,
    .data_bus, .vec_lo, .rw, .init_write_timeout(init_timeout),
    .addr, .cs_ram(), .cs_rom(), .cs_eeprom(), .cs_regs(), .reg_offset(),
    .init_reg(), .pprog(), .reg_rdata(), .reg_hit()
  );

  // memory model
  logic [7:0] mem [65536];
  assign data_bus = rw ? mem[addr] : data_out;
  always @(posedge clk) if (rst_n && e_fall_en && !rw) mem[addr] <= data_out;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // program image
  int pc;
  task automatic put(input int unsigned b);
    mem[pc[15:0]] = b[7:0];
    pc++;
  endtask

  // expected E cycles of each executed instruction, in execution order
  int exp_cyc[$] = '{3, 2, 2, 2, 10, 3, 41, 4, 5, 3, 3, 41, 5, 4, 2, 5, 7, 6, 6, 6,
                     3, 2, 4, 4, 6, 2, 2, 3, 5, 3, 4, 4, 3, 5, 4, 14, 2, 3, 12,
                     2, 3, 2, 3, 2};
  string exp_name[$] = '{"LDS imm", "LDAA imm", "ADDA imm", "LDAB imm", "MUL", "LDX imm",
                         "IDIV", "STD dir", "STX ext", "LDD imm", "LDX imm", "FDIV",
                         "STX ext", "LDY imm", "LDAA imm", "STAA ind,Y", "INC ind,Y",
                         "BSET dir", "BCLR dir", "BRSET dir", "PSHA", "LDAB imm", "PULB",
                         "STAB ext", "BSR", "LDAA imm", "ASLA", "STAA dir", "RTS", "JMP ext",
                         "ADDD imm", "STD dir", "XGDX", "STX ext", "STD dir", "SWI",
                         "LDAB imm", "STAB dir", "RTI", "LDAA imm", "STAA dir", "CMPA imm",
                         "BNE", "CLI"};

  int ecyc = 0, last_fetch = -1, nfetch = 0, irq_seen = 0;
  logic irq_req = 1'b0;

  always @(posedge clk) begin
    if (rst_n && e_fall_en) begin
      ecyc++;
      if (opcode_fetch) begin
        if (last_fetch >= 0 && nfetch <= exp_cyc.size()) begin
          check(ecyc - 1 - last_fetch == exp_cyc[nfetch-1],
                $sformatf("%s took %0d E cycles, expected %0d", exp_name[nfetch-1],
                          ecyc - 1 - last_fetch, exp_cyc[nfetch-1]));
        end
        last_fetch = ecyc - 1;
        nfetch++;
      end
      if (int_taken) begin
        irq_seen++;
        irq_req = 1'b0;
      end
    end
  end
  assign int_src = {14'd0, irq_req};

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = 8'h00;
    pc = 'hD000;
    put('h8E); put('h00); put('hFF);            // D000 LDS  #$00FF
    put('h86); put('hF5);                       // D003 LDAA #$F5
    put('h8B); put('hC8);                       // D005 ADDA #$C8      A=$BD
    put('hC6); put('h07);                       // D007 LDAB #$07
    put('h3D);                                  // D009 MUL            D=$052B
    put('hCE); put('h00); put('h03);            // D00A LDX  #$0003
    put('h02);                                  // D00D IDIV           X=$01B9 D=0
    put('hDD); put('h40);                       // D00E STD  $40
    put('hFF); put('h00); put('h42);            // D010 STX  $0042
    put('hCC); put('h10); put('h00);            // D013 LDD  #$1000
    put('hCE); put('h20); put('h00);            // D016 LDX  #$2000
    put('h03);                                  // D019 FDIV           X=$8000 D=0
    put('hFF); put('h00); put('h44);            // D01A STX  $0044
    put('h18); put('hCE); put('h00); put('h50); // D01D LDY  #$0050
    put('h86); put('h3C);                       // D021 LDAA #$3C
    put('h18); put('hA7); put('h02);            // D023 STAA 2,Y       [$52]=$3C
    put('h18); put('h6C); put('h02);            // D026 INC  2,Y       [$52]=$3D
    put('h14); put('h52); put('hC0);            // D029 BSET $52,#$C0  [$52]=$FD
    put('h15); put('h52); put('h01);            // D02C BCLR $52,#$01  [$52]=$FC
    put('h12); put('h52); put('h80); put('h02); // D02F BRSET $52,#$80,+2 (taken)
    put('h86); put('h11);                       // D033 LDAA #$11      (skipped)
    put('h36);                                  // D035 PSHA
    put('hC6); put('h99);                       // D036 LDAB #$99
    put('h33);                                  // D038 PULB           B=$3C
    put('hF7); put('h00); put('h46);            // D039 STAB $0046
    put('h8D); put('h03);                       // D03C BSR  $D041
    put('h7E); put('hD0); put('h48);            // D03E JMP  $D048
    put('h86); put('h81);                       // D041 LDAA #$81
    put('h48);                                  // D043 ASLA           A=$02
    put('h97); put('h47);                       // D044 STAA $47
    put('h39);                                  // D046 RTS
    put('h00);                                  // D047 (unused)
    put('hC3); put('h12); put('h34);            // D048 ADDD #$1234    D=$1470
    put('hDD); put('h48);                       // D04B STD  $48
    put('h8F);                                  // D04D XGDX           X=$1470 D=$8000
    put('hFF); put('h00); put('h4A);            // D04E STX  $004A
    put('hDD); put('h4C);                       // D051 STD  $4C
    put('h3F);                                  // D053 SWI
    put('h86); put('h55);                       // D054 LDAA #$55
    put('h97); put('h4E);                       // D056 STAA $4E
    put('h81); put('h55);                       // D058 CMPA #$55
    put('h26); put('hFE);                       // D05A BNE  *         (not taken)
    put('h0E);                                  // D05C CLI
    put('h20); put('hFE);                       // D05D BRA  *
    pc = 'hD060;
    put('hC6); put('hAA);                       // D060 LDAB #$AA      SWI handler
    put('hD7); put('h4F);                       // D062 STAB $4F
    put('h3B);                                  // D064 RTI
    pc = 'hD070;
    put('h86); put('h77);                       // D070 LDAA #$77      IRQ handler
    put('h97); put('h50);                       // D072 STAA $50
    put('h3B);                                  // D074 RTI
    pc = 'hFFF2; put('hD0); put('h70);          // IRQ vector
    pc = 'hFFF6; put('hD0); put('h60);          // SWI vector
    pc = 'hFFFE; put('hD0); put('h00);          // reset vector

    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    // run until the final loop is reached, then request an interrupt
    wait (nfetch == exp_cyc.size() + 3);
    check(regs.ccr[CCR_I] == 1'b0, "I bit cleared by CLI");
    @(negedge clk);
    irq_req = 1'b1;
    wait (irq_seen == 1);
    repeat (40 * 4) @(negedge clk);

    check(mem['h40] == 8'h00 && mem['h41] == 8'h00, "IDIV remainder stored");
    check(mem['h42] == 8'h01 && mem['h43] == 8'hB9, "IDIV quotient 1323/3 = $01B9");
    check(mem['h44] == 8'h80 && mem['h45] == 8'h00, "FDIV quotient $1000/$2000 = $8000");
    check(mem['h52] == 8'hFC, "indexed store, INC, BSET and BCLR on $52");
    check(mem['h46] == 8'h3C, "PSHA/PULB moves $3C");
    check(mem['h47] == 8'h02, "ASLA of $81 in subroutine");
    check(mem['h48] == 8'h14 && mem['h49] == 8'h70, "ADDD $023C+$1234");
    check(mem['h4A] == 8'h14 && mem['h4B] == 8'h70, "XGDX moves D to X");
    check(mem['h4C] == 8'h80 && mem['h4D] == 8'h00, "XGDX moves X to D");
    check(mem['h4F] == 8'hAA, "SWI handler ran");
    check(mem['h4E] == 8'h55, "execution resumed after RTI");
    check(mem['h50] == 8'h77, "IRQ handler ran");
    check(regs.a == 8'h55, "RTI restored A after the IRQ handler");
    check(regs.b == 8'h00, "RTI restored B saved by SWI");
    check(regs.x == 16'h1470 && regs.y == 16'h0050, "X and Y");
    check(regs.sp == 16'h00FF, "stack pointer balanced");
    check(regs.pc == 16'hD05D || regs.pc == 16'hD05E || regs.pc == 16'hD05F, "PC in final loop");
    check(irq_seen == 1, "one interrupt taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
