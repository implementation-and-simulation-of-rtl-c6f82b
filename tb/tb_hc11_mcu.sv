// tb_hc11_mcu: end-to-end test of the complete microcontroller at its default
// sizes (12 KB ROM, 512-byte RAM, 512-byte EEPROM).
//
// A hand-assembled program is written into the ROM through the load port while
// reset is held, then the chip runs it from the reset vector:
//   MUL, IDIV and FDIV with results stored in RAM; a PORTB write (STRB pulse);
//   an SCI byte sent at BAUD=$00 with TxD looped back to RxD and read back;
//   an EEPROM byte programmed and then byte-erased through PPROG; output
//   compare 2 set to toggle PA6 and interrupt; the X and I mask bits cleared.
// The testbench then pulls IRQ low, then XIRQ, and finally enables the COP
// watchdog, which the program never services, so the chip resets through the
// COP vector. Each mechanism is counted (opcode fetches of MUL/IDIV/FDIV,
// STRB pulses, SCI frames decoded on TxD by the testbench, PA6 toggles, OC2,
// IRQ and XIRQ handler runs, EEPROM program and erase results, COP resets)
// and one that never happened is a failure. E is one quarter of the clock, so
// an SCI bit at BAUD=$00 lasts 16 E cycles = 64 clocks.
module tb_hc11_mcu;
  import hc11_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        irq_n = 1'b1, xirq_n = 1'b1, cop_enable = 1'b0;
  logic        load_we = 1'b0;
  logic [13:0] load_addr = '0;
  logic [7:0]  load_data = '0;
  logic [7:0]  pa_in = '0, pa_out, pa_oe, pb_out, pc_in = '0, pc_out, pc_oe, pe_in = '0;
  logic        stra = 1'b0, strb;
  logic [5:0]  pd_in, pd_out, pd_oe;
  logic        eclk, ph1clk, ph2clk, as_out, rw_out, opcode_fetch, int_taken;
  logic        eeprom_busy, reset_out;
  logic [15:0] addr_bus;
  logic [7:0]  data_bus;
  cpu_state_e  cpu_state;
  regs_t       cpu_regs;

  // TxD looped back to RxD, everything else idle high
  assign pd_in = {4'b1111, 1'b1, pd_oe[1] ? pd_out[1] : 1'b1};

  hc11_mcu u_dut (
    .clk, .rst_n, .irq_n, .xirq_n, .cop_enable, .expanded(1'b0), .load_we, .load_addr, .load_data,
    .pa_in, .pa_out, .pa_oe, .pb_out, .pc_in, .pc_out, .pc_oe, .stra, .strb,
    .pd_in, .pd_out, .pd_oe, .pe_in, .eclk, .ph1clk, .ph2clk, .as_out, .addr_bus,
    .data_bus, .rw_out, .cpu_state, .cpu_regs, .opcode_fetch, .int_taken,
    .eeprom_busy, .reset_out
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- program
  logic [7:0] img [12288];
  int pc;
  task automatic put(input int unsigned b);
    img[pc - 'hD000] = b[7:0];
    pc++;
  endtask
  task automatic put_vec(input int unsigned at, input int unsigned target);
    pc = at; put(target >> 8); put(target & 'hFF);
  endtask

  task automatic build();
    for (int i = 0; i < 12288; i++) img[i] = 8'h00;
    pc = 'hD000;
    put('h8E); put('h01); put('hFF);            // LDS  #$01FF
    put('h86); put('h0C);                       // LDAA #12
    put('hC6); put('h0B);                       // LDAB #11
    put('h3D);                                  // MUL           D = 132
    put('hDD); put('h00);                       // STD  $00
    put('hCE); put('h00); put('h05);            // LDX  #5
    put('h02);                                  // IDIV          X = 26, D = 2
    put('hDF); put('h02);                       // STX  $02
    put('hDD); put('h04);                       // STD  $04
    put('hCC); put('h01); put('h00);            // LDD  #$0100
    put('hCE); put('h04); put('h00);            // LDX  #$0400
    put('h03);                                  // FDIV          X = $4000
    put('hDF); put('h06);                       // STX  $06
    put('hCE); put('h10); put('h00);            // LDX  #$1000   register block
    put('h86); put('hA5);                       // LDAA #$A5
    put('hA7); put('h04);                       // STAA PORTB,X  STRB pulse
    put('h6F); put('h2B);                       // CLR  BAUD,X
    put('h86); put('h0C);                       // LDAA #$0C
    put('hA7); put('h2D);                       // STAA SCCR2,X  TE, RE
    put('h86); put('h4B);                       // LDAA #'K'
    put('hA7); put('h2F);                       // STAA SCDR,X
    put('h1F); put('h2E); put('h20); put('hFC); // BRCLR SCSR,X,#$20,*
    put('hA6); put('h2F);                       // LDAA SCDR,X
    put('h97); put('h08);                       // STAA $08
    put('h86); put('h02);                       // LDAA #$02
    put('hA7); put('h3B);                       // STAA PPROG,X  EELAT
    put('h86); put('h3C);                       // LDAA #$3C
    put('hB7); put('hB6); put('h00);            // STAA $B600    program
    put('h6F); put('h3B);                       // CLR  PPROG,X
    put('hB6); put('hB6); put('h00);            // LDAA $B600
    put('h97); put('h0D);                       // STAA $0D
    put('h86); put('h16);                       // LDAA #$16
    put('hA7); put('h3B);                       // STAA PPROG,X  BYTE, ERASE, EELAT
    put('hB7); put('hB6); put('h00);            // STAA $B600    erase
    put('h6F); put('h3B);                       // CLR  PPROG,X
    put('hB6); put('hB6); put('h00);            // LDAA $B600
    put('h97); put('h0E);                       // STAA $0E
    put('h86); put('h40);                       // LDAA #$40
    put('hA7); put('h20);                       // STAA TCTL1,X  OC2 toggles PA6
    put('hA7); put('h22);                       // STAA TMSK1,X  OC2I
    put('hEC); put('h0E);                       // LDD  TCNT,X
    put('hC3); put('h01); put('h00);            // ADDD #$0100
    put('hED); put('h18);                       // STD  TOC2,X
    put('h86); put('h00);                       // LDAA #$00
    put('h06);                                  // TAP           clear X and I
    put('h20); put('hFE);                       // BRA  *
    pc = 'hD100;                                // OC2 handler
    put('h86); put('h40);                       // LDAA #$40
    put('hA7); put('h23);                       // STAA TFLG1,X
    put('h7C); put('h00); put('h09);            // INC  $0009
    put('h3B);                                  // RTI
    pc = 'hD108;                                // IRQ handler
    put('h7C); put('h00); put('h0A);            // INC  $000A
    put('h3B);                                  // RTI
    pc = 'hD10C;                                // XIRQ handler
    put('h7C); put('h00); put('h0B);            // INC  $000B
    put('h3B);                                  // RTI
    pc = 'hD110;                                // COP reset entry
    put('h86); put('hC0);                       // LDAA #$C0
    put('h97); put('h0C);                       // STAA $0C
    put('h20); put('hFE);                       // BRA  *
    put_vec('hFFE6, 'hD100);                    // OC2
    put_vec('hFFF2, 'hD108);                    // IRQ
    put_vec('hFFF4, 'hD10C);                    // XIRQ
    put_vec('hFFFA, 'hD110);                    // COP failure
    put_vec('hFFFE, 'hD000);                    // reset
  endtask

  // ---------------------------------------------------------------- monitors
  int n_mul = 0, n_idiv = 0, n_fdiv = 0, n_strb = 0, n_pa6 = 0, n_int = 0, n_cop = 0;
  int n_frames = 0;
  logic [7:0] last_frame = '0;
  logic strb_d = 1'b0, pa6_d = 1'b0, cop_d = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (opcode_fetch && u_dut.e_fall_en) begin
        if (data_bus == 8'h3D) n_mul++;
        if (data_bus == 8'h02) n_idiv++;
        if (data_bus == 8'h03) n_fdiv++;
      end
      if (int_taken && u_dut.e_fall_en) n_int++;
      strb_d <= strb;
      pa6_d  <= pa_out[6];
      cop_d  <= reset_out;
      if (strb && !strb_d) n_strb++;
      if (pa_out[6] != pa6_d) n_pa6++;
      if (reset_out && !cop_d) n_cop++;
    end
  end

  // SCI frame decoder on TxD: 64 clocks per bit, sampled mid-bit
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge pd_out[1]);
      if (pd_oe[1] && rst_n) begin
        repeat (32) @(posedge clk);
        if (!pd_out[1]) begin
          for (int i = 0; i < 8; i++) begin
            repeat (64) @(posedge clk);
            b[i] = pd_out[1];
          end
          repeat (64) @(posedge clk);
          if (pd_out[1]) begin
            last_frame = b;
            n_frames++;
          end
        end
      end
    end
  end

  function automatic logic [7:0] ram(input int a);
    return u_dut.u_ram.mem[a];
  endfunction

  // ---------------------------------------------------------------- sequence
  // returns just after the clock edge at which the CPU takes an interrupt
  task automatic wait_int_taken();
    do @(negedge clk); while (!(int_taken && u_dut.e_fall_en));
    @(posedge clk);
    #1;
  endtask

  int ecount = 0;
  always @(posedge clk) if (u_dut.e_fall_en) ecount++;

  initial begin
    build();
    repeat (4) @(negedge clk);
    for (int i = 0; i < 12288; i++) begin
      load_we = 1'b1; load_addr = 14'(i); load_data = img[i];
      @(negedge clk);
    end
    load_we = 1'b0;
    rst_n = 1'b1;

    // main program, then the first OC2 interrupt
    while (ram('h09) != 8'd1) @(posedge clk);
    check(ram('h00) == 8'h00 && ram('h01) == 8'h84, "MUL 12*11 = $0084 in RAM");
    check(ram('h02) == 8'h00 && ram('h03) == 8'h1A, "IDIV 132/5 quotient 26");
    check(ram('h04) == 8'h00 && ram('h05) == 8'h02, "IDIV 132/5 remainder 2");
    check(ram('h06) == 8'h40 && ram('h07) == 8'h00, "FDIV $0100/$0400 = $4000");
    check(ram('h08) == 8'h4B, $sformatf("SCI loop-back byte %h", ram('h08)));
    check(last_frame == 8'h4B, $sformatf("SCI frame decoded on TxD %h", last_frame));
    check(ram('h0D) == 8'h3C, $sformatf("EEPROM byte programmed: %h", ram('h0D)));
    check(ram('h0E) == 8'hFF, $sformatf("EEPROM byte erased: %h", ram('h0E)));
    check(pb_out == 8'hA5, "PORTB output");
    check(pa_out[6] == 1'b1, "OC2 toggled PA6");

    // IRQ pin
    repeat (40) @(negedge clk);
    irq_n = 1'b0;
    wait_int_taken();
    irq_n = 1'b1;
    while (ram('h0A) != 8'd1) @(posedge clk);
    repeat (80) @(negedge clk);
    check(cpu_regs.ccr[CCR_I] == 1'b0 && cpu_regs.sp == 16'h01FF,
          "RTI after the IRQ handler restored the I bit and the stack pointer");

    // XIRQ pin
    repeat (40) @(negedge clk);
    xirq_n = 1'b0;
    wait_int_taken();
    xirq_n = 1'b1;
    while (ram('h0B) != 8'd1) @(posedge clk);
    check(ram('h0A) == 8'd1, "IRQ handler ran once");

    // COP watchdog: never serviced, resets the chip through the COP vector
    begin
      int t0;
      repeat (40) @(negedge clk);
      t0 = ecount;
      cop_enable = 1'b1;
      while (!reset_out) @(posedge clk);
      cop_enable = 1'b0;
      check(ecount - t0 >= 32768 && ecount - t0 <= 32770,
            $sformatf("COP timeout after %0d E cycles, expected 32768", ecount - t0));
    end
    while (ram('h0C) != 8'hC0) @(posedge clk);
    check(cpu_regs.pc >= 16'hD110 && cpu_regs.pc <= 16'hD118, "running from the COP vector");

    // mechanism counts
    check(n_mul >= 1, "MUL executed");
    check(n_idiv >= 1, "IDIV executed");
    check(n_fdiv >= 1, "FDIV executed");
    check(n_strb >= 1, "STRB pulse from a PORTB write");
    check(n_frames >= 1, "SCI frame transmitted");
    check(n_pa6 >= 1, "output compare pin action");
    check(ram('h09) >= 8'd1, "OC2 interrupt handled");
    check(ram('h0A) >= 8'd1, "IRQ interrupt handled");
    check(ram('h0B) >= 8'd1, "XIRQ interrupt handled");
    check(n_int >= 3, $sformatf("%0d interrupts taken", n_int));
    check(n_cop == 1, "one COP reset");
    $display("mechanisms: MUL %0d IDIV %0d FDIV %0d STRB %0d SCI %0d PA6 %0d interrupts %0d COP %0d",
             n_mul, n_idiv, n_fdiv, n_strb, n_frames, n_pa6, n_int, n_cop);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
