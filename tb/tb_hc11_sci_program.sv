// tb_hc11_sci_program: runs the serial-port test program on the complete
// microcontroller at its default sizes and checks what appears on TxD.
//
// The program (assembled by hand into the ROM at $D000) sets BAUD=$00 and
// SCCR2=$0C (TE, RE), then writes the ASCII characters $21..$5A to SCDR one
// after another, polling TC in SCSR with BRCLR before each next character, and
// starts again at $21 after $5A. The testbench decodes TxD (PD1) with its own
// timing - at BAUD=$00 a bit is 16 E cycles = 64 clocks - and checks:
//   - every frame has a 0 start bit of at least 64 clocks and a 1 stop bit,
//     sampled at the bit centres;
//   - the characters come out in order $21, $22, ... $5A, $21, ...;
//   - one full pass and the restart are seen.
module tb_hc11_sci_program;
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

  // program image: byte list at $D000, reset vector at $FFFE
  logic [7:0] img [12288];
  byte unsigned prog [] = '{
    8'h86, 8'hFE,                 // D000 LDAA #$FE
    8'h86, 8'h02,                 // D002 LDAA #$02
    8'hB7, 8'h10, 8'h09,          // D004 STAA DDRD
    8'h86, 8'h00,                 // D007 LDAA #$00
    8'hB7, 8'h10, 8'h2B,          // D009 STAA BAUD
    8'h86, 8'h0C,                 // D00C LDAA #$0C
    8'hB7, 8'h10, 8'h2D,          // D00E STAA SCCR2
    8'hCE, 8'h10, 8'h00,          // D011 LDX  #$1000
    8'h86, 8'h21,                 // D014 LOOP: LDAA #$21
    8'hB7, 8'h10, 8'h2F,          // D016 XMIT: STAA SCDR
    8'h1F, 8'h2E, 8'h40, 8'hFC,   // D019 HERE: BRCLR $2E,X,#$40,HERE
    8'h4C,                        // D01D INCA
    8'h81, 8'h5B,                 // D01E CMPA #$5B
    8'h26, 8'hF4,                 // D020 BNE  XMIT
    8'h20, 8'hF0                  // D022 BRA  LOOP
  };

  // TxD decoder
  int n_frames = 0, bad_frames = 0, bad_start = 0;
  logic [7:0] got [$];
  initial begin
    forever begin
      logic [7:0] b;
      int w;
      @(negedge pd_out[1]);
      if (rst_n && pd_oe[1]) begin
        w = 0;
        while (!pd_out[1] && w < 64) begin
          @(posedge clk);
          w++;
        end
        if (w != 64) bad_start++;               // start bit ended early
        repeat (32) @(posedge clk);             // middle of data bit 0
        for (int i = 0; i < 8; i++) begin
          b[i] = pd_out[1];
          if (i < 7) repeat (64) @(posedge clk);
        end
        repeat (64) @(posedge clk);
        if (pd_out[1]) got.push_back(b);
        else bad_frames++;
        n_frames++;
      end
    end
  end

  initial begin
    for (int i = 0; i < 12288; i++) img[i] = 8'h00;
    foreach (prog[i]) img[i] = prog[i];
    img['hFFFE - 'hD000] = 8'hD0;
    img['hFFFF - 'hD000] = 8'h00;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 12288; i++) begin
      load_we = 1'b1; load_addr = 14'(i); load_data = img[i];
      @(negedge clk);
    end
    load_we = 1'b0;
    rst_n = 1'b1;

    wait (n_frames == 62);
    check(bad_frames == 0, $sformatf("%0d frames without a stop bit", bad_frames));
    check(bad_start == 0, $sformatf("%0d start bits shorter than 64 clocks", bad_start));
    for (int i = 0; i < 62; i++) begin
      logic [7:0] e;
      e = 8'(8'h21 + (i % 58));
      check(got[i] == e, $sformatf("character %0d is %h, expected %h", i, got[i], e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
