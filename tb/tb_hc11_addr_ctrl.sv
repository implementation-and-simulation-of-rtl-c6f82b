// tb_hc11_addr_ctrl: self-checking test of the address bus controller.
//
// Checks that the address latched at each E falling edge comes from the
// selected sources (register-file address, ALU result, data bus, vector byte,
// $00 and $FF pages) and holds between edges; that the chip selects decode the
// memory map (register block at INIT[3:0]:$000-$03F, RAM at INIT[7:4]:$000-$1FF
// with the register block taking priority, EEPROM $B600-$B7FF, ROM
// $D000-$FFFF); that INIT can be written only before the timeout and moves the
// RAM and register block; and that PPROG is written and read back with its
// five defined bits.
module tb_hc11_addr_ctrl;
  import hc11_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         e_fall_en = 1'b0;
  addr_hi_sel_e hi_sel = AH_RF;
  addr_lo_sel_e lo_sel = AL_RF;
  logic [15:0]  rf_addr = '0;
  logic [7:0]   alu_result = '0, data_bus = '0, vec_lo = '0;
  logic         rw = 1'b1, timeout = 1'b0;
  logic [15:0]  addr;
  logic         cs_ram, cs_rom, cs_eeprom, cs_regs, reg_hit;
  logic [5:0]   reg_offset;
  logic [7:0]   init_reg, pprog, reg_rdata;

  hc11_addr_ctrl u_dut (.clk, .rst_n, .e_fall_en, .hi_sel, .lo_sel, .rf_addr, .alu_result,
                        .data_bus, .vec_lo, .rw, .init_write_timeout(timeout), .addr, .cs_ram,
                        .cs_rom, .cs_eeprom, .cs_regs, .reg_offset, .init_reg, .pprog,
                        .reg_rdata, .reg_hit);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic edge_e();
    @(negedge clk);
    e_fall_en = 1'b1;
    @(negedge clk);
    e_fall_en = 1'b0;
  endtask

  // go to an address through the register-file source
  task automatic go(input logic [15:0] a);
    hi_sel = AH_RF; lo_sel = AL_RF; rf_addr = a; rw = 1'b1;
    edge_e();
  endtask

  task automatic check_map(input logic [15:0] a, input logic [7:0] init);
    logic regs_e, ram_e, ee_e, rom_e;
    go(a);
    regs_e = (a[15:12] == init[3:0]) && (a[11:6] == 0);
    ram_e  = !regs_e && (a[15:12] == init[7:4]) && (a[11:9] == 0);
    ee_e   = !regs_e && !ram_e && (a >= 16'hB600) && (a <= 16'hB7FF);
    rom_e  = !regs_e && !ram_e && (a >= 16'hD000);
    check({cs_regs, cs_ram, cs_eeprom, cs_rom} == {regs_e, ram_e, ee_e, rom_e},
          $sformatf("chip selects for %h with INIT %h: %b%b%b%b", a, init,
                    cs_regs, cs_ram, cs_eeprom, cs_rom));
    if (regs_e) check(reg_offset == a[5:0], "register offset");
  endtask

  task automatic write_reg(input logic [5:0] off, input logic [7:0] d);
    go({init_reg[3:0], 6'd0, off});
    hi_sel = AH_RF; lo_sel = AL_RF; rw = 1'b0; data_bus = d;
    edge_e();
    rw = 1'b1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(addr == 16'hFFFE && init_reg == 8'h01 && pprog == 8'h00, "reset values");
    rst_n = 1'b1;
    // address sources
    for (int i = 0; i < 400; i++) begin
      logic [7:0] eh, el;
      hi_sel = addr_hi_sel_e'($urandom_range(0, 3));
      lo_sel = addr_lo_sel_e'($urandom_range(0, 3));
      rf_addr = 16'($urandom); alu_result = 8'($urandom);
      data_bus = 8'($urandom); vec_lo = 8'($urandom);
      case (hi_sel)
        AH_RF: eh = rf_addr[15:8]; AH_ALU: eh = alu_result; AH_ZERO: eh = 8'h00; default: eh = 8'hFF;
      endcase
      case (lo_sel)
        AL_RF: el = rf_addr[7:0]; AL_DATA: el = data_bus; AL_ALU: el = alu_result; default: el = vec_lo;
      endcase
      @(negedge clk);
      edge_e();
      check(addr == {eh, el}, $sformatf("address source %s/%s", hi_sel.name(), lo_sel.name()));
      rf_addr = ~rf_addr;
      repeat (2) @(negedge clk);
      check(addr == {eh, el}, "address holds between E falling edges");
    end
    // memory map with the reset INIT
    for (int i = 0; i < 300; i++) check_map(16'($urandom), 8'h01);
    check_map(16'h0000, 8'h01); check_map(16'h01FF, 8'h01); check_map(16'h0200, 8'h01);
    check_map(16'h1000, 8'h01); check_map(16'h103F, 8'h01); check_map(16'h1040, 8'h01);
    check_map(16'hB5FF, 8'h01); check_map(16'hB600, 8'h01); check_map(16'hB7FF, 8'h01);
    check_map(16'hB800, 8'h01); check_map(16'hCFFF, 8'h01); check_map(16'hD000, 8'h01);
    check_map(16'hFFFF, 8'h01);
    // PPROG
    write_reg(R_PPROG, 8'hFF);
    check(pprog == 8'h1F, "PPROG keeps its five defined bits");
    go(16'h103B);
    check(reg_hit && reg_rdata == 8'h1F, "PPROG reads back");
    // INIT before the timeout: move RAM to $3000 and registers to $2000
    write_reg(R_INIT, 8'h32);
    check(init_reg == 8'h32, "INIT written before the timeout");
    for (int i = 0; i < 200; i++) check_map(16'($urandom), 8'h32);
    check_map(16'h2000, 8'h32); check_map(16'h3000, 8'h32); check_map(16'h1000, 8'h32);
    go(16'h203D);
    check(reg_hit && reg_rdata == 8'h32, "INIT reads back at the moved register block");
    // INIT after the timeout: unchanged
    timeout = 1'b1;
    write_reg(R_INIT, 8'h01);
    check(init_reg == 8'h32, "INIT write ignored after the timeout");
    // overlap: register block wins over RAM on the same page
    timeout = 1'b0;
    write_reg(R_INIT, 8'h11);
    check_map(16'h1000, 8'h11); check_map(16'h1040, 8'h11); check_map(16'h1020, 8'h11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
