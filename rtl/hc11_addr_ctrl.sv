// hc11_addr_ctrl: address bus controller.
//
// Puts the bus address together and decodes the chip selects. On each E falling
// edge (e_fall_en) it latches the address of the next bus cycle: the high byte
// from the register-file address output, the ALU result, $00 (direct page) or
// $FF (vector page); the low byte from the register-file address output, the
// data bus (the byte just read, for direct and extended addressing), the ALU
// result or the controller's vector byte. The sources and the select inputs
// follow the design; the $00, $FF and vector sources are this implementation's
// additions for direct addressing and vector fetches.
//
// The controller also holds two registers of the $1000 block, as the design
// places them here:
//   INIT  ($3D) RAM page [7:4] and register-block page [3:0], reset $01; it can
//         only be written until init_write_timeout is raised by the CPU
//         controller (64 E cycles after reset).
//   PPROG ($3B) EEPROM programming control, passed to the EEPROM.
// Memory map (MC68HC11E9, ROM placement as in the design): the 64-byte register
// block at INIT[3:0]:$000, the 512-byte RAM at INIT[7:4]:$000 (the register
// block wins where they overlap), the EEPROM at $B600-$B7FF and the 12 KB ROM at
// $D000-$FFFF. Chip selects are combinational from the latched address. Reads of
// INIT and PPROG come out on reg_rdata with reg_hit; other registers of the
// block belong to the peripherals, which decode reg_offset themselves.
module hc11_addr_ctrl
  import hc11_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         e_fall_en,
  input  addr_hi_sel_e hi_sel,
  input  addr_lo_sel_e lo_sel,
  input  logic [15:0]  rf_addr,
  input  logic [7:0]   alu_result,
  input  logic [7:0]   data_bus,
  input  logic [7:0]   vec_lo,
  input  logic         rw,                 // 1 = read, 0 = write (current cycle)
  input  logic         init_write_timeout,
  output logic [15:0]  addr,
  output logic         cs_ram,
  output logic         cs_rom,
  output logic         cs_eeprom,
  output logic         cs_regs,
  output logic [5:0]   reg_offset,
  output logic [7:0]   init_reg,
  output logic [7:0]   pprog,
  output logic [7:0]   reg_rdata,
  output logic         reg_hit
);

  logic [7:0] hi_d, lo_d;

  always_comb begin
    unique case (hi_sel)
      AH_ALU:  hi_d = alu_result;
      AH_ZERO: hi_d = 8'h00;
      AH_FF:   hi_d = 8'hFF;
      default: hi_d = rf_addr[15:8];
    endcase
    unique case (lo_sel)
      AL_DATA: lo_d = data_bus;
      AL_ALU:  lo_d = alu_result;
      AL_VEC:  lo_d = vec_lo;
      default: lo_d = rf_addr[7:0];
    endcase
  end

  // chip select decode
  always_comb begin
    cs_regs   = (addr[15:12] == init_reg[3:0]) && (addr[11:6] == 6'd0);
    cs_ram    = !cs_regs && (addr[15:12] == init_reg[7:4]) && (addr[11:9] == 3'd0);
    cs_eeprom = !cs_regs && !cs_ram && (addr[15:9] == 7'b1011_011);
    cs_rom    = !cs_regs && !cs_ram && (addr >= 16'hD000);
    reg_offset = addr[5:0];
    reg_hit    = cs_regs && (reg_offset == R_INIT || reg_offset == R_PPROG);
    reg_rdata  = (reg_offset == R_INIT) ? init_reg : pprog;
    if (!reg_hit) reg_rdata = 8'h00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr     <= 16'hFFFE;
      init_reg <= 8'h01;
      pprog    <= 8'h00;
    end else if (e_fall_en) begin
      addr <= {hi_d, lo_d};
      if (cs_regs && !rw) begin
        if (reg_offset == R_INIT && !init_write_timeout) init_reg <= data_bus;
        if (reg_offset == R_PPROG) pprog <= data_bus & 8'h1F;
      end
    end
  end

endmodule
