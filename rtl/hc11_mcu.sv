// hc11_mcu: the complete single-chip microcontroller.
//
// Connects the clock generator, the CPU (controller, register file and ALU),
// the address bus controller, the ROM, RAM and EEPROM, and the three peripheral
// blocks - handshake I/O (ports B, C, STRA/STRB), timer (port A, TCNT, input
// capture, output compare, RTI, COP, pulse accumulator) and serial
// communications (SCI, SPI, port D) - on one internal 8-bit data bus.
//
// Bus: every bus cycle is one E cycle of four input clocks. The address
// controller presents the address from the E falling edge; the memories latch
// it with the address strobe and drive their data from the E rising edge, the
// register block answers combinationally, and the CPU and address controller
// take the byte on the next E falling edge. Every source drives $00 when it is
// not selected, so the read bus is the OR of all of them; in a write cycle the
// bus carries the CPU's data, which memories and registers store on the E
// falling edge.
// Interrupts: the peripherals' requests are gathered into the CPU's priority
// vector (IRQ pin and handshake STAF, RTI, IC1..IC3, OC1..OC5, TOF, PAOV, PAI,
// SPI, SCI, highest first); XIRQ is separate.
// COP: a watchdog timeout resets the whole chip for one input clock, drives
// reset_out, and makes the CPU fetch the COP vector ($FFFA) instead of the
// reset vector ($FFFE).
// Expanded mode (expanded = 1): ports B and C form the external multiplexed
// address/data bus with STRB as R/W and as_out as AS; any address that no
// on-chip memory or the register block claims reads its data from port C.
// Port E is a general input port read at $0A; the analog converter that shares
// it is not part of this design. cop_enable stands for the COP-enable
// configuration bit. The ROM load port writes program bytes into the ROM
// (ROM offset, i.e. address minus $D000) and is meant to be used while rst_n is
// held low.
module hc11_mcu
  import hc11_pkg::*;
#(
  parameter int ROM_SIZE     = 12288,
  parameter int RAM_SIZE     = 512,
  parameter int EE_SIZE      = 512,
  parameter int EE_ROW_BYTES = 2
) (
  input  logic                        clk,          // external clock (4 x E)
  input  logic                        rst_n,
  input  logic                        irq_n,
  input  logic                        xirq_n,
  input  logic                        cop_enable,
  input  logic                        expanded,     // mode pins: 1 = normal expanded
  // ROM program loading
  input  logic                        load_we,
  input  logic [$clog2(ROM_SIZE)-1:0] load_addr,
  input  logic [7:0]                  load_data,
  // port A
  input  logic [7:0]                  pa_in,
  output logic [7:0]                  pa_out,
  output logic [7:0]                  pa_oe,
  // ports B and C, handshake strobes
  output logic [7:0]                  pb_out,
  input  logic [7:0]                  pc_in,
  output logic [7:0]                  pc_out,
  output logic [7:0]                  pc_oe,
  input  logic                        stra,
  output logic                        strb,
  // port D
  input  logic [5:0]                  pd_in,
  output logic [5:0]                  pd_out,
  output logic [5:0]                  pd_oe,
  // port E
  input  logic [7:0]                  pe_in,
  // clocks and bus, for observation
  output logic                        eclk,
  output logic                        ph1clk,
  output logic                        ph2clk,
  output logic                        as_out,
  output logic [15:0]                 addr_bus,
  output logic [7:0]                  data_bus,
  output logic                        rw_out,
  output cpu_state_e                  cpu_state,
  output regs_t                       cpu_regs,
  output logic                        opcode_fetch,
  output logic                        int_taken,
  output logic                        eeprom_busy,
  output logic                        reset_out
);

  // ---------------------------------------------------------------- reset
  logic cop_timeout, cop_rst_q, cop_cause_q, sys_rst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cop_rst_q   <= 1'b0;
      cop_cause_q <= 1'b0;
    end else begin
      cop_rst_q <= cop_timeout;
      if (cop_timeout)       cop_cause_q <= 1'b1;
      else if (opcode_fetch) cop_cause_q <= 1'b0;
    end
  end
  assign sys_rst_n = rst_n && !cop_rst_q;
  assign reset_out = cop_rst_q;

  // ---------------------------------------------------------------- clocks
  logic e_fall_en, ph2_rise_en, e_rise_en, ph2_fall_en;

  hc11_clock_divider u_clk (
    .clk, .rst_n(sys_rst_n),
    .ph1clk, .ph2clk, .eclk, .as_out, .phase(),
    .e_fall_en, .ph2_rise_en, .e_rise_en, .ph2_fall_en
  );

  // ---------------------------------------------------------------- CPU
  addr_hi_sel_e hi_sel;
  addr_lo_sel_e lo_sel;
  logic [15:0]  rf_addr;
  logic [7:0]   vec_lo, alu_result, cpu_dout;
  logic         rw, init_timeout;
  logic [14:0]  int_src;

  hc11_cpu u_cpu (
    .clk, .rst_n(sys_rst_n), .e_fall_en, .ph2_fall_en,
    .data_in(data_bus), .xirq_n, .int_src,
    .reset_vec_lo(cop_cause_q ? VEC_COP : VEC_RESET),
    .hi_sel, .lo_sel, .rf_addr, .vec_lo, .alu_result,
    .rw, .data_out(cpu_dout), .init_timeout,
    .state(cpu_state), .regs(cpu_regs), .opcode_fetch, .int_taken
  );

  // ---------------------------------------------------------------- address bus
  logic       cs_ram, cs_rom, cs_eeprom, cs_regs;
  logic [5:0] reg_offset;
  logic [7:0] pprog, ac_rdata;

  hc11_addr_ctrl u_addr (
    .clk, .rst_n(sys_rst_n), .e_fall_en,
    .hi_sel, .lo_sel, .rf_addr, .alu_result, .data_bus, .vec_lo,
    .rw, .init_write_timeout(init_timeout),
    .addr(addr_bus), .cs_ram, .cs_rom, .cs_eeprom, .cs_regs, .reg_offset,
    .init_reg(), .pprog, .reg_rdata(ac_rdata), .reg_hit()
  );

  // ---------------------------------------------------------------- memories
  logic [7:0] rom_d, ram_d, ee_d;

  hc11_rom #(.SIZE(ROM_SIZE)) u_rom (
    .clk, .e_rise_en, .as_in(as_out), .cs_in(cs_rom), .addr_in(addr_bus),
    .data_out(rom_d), .load_we, .load_addr, .load_data
  );

  hc11_ram #(.SIZE(RAM_SIZE)) u_ram (
    .clk, .e_rise_en, .e_fall_en, .as_in(as_out), .cs_in(cs_ram), .rw_in(rw),
    .addr_in(addr_bus), .data_in(data_bus), .data_out(ram_d)
  );

  hc11_eeprom #(.SIZE(EE_SIZE), .ROW_BYTES(EE_ROW_BYTES)) u_ee (
    .clk, .rst_n(sys_rst_n), .e_rise_en, .e_fall_en, .as_in(as_out),
    .cs_in(cs_eeprom), .rw_in(rw), .addr_in(addr_bus), .prog_reg(pprog),
    .data_in(data_bus), .data_out(ee_d), .busy(eeprom_busy)
  );

  // ---------------------------------------------------------------- peripherals
  logic [7:0] hs_rdata, tm_rdata, sr_rdata;
  logic       hs_irq, tof_irq, rti_irq, paov_irq, pai_irq, sci_irq, spi_irq;
  logic [2:0] ic_irq;
  logic [4:0] oc_irq;

  hc11_handshake_io u_hs (
    .clk, .rst_n(sys_rst_n), .e_fall_en, .ph2_rise_en,
    .cs(cs_regs), .rw, .offset(reg_offset), .wdata(data_bus),
    .rdata(hs_rdata), .hit(),
    .pc_in, .pc_out, .pc_oe, .pb_out, .stra, .strb, .irq(hs_irq),
    .expanded, .eclk, .bus_addr(addr_bus)
  );

  hc11_timer u_tmr (
    .clk, .rst_n(sys_rst_n), .e_fall_en,
    .cs(cs_regs), .rw, .offset(reg_offset), .wdata(data_bus),
    .rdata(tm_rdata), .hit(),
    .pa_in, .pa_out, .pa_oe, .cop_enable, .cop_timeout,
    .ic_irq, .oc_irq, .tof_irq, .rti_irq, .paov_irq, .pai_irq
  );

  hc11_serial u_ser (
    .clk, .rst_n(sys_rst_n), .e_fall_en,
    .cs(cs_regs), .rw, .offset(reg_offset), .wdata(data_bus),
    .rdata(sr_rdata), .hit(),
    .pd_in, .pd_out, .pd_oe, .sci_irq, .spi_irq
  );

  // ---------------------------------------------------------------- data bus
  logic [7:0] pe_rdata;
  logic       pe_hit;
  assign pe_hit   = cs_regs && (reg_offset == R_PORTE);
  assign pe_rdata = pe_hit ? pe_in : 8'h00;

  // expanded mode: an address no on-chip device claims is an external access,
  // whose read data comes in on the port C pins during E high
  logic       ext_sel;
  logic [7:0] ext_rdata;
  assign ext_sel   = expanded && !(cs_ram || cs_rom || cs_eeprom || cs_regs);
  assign ext_rdata = (ext_sel && rw) ? pc_in : 8'h00;

  logic [7:0] read_bus;
  assign read_bus = rom_d | ram_d | ee_d | ac_rdata | hs_rdata | tm_rdata | sr_rdata | pe_rdata
                  | ext_rdata;
  assign data_bus = rw ? read_bus : cpu_dout;
  assign rw_out   = rw;

  assign int_src = {sci_irq, spi_irq, pai_irq, paov_irq, tof_irq,
                    oc_irq[4], oc_irq[3], oc_irq[2], oc_irq[1], oc_irq[0],
                    ic_irq[2], ic_irq[1], ic_irq[0], rti_irq, (!irq_n || hs_irq)};

endmodule
