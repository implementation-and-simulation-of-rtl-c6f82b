// tb_hc11_expanded: the complete microcontroller in normal expanded mode,
// talking to an external memory through the multiplexed bus on ports B and C.
//
// The external memory model here answers at $8000-$80FF, which no on-chip
// device claims. It takes the address low byte from port C while AS is high,
// the high byte from port B, and during E high either drives port C with the
// addressed byte (R/W = STRB high) or stores the byte the chip drives on port C
// (R/W low). A short program at $D000 reads $8000 into RAM $20, writes $5A to
// $8001, reads it back into RAM $21 and loops. Checks: the RAM and external
// bytes, that port B carried $80 in external cycles, that R/W went low for the
// external write, and that port C was an input during external reads.
module tb_hc11_expanded;
  import hc11_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        load_we = 1'b0;
  logic [13:0] load_addr = '0;
  logic [7:0]  load_data = '0;
  logic [7:0]  pa_out, pa_oe, pb_out, pc_out, pc_oe, pc_in;
  logic        strb;
  logic [5:0]  pd_out, pd_oe;
  logic        eclk, ph1clk, ph2clk, as_out, rw_out, opcode_fetch, int_taken;
  logic        eeprom_busy, reset_out;
  logic [15:0] addr_bus;
  logic [7:0]  data_bus;
  cpu_state_e  cpu_state;
  regs_t       cpu_regs;

  hc11_mcu u_dut (
    .clk, .rst_n, .irq_n(1'b1), .xirq_n(1'b1), .cop_enable(1'b0), .expanded(1'b1),
    .load_we, .load_addr, .load_data, .pa_in(8'h00), .pa_out, .pa_oe, .pb_out, .pc_in,
    .pc_out, .pc_oe, .stra(1'b0), .strb, .pd_in(6'h3F), .pd_out, .pd_oe, .pe_in(8'h00),
    .eclk, .ph1clk, .ph2clk, .as_out, .addr_bus, .data_bus, .rw_out, .cpu_state,
    .cpu_regs, .opcode_fetch, .int_taken, .eeprom_busy, .reset_out
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // external memory on the multiplexed bus
  logic [7:0]  ext [256];
  logic [7:0]  lat_lo = 8'h00;
  logic [15:0] ext_addr;
  logic        ext_hit;
  int n_ext_rd = 0, n_ext_wr = 0, bad_oe = 0;
  assign ext_addr = {pb_out, lat_lo};
  assign ext_hit  = (ext_addr[15:8] == 8'h80);
  assign pc_in    = (eclk && strb && ext_hit) ? ext[ext_addr[7:0]] : 8'h00;
  always @(posedge clk) begin
    if (as_out) lat_lo <= pc_out;
    if (rst_n && eclk && ext_hit) begin
      if (!strb) ext[ext_addr[7:0]] <= pc_out;
      if (u_dut.e_fall_en) begin
        if (strb) begin
          n_ext_rd++;
          if (pc_oe != 8'h00) bad_oe++;
        end else begin
          n_ext_wr++;
        end
      end
    end
  end

  function automatic logic [7:0] ram(input int a);
    return u_dut.u_ram.mem[a];
  endfunction

  logic [7:0] img [12288];
  byte unsigned prog [] = '{
    8'hB6, 8'h80, 8'h00,          // D000 LDAA $8000
    8'h97, 8'h20,                 // D003 STAA $20
    8'h86, 8'h5A,                 // D005 LDAA #$5A
    8'hB7, 8'h80, 8'h01,          // D007 STAA $8001
    8'hF6, 8'h80, 8'h01,          // D00A LDAB $8001
    8'hD7, 8'h21,                 // D00D STAB $21
    8'h20, 8'hFE                  // D00F BRA  *
  };

  initial begin
    for (int i = 0; i < 256; i++) ext[i] = 8'h00;
    ext[0] = 8'hC3;
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

    repeat (40 * 4) @(negedge clk);
    check(ram('h20) == 8'hC3, $sformatf("external byte read into RAM: %h", ram('h20)));
    check(ext[1] == 8'h5A, $sformatf("external write: %h", ext[1]));
    check(ram('h21) == 8'h5A, $sformatf("external byte read back: %h", ram('h21)));
    check(n_ext_rd == 2 && n_ext_wr == 1,
          $sformatf("%0d external reads and %0d writes, expected 2 and 1", n_ext_rd, n_ext_wr));
    check(bad_oe == 0, "port C is an input during external reads");
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
