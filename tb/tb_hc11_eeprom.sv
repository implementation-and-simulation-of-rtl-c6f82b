// tb_hc11_eeprom: self-checking test of the EEPROM.
//
// Uses real bus timing from the clock generator and a PPROG value driven by
// the testbench. Checks: the array starts erased ($FF); writes with EEPGM and
// EELAT clear change nothing; byte programming (EELAT/EEPGM, ERASE clear);
// byte erase (ERASE+BYTE); row erase (ERASE+ROW) clears exactly the row of
// ROW_BYTES bytes holding the address; bulk erase (ERASE only) clears every
// byte; the erase engine's busy time equals the number of bytes erased.
module tb_hc11_eeprom;

  localparam int SIZE = 512;
  localparam int ROW  = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ph1clk, ph2clk, eclk, as_out, e_fall_en, ph2_rise_en, e_rise_en, ph2_fall_en;
  logic [1:0] phase;
  hc11_clock_divider u_clk (.clk, .rst_n, .ph1clk, .ph2clk, .eclk, .as_out, .phase,
                            .e_fall_en, .ph2_rise_en, .e_rise_en, .ph2_fall_en);

  logic        cs = 1'b0, rw = 1'b1, busy;
  logic [15:0] addr = '0;
  logic [7:0]  wdata = '0, pprog = '0, data_out;

  hc11_eeprom u_dut (.clk, .rst_n, .e_rise_en, .e_fall_en, .as_in(as_out), .cs_in(cs),
                     .rw_in(rw), .addr_in(addr), .prog_reg(pprog), .data_in(wdata),
                     .data_out, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus(input logic r, input logic [15:0] a, input logic [7:0] d, output logic [7:0] q);
    cs = 1'b1; rw = r; addr = a; wdata = d;
    @(posedge clk iff e_rise_en);
    #1;
    q = data_out;
    @(posedge clk iff e_fall_en);
    #1;
    cs = 1'b0;
  endtask

  logic [7:0] model [SIZE];

  task automatic wait_idle(output int clocks);
    clocks = 0;
    while (busy) begin
      @(posedge clk);
      #1;
      clocks++;
    end
    // realign with the start of a bus cycle
    @(posedge clk iff e_fall_en);
    #1;
  endtask

  task automatic read_all(input string what);
    logic [7:0] q;
    int bad;
    bad = 0;
    for (int i = 0; i < SIZE; i++) begin
      bus(1'b1, 16'(16'hB600 + i), 8'h00, q);
      if (q != model[i]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d bytes differ", what, bad));
  endtask

  initial begin
    logic [7:0] q;
    int clocks;
    for (int i = 0; i < SIZE; i++) model[i] = 8'hFF;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk iff e_fall_en);
    #1;
    read_all("array starts erased");
    // writes with programming disabled
    pprog = 8'h00;
    for (int i = 0; i < 16; i++) bus(1'b0, 16'(16'hB600 + i), 8'h00, q);
    read_all("writes ignored without EEPGM/EELAT");
    // byte programming
    for (int i = 0; i < SIZE; i++) begin
      pprog = ($urandom_range(0, 1) == 0) ? 8'h01 : 8'h02;
      model[i] = 8'($urandom);
      bus(1'b0, 16'(16'hB600 + i), model[i], q);
    end
    pprog = 8'h00;
    read_all("byte programming");
    // byte erase
    pprog = 8'h16;
    bus(1'b0, 16'hB600 + 16'd37, 8'h00, q);
    wait_idle(clocks);
    check(clocks <= 1, "byte erase takes one clock");
    model[37] = 8'hFF;
    pprog = 8'h00;
    read_all("byte erase");
    // row erase
    pprog = 8'h0E;
    bus(1'b0, 16'hB600 + 16'd101, 8'h00, q);
    wait_idle(clocks);
    for (int i = 0; i < ROW; i++) model[(101 / ROW) * ROW + i] = 8'hFF;
    pprog = 8'h00;
    read_all("row erase");
    // erase with programming disabled does nothing
    pprog = 8'h04;
    bus(1'b0, 16'hB600, 8'h00, q);
    check(busy == 1'b0, "no erase without EEPGM/EELAT");
    read_all("erase ignored without EEPGM/EELAT");
    // bulk erase
    pprog = 8'h06;
    bus(1'b0, 16'hB700, 8'h00, q);
    wait_idle(clocks);
    check(clocks >= SIZE - 8 && clocks <= SIZE, $sformatf("bulk erase busy for %0d clocks", clocks));
    for (int i = 0; i < SIZE; i++) model[i] = 8'hFF;
    pprog = 8'h00;
    read_all("bulk erase");
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
