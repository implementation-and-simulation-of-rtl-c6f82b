// tb_hc11_serial: self-checking test of the serial communications block.
//
// The testbench makes one E falling-edge enable every four clocks and drives
// the register bus one E cycle per access. TxD (PD1) is looped back to RxD
// (PD0) and MOSI (PD3) to MISO (PD2), unless the testbench drives RxD itself.
// Checks:
//   - port D as plain I/O through DDRD;
//   - SCI at BAUD=$00: a bit lasts 16 E cycles on TxD; bytes sent through the
//     loop come back in SCDR with RDRF; TDRE and TC behave; a second frame
//     before SCDR is read sets OR; RDRF clears after reading SCSR then SCDR;
//   - a frame with a 0 stop bit driven by the testbench sets FE;
//   - SPI master at E/2: a transfer takes 16 E cycles, the looped-back byte
//     is read from SPDR, SPIF is set and cleared, WCOL on a write during a
//     transfer, MODF when SS goes low with DDRD5=0.
module tb_hc11_serial;
  import hc11_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] ediv = 2'd0;
  logic       e_fall_en;
  always @(posedge clk) ediv <= ediv + 2'd1;
  assign e_fall_en = (ediv == 2'd3);

  logic       cs = 1'b0, rw = 1'b1;
  logic [5:0] offset = '0;
  logic [7:0] wdata = '0, rdata;
  logic       hit, sci_irq, spi_irq;
  logic [5:0] pd_in, pd_out, pd_oe;
  logic       tb_drive_rx = 1'b0, tb_rx = 1'b1, ss_pin = 1'b1;
  logic [1:0] pd_gpio = 2'b00;

  assign pd_in = {ss_pin, pd_gpio[1], pd_gpio[0], pd_out[3], 1'b1,
                  tb_drive_rx ? tb_rx : (pd_oe[1] ? pd_out[1] : 1'b1)};

  hc11_serial u_dut (.clk, .rst_n, .e_fall_en, .cs, .rw, .offset, .wdata, .rdata, .hit,
                     .pd_in, .pd_out, .pd_oe, .sci_irq, .spi_irq);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int ecyc = 0;
  always @(posedge clk) if (rst_n && e_fall_en) ecyc++;

  task automatic bus(input logic w, input logic [5:0] off, input logic [7:0] d,
                     output logic [7:0] q);
    cs = 1'b1; rw = !w; offset = off; wdata = d;
    @(negedge clk iff e_fall_en);
    q = rdata;
    @(posedge clk);
    #1;
    cs = 1'b0; rw = 1'b1;
  endtask
  task automatic wr(input logic [5:0] off, input logic [7:0] d);
    logic [7:0] q;
    bus(1'b1, off, d, q);
  endtask
  task automatic rd(input logic [5:0] off, output logic [7:0] q);
    bus(1'b0, off, 8'h00, q);
  endtask
  task automatic idle(input int n);
    repeat (n) begin
      @(negedge clk iff e_fall_en);
      @(posedge clk);
      #1;
    end
  endtask
  task automatic poll(input logic [5:0] off, input logic [7:0] mask, output int n);
    logic [7:0] q;
    n = 0;
    do begin
      rd(off, q);
      n++;
    end while ((q & mask) == 8'h00 && n < 5000);
  endtask

  initial begin
    logic [7:0] q;
    int n, t0, t1;
    time s0, s1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    idle(2);

    // port D as I/O
    wr(R_DDRD, 8'h3A);
    wr(R_PORTD, 8'h2A);
    check(pd_oe == 6'h3A && (pd_out & pd_oe) == 6'h2A, "PORTD drives the DDRD outputs");
    pd_gpio = 2'b11;
    rd(R_PORTD, q);
    check(q[5:0] == 6'h2F, $sformatf("PORTD reads inputs and latches: %h", q));
    wr(R_DDRD, 8'h00);
    pd_gpio = 2'b00;

    // SCI: enable, wait for the preamble, send one byte and time its start bit
    wr(R_BAUD, 8'h00);
    wr(R_SCCR2, 8'h0C);
    rd(R_SCSR, q);
    check(q[7] == 1'b1, "TDRE set after reset");
    poll(R_SCSR, 8'h40, n);                     // TC after the preamble
    wr(R_SCDR, 8'hA5);
    rd(R_SCSR, q);
    check(q[6] == 1'b0, "TC cleared by the SCDR write");
    @(negedge pd_out[1]);
    s0 = $time;
    @(posedge pd_out[1]);
    s1 = $time;
    check(s1 - s0 == 16 * 4 * 10, $sformatf("start bit lasts %0t, expected 640 ns", s1 - s0));
    poll(R_SCSR, 8'h20, n);
    rd(R_SCSR, q);
    check(q[5] && !q[3] && !q[1], "RDRF set without OR or FE");
    rd(R_SCDR, q);
    check(q == 8'hA5, $sformatf("SCDR received %h", q));
    rd(R_SCSR, q);
    check(!q[5], "RDRF cleared by reading SCSR then SCDR");
    poll(R_SCSR, 8'h40, n);
    check(n < 5000, "TC set when the frame is done");

    // a run of random bytes through the loop
    for (int i = 0; i < 8; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      wr(R_SCDR, b);
      poll(R_SCSR, 8'h20, n);
      rd(R_SCSR, q);
      rd(R_SCDR, q);
      check(q == b, $sformatf("byte %0d: sent %h, received %h", i, b, q));
    end

    // two frames without reading: overrun
    wr(R_SCDR, 8'h11);
    poll(R_SCSR, 8'h80, n);
    wr(R_SCDR, 8'h22);
    poll(R_SCSR, 8'h40, n);
    idle(40);
    rd(R_SCSR, q);
    check(q[5] && q[3], $sformatf("OR set by a second frame: SCSR %h", q));
    rd(R_SCDR, q);
    check(q == 8'h11, "the first byte is kept on overrun");
    wr(R_SCCR2, 8'h00);

    // framing error: the testbench sends $55 with a 0 stop bit
    wr(R_SCCR2, 8'h04);
    tb_drive_rx = 1'b1;
    repeat (64) @(negedge clk);
    begin
      logic [9:0] fr;
      fr = {1'b0, 8'h55, 1'b0};                 // stop(0), data, start
      for (int k = 0; k < 10; k++) begin
        tb_rx = fr[k];
        repeat (64) @(negedge clk);
      end
      tb_rx = 1'b1;
    end
    repeat (64) @(negedge clk);
    rd(R_SCSR, q);
    check(q[5] && q[1], $sformatf("FE set by a 0 stop bit: SCSR %h", q));
    rd(R_SCDR, q);
    check(q == 8'h55, "data of the bad frame");
    tb_drive_rx = 1'b0;
    wr(R_SCCR2, 8'h00);

    // SPI master at E/2 with MOSI looped to MISO
    wr(R_DDRD, 8'h38);
    wr(R_SPCR, 8'h50);                          // SPE, MSTR, CPOL=0, CPHA=0, E/2
    t0 = ecyc;
    wr(R_SPDR, 8'h3C);
    wr(R_SPDR, 8'hFF);                          // during the transfer: WCOL
    do rd(R_SPSR, q); while (!q[7]);
    t1 = ecyc;
    check(t1 - t0 >= 16 && t1 - t0 <= 18, $sformatf("SPI transfer took %0d E cycles", t1 - t0));
    check(q[6], "WCOL set by a write during the transfer");
    rd(R_SPDR, q);
    check(q == 8'h3C, $sformatf("SPI looped byte %h", q));
    rd(R_SPSR, q);
    check(q[7:6] == 2'b00, "SPIF and WCOL cleared");
    for (int i = 0; i < 4; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      wr(R_SPDR, b);
      do rd(R_SPSR, q); while (!q[7]);
      rd(R_SPDR, q);
      check(q == b, $sformatf("SPI byte %h came back as %h", b, q));
    end

    // mode fault
    wr(R_DDRD, 8'h18);
    ss_pin = 1'b0;
    idle(3);
    rd(R_SPSR, q);
    check(q[4], "MODF set by SS low on a master");
    rd(R_SPCR, q);
    check(q[6] == 1'b0 && q[4] == 1'b0, "MODF turned SPE and MSTR off");

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
