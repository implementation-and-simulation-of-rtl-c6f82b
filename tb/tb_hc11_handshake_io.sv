// tb_hc11_handshake_io: self-checking test of ports B and C with the STRA/STRB
// handshake.
//
// The testbench makes the E falling-edge and PH2 rising-edge enables of a
// four-clock E cycle and drives the register bus one E cycle per access.
// Checks:
//   - PORTB drives port B; PORTC drives only the DDRC outputs and reads the
//     pins elsewhere;
//   - simple strobe mode: a PORTB write gives an STRB pulse of exactly two E
//     cycles (8 clocks); a rising STRA edge latches port C into PORTCL, sets
//     STAF and, with STAI, the interrupt request; a falling edge does not;
//     STAF clears after a PIOC read followed by a PORTCL read;
//   - full-input handshake: STRA negates STRB, a PORTCL read asserts it again;
//   - full-output handshake: a PORTCL write drives port C and asserts STRB,
//     STRA negates it and sets STAF; with PLS=1 the port C pins are driven
//     while STRA is at its active level;
//   - INVB=0 inverts STRB;
//   - expanded mode: port B shows A15..A8, port C shows A7..A0 while E is low
//     and the write data (driven) or nothing (input) while E is high, STRB is
//     R/W; leaving expanded mode gives the port registers back to the pins.
module tb_hc11_handshake_io;
  import hc11_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] ediv = 2'd0;
  logic       e_fall_en, ph2_rise_en;
  always @(posedge clk) ediv <= ediv + 2'd1;
  assign e_fall_en   = (ediv == 2'd3);
  assign ph2_rise_en = (ediv == 2'd0);

  logic       cs = 1'b0, rw = 1'b1;
  logic [5:0] offset = '0;
  logic [7:0] wdata = '0, rdata, pc_in = '0, pc_out, pc_oe, pb_out;
  logic       hit, stra = 1'b0, strb, irq;
  logic       expanded = 1'b0, eclk = 1'b0;
  logic [15:0] bus_addr = '0;

  hc11_handshake_io u_dut (.clk, .rst_n, .e_fall_en, .ph2_rise_en, .cs, .rw, .offset,
                           .wdata, .rdata, .hit, .pc_in, .pc_out, .pc_oe, .pb_out, .stra,
                           .strb, .irq, .expanded, .eclk, .bus_addr);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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
  task automatic strobe(input logic level);
    stra = level;
    idle(2);
  endtask

  // STRB high-time measurement in clocks
  int strb_hi = 0, strb_last = 0;
  always @(posedge clk) begin
    if (rst_n && strb) strb_hi++;
    else if (strb_hi != 0) begin
      strb_last = strb_hi;
      strb_hi   = 0;
    end
  end

  initial begin
    logic [7:0] q;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    idle(2);
    rd(R_PIOC, q);
    check(q == 8'h03 && strb == 1'b0, "PIOC reset value and STRB idle");

    // ports B and C
    wr(R_PORTB, 8'h5A);
    check(pb_out == 8'h5A, "PORTB drives port B");
    idle(4);
    check(strb_last == 8, $sformatf("STRB pulse after a PORTB write lasted %0d clocks", strb_last));
    wr(R_DDRC, 8'h0F);
    wr(R_PORTC, 8'hA5);
    pc_in = 8'h96;
    idle(1);
    check(pc_oe == 8'h0F && pc_out[3:0] == 4'h5, "PORTC drives the DDRC outputs");
    rd(R_PORTC, q);
    check(q == 8'h95, $sformatf("PORTC reads %h, expected 95", q));
    wr(R_DDRC, 8'h00);

    // simple strobe: STRA rising edge latches port C
    wr(R_PIOC, 8'h43);                          // STAI, EGA, INVB
    pc_in = 8'h3C;
    strobe(1'b1);
    pc_in = 8'hFF;
    rd(R_PIOC, q);
    check(q[7] && irq, "STAF and the interrupt request after a rising STRA");
    rd(R_PORTCL, q);
    check(q == 8'h3C, $sformatf("PORTCL latched %h", q));
    rd(R_PIOC, q);
    check(!q[7] && !irq, "STAF cleared by PIOC then PORTCL reads");
    strobe(1'b0);
    rd(R_PIOC, q);
    check(!q[7], "falling STRA ignored with EGA=1");
    // reading PORTCL without the PIOC read first does not clear STAF
    strobe(1'b1);
    rd(R_PORTCL, q);
    rd(R_PIOC, q);
    check(q[7], "STAF kept without the PIOC read");
    rd(R_PORTCL, q);
    strobe(1'b0);

    // full-input handshake, level mode
    wr(R_PIOC, 8'h13);                          // HNDS, EGA, INVB
    rd(R_PORTCL, q);
    check(strb == 1'b1, "STRB asserted (ready) after a PORTCL read");
    pc_in = 8'h81;
    strobe(1'b1);
    check(strb == 1'b0, "STRA negates STRB in full-input handshake");
    rd(R_PIOC, q);
    rd(R_PORTCL, q);
    check(q == 8'h81 && strb == 1'b1, "PORTCL read returns the data and re-asserts STRB");
    strobe(1'b0);

    // full-output handshake with three-state port C (PLS=1)
    wr(R_PIOC, 8'h1F);                          // HNDS, OIN, PLS, EGA, INVB
    rd(R_PIOC, q);
    check(pc_oe == 8'h00, "port C floats while STRA is inactive");
    wr(R_PORTCL, 8'h66);
    check(pc_out == 8'h66, "PORTCL write drives the port C latch");
    check(strb == 1'b1, "STRB asserted by the PORTCL write");
    stra = 1'b1;
    idle(2);
    check(pc_oe == 8'hFF, "port C driven while STRA is active");
    rd(R_PIOC, q);
    check(q[7], "STAF set by STRA in full-output handshake");
    strobe(1'b0);

    // inverted STRB
    wr(R_PIOC, 8'h02);
    check(strb == 1'b1, "STRB idles high with INVB=0");
    wr(R_PORTB, 8'h00);
    check(strb == 1'b0, "STRB pulses low with INVB=0");
    idle(4);
    check(strb == 1'b1, "STRB returns high after the low pulse");

    // expanded mode
    wr(R_PORTB, 8'h6B);
    @(negedge clk);
    expanded = 1'b1;
    for (int i = 0; i < 40; i++) begin
      logic [15:0] a;
      logic [7:0]  d;
      logic        w;
      a = 16'($urandom);
      d = 8'($urandom);
      w = 1'($urandom);
      bus_addr = a; wdata = d; rw = !w;
      eclk = 1'b0;
      #1;
      check(pb_out == a[15:8] && pc_out == a[7:0] && pc_oe == 8'hFF && strb == !w,
            $sformatf("address phase %h: PB=%h PC=%h oe=%h strb=%b", a, pb_out, pc_out, pc_oe, strb));
      eclk = 1'b1;
      #1;
      check(pb_out == a[15:8] && pc_oe == (w ? 8'hFF : 8'h00) && (!w || pc_out == d),
            $sformatf("data phase %h w=%b: PC=%h oe=%h", a, w, pc_out, pc_oe));
    end
    rw = 1'b1; eclk = 1'b0; expanded = 1'b0;
    #1;
    check(pb_out == 8'h6B, "single-chip mode gives PORTB back to port B");

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
