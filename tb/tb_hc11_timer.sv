// tb_hc11_timer: self-checking test of the timer block.
//
// The testbench makes one E falling-edge enable every four clocks and drives
// the register bus one E cycle per access. Checks:
//   - TCNT advances once per E cycle at prescale 1 and once per 16 at
//     prescale 16, and a TCNTH/TCNTL pair reads a consistent value;
//   - OC2 toggles PA6, sets OC2F on the exact count and raises its request;
//     OC1 drives PA3 through OC1M/OC1D; CFORC sets PA5 without a flag;
//   - IC1 on PA2 captures TCNT on the selected edge only;
//   - the real-time interrupt period is 8192 E cycles at RTR=0;
//   - the COP watchdog times out every 32768 E cycles at CR=0, and $55/$AA to
//     COPRST restarts it;
//   - the pulse accumulator counts PA7 rising edges, sets PAIF, and PAOVF on
//     wrap; flags clear when written with ones;
//   - TOF is set when TCNT wraps.
module tb_hc11_timer;
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
  logic [7:0] wdata = '0, rdata, pa_in = '0, pa_out, pa_oe;
  logic       hit, cop_enable = 1'b0, cop_timeout;
  logic [2:0] ic_irq;
  logic [4:0] oc_irq;
  logic       tof_irq, rti_irq, paov_irq, pai_irq;

  hc11_timer u_dut (.clk, .rst_n, .e_fall_en, .cs, .rw, .offset, .wdata, .rdata, .hit,
                    .pa_in, .pa_out, .pa_oe, .cop_enable, .cop_timeout, .ic_irq, .oc_irq,
                    .tof_irq, .rti_irq, .paov_irq, .pai_irq);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // E-cycle counter and event time stamps
  int ecyc = 0;
  int cop_t[$], rti_t[$];
  logic rti_d = 1'b0;
  always @(posedge clk) begin
    if (rst_n && cop_timeout) cop_t.push_back(ecyc);
  end
  always @(posedge clk) if (rst_n && e_fall_en) begin
    ecyc++;
    rti_d <= rti_irq;
    if (rti_irq && !rti_d) rti_t.push_back(ecyc);
  end

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
  task automatic rd_tcnt(output logic [15:0] t);
    logic [7:0] h, l;
    rd(R_TCNTH, h);
    rd(R_TCNTL, l);
    t = {h, l};
  endtask

  initial begin
    logic [15:0] t1, t2, t3;
    logic [7:0]  q;
    int n0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    idle(2);

    // TCNT at prescale 1
    rd_tcnt(t1);
    idle(98);
    rd_tcnt(t2);
    check(t2 - t1 == 16'd100, $sformatf("TCNT advanced %0d in 100 E cycles", t2 - t1));
    // consistent 16-bit read: TCNTL returns the low byte stored at the TCNTH read
    rd(R_TCNTH, q);
    idle(5);
    begin
      logic [7:0] l;
      rd(R_TCNTL, l);
      rd_tcnt(t3);
      check(t3 - {q, l} == 16'd7, "TCNTL read returns the byte buffered by the TCNTH read");
    end

    // output compare 2 toggles PA6
    check(pa_oe == 8'h78 && pa_out[6] == 1'b0, "port A directions after reset");
    wr(R_TCTL1, 8'h40);                         // OM2:OL2 = 01 toggle
    wr(R_TMSK1, 8'h40);                         // OC2I
    rd_tcnt(t1);
    t2 = t1 + 16'd40;
    wr(R_TOC1H + 6'd2, t2[15:8]);
    wr(R_TOC1H + 6'd3, t2[7:0]);
    n0 = ecyc;
    wait (oc_irq[1]);
    check(ecyc - n0 == 40 - 4, $sformatf("OC2 flag after %0d E cycles, expected 36", ecyc - n0));
    check(pa_out[6] == 1'b1, "OC2 toggled PA6 high");
    rd(R_TFLG1, q);
    check(q == 8'h40, $sformatf("TFLG1 = %h after OC2", q));
    wr(R_TFLG1, 8'h40);
    rd(R_TFLG1, q);
    check(q == 8'h00 && oc_irq == 5'd0, "OC2F cleared by writing a one");
    wr(R_TMSK1, 8'h00);

    // OC1 drives PA3 through OC1M/OC1D
    wr(R_OC1M, 8'h08);
    wr(R_OC1D, 8'h08);
    rd_tcnt(t1);
    t2 = t1 + 16'd20;
    wr(R_TOC1H, t2[15:8]);
    wr(R_TOC1H + 6'd1, t2[7:0]);
    check(pa_out[3] == 1'b0, "PA3 low before OC1");
    idle(25);
    rd(R_TFLG1, q);
    check(pa_out[3] == 1'b1 && q[7], "OC1 set PA3 and OC1F");
    wr(R_TFLG1, 8'hFF);

    // CFORC on OC3 with action 'set' drives PA5 without a flag
    wr(R_TCTL1, 8'h70);                         // OC2 toggle, OC3 set
    wr(R_CFORC, 8'h20);
    rd(R_TFLG1, q);
    check(pa_out[5] == 1'b1 && q == 8'h00, "CFORC forced PA5 high without a flag");
    rd(R_PORTA, q);
    check(q[6:3] == pa_out[6:3], "PORTA reads the output latches");

    // input capture 1 on PA2, rising edge only
    wr(R_TCTL2, 8'h10);
    pa_in[2] = 1'b1;
    idle(3);
    rd(R_TFLG1, q);
    check(q[2], "IC1F set by a rising edge on PA2");
    rd(R_TIC1H, t1[15:8]);
    rd(R_TIC1H + 6'd1, t1[7:0]);
    rd_tcnt(t2);
    check(t2 - t1 >= 16'd4 && t2 - t1 <= 16'd8, $sformatf("TIC1 = %h near TCNT %h", t1, t2));
    wr(R_TFLG1, 8'h04);
    pa_in[2] = 1'b0;
    idle(3);
    rd(R_TFLG1, q);
    check(!q[2], "falling edge ignored in rising-edge mode");

    // prescale 16
    wr(R_TMSK2, 8'h03);
    rd_tcnt(t1);
    idle(158);
    rd_tcnt(t2);
    check(t2 - t1 == 16'd10, $sformatf("TCNT advanced %0d in 160 E cycles at prescale 16", t2 - t1));
    wr(R_TMSK2, 8'h40);                         // prescale 1, RTII

    // real-time interrupt period
    wait (rti_t.size() == 1);
    wr(R_TFLG2, 8'h40);
    wait (rti_t.size() == 2);
    check(rti_t[1] - rti_t[0] == 8192, $sformatf("RTI period %0d E cycles", rti_t[1] - rti_t[0]));
    wr(R_TFLG2, 8'h40);
    wr(R_TMSK2, 8'h00);

    // pulse accumulator, event mode, rising edges on PA7
    wr(R_PACTL, 8'h50);                         // PAEN, PEDGE
    for (int i = 0; i < 5; i++) begin
      pa_in[7] = 1'b1; idle(2);
      pa_in[7] = 1'b0; idle(2);
    end
    rd(R_PACNT, q);
    check(q == 8'd5, $sformatf("PACNT = %0d after 5 rising edges", q));
    rd(R_TFLG2, q);
    check(q[4] && !q[5], "PAIF set, PAOVF clear");
    wr(R_PACNT, 8'hFF);
    pa_in[7] = 1'b1; idle(2); pa_in[7] = 1'b0; idle(2);
    rd(R_TFLG2, q);
    check(q[5], "PAOVF set when PACNT wraps");
    wr(R_TFLG2, 8'h30);
    rd(R_TFLG2, q);
    check(q[5:4] == 2'b00, "PAIF and PAOVF cleared");
    wr(R_PACTL, 8'h00);

    // COP watchdog: two free-running periods, then a restart
    cop_enable = 1'b1;
    n0 = ecyc;
    wait (cop_t.size() == 2);
    check(cop_t[1] - cop_t[0] == 32768, $sformatf("COP period %0d E cycles (%0d %0d %0d)", cop_t[1] - cop_t[0], n0, cop_t[0], cop_t[1]));
    idle(10000);
    wr(R_COPRST, 8'h55);
    wr(R_COPRST, 8'hAA);
    n0 = ecyc;
    wait (cop_t.size() == 3);
    check(cop_t[2] - n0 == 32768, $sformatf("COP timeout %0d E cycles after the restart", cop_t[2] - n0));
    cop_enable = 1'b0;

    // TOF when TCNT wraps
    rd(R_TFLG2, q);
    if (q[7]) wr(R_TFLG2, 8'h80);
    rd_tcnt(t1);
    idle(65536 - int'(t1) + 4);
    rd(R_TFLG2, q);
    check(q[7], "TOF set after TCNT wrapped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
