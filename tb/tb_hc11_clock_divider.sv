// tb_hc11_clock_divider: self-checking test of the clock generator.
//
// Runs the divider from reset and checks, over many bus cycles:
//   - E, PH2 and PH1 have a period of four input clocks; E lags PH2 by one
//     input clock; PH1 is the inverse of PH2;
//   - each of the four enables is high exactly once per four clocks, in the
//     order E fall, PH2 rise, E rise, PH2 fall, and the enable for an edge is
//     high in the clock cycle that ends with that edge of E / PH2;
//   - AS is high for one input clock per bus cycle, covering the PH2 rising
//     edge, and never while E is high;
//   - the first edge after reset is an E falling edge.
module tb_hc11_clock_divider;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ph1clk, ph2clk, eclk, as_out, e_fall_en, ph2_rise_en, e_rise_en, ph2_fall_en;
  logic [1:0] phase;

  hc11_clock_divider u_dut (.clk, .rst_n, .ph1clk, .ph2clk, .eclk, .as_out, .phase,
                            .e_fall_en, .ph2_rise_en, .e_rise_en, .ph2_fall_en);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int n_efall = 0, n_as_hi = 0;

  initial begin
    logic e_prev, ph2_prev;
    logic en_e_fall, en_ph2_rise, en_e_rise, en_ph2_fall;
    repeat (3) @(negedge clk);
    check(eclk == 1'b1 && ph2clk == 1'b0, "reset state is internal cycle 4 (E high, PH2 low)");
    check(e_fall_en == 1'b1, "first enable after reset is the E falling edge");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      #1;
      e_prev = eclk; ph2_prev = ph2clk;
      en_e_fall = e_fall_en; en_ph2_rise = ph2_rise_en; en_e_rise = e_rise_en; en_ph2_fall = ph2_fall_en;
      check($countones({e_fall_en, ph2_rise_en, e_rise_en, ph2_fall_en}) == 1,
            "exactly one enable per input clock");
      check(ph1clk == !ph2clk, "PH1 is the inverse of PH2");
      check(!(as_out && eclk), "AS never high while E is high");
      if (as_out) n_as_hi++;
      @(posedge clk);
      #1;
      check(en_e_fall   == (e_prev && !eclk),    "e_fall_en marks the E falling edge");
      check(en_e_rise   == (!e_prev && eclk),    "e_rise_en marks the E rising edge");
      check(en_ph2_rise == (!ph2_prev && ph2clk), "ph2_rise_en marks the PH2 rising edge");
      check(en_ph2_fall == (ph2_prev && !ph2clk), "ph2_fall_en marks the PH2 falling edge");
      if (en_e_fall) n_efall++;
    end
    check(n_efall == 100, $sformatf("100 E cycles in 400 input clocks, got %0d", n_efall));
    check(n_as_hi == 100, $sformatf("AS high once per E cycle, got %0d", n_as_hi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // AS must be high at the PH2 rising edge (the only clock edge it covers)
  always @(posedge clk) begin
    if (rst_n && ph2_rise_en) check(as_out == 1'b1, "AS high at the PH2 rising edge");
    if (rst_n && (e_rise_en || e_fall_en || ph2_fall_en)) check(as_out == 1'b0, "AS low at other edges");
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
