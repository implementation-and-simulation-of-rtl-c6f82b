// hc11_clock_divider: internal clock generator of the microcontroller.
//
// Divides the external (XTAL) clock by four. A two-bit phase counter steps
// through the four internal cycles of one bus (E-clock) cycle:
//   cycle 1: E low,  PH2 low   (starts at the falling edge of E)
//   cycle 2: E low,  PH2 high  (starts at the rising edge of PH2)
//   cycle 3: E high, PH2 high  (starts at the rising edge of E)
//   cycle 4: E high, PH2 low   (starts at the falling edge of PH2)
// PH1 is the inverse of PH2, E lags PH2 by 90 degrees, and AS rises half an
// external clock period after E falls and stays high for one external period
// (it is the only signal clocked on the falling external edge). All of that
// follows the clock description of the design.
//
// This implementation's own choice: the rest of the chip does not use PH2, E
// and AS as clocks. It runs on the external clock and uses the one-cycle
// enables below, each high in the external clock cycle that ends with the
// named edge, so the whole design is a single clock domain.
//   e_fall_en   : next edge starts internal cycle 1
//   ph2_rise_en : next edge starts internal cycle 2
//   e_rise_en   : next edge starts internal cycle 3
//   ph2_fall_en : next edge starts internal cycle 4
// After reset the first rising edge is an E falling edge.
module hc11_clock_divider (
  input  logic       clk,          // external clock
  input  logic       rst_n,        // asynchronous reset, active low
  output logic       ph1clk,
  output logic       ph2clk,
  output logic       eclk,
  output logic       as_out,       // address strobe
  output logic [1:0] phase,        // 0..3 = internal cycle 1..4
  output logic       e_fall_en,
  output logic       ph2_rise_en,
  output logic       e_rise_en,
  output logic       ph2_fall_en
);

  logic [1:0] ph_q;
  logic       as_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph_q <= 2'd3;
    else        ph_q <= ph_q + 2'd1;
  end

  // AS: high from the middle of internal cycle 1 to the middle of cycle 2
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) as_q <= 1'b0;
    else        as_q <= (ph_q == 2'd0);
  end

  assign phase       = ph_q;
  assign ph2clk      = (ph_q == 2'd1) || (ph_q == 2'd2);
  assign ph1clk      = ~ph2clk;
  assign eclk        = ph_q[1];
  assign as_out      = as_q;
  assign e_fall_en   = (ph_q == 2'd3);
  assign ph2_rise_en = (ph_q == 2'd0);
  assign e_rise_en   = (ph_q == 2'd1);
  assign ph2_fall_en = (ph_q == 2'd2);

endmodule
