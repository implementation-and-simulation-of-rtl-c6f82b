// tb_hc11_ram: self-checking test of the RAM.
//
// Drives the RAM with real bus timing from the clock generator: the address
// is presented after an E falling edge, latched by the address strobe, read
// data is taken at the end of the bus cycle, writes land at the E falling
// edge. Writes random bytes to every location, reads them all back (and again
// in random order after random overwrites), and checks that the output is
// $00 when the RAM is not selected or written, and that read data appears at
// the E rising edge of the bus cycle.
module tb_hc11_ram;

  localparam int SIZE = 512;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ph1clk, ph2clk, eclk, as_out, e_fall_en, ph2_rise_en, e_rise_en, ph2_fall_en;
  logic [1:0] phase;
  hc11_clock_divider u_clk (.clk, .rst_n, .ph1clk, .ph2clk, .eclk, .as_out, .phase,
                            .e_fall_en, .ph2_rise_en, .e_rise_en, .ph2_fall_en);

  logic        cs = 1'b0, rw = 1'b1;
  logic [15:0] addr = '0;
  logic [7:0]  wdata = '0, data_out;

  hc11_ram #(.SIZE(SIZE)) u_dut (.clk, .e_rise_en, .e_fall_en, .as_in(as_out), .cs_in(cs),
                                 .rw_in(rw), .addr_in(addr), .data_in(wdata), .data_out);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one bus cycle; returns the byte on data_out at the end of the cycle
  task automatic bus(input logic sel, input logic r, input logic [15:0] a,
                     input logic [7:0] d, output logic [7:0] q);
    cs = sel; rw = r; addr = a; wdata = d;
    @(posedge clk iff e_rise_en);
    #1;
    q = data_out;
    @(posedge clk iff e_fall_en);
    #1;
  endtask

  logic [7:0] model [SIZE];

  initial begin
    logic [7:0] q;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk iff e_fall_en);
    #1;
    for (int i = 0; i < SIZE; i++) begin
      model[i] = 8'($urandom);
      bus(1'b1, 1'b0, 16'(i), model[i], q);
      check(q == 8'h00, "output is $00 in a write cycle");
    end
    for (int i = 0; i < SIZE; i++) begin
      bus(1'b1, 1'b1, 16'(i), 8'h00, q);
      check(q == model[i], $sformatf("read %h: %h, expected %h", i, q, model[i]));
    end
    for (int i = 0; i < 600; i++) begin
      int a;
      a = $urandom_range(0, SIZE - 1);
      if ($urandom_range(0, 1) == 0) begin
        model[a] = 8'($urandom);
        bus(1'b1, 1'b0, 16'(a), model[a], q);
      end else begin
        bus(1'b1, 1'b1, 16'(a), 8'h00, q);
        check(q == model[a], $sformatf("random read %h", a));
      end
    end
    // not selected: no write, output $00
    bus(1'b0, 1'b0, 16'h0005, ~model[5], q);
    bus(1'b0, 1'b1, 16'h0005, 8'h00, q);
    check(q == 8'h00, "output $00 when not selected");
    bus(1'b1, 1'b1, 16'h0005, 8'h00, q);
    check(q == model[5], "write without chip select ignored");
    // latency: data appears at the E rising edge, not before
    cs = 1'b1; rw = 1'b1; addr = 16'h0007;
    @(posedge clk iff ph2_fall_en);
    #1;
    check(data_out == model[7], "read data valid after the E rising edge");
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
