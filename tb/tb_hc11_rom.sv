// tb_hc11_rom: self-checking test of the program ROM.
//
// Loads random bytes into every ROM location through the load port, then reads
// the whole ROM ($D000-$FFFF) back with real bus timing from the clock
// generator, as the design's own ROM test does, and checks that the output is
// $00 when the ROM is not selected and that data appears at the E rising edge.
module tb_hc11_rom;

  localparam int SIZE = 12288;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ph1clk, ph2clk, eclk, as_out, e_fall_en, ph2_rise_en, e_rise_en, ph2_fall_en;
  logic [1:0] phase;
  hc11_clock_divider u_clk (.clk, .rst_n, .ph1clk, .ph2clk, .eclk, .as_out, .phase,
                            .e_fall_en, .ph2_rise_en, .e_rise_en, .ph2_fall_en);

  logic        cs = 1'b0;
  logic [15:0] addr = '0;
  logic [7:0]  data_out;
  logic        load_we = 1'b0;
  logic [13:0] load_addr = '0;
  logic [7:0]  load_data = '0;

  hc11_rom u_dut (.clk, .e_rise_en, .as_in(as_out), .cs_in(cs), .addr_in(addr),
                  .data_out, .load_we, .load_addr, .load_data);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus(input logic sel, input logic [15:0] a, output logic [7:0] q);
    cs = sel; addr = a;
    @(posedge clk iff e_rise_en);
    #1;
    q = data_out;
    @(posedge clk iff e_fall_en);
    #1;
  endtask

  logic [7:0] model [SIZE];

  initial begin
    logic [7:0] q;
    for (int i = 0; i < SIZE; i++) begin
      model[i] = 8'($urandom);
      @(negedge clk);
      load_we = 1'b1; load_addr = 14'(i); load_data = model[i];
    end
    @(negedge clk);
    load_we = 1'b0;
    rst_n = 1'b1;
    @(posedge clk iff e_fall_en);
    #1;
    for (int i = 0; i < SIZE; i++) begin
      bus(1'b1, 16'(16'hD000 + i), q);
      check(q == model[i], $sformatf("read %h: %h, expected %h", 16'hD000 + i, q, model[i]));
    end
    bus(1'b0, 16'hD010, q);
    check(q == 8'h00, "output $00 when not selected");
    cs = 1'b1; addr = 16'hFFFE;
    @(posedge clk iff ph2_fall_en);
    #1;
    check(data_out == model[SIZE - 2], "read data valid after the E rising edge");
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
