// hc11_ram: 512-byte static RAM.
//
// Synchronous to the E clock as the design describes: the address is latched
// while the address strobe as_in is high; with cs_in active, a write cycle
// (rw_in = 0) stores data_in at the E falling edge (e_fall_en), and a read
// cycle (rw_in = 1) puts the addressed byte on data_out from the E rising edge
// (e_rise_en). data_out is $00 when the RAM is not read, in place of the high
// impedance of the design's bidirectional data port: the on-chip data bus is
// formed by OR-ing the devices' outputs. Only the low address bits index the
// array; which 4 KB page the RAM sits in is decoded by the address bus
// controller. The array starts cleared.
module hc11_ram #(
  parameter int SIZE = 512
) (
  input  logic        clk,
  input  logic        e_rise_en,
  input  logic        e_fall_en,
  input  logic        as_in,
  input  logic        cs_in,
  input  logic        rw_in,
  input  logic [15:0] addr_in,
  input  logic [7:0]  data_in,
  output logic [7:0]  data_out
);

  localparam int AW = $clog2(SIZE);

  logic [7:0]  mem [SIZE];
  logic [15:0] addr_q;

  initial begin
    for (int i = 0; i < SIZE; i++) mem[i] = 8'h00;
  end

  always_ff @(posedge clk) begin
    if (as_in) addr_q <= addr_in;
    if (e_fall_en && cs_in && !rw_in) mem[addr_q[AW-1:0]] <= data_in;
    if (e_rise_en) data_out <= (cs_in && rw_in) ? mem[addr_q[AW-1:0]] : 8'h00;
  end

endmodule
