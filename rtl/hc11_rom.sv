// hc11_rom: 12 KB program ROM at $D000-$FFFF.
//
// Synchronous to the E clock as the design describes: the address is latched
// while the address strobe as_in is high (one external clock edge per bus
// cycle), and the addressed byte is put on data_out at the E rising edge
// (e_rise_en) if cs_in is active; otherwise data_out is $00 so that the
// on-chip data bus can be formed by OR-ing the devices' outputs.
//
// The design loads its ROM image from a file for simulation. Here the image is
// written through the load port (load_we / load_addr / load_data, one byte per
// external clock), which a testbench or a boot loader uses while the CPU is
// held in reset; this port is this implementation's choice. The array starts
// cleared.
module hc11_rom #(
  parameter int          SIZE = 12288,
  parameter logic [15:0] BASE = 16'hD000
) (
  input  logic                    clk,
  input  logic                    e_rise_en,
  input  logic                    as_in,
  input  logic                    cs_in,
  input  logic [15:0]             addr_in,
  output logic [7:0]              data_out,
  input  logic                    load_we,
  input  logic [$clog2(SIZE)-1:0] load_addr,
  input  logic [7:0]              load_data
);

  localparam int AW = $clog2(SIZE);

  logic [7:0]    mem [SIZE];
  logic [15:0]   addr_q;
  logic [AW-1:0] idx;

  initial begin
    for (int i = 0; i < SIZE; i++) mem[i] = 8'h00;
  end

  assign idx = AW'(addr_q - BASE);

  always_ff @(posedge clk) begin
    if (as_in) addr_q <= addr_in;
    if (load_we) mem[load_addr] <= load_data;
    if (e_rise_en) data_out <= cs_in ? mem[idx] : 8'h00;
  end

endmodule
