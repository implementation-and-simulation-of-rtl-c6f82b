// hc11_eeprom: 512-byte EEPROM at $B600-$B7FF.
//
// Reads work as in the RAM: address latched with as_in, data out at the E
// rising edge when cs_in is active in a read cycle, $00 otherwise.
// A write cycle to the EEPROM changes it only when programming is enabled by
// the PPROG register (prog_reg, from the address bus controller), as the
// design describes: with EEPGM (bit 0) or EELAT (bit 1) set, a write
//   - with ERASE (bit 2) clear programs the byte with the written data;
//   - with ERASE set erases: BYTE (bit 4) set erases the addressed byte, else
//     ROW (bit 3) set erases the row of ROW_BYTES bytes holding the address,
//     else the whole array (bulk erase).
// With both EEPGM and EELAT clear, writes are ignored.
// Erasing is done by an erase engine that clears one byte per external clock
// (busy is high meanwhile), so row and bulk erases take ROW_BYTES and SIZE
// clocks; the real part needs milliseconds of programming time, which is not
// modelled. Erased bytes read ERASED. The array starts erased.
module hc11_eeprom #(
  parameter int         SIZE      = 512,
  parameter int         ROW_BYTES = 2,
  parameter logic [7:0] ERASED    = 8'hFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        e_rise_en,
  input  logic        e_fall_en,
  input  logic        as_in,
  input  logic        cs_in,
  input  logic        rw_in,
  input  logic [15:0] addr_in,
  input  logic [7:0]  prog_reg,
  input  logic [7:0]  data_in,
  output logic [7:0]  data_out,
  output logic        busy
);

  localparam int AW = $clog2(SIZE);

  logic [7:0]    mem [SIZE];
  logic [15:0]   addr_q;
  logic [AW-1:0] er_ptr, er_last;
  logic          er_busy;
  logic          wr_cyc, prog_en;

  initial begin
    for (int i = 0; i < SIZE; i++) mem[i] = ERASED;
  end

  assign wr_cyc  = e_fall_en && cs_in && !rw_in;
  assign prog_en = prog_reg[0] || prog_reg[1];
  assign busy    = er_busy;

  always_ff @(posedge clk) begin
    if (as_in) addr_q <= addr_in;
    if (e_rise_en) data_out <= (cs_in && rw_in) ? mem[addr_q[AW-1:0]] : 8'h00;
    if (er_busy)
      mem[er_ptr] <= ERASED;
    else if (wr_cyc && prog_en && !prog_reg[2])
      mem[addr_q[AW-1:0]] <= data_in;
  end

  // erase engine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      er_busy <= 1'b0;
      er_ptr  <= '0;
      er_last <= '0;
    end else if (er_busy) begin
      if (er_ptr == er_last) er_busy <= 1'b0;
      else                   er_ptr  <= er_ptr + 1'b1;
    end else if (wr_cyc && prog_en && prog_reg[2]) begin
      er_busy <= 1'b1;
      if (prog_reg[4]) begin
        er_ptr  <= addr_q[AW-1:0];
        er_last <= addr_q[AW-1:0];
      end else if (prog_reg[3]) begin
        er_ptr  <= AW'((addr_q[AW-1:0] / AW'(ROW_BYTES)) * AW'(ROW_BYTES));
        er_last <= AW'((addr_q[AW-1:0] / AW'(ROW_BYTES)) * AW'(ROW_BYTES) + AW'(ROW_BYTES - 1));
      end else begin
        er_ptr  <= '0;
        er_last <= AW'(SIZE - 1);
      end
    end
  end

endmodule
