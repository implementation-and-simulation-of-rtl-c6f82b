// hc11_handshake_io: ports B and C with the STRA / STRB handshake subsystem.
//
// Registers in the $1000 block (offsets): PIOC $02, PORTC $03, PORTB $04,
// PORTCL $05, DDRC $07. PIOC bits: STAF(7) STAI(6) CWOM(5) HNDS(4) OIN(3) PLS(2)
// EGA(1) INVB(0), as on the M68HC11.
// The modes follow the design's handshake description:
//   simple strobe (HNDS=0): a write to PORTB pulses STRB for two E cycles; an
//     active STRA edge (EGA: 1 rising, 0 falling) latches the port C pins into
//     PORTCL and sets STAF.
//   full-input handshake (HNDS=1, OIN=0): an active STRA edge latches port C
//     into PORTCL, sets STAF and negates STRB ("not ready"); reading PORTCL
//     asserts STRB again (PLS=1: a two-E-cycle pulse; PLS=0: level until the
//     next STRA edge).
//   full-output handshake (HNDS=1, OIN=1): a write to PORTCL drives the data and
//     asserts STRB ("data ready"); the active STRA edge (data taken) negates STRB
//     and sets STAF. With PLS=1 (three-state variant) port C bits whose DDRC bit
//     is 0 are driven only while STRA is at its active level.
// STRB is active high when INVB=1. STAF is cleared by reading PIOC while it is
// set and then accessing PORTCL; STAF with STAI requests the IRQ interrupt.
// The STRA input is sampled every external clock and its edge acts at the next
// PH2 rising edge (ph2_rise_en), as the design synchronizes STAF and STRB.
// Register writes take effect at the E falling edge of the bus cycle.
// CWOM (wired-or) is stored but the port C pins are always push-pull here.
// Expanded mode (expanded = 1, from the mode pins): port B carries address bits
// A15..A8, port C the multiplexed A7..A0 (while E is low) and data bits D7..D0
// (while E is high; driven in a write cycle, an input in a read cycle), and
// STRB becomes the R/W line; AS is the chip's address-strobe output. The port
// registers keep working, but the pins no longer show them. This follows the
// pin tables of the design; the exact pin timing of the real part (address
// hold after AS, data set-up) is not modelled, as all pins change on the
// internal clock edges.
module hc11_handshake_io
  import hc11_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e_fall_en,
  input  logic       ph2_rise_en,
  // register bus
  input  logic       cs,
  input  logic       rw,
  input  logic [5:0] offset,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       hit,
  // pins
  input  logic [7:0] pc_in,
  output logic [7:0] pc_out,
  output logic [7:0] pc_oe,
  output logic [7:0] pb_out,
  input  logic       stra,
  output logic       strb,
  output logic       irq,
  // expanded mode
  input  logic       expanded,     // 1: normal expanded mode
  input  logic       eclk,         // E clock level: 0 address phase, 1 data phase
  input  logic [15:0] bus_addr     // address of the current bus cycle
);

  logic [7:0] pioc_q, portc_q, portb_q, portcl_q, ddrc_q;
  logic       stra_q, stra_d1;
  logic       edge_seen_q;
  logic       strb_act_q;      // STRB asserted (logical)
  logic [1:0] pulse_q;         // E cycles of STRB pulse left
  logic       staf_armed_q;    // PIOC read with STAF set
  logic       acc, wr, rd;
  logic       stra_edge;

  logic staf, stai, hnds, oin, pls, ega, invb;
  assign staf = pioc_q[7];
  assign stai = pioc_q[6];
  assign hnds = pioc_q[4];
  assign oin  = pioc_q[3];
  assign pls  = pioc_q[2];
  assign ega  = pioc_q[1];
  assign invb = pioc_q[0];

  assign acc = cs && e_fall_en;
  assign wr  = acc && !rw;
  assign rd  = acc && rw;

  // STRA sampling and edge detection
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stra_q      <= 1'b0;
      stra_d1     <= 1'b0;
      edge_seen_q <= 1'b0;
    end else begin
      stra_q  <= stra;
      stra_d1 <= stra_q;
      if (ph2_rise_en) edge_seen_q <= 1'b0;
      else if ((ega && stra_q && !stra_d1) || (!ega && !stra_q && stra_d1)) edge_seen_q <= 1'b1;
    end
  end
  assign stra_edge = ph2_rise_en && (edge_seen_q ||
                     (ega && stra_q && !stra_d1) || (!ega && !stra_q && stra_d1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pioc_q       <= 8'h03;
      portc_q      <= 8'h00;
      portb_q      <= 8'h00;
      portcl_q     <= 8'h00;
      ddrc_q       <= 8'h00;
      strb_act_q   <= 1'b0;
      pulse_q      <= 2'd0;
      staf_armed_q <= 1'b0;
    end else begin
      // STRA active edge
      if (stra_edge) begin
        pioc_q[7] <= 1'b1;
        if (!(hnds && oin)) portcl_q <= pc_in;
        if (hnds) begin
          strb_act_q <= 1'b0;
          pulse_q    <= 2'd0;
        end
      end
      if (e_fall_en && pulse_q != 2'd0) begin
        pulse_q <= pulse_q - 2'd1;
        if (pulse_q == 2'd1) strb_act_q <= 1'b0;
      end
      // register writes
      if (wr) begin
        unique case (offset)
          R_PIOC:  pioc_q[6:0] <= wdata[6:0];
          R_PORTC: portc_q <= wdata;
          R_PORTB: begin
            portb_q <= wdata;
            if (!hnds) begin strb_act_q <= 1'b1; pulse_q <= 2'd2; end
          end
          R_PORTCL: begin
            portc_q <= wdata;
            if (hnds && oin) begin strb_act_q <= 1'b1; pulse_q <= pls ? 2'd2 : 2'd0; end
          end
          R_DDRC:  ddrc_q <= wdata;
          default: ;
        endcase
      end
      // full-input handshake: reading PORTCL means "ready for more"
      if (rd && offset == R_PORTCL && hnds && !oin) begin
        strb_act_q <= 1'b1;
        pulse_q    <= pls ? 2'd2 : 2'd0;
      end
      // STAF clearing sequence
      if (acc && rw && offset == R_PIOC && staf) staf_armed_q <= 1'b1;
      if (acc && offset == R_PORTCL && staf_armed_q) begin
        staf_armed_q <= 1'b0;
        if (!stra_edge) pioc_q[7] <= 1'b0;
      end
    end
  end

  always_comb begin
    hit   = cs && (offset == R_PIOC || offset == R_PORTC || offset == R_PORTB ||
                   offset == R_PORTCL || offset == R_DDRC);
    rdata = 8'h00;
    if (cs) begin
      unique case (offset)
        R_PIOC:   rdata = pioc_q;
        R_PORTC:  rdata = (pc_in & ~ddrc_q) | (portc_q & ddrc_q);
        R_PORTB:  rdata = portb_q;
        R_PORTCL: rdata = portcl_q;
        R_DDRC:   rdata = ddrc_q;
        default:  rdata = 8'h00;
      endcase
    end
  end

  logic stra_active_level;
  assign stra_active_level = ega ? stra_q : !stra_q;

  // expanded mode: port B is A15..A8, port C carries A7..A0 while E is low and
  // the data while E is high (driven in a write cycle, read in a read cycle),
  // and STRB becomes R/W
  always_comb begin
    if (expanded) begin
      pb_out = bus_addr[15:8];
      pc_out = eclk ? wdata : bus_addr[7:0];
      pc_oe  = (!eclk || !rw) ? 8'hFF : 8'h00;
      strb   = rw;
    end else begin
      pb_out = portb_q;
      pc_out = portc_q;
      pc_oe  = ddrc_q | ((hnds && oin && pls && stra_active_level) ? 8'hFF : 8'h00);
      strb   = invb ? strb_act_q : !strb_act_q;
    end
  end
  assign irq    = staf && stai;

endmodule
