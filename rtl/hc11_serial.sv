// hc11_serial: serial communications block - the asynchronous SCI, the
// synchronous SPI and port D, which share the port D pins.
//
// Registers (offsets in the $1000 block): PORTD $08, DDRD $09, SPCR $28,
// SPSR $29, SPDR $2A, BAUD $2B, SCCR1 $2C, SCCR2 $2D, SCSR $2E, SCDR $2F, with
// the M68HC11 bit layouts. Register writes act on the E falling edge.
//
// SCI baud clock: a divider of the E clock gives the receiver's 16x sample
// tick every SCP x 2^SCR E cycles (BAUD SCP1:SCP0 selects 1, 3, 4 or 13,
// SCR2:SCR0 selects 2^0..2^7); one bit lasts 16 ticks, so the bit rate is
// E / (16 x SCP x 2^SCR).
// SCI transmitter (PD1/TxD): double-buffered. A write to SCDR fills the
// transmit data register and clears TDRE and TC; when the shifter is free the
// byte moves to it (TDRE set again) and goes out as start bit, 8 or 9 data bits
// (SCCR1 M, T8) LSB first and a stop bit. TC is set when the shifter finishes
// with nothing waiting. Setting TE queues one idle frame (all ones); SBK sends
// break frames (all zeros) while set.
// SCI receiver (PD0/RxD): 16x sampling. A start bit is a 0 sample after three
// 1 samples, confirmed when two of the samples RT3, RT5 and RT7 are 0. Each
// data and stop bit is the majority of samples RT8, RT9 and RT10 of its bit
// time; disagreement sets NF. A 0 stop bit sets FE. A complete frame sets RDRF
// and loads SCDR, or sets OR if RDRF is still set. IDLE is set after a frame's
// time of 1 samples following a reception. RWU puts the receiver to sleep: it
// wakes on an idle frame (WAKE=0) or on a frame whose last data bit is 1
// (address mark, WAKE=1). RDRF, OR, NF, FE and IDLE clear when SCSR is read and
// then SCDR is read.
// SPI (PD2 MISO, PD3 MOSI, PD4 SCK, PD5 SS): 8 bits MSB first, CPOL and CPHA as
// on the M68HC11. Master (MSTR=1): writing SPDR starts a transfer with SCK at
// E/2, E/4, E/16 or E/32 (SPR1:SPR0). Slave: SS low selects; SCK from the pin is
// sampled every input clock. At the end SPIF is set. Writing SPDR during a
// transfer sets WCOL; SS low on a master sets MODF and turns SPE and MSTR off.
// SPIF/WCOL clear on an SPSR read followed by an SPDR access, MODF on an SPSR
// read followed by an SPCR write.
// Port D: 6-bit I/O with DDRD; an enabled SCI or SPI function takes its pin.
// Interrupt requests: sci_irq = TIE&TDRE | TCIE&TC | RIE&(RDRF|OR) | ILIE&IDLE,
// spi_irq = SPIE&(SPIF|MODF).
// The split into these three functions, the 16x sampling receiver and the
// separate master and slave SPI logic follow the design; the bit-level rules
// are the M68HC11's. A write to SCDR clears TDRE and TC without needing an SCSR
// read first, which is a simplification.
module hc11_serial
  import hc11_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       e_fall_en,
  // register bus
  input  logic       cs,
  input  logic       rw,
  input  logic [5:0] offset,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       hit,
  // port D pins
  input  logic [5:0] pd_in,
  output logic [5:0] pd_out,
  output logic [5:0] pd_oe,
  // interrupt requests
  output logic       sci_irq,
  output logic       spi_irq
);

  logic acc, wr, rd;
  assign acc = cs && e_fall_en;
  assign wr  = acc && !rw;
  assign rd  = acc && rw;

  logic [5:0] portd_q;
  logic [6:0] sccr1_q;          // R8 (bit 7) is kept in r8_q
  logic [7:0] ddrd_q, baud_q, sccr2_q, spcr_q;

  // ---------------------------------------------------------------- baud tick
  logic [10:0] bd_q, bd_max;
  logic        tick16;
  always_comb begin
    logic [10:0] scp;
    unique case (baud_q[5:4])
      2'd0:    scp = 11'd1;
      2'd1:    scp = 11'd3;
      2'd2:    scp = 11'd4;
      default: scp = 11'd13;
    endcase
    bd_max = 11'((scp << baud_q[2:0]) - 11'd1);
  end
  assign tick16 = e_fall_en && (bd_q >= bd_max);

  logic te, re, rwu, sbk, m9, wake;
  assign te   = sccr2_q[3];
  assign re   = sccr2_q[2];
  assign rwu  = sccr2_q[1];
  assign sbk  = sccr2_q[0];
  assign m9   = sccr1_q[4];
  assign wake = sccr1_q[3];

  logic [3:0] frame_bits;
  assign frame_bits = m9 ? 4'd11 : 4'd10;

  // ---------------------------------------------------------------- transmitter
  logic [7:0]  tdr_q;
  logic        tdre_q, tc_q;
  logic [10:0] tx_sh_q;
  logic [3:0]  tx_left_q;     // bits still to send, including the current one
  logic [3:0]  tx_sub_q;
  logic        tx_busy_q;
  logic        te_d_q;
  logic        preamble_q;
  logic        txd;
  assign txd = tx_busy_q ? tx_sh_q[0] : 1'b1;

  // ---------------------------------------------------------------- receiver
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA} rx_state_e;
  rx_state_e   rx_st_q;
  logic [2:0]  rx_hist_q;
  logic [7:0]  rt_q;
  logic [1:0]  zeros_q;
  logic [1:0]  smp_q;
  logic [9:1]  rx_sh_q;        // received bits, first bit ends in [1]
  logic [7:0]  rdr_q;
  logic        r8_q;
  logic        rdrf_q, or_q, nf_q, fe_q, idle_q;
  logic        rx_noise_q;
  logic [7:0]  idle_cnt_q;
  logic        idle_arm_q;
  logic        sci_arm_q;
  logic        rxd;
  assign rxd = pd_in[0];

  // ---------------------------------------------------------------- SPI
  logic       spe, mstr, cpol, cpha;
  assign spe  = spcr_q[6];
  assign mstr = spcr_q[4];
  assign cpol = spcr_q[3];
  assign cpha = spcr_q[2];
  logic [7:0] spi_sh_q, spi_rx_q;
  logic       spi_in_q;
  logic [4:0] spi_edge_q;     // edges done in this transfer (0..16)
  logic       spi_busy_q;
  logic       sck_q;
  logic [3:0] spi_hp_q;
  logic       spif_q, wcol_q, modf_q;
  logic       spi_arm_q;
  logic       sck_in_q, sck_in_d;
  logic       ss_n;
  assign ss_n = pd_in[5];

  logic [3:0] spi_hp_max;
  always_comb begin
    unique case (spcr_q[1:0])
      2'd0:    spi_hp_max = 4'd0;
      2'd1:    spi_hp_max = 4'd1;
      2'd2:    spi_hp_max = 4'd7;
      default: spi_hp_max = 4'd15;
    endcase
  end

  // one SPI clock edge: leading edges are even-numbered
  logic spi_edge;
  logic slave_sel;
  assign slave_sel = spe && !mstr && !ss_n;
  always_comb begin
    if (spe && mstr)
      spi_edge = spi_busy_q && e_fall_en && (spi_hp_q >= spi_hp_max);
    else
      spi_edge = slave_sel && (sck_in_q != sck_in_d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      portd_q <= 6'h00; ddrd_q <= 8'h00; baud_q <= 8'h04;
      sccr1_q <= 7'h00; sccr2_q <= 8'h00; spcr_q <= 8'h04;
      bd_q    <= 11'd0;
      tdr_q   <= 8'h00; tdre_q <= 1'b1; tc_q <= 1'b1;
      tx_sh_q <= '1; tx_left_q <= 4'd0; tx_sub_q <= 4'd0; tx_busy_q <= 1'b0;
      te_d_q  <= 1'b0; preamble_q <= 1'b0;
      rx_st_q <= RX_IDLE; rx_hist_q <= 3'b000; rt_q <= 8'd0; zeros_q <= 2'd0;
      smp_q   <= 2'b00; rx_sh_q <= 9'd0; rdr_q <= 8'h00; r8_q <= 1'b0;
      rdrf_q  <= 1'b0; or_q <= 1'b0; nf_q <= 1'b0; fe_q <= 1'b0; idle_q <= 1'b0;
      rx_noise_q <= 1'b0; idle_cnt_q <= 8'd0; idle_arm_q <= 1'b0; sci_arm_q <= 1'b0;
      spi_sh_q <= 8'h00; spi_rx_q <= 8'h00; spi_in_q <= 1'b0; spi_edge_q <= 5'd0;
      spi_busy_q <= 1'b0; sck_q <= 1'b0; spi_hp_q <= 4'd0;
      spif_q <= 1'b0; wcol_q <= 1'b0; modf_q <= 1'b0; spi_arm_q <= 1'b0;
      sck_in_q <= 1'b0; sck_in_d <= 1'b0;
    end else begin
      if (e_fall_en) bd_q <= (bd_q >= bd_max) ? 11'd0 : bd_q + 11'd1;

      // ---------------- transmitter
      te_d_q <= te;
      if (te && !te_d_q) preamble_q <= 1'b1;
      if (tick16) begin
        if (tx_busy_q) begin
          if (tx_sub_q == 4'd15) begin
            tx_sub_q <= 4'd0;
            tx_sh_q  <= {1'b1, tx_sh_q[10:1]};
            if (tx_left_q == 4'd1) begin
              tx_busy_q <= 1'b0;
              if (tdre_q && !preamble_q && !sbk) tc_q <= 1'b1;
            end
            tx_left_q <= tx_left_q - 4'd1;
          end else begin
            tx_sub_q <= tx_sub_q + 4'd1;
          end
        end else if (te) begin
          if (preamble_q) begin
            preamble_q <= 1'b0;
            tx_sh_q    <= '1;
            tx_left_q  <= frame_bits;
            tx_sub_q   <= 4'd0;
            tx_busy_q  <= 1'b1;
          end else if (sbk) begin
            tx_sh_q    <= '0;
            tx_left_q  <= frame_bits;
            tx_sub_q   <= 4'd0;
            tx_busy_q  <= 1'b1;
          end else if (!tdre_q) begin
            tx_sh_q    <= m9 ? {1'b1, sccr1_q[6], tdr_q, 1'b0} : {2'b11, tdr_q, 1'b0};
            tx_left_q  <= frame_bits;
            tx_sub_q   <= 4'd0;
            tx_busy_q  <= 1'b1;
            tdre_q     <= 1'b1;
          end
        end
      end

      // ---------------- receiver
      if (tick16 && re) begin
        // idle-line detection
        if (rx_st_q == RX_IDLE && rxd) begin
          if (idle_cnt_q != 8'hFF) idle_cnt_q <= idle_cnt_q + 8'd1;
          if (idle_cnt_q == {frame_bits, 4'd0} - 8'd1) begin
            if (rwu && !wake) sccr2_q[1] <= 1'b0;
            else if (idle_arm_q && !rwu) idle_q <= 1'b1;
            idle_arm_q <= 1'b0;
          end
        end else begin
          idle_cnt_q <= 8'd0;
        end
        unique case (rx_st_q)
          RX_IDLE: begin
            rx_hist_q <= {rx_hist_q[1:0], rxd};
            if (!rxd && rx_hist_q == 3'b111) begin
              rx_st_q <= RX_START;
              rt_q    <= 8'd1;
              zeros_q <= 2'd0;
            end
          end
          RX_START: begin
            rt_q <= rt_q + 8'd1;
            if ((rt_q + 8'd1 == 8'd3 || rt_q + 8'd1 == 8'd5) && !rxd) zeros_q <= zeros_q + 2'd1;
            if (rt_q + 8'd1 == 8'd7) begin
              if (zeros_q + {1'b0, !rxd} >= 2'd2) begin
                rx_st_q    <= RX_DATA;
                rx_noise_q <= 1'b0;
              end else begin
                rx_st_q   <= RX_IDLE;
                rx_hist_q <= 3'b000;
              end
            end
          end
          default: begin  // RX_DATA
            logic [7:0] rt_n;
            logic       bitv;
            logic [3:0] k;
            rt_n = rt_q + 8'd1;
            rt_q <= rt_n;
            if (rt_n[3:0] == 4'd8)  smp_q[0] <= rxd;
            if (rt_n[3:0] == 4'd9)  smp_q[1] <= rxd;
            if (rt_n[3:0] == 4'd10 && rt_n[7:4] != 4'd0) begin   // past the start bit
              bitv = (smp_q[0] & smp_q[1]) | (smp_q[0] & rxd) | (smp_q[1] & rxd);
              k    = rt_n[7:4] - 4'd1;
              if (!(smp_q[0] == smp_q[1] && smp_q[1] == rxd)) rx_noise_q <= 1'b1;
              if (k < frame_bits - 4'd2) begin
                rx_sh_q <= m9 ? {bitv, rx_sh_q[9:2]} : {1'b0, bitv, rx_sh_q[8:2]};
              end else begin
                // stop bit: the frame is complete
                logic [7:0] d;
                logic       msb;
                logic       noisy;
                d     = rx_sh_q[8:1];
                msb   = m9 ? rx_sh_q[9] : rx_sh_q[8];
                noisy = rx_noise_q || !(smp_q[0] == smp_q[1] && smp_q[1] == rxd);
                rx_st_q    <= RX_IDLE;
                rx_hist_q  <= 3'b000;
                idle_arm_q <= 1'b1;
                if (rwu && wake && msb) sccr2_q[1] <= 1'b0;
                if (!rwu || (wake && msb)) begin
                  if (rdrf_q) begin
                    or_q <= 1'b1;
                  end else begin
                    rdr_q  <= d;
                    r8_q   <= rx_sh_q[9];
                    rdrf_q <= 1'b1;
                    nf_q   <= noisy;
                    fe_q   <= !bitv;
                  end
                end
              end
            end
          end
        endcase
      end
      if (!re) begin
        rx_st_q   <= RX_IDLE;
        rx_hist_q <= 3'b000;
      end

      // ---------------- SPI
      sck_in_q <= pd_in[4];
      sck_in_d <= sck_in_q;
      if (spe && mstr && spi_busy_q && e_fall_en)
        spi_hp_q <= (spi_hp_q >= spi_hp_max) ? 4'd0 : spi_hp_q + 4'd1;
      if (spi_edge) begin
        logic lead;
        lead = !spi_edge_q[0];
        if (spe && mstr) sck_q <= !sck_q;
        if (lead != cpha) spi_in_q <= (spe && mstr) ? pd_in[2] : pd_in[3];
        if (cpha ? (lead && spi_edge_q != 5'd0) : !lead) spi_sh_q <= {spi_sh_q[6:0], spi_in_q};
        spi_edge_q <= spi_edge_q + 5'd1;
        if (spi_edge_q == 5'd15) begin
          logic [7:0] fin;
          fin = cpha ? {spi_sh_q[6:0], (lead != cpha) ? ((spe && mstr) ? pd_in[2] : pd_in[3]) : spi_in_q}
                     : {spi_sh_q[6:0], spi_in_q};
          spi_sh_q   <= fin;
          spi_rx_q   <= fin;
          spi_edge_q <= 5'd0;
          spi_busy_q <= 1'b0;
          spif_q     <= 1'b1;
        end
      end
      if (!spi_busy_q && !(spi_edge_q != 5'd0)) sck_q <= cpol;
      if (spe && !mstr && ss_n) spi_edge_q <= 5'd0;
      if (spe && mstr && !ss_n && !ddrd_q[5]) begin
        modf_q     <= 1'b1;
        spcr_q[6]  <= 1'b0;
        spcr_q[4]  <= 1'b0;
        spi_busy_q <= 1'b0;
        spi_edge_q <= 5'd0;
      end

      // ---------------- register accesses
      if (rd && offset == R_SCSR && (rdrf_q || or_q || nf_q || fe_q || idle_q)) sci_arm_q <= 1'b1;
      if (rd && offset == R_SCDR && sci_arm_q) begin
        sci_arm_q <= 1'b0;
        rdrf_q <= 1'b0; or_q <= 1'b0; nf_q <= 1'b0; fe_q <= 1'b0; idle_q <= 1'b0;
      end
      if (rd && offset == R_SPSR && (spif_q || wcol_q || modf_q)) spi_arm_q <= 1'b1;
      if (acc && offset == R_SPDR && spi_arm_q) begin
        spif_q <= 1'b0; wcol_q <= 1'b0;
        if (!modf_q) spi_arm_q <= 1'b0;
      end
      if (wr) begin
        unique case (offset)
          R_PORTD: portd_q <= wdata[5:0];
          R_DDRD:  ddrd_q  <= wdata & 8'h3F;
          R_SPCR: begin
            spcr_q <= wdata;
            if (spi_arm_q && modf_q) begin modf_q <= 1'b0; spi_arm_q <= 1'b0; end
          end
          R_SPDR: begin
            if (spi_busy_q || spi_edge_q != 5'd0) begin
              wcol_q <= 1'b1;
            end else if (spe) begin
              spi_sh_q   <= wdata;
              spi_busy_q <= mstr;
              spi_hp_q   <= 4'd0;
            end
          end
          R_BAUD:  baud_q  <= wdata & 8'h37;
          R_SCCR1: sccr1_q <= wdata[6:0] & 7'h58;
          R_SCCR2: sccr2_q <= wdata;
          R_SCDR: begin
            tdr_q  <= wdata;
            tdre_q <= 1'b0;
            tc_q   <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    hit = cs && (offset == R_PORTD || offset == R_DDRD ||
                 (offset >= R_SPCR && offset <= R_SCDR));
    rdata = 8'h00;
    if (cs) begin
      unique case (offset)
        R_PORTD: rdata = {2'b00, (pd_in & ~ddrd_q[5:0]) | (portd_q & ddrd_q[5:0])};
        R_DDRD:  rdata = ddrd_q;
        R_SPCR:  rdata = spcr_q;
        R_SPSR:  rdata = {spif_q, wcol_q, 1'b0, modf_q, 4'b0000};
        R_SPDR:  rdata = spi_rx_q;
        R_BAUD:  rdata = baud_q;
        R_SCCR1: rdata = {r8_q, sccr1_q};
        R_SCCR2: rdata = sccr2_q;
        R_SCSR:  rdata = {tdre_q, tc_q, rdrf_q, idle_q, or_q, nf_q, fe_q, 1'b0};
        R_SCDR:  rdata = rdr_q;
        default: rdata = 8'h00;
      endcase
    end
  end

  // pin ownership
  always_comb begin
    pd_out = portd_q;
    pd_oe  = ddrd_q[5:0];
    if (re) pd_oe[0] = 1'b0;
    if (te) begin
      pd_out[1] = txd;
      pd_oe[1]  = 1'b1;
    end
    if (spe && mstr) begin
      pd_out[3] = spi_sh_q[7];
      pd_out[4] = sck_q;
      pd_oe[2]  = 1'b0;
    end else if (spe) begin
      pd_out[2] = spi_sh_q[7];
      pd_oe[2]  = ddrd_q[2] && !ss_n;
      pd_oe[3]  = 1'b0;
      pd_oe[4]  = 1'b0;
      pd_oe[5]  = 1'b0;
    end
  end

  assign sci_irq = (sccr2_q[7] && tdre_q) || (sccr2_q[6] && tc_q) ||
                   (sccr2_q[5] && (rdrf_q || or_q)) || (sccr2_q[4] && idle_q);
  assign spi_irq = spcr_q[7] && (spif_q || modf_q);

endmodule
