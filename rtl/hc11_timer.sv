// hc11_timer: main timer, real-time interrupt, COP watchdog, pulse accumulator
// and port A, in one block because they share registers and the port A pins.
//
// Everything counts E cycles (one e_fall_en pulse per E cycle); register writes
// take effect on the E falling edge of the bus cycle.
//   Free-running counter TCNT ($0E/$0F): counts E/1, E/4, E/8 or E/16 (TMSK2
//     PR1:PR0) and sets TOF (TFLG2 bit 7) when it wraps from $FFFF to $0000.
//     Reading TCNTH stores TCNTL, and the next TCNTL read returns the stored
//     byte, so a 16-bit read is consistent.
//   Input capture IC1..IC3 on PA2..PA0: TCTL2 EDGxB:EDGxA selects off, rising,
//     falling or either edge; the edge copies TCNT into TICx and sets ICxF.
//   Output compare OC1..OC5: when TCNT steps to TOCx, OCxF is set. OC2..OC5
//     drive PA6..PA3 as TCTL1 OMx:OLx selects (none, toggle, clear, set); OC1
//     copies OC1D into the PA7..PA3 pins selected by OC1M and acts after the
//     others, so it wins on a shared pin. CFORC forces the pin actions without
//     setting flags.
//   Real-time interrupt: RTIF (TFLG2 bit 6) every 2^13 E cycles times 1, 2, 4
//     or 8 (PACTL RTR1:RTR0).
//   COP watchdog: when cop_enable is high a counter of 2^15 E cycles times 1,
//     4, 16 or 64 (OPTION CR1:CR0) runs; writing $55 then $AA to COPRST
//     restarts it, and reaching the end gives a one-cycle cop_timeout pulse.
//   Pulse accumulator PACNT ($27), enabled by PACTL PAEN, on PA7 (PAI).
//     Event counting (PAMOD=0) counts PAI edges (PEDGE 0 falling, 1 rising) and
//     sets PAIF on each; gated accumulation (PAMOD=1) counts every 64th E cycle
//     while PAI is at its enabling level (PEDGE 0 high, 1 low) and sets PAIF on
//     the closing edge. Wrapping from $FF to $00 sets PAOVF.
//   Port A ($00): PA0..PA2 inputs, PA3..PA6 outputs, PA7 direction from PACTL
//     DDRA7. A write sets the output latch, the timer functions change it.
// TFLG1/TFLG2 flags are cleared by writing ones. Each flag with its TMSK1/TMSK2
// enable drives its own interrupt request output.
// The register set, the shared pins and the interrupt sources follow the
// design's description of the block; bit layouts are those of the M68HC11.
// Pins are sampled once per E cycle; a PAI edge is detected between two samples.
module hc11_timer
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
  // port A pins
  input  logic [7:0] pa_in,
  output logic [7:0] pa_out,
  output logic [7:0] pa_oe,
  // watchdog
  input  logic       cop_enable,
  output logic       cop_timeout,
  // interrupt requests
  output logic [2:0] ic_irq,      // [0]=IC1 ... [2]=IC3
  output logic [4:0] oc_irq,      // [0]=OC1 ... [4]=OC5
  output logic       tof_irq,
  output logic       rti_irq,
  output logic       paov_irq,
  output logic       pai_irq
);

  logic [15:0] tcnt_q;
  logic [3:0]  pre_q;
  logic [7:0]  tcnt_buf_q;
  logic        buf_valid_q;
  logic [15:0] tic_q [3];
  logic [15:0] toc_q [5];
  logic [7:0]  tctl1_q, tctl2_q, tmsk1_q, tflg1_q, tmsk2_q, tflg2_q;
  logic [7:0]  pactl_q, pacnt_q, oc1m_q, oc1d_q, option_q;
  logic [7:0]  pa_q;           // output latch PA7..PA3
  logic [7:0]  pin_q;          // sampled pins
  logic [15:0] rti_q;
  logic [20:0] cop_q;
  logic        cop_armed_q;
  logic [5:0]  pa64_q;

  logic acc, wr, rd;
  logic [2:0] toc_i;
  logic [1:0] tic_i;
  assign toc_i = 3'((offset - R_TOC1H) >> 1);
  assign tic_i = 2'((offset - R_TIC1H) >> 1);
  assign acc = cs && e_fall_en;
  assign wr  = acc && !rw;
  assign rd  = acc && rw;

  // prescaler
  logic       tick;
  logic [3:0] pre_max;
  always_comb begin
    unique case (tmsk2_q[1:0])
      2'd0:    pre_max = 4'd0;
      2'd1:    pre_max = 4'd3;
      2'd2:    pre_max = 4'd7;
      default: pre_max = 4'd15;
    endcase
  end
  assign tick = e_fall_en && (pre_q >= pre_max);

  logic [15:0] tcnt_nx;
  assign tcnt_nx = tcnt_q + 16'd1;

  // RTI and COP rates
  logic [15:0] rti_max;
  logic [20:0] cop_max;
  always_comb begin
    rti_max = 16'((32'd8192 << pactl_q[1:0]) - 32'd1);
    cop_max = 21'((32'd32768 << {option_q[1:0], 1'b0}) - 32'd1);
  end

  // edge detection on the pins, sampled each E cycle
  logic [2:0] ic_edge;
  logic       pai_rise, pai_fall;
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      // ICk uses PA(2-k) and TCTL2 bits [5-2k : 4-2k]
      logic rise, fall;
      logic [1:0] edg;
      rise = pa_in[2-i] && !pin_q[2-i];
      fall = !pa_in[2-i] && pin_q[2-i];
      edg  = tctl2_q[5-2*i -: 2];
      ic_edge[i] = e_fall_en && ((edg[0] && rise) || (edg[1] && fall));
    end
    pai_rise = e_fall_en && pa_in[7] && !pin_q[7];
    pai_fall = e_fall_en && !pa_in[7] && pin_q[7];
  end

  // output compare matches and pin actions
  logic [4:0] oc_hit;
  logic [4:0] oc_act;
  logic [7:0] pa_nx;
  always_comb begin
    for (int i = 0; i < 5; i++) oc_hit[i] = tick && (tcnt_nx == toc_q[i]);
    oc_act = oc_hit;
    if (wr && offset == R_CFORC) oc_act = oc_act | {wdata[3], wdata[4], wdata[5], wdata[6], wdata[7]};
    pa_nx = pa_q;
    if (wr && offset == R_PORTA) pa_nx = wdata;
    for (int i = 1; i < 5; i++) begin
      // OC2..OC5 -> PA6..PA3, TCTL1 bits [7-2(i-1) : 6-2(i-1)]
      logic [1:0] m;
      m = tctl1_q[9-2*i -: 2];
      if (oc_act[i]) begin
        unique case (m)
          2'b01: pa_nx[7-i] = !pa_q[7-i];
          2'b10: pa_nx[7-i] = 1'b0;
          2'b11: pa_nx[7-i] = 1'b1;
          default: ;
        endcase
      end
    end
    if (oc_act[0]) begin
      for (int j = 3; j < 8; j++) if (oc1m_q[j]) pa_nx[j] = oc1d_q[j];
    end
  end

  // pulse accumulator
  logic pa_inc, pai_flag;
  always_comb begin
    pa_inc   = 1'b0;
    pai_flag = 1'b0;
    if (pactl_q[6]) begin
      if (!pactl_q[5]) begin
        pa_inc   = pactl_q[4] ? pai_rise : pai_fall;
        pai_flag = pa_inc;
      end else begin
        pa_inc   = e_fall_en && (pa64_q == 6'd63) && (pactl_q[4] ? !pa_in[7] : pa_in[7]);
        pai_flag = pactl_q[4] ? pai_rise : pai_fall;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt_q      <= 16'h0000;
      pre_q       <= 4'd0;
      tcnt_buf_q  <= 8'h00;
      buf_valid_q <= 1'b0;
      for (int i = 0; i < 3; i++) tic_q[i] <= 16'h0000;
      for (int i = 0; i < 5; i++) toc_q[i] <= 16'hFFFF;
      tctl1_q  <= 8'h00;
      tctl2_q  <= 8'h00;
      tmsk1_q  <= 8'h00;
      tflg1_q  <= 8'h00;
      tmsk2_q  <= 8'h00;
      tflg2_q  <= 8'h00;
      pactl_q  <= 8'h00;
      pacnt_q  <= 8'h00;
      oc1m_q   <= 8'h00;
      oc1d_q   <= 8'h00;
      option_q <= 8'h10;
      pa_q     <= 8'h00;
      pin_q    <= 8'h00;
      rti_q    <= 16'd0;
      cop_q    <= 21'd0;
      cop_armed_q <= 1'b0;
      pa64_q   <= 6'd0;
      cop_timeout <= 1'b0;
    end else begin
      cop_timeout <= 1'b0;
      if (e_fall_en) begin
        pin_q  <= pa_in;
        pa64_q <= pa64_q + 6'd1;
        pre_q  <= (pre_q >= pre_max) ? 4'd0 : pre_q + 4'd1;
      end
      // free-running counter
      if (tick) begin
        tcnt_q <= tcnt_nx;
        if (tcnt_nx == 16'h0000) tflg2_q[7] <= 1'b1;
      end
      // input captures
      for (int i = 0; i < 3; i++) begin
        if (ic_edge[i]) begin
          tic_q[i] <= tcnt_q;
          tflg1_q[2-i] <= 1'b1;
        end
      end
      // output compares
      for (int i = 0; i < 5; i++) if (oc_hit[i]) tflg1_q[7-i] <= 1'b1;
      pa_q <= pa_nx;
      // real-time interrupt
      if (e_fall_en) begin
        if (rti_q >= rti_max) begin
          rti_q <= 16'd0;
          tflg2_q[6] <= 1'b1;
        end else begin
          rti_q <= rti_q + 16'd1;
        end
      end
      // COP watchdog
      if (!cop_enable) begin
        cop_q <= 21'd0;
      end else if (e_fall_en) begin
        if (cop_q >= cop_max) begin
          cop_q       <= 21'd0;
          cop_timeout <= 1'b1;
        end else begin
          cop_q <= cop_q + 21'd1;
        end
      end
      // pulse accumulator
      if (pa_inc) begin
        pacnt_q <= pacnt_q + 8'd1;
        if (pacnt_q == 8'hFF) tflg2_q[5] <= 1'b1;
      end
      if (pai_flag) tflg2_q[4] <= 1'b1;
      // TCNT read buffering
      if (rd && offset == R_TCNTH) begin
        tcnt_buf_q  <= tcnt_q[7:0];
        buf_valid_q <= 1'b1;
      end
      if (rd && offset == R_TCNTL) buf_valid_q <= 1'b0;
      // register writes
      if (wr) begin
        unique case (offset)
          R_OC1M:   oc1m_q   <= wdata & 8'hF8;
          R_OC1D:   oc1d_q   <= wdata & 8'hF8;
          R_TCTL1:  tctl1_q  <= wdata;
          R_TCTL2:  tctl2_q  <= wdata & 8'h3F;
          R_TMSK1:  tmsk1_q  <= wdata;
          R_TFLG1:  tflg1_q  <= tflg1_q & ~wdata;
          R_TMSK2:  tmsk2_q  <= wdata & 8'hF3;
          R_TFLG2:  tflg2_q  <= tflg2_q & ~(wdata & 8'hF0);
          R_PACTL:  pactl_q  <= wdata & 8'hF3;
          R_PACNT:  pacnt_q  <= wdata;
          R_OPTION: option_q <= wdata;
          R_COPRST: begin
            if (wdata == 8'h55) cop_armed_q <= 1'b1;
            else if (wdata == 8'hAA && cop_armed_q) begin
              cop_armed_q <= 1'b0;
              cop_q       <= 21'd0;
            end else cop_armed_q <= 1'b0;
          end
          default: begin
            if (offset >= R_TOC1H && offset <= 6'h1F) begin
              if (offset[0]) toc_q[toc_i][7:0]  <= wdata;
              else           toc_q[toc_i][15:8] <= wdata;
            end
          end
        endcase
      end
    end
  end

  always_comb begin
    hit = cs && ((offset == R_PORTA) || (offset >= R_CFORC && offset <= R_PACNT) ||
                 offset == R_OPTION || offset == R_COPRST);
    rdata = 8'h00;
    if (cs) begin
      unique case (offset)
        R_PORTA:  rdata = {pactl_q[7] ? pa_q[7] : pa_in[7], pa_q[6:3], pa_in[2:0]};
        R_CFORC:  rdata = 8'h00;
        R_OC1M:   rdata = oc1m_q;
        R_OC1D:   rdata = oc1d_q;
        R_TCNTH:  rdata = tcnt_q[15:8];
        R_TCNTL:  rdata = buf_valid_q ? tcnt_buf_q : tcnt_q[7:0];
        R_TCTL1:  rdata = tctl1_q;
        R_TCTL2:  rdata = tctl2_q;
        R_TMSK1:  rdata = tmsk1_q;
        R_TFLG1:  rdata = tflg1_q;
        R_TMSK2:  rdata = tmsk2_q;
        R_TFLG2:  rdata = tflg2_q;
        R_PACTL:  rdata = pactl_q;
        R_PACNT:  rdata = pacnt_q;
        R_OPTION: rdata = option_q;
        default: begin
          if (offset >= R_TIC1H && offset < R_TOC1H)
            rdata = offset[0] ? tic_q[tic_i][7:0]
                              : tic_q[tic_i][15:8];
          else if (offset >= R_TOC1H && offset <= 6'h1F)
            rdata = offset[0] ? toc_q[toc_i][7:0]
                              : toc_q[toc_i][15:8];
        end
      endcase
    end
  end

  assign pa_out   = {pa_q[7:3], 3'b000};
  assign pa_oe    = {pactl_q[7], 4'b1111, 3'b000};
  assign ic_irq   = {tflg1_q[0] & tmsk1_q[0], tflg1_q[1] & tmsk1_q[1], tflg1_q[2] & tmsk1_q[2]};
  assign oc_irq   = {tflg1_q[3] & tmsk1_q[3], tflg1_q[4] & tmsk1_q[4], tflg1_q[5] & tmsk1_q[5],
                     tflg1_q[6] & tmsk1_q[6], tflg1_q[7] & tmsk1_q[7]};
  assign tof_irq  = tflg2_q[7] & tmsk2_q[7];
  assign rti_irq  = tflg2_q[6] & tmsk2_q[6];
  assign paov_irq = tflg2_q[5] & tmsk2_q[5];
  assign pai_irq  = tflg2_q[4] & tmsk2_q[4];

endmodule
