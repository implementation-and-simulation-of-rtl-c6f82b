// hc11_regfile: CPU register file.
//
// Holds the programmer-visible registers A, B (D = A:B), IX, IY, SP, PC and CCR,
// and a 16-bit temporary T (high byte TH, low byte TL) that the controller uses
// for effective addresses and operands. All updates happen together on the E
// falling edge (en = e_fall_en), under these controls from the CPU controller:
//   pc_op / sp_op   hold, increment or decrement PC and SP
//   wr8_dst/data    write one byte register (A, B, XH ... TL, CCR)
//   wr16_dst/data   write one 16-bit register (D, X, Y, SP, PC, T); it takes
//                   priority over pc_op / sp_op on the same register
//   ccr_mask/data   update the CCR bits selected by the mask (flag write-back)
//   xgdx / xgdy     exchange D with X / Y
// regs shows the present contents. addr_out shows, for the register chosen by
// asel, the value it will hold after this cycle's update, so that the address
// bus controller can latch the next bus address on the same edge.
// The register set follows the design; the control encoding and the T register
// width are this implementation's choices. Reset clears all registers except
// CCR, which comes up with S, X and I set as on the M68HC11.
module hc11_regfile
  import hc11_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  ptr_op_e     pc_op,
  input  ptr_op_e     sp_op,
  input  rf_dst8_e    wr8_dst,
  input  logic [7:0]  wr8_data,
  input  rf_dst16_e   wr16_dst,
  input  logic [15:0] wr16_data,
  input  logic [7:0]  ccr_mask,
  input  logic [7:0]  ccr_data,
  input  logic        xgdx,
  input  logic        xgdy,
  input  rf_asel_e    asel,
  output regs_t       regs,
  output logic [15:0] addr_out
);

  regs_t cur, nxt;

  always_comb begin
    nxt = cur;
    // pointer operations
    unique case (pc_op)
      PTR_INC: nxt.pc = cur.pc + 16'd1;
      PTR_DEC: nxt.pc = cur.pc - 16'd1;
      default: ;
    endcase
    unique case (sp_op)
      PTR_INC: nxt.sp = cur.sp + 16'd1;
      PTR_DEC: nxt.sp = cur.sp - 16'd1;
      default: ;
    endcase
    // exchanges
    if (xgdx) begin
      {nxt.a, nxt.b} = cur.x;
      nxt.x          = {cur.a, cur.b};
    end
    if (xgdy) begin
      {nxt.a, nxt.b} = cur.y;
      nxt.y          = {cur.a, cur.b};
    end
    // flag update
    nxt.ccr = (cur.ccr & ~ccr_mask) | (ccr_data & ccr_mask);
    // byte write
    unique case (wr8_dst)
      RD_A:    nxt.a        = wr8_data;
      RD_B:    nxt.b        = wr8_data;
      RD_XH:   nxt.x[15:8]  = wr8_data;
      RD_XL:   nxt.x[7:0]   = wr8_data;
      RD_YH:   nxt.y[15:8]  = wr8_data;
      RD_YL:   nxt.y[7:0]   = wr8_data;
      RD_SPH:  nxt.sp[15:8] = wr8_data;
      RD_SPL:  nxt.sp[7:0]  = wr8_data;
      RD_PCH:  nxt.pc[15:8] = wr8_data;
      RD_PCL:  nxt.pc[7:0]  = wr8_data;
      RD_CCR:  nxt.ccr      = wr8_data;
      RD_TH:   nxt.t[15:8]  = wr8_data;
      RD_TL:   nxt.t[7:0]   = wr8_data;
      default: ;
    endcase
    // word write
    unique case (wr16_dst)
      RW_D:    {nxt.a, nxt.b} = wr16_data;
      RW_X:    nxt.x          = wr16_data;
      RW_Y:    nxt.y          = wr16_data;
      RW_SP:   nxt.sp         = wr16_data;
      RW_PC:   nxt.pc         = wr16_data;
      RW_T:    nxt.t          = wr16_data;
      default: ;
    endcase
  end

  always_comb begin
    unique case (asel)
      RA_SP:   addr_out = nxt.sp;
      RA_X:    addr_out = nxt.x;
      RA_Y:    addr_out = nxt.y;
      RA_T:    addr_out = nxt.t;
      default: addr_out = nxt.pc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur     <= '0;
      cur.ccr <= 8'hD0;
    end else if (en) begin
      cur <= nxt;
    end
  end

  assign regs = cur;

endmodule
