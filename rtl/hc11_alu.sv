// hc11_alu: arithmetic and logic unit of the CPU.
//
// Executes one command of the ALU command table (hc11_pkg::alu_cmd_e, codes as
// in the design's table) on two 8-bit operands and registers the 8-bit result
// and the condition codes on the PH2 falling edge (ph2_fall_en), as the design
// describes: operands are set up by the controller in the first half of the bus
// cycle and the result is used at the following E falling edge.
//
// 16-bit operations are done as two 8-bit ones. itype = ITYPE_HIGH marks the
// high byte: the carry comes from the low byte (ccr_in C), Z is the AND of this
// byte's zero test and the low byte's Z (ccr_in Z), and ALU_ADDSIGNED adds the
// sign extension of operand B instead of B.
//
// Unary commands (INC, DEC, COM, NEG, shifts, rotates, CLR) act on operand B and
// DAA on operand A; this follows the design's printed ALU test results. TST
// gives A-B with V and C cleared. Flags follow the M68HC11 rules, except that
// DAA sets V as the overflow of its correction addition, as the design's DAA
// test result shows.
//
// Multiply and divide are multi-step, with internal state:
//   STRMUL loads A (multiplicand) and B (multiplier); MUL does one shift-add
//   step; ENDMUL does the last (eighth) step and sets C = bit 7 of the product.
//   LDN loads the integer-division numerator (num_in = D) and divisor (den_in =
//   X); LDFDIVN does the same for a fractional division. DIV / FDIVSUB do one
//   restoring shift-subtract step (16 are needed). DIVRESQ puts the quotient on
//   wide_out with Z, V and C; DIVRESR puts the remainder on wide_out.
// wide_out is valid after ENDMUL, DIVRESQ and DIVRESR.
module hc11_alu
  import hc11_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ph2_fall_en,
  input  alu_cmd_e    cmd,
  input  alu_itype_e  itype,
  input  logic [7:0]  op_a,
  input  logic [7:0]  op_b,
  input  logic [7:0]  ccr_in,
  input  logic [15:0] num_in,
  input  logic [15:0] den_in,
  output logic [7:0]  result,
  output logic [7:0]  ccr_out,
  output logic [15:0] wide_out
);

  logic [7:0]  r;
  logic        h, n, z, v, c;
  logic [8:0]  sum;
  logic [7:0]  bx;
  logic [7:0]  corr;
  logic        dcf;

  // multiply / divide state
  logic [7:0]  mcand_q;
  logic [15:0] prod_q;
  logic [15:0] quo_q;
  logic [15:0] rem_q;
  logic [15:0] den_q;
  logic        fdiv_q, fdiv_v_q;
  logic [8:0]  mstep_sum;
  logic [15:0] mstep;
  logic [16:0] dshift;
  logic        dge;
  logic [15:0] drem;
  logic [15:0] dquo;
  logic [15:0] wide_d;

  logic cin, hin, zin;
  assign cin = ccr_in[CCR_C];
  assign hin = ccr_in[CCR_H];
  assign zin = (itype == ITYPE_HIGH) ? ccr_in[CCR_Z] : 1'b1;

  // one multiply step
  always_comb begin
    mstep_sum = {1'b0, prod_q[15:8]} + (prod_q[0] ? {1'b0, mcand_q} : 9'd0);
    mstep     = {mstep_sum, prod_q[7:1]};
  end

  // one division step
  always_comb begin
    dshift = {rem_q, quo_q[15]};
    dge    = dshift >= {1'b0, den_q};
    drem   = dge ? 16'(dshift - {1'b0, den_q}) : dshift[15:0];
    dquo   = {quo_q[14:0], dge};
  end

  always_comb begin
    r      = 8'h00;
    h      = hin;
    v      = 1'b0;
    c      = cin;
    sum    = 9'd0;
    bx     = op_b;
    corr   = 8'h00;
    dcf    = 1'b0;
    wide_d = wide_out;
    unique case (cmd)
      ALU_ADD, ALU_ADDWC, ALU_ADDSIGNED: begin
        if (cmd == ALU_ADDSIGNED && itype == ITYPE_HIGH) bx = {8{op_b[7]}};
        sum = {1'b0, op_a} + {1'b0, bx} +
              {8'd0, (cmd == ALU_ADDWC || itype == ITYPE_HIGH) ? cin : 1'b0};
        r = sum[7:0];
        h = (op_a[3] & bx[3]) | (bx[3] & ~r[3]) | (~r[3] & op_a[3]);
        v = (op_a[7] & bx[7] & ~r[7]) | (~op_a[7] & ~bx[7] & r[7]);
        c = sum[8];
      end
      ALU_SUB, ALU_SUBWC: begin
        sum = {1'b0, op_a} - {1'b0, op_b} -
              {8'd0, (cmd == ALU_SUBWC || itype == ITYPE_HIGH) ? cin : 1'b0};
        r = sum[7:0];
        v = (op_a[7] & ~op_b[7] & ~r[7]) | (~op_a[7] & op_b[7] & r[7]);
        c = sum[8];
      end
      ALU_TST: begin
        r = op_a - op_b;
        v = 1'b0;
        c = 1'b0;
      end
      ALU_INC: begin r = op_b + 8'd1; v = (op_b == 8'h7F); end
      ALU_DEC: begin r = op_b - 8'd1; v = (op_b == 8'h80); end
      ALU_AND:     r = op_a & op_b;
      ALU_OR:      r = op_a | op_b;
      ALU_XOR:     r = op_a ^ op_b;
      ALU_ANDINV:  r = ~op_a & op_b;
      ALU_ANDINV2: r = op_a & ~op_b;
      ALU_COM: begin r = ~op_b; c = 1'b1; end
      ALU_NEG: begin r = 8'h00 - op_b; v = (r == 8'h80); c = (r != 8'h00); end
      ALU_CLR: begin r = 8'h00; c = 1'b0; end
      ALU_LSL: begin r = {op_b[6:0], 1'b0};  c = op_b[7]; v = r[7] ^ c; end
      ALU_ROL: begin r = {op_b[6:0], cin};   c = op_b[7]; v = r[7] ^ c; end
      ALU_ASR: begin r = {op_b[7], op_b[7:1]}; c = op_b[0]; v = r[7] ^ c; end
      ALU_LSR: begin r = {1'b0, op_b[7:1]};  c = op_b[0]; v = c; end
      ALU_ROR: begin r = {cin, op_b[7:1]};   c = op_b[0]; v = r[7] ^ c; end
      ALU_DAA: begin
        if (cin || op_a[7:4] > 4'd9 || (op_a[7:4] >= 4'd9 && op_a[3:0] > 4'd9)) begin
          corr[7:4] = 4'h6;
          dcf       = 1'b1;
        end
        if (hin || op_a[3:0] > 4'd9) corr[3:0] = 4'h6;
        sum = {1'b0, op_a} + {1'b0, corr};
        r   = sum[7:0];
        v   = (op_a[7] & corr[7] & ~r[7]) | (~op_a[7] & ~corr[7] & r[7]);
        c   = dcf | sum[8];
      end
      ALU_STRMUL, ALU_MUL, ALU_LDN, ALU_LDFDIVN, ALU_DIV, ALU_FDIVSUB: r = 8'h00;
      ALU_ENDMUL: begin
        wide_d = mstep;
        c      = mstep[7];
        r      = mstep[15:8];
      end
      ALU_DIVRESQ: begin
        wide_d = quo_q;
        c      = (den_q == 16'h0000);
        v      = fdiv_q ? fdiv_v_q : 1'b0;
        r      = quo_q[15:8];
      end
      ALU_DIVRESR: begin
        wide_d = rem_q;
        r      = rem_q[15:8];
      end
      default: r = 8'h00;
    endcase
    if (cmd == ALU_DIVRESQ) z = (quo_q == 16'h0000);
    else                    z = (r == 8'h00) & zin;
    n = r[7];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result   <= 8'h00;
      ccr_out  <= 8'h00;
      wide_out <= 16'h0000;
      mcand_q  <= 8'h00;
      prod_q   <= 16'h0000;
      quo_q    <= 16'h0000;
      rem_q    <= 16'h0000;
      den_q    <= 16'h0001;
      fdiv_q   <= 1'b0;
      fdiv_v_q <= 1'b0;
    end else if (ph2_fall_en) begin
      result   <= r;
      wide_out <= wide_d;
      // ENDMUL changes only C; DIVRESQ only Z, V and C (N and H keep their value)
      if (cmd == ALU_ENDMUL)
        ccr_out <= {ccr_in[7:1], c};
      else if (cmd == ALU_DIVRESQ)
        ccr_out <= {ccr_in[7:3], z, v, c};
      else
        ccr_out <= {ccr_in[7:6], h, ccr_in[4], n, z, v, c};
      unique case (cmd)
        ALU_STRMUL: begin mcand_q <= op_a; prod_q <= {8'h00, op_b}; end
        ALU_MUL, ALU_ENDMUL: prod_q <= mstep;
        ALU_LDN: begin
          rem_q <= 16'h0000; quo_q <= num_in; den_q <= den_in;
          fdiv_q <= 1'b0; fdiv_v_q <= 1'b0;
        end
        ALU_LDFDIVN: begin
          rem_q <= num_in; quo_q <= 16'h0000; den_q <= den_in;
          fdiv_q <= 1'b1; fdiv_v_q <= (den_in <= num_in);
        end
        ALU_DIV, ALU_FDIVSUB: begin rem_q <= drem; quo_q <= dquo; end
        default: ;
      endcase
    end
  end

endmodule
