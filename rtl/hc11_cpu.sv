// hc11_cpu: M68HC11 CPU - controller unit with its ALU and register file.
//
// The controller is a state machine with one state per bus (E-clock) cycle,
// using the CPU states of the design (opcode fetch, address calculation, read,
// execute, write, stack, multiply, divide, vector load, TEST ...). Every bus
// cycle does one memory access. At each E falling edge (e_fall_en) the
// controller
//   - takes the byte read in the ending cycle from data_in,
//   - commands the register file (pointer steps, writes, flag write-back),
//   - chooses the address sources of the next cycle for the address bus
//     controller (hi_sel, lo_sel, rf_addr = register-file address output,
//     vec_lo) and registers rw / data_out of the next cycle.
// The ALU (hc11_alu) gets its command and operands during the cycle and
// registers its result at the PH2 falling edge, in time for the E falling edge;
// so an operation on a byte read in a cycle completes in that same cycle, and
// instruction cycle counts follow the M68HC11 instruction table for nearly all
// instructions. The ALU input multiplexer of the design (register or data bus
// for operand B) is the op_b selection below.
//
// Instruction set: all M68HC11 opcodes of pages 0, $18, $1A and $CD. Page $18
// swaps X for Y in every opcode (index and register); opcodes that are not
// valid on page $18 therefore run as their Y variant rather than trapping.
// Illegal page-0 opcodes take the illegal-opcode trap ($FFF8).
//
// Interrupt controller: XIRQ (masked by X) and 15 maskable sources (masked by
// I) in int_src, highest priority first: IRQ pin, RTI, IC1-IC3, OC1-OC5, TOF,
// PAOV, PAI, SPI, SCI (the M68HC11 default priority; HPRIO is not modelled).
// A request is taken instead of the next opcode fetch: the registers are
// stacked (PCL, PCH, IYL, IYH, IXL, IXH, A, B, CCR), I (and X for XIRQ) set and
// the vector at $FFxx loaded. WAI stacks and waits for a request; STOP (when S
// is clear) halts until a request; TEST counts on the address bus until reset.
// After reset (or a COP reset, reset_vec_lo = $FA) the START state loads the
// vector. init_timeout goes high 64 E cycles after reset (INIT write window).
//
// Cycle counts follow the instruction table; an interrupt spends one extra
// cycle on the discarded opcode fetch.
module hc11_cpu
  import hc11_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         e_fall_en,
  input  logic         ph2_fall_en,
  input  logic [7:0]   data_in,        // byte read in the current bus cycle
  input  logic         xirq_n,
  input  logic [14:0]  int_src,        // maskable requests, [0] highest priority
  input  logic [7:0]   reset_vec_lo,   // $FE (reset) or $FA (COP reset)
  // to the address bus controller
  output addr_hi_sel_e hi_sel,
  output addr_lo_sel_e lo_sel,
  output logic [15:0]  rf_addr,
  output logic [7:0]   vec_lo,
  output logic [7:0]   alu_result,
  // bus cycle control
  output logic         rw,             // 1 = read, 0 = write
  output logic [7:0]   data_out,
  output logic         init_timeout,
  // observation
  output cpu_state_e   state,
  output regs_t        regs,
  output logic         opcode_fetch,   // current cycle fetches an opcode
  output logic         int_taken       // pulse: interrupt sequence started
);

  // ------------------------------------------------------------ decode types
  typedef enum logic [5:0] {
    O_ILL, O_NOP, O_ALU8, O_LD8, O_ST8, O_ALU16, O_LD16, O_ST16, O_RMW,
    O_INH8, O_AB, O_CCR, O_BR, O_BSR, O_JSR, O_JMP, O_RTS, O_RTI, O_SWI,
    O_WAI, O_PSH8, O_PUL8, O_PSH16, O_PUL16, O_MUL, O_IDIV, O_FDIV, O_SHD,
    O_IDX16, O_BSET, O_BCLR, O_BRSET, O_BRCLR, O_STOP, O_TEST
  } op_e;

  typedef enum logic [2:0] {
    M_INH, M_IMM8, M_IMM16, M_DIR, M_EXT, M_IND, M_REL
  } mode_e;

  typedef enum logic [1:0] { R16_D, R16_X, R16_Y, R16_SP } r16_e;

  typedef enum logic [1:0] { PG_0, PG_18, PG_1A, PG_CD } page_e;

  typedef struct packed {
    op_e       op;
    mode_e     mode;
    alu_cmd_e  cmd;       // 8-bit command, or low-byte command of a 16-bit op
    alu_cmd_e  cmd_hi;    // high-byte command of a 16-bit op
    logic [7:0] mask;     // CCR bits written
    logic      rb;        // 8-bit register: 0 = A, 1 = B
    r16_e      r16;
    logic      idx_y;     // indexed by Y
    logic      nowrite;   // compare / test: no result write
  } dec_t;

  localparam logic [7:0] MK_HNZVC = 8'h2F;
  localparam logic [7:0] MK_NZVC  = 8'h0F;
  localparam logic [7:0] MK_NZV   = 8'h0E;

  function automatic r16_e swap_xy(input r16_e r, input logic y);
    if (y && r == R16_X) return R16_Y;
    return r;
  endfunction

  function automatic dec_t decode(input page_e pg, input logic [7:0] opc);
    dec_t d;
    logic [3:0] hi, lo;
    logic       y;
    hi = opc[7:4];
    lo = opc[3:0];
    y  = (pg == PG_18);
    d.op      = O_ILL;
    d.mode    = M_INH;
    d.cmd     = ALU_NOP;
    d.cmd_hi  = ALU_NOP;
    d.mask    = 8'h00;
    d.rb      = 1'b0;
    d.r16     = R16_D;
    d.idx_y   = y;
    d.nowrite = 1'b0;
    if (hi >= 4'h8) begin
      // ------------------------------------------------ accumulator/memory ops
      d.rb = hi[2];
      unique case (hi[1:0])
        2'b00: d.mode = M_IMM8;
        2'b01: d.mode = M_DIR;
        2'b10: d.mode = M_IND;
        default: d.mode = M_EXT;
      endcase
      unique case (lo)
        4'h0: begin d.op = O_ALU8; d.cmd = ALU_SUB;   d.mask = MK_NZVC; end
        4'h1: begin d.op = O_ALU8; d.cmd = ALU_SUB;   d.mask = MK_NZVC; d.nowrite = 1'b1; end
        4'h2: begin d.op = O_ALU8; d.cmd = ALU_SUBWC; d.mask = MK_NZVC; end
        4'h3: begin
          d.op = O_ALU16; d.r16 = R16_D; d.mask = MK_NZVC;
          if (!hi[2]) begin d.cmd = ALU_SUB; d.cmd_hi = ALU_SUB; end
          else        begin d.cmd = ALU_ADD; d.cmd_hi = ALU_ADD; end
        end
        4'h4: begin d.op = O_ALU8; d.cmd = ALU_AND; d.mask = MK_NZV; end
        4'h5: begin d.op = O_ALU8; d.cmd = ALU_AND; d.mask = MK_NZV; d.nowrite = 1'b1; end
        4'h6: begin d.op = O_LD8;  d.cmd = ALU_OR;  d.mask = MK_NZV; end
        4'h7: begin d.op = O_ST8;  d.cmd = ALU_OR;  d.mask = MK_NZV; end
        4'h8: begin d.op = O_ALU8; d.cmd = ALU_XOR;   d.mask = MK_NZV; end
        4'h9: begin d.op = O_ALU8; d.cmd = ALU_ADDWC; d.mask = MK_HNZVC; end
        4'hA: begin d.op = O_ALU8; d.cmd = ALU_OR;    d.mask = MK_NZV; end
        4'hB: begin d.op = O_ALU8; d.cmd = ALU_ADD;   d.mask = MK_HNZVC; end
        4'hC: begin
          if (!hi[2]) begin
            d.op = O_ALU16; d.r16 = swap_xy(R16_X, y); d.cmd = ALU_SUB; d.cmd_hi = ALU_SUB;
            d.nowrite = 1'b1; d.mask = MK_NZVC;
          end else begin
            d.op = O_LD16; d.r16 = R16_D; d.mask = MK_NZV;
          end
        end
        4'hD: begin
          if (!hi[2]) d.op = (hi[1:0] == 2'b00) ? O_BSR : O_JSR;
          else        d.op = O_ST16;
          if (hi[2]) begin d.r16 = R16_D; d.mask = MK_NZV; end
          if (opc == 8'h8D) d.mode = M_REL;
        end
        4'hE: begin d.op = O_LD16; d.r16 = hi[2] ? swap_xy(R16_X, y) : R16_SP; d.mask = MK_NZV; end
        default: begin
          d.op = O_ST16; d.r16 = hi[2] ? swap_xy(R16_X, y) : R16_SP; d.mask = MK_NZV;
        end
      endcase
      if (d.mode == M_IMM8 && (d.op == O_ALU16 || d.op == O_LD16)) d.mode = M_IMM16;
      if (opc == 8'h87 || opc == 8'hC7 || opc == 8'hCD) d.op = O_ILL;
      if (opc == 8'h8F) begin d.op = O_IDX16; d.mode = M_INH; end       // XGDX/XGDY
      if (opc == 8'hCF) begin d.op = O_STOP;  d.mode = M_INH; end
      // pages $1A and $CD
      if (pg == PG_1A || pg == PG_CD) begin
        d.idx_y = (pg == PG_CD);
        if (lo == 4'h3 && !hi[2]) begin d.nowrite = 1'b1; d.r16 = R16_D; end              // CPD
        else if (lo == 4'hC && !hi[2]) d.r16 = (pg == PG_1A) ? R16_Y : R16_X;             // CPY / CPX
        else if (lo == 4'hE && hi[2])  d.r16 = (pg == PG_1A) ? R16_Y : R16_X;             // LDY / LDX
        else if (lo == 4'hF && hi[2])  d.r16 = (pg == PG_1A) ? R16_Y : R16_X;             // STY / STX
      end
    end else if (hi >= 4'h4) begin
      // ------------------------------------------------ single-operand ops
      unique case (hi[1:0])
        2'b00: begin d.mode = M_INH; d.rb = 1'b0; end
        2'b01: begin d.mode = M_INH; d.rb = 1'b1; end
        2'b10: d.mode = M_IND;
        default: d.mode = M_EXT;
      endcase
      d.op   = hi[1] ? O_RMW : O_INH8;
      d.mask = MK_NZVC;
      unique case (lo)
        4'h0: d.cmd = ALU_NEG;
        4'h3: d.cmd = ALU_COM;
        4'h4: d.cmd = ALU_LSR;
        4'h6: d.cmd = ALU_ROR;
        4'h7: d.cmd = ALU_ASR;
        4'h8: d.cmd = ALU_LSL;
        4'h9: d.cmd = ALU_ROL;
        4'hA: begin d.cmd = ALU_DEC; d.mask = MK_NZV; end
        4'hC: begin d.cmd = ALU_INC; d.mask = MK_NZV; end
        4'hD: begin d.cmd = ALU_TST; d.nowrite = 1'b1; end
        4'hE: begin d.op = hi[1] ? O_JMP : O_ILL; d.mask = 8'h00; end
        4'hF: d.cmd = ALU_CLR;
        default: d.op = O_ILL;
      endcase
    end else if (hi == 4'h2) begin
      d.op = O_BR; d.mode = M_REL;
    end else if (hi == 4'h3) begin
      unique case (lo)
        4'h0, 4'h1, 4'h4, 4'h5, 4'hA: begin d.op = O_IDX16; d.r16 = swap_xy(R16_X, y); end
        4'h2, 4'h3: begin d.op = O_PUL8; d.rb = lo[0]; end
        4'h6, 4'h7: begin d.op = O_PSH8; d.rb = lo[0]; end
        4'h8: begin d.op = O_PUL16; d.r16 = swap_xy(R16_X, y); end
        4'h9: d.op = O_RTS;
        4'hB: d.op = O_RTI;
        4'hC: begin d.op = O_PSH16; d.r16 = swap_xy(R16_X, y); end
        4'hD: d.op = O_MUL;
        4'hE: d.op = O_WAI;
        default: d.op = O_SWI;
      endcase
    end else if (hi == 4'h1) begin
      unique case (lo)
        4'h0: begin d.op = O_AB; d.cmd = ALU_SUB; d.mask = MK_NZVC; end                   // SBA
        4'h1: begin d.op = O_AB; d.cmd = ALU_SUB; d.mask = MK_NZVC; d.nowrite = 1'b1; end // CBA
        4'h2: begin d.op = O_BRSET; d.mode = M_DIR; end
        4'h3: begin d.op = O_BRCLR; d.mode = M_DIR; end
        4'h4: begin d.op = O_BSET;  d.mode = M_DIR; d.mask = MK_NZV; end
        4'h5: begin d.op = O_BCLR;  d.mode = M_DIR; d.mask = MK_NZV; end
        4'h6: begin d.op = O_AB; d.cmd = ALU_OR; d.mask = MK_NZV; d.rb = 1'b1; end        // TAB
        4'h7: begin d.op = O_AB; d.cmd = ALU_OR; d.mask = MK_NZV; end                     // TBA
        4'h9: begin d.op = O_AB; d.cmd = ALU_DAA; d.mask = MK_NZVC; end                   // DAA
        4'hB: begin d.op = O_AB; d.cmd = ALU_ADD; d.mask = MK_HNZVC; end                  // ABA
        4'hC: begin d.op = O_BSET;  d.mode = M_IND; d.mask = MK_NZV; end
        4'hD: begin d.op = O_BCLR;  d.mode = M_IND; d.mask = MK_NZV; end
        4'hE: begin d.op = O_BRSET; d.mode = M_IND; end
        4'hF: begin d.op = O_BRCLR; d.mode = M_IND; end
        default: d.op = O_ILL;                                                             // prefixes
      endcase
    end else begin
      unique case (lo)
        4'h0: d.op = O_TEST;
        4'h1: d.op = O_NOP;
        4'h2: d.op = O_IDIV;
        4'h3: d.op = O_FDIV;
        4'h4: begin d.op = O_SHD; d.cmd = ALU_LSR; d.cmd_hi = ALU_ROR; d.mask = MK_NZVC; end
        4'h5: begin d.op = O_SHD; d.cmd = ALU_LSL; d.cmd_hi = ALU_ROL; d.mask = MK_NZVC; end
        4'h8, 4'h9: begin d.op = O_IDX16; d.r16 = swap_xy(R16_X, y); end
        default: d.op = O_CCR;                                                             // 06,07,0A-0F
      endcase
    end
    return d;
  endfunction

  function automatic logic [15:0] r16_val(input r16_e r, input regs_t g);
    unique case (r)
      R16_X:   return g.x;
      R16_Y:   return g.y;
      R16_SP:  return g.sp;
      default: return {g.a, g.b};
    endcase
  endfunction

  function automatic rf_dst16_e r16_dst(input r16_e r);
    unique case (r)
      R16_X:   return RW_X;
      R16_Y:   return RW_Y;
      R16_SP:  return RW_SP;
      default: return RW_D;
    endcase
  endfunction

  function automatic logic branch_cond(input logic [3:0] c, input logic [7:0] ccr);
    logic n, z, v, cy, r;
    n  = ccr[CCR_N];
    z  = ccr[CCR_Z];
    v  = ccr[CCR_V];
    cy = ccr[CCR_C];
    unique case (c[3:1])
      3'd0: r = 1'b1;           // BRA / BRN
      3'd1: r = !(cy | z);      // BHI / BLS
      3'd2: r = !cy;            // BCC / BCS
      3'd3: r = !z;             // BNE / BEQ
      3'd4: r = !v;             // BVC / BVS
      3'd5: r = !n;             // BPL / BMI
      3'd6: r = !(n ^ v);       // BGE / BLT
      default: r = !(z | (n ^ v)); // BGT / BLE
    endcase
    return c[0] ? !r : r;
  endfunction

  // ------------------------------------------------------------ state
  cpu_state_e st_q, st_d;
  logic [7:0] ir_q, ir_d;
  page_e      pg_q, pg_d;
  logic [7:0] md_q, md_d;          // memory data register
  logic [5:0] cnt_q, cnt_d;
  logic [7:0] vec_q, vec_d;
  logic       xint_q, xint_d;      // interrupt being taken is XIRQ
  logic       take_q, take_d;      // branch taken
  logic       wai_q, wai_d;        // stacking done by WAI
  logic       rw_q, rw_d;
  logic [7:0] wd_q, wd_d;
  logic [6:0] initcnt_q;
  dec_t       dq;                  // decode of the instruction register

  // register file controls
  ptr_op_e    pc_op, sp_op;
  rf_dst8_e   wr8_dst;
  logic [7:0] wr8_data;
  rf_dst16_e  wr16_dst;
  logic [15:0] wr16_data;
  logic [7:0] ccr_mask, ccr_data;
  logic       xgdx, xgdy;
  rf_asel_e   asel;
  regs_t      g;

  // ALU
  alu_cmd_e   alu_cmd;
  alu_itype_e alu_itype;
  logic [7:0] op_a, op_b, alu_ccr_in;
  logic [7:0] alu_res, alu_ccr;
  logic [15:0] alu_wide;

  // interrupt requests
  logic        xirq_req, irq_req;
  logic [7:0]  irq_vec;

  assign dq = decode(pg_q, ir_q);

  always_comb begin
    irq_vec = VEC_SCI;
    for (int i = 14; i >= 0; i--) begin
      if (int_src[i]) irq_vec = 8'hF2 - 8'(2 * i);
    end
  end
  assign xirq_req = !xirq_n && !g.ccr[CCR_X];
  assign irq_req  = (|int_src) && !g.ccr[CCR_I];

  hc11_regfile u_rf (
    .clk, .rst_n, .en(e_fall_en),
    .pc_op, .sp_op, .wr8_dst, .wr8_data, .wr16_dst, .wr16_data,
    .ccr_mask, .ccr_data, .xgdx, .xgdy, .asel,
    .regs(g), .addr_out(rf_addr)
  );

  hc11_alu u_alu (
    .clk, .rst_n, .ph2_fall_en,
    .cmd(alu_cmd), .itype(alu_itype), .op_a, .op_b, .ccr_in(alu_ccr_in),
    .num_in({g.a, g.b}), .den_in(g.x),
    .result(alu_res), .ccr_out(alu_ccr), .wide_out(alu_wide)
  );

  // ------------------------------------------------------------ ALU control
  // (operands of the current bus cycle; operand B is the ALU input multiplexer:
  // a register or the data bus)
  logic [15:0] r16v;
  assign r16v = r16_val(dq.r16, g);

  always_comb begin
    alu_cmd    = ALU_NOP;
    alu_itype  = ITYPE_8BIT;
    op_a       = 8'h00;
    op_b       = 8'h00;
    alu_ccr_in = g.ccr;
    unique case (st_q)
      ST_READ_EXEC_OP, ST_EXEC8: begin
        unique case (dq.op)
          O_ALU8: begin
            alu_cmd = dq.cmd; op_a = dq.rb ? g.b : g.a; op_b = data_in;
          end
          O_LD8: begin alu_cmd = ALU_OR; op_b = data_in; end
          O_RMW: begin
            alu_cmd = dq.cmd; op_a = data_in; op_b = data_in;
            if (dq.cmd == ALU_TST) op_b = 8'h00;
          end
          O_INH8: begin
            alu_cmd = dq.cmd; op_a = dq.rb ? g.b : g.a; op_b = op_a;
            if (dq.cmd == ALU_TST) op_b = 8'h00;
          end
          O_AB: begin
            alu_cmd = dq.cmd;
            unique case (ir_q[3:0])
              4'h6: op_b = g.a;                       // TAB
              4'h7: op_b = g.b;                       // TBA
              default: begin op_a = g.a; op_b = g.b; end
            endcase
          end
          O_BSET:  begin alu_cmd = ALU_OR;      op_a = md_q; op_b = data_in; end
          O_BCLR:  begin alu_cmd = ALU_ANDINV2; op_a = md_q; op_b = data_in; end
          O_BRSET: begin alu_cmd = ALU_ANDINV;  op_a = md_q; op_b = data_in; end
          O_BRCLR: begin alu_cmd = ALU_AND;     op_a = md_q; op_b = data_in; end
          default: ;
        endcase
      end
      ST_WRITE2: begin
        if (dq.op == O_ST8) begin alu_cmd = ALU_OR; op_b = dq.rb ? g.b : g.a; end
      end
      ST_ARITH16_LO: begin alu_cmd = dq.cmd; op_a = r16v[7:0]; op_b = data_in; end
      ST_ARITH16_HI: begin
        alu_cmd = dq.cmd_hi; alu_itype = ITYPE_HIGH; op_a = r16v[15:8]; op_b = md_q;
        alu_ccr_in = alu_ccr;
      end
      ST_LOGIC16_LO: begin
        alu_cmd = dq.cmd; op_b = (ir_q[3:0] == 4'h4) ? g.a : g.b;
      end
      ST_LOGIC16_HI: begin
        alu_cmd = dq.cmd_hi; alu_itype = ITYPE_HIGH; op_b = (ir_q[3:0] == 4'h4) ? g.b : g.a;
        alu_ccr_in = alu_ccr;
      end
      ST_MUL: begin
        op_a = g.a; op_b = g.b;
        if (cnt_q == 6'd0)      alu_cmd = ALU_STRMUL;
        else if (cnt_q == 6'd8) alu_cmd = ALU_ENDMUL;
        else                    alu_cmd = ALU_MUL;
      end
      ST_IDIV, ST_FDIV: begin
        if (cnt_q == 6'd0)                          alu_cmd = (st_q == ST_IDIV) ? ALU_LDN : ALU_LDFDIVN;
        else if (cnt_q <= 6'd16)                    alu_cmd = (st_q == ST_IDIV) ? ALU_DIV : ALU_FDIVSUB;
        else if (cnt_q == 6'd38)                    alu_cmd = ALU_DIVRESQ;
        else if (cnt_q == 6'd39)                    alu_cmd = ALU_DIVRESR;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ next state
  dec_t        df;                 // decode of the byte being fetched
  logic [15:0] rel_target;
  logic [15:0] idx_base;
  logic [15:0] t_plus1;

  assign df         = decode((st_q == ST_FETCH) ? PG_0 : pg_q, data_in);
  assign rel_target = g.pc + 16'd1 + {{8{data_in[7]}}, data_in};
  assign idx_base   = dq.idx_y ? g.y : g.x;
  assign t_plus1    = g.t + 16'd1;

  // byte pushed in stacking step n (0 = PCL ... 8 = CCR)
  function automatic logic [7:0] stack_byte(input logic [5:0] n, input regs_t r);
    unique case (n)
      6'd0: return r.pc[7:0];
      6'd1: return r.pc[15:8];
      6'd2: return r.y[7:0];
      6'd3: return r.y[15:8];
      6'd4: return r.x[7:0];
      6'd5: return r.x[15:8];
      6'd6: return r.a;
      6'd7: return r.b;
      default: return r.ccr;
    endcase
  endfunction

  always_comb begin
    st_d      = st_q;
    ir_d      = ir_q;
    pg_d      = pg_q;
    md_d      = md_q;
    cnt_d     = cnt_q;
    vec_d     = vec_q;
    xint_d    = xint_q;
    take_d    = take_q;
    wai_d     = wai_q;
    rw_d      = 1'b1;
    wd_d      = wd_q;
    pc_op     = PTR_HOLD;
    sp_op     = PTR_HOLD;
    wr8_dst   = RD_NONE;
    wr8_data  = 8'h00;
    wr16_dst  = RW_NONE;
    wr16_data = 16'h0000;
    ccr_mask  = 8'h00;
    ccr_data  = alu_ccr;
    xgdx      = 1'b0;
    xgdy      = 1'b0;
    asel      = RA_PC;
    hi_sel    = AH_RF;
    lo_sel    = AL_RF;
    vec_lo    = 8'hFF;
    int_taken = 1'b0;

    unique case (st_q)
      // ---------------------------------------------------------------- START
      ST_START: begin
        vec_d  = reset_vec_lo;
        cnt_d  = 6'd0;
        st_d   = ST_LOAD_VECTOR;
        hi_sel = AH_FF; lo_sel = AL_VEC; vec_lo = reset_vec_lo;
      end

      // ---------------------------------------------------------------- FETCH
      ST_FETCH, ST_FETCH2: begin
        if (st_q == ST_FETCH && (xirq_req || irq_req)) begin
          // discard the fetched opcode and take the interrupt
          int_taken = 1'b1;
          xint_d = xirq_req;
          vec_d  = xirq_req ? VEC_XIRQ : irq_vec;
          wai_d  = 1'b0;
          cnt_d  = 6'd0;
          st_d   = ST_STACK;
          ir_d   = 8'h3F;      // stacking as for SWI
          pg_d   = PG_0;
          hi_sel = AH_FF; lo_sel = AL_VEC;
        end else if (st_q == ST_FETCH && (data_in == 8'h18 || data_in == 8'h1A || data_in == 8'hCD)) begin
          pc_op = PTR_INC;
          pg_d  = (data_in == 8'h18) ? PG_18 : (data_in == 8'h1A) ? PG_1A : PG_CD;
          st_d  = ST_FETCH2;
        end else begin
          ir_d  = data_in;
          if (st_q == ST_FETCH) pg_d = PG_0;
          pc_op = PTR_INC;
          cnt_d = 6'd0;
          unique case (df.mode)
            M_IMM8:  st_d = (df.op == O_ST8) ? ST_ERROR : ST_READ_EXEC_OP;
            M_IMM16: st_d = ST_READ_OP;
            M_DIR:   st_d = ST_DIR;
            M_EXT:   st_d = ST_EXT_HI;
            M_IND:   st_d = ST_IND_LO;
            M_REL:   st_d = ST_REL_LO;
            default: begin
              // inherent: next cycle reads the following byte without increment
              pc_op = PTR_INC;
              unique case (df.op)
                O_NOP, O_INH8, O_AB, O_CCR: st_d = ST_EXEC8;
                O_SHD:   st_d = ST_LOGIC16_LO;
                O_IDX16: st_d = ST_EXEC8;
                O_MUL:   st_d = ST_MUL;
                O_IDIV:  st_d = ST_IDIV;
                O_FDIV:  st_d = ST_FDIV;
                O_PSH8, O_PSH16, O_PUL8, O_PUL16, O_RTS, O_RTI, O_SWI, O_WAI: st_d = ST_STACK;
                O_STOP:  st_d = ST_EXEC8;
                O_TEST:  st_d = ST_TEST;
                default: st_d = ST_STACK;  // illegal opcode trap
              endcase
              if (df.op == O_ILL) begin
                ir_d  = 8'h3F;
                pg_d  = PG_0;
                vec_d = VEC_ILLOP;
                xint_d = 1'b0;
              end
              if (df.op == O_SWI) begin vec_d = VEC_SWI; xint_d = 1'b0; end
              if (df.op == O_WAI) xint_d = 1'b0;
            end
          endcase
          // illegal opcodes in addressing-mode columns
          if (df.op == O_ILL && df.mode != M_INH) begin
            ir_d   = 8'h3F;
            pg_d   = PG_0;
            vec_d  = VEC_ILLOP;
            xint_d = 1'b0;
            st_d   = ST_STACK;
          end
          // inherent ops whose second cycle is internal
          if (st_d == ST_STACK || st_d == ST_MUL || st_d == ST_IDIV || st_d == ST_FDIV ||
              st_d == ST_LOGIC16_LO || (df.mode == M_INH && df.op == O_IDX16)) begin
            pc_op = PTR_INC;
          end
          if (df.mode == M_INH) begin
            // inherent ops occupy one byte: keep PC on the next opcode
            pc_op = PTR_INC;
          end
        end
      end

      // ---------------------------------------------------------------- addressing
      ST_DIR: begin
        pc_op     = PTR_INC;
        wr16_dst  = RW_T;
        wr16_data = {8'h00, data_in};
        hi_sel    = AH_ZERO; lo_sel = AL_DATA;
        st_d      = ST_READ_EXEC_OP;
        unique case (dq.op)
          O_ST8, O_ST16: begin
            st_d = ST_WRITE2; rw_d = 1'b0;
            wd_d = (dq.op == O_ST8) ? (dq.rb ? g.b : g.a) : r16v[15:8];
            cnt_d = (dq.op == O_ST16) ? 6'd1 : 6'd0;
          end
          O_LD16, O_ALU16: st_d = ST_READ_OP;
          O_JSR: begin st_d = ST_STACK; hi_sel = AH_FF; lo_sel = AL_VEC; end
          default: ;
        endcase
      end

      ST_EXT_HI: begin
        pc_op    = PTR_INC;
        wr8_dst  = RD_TH;
        wr8_data = data_in;
        st_d     = ST_EXT_LO;
      end

      ST_EXT_LO: begin
        pc_op    = PTR_INC;
        wr8_dst  = RD_TL;
        wr8_data = data_in;
        asel     = RA_T;
        st_d     = ST_READ_EXEC_OP;
        unique case (dq.op)
          O_ST8, O_ST16: begin
            st_d = ST_WRITE2; rw_d = 1'b0;
            wd_d = (dq.op == O_ST8) ? (dq.rb ? g.b : g.a) : r16v[15:8];
            cnt_d = (dq.op == O_ST16) ? 6'd1 : 6'd0;
          end
          O_LD16, O_ALU16: st_d = ST_READ_OP;
          O_JMP: begin
            wr8_dst = RD_NONE;
            wr16_dst = RW_PC; wr16_data = {g.t[15:8], data_in};
            asel = RA_PC;
            st_d = ST_FETCH;
          end
          O_JSR: begin st_d = ST_STACK; asel = RA_PC; hi_sel = AH_FF; lo_sel = AL_VEC; end
          default: ;
        endcase
      end

      ST_IND_LO: begin
        pc_op     = PTR_INC;
        wr16_dst  = RW_T;
        wr16_data = idx_base + {8'h00, data_in};
        hi_sel    = AH_FF; lo_sel = AL_VEC;
        st_d      = ST_IND_HI;
      end

      ST_IND_HI: begin
        asel = RA_T;
        st_d = ST_READ_EXEC_OP;
        unique case (dq.op)
          O_ST8, O_ST16: begin
            st_d = ST_WRITE2; rw_d = 1'b0;
            wd_d = (dq.op == O_ST8) ? (dq.rb ? g.b : g.a) : r16v[15:8];
            cnt_d = (dq.op == O_ST16) ? 6'd1 : 6'd0;
          end
          O_LD16, O_ALU16: st_d = ST_READ_OP;
          O_JMP: begin
            wr16_dst = RW_PC; wr16_data = g.t;
            asel = RA_PC;
            st_d = ST_FETCH;
          end
          O_JSR: begin st_d = ST_STACK; hi_sel = AH_FF; lo_sel = AL_VEC; end
          default: ;
        endcase
      end

      ST_REL_LO: begin
        pc_op = PTR_INC;
        if (dq.op == O_BRSET || dq.op == O_BRCLR) begin
          wr16_dst = RW_T; wr16_data = rel_target;
        end else begin
          take_d = (dq.op == O_BSR) || branch_cond(ir_q[3:0], g.ccr);
          wr16_dst = RW_T; wr16_data = rel_target;
        end
        hi_sel = AH_FF; lo_sel = AL_VEC;
        st_d   = ST_REL_HI;
      end

      ST_REL_HI: begin
        if (dq.op == O_BSR) begin
          st_d = ST_STACK; hi_sel = AH_FF; lo_sel = AL_VEC;
        end else begin
          if (take_q) begin wr16_dst = RW_PC; wr16_data = g.t; end
          st_d = ST_FETCH;
        end
      end

      // ---------------------------------------------------------------- operand reads
      ST_READ_OP: begin
        // first (high) byte of a 16-bit operand
        md_d = data_in;
        if (dq.mode == M_IMM16) begin
          pc_op = PTR_INC;
        end else begin
          wr16_dst = RW_T; wr16_data = t_plus1; asel = RA_T;
        end
        st_d = (dq.op == O_ALU16) ? ST_ARITH16_LO : ST_READ_EXEC_OP;
      end

      ST_READ_EXEC_OP: begin
        if (dq.mode == M_IMM8 || dq.mode == M_IMM16) pc_op = PTR_INC;
        st_d = ST_FETCH;
        unique case (dq.op)
          O_ALU8, O_LD8: begin
            if (!dq.nowrite) begin wr8_dst = dq.rb ? RD_B : RD_A; wr8_data = alu_res; end
            ccr_mask = dq.mask;
          end
          O_LD16: begin
            wr16_dst  = r16_dst(dq.r16);
            wr16_data = {md_q, data_in};
            ccr_mask  = MK_NZV;
            ccr_data  = {4'h0, md_q[7], ({md_q, data_in} == 16'h0000), 2'b00};
          end
          O_RMW: begin
            ccr_mask = dq.mask;
            md_d     = alu_res;
            st_d     = ST_WRITE1;
            hi_sel = AH_FF; lo_sel = AL_VEC;
          end
          O_BSET, O_BCLR, O_BRSET, O_BRCLR: begin
            md_d = data_in;          // memory operand; mask follows
            st_d = ST_EXEC8;
          end
          default: ;
        endcase
      end

      ST_EXEC8: begin
        st_d = ST_FETCH;
        unique case (dq.op)
          O_INH8, O_AB: begin
            if (!dq.nowrite) begin
              if (dq.op == O_AB) wr8_dst = (ir_q[3:0] == 4'h6) ? RD_B : RD_A;
              else               wr8_dst = dq.rb ? RD_B : RD_A;
              wr8_data = alu_res;
            end
            ccr_mask = dq.mask;
          end
          O_CCR: begin
            unique case (ir_q[3:0])
              4'h6: begin                               // TAP: X can be cleared, not set
                ccr_mask = 8'hFF;
                ccr_data = {g.a[7], g.a[6] & g.ccr[CCR_X], g.a[5:0]};
              end
              4'h7: begin wr8_dst = RD_A; wr8_data = g.ccr; end   // TPA
              4'hA: begin ccr_mask = 8'h02; ccr_data = 8'h00; end // CLV
              4'hB: begin ccr_mask = 8'h02; ccr_data = 8'hFF; end // SEV
              4'hC: begin ccr_mask = 8'h01; ccr_data = 8'h00; end // CLC
              4'hD: begin ccr_mask = 8'h01; ccr_data = 8'hFF; end // SEC
              4'hE: begin ccr_mask = 8'h10; ccr_data = 8'h00; end // CLI
              default: begin ccr_mask = 8'h10; ccr_data = 8'hFF; end // SEI
            endcase
          end
          O_IDX16: begin
            if (cnt_q == 6'd0) begin
              st_d  = ST_EXEC8;          // second, internal cycle
              cnt_d = 6'd1;
              hi_sel = AH_FF; lo_sel = AL_VEC;
            end else begin
              unique case (ir_q)
                8'h08: begin wr16_dst = r16_dst(dq.r16); wr16_data = r16v + 16'd1;
                             ccr_mask = 8'h04; ccr_data = {5'd0, (r16v + 16'd1) == 16'h0000, 2'b00}; end
                8'h09: begin wr16_dst = r16_dst(dq.r16); wr16_data = r16v - 16'd1;
                             ccr_mask = 8'h04; ccr_data = {5'd0, (r16v - 16'd1) == 16'h0000, 2'b00}; end
                8'h30: begin wr16_dst = r16_dst(dq.r16); wr16_data = g.sp + 16'd1; end      // TSX
                8'h31: sp_op = PTR_INC;                                                      // INS
                8'h34: sp_op = PTR_DEC;                                                      // DES
                8'h35: begin wr16_dst = RW_SP; wr16_data = r16v - 16'd1; end                 // TXS
                8'h3A: begin wr16_dst = r16_dst(dq.r16); wr16_data = r16v + {8'h00, g.b}; end // ABX
                default: begin xgdx = !dq.idx_y; xgdy = dq.idx_y; end                        // XGDX
              endcase
            end
          end
          O_STOP: begin
            if (!g.ccr[CCR_S]) st_d = ST_STOP;
          end
          O_BSET, O_BCLR: begin
            // mask byte on the bus; result to be written back
            pc_op    = PTR_INC;
            md_d     = alu_res;
            ccr_mask = dq.mask;
            st_d     = ST_WRITE1;
            hi_sel = AH_FF; lo_sel = AL_VEC;
          end
          O_BRSET, O_BRCLR: begin
            pc_op  = PTR_INC;
            take_d = (alu_res == 8'h00);
            st_d   = ST_REL_LO;
          end
          default: ;
        endcase
      end

      // ---------------------------------------------------------------- 16-bit arithmetic
      ST_ARITH16_LO: begin
        if (dq.mode == M_IMM16) pc_op = PTR_INC;
        if (!dq.nowrite) begin
          unique case (dq.r16)
            R16_X:   wr8_dst = RD_XL;
            R16_Y:   wr8_dst = RD_YL;
            R16_SP:  wr8_dst = RD_SPL;
            default: wr8_dst = RD_B;
          endcase
          wr8_data = alu_res;
        end
        hi_sel = AH_FF; lo_sel = AL_VEC;
        st_d   = ST_ARITH16_HI;
      end

      ST_ARITH16_HI: begin
        if (!dq.nowrite) begin
          unique case (dq.r16)
            R16_X:   wr8_dst = RD_XH;
            R16_Y:   wr8_dst = RD_YH;
            R16_SP:  wr8_dst = RD_SPH;
            default: wr8_dst = RD_A;
          endcase
          wr8_data = alu_res;
        end
        ccr_mask = dq.mask;
        st_d     = ST_FETCH;
      end

      ST_LOGIC16_LO: begin
        wr8_dst  = (ir_q[3:0] == 4'h4) ? RD_A : RD_B;
        wr8_data = alu_res;
        hi_sel = AH_FF; lo_sel = AL_VEC;
        st_d     = ST_LOGIC16_HI;
      end

      ST_LOGIC16_HI: begin
        wr8_dst  = (ir_q[3:0] == 4'h4) ? RD_B : RD_A;
        wr8_data = alu_res;
        ccr_mask = MK_NZVC;
        if (ir_q[3:0] == 4'h4)   // LSRD: N = 0, V = C
          ccr_data = {alu_ccr[7:4], 1'b0, alu_ccr[CCR_Z], alu_ccr[CCR_C], alu_ccr[CCR_C]};
        st_d = ST_FETCH;
      end

      // ---------------------------------------------------------------- writes
      ST_WRITE1: begin
        // result prepared; the write follows (TST only reads)
        if (dq.op == O_RMW && dq.nowrite) begin
          hi_sel = AH_FF; lo_sel = AL_VEC;
          rw_d = 1'b1;
        end else begin
          asel = RA_T;
          rw_d = 1'b0;
        end
        wd_d = md_q;
        st_d = ST_WRITE2;
      end

      ST_WRITE2: begin
        if (dq.op == O_ST8) ccr_mask = dq.mask;
        if (dq.op == O_ST16 && cnt_q == 6'd1) begin
          wr16_dst  = RW_T; wr16_data = t_plus1; asel = RA_T;
          rw_d      = 1'b0;
          wd_d      = r16v[7:0];
          cnt_d     = 6'd0;
          ccr_mask  = MK_NZV;
          ccr_data  = {4'h0, r16v[15], (r16v == 16'h0000), 2'b00};
        end else begin
          st_d = ST_FETCH;
        end
      end

      // ---------------------------------------------------------------- multiply / divide
      ST_MUL: begin
        hi_sel = AH_FF; lo_sel = AL_VEC;
        if (cnt_q == 6'd8) begin
          wr16_dst = RW_D; wr16_data = alu_wide;
          ccr_mask = 8'h01;
          asel = RA_PC; hi_sel = AH_RF; lo_sel = AL_RF;
          st_d = ST_FETCH;
        end else cnt_d = cnt_q + 6'd1;
      end

      ST_IDIV, ST_FDIV: begin
        hi_sel = AH_FF; lo_sel = AL_VEC;
        if (cnt_q == 6'd38) begin
          wr16_dst = RW_X; wr16_data = alu_wide;
          ccr_mask = 8'h07;
        end
        if (cnt_q == 6'd39) begin
          wr16_dst = RW_D; wr16_data = alu_wide;
          asel = RA_PC; hi_sel = AH_RF; lo_sel = AL_RF;
          st_d = ST_FETCH;
        end else cnt_d = cnt_q + 6'd1;
      end

      // ---------------------------------------------------------------- stack
      ST_STACK: begin
        // internal cycle before stack accesses
        cnt_d = 6'd0;
        unique case (dq.op)
          O_PSH8: begin
            st_d = ST_PUSH; asel = RA_SP; rw_d = 1'b0; wd_d = dq.rb ? g.b : g.a;
          end
          O_PSH16, O_JSR, O_BSR: begin
            st_d = ST_PUSH; asel = RA_SP; rw_d = 1'b0;
            wd_d = (dq.op == O_PSH16) ? r16v[7:0] : g.pc[7:0];
          end
          O_PUL8, O_PUL16, O_RTS, O_RTI: begin
            st_d = ST_STACK_INCSP; hi_sel = AH_FF; lo_sel = AL_VEC;
          end
          default: begin   // SWI, WAI, interrupt, illegal opcode: stack all
            st_d = ST_PUSH; asel = RA_SP; rw_d = 1'b0; wd_d = g.pc[7:0];
          end
        endcase
      end

      ST_PUSH: begin
        sp_op = PTR_DEC;
        asel  = RA_SP;
        cnt_d = cnt_q + 6'd1;
        unique case (dq.op)
          O_PSH8: begin st_d = ST_FETCH; asel = RA_PC; end
          O_PSH16, O_JSR, O_BSR: begin
            if (cnt_q == 6'd0) begin
              rw_d = 1'b0;
              wd_d = (dq.op == O_PSH16) ? r16v[15:8] : g.pc[15:8];
            end else begin
              asel = RA_PC;
              st_d = ST_FETCH;
              if (dq.op != O_PSH16) begin wr16_dst = RW_PC; wr16_data = g.t; end
            end
          end
          default: begin
            if (cnt_q == 6'd8) begin
              if (dq.op == O_WAI || wai_q) begin
                st_d = ST_WAIT; hi_sel = AH_FF; lo_sel = AL_VEC;
              end else begin
                st_d = ST_SET_IMASK; hi_sel = AH_FF; lo_sel = AL_VEC;
              end
            end else begin
              rw_d = 1'b0;
              wd_d = stack_byte(cnt_q + 6'd1, g);
            end
          end
        endcase
      end

      ST_WAIT: begin
        hi_sel = AH_FF; lo_sel = AL_VEC;
        if (xirq_req || irq_req) begin
          int_taken = 1'b1;
          xint_d = xirq_req;
          vec_d  = xirq_req ? VEC_XIRQ : irq_vec;
          st_d   = ST_SET_IMASK;
        end
      end

      ST_STOP: begin
        hi_sel = AH_FF; lo_sel = AL_VEC;
        if (xirq_req || irq_req) begin
          st_d = ST_FETCH;      // resume; the request is taken at the fetch
          asel = RA_PC; hi_sel = AH_RF; lo_sel = AL_RF;
        end
      end

      ST_SET_IMASK: begin
        ccr_mask = xint_q ? 8'h50 : 8'h10;
        ccr_data = 8'hFF;
        hi_sel = AH_FF; lo_sel = AL_VEC; vec_lo = vec_q;
        cnt_d  = 6'd0;
        st_d   = ST_LOAD_VECTOR;
      end

      ST_LOAD_VECTOR: begin
        if (cnt_q == 6'd0) begin
          md_d   = data_in;
          cnt_d  = 6'd1;
          hi_sel = AH_FF; lo_sel = AL_VEC; vec_lo = vec_q + 8'd1;
        end else begin
          wr16_dst = RW_PC; wr16_data = {md_q, data_in};
          st_d     = ST_FETCH;
        end
      end

      ST_STACK_INCSP: begin
        sp_op = PTR_INC;
        asel  = RA_SP;
        cnt_d = 6'd0;
        st_d  = ST_PULL;
      end

      ST_PULL: begin
        cnt_d = cnt_q + 6'd1;
        asel  = RA_SP;
        unique case (dq.op)
          O_PUL8: begin
            wr8_dst = dq.rb ? RD_B : RD_A; wr8_data = data_in;
            asel = RA_PC; st_d = ST_FETCH;
          end
          O_PUL16, O_RTS: begin
            if (cnt_q == 6'd0) begin
              md_d = data_in; sp_op = PTR_INC;
            end else begin
              wr16_dst  = (dq.op == O_RTS) ? RW_PC : r16_dst(dq.r16);
              wr16_data = {md_q, data_in};
              asel = RA_PC; st_d = ST_FETCH;
            end
          end
          default: begin   // RTI: CCR, B, A, XH, XL, YH, YL, PCH, PCL
            sp_op = PTR_INC;
            unique case (cnt_q)
              6'd0: begin ccr_mask = 8'hFF; ccr_data = {data_in[7], data_in[6] & g.ccr[CCR_X], data_in[5:0]}; end
              6'd1: begin wr8_dst = RD_B;  wr8_data = data_in; end
              6'd2: begin wr8_dst = RD_A;  wr8_data = data_in; end
              6'd3: begin wr8_dst = RD_XH; wr8_data = data_in; end
              6'd4: begin wr8_dst = RD_XL; wr8_data = data_in; end
              6'd5: begin wr8_dst = RD_YH; wr8_data = data_in; end
              6'd6: begin wr8_dst = RD_YL; wr8_data = data_in; end
              6'd7: md_d = data_in;
              default: begin
                sp_op = PTR_HOLD;
                wr16_dst = RW_PC; wr16_data = {md_q, data_in};
                asel = RA_PC; st_d = ST_FETCH;
              end
            endcase
          end
        endcase
      end

      // ---------------------------------------------------------------- TEST
      ST_TEST: begin
        wr16_dst = RW_T; wr16_data = t_plus1; asel = RA_T;
      end

      default: begin   // ST_ERROR: should never be reached; restart via reset vector
        st_d = ST_START;
        hi_sel = AH_FF; lo_sel = AL_VEC;
      end
    endcase

    // every path back to ST_FETCH reads at PC unless it set a jump
    if (st_d == ST_FETCH && st_q != ST_FETCH && st_q != ST_FETCH2 && st_q != ST_STOP) begin
      asel = RA_PC; hi_sel = AH_RF; lo_sel = AL_RF;
    end
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= ST_START;
      ir_q      <= 8'h01;
      pg_q      <= PG_0;
      md_q      <= 8'h00;
      cnt_q     <= 6'd0;
      vec_q     <= VEC_RESET;
      xint_q    <= 1'b0;
      take_q    <= 1'b0;
      wai_q     <= 1'b0;
      rw_q      <= 1'b1;
      wd_q      <= 8'h00;
      initcnt_q <= 7'd0;
    end else if (e_fall_en) begin
      st_q   <= st_d;
      ir_q   <= ir_d;
      pg_q   <= pg_d;
      md_q   <= md_d;
      cnt_q  <= cnt_d;
      vec_q  <= vec_d;
      xint_q <= xint_d;
      take_q <= take_d;
      wai_q  <= wai_d;
      rw_q   <= rw_d;
      wd_q   <= wd_d;
      if (initcnt_q != 7'd64) initcnt_q <= initcnt_q + 7'd1;
    end
  end

  assign rw           = rw_q;
  assign data_out     = wd_q;
  assign init_timeout = (initcnt_q == 7'd64);
  assign state        = st_q;
  assign regs         = g;
  assign alu_result   = alu_res;
  assign opcode_fetch = (st_q == ST_FETCH);

endmodule
