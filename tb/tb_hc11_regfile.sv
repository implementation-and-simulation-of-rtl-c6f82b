// tb_hc11_regfile: self-checking test of the CPU register file.
//
// Applies random combinations of the register-file controls (PC/SP step,
// byte write, word write, CCR mask write, XGDX/XGDY) for many cycles and
// compares all registers against a reference model kept here. Also checks
// that addr_out shows the next value of the selected register in the same
// cycle, that nothing changes without the enable, and the reset values
// (all zero, CCR = $D0).
module tb_hc11_regfile;
  import hc11_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        en = 1'b0;
  ptr_op_e     pc_op = PTR_HOLD, sp_op = PTR_HOLD;
  rf_dst8_e    wr8_dst = RD_NONE;
  rf_dst16_e   wr16_dst = RW_NONE;
  logic [7:0]  wr8_data = '0, ccr_mask = '0, ccr_data = '0;
  logic [15:0] wr16_data = '0;
  logic        xgdx = 1'b0, xgdy = 1'b0;
  rf_asel_e    asel = RA_PC;
  regs_t       regs;
  logic [15:0] addr_out;

  hc11_regfile u_dut (.clk, .rst_n, .en, .pc_op, .sp_op, .wr8_dst, .wr8_data, .wr16_dst,
                      .wr16_data, .ccr_mask, .ccr_data, .xgdx, .xgdy, .asel, .regs, .addr_out);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  regs_t m, n;

  initial begin
    repeat (2) @(negedge clk);
    check(regs.ccr == 8'hD0 && regs.a == 0 && regs.pc == 0 && regs.sp == 0, "reset values");
    rst_n = 1'b1;
    m = regs;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en        = ($urandom_range(0, 9) != 0);
      pc_op     = ptr_op_e'($urandom_range(0, 2));
      sp_op     = ptr_op_e'($urandom_range(0, 2));
      wr8_dst   = ($urandom_range(0, 1) == 0) ? RD_NONE : rf_dst8_e'($urandom_range(1, 13));
      wr8_data  = 8'($urandom);
      wr16_dst  = ($urandom_range(0, 2) == 0) ? rf_dst16_e'($urandom_range(1, 6)) : RW_NONE;
      wr16_data = 16'($urandom);
      ccr_mask  = ($urandom_range(0, 2) == 0) ? 8'($urandom) : 8'h00;
      ccr_data  = 8'($urandom);
      xgdx      = ($urandom_range(0, 15) == 0);
      xgdy      = !xgdx && ($urandom_range(0, 15) == 0);
      asel      = rf_asel_e'($urandom_range(0, 4));
      // reference model, same precedence as the documented controls
      n = m;
      if (pc_op == PTR_INC) n.pc = m.pc + 1; else if (pc_op == PTR_DEC) n.pc = m.pc - 1;
      if (sp_op == PTR_INC) n.sp = m.sp + 1; else if (sp_op == PTR_DEC) n.sp = m.sp - 1;
      if (xgdx) begin {n.a, n.b} = m.x; n.x = {m.a, m.b}; end
      if (xgdy) begin {n.a, n.b} = m.y; n.y = {m.a, m.b}; end
      n.ccr = (m.ccr & ~ccr_mask) | (ccr_data & ccr_mask);
      case (wr8_dst)
        RD_A: n.a = wr8_data;            RD_B: n.b = wr8_data;
        RD_XH: n.x[15:8] = wr8_data;     RD_XL: n.x[7:0] = wr8_data;
        RD_YH: n.y[15:8] = wr8_data;     RD_YL: n.y[7:0] = wr8_data;
        RD_SPH: n.sp[15:8] = wr8_data;   RD_SPL: n.sp[7:0] = wr8_data;
        RD_PCH: n.pc[15:8] = wr8_data;   RD_PCL: n.pc[7:0] = wr8_data;
        RD_CCR: n.ccr = wr8_data;
        RD_TH: n.t[15:8] = wr8_data;     RD_TL: n.t[7:0] = wr8_data;
        default: ;
      endcase
      case (wr16_dst)
        RW_D: {n.a, n.b} = wr16_data;  RW_X: n.x = wr16_data;  RW_Y: n.y = wr16_data;
        RW_SP: n.sp = wr16_data;       RW_PC: n.pc = wr16_data; RW_T: n.t = wr16_data;
        default: ;
      endcase
      #1;
      case (asel)
        RA_PC: check(addr_out == n.pc, "addr_out shows next PC");
        RA_SP: check(addr_out == n.sp, "addr_out shows next SP");
        RA_X:  check(addr_out == n.x,  "addr_out shows next X");
        RA_Y:  check(addr_out == n.y,  "addr_out shows next Y");
        default: check(addr_out == n.t, "addr_out shows next T");
      endcase
      @(posedge clk);
      #1;
      if (en) m = n;
      check(regs == m, $sformatf("registers after cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
