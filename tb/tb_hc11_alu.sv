// tb_hc11_alu: self-checking test of the ALU.
//
// 1. The fifteen reference vectors of the design's ALU test (command, operand 1,
//    operand 2, carry in -> result and the N Z V C flags).
// 2. Random operands for the two-operand and unary commands, against a
//    reference model written here from the M68HC11 flag rules.
// 3. Multi-step sequences: MUL (STRMUL, 7 x MUL, ENDMUL), IDIV and FDIV (load,
//    16 steps, DIVRESQ, DIVRESR) with random operands, against integer
//    arithmetic.
// 4. Timing: outputs change only on the PH2 falling-edge enable, one clock
//    after the operands are applied.
module tb_hc11_alu;
  import hc11_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ph2_fall_en = 1'b0;
  alu_cmd_e    cmd = ALU_NOP;
  alu_itype_e  itype = ITYPE_8BIT;
  logic [7:0]  op_a = '0, op_b = '0, ccr_in = '0;
  logic [15:0] num_in = '0, den_in = '0;
  logic [7:0]  result, ccr_out;
  logic [15:0] wide_out;

  hc11_alu u_dut (.clk, .rst_n, .ph2_fall_en, .cmd, .itype, .op_a, .op_b, .ccr_in,
                  .num_in, .den_in, .result, .ccr_out, .wide_out);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // apply one command and strobe the ALU
  task automatic op(input alu_cmd_e c, input logic [7:0] a, input logic [7:0] b, input logic cy);
    @(negedge clk);
    cmd = c; op_a = a; op_b = b; ccr_in = {7'd0, cy};
    @(negedge clk);
    ph2_fall_en = 1'b1;
    @(negedge clk);
    ph2_fall_en = 1'b0;
  endtask

  task automatic vec(input alu_cmd_e c, input logic [7:0] a, input logic [7:0] b,
                     input logic cy, input logic [7:0] r, input logic [3:0] f);
    op(c, a, b, cy);
    check(result == r && ccr_out[3:0] == f,
          $sformatf("%s %h,%h,c=%0d -> %h/%h, expected %h/%h", c.name(), a, b, cy,
                    result, ccr_out[3:0], r, f));
  endtask

  // reference flags for random tests: {N,Z,V,C}
  function automatic logic [11:0] model(input alu_cmd_e c, input logic [7:0] a,
                                        input logic [7:0] b, input logic cy);
    logic [8:0] s;
    logic [7:0] r;
    logic v, k;
    v = 1'b0; k = cy; r = 8'h00;
    unique case (c)
      ALU_ADD:   begin s = a + b;      r = s[7:0]; k = s[8]; v = (a[7] == b[7]) && (r[7] != a[7]); end
      ALU_ADDWC: begin s = a + b + cy; r = s[7:0]; k = s[8]; v = (a[7] == b[7]) && (r[7] != a[7]); end
      ALU_SUB:   begin s = {1'b0, a} - {1'b0, b}; r = s[7:0]; k = (b > a); v = (a[7] != b[7]) && (r[7] != a[7]); end
      ALU_AND:   r = a & b;
      ALU_OR:    r = a | b;
      ALU_XOR:   r = a ^ b;
      ALU_INC:   begin r = b + 1; v = (b == 8'h7F); end
      ALU_DEC:   begin r = b - 1; v = (b == 8'h80); end
      ALU_NEG:   begin r = -b; v = (b == 8'h80); k = (b != 0); end
      ALU_LSR:   begin r = b >> 1; k = b[0]; v = k; end
      default:   r = 8'h00;
    endcase
    return {r, r[7], r == 0, v, k};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. reference vectors of the design's ALU test
    vec(ALU_ADD, 8'hF5, 8'hC8, 0, 8'hBD, 4'h9);
    vec(ALU_INC, 8'hFF, 8'h00, 0, 8'h01, 4'h0);
    vec(ALU_SUB, 8'hC0, 8'hF0, 0, 8'hD0, 4'h9);
    vec(ALU_DEC, 8'h00, 8'hFF, 0, 8'hFE, 4'h8);
    vec(ALU_AND, 8'hAA, 8'hF0, 0, 8'hA0, 4'h8);
    vec(ALU_OR,  8'h0F, 8'h55, 0, 8'h5F, 4'h0);
    vec(ALU_XOR, 8'h55, 8'h0F, 0, 8'h5A, 4'h0);
    vec(ALU_COM, 8'h00, 8'hAA, 0, 8'h55, 4'h1);
    vec(ALU_NEG, 8'h00, 8'hAA, 0, 8'h56, 4'h1);
    vec(ALU_LSL, 8'h82, 8'hAA, 0, 8'h54, 4'h3);
    vec(ALU_ASR, 8'h88, 8'h81, 0, 8'hC0, 4'h9);
    vec(ALU_LSR, 8'h55, 8'hA1, 0, 8'h50, 4'h3);
    vec(ALU_ROL, 8'h52, 8'h43, 1, 8'h87, 4'hA);
    vec(ALU_ROR, 8'h52, 8'h43, 1, 8'hA1, 4'h9);   // V = N xor C
    vec(ALU_DAA, 8'h7C, 8'h00, 0, 8'h82, 4'hA);

    // 2. random two-operand and unary commands
    for (int i = 0; i < 300; i++) begin
      alu_cmd_e cs [10] = '{ALU_ADD, ALU_ADDWC, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
                            ALU_INC, ALU_DEC, ALU_NEG, ALU_LSR};
      alu_cmd_e c;
      logic [7:0] a, b;
      logic cy;
      logic [11:0] m;
      c  = cs[$urandom_range(0, 9)];
      a  = 8'($urandom);
      b  = 8'($urandom);
      cy = 1'($urandom);
      m  = model(c, a, b, cy);
      op(c, a, b, cy);
      check(result == m[11:4] && ccr_out[3:0] == m[3:0],
            $sformatf("random %s %h,%h,%0d -> %h/%h expected %h/%h", c.name(), a, b, cy,
                      result, ccr_out[3:0], m[11:4], m[3:0]));
    end

    // 3a. multiply
    for (int i = 0; i < 20; i++) begin
      logic [7:0] a, b;
      logic [15:0] p;
      a = 8'($urandom);
      b = 8'($urandom);
      p = a * b;
      op(ALU_STRMUL, a, b, 0);
      repeat (7) op(ALU_MUL, 8'h00, 8'h00, 0);
      op(ALU_ENDMUL, 8'h00, 8'h00, 0);
      check(wide_out == p && ccr_out[0] == p[7],
            $sformatf("MUL %h*%h = %h, C=%0d", a, b, wide_out, ccr_out[0]));
    end

    // 3b. integer and fractional divide
    for (int i = 0; i < 20; i++) begin
      logic [15:0] n, d, q, r;
      logic frac;
      frac = (i % 2) == 1;
      d = 16'($urandom_range(1, 65535));
      n = frac ? 16'($urandom_range(0, int'(d) - 1)) : 16'($urandom);
      if (i == 0) d = 16'h0000;   // divide by zero: C set
      @(negedge clk);
      num_in = n; den_in = d;
      op(frac ? ALU_LDFDIVN : ALU_LDN, 8'h00, 8'h00, 0);
      repeat (16) op(frac ? ALU_FDIVSUB : ALU_DIV, 8'h00, 8'h00, 0);
      op(ALU_DIVRESQ, 8'h00, 8'h00, 0);
      q = wide_out;
      check(ccr_out[0] == (d == 0), $sformatf("divide by zero flag for %h/%h", n, d));
      if (d != 0) begin
        logic [31:0] nn;
        nn = frac ? {n, 16'h0000} : {16'h0000, n};
        check(q == 16'(nn / d), $sformatf("%s %h/%h quotient %h", frac ? "FDIV" : "IDIV", n, d, q));
        check(ccr_out[2] == (q == 0), "divide Z flag");
        op(ALU_DIVRESR, 8'h00, 8'h00, 0);
        r = wide_out;
        check(r == 16'(nn % d), $sformatf("remainder of %h/%h = %h", n, d, r));
      end
    end

    // 4. latency: the result register follows the PH2 falling-edge enable
    @(negedge clk);
    cmd = ALU_ADD; op_a = 8'h01; op_b = 8'h02; ccr_in = 8'h00;
    repeat (3) @(negedge clk);
    op(ALU_ADD, 8'h10, 8'h20, 0);
    @(negedge clk);
    cmd = ALU_ADD; op_a = 8'h01; op_b = 8'h01;
    repeat (3) @(negedge clk);
    check(result == 8'h30, "result holds without the PH2 falling-edge enable");
    ph2_fall_en = 1'b1;
    @(negedge clk);
    ph2_fall_en = 1'b0;
    check(result == 8'h02, "result updates one clock after the enable");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
