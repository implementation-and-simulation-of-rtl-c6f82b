// hc11_pkg: types and constants shared by the MC68HC11-compatible microcontroller.
//
// Holds the ALU command codes (the numeric codes of the ALU command table of the
// design), the condition-code bit positions, the register-file select encodings
// used between the CPU controller and the register file, the address-source
// selects of the address bus controller, the CPU controller states and the
// offsets of the on-chip peripheral registers in the $1000-$103F block (the
// MC68HC11E9 register map).
package hc11_pkg;

  // ---------------------------------------------------------------- ALU commands
  typedef enum logic [4:0] {
    ALU_NOP       = 5'h00,
    ALU_ADD       = 5'h01,
    ALU_INC       = 5'h02,
    ALU_SUB       = 5'h03,
    ALU_DEC       = 5'h04,
    ALU_AND       = 5'h05,
    ALU_OR        = 5'h06,
    ALU_XOR       = 5'h07,
    ALU_ADDWC     = 5'h08,
    ALU_SUBWC     = 5'h09,
    ALU_CLR       = 5'h0A,
    ALU_LSL       = 5'h0B,
    ALU_ASR       = 5'h0C,
    ALU_LSR       = 5'h0D,
    ALU_ROL       = 5'h0E,
    ALU_ROR       = 5'h0F,
    ALU_COM       = 5'h10,
    ALU_NEG       = 5'h11,
    ALU_DAA       = 5'h12,
    ALU_ADDSIGNED = 5'h13,
    ALU_ANDINV    = 5'h14,
    ALU_ANDINV2   = 5'h15,
    ALU_STRMUL    = 5'h16,
    ALU_MUL       = 5'h17,
    ALU_ENDMUL    = 5'h18,
    ALU_TST       = 5'h19,
    ALU_LDN       = 5'h1A,
    ALU_DIV       = 5'h1B,
    ALU_DIVRESQ   = 5'h1C,
    ALU_DIVRESR   = 5'h1D,
    ALU_FDIVSUB   = 5'h1E,
    ALU_LDFDIVN   = 5'h1F
  } alu_cmd_e;

  // ALU instruction type: an 8-bit operation / the low byte of a 16-bit one, or
  // the high byte of a 16-bit operation (carry and Z chained from the low byte).
  typedef enum logic {
    ITYPE_8BIT = 1'b0,
    ITYPE_HIGH = 1'b1
  } alu_itype_e;

  // -------------------------------------------------------- condition code bits
  localparam int CCR_C = 0;
  localparam int CCR_V = 1;
  localparam int CCR_Z = 2;
  localparam int CCR_N = 3;
  localparam int CCR_I = 4;
  localparam int CCR_H = 5;
  localparam int CCR_X = 6;
  localparam int CCR_S = 7;

  // ------------------------------------------------------- register file selects
  // 8-bit write destinations
  typedef enum logic [3:0] {
    RD_NONE = 4'd0,
    RD_A    = 4'd1,
    RD_B    = 4'd2,
    RD_XH   = 4'd3,
    RD_XL   = 4'd4,
    RD_YH   = 4'd5,
    RD_YL   = 4'd6,
    RD_SPH  = 4'd7,
    RD_SPL  = 4'd8,
    RD_PCH  = 4'd9,
    RD_PCL  = 4'd10,
    RD_CCR  = 4'd11,
    RD_TH   = 4'd12,
    RD_TL   = 4'd13
  } rf_dst8_e;

  // 16-bit write destinations
  typedef enum logic [2:0] {
    RW_NONE = 3'd0,
    RW_D    = 3'd1,
    RW_X    = 3'd2,
    RW_Y    = 3'd3,
    RW_SP   = 3'd4,
    RW_PC   = 3'd5,
    RW_T    = 3'd6
  } rf_dst16_e;

  // pointer updates
  typedef enum logic [1:0] {
    PTR_HOLD = 2'd0,
    PTR_INC  = 2'd1,
    PTR_DEC  = 2'd2
  } ptr_op_e;

  // 16-bit register presented on the register-file address output
  typedef enum logic [2:0] {
    RA_PC = 3'd0,
    RA_SP = 3'd1,
    RA_X  = 3'd2,
    RA_Y  = 3'd3,
    RA_T  = 3'd4
  } rf_asel_e;

  typedef struct packed {
    logic [7:0]  a;
    logic [7:0]  b;
    logic [15:0] x;
    logic [15:0] y;
    logic [15:0] sp;
    logic [15:0] pc;
    logic [7:0]  ccr;
    logic [15:0] t;     // temporary (effective address / operand holder)
  } regs_t;

  // ----------------------------------------------- address bus controller selects
  typedef enum logic [1:0] {
    AH_RF   = 2'd0,   // register-file address output, high byte
    AH_ALU  = 2'd1,   // ALU result
    AH_ZERO = 2'd2,   // $00 (direct addressing)
    AH_FF   = 2'd3    // $FF (vector page)
  } addr_hi_sel_e;

  typedef enum logic [1:0] {
    AL_RF   = 2'd0,   // register-file address output, low byte
    AL_DATA = 2'd1,   // byte on the data bus
    AL_ALU  = 2'd2,   // ALU result
    AL_VEC  = 2'd3    // interrupt vector low byte from the controller
  } addr_lo_sel_e;

  // ------------------------------------------------------------ CPU states
  typedef enum logic [4:0] {
    ST_START,
    ST_FETCH,
    ST_FETCH2,
    ST_EXT_HI,
    ST_EXT_LO,
    ST_IND_LO,
    ST_IND_HI,
    ST_REL_LO,
    ST_REL_HI,
    ST_DIR,
    ST_EXEC8,
    ST_ARITH16_LO,
    ST_ARITH16_HI,
    ST_LOGIC16_LO,
    ST_LOGIC16_HI,
    ST_READ_OP,
    ST_READ_EXEC_OP,
    ST_WRITE1,
    ST_WRITE2,
    ST_MUL,
    ST_IDIV,
    ST_FDIV,
    ST_STACK,
    ST_STACK_INCSP,
    ST_PUSH,
    ST_PULL,
    ST_SET_IMASK,
    ST_LOAD_VECTOR,
    ST_TEST,
    ST_ERROR,
    ST_WAIT,
    ST_STOP
  } cpu_state_e;

  // ------------------------------------------- register block ($1000-$103F) offsets
  localparam logic [5:0] R_PORTA  = 6'h00;
  localparam logic [5:0] R_PIOC   = 6'h02;
  localparam logic [5:0] R_PORTC  = 6'h03;
  localparam logic [5:0] R_PORTB  = 6'h04;
  localparam logic [5:0] R_PORTCL = 6'h05;
  localparam logic [5:0] R_DDRC   = 6'h07;
  localparam logic [5:0] R_PORTD  = 6'h08;
  localparam logic [5:0] R_DDRD   = 6'h09;
  localparam logic [5:0] R_PORTE  = 6'h0A;
  localparam logic [5:0] R_CFORC  = 6'h0B;
  localparam logic [5:0] R_OC1M   = 6'h0C;
  localparam logic [5:0] R_OC1D   = 6'h0D;
  localparam logic [5:0] R_TCNTH  = 6'h0E;
  localparam logic [5:0] R_TCNTL  = 6'h0F;
  localparam logic [5:0] R_TIC1H  = 6'h10;   // TIC1..TIC3 at $10..$15
  localparam logic [5:0] R_TOC1H  = 6'h16;   // TOC1..TOC4 at $16..$1D
  localparam logic [5:0] R_TI4O5H = 6'h1E;   // TOC5 at $1E..$1F
  localparam logic [5:0] R_TCTL1  = 6'h20;
  localparam logic [5:0] R_TCTL2  = 6'h21;
  localparam logic [5:0] R_TMSK1  = 6'h22;
  localparam logic [5:0] R_TFLG1  = 6'h23;
  localparam logic [5:0] R_TMSK2  = 6'h24;
  localparam logic [5:0] R_TFLG2  = 6'h25;
  localparam logic [5:0] R_PACTL  = 6'h26;
  localparam logic [5:0] R_PACNT  = 6'h27;
  localparam logic [5:0] R_SPCR   = 6'h28;
  localparam logic [5:0] R_SPSR   = 6'h29;
  localparam logic [5:0] R_SPDR   = 6'h2A;
  localparam logic [5:0] R_BAUD   = 6'h2B;
  localparam logic [5:0] R_SCCR1  = 6'h2C;
  localparam logic [5:0] R_SCCR2  = 6'h2D;
  localparam logic [5:0] R_SCSR   = 6'h2E;
  localparam logic [5:0] R_SCDR   = 6'h2F;
  localparam logic [5:0] R_OPTION = 6'h39;
  localparam logic [5:0] R_COPRST = 6'h3A;
  localparam logic [5:0] R_PPROG  = 6'h3B;
  localparam logic [5:0] R_HPRIO  = 6'h3C;
  localparam logic [5:0] R_INIT   = 6'h3D;
  localparam logic [5:0] R_CONFIG = 6'h3F;

  // PPROG bits
  localparam int PP_EEPGM = 0;
  localparam int PP_EELAT = 1;
  localparam int PP_ERASE = 2;
  localparam int PP_ROW   = 3;
  localparam int PP_BYTE  = 4;

  // Interrupt vector low bytes (page $FF)
  localparam logic [7:0] VEC_SCI   = 8'hD6;
  localparam logic [7:0] VEC_SPI   = 8'hD8;
  localparam logic [7:0] VEC_PAI   = 8'hDA;
  localparam logic [7:0] VEC_PAOV  = 8'hDC;
  localparam logic [7:0] VEC_TOF   = 8'hDE;
  localparam logic [7:0] VEC_TOC5  = 8'hE0;
  localparam logic [7:0] VEC_TOC4  = 8'hE2;
  localparam logic [7:0] VEC_TOC3  = 8'hE4;
  localparam logic [7:0] VEC_TOC2  = 8'hE6;
  localparam logic [7:0] VEC_TOC1  = 8'hE8;
  localparam logic [7:0] VEC_TIC3  = 8'hEA;
  localparam logic [7:0] VEC_TIC2  = 8'hEC;
  localparam logic [7:0] VEC_TIC1  = 8'hEE;
  localparam logic [7:0] VEC_RTI   = 8'hF0;
  localparam logic [7:0] VEC_IRQ   = 8'hF2;
  localparam logic [7:0] VEC_XIRQ  = 8'hF4;
  localparam logic [7:0] VEC_SWI   = 8'hF6;
  localparam logic [7:0] VEC_ILLOP = 8'hF8;
  localparam logic [7:0] VEC_COP   = 8'hFA;
  localparam logic [7:0] VEC_CMF   = 8'hFC;
  localparam logic [7:0] VEC_RESET = 8'hFE;

endpackage
