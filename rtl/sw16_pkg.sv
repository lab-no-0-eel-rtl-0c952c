// sw16_pkg: types and constants shared by the Sweet16 processor.
//
// The Sweet16 is a 16-bit microprogrammed CISC machine. Its datapath is
// driven by a 42-bit command bus that comes out of a 56-bit microword (42
// command bits plus a 14-bit sequencer field). The command bus layout below
// follows the published field order (AMUXSEL in bits 41:40 down to WR_STR in
// bit 0). The encodings of the individual field values, the sequencer field
// and most opcodes are this design's own choices; the opcodes that the
// reference material names (B, CALL, JMP, CALLX, JMPX, STA, STAX, LDA, LDAX,
// ADDR, LDR, UDIVR, LSUBI, LDI and those read from its mulrom ROM image) keep
// their published values.
//
// Instruction word: opcode[15:8], r1[7:4], r2[3:0]. Some instructions carry a
// second word (immediate, absolute address, branch offset or index base).
// Memory is byte addressed and big endian; the PC steps by 2 per word.
//
// From the Sweet16 lab design: the 42-bit command-bus field list and widths,
// the 20x16 register array, the opcodes of LDSPR, CLRC, RET, RORC, B, CALL,
// JMP, CALLX, JMPX, STA, STAX, LDA, LDAX, ADDR, LDR, UDIVR, LSUBI, LDI and
// GFO, branch code 0 = carry clear, the multiply test program (0xABBA *
// 0xDABA) and its loop structure.
// Own choices: the enum encodings of every command field, the 14-bit sequencer
// encoding, the opcodes of UMULR (2D), ADCLR (2F), ADDI (31) and UMULI (3D),
// branch codes 1-F, the use of registers 16-19 as PC, SP, TMP, TMP2, the
// microprogram word addresses, and the test program's stack at 0x1000 (top of
// RAM).
package sw16_pkg;

  // ------------------------------------------------------------------
  // Register array: 16 general registers plus four for the controller.
  // ------------------------------------------------------------------
  localparam int unsigned NREGS = 20;
  localparam logic [4:0] R_PC   = 5'd16;
  localparam logic [4:0] R_SP   = 5'd17;
  localparam logic [4:0] R_TMP  = 5'd18;
  localparam logic [4:0] R_TMP2 = 5'd19;

  // ------------------------------------------------------------------
  // ALU function select (FSEL), from the ALU function map.
  // ------------------------------------------------------------------
  typedef enum logic [3:0] {
    F_ADD   = 4'h0,  // A + B + Cin
    F_BPC   = 4'h1,  // B + Cin
    F_ASUBB = 4'h2,  // A + ~B + Cin
    F_BSUBA = 4'h3,  // ~A + B + Cin
    F_AND   = 4'h4,
    F_OR    = 4'h5,
    F_XOR   = 4'h6,
    F_NOTA  = 4'h7,
    F_ADEC  = 4'h8,  // A + 0xFFFF + Cin (passes A when Cin = 1)
    F_BDEC  = 4'h9,  // B + 0xFFFF + Cin (passes B when Cin = 1)
    F_UMUL  = 4'hA,  // i1 ? A + B : B
    F_SMUL  = 4'hB,  // i1 ? A + B : B (signed iterate)
    F_SMULT = 4'hC,  // i1 ? B - A : B (signed terminate)
    F_NDIV  = 4'hD,  // i0 ? B - A : A + B
    F_ZERO  = 4'hE,  // 0, for later expansion
    F_ZERO2 = 4'hF   // 0, for later expansion
  } alu_fn_e;

  // Register address multiplexers (AMUXSEL / BMUXSEL).
  typedef enum logic [1:0] {
    RM_R1  = 2'd0,  // IR.r1 field
    RM_R2  = 2'd1,  // IR.r2 field
    RM_PL  = 2'd2,  // constant from the microword (PL_REGA / PL_REGB)
    RM_TGL = 2'd3   // A: {IR.r2[3:1], PL[0]}, B: {IR.r1[3:1], PL[0]}
  } regmux_e;

  // ALU A-input selector (RSEL).
  typedef enum logic [1:0] {
    RS_DIN  = 2'd0,  // internal data bus (memory data, long immediate, offset)
    RS_SIMM = 2'd1,  // short immediate: IR.r2 zero extended
    RS_SOFF = 2'd2,  // short offset: IR[7:0] sign extended
    RS_REG  = 2'd3   // register array port A
  } rsel_e;

  // Carry-in select (CNSEL).
  typedef enum logic [1:0] {
    CN_ZERO = 2'd0, CN_ONE = 2'd1, CN_C = 2'd2, CN_UC = 2'd3
  } cnsel_e;

  // ALU shifter operation (F_SHFT_SEL).
  typedef enum logic [1:0] {
    SH_PASS = 2'd0, SH_LEFT = 2'd1, SH_RIGHT = 2'd2, SH_ASR = 2'd3
  } fshift_e;

  // ALU shifter serial input (FSI_SEL).
  typedef enum logic [1:0] {
    FI_ZERO = 2'd0, FI_COUT = 2'd1, FI_QSO = 2'd2, FI_C = 2'd3
  } fsi_e;

  // Q shifter operation (Q_SHFT_SEL).
  typedef enum logic [1:0] {
    Q_HOLD = 2'd0, Q_LOAD = 2'd1, Q_RIGHT = 2'd2, Q_LEFT = 2'd3
  } qshift_e;

  // Q shifter serial input (QSI_SEL).
  typedef enum logic [1:0] {
    QI_ZERO = 2'd0, QI_FSO = 2'd1, QI_UC = 2'd2, QI_ONE = 2'd3
  } qsi_e;

  // Status register write mode (SR_WR).
  typedef enum logic [2:0] {
    SR_NONE   = 3'd0,  // no flag changes
    SR_UFLAGS = 3'd1,  // micro flags uC, uS, uZ (for the microprogram only)
    SR_LOGIC  = 3'd2,  // S, Z
    SR_SHIFT  = 3'd3,  // C <= shifter serial output, S, Z
    SR_ARITH  = 3'd4,  // C, V, S, Z
    SR_CLRC   = 3'd5,  // C <= 0
    SR_SETC   = 3'd6,  // C <= 1
    SR_RSVD   = 3'd7   // no flag changes
  } srwr_e;

  // Macro flag vector order {C, V, S, Z}.
  typedef struct packed {
    logic c;
    logic v;
    logic s;
    logic z;
  } flags_t;

  // 42-bit command bus, bit 41 first.
  typedef struct packed {
    regmux_e    amuxsel;     // 41:40
    logic [4:0] pl_rega;     // 39:35
    regmux_e    bmuxsel;     // 34:33
    logic [4:0] pl_regb;     // 32:28
    logic       ssel;        // 27    register write data: 0 shifter, 1 Q
    logic       we;          // 26    register array write enable
    logic       wnb;         // 25    1 word, 0 low byte
    rsel_e      rsel;        // 24:23
    logic       dsel;        // 22    RALU data out: 0 port B, 1 shifter
    alu_fn_e    fsel;        // 21:18
    cnsel_e     cnsel;       // 17:16
    fshift_e    f_shft_sel;  // 15:14
    fsi_e       fsi_sel;     // 13:12
    qshift_e    q_shft_sel;  // 11:10
    qsi_e       qsi_sel;     // 9:8
    srwr_e      sr_wr;       // 7:5
    logic       fmuxsel;     // 4     iterate source: 0 Q[0], 1 uC
    logic       db_dvr_en;   // 3     RALU drives the internal data bus
    logic       mar_ld;      // 2
    logic       rd_str;      // 1
    logic       wr_str;      // 0
  } cmd_t;

  // Sequencer (microprogrammed controller) operations.
  typedef enum logic [3:0] {
    SQ_CONT     = 4'd0,  // next = current + 1
    SQ_JUMP     = 4'd1,  // next = addr
    SQ_CJUMP    = 4'd2,  // next = cond ? addr : current + 1
    SQ_MAP      = 4'd3,  // next = MapROM[opcode on data bus], load IR
    SQ_CALL     = 4'd4,  // push current + 1, next = addr
    SQ_RET      = 4'd5,  // next = pop
    SQ_LDCNT    = 4'd6,  // counter <= addr, next = current + 1
    SQ_LDCNT_IR = 4'd7,  // counter <= IR.r2 - 1, next = current + 1
    SQ_LOOP     = 4'd8   // counter != 0 ? (counter--, next = addr) : current + 1
  } seqop_e;

  typedef enum logic [1:0] {
    CD_UC  = 2'd0,  // micro carry set
    CD_NUC = 2'd1,  // micro carry clear
    CD_US  = 2'd2,  // micro sign set
    CD_CC  = 2'd3   // branch condition IR.r1 true on the macro flags
  } cond_e;

  typedef struct packed {
    seqop_e     op;    // 13:10
    cond_e      cond;  // 9:8
    logic [7:0] addr;  // 7:0 jump target or counter constant
  } seq_t;

  typedef struct packed {
    seq_t seq;  // 55:42
    cmd_t cmd;  // 41:0
  } uword_t;

  localparam cmd_t CMD_NOP = '{
    amuxsel: RM_R1, pl_rega: 5'd0, bmuxsel: RM_R1, pl_regb: 5'd0,
    ssel: 1'b0, we: 1'b0, wnb: 1'b1, rsel: RS_REG, dsel: 1'b0,
    fsel: F_ZERO, cnsel: CN_ZERO, f_shft_sel: SH_PASS, fsi_sel: FI_ZERO,
    q_shft_sel: Q_HOLD, qsi_sel: QI_ZERO, sr_wr: SR_NONE, fmuxsel: 1'b0,
    db_dvr_en: 1'b0, mar_ld: 1'b0, rd_str: 1'b0, wr_str: 1'b0};

  // ------------------------------------------------------------------
  // Opcodes.
  // ------------------------------------------------------------------
  localparam logic [7:0] OP_LDSPR = 8'h00;  // SP <= r1
  localparam logic [7:0] OP_CLRC  = 8'h03;  // C <= 0
  localparam logic [7:0] OP_RET   = 8'h06;  // PC <= mem[SP], SP += 2
  localparam logic [7:0] OP_RORC  = 8'h0D;  // rotate r1 right through C, r2 times
  localparam logic [7:0] OP_B     = 8'h13;  // if cc(r1) PC <= PC + offset
  localparam logic [7:0] OP_CALL  = 8'h14;  // push PC, PC <= addr
  localparam logic [7:0] OP_JMP   = 8'h15;  // PC <= addr
  localparam logic [7:0] OP_CALLX = 8'h16;  // push PC, PC <= base + r2
  localparam logic [7:0] OP_JMPX  = 8'h17;  // PC <= base + r2
  localparam logic [7:0] OP_STA   = 8'h18;  // mem[addr] <= r1
  localparam logic [7:0] OP_STAX  = 8'h19;  // mem[base + r2] <= r1
  localparam logic [7:0] OP_LDA   = 8'h1A;  // r1 <= mem[addr]
  localparam logic [7:0] OP_LDAX  = 8'h1B;  // r1 <= mem[base + r2]
  localparam logic [7:0] OP_ADDR  = 8'h21;  // r1 <= r1 + r2
  localparam logic [7:0] OP_LDR   = 8'h2B;  // r1 <= r2
  localparam logic [7:0] OP_UMULR = 8'h2D;  // {r1, r1|1} <= r1 * r2
  localparam logic [7:0] OP_UDIVR = 8'h2E;  // r1 <= r1 % r2, r1|1 <= r1 / r2
  localparam logic [7:0] OP_ADCLR = 8'h2F;  // {r1,r1|1} += {r2,r2|1} + C
  localparam logic [7:0] OP_ADDI  = 8'h31;  // r1 <= r1 + imm
  localparam logic [7:0] OP_LSUBI = 8'h36;  // r1 <= r1 - imm, C unchanged
  localparam logic [7:0] OP_LDI   = 8'h3B;  // r1 <= imm
  localparam logic [7:0] OP_UMULI = 8'h3D;  // {r1, r1|1} <= r1 * imm
  localparam logic [7:0] OP_GFO   = 8'hFF;  // halt: stay in place

  // Branch condition codes (r1 field of B).
  localparam logic [3:0] CC_CC = 4'h0, CC_CS = 4'h1, CC_NE = 4'h2, CC_EQ = 4'h3,
                         CC_PL = 4'h4, CC_MI = 4'h5, CC_VC = 4'h6, CC_VS = 4'h7,
                         CC_GE = 4'h8, CC_LT = 4'h9, CC_GT = 4'hA, CC_LE = 4'hB,
                         CC_HI = 4'hC, CC_LS = 4'hD, CC_AL = 4'hE, CC_NV = 4'hF;

  function automatic logic cc_true(input logic [3:0] cc, input flags_t f);
    case (cc)
      CC_CC:   return !f.c;
      CC_CS:   return f.c;
      CC_NE:   return !f.z;
      CC_EQ:   return f.z;
      CC_PL:   return !f.s;
      CC_MI:   return f.s;
      CC_VC:   return !f.v;
      CC_VS:   return f.v;
      CC_GE:   return f.s == f.v;
      CC_LT:   return f.s != f.v;
      CC_GT:   return !f.z && (f.s == f.v);
      CC_LE:   return f.z || (f.s != f.v);
      CC_HI:   return f.c && !f.z;
      CC_LS:   return !f.c || f.z;
      CC_AL:   return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Instruction word encoder.
  function automatic logic [15:0] ins(input logic [7:0] op, input logic [3:0] r1,
                                      input logic [3:0] r2);
    return {op, r1, r2};
  endfunction

  // ------------------------------------------------------------------
  // Default program image: the shift-and-add multiply test (mulrom).
  // Multiplies 0xABBA by 0xDABA with a CALLed subroutine; the 32-bit
  // product 0x92B92924 ends up in R0:R1, then GFO halts.
  // ------------------------------------------------------------------
  localparam logic [15:0] MULROM_STACK = 16'h1000;  // top of RAM + 2

  function automatic logic [15:0] mulrom_word(input logic [9:0] w);
    case (w)
      10'h00: return ins(OP_LDI, 4'd2, 4'd0);
      10'h01: return MULROM_STACK;
      10'h02: return ins(OP_LDSPR, 4'd2, 4'd0);
      10'h03: return ins(OP_LDI, 4'd0, 4'd0);
      10'h04: return 16'hABBA;
      10'h05: return ins(OP_LDI, 4'd1, 4'd0);
      10'h06: return 16'hDABA;
      10'h07: return ins(OP_CALL, 4'd0, 4'd0);
      10'h08: return 16'h0014;                     // UMUL
      10'h09: return ins(OP_GFO, 4'd0, 4'd0);
      10'h0A: return ins(OP_LDR, 4'd2, 4'd0);      // UMUL: R2 <= R0
      10'h0B: return ins(OP_LDI, 4'd0, 4'd0);
      10'h0C: return 16'h0000;
      10'h0D: return ins(OP_LDI, 4'd3, 4'd0);
      10'h0E: return 16'd16;
      10'h0F: return ins(OP_CLRC, 4'd0, 4'd0);
      10'h10: return ins(OP_RORC, 4'd0, 4'd1);     // UMUL1
      10'h11: return ins(OP_RORC, 4'd1, 4'd1);
      10'h12: return ins(OP_B, CC_CC, 4'd0);
      10'h13: return 16'h0002;                     // to UMUL2
      10'h14: return ins(OP_ADDR, 4'd0, 4'd2);
      10'h15: return ins(OP_LSUBI, 4'd3, 4'd0);    // UMUL2
      10'h16: return 16'h0001;
      10'h17: return ins(OP_B, CC_PL, 4'd0);
      10'h18: return 16'hFFEE;                     // to UMUL1
      10'h19: return ins(OP_RET, 4'd0, 4'd0);
      default: return 16'h0000;
    endcase
  endfunction

  // ------------------------------------------------------------------
  // Microprogram entry points (microprogram memory addresses).
  // ------------------------------------------------------------------
  localparam logic [7:0] UA_RESET = 8'h00, UA_FETCH = 8'h01, UA_FETCH1 = 8'h02,
                         UA_DECODE = 8'h03, UA_IMM = 8'h04, UA_ABS = 8'h07,
                         UA_GFO = 8'h0D,
                         UA_LDSPR = 8'h10, UA_CLRC = 8'h11, UA_RET = 8'h12,
                         UA_RORC = 8'h16, UA_B = 8'h19, UA_BT = 8'h1C,
                         UA_CALL = 8'h20, UA_JMP = 8'h26, UA_JMPX = 8'h28,
                         UA_CALLX = 8'h2B, UA_STA = 8'h32, UA_STAX = 8'h36,
                         UA_LDA = 8'h3A, UA_LDAX = 8'h3C, UA_ADDR = 8'h41,
                         UA_LDR = 8'h42, UA_ADDI = 8'h43, UA_LSUBI = 8'h45,
                         UA_LDI = 8'h47, UA_UMULR = 8'h50, UA_UMULI = 8'h54,
                         UA_UDIVR = 8'h60, UA_ADCLR = 8'h68;

endpackage
