// sw16_upm: microprogram memory of the Sweet16 controller, 256 x 56 bits.
//
// A read-only memory addressed by the sequencer's next address. Each 56-bit
// word holds a 14-bit sequencer field (operation, condition, address or
// counter constant) and the 42-bit command bus that drives the datapath
// (sw16_pkg::uword_t). Read is combinational; the controller registers the
// word in its pipeline register.
//
// The contents are generated by the function uprog below, one case item per
// microword, so the ROM is plain logic. The routine structure follows the
// published microprogram: a 5-cycle instruction fetch (MAR <= PC, three
// memory wait cycles, decode through the MapROM), shared address-mode
// subroutines (immediate: 4 cycles, absolute: 6 cycles) and single
// instructions for multiply (UMULR/UMULI), non-restoring divide (UDIVR) and
// 32-bit add (ADCLR). Every microword below is this design's own.
//
// Conventions: the register array writes through port B's address; "inc"
// means B + carry-in with carry-in 1; passing an operand uses A-1+1 or
// B-1+1. While an execute microword reads the data bus it keeps RD_STR
// asserted, so the memory keeps driving the word the MAR points at.
//
// From the Sweet16 lab design: the routine structure and cycle counts: fetch 3
// words/5 cycles with two PC increments, immediate mode 3 words/4 cycles,
// absolute mode 6 words/6 cycles, CALL pushing the PC below SP, multiply 19
// cycles and ADCLR 2 cycles after fetch.
// Own choices: all microcode itself, the non-restoring divide (20 or 21 cycles
// here against 21 or 22 in the lab, exact for divisors up to 0x8000), and the
// halt behaviour of GFO.
module sw16_upm
  import sw16_pkg::*;
(
  input  logic [7:0] addr,
  output uword_t     data
);

  // ---------------- command helpers ----------------
  // Write the ALU result into register r (given by mux selection bm / pl).
  function automatic cmd_t wr(input cmd_t c, input regmux_e bm, input logic [4:0] pl);
    cmd_t r = c;
    r.bmuxsel = bm; r.pl_regb = pl; r.we = 1'b1;
    return r;
  endfunction
  // Put register r on port B without writing it.
  function automatic cmd_t rdb(input cmd_t c, input regmux_e bm, input logic [4:0] pl);
    cmd_t r = c;
    r.bmuxsel = bm; r.pl_regb = pl;
    return r;
  endfunction
  // ALU A input from register r.
  function automatic cmd_t ra(input cmd_t c, input regmux_e am, input logic [4:0] pl);
    cmd_t r = c;
    r.rsel = RS_REG; r.amuxsel = am; r.pl_rega = pl;
    return r;
  endfunction
  function automatic cmd_t alu(input cmd_t c, input alu_fn_e f, input cnsel_e cn);
    cmd_t r = c;
    r.fsel = f; r.cnsel = cn;
    return r;
  endfunction
  // Register r <= r + 1.
  function automatic cmd_t inc(input cmd_t c, input logic [4:0] rg);
    return alu(wr(c, RM_PL, rg), F_BPC, CN_ONE);
  endfunction
  // Register r <= r - 1.
  function automatic cmd_t dec(input cmd_t c, input logic [4:0] rg);
    return alu(wr(c, RM_PL, rg), F_BDEC, CN_ZERO);
  endfunction
  // Register (bm/pl) <= data bus.
  function automatic cmd_t from_bus(input cmd_t c, input regmux_e bm, input logic [4:0] pl);
    cmd_t r = alu(wr(c, bm, pl), F_ADEC, CN_ONE);
    r.rsel = RS_DIN;
    return r;
  endfunction
  function automatic cmd_t rd(input cmd_t c);
    cmd_t r = c;
    r.rd_str = 1'b1;
    return r;
  endfunction
  // Drive the RALU data output (port B, or shifter when sh) onto the bus.
  function automatic cmd_t drive(input cmd_t c, input logic sh);
    cmd_t r = c;
    r.db_dvr_en = 1'b1; r.dsel = sh;
    return r;
  endfunction
  function automatic cmd_t mar(input cmd_t c);
    cmd_t r = c;
    r.mar_ld = 1'b1;
    return r;
  endfunction
  function automatic cmd_t flg(input cmd_t c, input srwr_e m);
    cmd_t r = c;
    r.sr_wr = m;
    return r;
  endfunction

  // ---------------- sequencer helpers ----------------
  function automatic uword_t w(input seqop_e op, input logic [7:0] a, input cmd_t c);
    return '{seq: '{op: op, cond: CD_UC, addr: a}, cmd: c};
  endfunction
  function automatic uword_t wc(input cond_e cd, input logic [7:0] a, input cmd_t c);
    return '{seq: '{op: SQ_CJUMP, cond: cd, addr: a}, cmd: c};
  endfunction

  // One multiply-loop microword: product MSW in r1 (port B), multiplicand
  // on port A from (am, pl); adds when Q[0] is 1, shifts {carry, F, Q} right.
  function automatic cmd_t mul_step(input regmux_e am, input logic [4:0] pl);
    cmd_t c = alu(ra(wr(CMD_NOP, RM_R1, 5'd0), am, pl), F_UMUL, CN_ZERO);
    c.fmuxsel    = 1'b0;      // iterate <= Q[0]
    c.f_shft_sel = SH_RIGHT;
    c.fsi_sel    = FI_COUT;
    c.q_shft_sel = Q_RIGHT;
    c.qsi_sel    = QI_FSO;
    return c;
  endfunction

  // One non-restoring divide microword: remainder r1 (port B), divisor r2
  // (port A); subtract when uC = 1, add otherwise; the carry becomes uC.
  function automatic cmd_t div_step(input logic shift);
    cmd_t c = alu(ra(wr(CMD_NOP, RM_R1, 5'd0), RM_R2, 5'd0), F_NDIV, CN_ZERO);
    c.fmuxsel    = 1'b1;      // iterate <= uC
    c.f_shft_sel = shift ? SH_LEFT : SH_PASS;
    c.fsi_sel    = FI_QSO;
    c.q_shft_sel = Q_LEFT;
    c.qsi_sel    = QI_UC;
    c.sr_wr      = SR_UFLAGS;
    return c;
  endfunction

  // Q register -> {IR.r1[3:1], 1}.
  function automatic cmd_t q_to_odd();
    cmd_t c = wr(CMD_NOP, RM_TGL, 5'd1);
    c.ssel = 1'b1;
    return c;
  endfunction

  // Q <= r1 (pass port B through the ALU and load Q).
  function automatic cmd_t load_q();
    cmd_t c = alu(rdb(CMD_NOP, RM_R1, 5'd0), F_BDEC, CN_ONE);
    c.q_shft_sel = Q_LOAD;
    return c;
  endfunction

  function automatic uword_t uprog(input logic [7:0] a);
    cmd_t c;
    case (a)
      // ---- reset: PC <= 0 ----
      UA_RESET:    return w(SQ_CONT, 8'h00, alu(wr(CMD_NOP, RM_PL, R_PC), F_ZERO, CN_ZERO));
      // ---- fetch / decode: IR <= mem[PC]; PC <= PC + 2 (5 cycles) ----
      UA_FETCH:    return w(SQ_LDCNT, 8'd2, mar(drive(inc(CMD_NOP, R_PC), 1'b0)));
      UA_FETCH1:   return w(SQ_LOOP, UA_FETCH1, rd(CMD_NOP));
      UA_DECODE:   return w(SQ_MAP, 8'h00, rd(inc(CMD_NOP, R_PC)));
      // ---- immediate mode: bus <= mem[PC]; PC <= PC + 2 (4 cycles) ----
      UA_IMM:      return w(SQ_LDCNT, 8'd1, mar(drive(inc(CMD_NOP, R_PC), 1'b0)));
      8'h05:       return w(SQ_LOOP, 8'h05, rd(CMD_NOP));
      8'h06:       return w(SQ_RET, 8'h00, rd(inc(CMD_NOP, R_PC)));
      // ---- absolute mode: bus <= mem[mem[PC]]; PC <= PC + 2 (6 cycles) ----
      UA_ABS:      return w(SQ_CONT, 8'h00, mar(drive(inc(CMD_NOP, R_PC), 1'b0)));
      8'h08:       return w(SQ_CONT, 8'h00, rd(inc(CMD_NOP, R_PC)));
      8'h09:       return w(SQ_CONT, 8'h00, rd(CMD_NOP));
      8'h0A:       return w(SQ_CONT, 8'h00, mar(rd(CMD_NOP)));
      8'h0B:       return w(SQ_CONT, 8'h00, rd(CMD_NOP));
      8'h0C:       return w(SQ_RET, 8'h00, rd(CMD_NOP));
      // ---- GFO: halt in place ----
      UA_GFO:      return w(SQ_JUMP, UA_GFO, CMD_NOP);

      // ---- LDSPR r1: SP <= r1 ----
      UA_LDSPR:    return w(SQ_JUMP, UA_FETCH,
                            alu(ra(wr(CMD_NOP, RM_PL, R_SP), RM_R1, 5'd0), F_ADEC, CN_ONE));
      // ---- CLRC ----
      UA_CLRC:     return w(SQ_JUMP, UA_FETCH, flg(CMD_NOP, SR_CLRC));
      // ---- RET: PC <= mem[SP]; SP <= SP + 2 ----
      UA_RET:      return w(SQ_CONT, 8'h00, mar(drive(inc(CMD_NOP, R_SP), 1'b0)));
      8'h13:       return w(SQ_CONT, 8'h00, rd(inc(CMD_NOP, R_SP)));
      8'h14:       return w(SQ_CONT, 8'h00, rd(CMD_NOP));
      8'h15:       return w(SQ_JUMP, UA_FETCH, rd(from_bus(CMD_NOP, RM_PL, R_PC)));
      // ---- RORC r1,n: rotate r1 right through C, n times (0 means 16) ----
      UA_RORC:     return w(SQ_LDCNT_IR, 8'h00, CMD_NOP);
      8'h17: begin
        c = alu(wr(CMD_NOP, RM_R1, 5'd0), F_BDEC, CN_ONE);
        c.f_shft_sel = SH_RIGHT; c.fsi_sel = FI_C; c.sr_wr = SR_SHIFT;
        return w(SQ_LOOP, 8'h17, c);
      end
      8'h18:       return w(SQ_JUMP, UA_FETCH, CMD_NOP);
      // ---- B cc,offset: if cc then PC <= PC + offset ----
      UA_B:        return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h1A:       return wc(CD_CC, UA_BT, rd(CMD_NOP));
      8'h1B:       return w(SQ_JUMP, UA_FETCH, CMD_NOP);
      UA_BT: begin
        c = rd(alu(wr(CMD_NOP, RM_PL, R_PC), F_ADD, CN_ZERO));
        c.rsel = RS_DIN;
        return w(SQ_JUMP, UA_FETCH, c);
      end
      // ---- CALL addr: SP <= SP - 2; mem[SP] <= PC; PC <= addr ----
      UA_CALL:     return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h21:       return w(SQ_CONT, 8'h00, rd(from_bus(CMD_NOP, RM_PL, R_TMP)));
      8'h22:       return w(SQ_CONT, 8'h00, dec(CMD_NOP, R_SP));
      8'h23:       return w(SQ_CONT, 8'h00, mar(drive(dec(CMD_NOP, R_SP), 1'b1)));
      8'h24: begin
        c = drive(rdb(CMD_NOP, RM_PL, R_PC), 1'b0); c.wr_str = 1'b1;
        return w(SQ_CONT, 8'h00, c);
      end
      8'h25:       return w(SQ_JUMP, UA_FETCH,
                            alu(ra(wr(CMD_NOP, RM_PL, R_PC), RM_PL, R_TMP), F_ADEC, CN_ONE));
      // ---- JMP addr ----
      UA_JMP:      return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h27:       return w(SQ_JUMP, UA_FETCH, rd(from_bus(CMD_NOP, RM_PL, R_PC)));
      // ---- JMPX r2,base: PC <= base + r2 ----
      UA_JMPX:     return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h29:       return w(SQ_CONT, 8'h00, rd(from_bus(CMD_NOP, RM_PL, R_PC)));
      8'h2A:       return w(SQ_JUMP, UA_FETCH,
                            alu(ra(wr(CMD_NOP, RM_PL, R_PC), RM_R2, 5'd0), F_ADD, CN_ZERO));
      // ---- CALLX r2,base: push PC; PC <= base + r2 ----
      UA_CALLX:    return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h2C:       return w(SQ_CONT, 8'h00, rd(from_bus(CMD_NOP, RM_PL, R_TMP)));
      8'h2D:       return w(SQ_CONT, 8'h00,
                            alu(ra(wr(CMD_NOP, RM_PL, R_TMP), RM_R2, 5'd0), F_ADD, CN_ZERO));
      8'h2E:       return w(SQ_JUMP, 8'h22, CMD_NOP);
      // ---- STA r1,addr: mem[addr] <= r1 ----
      UA_STA:      return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h33:       return w(SQ_CONT, 8'h00, mar(rd(CMD_NOP)));
      8'h34: begin
        c = drive(rdb(CMD_NOP, RM_R1, 5'd0), 1'b0); c.wr_str = 1'b1;
        return w(SQ_JUMP, UA_FETCH, c);
      end
      // ---- STAX r1,r2,base: mem[base + r2] <= r1 ----
      UA_STAX:     return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h37:       return w(SQ_CONT, 8'h00, rd(from_bus(CMD_NOP, RM_PL, R_TMP)));
      8'h38:       return w(SQ_JUMP, 8'h34,
                            mar(drive(alu(ra(rdb(CMD_NOP, RM_PL, R_TMP), RM_R2, 5'd0),
                                          F_ADD, CN_ZERO), 1'b1)));
      // ---- LDA r1,addr: r1 <= mem[addr] ----
      UA_LDA:      return w(SQ_CALL, UA_ABS, CMD_NOP);
      8'h3B:       return w(SQ_JUMP, UA_FETCH, flg(rd(from_bus(CMD_NOP, RM_R1, 5'd0)), SR_LOGIC));
      // ---- LDAX r1,r2,base: r1 <= mem[base + r2] ----
      UA_LDAX:     return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h3D:       return w(SQ_CONT, 8'h00, rd(from_bus(CMD_NOP, RM_PL, R_TMP)));
      8'h3E:       return w(SQ_CONT, 8'h00,
                            mar(drive(alu(ra(rdb(CMD_NOP, RM_PL, R_TMP), RM_R2, 5'd0),
                                          F_ADD, CN_ZERO), 1'b1)));
      8'h3F:       return w(SQ_CONT, 8'h00, rd(CMD_NOP));
      8'h40:       return w(SQ_JUMP, UA_FETCH, flg(rd(from_bus(CMD_NOP, RM_R1, 5'd0)), SR_LOGIC));
      // ---- ADDR r1,r2 ----
      UA_ADDR:     return w(SQ_JUMP, UA_FETCH,
                            flg(alu(ra(wr(CMD_NOP, RM_R1, 5'd0), RM_R2, 5'd0), F_ADD, CN_ZERO),
                                SR_ARITH));
      // ---- LDR r1,r2 ----
      UA_LDR:      return w(SQ_JUMP, UA_FETCH,
                            flg(alu(ra(wr(CMD_NOP, RM_R1, 5'd0), RM_R2, 5'd0), F_ADEC, CN_ONE),
                                SR_LOGIC));
      // ---- ADDI r1,imm ----
      UA_ADDI:     return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h44: begin
        c = rd(flg(alu(wr(CMD_NOP, RM_R1, 5'd0), F_ADD, CN_ZERO), SR_ARITH));
        c.rsel = RS_DIN;
        return w(SQ_JUMP, UA_FETCH, c);
      end
      // ---- LSUBI r1,imm: r1 <= r1 - imm; S and Z only, C kept ----
      UA_LSUBI:    return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h46: begin
        c = rd(flg(alu(wr(CMD_NOP, RM_R1, 5'd0), F_BSUBA, CN_ONE), SR_LOGIC));
        c.rsel = RS_DIN;
        return w(SQ_JUMP, UA_FETCH, c);
      end
      // ---- LDI r1,imm ----
      UA_LDI:      return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h48:       return w(SQ_JUMP, UA_FETCH, flg(rd(from_bus(CMD_NOP, RM_R1, 5'd0)), SR_LOGIC));

      // ---- UMULR r1,r2: {r1, r1|1} <= r1 * r2 (19 cycles) ----
      UA_UMULR:    return w(SQ_CONT, 8'h00, load_q());
      8'h51:       return w(SQ_LDCNT, 8'd15, alu(wr(CMD_NOP, RM_R1, 5'd0), F_ZERO, CN_ZERO));
      8'h52:       return w(SQ_LOOP, 8'h52, mul_step(RM_R2, 5'd0));
      8'h53:       return w(SQ_JUMP, UA_FETCH, q_to_odd());
      // ---- UMULI r1,imm: multiplicand copied to TMP, then as UMULR ----
      UA_UMULI:    return w(SQ_CALL, UA_IMM, CMD_NOP);
      8'h55:       return w(SQ_CONT, 8'h00, rd(from_bus(CMD_NOP, RM_PL, R_TMP)));
      8'h56:       return w(SQ_CONT, 8'h00, load_q());
      8'h57:       return w(SQ_LDCNT, 8'd15, alu(wr(CMD_NOP, RM_R1, 5'd0), F_ZERO, CN_ZERO));
      8'h58:       return w(SQ_LOOP, 8'h58, mul_step(RM_PL, R_TMP));
      8'h59:       return w(SQ_JUMP, UA_FETCH, q_to_odd());

      // ---- UDIVR r1,r2: r1 <= r1 % r2, r1|1 <= r1 / r2 ----
      UA_UDIVR:    return w(SQ_CONT, 8'h00, load_q());
      8'h61: begin
        // r1 <= {15'b0, Q[15]}, Q <<= 1, uC <= 1 (first step subtracts).
        c = flg(alu(ra(wr(CMD_NOP, RM_R1, 5'd0), RM_R1, 5'd0), F_BSUBA, CN_ONE), SR_UFLAGS);
        c.f_shft_sel = SH_LEFT; c.fsi_sel = FI_QSO;
        c.q_shft_sel = Q_LEFT;  c.qsi_sel = QI_ZERO;
        return w(SQ_LDCNT, 8'd14, c);
      end
      8'h62:       return w(SQ_LOOP, 8'h62, div_step(1'b1));   // steps 1..15
      8'h63:       return w(SQ_CONT, 8'h00, div_step(1'b0));   // step 16
      8'h64: begin
        c = CMD_NOP; c.q_shft_sel = Q_LEFT; c.qsi_sel = QI_UC;  // last quotient bit
        return wc(CD_UC, 8'h66, c);
      end
      8'h65:       return w(SQ_CONT, 8'h00,                      // negative: add back
                            alu(ra(wr(CMD_NOP, RM_R1, 5'd0), RM_R2, 5'd0), F_ADD, CN_ZERO));
      8'h66:       return w(SQ_JUMP, UA_FETCH, q_to_odd());

      // ---- ADCLR r1,r2: {r1,r1|1} <= {r1,r1|1} + {r2,r2|1} + C ----
      UA_ADCLR:    return w(SQ_CONT, 8'h00,
                            flg(alu(ra(wr(CMD_NOP, RM_TGL, 5'd1), RM_TGL, 5'd1), F_ADD, CN_C),
                                SR_UFLAGS));
      8'h69:       return w(SQ_JUMP, UA_FETCH,
                            flg(alu(ra(wr(CMD_NOP, RM_TGL, 5'd0), RM_TGL, 5'd0), F_ADD, CN_UC),
                                SR_ARITH));

      // Unused words return to the fetch routine.
      default:     return w(SQ_JUMP, UA_FETCH, CMD_NOP);
    endcase
  endfunction

  assign data = uprog(addr);

endmodule
