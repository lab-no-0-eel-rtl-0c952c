// tb_sw16_upm: self-checking test of the microprogram ROM contents.
// Reads all 256 words and checks properties the rest of the design relies
// on: the read and write strobes never share a word, a write strobe always
// drives the data bus, the fetch routine has the shape that gives a
// 5-cycle fetch (MAR load + PC increment, a 3-pass read loop, a MAP with
// PC increment), the immediate and absolute subroutines end in RET after
// 4 and 6 words, GFO jumps to itself, every instruction routine ends by
// jumping back to the fetch word, and unused words go back to fetch.
//
// Source: The 5-cycle fetch, 4-cycle immediate and 6-cycle absolute routines
// and the 2-word ADCLR are the lab's figures.
module tb_sw16_upm;
  import sw16_pkg::*;
  logic [7:0] addr;
  uword_t     data;
  int checks = 0, failures = 0;

  sw16_upm dut (.addr, .data);

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic rd(input logic [7:0] a, output uword_t u);
    addr = a; #1; u = data;
  endtask

  initial begin
    uword_t u;
    int to_fetch = 0;
    for (int i = 0; i < 256; i++) begin
      rd(8'(i), u);
      check(!(u.cmd.rd_str && u.cmd.wr_str), $sformatf("word %h rd+wr", i));
      if (u.cmd.wr_str) check(u.cmd.db_dvr_en, $sformatf("word %h writes without driving", i));
      if (u.seq.op == SQ_JUMP && u.seq.addr == UA_FETCH) to_fetch++;
    end
    check(to_fetch >= 23, $sformatf("only %0d routines return to fetch", to_fetch));
    rd(UA_RESET, u);  check(u.seq.op == SQ_CONT || (u.seq.op == SQ_JUMP && u.seq.addr == UA_FETCH), "reset word");
    rd(UA_FETCH, u);  check(u.seq.op == SQ_LDCNT && u.seq.addr == 8'd2 && u.cmd.mar_ld, "fetch word 1");
    check(u.cmd.we && u.cmd.pl_regb == R_PC, "fetch increments PC");
    rd(UA_FETCH1, u); check(u.seq.op == SQ_LOOP && u.seq.addr == UA_FETCH1 && u.cmd.rd_str, "fetch loop");
    rd(UA_DECODE, u); check(u.seq.op == SQ_MAP && u.cmd.rd_str && u.cmd.we, "decode word");
    rd(UA_IMM, u);    check(u.seq.op == SQ_LDCNT && u.seq.addr == 8'd1 && u.cmd.mar_ld, "imm word");
    rd(8'h06, u);     check(u.seq.op == SQ_RET, "imm ends with RET on word 4");
    for (int i = 7; i < 12; i++) begin
      rd(8'(i), u); check(u.seq.op == SQ_CONT, "abs body");
    end
    rd(8'h0C, u);     check(u.seq.op == SQ_RET, "abs ends with RET on word 6");
    rd(UA_GFO, u);    check(u.seq.op == SQ_JUMP && u.seq.addr == UA_GFO, "GFO loops");
    rd(UA_UMULR, u);  check(u.cmd.q_shft_sel == Q_LOAD, "UMULR loads Q");
    rd(8'h52, u);     check(u.seq.op == SQ_LOOP && u.seq.addr == 8'h52, "UMULR loop");
    rd(8'h51, u);     check(u.seq.op == SQ_LDCNT && u.seq.addr == 8'd15, "UMULR 16 passes");
    rd(UA_ADCLR, u);  check(u.cmd.sr_wr == SR_UFLAGS && u.cmd.cnsel == CN_C, "ADCLR low word");
    rd(8'h69, u);     check(u.seq.op == SQ_JUMP && u.seq.addr == UA_FETCH && u.cmd.cnsel == CN_UC &&
                             u.cmd.sr_wr == SR_ARITH, "ADCLR high word");
    rd(8'hF0, u);     check(u.seq.op == SQ_JUMP && u.seq.addr == UA_FETCH && !u.cmd.we &&
                             !u.cmd.wr_str, "unused word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
