// tb_sw16_controller: self-checking test of the microprogrammed controller
// (sequencer, map ROM, microprogram ROM, pipeline register, IR).
// The data bus input is held at one instruction word; the testbench
// follows the microprogram address and checks: start at word 0 after
// reset, the fetch word sequence 01,02,02,02,03 (5 cycles), the IR loading
// at the MAP word, the jump to the routine given by the opcode, the
// command bus equal to the ROM word of the current address, and the
// conditional branch outcome following the flag inputs (B EQ with Z set
// and clear). Signals change on the falling edge, checked after the rise.
//
// Source: The fetch word sequence is the lab's three-word, five-cycle fetch.
module tb_sw16_controller;
  import sw16_pkg::*;
  logic        clk = 0, rst, uc, us;
  logic [15:0] bus, ir;
  flags_t      flags;
  cmd_t        cmd;
  logic [7:0]  up_addr;
  logic [13:0] up_seq;
  uword_t      ref_w;
  logic [7:0]  ref_a;
  int checks = 0, failures = 0;

  sw16_controller dut (.clk, .rst, .bus, .flags, .uc, .us, .cmd, .ir, .up_addr, .up_seq);
  sw16_upm ref_rom (.addr(ref_a), .data(ref_w));
  assign ref_a = up_addr;
  always #5 clk = ~clk;

  initial begin #2_000_000; $display("FAIL: watchdog");
    // UDIVR ends with a conditional jump on the micro carry flag
    for (int k = 0; k < 2; k++) begin
      int guard = 0;
      uc = 1'(k);
      fetch(ins(OP_UDIVR, 2, 4), UA_UDIVR);
      while (up_addr != 8'h64 && guard < 40) begin tick(); guard++; end
      tick();
      check(up_addr == (uc ? 8'h66 : 8'h65), $sformatf("uC=%b: after the last divide step at %h",
                                                         uc, up_addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  // Wait for the fetch word, then check the fetch sequence and the mapping.
  task automatic fetch(input logic [15:0] instr, input logic [7:0] target);
    int guard = 0;
    bus = instr;
    while (up_addr != UA_FETCH && guard < 100) begin tick(); guard++; end
    check(up_addr == UA_FETCH, "no fetch word");
    tick(); check(up_addr == UA_FETCH1, "fetch word 2");
    tick(); check(up_addr == UA_FETCH1, "fetch word 3");
    tick(); check(up_addr == UA_FETCH1, "fetch word 4");
    tick(); check(up_addr == UA_DECODE, "fetch word 5 (decode)");
    tick(); check(up_addr == target, $sformatf("opcode %h mapped to %h", instr[15:8], up_addr));
    check(ir == instr, "IR loaded at decode");
  endtask

  always @(negedge clk) if (!rst && up_addr != 8'hFF) begin
    checks++;
    if (cmd !== ref_w.cmd || up_seq !== ref_w.seq) begin
      failures++; $display("FAIL: pipeline word at %h", up_addr);
    end
  end

  initial begin
    flags = '0; uc = 0; us = 0; bus = 0;
    rst = 1; tick(); tick();
    check(!cmd.we && !cmd.rd_str && !cmd.wr_str && !cmd.mar_ld && cmd.sr_wr == SR_NONE,
          "reset clears the pipeline register");
    rst = 0; tick();
    check(up_addr == UA_RESET, "starts at word 0");
    fetch(ins(OP_CLRC, 0, 0), UA_CLRC);
    fetch(ins(OP_ADDR, 1, 2), UA_ADDR);
    fetch(ins(8'h77, 0, 0), UA_FETCH1 - 1);          // unknown opcode -> fetch
    // B EQ with Z set: taken
    flags.z = 1;
    fetch(ins(OP_B, CC_EQ, 0), UA_B);
    repeat (6) tick();
    check(up_addr == UA_BT, $sformatf("branch taken word, at %h", up_addr));
    flags.z = 0;
    fetch(ins(OP_B, CC_EQ, 0), UA_B);
    repeat (6) tick();
    check(up_addr == 8'h1B, $sformatf("branch not-taken word, at %h", up_addr));
    // UDIVR ends with a conditional jump on the micro carry flag
    for (int k = 0; k < 2; k++) begin
      int guard = 0;
      uc = 1'(k);
      fetch(ins(OP_UDIVR, 2, 4), UA_UDIVR);
      while (up_addr != 8'h64 && guard < 40) begin tick(); guard++; end
      tick();
      check(up_addr == (uc ? 8'h66 : 8'h65), $sformatf("uC=%b: after the last divide step at %h",
                                                         uc, up_addr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
