// tb_sw16_cpu: self-checking test of the CPU core on its own. The
// testbench models a 32K-word memory: reads are combinational while
// rd_str is high, writes happen on the rising edge while wr_str is high.
// A short program (LDI, ADDR, STA, LDA, ADDI, UMULR, B, GFO) with random
// operands runs to the halt word; the stored results, the bus strobes
// (never both high) and the latency of the first instruction (LDI: 5
// fetch + 6 immediate-mode cycles) are checked, and, as in the lab's
// fetch waveform, the PC is incremented in cycles 2 and 6 after reset.
//
// Source: The PC-increment cycles (2 and 6) follow the lab's fetch waveform.
module tb_sw16_cpu;
  import sw16_pkg::*;
  logic        clk = 0, rst, rd_str, wr_str;
  logic [15:0] addr, din, dout, ir;
  flags_t      flags;
  logic [7:0]  up_addr;
  logic [13:0] up_seq;
  logic [15:0] mem [32768];
  int checks = 0, failures = 0;

  sw16_cpu dut (.clk, .rst, .addr, .din, .dout, .rd_str, .wr_str, .ir, .flags, .up_addr, .up_seq);
  always #5 clk = ~clk;
  assign din = rd_str ? mem[addr[15:1]] : 16'h0000;
  always @(posedge clk) if (wr_str) mem[addr[15:1]] <= dout;

  initial begin #2_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  always @(negedge clk) if (!rst) check(!(rd_str && wr_str), "both strobes");

  initial begin
    logic [15:0] a, b, p [$];
    logic [31:0] m;
    int first_fetch, second_fetch, cyc;
    a = 16'($urandom); b = 16'($urandom); m = a * b;
    p = '{ins(OP_LDI, 0, 0), a, ins(OP_LDI, 1, 0), b, ins(OP_ADDR, 0, 1),
          ins(OP_STA, 0, 0), 16'h0800, ins(OP_LDA, 2, 0), 16'h0800,
          ins(OP_ADDI, 2, 0), 16'h0001, ins(OP_STA, 2, 0), 16'h0802,
          ins(OP_LDI, 4, 0), a, ins(OP_UMULR, 4, 1), ins(OP_STA, 4, 0), 16'h0804,
          ins(OP_STA, 5, 0), 16'h0806,
          ins(OP_B, CC_AL, 0), 16'h0004, ins(OP_STA, 4, 0), 16'h0808,   // skipped
          ins(OP_GFO, 0, 0)};
    foreach (mem[i]) mem[i] = 16'h0000;
    foreach (p[i]) mem[i] = p[i];
    rst = 1; repeat (2) @(posedge clk); #1 rst = 0;
    // Counting the reset word as cycle 1, the PC is incremented at the end of
    // cycles 2 and 6 of the first fetch.
    while (up_addr != UA_RESET) begin @(posedge clk); #1; end
    for (int k = 1; k <= 6; k++) begin
      logic [15:0] pc0;
      pc0 = dut.u_int.u_ralu.u_regs.regs[R_PC];
      @(posedge clk); #1;
      check((dut.u_int.u_ralu.u_regs.regs[R_PC] != pc0) == (k == 2 || k == 6),
            $sformatf("PC change in cycle %0d", k));
    end
    rst = 1; repeat (2) @(posedge clk); #1 rst = 0;
    cyc = 0; first_fetch = -1; second_fetch = -1;
    while (up_addr != UA_GFO && cyc < 2000) begin
      @(posedge clk); #1 cyc++;
      if (up_addr == UA_FETCH) begin
        if (first_fetch < 0) first_fetch = cyc;
        else if (second_fetch < 0) second_fetch = cyc;
      end
    end
    check(up_addr == UA_GFO, "halt reached");
    check(second_fetch - first_fetch == 5 + 1 + 4 + 1,
          $sformatf("LDI took %0d cycles", second_fetch - first_fetch));
    check(mem[16'h0400] == a + b, "ADDR/STA");
    check(mem[16'h0401] == a + b + 1, "LDA/ADDI/STA");
    check({mem[16'h0402], mem[16'h0403]} == m, $sformatf("UMULR %h*%h", a, b));
    check(mem[16'h0404] == 16'h0000, "taken branch skipped the store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
