// tb_sweet16: end-to-end test of the complete Sweet16 computer at its
// default size (1K-word ROM, 1K-word RAM, 20-register RALU).
//
// How it works:
//   1. Runs the multiply program that the ROM holds after power-up
//      (shift-and-add multiply of 0xABBA by 0xDABA through CALL/RET, RORC,
//      conditional branches and LSUBI) and checks R0:R1 = 0x92B92924.
//   2. Assembles a second program in the testbench, writes it into both ROM
//      byte lanes, resets the CPU and runs it to the halt instruction (GFO).
//      The program exercises every instruction with operands drawn from
//      $urandom and stores each result into RAM with STA; the testbench then
//      compares RAM, the output port and the registers with values it
//      computed itself. It includes the lab's worked examples
//      (0xF00D*0xBEEF, 0xDEAD*0xBEA7, 0xF00D/0x000F, also in the lab's
//      register form UMULR R0,R1 / UMULI R0,#BEA7 / UDIVR R0,R1 where the
//      second operand is the result's odd register, the ADCLR pair example
//      and the I/O addresses 0xFF33/0xFFBA).
//   3. While a program runs, a monitor watches the microprogram address and
//      the bus strobes. It checks the latencies the lab states: fetch 5
//      cycles, immediate-mode subroutine 4 cycles, absolute-mode subroutine
//      6 cycles, UMULR 19 cycles after fetch, ADCLR 2 cycles after fetch.
//      UDIVR is checked against this design's 20 or 21 cycles (the lab
//      reports 21 or 22 for its own microcode).
//   4. Each mechanism (fetch, immediate/absolute modes, CALL/RET stack,
//      branch taken and not taken, RAM read and write, input and output
//      port, multiply, divide with and without the remainder fix-up, ADCLR,
//      RORC, indexed addressing, halt) is counted; a mechanism that never
//      occurred counts as a failure.
//
// The clock is 10 time units; reset is held for 3 cycles.
//
// Source: Results and the fetch/UMULR/ADCLR latencies are the lab's; the UDIVR
// count and the 0x1000 stack are this design's.
module tb_sweet16;
  import sw16_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [15:0] inport;
  logic [15:0] outport, addr_bus, rd_data_bus, wr_data_bus, ir;
  logic        rd_str, wr_str;
  flags_t      flags;
  logic [7:0]  up_addr;
  logic [13:0] up_seq;

  sweet16 dut (.clk, .rst, .inport, .outport, .addr_bus, .rd_data_bus, .wr_data_bus,
               .rd_str, .wr_str, .ir, .flags, .up_addr, .up_seq);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    #20_000_000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  // ------------------------------------------------------ monitor / counters
  int cyc = 0;
  int n_fetch = 0, n_imm = 0, n_abs = 0, n_push = 0, n_ret = 0, n_bt = 0, n_bnt = 0;
  int n_ram_wr = 0, n_ram_rd = 0, n_in = 0, n_out = 0, n_mul = 0, n_div = 0, n_fix = 0;
  int n_adclr = 0, n_rorc = 0, n_idx = 0, n_halt = 0;
  int n_lat_mul = 0, n_lat_adclr = 0, n_lat_div = 0;
  int t_call = -1, t_sub = -1;
  int f_start = -1, imm_start = -1, abs_start = -1, instr_start = -1;
  logic [7:0] prev_addr = 8'h00;
  bit monitor_on = 1'b0;

  always @(negedge clk) if (!rst) begin
    cyc++;
    if (monitor_on) begin
      // fetch: from word FETCH until the first word that is not fetch/decode
      if (up_addr == UA_FETCH) f_start = cyc;
      if (prev_addr == UA_DECODE && up_addr != UA_FETCH && up_addr != UA_FETCH1 &&
          up_addr != UA_DECODE && f_start >= 0) begin
        check(cyc - f_start == 5, $sformatf("fetch took %0d cycles", cyc - f_start));
        n_fetch++;
      end
      // immediate-mode subroutine: words 04..06
      if (up_addr == UA_IMM) imm_start = cyc;
      if (prev_addr == 8'h06 && up_addr != 8'h06 && imm_start >= 0) begin
        check(cyc - imm_start == 4, $sformatf("immediate mode took %0d", cyc - imm_start));
        n_imm++;
      end
      // absolute-mode subroutine: words 07..0C
      if (up_addr == UA_ABS) abs_start = cyc;
      if (prev_addr == 8'h0C && up_addr != 8'h0C && abs_start >= 0) begin
        check(cyc - abs_start == 6, $sformatf("absolute mode took %0d", cyc - abs_start));
        n_abs++;
      end
      // whole-instruction latency, from one FETCH word to the next
      if (up_addr == UA_FETCH) begin
        if (instr_start >= 0) begin
          int len;
          len = cyc - instr_start;
          case (ir[15:8])
            OP_UMULR: begin
              check(len == 5 + 19, $sformatf("UMULR took %0d cycles", len)); n_lat_mul++;
            end
            OP_ADCLR: begin
              check(len == 5 + 2, $sformatf("ADCLR took %0d cycles", len)); n_lat_adclr++;
            end
            OP_UDIVR: begin
              check(len == 5 + 20 || len == 5 + 21, $sformatf("UDIVR took %0d cycles", len));
              n_lat_div++;
            end
            default: ;
          endcase
        end
        instr_start = cyc;
      end
      // length of the first subroutine call, from the CALL's fetch to the
      // end of the RET
      if (up_addr == UA_CALL && t_call < 0) t_call = cyc - 5;
      if (prev_addr == 8'h15 && up_addr != 8'h15 && t_call >= 0 && t_sub < 0)
        t_sub = cyc - t_call;
      // mechanisms
      if (up_addr == 8'h24) n_push++;
      if (up_addr == UA_RET) n_ret++;
      if (up_addr == UA_BT) n_bt++;
      if (up_addr == 8'h1B) n_bnt++;
      if (up_addr == UA_UMULR || up_addr == 8'h56) n_mul++;
      if (up_addr == UA_UDIVR) n_div++;
      if (up_addr == 8'h65) n_fix++;
      if (up_addr == UA_ADCLR) n_adclr++;
      if (up_addr == 8'h17) n_rorc++;
      if (up_addr == 8'h38 || up_addr == 8'h3E || up_addr == 8'h2A || up_addr == 8'h2D) n_idx++;
      if (up_addr == UA_GFO && prev_addr != UA_GFO) n_halt++;
      if (wr_str && addr_bus[15:11] == 5'b00001) n_ram_wr++;
      if (rd_str && addr_bus[15:11] == 5'b00001) n_ram_rd++;
      if (rd_str && addr_bus[15:7] == 9'h1FE) n_in++;
      if (wr_str && addr_bus[15:7] == 9'h1FF) n_out++;
      // the strobes never overlap and a write never targets the ROM
      check(!(rd_str && wr_str), "rd_str and wr_str both high");
      if (wr_str) check(addr_bus[15:11] != 5'b00000, "write to ROM space");
    end
    prev_addr = up_addr;
  end

  // ------------------------------------------------------------- assembler
  logic [15:0] prog[$];
  function automatic logic [15:0] here();  // byte address of the next word
    return 16'(2 * prog.size());
  endfunction
  task automatic emit(input logic [15:0] w); prog.push_back(w); endtask
  task automatic op2(input logic [7:0] op, input logic [3:0] r1, input logic [3:0] r2,
                     input logic [15:0] ext);
    emit(ins(op, r1, r2)); emit(ext);
  endtask
  task automatic ldi(input logic [3:0] r, input logic [15:0] v); op2(OP_LDI, r, 0, v); endtask
  task automatic sta(input logic [3:0] r, input logic [15:0] a); op2(OP_STA, r, 0, a); endtask

  task automatic load_prog();
    for (int i = 0; i < 1024; i++) begin
      logic [15:0] wv;
      wv = (i < prog.size()) ? prog[i] : ins(OP_GFO, 0, 0);
      dut.u_ext.u_rom_hi.mem[i] = wv[15:8];
      dut.u_ext.u_rom_lo.mem[i] = wv[7:0];
    end
  endtask

  function automatic logic [15:0] ram(input logic [15:0] a);
    logic [9:0] i;
    i = a[10:1];
    return {dut.u_ext.u_ram_hi.mem[i], dut.u_ext.u_ram_lo.mem[i]};
  endfunction
  function automatic logic [15:0] rreg(input int r);
    return dut.u_cpu.u_int.u_ralu.u_regs.regs[r];
  endfunction

  // Reset, then run until the halt word; returns the cycle count.
  task automatic run(input int limit, output int cycles);
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    cycles = 0;
    f_start = -1; imm_start = -1; abs_start = -1; instr_start = -1;
    while (up_addr != UA_GFO && cycles < limit) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(up_addr == UA_GFO, $sformatf("program did not halt within %0d cycles", limit));
    repeat (3) @(posedge clk);
  endtask

  // ---------------------------------------------------------- expectations
  typedef struct { logic [15:0] a; logic [15:0] v; string what; } exp_t;
  exp_t exp_q[$];
  task automatic expect_ram(input logic [15:0] a, input logic [15:0] v, input string what);
    exp_t e; e.a = a; e.v = v; e.what = what; exp_q.push_back(e);
  endtask

  logic [15:0] res_ptr;
  // store register r to the next result slot and remember what it should be
  task automatic store(input logic [3:0] r, input logic [15:0] v, input string what);
    sta(r, res_ptr); expect_ram(res_ptr, v, what); res_ptr += 2;
  endtask

  initial begin
    int cycles;
    logic [15:0] a, b, in_val;
    logic [31:0] p;
    logic [15:0] nd [8][2];

    inport = 16'hDEAD;
    monitor_on = 1'b1;

    // ---- 1: the power-up ROM program -----------------------------------
    run(5000, cycles);
    $display("power-up multiply program: %0d cycles", cycles);
    check({rreg(0), rreg(1)} == 32'h92B92924,
          $sformatf("ABBA*DABA gave %h%h", rreg(0), rreg(1)));
    check(rreg(R_SP) == MULROM_STACK, "SP not back at the stack top after RET");
    $display("UMUL subroutine, CALL to RET: %0d cycles", t_sub);
    // the lab found the software multiply "more than 37 times" slower than UMULR
    check(t_sub > 37 * 24, $sformatf("software multiply only %0d cycles", t_sub));

    // ---- 2: assembled test program ------------------------------------
    prog.delete();
    res_ptr = 16'h0800;
    in_val  = 16'($urandom);
    inport  = in_val;
    ldi(2, MULROM_STACK); emit(ins(OP_LDSPR, 2, 0));

    // multiply: the lab's two examples and random operands
    for (int k = 0; k < 5; k++) begin
      case (k)
        0: begin a = 16'hF00D; b = 16'hBEEF; end
        1: begin a = 16'hDEAD; b = 16'hBEA7; end
        2: begin a = 16'hFFFF; b = 16'hFFFF; end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      p = a * b;
      ldi(4, a); ldi(6, b); emit(ins(OP_UMULR, 4, 6));
      store(4, p[31:16], $sformatf("UMULR %h*%h hi", a, b));
      store(5, p[15:0],  $sformatf("UMULR %h*%h lo", a, b));
    end
    a = 16'($urandom); b = 16'($urandom); p = a * b;
    ldi(8, a); op2(OP_UMULI, 8, 0, b);
    store(8, p[31:16], "UMULI hi"); store(9, p[15:0], "UMULI lo");

    // the lab's test programs use the odd register of the pair as the second
    // operand, so it is overwritten by the result
    ldi(0, 16'hF00D); ldi(1, 16'hBEEF); emit(ins(OP_UMULR, 0, 1));
    store(0, 16'hB309, "UMULR R0,R1 hi"); store(1, 16'hC223, "UMULR R0,R1 lo");
    ldi(0, 16'hDEAD); op2(OP_UMULI, 0, 0, 16'hBEA7);
    store(0, 16'hA5D5, "UMULI R0,#BEA7 hi"); store(1, 16'hA8DB, "UMULI R0,#BEA7 lo");
    ldi(0, 16'hF00D); ldi(1, 16'h000F); emit(ins(OP_UDIVR, 0, 1));
    store(0, 16'h000D, "UDIVR R0,R1 remainder"); store(1, 16'h1000, "UDIVR R0,R1 quotient");

    // divide: lab example, corner cases, random
    nd[0] = '{16'hF00D, 16'h000F};  nd[1] = '{16'd100, 16'd7};
    nd[2] = '{16'hFFFF, 16'h8000};  nd[3] = '{16'd5, 16'd9};
    nd[4] = '{16'h1234, 16'h0001};  nd[5] = '{16'hFFFF, 16'h0003};
    nd[6] = '{16'($urandom), 16'($urandom_range(1, 16'h8000))};
    nd[7] = '{16'($urandom), 16'($urandom_range(1, 255))};
    foreach (nd[k]) begin
      ldi(10, nd[k][0]); ldi(12, nd[k][1]); emit(ins(OP_UDIVR, 10, 12));
      store(10, nd[k][0] % nd[k][1], $sformatf("UDIVR %h/%h remainder", nd[k][0], nd[k][1]));
      store(11, nd[k][0] / nd[k][1], $sformatf("UDIVR %h/%h quotient", nd[k][0], nd[k][1]));
    end

    // ADCLR: lab example with C clear, then C set by the previous ADCLR
    emit(ins(OP_CLRC, 0, 0));
    ldi(0, 16'hF00D); ldi(1, 16'hF00D); ldi(2, 16'hBEEF); ldi(3, 16'h000F);
    emit(ins(OP_ADCLR, 0, 2));
    store(0, 16'hAEFC, "ADCLR hi"); store(1, 16'hF01C, "ADCLR lo");
    // carry out of the pair is set: B CS is taken, B CC is not
    ldi(5, 16'h0001); op2(OP_B, CC_CS, 0, 16'd4); ldi(5, 16'h0BAD);
    store(5, 16'h0001, "B CS after carrying ADCLR (taken)");
    ldi(6, 16'h600D); op2(OP_B, CC_CC, 0, 16'd4); ldi(6, 16'h1111);
    store(6, 16'h1111, "B CC with C set (not taken)");
    ldi(2, 16'h0000); ldi(3, 16'h0000);
    emit(ins(OP_ADCLR, 0, 2));                              // adds the carry in
    store(1, 16'hF01D, "ADCLR with carry in, lo");
    store(0, 16'hAEFC, "ADCLR with carry in, hi");

    // branch backwards: count R7 down from 3 with LSUBI / B NE
    ldi(7, 16'd3); ldi(13, 16'd0);
    begin
      logic [15:0] loop_top;
      loop_top = here();
      op2(OP_ADDI, 13, 0, 16'd10);
      op2(OP_LSUBI, 7, 0, 16'd1);
      op2(OP_B, CC_NE, 0, 16'(loop_top - (here() + 4)));
    end
    store(13, 16'd30, "backward branch loop count");

    // I/O: input port at 0xFF33, output port at 0xFFBA
    op2(OP_LDA, 14, 0, 16'hFF33);
    op2(OP_ADDI, 14, 0, 16'h0001);
    sta(14, 16'hFFBA);
    store(14, in_val + 16'd1, "input port + 1");

    // RAM read back and indexed addressing
    op2(OP_LDA, 15, 0, 16'h0800);
    store(15, 16'hB309, "LDA from RAM");
    ldi(9, 16'h0006);
    op2(OP_STAX, 15, 9, 16'h0F00);                          // mem[0x0F06] <= R15
    expect_ram(16'h0F06, 16'hB309, "STAX");
    op2(OP_LDAX, 8, 9, 16'h0F00);
    store(8, 16'hB309, "LDAX");

    // RORC and LDR/ADDR
    ldi(4, 16'h8001); emit(ins(OP_CLRC, 0, 0)); emit(ins(OP_RORC, 4, 1));
    store(4, 16'h4000, "RORC by 1");
    ldi(5, 16'h0000); op2(OP_B, CC_CS, 0, 16'd4); ldi(5, 16'h0BAD);
    store(5, 16'h0000, "carry out of RORC taken branch");
    ldi(4, 16'h1234); emit(ins(OP_RORC, 4, 4));              // C was 1
    store(4, 16'h9123, "RORC by 4 through C");
    ldi(6, 16'h0102); emit(ins(OP_LDR, 7, 6)); emit(ins(OP_ADDR, 7, 6));
    store(7, 16'h0204, "LDR + ADDR");

    // subroutines: CALL, CALLX, JMP, JMPX
    begin
      int call_fix, callx_fix, jmp_fix, jmpx_fix;
      ldi(3, 16'h5AAF);
      call_fix = prog.size() + 1;
      op2(OP_CALL, 0, 0, 16'h0000);                        // target patched below
      store(3, 16'h5AB0, "CALL/RET");
      ldi(9, 16'h0000);
      callx_fix = prog.size() + 1;
      op2(OP_CALLX, 0, 9, 16'h0000);                       // base patched, index 0
      store(3, 16'h5AB1, "CALLX/RET");
      jmp_fix = prog.size() + 1;
      op2(OP_JMP, 0, 0, 16'h0000);
      ldi(3, 16'h0BAD);                                    // skipped
      prog[jmp_fix] = here();
      ldi(9, 16'h0004);
      jmpx_fix = prog.size() + 1;
      op2(OP_JMPX, 0, 9, 16'h0000);
      prog[jmpx_fix] = here();                             // base; +4 skips the LDI
      ldi(3, 16'h0BAD);                                    // skipped
      store(3, 16'h5AB1, "JMP/JMPX skipped code");
      emit(ins(OP_GFO, 0, 0));
      // subroutine: R3 <= R3 + 1
      prog[call_fix]  = here();
      prog[callx_fix] = here();
      op2(OP_ADDI, 3, 0, 16'h0001);
      emit(ins(OP_RET, 0, 0));
    end
    load_prog();
    run(20000, cycles);
    $display("test program: %0d words, %0d cycles", prog.size(), cycles);
    foreach (exp_q[k])
      check(ram(exp_q[k].a) == exp_q[k].v,
            $sformatf("%s: mem[%h] = %h, expected %h", exp_q[k].what, exp_q[k].a,
                      ram(exp_q[k].a), exp_q[k].v));
    check(outport == in_val + 16'd1, $sformatf("output port %h", outport));
    check(rreg(R_SP) == MULROM_STACK, "stack not balanced");

    // ---- mechanisms ------------------------------------------------------
    check(n_fetch > 0, "no fetch");
    check(n_imm > 0, "no immediate-mode access");
    check(n_abs > 0, "no absolute-mode access");
    check(n_push > 0, "no stack push");
    check(n_ret > 0, "no return");
    check(n_bt > 0, "no branch taken");
    check(n_bnt > 0, "no branch not taken");
    check(n_ram_wr > 0, "no RAM write");
    check(n_ram_rd > 0, "no RAM read");
    check(n_in > 0, "no input port read");
    check(n_out > 0, "no output port write");
    check(n_mul > 0 && n_lat_mul > 0, "no multiply");
    check(n_div > n_fix && n_fix > 0 && n_lat_div > 0, "division fix-up path not both ways");
    check(n_adclr > 0 && n_lat_adclr > 0, "no ADCLR");
    check(n_rorc > 0, "no RORC");
    check(n_idx > 0, "no indexed addressing");
    check(n_halt > 0, "no halt");
    $display("mechanisms: fetch %0d imm %0d abs %0d push %0d ret %0d bt %0d bnt %0d ramwr %0d ramrd %0d in %0d out %0d mul %0d div %0d fix %0d adclr %0d rorc %0d idx %0d halt %0d",
             n_fetch, n_imm, n_abs, n_push, n_ret, n_bt, n_bnt, n_ram_wr, n_ram_rd, n_in,
             n_out, n_mul, n_div, n_fix, n_adclr, n_rorc, n_idx, n_halt);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
