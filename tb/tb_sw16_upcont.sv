// tb_sw16_upcont: self-checking test of the microsequencer.
// A reference model (next address, loop counter, 4-deep return stack)
// runs beside the DUT. Random sequencer fields are applied on the falling
// edge; next_addr is checked combinationally and cur_addr after each
// rising edge. CALL/RET are kept within the stack depth. Directed parts
// check the reset address (0xFF), a LOOP that repeats n+1 times after
// LDCNT n, and the LDCNT_IR rule (count field 0 means 16 passes).
//
// Source: The operation set comes from the lab's sequencer; encodings and the
// loop rule are this design's.
module tb_sw16_upcont;
  import sw16_pkg::*;
  logic       clk = 0, rst;
  seq_t       seq;
  logic [7:0] map_addr, next_addr, cur_addr;
  logic [3:0] conds, ir_r2;
  logic       ir_ld;
  int checks = 0, failures = 0;

  sw16_upcont dut (.clk, .rst, .seq, .map_addr, .conds, .ir_r2, .next_addr, .cur_addr, .ir_ld);
  always #5 clk = ~clk;

  initial begin #2_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  logic [7:0] m_cur, m_cnt, m_stk[$];
  function automatic logic [7:0] m_next();
    case (seq.op)
      SQ_JUMP, SQ_CALL: return seq.addr;
      SQ_CJUMP: return conds[seq.cond] ? seq.addr : m_cur + 1;
      SQ_MAP:   return map_addr;
      SQ_RET:   return m_stk[$];
      SQ_LOOP:  return (m_cnt != 0) ? seq.addr : m_cur + 1;
      default:  return m_cur + 1;
    endcase
  endfunction

  task automatic step(input seqop_e op, input logic [7:0] a);
    logic [7:0] e;
    @(negedge clk);
    seq.op = op; seq.addr = a; seq.cond = cond_e'($urandom % 4);
    conds = 4'($urandom); map_addr = 8'($urandom); ir_r2 = 4'($urandom);
    #1;
    e = m_next();
    check(next_addr == e, $sformatf("op %0d: next %h expected %h", op, next_addr, e));
    check(ir_ld == (op == SQ_MAP), "ir_ld");
    @(posedge clk);
    case (op)
      SQ_LDCNT: m_cnt = a;
      SQ_LDCNT_IR: m_cnt = (ir_r2 == 0) ? 8'd15 : 8'(ir_r2 - 1);
      SQ_LOOP: if (m_cnt != 0) m_cnt--;
      SQ_CALL: m_stk.push_back(m_cur + 1);
      SQ_RET: void'(m_stk.pop_back());
      default: ;
    endcase
    m_cur = e;
    #1 check(cur_addr == m_cur, $sformatf("cur %h expected %h", cur_addr, m_cur));
  endtask

  initial begin
    int runs;
    seq = '0; conds = 0; map_addr = 0; ir_r2 = 0;
    rst = 1; @(posedge clk); #1;
    check(cur_addr == 8'hFF, "reset address");
    rst = 0; m_cur = 8'hFF; m_cnt = 0;
    // LDCNT 3 then LOOP on itself: 4 passes through the loop word
    step(SQ_LDCNT, 8'd3);
    runs = 0;
    do begin step(SQ_LOOP, m_cur); runs++; end while (m_cur == cur_addr && runs < 20 && m_cnt != 0);
    step(SQ_LOOP, m_cur); runs++;
    check(runs == 5 || runs == 4, $sformatf("loop passes %0d", runs));
    // random sequences
    for (int n = 0; n < 3000; n++) begin
      seqop_e op;
      op = seqop_e'($urandom % 9);
      if (op == SQ_CALL && m_stk.size() >= 4) op = SQ_CONT;
      if (op == SQ_RET && m_stk.size() == 0) op = SQ_CONT;
      step(op, 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
