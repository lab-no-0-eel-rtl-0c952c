// tb_sw16_intarch: self-checking test of the internal architecture (RALU
// plus the command-bus glue). The testbench plays the controller: it
// builds command words field by field and applies them with an IR value.
// Checked: register writes from the data bus addressed by IR.r1, a
// register-to-register add addressed by IR.r1/IR.r2 with flags, the short
// immediate (IR.r2 zero-extended) and short offset (IR[7:0] sign-extended)
// paths, the register-pair addressing used by the 32-bit ADCLR
// (odd registers first, carry chained through the micro carry flag), and
// the carry-in selector (0, 1, C, uC). Random operands; commands change
// on the falling edge, results are checked after the rising edge.
//
// Source: The pair addressing checked is this design's reading of the ADCLR
// register pairs.
module tb_sw16_intarch;
  import sw16_pkg::*;
  logic        clk = 0, rst, uc, us;
  cmd_t        cmd;
  logic [15:0] ir, bus, data_out;
  flags_t      flags;
  int checks = 0, failures = 0;

  sw16_intarch dut (.clk, .rst, .cmd, .ir, .bus, .data_out, .flags, .uc, .us);
  always #5 clk = ~clk;

  initial begin #2_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask
  function automatic logic [15:0] peek(input int r);
    return dut.u_ralu.u_regs.regs[r];
  endfunction

  task automatic apply(input cmd_t c, input logic [15:0] i, input logic [15:0] b);
    @(negedge clk); cmd = c; ir = i; bus = b;
    @(posedge clk); #1; cmd = CMD_NOP;
  endtask

  // r1 <= bus
  task automatic ld(input logic [3:0] r, input logic [15:0] v);
    cmd_t c;
    c = CMD_NOP; c.bmuxsel = RM_R1; c.we = 1; c.rsel = RS_DIN; c.fsel = F_ADEC; c.cnsel = CN_ONE;
    apply(c, ins(8'h00, r, 0), v);
    check(peek(r) == v, $sformatf("load R%0d", r));
  endtask

  initial begin
    cmd_t c;
    logic [15:0] v [4];
    logic [32:0] s;
    rst = 1; cmd = CMD_NOP; ir = 0; bus = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 200; n++) begin
      logic [3:0] r1, r2; logic [15:0] a, b; logic [16:0] sum;
      r1 = 4'($urandom); r2 = 4'($urandom); a = 16'($urandom); b = 16'($urandom);
      if (r1 == r2) r2 = r1 + 1;
      ld(r1, a); ld(r2, b);
      // r1 <= r1 + r2 (B port = r1, A port = r2)
      c = CMD_NOP; c.bmuxsel = RM_R1; c.amuxsel = RM_R2; c.we = 1; c.rsel = RS_REG;
      c.fsel = F_ADD; c.cnsel = CN_ZERO; c.sr_wr = SR_ARITH;
      apply(c, ins(8'h21, r1, r2), 0);
      sum = 17'(a) + 17'(b);
      check(peek(r1) == sum[15:0], $sformatf("add R%0d,R%0d", r1, r2));
      check(flags.c == sum[16] && flags.z == (sum[15:0] == 0) && flags.s == sum[15], "add flags");
    end
    // short immediate and short offset through data_out (shifter output)
    c = CMD_NOP; c.dsel = 1; c.rsel = RS_SIMM; c.fsel = F_ADEC; c.cnsel = CN_ONE;
    @(negedge clk); cmd = c; ir = ins(8'h3B, 4'h2, 4'h9); #1;
    check(data_out == 16'h0009, $sformatf("short immediate %h", data_out));
    cmd.rsel = RS_SOFF; #1;
    check(data_out == 16'h0029, $sformatf("short offset positive %h", data_out));
    ir = ins(8'h13, 4'hF, 4'hA); #1;
    check(data_out == 16'hFFFA, $sformatf("short offset negative %h", data_out));
    // register pair add with carry: {R4,R5} += {R6,R7} + C
    for (int n = 0; n < 50; n++) begin
      logic cin0;
      foreach (v[k]) v[k] = 16'($urandom);
      ld(4, v[0]); ld(5, v[1]); ld(6, v[2]); ld(7, v[3]);
      cin0 = 1'($urandom);
      c = CMD_NOP; c.sr_wr = cin0 ? SR_SETC : SR_CLRC; apply(c, 0, 0);
      c = CMD_NOP; c.amuxsel = RM_TGL; c.pl_rega = 5'd1; c.bmuxsel = RM_TGL; c.pl_regb = 5'd1;
      c.we = 1; c.fsel = F_ADD; c.cnsel = CN_C; c.sr_wr = SR_UFLAGS;
      apply(c, ins(8'h2F, 4, 6), 0);
      c.pl_rega = 5'd0; c.pl_regb = 5'd0; c.cnsel = CN_UC; c.sr_wr = SR_ARITH;
      apply(c, ins(8'h2F, 4, 6), 0);
      s = {1'b0, v[0], v[1]} + {1'b0, v[2], v[3]} + 33'(cin0);
      check({peek(4), peek(5)} == s[31:0], $sformatf("pair add %h%h", peek(4), peek(5)));
      check(flags.c == s[32], "pair add carry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
