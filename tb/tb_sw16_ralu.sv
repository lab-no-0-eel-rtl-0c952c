// tb_sw16_ralu: self-checking test of the RALU (register array, A-input
// selector, ALU, shifter, Q register, status register).
// Directed: the lab's Instruction 1, R3 <= (R1 + R2) / 2 with
// R1 = 0x1234, R2 = 0x5678, done in one clock cycle using add, shift right
// and the carry out as shift-in, giving 0x3456. Random: registers are
// loaded from the data input, then random add/subtract operations between
// registers update a register and the flags; both are compared with a
// model. Q is loaded from the shifter, shifted, and written back through
// the SSEL selector; short immediate/offset selection is also checked.
// Inputs change on the falling edge; state is checked after the rising edge.
//
// Source: The (1234+5678)/2 = 3456 single-cycle case is the lab's; the random
// cases use a model.
module tb_sw16_ralu;
  import sw16_pkg::*;
  logic        clk = 0, rst;
  logic [4:0]  a_addr, b_addr, c_addr;
  logic        we, wnb, cin, iter, fsi_val, use_cout, qsi, ssel, dsel;
  rsel_e       rsel;
  logic [15:0] d_in, simm, soff, data_out, q_reg;
  alu_fn_e     fsel;
  fshift_e     f_shft_sel;
  qshift_e     q_shft_sel;
  srwr_e       sr_wr;
  flags_t      flags;
  logic        uc, us, uz, alu_cout, fso, qso, q0, fsi;
  int checks = 0, failures = 0;
  logic [15:0] model [16];

  assign fsi = use_cout ? alu_cout : fsi_val;

  sw16_ralu dut (.clk, .rst, .a_addr, .b_addr, .c_addr, .we, .wnb, .rsel, .d_in, .simm, .soff,
                 .fsel, .cin, .iter, .f_shft_sel, .fsi, .q_shft_sel, .qsi, .ssel, .dsel, .sr_wr,
                 .data_out, .flags, .uc, .us, .uz, .alu_cout, .fso, .qso, .q0, .q_reg);
  always #5 clk = ~clk;

  initial begin #2_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic idle();
    we = 0; wnb = 1; rsel = RS_REG; fsel = F_ZERO; cin = 0; iter = 0; f_shft_sel = SH_PASS;
    fsi_val = 0; use_cout = 0; q_shft_sel = Q_HOLD; qsi = 0; ssel = 0; dsel = 0; sr_wr = SR_NONE;
  endtask

  task automatic load(input logic [4:0] r, input logic [15:0] v);
    @(negedge clk); idle();
    rsel = RS_DIN; d_in = v; fsel = F_ADEC; cin = 1; c_addr = r; b_addr = r; we = 1;
    @(posedge clk); #1 idle();
    if (r < 16) model[r] = v;
  endtask

  function automatic logic [15:0] peek(input int r);
    return dut.u_regs.regs[r];
  endfunction

  initial begin
    rst = 1; idle(); a_addr = 0; b_addr = 0; c_addr = 0; d_in = 0; simm = 0; soff = 0;
    @(posedge clk); #1 rst = 0;
    // ---- Instruction 1 --------------------------------------------------
    load(1, 16'h1234); load(2, 16'h5678);
    @(negedge clk);
    a_addr = 1; b_addr = 2; c_addr = 3; rsel = RS_REG; fsel = F_ADD; cin = 0;
    f_shft_sel = SH_RIGHT; use_cout = 1; dsel = 1; we = 1; sr_wr = SR_ARITH;
    #1 check(data_out == 16'h3456, $sformatf("Instruction 1 data_out %h", data_out));
    @(posedge clk); #1;
    check(peek(3) == 16'h3456, $sformatf("Instruction 1 R3 = %h", peek(3)));
    check(flags.c == 0 && flags.z == 0, "Instruction 1 flags");
    idle(); model[3] = 16'h3456;
    // ---- random arithmetic ----------------------------------------------
    for (int r = 0; r < 16; r++) load(5'(r), 16'($urandom));
    for (int n = 0; n < 1500; n++) begin
      logic [4:0] ra, rb; logic [16:0] s; logic c0; bit sub;
      logic [15:0] x, y, e; logic ev;
      ra = 5'($urandom % 16); rb = 5'($urandom % 16); sub = 1'($urandom); c0 = 1'($urandom);
      @(negedge clk);
      a_addr = ra; b_addr = rb; c_addr = rb; rsel = RS_REG; fsel = sub ? F_BSUBA : F_ADD;
      cin = c0; we = 1; sr_wr = SR_ARITH;
      x = sub ? ~model[ra] : model[ra]; y = model[rb];
      s = {1'b0, x} + {1'b0, y} + 17'(c0); e = s[15:0];
      ev = (x[15] == y[15]) && (e[15] != x[15]);
      @(posedge clk); #1;
      model[rb] = e;
      check(peek(rb) == e, $sformatf("%s R%0d,R%0d = %h expected %h", sub ? "sub" : "add",
                                     ra, rb, peek(rb), e));
      check(flags == '{c: s[16], v: ev, s: e[15], z: (e == 0)}, "arith flags");
      idle();
    end
    // ---- Q register: load, shift right with QSI, write back via SSEL -----
    @(negedge clk);
    rsel = RS_DIN; d_in = 16'hA5C3; fsel = F_ADEC; cin = 1; q_shft_sel = Q_LOAD;
    @(posedge clk); #1 check(q_reg == 16'hA5C3, "Q load"); idle();
    @(negedge clk); q_shft_sel = Q_RIGHT; qsi = 1;
    #1 check(qso == 1'b1 && q0 == 1'b1, "Q shift-out");
    @(posedge clk); #1 check(q_reg == 16'hD2E1, $sformatf("Q right %h", q_reg)); idle();
    @(negedge clk); ssel = 1; c_addr = 7; we = 1;
    @(posedge clk); #1 check(peek(7) == 16'hD2E1, "SSEL writes Q"); idle();
    // ---- short immediate / offset, micro flags, byte write ----------------
    @(negedge clk);
    simm = 16'h000B; soff = 16'hFF80; rsel = RS_SIMM; fsel = F_ADEC; cin = 1; dsel = 1;
    #1 check(data_out == 16'h000B, "short immediate path");
    rsel = RS_SOFF; #1 check(data_out == 16'hFF80, "short offset path");
    c_addr = 8; we = 1; wnb = 0; sr_wr = SR_UFLAGS;
    model[8] = peek(8);
    @(posedge clk); #1;
    check(peek(8) == {model[8][15:8], 8'h80}, "byte write keeps high byte");
    check(us == 1'b1 && uc == 1'b1 && uz == 1'b0, "micro flags");
    idle();
    @(negedge clk); sr_wr = SR_SETC; @(posedge clk); #1 check(flags.c, "set C");
    @(negedge clk); sr_wr = SR_CLRC; @(posedge clk); #1 check(!flags.c, "clear C");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
