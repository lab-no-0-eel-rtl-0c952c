// sw16_intarch: Sweet16 internal architecture: the register ALU plus the
// glue logic that connects it to the 42-bit command bus (sw16intarch).
//
// Register selection: the A and B register addresses come from the IR
// register fields or from constants in the microword (PL_REGA/PL_REGB);
// in "toggle" mode the upper three bits come from the IR field and the
// least significant bit from the microword, so the microprogram can reach
// both halves of an even/odd register pair for 32-bit results. The
// destination is always the B register (C address = B address), since an
// instruction names two registers and the first is also the destination.
// A uses IR.r2 in toggle mode and B uses IR.r1.
// Glue selectors also choose the carry in (0, 1, macro C, micro C), the
// ALU shifter's serial input (0, ALU carry out, Q shift-out, macro C), the
// Q shifter's serial input (0, ALU-shifter shift-out, micro C, 1) and the
// "iterate" bit that steers the multiply and divide ALU functions (Q[0] or
// micro C). Combinational except for the state inside the RALU.
// Unused inputs/outputs: the four bus-control bits of the command word
// (cmd[3:0]) and the opcode byte of the IR are used by the CPU and the
// controller, not here; the RALU's micro zero flag and Q register output
// are observation points that no microroutine needs.
//
// From the Sweet16 lab design: the internal architecture: RALU driven by the
// command bus, A/B register address selectors, carry-in and shift-in
// selectors.
// Own choices: the selector encodings, short immediate = IR[3:0], short offset
// = IR[7:0] sign extended, the register-pair (odd register) selection.
module sw16_intarch
  import sw16_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  cmd_t        cmd,
  input  logic [15:0] ir,
  input  logic [15:0] bus,       // inbound memory data, RALU data input
  output logic [15:0] data_out,  // RALU data output
  output flags_t      flags,
  output logic        uc,
  output logic        us
);
  logic [4:0]  a_addr, b_addr;
  logic [3:0]  r1, r2;
  logic        cin, fsi, qsi, iter;
  logic        alu_cout, fso, qso, q0, uz;
  logic [15:0] simm, soff, q_reg;

  assign r1 = ir[7:4];
  assign r2 = ir[3:0];
  assign simm = {12'h000, r2};
  assign soff = {{8{ir[7]}}, ir[7:0]};

  sw16_mux #(.W(5), .N(4)) u2_amux (
    .d({{1'b0, r2[3:1], cmd.pl_rega[0]}, cmd.pl_rega, {1'b0, r2}, {1'b0, r1}}),
    .sel(cmd.amuxsel), .y(a_addr));

  sw16_mux #(.W(5), .N(4)) u3_bmux (
    .d({{1'b0, r1[3:1], cmd.pl_regb[0]}, cmd.pl_regb, {1'b0, r2}, {1'b0, r1}}),
    .sel(cmd.bmuxsel), .y(b_addr));

  sw16_mux #(.W(1), .N(4)) u_cnmux (
    .d({uc, flags.c, 1'b1, 1'b0}), .sel(cmd.cnsel), .y(cin));

  sw16_mux #(.W(1), .N(4)) u_fsimux (
    .d({flags.c, qso, alu_cout, 1'b0}), .sel(cmd.fsi_sel), .y(fsi));

  sw16_mux #(.W(1), .N(4)) u_qsimux (
    .d({1'b1, uc, fso, 1'b0}), .sel(cmd.qsi_sel), .y(qsi));

  sw16_mux #(.W(1), .N(2)) u_fmux (
    .d({uc, q0}), .sel(cmd.fmuxsel), .y(iter));

  sw16_ralu u_ralu (
    .clk, .rst,
    .a_addr, .b_addr, .c_addr(b_addr), .we(cmd.we), .wnb(cmd.wnb),
    .rsel(cmd.rsel), .d_in(bus), .simm, .soff,
    .fsel(cmd.fsel), .cin, .iter,
    .f_shft_sel(cmd.f_shft_sel), .fsi,
    .q_shft_sel(cmd.q_shft_sel), .qsi,
    .ssel(cmd.ssel), .dsel(cmd.dsel), .sr_wr(cmd.sr_wr),
    .data_out, .flags, .uc, .us, .uz, .alu_cout, .fso, .qso, .q0, .q_reg);
endmodule
