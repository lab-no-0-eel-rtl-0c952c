// sw16_ralu: register arithmetic-logic unit (RALU_16), the computational
// core of the Sweet16.
//
// Datapath, all in one clock cycle:
//   register array ports A/B -> A-input selector (U3) -> ALU -> ALU shifter
//   -> (ssel) register array write port C, and -> (dsel) data out.
// The A-input selector picks the internal data bus (memory data, long
// immediates and branch offsets), a short immediate, a short signed
// offset or register port A. The ALU's B input is always register port B.
// The Q register with its shifter sits beside the ALU shifter so the two
// can shift as one 32-bit value; it loads from the shifter output. The
// status register holds the macro flags {C,V,S,Z} seen by programs and
// three micro flags (uC, uS, uZ) used only by the microprogram; sr_wr
// selects which of them the current cycle updates (sw16_pkg::srwr_e).
//
// Timing: register array, Q and status register update on the rising
// edge; everything else is combinational. data_out is register port B
// (dsel = 0) or the shifter output (dsel = 1).
//
// From the Sweet16 lab design: the RALU structure: register array, A-input
// selector, ALU, ALU shifter, Q register, SSEL/DSEL selectors and status
// register; the single-cycle (1234+5678)/2 example.
// Own choices: flags kept in a separate status register rather than in one of
// registers 16-19, and the SR_WR update modes other than the arithmetic one.
module sw16_ralu
  import sw16_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // register array
  input  logic [4:0]  a_addr,
  input  logic [4:0]  b_addr,
  input  logic [4:0]  c_addr,
  input  logic        we,
  input  logic        wnb,
  // operand selection
  input  rsel_e       rsel,
  input  logic [15:0] d_in,
  input  logic [15:0] simm,
  input  logic [15:0] soff,
  // ALU and shifters
  input  alu_fn_e     fsel,
  input  logic        cin,
  input  logic        iter,
  input  fshift_e     f_shft_sel,
  input  logic        fsi,
  input  qshift_e     q_shft_sel,
  input  logic        qsi,
  input  logic        ssel,
  input  logic        dsel,
  input  srwr_e       sr_wr,
  // outputs
  output logic [15:0] data_out,
  output flags_t      flags,
  output logic        uc,
  output logic        us,
  output logic        uz,
  output logic        alu_cout,
  output logic        fso,
  output logic        qso,
  output logic        q0,
  output logic [15:0] q_reg
);
  logic [15:0] a_data, b_data, alu_a, f, sh_out, q_next, c_data;
  logic        v, sh_s, sh_z;

  sw16_reg_array u_regs (
    .clk, .rst, .a_addr, .b_addr, .c_addr, .we, .wnb,
    .c_data, .a_data, .b_data);

  sw16_mux #(.W(16), .N(4)) u3_amux (
    .d({a_data, soff, simm, d_in}), .sel(rsel), .y(alu_a));

  sw16_alu u4_alu (
    .a(alu_a), .b(b_data), .fsel, .cin, .i1(iter), .i0(iter),
    .f, .cout(alu_cout), .v);

  sw16_alu_shifter u5_fshift (
    .f, .sel(f_shft_sel), .fsi, .d_out(sh_out), .fso, .s(sh_s), .z(sh_z));

  sw16_ext_shifter u6_qshift (
    .q(q_reg), .d(sh_out), .sel(q_shft_sel), .qsi, .q_next, .qso, .q0);

  sw16_reg16 #(.W(16)) u7_qreg (
    .clk, .rst, .ld(1'b1), .d(q_next), .q(q_reg));

  sw16_mux #(.W(16), .N(2)) u8_smux (
    .d({q_reg, sh_out}), .sel(ssel), .y(c_data));

  sw16_mux #(.W(16), .N(2)) u9_dmux (
    .d({sh_out, b_data}), .sel(dsel), .y(data_out));

  // Status register.
  always_ff @(posedge clk) begin
    if (rst) begin
      flags <= '0;
      uc <= 1'b0; us <= 1'b0; uz <= 1'b0;
    end else begin
      case (sr_wr)
        SR_UFLAGS: begin uc <= alu_cout; us <= sh_s; uz <= sh_z; end
        SR_LOGIC:  begin flags.s <= sh_s; flags.z <= sh_z; end
        SR_SHIFT:  begin flags.c <= fso; flags.s <= sh_s; flags.z <= sh_z; end
        SR_ARITH:  flags <= '{c: alu_cout, v: v, s: sh_s, z: sh_z};
        SR_CLRC:   flags.c <= 1'b0;
        SR_SETC:   flags.c <= 1'b1;
        default:   ;
      endcase
    end
  end
endmodule
