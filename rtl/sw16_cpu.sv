// sw16_cpu: the Sweet16 CPU (sw16cpu): internal architecture, controller
// and auxiliary components.
//
// The controller's pipeline register drives the 42-bit command bus into
// the internal architecture; the auxiliary block joins the RALU output and
// the external data bus: memory data reaches the RALU and the instruction
// register, and the internal data bus (RALU output or memory data) reaches
// the MAR and the outbound bus. Externally the CPU presents a
// 16-bit byte address (from the MAR), separate inbound and outbound data
// buses and the read and write strobes. Test outputs expose the IR, the
// macro flags and the microprogram address, as on the original design's
// test pins.
//
// From the Sweet16 lab design: the CPU as controller plus internal
// architecture plus bus interface.
// Own choices: the assertion that the strobes never overlap.
module sw16_cpu
  import sw16_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic [15:0] addr,
  input  logic [15:0] din,
  output logic [15:0] dout,
  output logic        rd_str,
  output logic        wr_str,
  // test signals
  output logic [15:0] ir,
  output flags_t      flags,
  output logic [7:0]  up_addr,
  output logic [13:0] up_seq
);
  cmd_t        cmd;
  logic [15:0] in_bus, ralu_out;
  logic        uc, us;

  sw16_controller u_cont (
    .clk, .rst, .bus(in_bus), .flags, .uc, .us, .cmd, .ir, .up_addr, .up_seq);

  sw16_intarch u_int (
    .clk, .rst, .cmd, .ir, .bus(in_bus), .data_out(ralu_out), .flags, .uc, .us);

  sw16_aux u_aux (
    .clk, .rst, .db_dvr_en(cmd.db_dvr_en), .mar_ld(cmd.mar_ld), .rd_str(cmd.rd_str),
    .ralu_out, .ext_din(din), .in_bus, .ext_dout(dout), .addr);

  assign rd_str = cmd.rd_str;
  assign wr_str = cmd.wr_str;

  // The two strobes are never asserted together.
  a_strobes: assert property (@(posedge clk) disable iff (rst) !(rd_str && wr_str));
endmodule
