// sw16_aux: Sweet16 auxiliary components: the I/O buffer between the
// internal and external data buses, and the memory address register (MAR).
//
// The source uses a bidirectional tri-state data bus; this design splits it
// into an outbound and an inbound bus. in_bus is the external bus gated by
// RD_STR (0 when not reading); it feeds the RALU data input and the
// instruction register. The internal data bus carries the RALU's data
// output when DB_DVR_EN is set and in_bus otherwise; it feeds the MAR and
// the outbound external bus (qualified outside by WR_STR). Keeping the
// RALU input on in_bus means the RALU output can never loop back into its
// own input. The MAR loads the internal bus on the rising edge when MAR_LD
// is set and drives the address bus.
//
// From the Sweet16 lab design: the MAR and the bus driver between the RALU and
// the data bus (DB_DVR_EN, MAR_LD, RD_STR).
// Own choices: split inbound/outbound buses in place of the tri-state bus.
module sw16_aux (
  input  logic        clk,
  input  logic        rst,
  input  logic        db_dvr_en,
  input  logic        mar_ld,
  input  logic        rd_str,
  input  logic [15:0] ralu_out,
  input  logic [15:0] ext_din,
  output logic [15:0] in_bus,
  output logic [15:0] ext_dout,
  output logic [15:0] addr
);
  logic [15:0] bus;  // internal data bus

  assign in_bus = rd_str ? ext_din : 16'h0000;
  assign bus    = db_dvr_en ? ralu_out : in_bus;
  assign ext_dout = bus;

  sw16_reg16 #(.W(16)) u_mar (.clk, .rst, .ld(mar_ld), .d(bus), .q(addr));
endmodule
