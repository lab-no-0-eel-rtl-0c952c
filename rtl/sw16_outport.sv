// sw16_outport: the Sweet16 output port, a 16-bit register.
//
// Latches the external data bus on the rising clock edge while en
// (OUTPORTEN from the memory decoder, active during a write to the output
// port's addresses) is high, and holds it on the output pins otherwise.
// Cleared by reset.
//
// From the Sweet16 lab design: a 16-bit output port register loaded from the
// data bus.
// Own choices: reset to zero.
module sw16_outport (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] data,
  output logic [15:0] pins
);
  sw16_reg16 #(.W(16)) u_reg (.clk, .rst, .ld(en), .d(data), .q(pins));
endmodule
