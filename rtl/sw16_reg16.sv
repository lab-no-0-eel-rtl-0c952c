// sw16_reg16: W-bit register with synchronous reset and load enable
// (the reg_16 component). On a rising clock edge q takes d when ld is high
// and is cleared when rst is high. Used for the Q register, the memory
// address register, the instruction register and the output port.
//
// From the Sweet16 lab design: the registers of the design (MAR, IR, output
// port, Q).
// Own choices: synchronous active-high reset and a load enable.
module sw16_reg16 #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk)
    if (rst)     q <= '0;
    else if (ld) q <= d;
endmodule
