// sweet16: the complete Sweet16 microprocessor: CPU plus external
// architecture.
//
// The Sweet16 is a 16-bit microprogrammed CISC processor. The CPU fetches
// instructions from a 1K-word ROM at address 0, keeps data in a 1K-word
// RAM at 0x0800 and talks to the outside world through a 16-bit input
// port (reads of 0xFF00-0xFF7F) and a 16-bit output port (writes to
// 0xFF80-0xFFFF). Inputs: clock, synchronous active-high reset, input port.
// Output: output port, plus test signals that expose the address and data
// buses, the strobes, the instruction register, the flags {C,V,S,Z} and
// the microprogram address and sequencer field.
//
// From the Sweet16 lab design: the complete Sweet16 computer: CPU plus
// external architecture.
// Own choices: the observation outputs (buses, IR, flags, microprogram address
// and sequencer field).
module sweet16
  import sw16_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] inport,
  output logic [15:0] outport,
  // test signals
  output logic [15:0] addr_bus,
  output logic [15:0] rd_data_bus,
  output logic [15:0] wr_data_bus,
  output logic        rd_str,
  output logic        wr_str,
  output logic [15:0] ir,
  output flags_t      flags,
  output logic [7:0]  up_addr,
  output logic [13:0] up_seq
);
  sw16_cpu u_cpu (
    .clk, .rst, .addr(addr_bus), .din(rd_data_bus), .dout(wr_data_bus),
    .rd_str, .wr_str, .ir, .flags, .up_addr, .up_seq);

  sw16_extarch u_ext (
    .clk, .rst, .addr(addr_bus), .data_out(wr_data_bus), .data_in(rd_data_bus),
    .rd_str, .wr_str, .inport, .outport);
endmodule
