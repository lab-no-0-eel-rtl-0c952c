// sw16_ram_1kx8: 1K x 8 data RAM (ram_1kx8). Two of them form the 1K x 16
// RAM, one per byte lane of the data bus.
//
// Read is asynchronous: data_out = mem[addr] while en and oe are high, 0
// otherwise. Write is synchronous: on the rising clock edge, when en and
// we are high, mem[addr] <= data_in. (The original used an unregistered
// memory with write-enable pulses; the clocked write is this design's
// choice for a synchronous implementation.) The contents are cleared at
// time zero for simulation.
//
// From the Sweet16 lab design: two 1Kx8 RAMs, one per byte lane.
// Own choices: a write on the rising clock edge rather than an asynchronous
// RAM, and zero output when not selected.
module sw16_ram_1kx8 #(
  parameter int unsigned DEPTH_LOG2 = 10
) (
  input  logic                  clk,
  input  logic [DEPTH_LOG2-1:0] addr,
  input  logic                  en,
  input  logic                  oe,
  input  logic                  we,
  input  logic [7:0]            data_in,
  output logic [7:0]            data_out
);
  logic [7:0] mem [2**DEPTH_LOG2];

  initial for (int i = 0; i < 2**DEPTH_LOG2; i++) mem[i] = 8'h00;

  always_ff @(posedge clk)
    if (en && we) mem[addr] <= data_in;

  assign data_out = (en && oe) ? mem[addr] : 8'h00;
endmodule
