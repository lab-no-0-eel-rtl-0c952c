// sw16_mux: N-input, W-bit selector used throughout the Sweet16 datapath.
//
// One parameterized module stands for the three selector sizes of the
// register ALU: MUX2_8 (W=8, N=2), MUX2_16 (W=16, N=2) and MUX4_16 (W=16,
// N=4). Input d[i] appears on y when sel == i. Purely combinational.
//
// From the Sweet16 lab design: the selectors of the datapath (U3 A input,
// SSEL, DSEL, AMUX/BMUX, carry-in, shift-in and iterate selectors).
// Own choices: one generic parameterised module for all of them; out-of-range
// selects give 0.
module sw16_mux #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 2,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][W-1:0] d,
  input  logic [SW-1:0]       sel,
  output logic [W-1:0]        y
);
  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == SW'(i)) y = d[i];
  end
endmodule
