// sw16_inport: the Sweet16 input port, a 16-bit bus driver.
//
// Drives the external data bus with the value on the input pins while en
// (INPORTEN from the memory decoder) is high, and with 0 otherwise, so it
// can be OR-ed onto the shared read bus without collisions. The original
// is a tri-state buffer; the gated driver is this design's two-state
// equivalent. Combinational.
//
// From the Sweet16 lab design: a 16-bit input port on the data bus.
// Own choices: AND-gating instead of a tri-state driver.
module sw16_inport (
  input  logic [15:0] pins,
  input  logic        en,
  output logic [15:0] data
);
  assign data = pins & {16{en}};
endmodule
