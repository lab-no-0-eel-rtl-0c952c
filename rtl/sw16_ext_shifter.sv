// sw16_ext_shifter: the Q shifter (Ext_shifter_16) that extends the ALU
// shifter to 32 bits for multiplication and division.
//
// Combinational next-state logic for the Q register: hold, load d, shift
// right or shift left with qsi shifted in. qso is the bit leaving Q in the
// selected direction (Q[0] when shifting right, otherwise Q[15]); the ALU
// shifter takes it as its serial input when the pair shifts left as one
// 32-bit value. q0 is Q[0], the multiplier bit that steers the multiply
// iterate. The register itself is a sw16_reg16 in the register ALU.
//
// From the Sweet16 lab design: the Q register with its own shifter chained to
// the ALU shifter for 32-bit shifts.
// Own choices: the mode encoding (hold, load, right, left).
module sw16_ext_shifter
  import sw16_pkg::*;
(
  input  logic [15:0] q,
  input  logic [15:0] d,
  input  qshift_e     sel,
  input  logic        qsi,
  output logic [15:0] q_next,
  output logic        qso,
  output logic        q0
);
  always_comb begin
    case (sel)
      Q_LOAD:  q_next = d;
      Q_RIGHT: q_next = {qsi, q[15:1]};
      Q_LEFT:  q_next = {q[14:0], qsi};
      default: q_next = q;
    endcase
  end
  assign qso = (sel == Q_RIGHT) ? q[0] : q[15];
  assign q0  = q[0];
endmodule
