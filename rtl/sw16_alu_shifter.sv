// sw16_alu_shifter: shifter on the output of the ALU (ALU_shifter_16).
//
// Every ALU result passes through it. sel chooses pass, left shift, right
// shift or arithmetic right shift (sign kept, fsi ignored); fsi is the bit
// shifted in. fso is the bit shifted out (F[15] for a left shift, F[0]
// for right shifts, 0 for pass). The sign and zero flags of the result are
// produced here, since a shift can change them. Combinational.
//
// From the Sweet16 lab design: a shifter after the ALU with a serial input
// (FSI) and output (FSO) and the S/Z flags taken from its output.
// Own choices: the shift-mode encoding and the arithmetic right shift as the
// fourth mode.
module sw16_alu_shifter
  import sw16_pkg::*;
(
  input  logic [15:0] f,
  input  fshift_e     sel,
  input  logic        fsi,
  output logic [15:0] d_out,
  output logic        fso,
  output logic        s,
  output logic        z
);
  always_comb begin
    case (sel)
      SH_LEFT:  begin d_out = {f[14:0], fsi};   fso = f[15]; end
      SH_RIGHT: begin d_out = {fsi, f[15:1]};   fso = f[0];  end
      SH_ASR:   begin d_out = {f[15], f[15:1]}; fso = f[0];  end
      default:  begin d_out = f;                fso = 1'b0;  end
    endcase
  end
  assign s = d_out[15];
  assign z = (d_out == 16'h0000);
endmodule
