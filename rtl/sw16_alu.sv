// sw16_alu: 16-bit arithmetic-logic unit of the register ALU (ALU_16a).
//
// Implements the sixteen-entry function map selected by fsel (see
// sw16_pkg::alu_fn_e): additions and subtractions with carry in, the four
// logic functions, decrement-with-carry forms that pass A or B when
// cin = 1, and the iterate functions for multiplication and
// non-restoring division. For the iterate functions the operation is
// chosen per cycle by i1 (multiply: add or pass) or i0 (divide: subtract
// or add), driven from outside the microprogram. Codes E and F give 0.
//
// cout is the carry out of bit 15 (1 = no borrow for subtraction); v is
// two's complement overflow of the addition actually performed. For the
// signed multiply iterate (B), cout is the sign of the 17-bit sum so that
// a right shift keeps the sign. Logic functions and pass forms without an
// adder give cout = v = 0. Purely combinational.
//
// From the Sweet16 lab design: the ALU function table: add, subtract both
// ways, logic functions, pass and the multiply/divide iteration functions
// selected by FSEL with a carry input.
// Own choices: the exact behaviour of the iteration functions, zero carry out
// for logic functions and codes 14/15 giving 0.
module sw16_alu
  import sw16_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  alu_fn_e     fsel,
  input  logic        cin,
  input  logic        i1,
  input  logic        i0,
  output logic [15:0] f,
  output logic        cout,
  output logic        v
);
  logic [15:0] x, y;
  logic        c0;
  logic        use_add;
  logic [16:0] sum;

  always_comb begin
    x = '0; y = '0; c0 = 1'b0; use_add = 1'b1;
    case (fsel)
      F_ADD:   begin x = a;       y = b;       c0 = cin;  end
      F_BPC:   begin x = '0;      y = b;       c0 = cin;  end
      F_ASUBB: begin x = a;       y = ~b;      c0 = cin;  end
      F_BSUBA: begin x = ~a;      y = b;       c0 = cin;  end
      F_ADEC:  begin x = a;       y = 16'hFFFF; c0 = cin; end
      F_BDEC:  begin x = b;       y = 16'hFFFF; c0 = cin; end
      F_UMUL, F_SMUL: begin
        x = i1 ? a : '0; y = b; c0 = 1'b0;
      end
      F_SMULT: begin x = i1 ? ~a : '0; y = b; c0 = i1; end
      F_NDIV:  begin x = i0 ? ~a : a; y = b; c0 = i0; end
      default: use_add = 1'b0;
    endcase
    sum = {1'b0, x} + {1'b0, y} + 17'(c0);
  end

  always_comb begin
    f = '0; cout = 1'b0; v = 1'b0;
    if (use_add) begin
      f    = sum[15:0];
      cout = sum[16];
      v    = (x[15] == y[15]) && (sum[15] != x[15]);
      if (fsel == F_SMUL) cout = i1 ? (sum[15] ^ v) : b[15];
      // A plain pass of B is not an addition: no carry out.
      if ((fsel == F_UMUL || fsel == F_SMULT) && !i1) begin cout = 1'b0; v = 1'b0; end
    end else begin
      case (fsel)
        F_AND:   f = a & b;
        F_OR:    f = a | b;
        F_XOR:   f = a ^ b;
        F_NOTA:  f = ~a;
        default: f = '0;
      endcase
    end
  end
endmodule
