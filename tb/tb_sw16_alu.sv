// tb_sw16_alu: self-checking test of the 16-function ALU.
// Drives random operands, function codes, carry in and iterate bits and
// compares the result, carry out and overflow with a reference model
// written independently here from the ALU function table (32-bit integer
// arithmetic). Purely combinational: inputs change, outputs are sampled
// 1 time unit later.
//
// Source: Expected values: reference model written from the ALU function
// table; the 0x1234 + 0x5678 point is the lab's example.
module tb_sw16_alu;
  import sw16_pkg::*;
  logic [15:0] a, b, f;
  alu_fn_e     fsel;
  logic        cin, i1, i0, cout, v;
  int checks = 0, failures = 0;

  sw16_alu dut (.a, .b, .fsel, .cin, .i1, .i0, .f, .cout, .v);

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic void model(output logic [15:0] ef, output logic ec, output logic ev,
                                output bit chk_v);
    int unsigned s; logic [15:0] x, y; logic c0;
    chk_v = 1; ec = 0; ev = 0;
    case (fsel)
      F_ADD:   begin x = a; y = b; c0 = cin; end
      F_BPC:   begin x = 0; y = b; c0 = cin; end
      F_ASUBB: begin x = a; y = ~b; c0 = cin; end
      F_BSUBA: begin x = ~a; y = b; c0 = cin; end
      F_ADEC:  begin x = a; y = 16'hFFFF; c0 = cin; end
      F_BDEC:  begin x = b; y = 16'hFFFF; c0 = cin; end
      F_UMUL:  begin x = i1 ? a : 0; y = b; c0 = 0; end
      F_SMUL:  begin x = i1 ? a : 0; y = b; c0 = 0; chk_v = 0; end
      F_SMULT: begin x = i1 ? ~a : 0; y = b; c0 = i1; end
      F_NDIV:  begin x = i0 ? ~a : a; y = b; c0 = i0; end
      default: begin x = 0; y = 0; c0 = 0; end
    endcase
    s = 32'(x) + 32'(y) + 32'(c0);
    ef = s[15:0]; ec = s[16];
    ev = (x[15] == y[15]) && (s[15] != x[15]);
    case (fsel)
      F_AND: begin ef = a & b; ec = 0; ev = 0; end
      F_OR:  begin ef = a | b; ec = 0; ev = 0; end
      F_XOR: begin ef = a ^ b; ec = 0; ev = 0; end
      F_NOTA: begin ef = ~a; ec = 0; ev = 0; end
      F_ZERO, F_ZERO2: begin ef = 0; ec = 0; ev = 0; end
      F_UMUL, F_SMULT: if (!i1) begin ec = 0; ev = 0; end
      F_SMUL: ec = i1 ? (s[15] ^ ev) : b[15];
      default: ;
    endcase
  endfunction

  initial begin
    logic [15:0] ef; logic ec, ev; bit cv;
    for (int n = 0; n < 4000; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (n % 7 == 0) a = 16'hFFFF;
      if (n % 11 == 0) b = 16'h0000;
      fsel = alu_fn_e'(n % 16); cin = 1'($urandom); i1 = 1'($urandom); i0 = 1'($urandom);
      #1;
      model(ef, ec, ev, cv);
      checks++;
      if (f !== ef || cout !== ec || (cv && v !== ev)) begin
        failures++;
        $display("FAIL fsel=%0d a=%h b=%h cin=%b i=%b%b: f=%h c=%b v=%b, expected %h %b %b",
                 fsel, a, b, cin, i1, i0, f, cout, v, ef, ec, ev);
      end
    end
    // fixed points from the function table: 1234 + 5678 = 68AC
    a = 16'h1234; b = 16'h5678; fsel = F_ADD; cin = 0; #1;
    checks++; if (f !== 16'h68AC || cout) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
