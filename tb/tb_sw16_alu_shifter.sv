// tb_sw16_alu_shifter: self-checking test of the ALU output shifter.
// Random data, shift mode and shift-in bit; compares the shifted word,
// the shift-out bit and the S/Z flags with a reference model.
// Combinational, sampled 1 time unit after each change.
//
// Source: Expected values: independent reference model of this design's shift
// modes.
module tb_sw16_alu_shifter;
  import sw16_pkg::*;
  logic [15:0] f, d_out;
  fshift_e     sel;
  logic        fsi, fso, s, z;
  int checks = 0, failures = 0;

  sw16_alu_shifter dut (.f, .sel, .fsi, .d_out, .fso, .s, .z);

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    logic [15:0] e; logic eo;
    for (int n = 0; n < 2000; n++) begin
      f = (n % 13 == 0) ? 16'h0000 : 16'($urandom);
      sel = fshift_e'(n % 4); fsi = 1'($urandom);
      #1;
      case (sel)
        SH_PASS:  begin e = f; eo = 0; end
        SH_LEFT:  begin e = (f << 1) | 16'(fsi); eo = f[15]; end
        SH_RIGHT: begin e = (f >> 1) | {fsi, 15'b0}; eo = f[0]; end
        default:  begin e = 16'($signed(f) >>> 1); eo = f[0]; end
      endcase
      checks++;
      if (d_out !== e || fso !== eo || s !== e[15] || z !== (e == 0)) begin
        failures++;
        $display("FAIL sel=%0d f=%h fsi=%b -> %h %b", sel, f, fsi, d_out, fso);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
