// tb_sw16_ext_shifter: self-checking test of the Q shifter (hold, load,
// shift right, shift left with QSI in and QSO out). Combinational, random
// vectors compared with a reference model.
//
// Source: Expected values: independent reference model of this design's Q
// shift modes.
module tb_sw16_ext_shifter;
  import sw16_pkg::*;
  logic [15:0] q, d, q_next;
  qshift_e     sel;
  logic        qsi, qso, q0;
  int checks = 0, failures = 0;

  sw16_ext_shifter dut (.q, .d, .sel, .qsi, .q_next, .qso, .q0);

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    logic [15:0] e; logic eo;
    for (int n = 0; n < 2000; n++) begin
      q = 16'($urandom); d = 16'($urandom); sel = qshift_e'(n % 4); qsi = 1'($urandom);
      #1;
      case (sel)
        Q_HOLD:  e = q;
        Q_LOAD:  e = d;
        Q_RIGHT: e = {qsi, q[15:1]};
        default: e = {q[14:0], qsi};
      endcase
      eo = (sel == Q_RIGHT) ? q[0] : q[15];
      checks++;
      if (q_next !== e || qso !== eo || q0 !== q[0]) begin
        failures++;
        $display("FAIL sel=%0d q=%h d=%h qsi=%b -> %h %b", sel, q, d, qsi, q_next, qso);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
