// tb_sw16_mux: self-checking test of the generic multiplexer, once at its
// default size (2 x 16 bits) and once as the 4-input selector used in front
// of the ALU. Random data and select values; combinational.
//
// Source: Expected values: plain array indexing.
module tb_sw16_mux;
  logic [1:0][15:0] d2;
  logic             s2;
  logic [15:0]      y2;
  logic [3:0][15:0] d4;
  logic [1:0]       s4;
  logic [15:0]      y4;
  int checks = 0, failures = 0;

  sw16_mux dut2 (.d(d2), .sel(s2), .y(y2));
  sw16_mux #(.W(16), .N(4)) dut4 (.d(d4), .sel(s4), .y(y4));

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 2; i++) d2[i] = 16'($urandom);
      for (int i = 0; i < 4; i++) d4[i] = 16'($urandom);
      s2 = 1'($urandom); s4 = 2'($urandom);
      #1;
      checks += 2;
      if (y2 !== d2[s2]) begin failures++; $display("FAIL 2:1 sel=%0d", s2); end
      if (y4 !== d4[s4]) begin failures++; $display("FAIL 4:1 sel=%0d", s4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
