// tb_sw16_inport: self-checking test of the input port: the pins appear on
// the data output while en is high, and 0 otherwise. Random vectors.
//
// Source: Expected values: gating by enable.
module tb_sw16_inport;
  logic [15:0] pins, data;
  logic        en;
  int checks = 0, failures = 0;

  sw16_inport dut (.pins, .en, .data);

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      pins = 16'($urandom); en = 1'($urandom); #1;
      checks++;
      if (data !== (en ? pins : 16'h0000)) begin failures++; $display("FAIL %h", data); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
