// tb_sw16_outport: self-checking test of the output port register: reset
// to 0, load the data on the rising edge while en is high, hold otherwise.
//
// Source: Expected values: a model register.
module tb_sw16_outport;
  logic        clk = 0, rst, en;
  logic [15:0] data, pins, model;
  int checks = 0, failures = 0;

  sw16_outport dut (.clk, .rst, .en, .data, .pins);
  always #5 clk = ~clk;

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    rst = 1; en = 0; data = 16'hFFFF;
    @(posedge clk); #1 rst = 0; model = 0;
    checks++; if (pins !== 16'h0000) failures++;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk); en = ($urandom % 4) == 0; data = 16'($urandom);
      @(posedge clk); #1;
      if (en) model = data;
      checks++;
      if (pins !== model) begin failures++; $display("FAIL %h expected %h", pins, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
