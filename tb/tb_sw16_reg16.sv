// tb_sw16_reg16: self-checking test of the loadable register: synchronous
// reset, load on the rising edge when ld is high, hold otherwise. Random
// stimulus changed on the falling edge, checked after each rising edge.
//
// Source: Expected values: a model register.
module tb_sw16_reg16;
  logic        clk = 0, rst, ld;
  logic [15:0] d, q, model;
  int checks = 0, failures = 0;

  sw16_reg16 dut (.clk, .rst, .ld, .d, .q);
  always #5 clk = ~clk;

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    rst = 1; ld = 0; d = 0;
    @(posedge clk); #1 model = 0;
    checks++; if (q !== 16'h0000) failures++;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      rst = ($urandom % 50) == 0; ld = 1'($urandom); d = 16'($urandom);
      @(posedge clk); #1;
      if (rst) model = 0; else if (ld) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h expected %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
