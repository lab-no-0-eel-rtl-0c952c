// tb_sw16_ram_1kx8: self-checking test of one RAM byte lane. Random
// writes (on the rising edge with en and we high) and reads (asynchronous,
// with en and oe high; 0 otherwise) are compared with a model array.
//
// Source: The synchronous write checked is this design's choice.
module tb_sw16_ram_1kx8;
  logic       clk = 0, en, oe, we;
  logic [9:0] addr;
  logic [7:0] data_in, data_out;
  logic [7:0] model [1024];
  bit         known [1024];
  int checks = 0, failures = 0;

  sw16_ram_1kx8 dut (.clk, .addr, .en, .oe, .we, .data_in, .data_out);
  always #5 clk = ~clk;

  initial begin #2_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    en = 0; oe = 0; we = 0; addr = 0; data_in = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      addr = 10'($urandom % 64); en = ($urandom % 8) != 0; we = 1'($urandom);
      oe = !we; data_in = 8'($urandom);
      #1;
      if (en && oe && known[addr]) begin
        checks++;
        if (data_out !== model[addr]) begin failures++; $display("FAIL read %h", addr); end
      end
      if (!(en && oe)) begin
        checks++;
        if (data_out !== 8'h00) begin failures++; $display("FAIL idle output"); end
      end
      @(posedge clk);
      if (en && we) begin model[addr] = data_in; known[addr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
