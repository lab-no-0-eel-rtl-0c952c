// tb_sw16_rom_1kx8: self-checking test of the byte-lane ROM. Two
// instances (high and low lane, default 1K depth) are read at every
// address: with the chip enable high each must return its byte of the
// built-in program word, with it low each must return 0.
//
// Source: The program contents are the lab's multiply test with this design's
// stack address.
module tb_sw16_rom_1kx8;
  import sw16_pkg::*;
  logic [9:0] addr;
  logic       en;
  logic [7:0] hi, lo;
  int checks = 0, failures = 0;

  sw16_rom_1kx8 u_hi (.addr, .en, .data(hi));
  sw16_rom_1kx8 #(.DEPTH_LOG2(10), .HI(1'b0)) u_lo (.addr, .en, .data(lo));

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  initial begin
    #1;
    for (int i = 0; i < 1024; i++) begin
      logic [15:0] w;
      w = mulrom_word(10'(i));
      addr = 10'(i); en = 1; #1;
      checks++;
      if ({hi, lo} !== w) begin failures++; $display("FAIL word %h = %h%h", i, hi, lo); end
      en = 0; #1;
      checks++;
      if ({hi, lo} !== 16'h0000) begin failures++; $display("FAIL disabled read %h", i); end
    end
    // the program starts with LDI R2,#stack
    addr = 0; en = 1; #1; checks++; if ({hi, lo} !== 16'h3B20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
