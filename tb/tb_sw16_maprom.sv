// tb_sw16_maprom: self-checking test of the opcode map. Every one of the
// 256 opcodes is applied; the 23 implemented opcodes must give the start
// address of their microroutine, all others the fetch routine.
//
// Source: Opcodes given by the lab and those assumed by this design are both
// in the table.
module tb_sw16_maprom;
  import sw16_pkg::*;
  logic [7:0] opcode, uaddr;
  int checks = 0, failures = 0;

  sw16_maprom dut (.opcode, .uaddr);

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  function automatic logic [7:0] expect_of(input logic [7:0] op);
    case (op)
      8'h00: return 8'h10; 8'h03: return 8'h11; 8'h06: return 8'h12; 8'h0D: return 8'h16;
      8'h13: return 8'h19; 8'h14: return 8'h20; 8'h15: return 8'h26; 8'h16: return 8'h2B;
      8'h17: return 8'h28; 8'h18: return 8'h32; 8'h19: return 8'h36; 8'h1A: return 8'h3A;
      8'h1B: return 8'h3C; 8'h21: return 8'h41; 8'h2B: return 8'h42; 8'h2D: return 8'h50;
      8'h2E: return 8'h60; 8'h2F: return 8'h68; 8'h31: return 8'h43; 8'h36: return 8'h45;
      8'h3B: return 8'h47; 8'h3D: return 8'h54; 8'hFF: return 8'h0D;
      default: return 8'h01;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      opcode = 8'(i); #1;
      checks++;
      if (uaddr !== expect_of(opcode)) begin
        failures++; $display("FAIL opcode %h -> %h", opcode, uaddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
