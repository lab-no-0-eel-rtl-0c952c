// tb_sw16_decoder: self-checking test of the address decoder against the
// memory map: ROM 0x0000-0x07FF (read only), RAM 0x0800-0x0FFF, input port
// 0xFF00-0xFF7F (read), output port 0xFF80-0xFFFF (write), nothing
// elsewhere. Random addresses plus the lab's test addresses 0x0010,
// 0x0800, 0xFF33 and 0xFFBA, with every strobe combination.
//
// Source: The four test addresses are the lab's; the exact ranges are this
// design's.
module tb_sw16_decoder;
  logic [15:0] a;
  logic        rd_str, wr_str;
  logic rom_hi_en, rom_lo_en, ram_hi_en, ram_lo_en, ram_we, ram_oe, outport_en, inport_en;
  int checks = 0, failures = 0;

  sw16_decoder dut (.addr(a[15:1]), .rd_str, .wr_str, .rom_hi_en, .rom_lo_en, .ram_hi_en,
                    .ram_lo_en, .ram_we, .ram_oe, .outport_en, .inport_en);

  initial begin #1_000_000; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic one(input logic [15:0] addr, input logic r, input logic w);
    bit rom, ram, inp, outp;
    a = addr; rd_str = r; wr_str = w; #1;
    rom  = (a < 16'h0800) && r;
    ram  = (a >= 16'h0800 && a < 16'h1000) && (r || w);
    inp  = (a >= 16'hFF00 && a < 16'hFF80) && r;
    outp = (a >= 16'hFF80) && w;
    checks++;
    if (rom_hi_en !== rom || rom_lo_en !== rom || ram_hi_en !== ram || ram_lo_en !== ram ||
        (ram && ram_we !== w) || (ram && ram_oe !== r) || inport_en !== inp ||
        outport_en !== outp) begin
      failures++;
      $display("FAIL addr %h rd %b wr %b: rom %b ram %b we %b oe %b in %b out %b", a, r, w,
               rom_hi_en, ram_hi_en, ram_we, ram_oe, inport_en, outport_en);
    end
  endtask

  initial begin
    logic [15:0] fixed [4] = '{16'h0010, 16'h0800, 16'hFF33, 16'hFFBA};
    foreach (fixed[i]) begin one(fixed[i], 1, 0); one(fixed[i], 0, 1); one(fixed[i], 0, 0); end
    for (int n = 0; n < 3000; n++) begin
      logic [15:0] ad;
      case (n % 4)
        0: ad = 16'($urandom % 16'h1000);
        1: ad = 16'hFF00 | 16'($urandom % 256);
        2: ad = 16'($urandom);
        default: ad = 16'h07FE + 16'($urandom % 4);
      endcase
      case ($urandom % 3)
        0: one(ad, 1, 0);
        1: one(ad, 0, 1);
        default: one(ad, 0, 0);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
