// sw16_rom_1kx8: 1K x 8 program ROM (rom_1kx8). Two of them form the
// 1K x 16 ROM: the HI instance holds the most significant byte of each
// word (the even byte address, big endian), the LO instance the least
// significant byte.
//
// Asynchronous read: data = mem[addr] while en is high, 0 otherwise (the
// original drives a tri-state bus; here the external architecture ORs the
// enabled devices together). The default contents are one byte lane of
// the multiply test program sw16_pkg::mulrom_word; a testbench may load
// another program into mem before releasing reset. DEPTH_LOG2 sets the
// size (10 for 1K).
//
// From the Sweet16 lab design: two 1Kx8 ROMs, one per byte of the word,
// holding the multiply test program.
// Own choices: big-endian byte order (high byte at the even address) and the
// stack address 0x1000 in the built-in program.
module sw16_rom_1kx8
  import sw16_pkg::*;
#(
  parameter int unsigned DEPTH_LOG2 = 10,
  parameter bit          HI = 1'b1
) (
  input  logic [DEPTH_LOG2-1:0] addr,
  input  logic                  en,
  output logic [7:0]            data
);
  logic [7:0] mem [2**DEPTH_LOG2];

  initial begin
    for (int i = 0; i < 2**DEPTH_LOG2; i++) begin
      logic [15:0] wv;
      wv = mulrom_word(10'(i));
      mem[i] = HI ? wv[15:8] : wv[7:0];
    end
  end

  assign data = en ? mem[addr] : 8'h00;
endmodule
