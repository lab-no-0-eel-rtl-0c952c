// sw16_decoder: memory-map decoder of the Sweet16 external architecture.
//
// Memory map (byte addresses):
//   0x0000-0x07FF  ROM, 1K words, read only
//   0x0800-0x0FFF  RAM, 1K words
//   0xFF00-0xFF7F  input port, read only
//   0xFF80-0xFFFF  output port, write only
// Address bit 0 is not decoded: both byte lanes are enabled together, so
// every access is a 16-bit word. Enables are combinational functions of the
// address and the read/write strobes; a strobe pair with both or neither
// asserted enables nothing. At most one device is enabled at a time.
// Address bits 6:1 are not decoded either: each port answers anywhere in
// its 128-byte range.
//
// From the Sweet16 lab design: an address decoder selecting ROM, RAM and the
// I/O ports, with the test addresses 0x0010 (ROM), 0x0800 (RAM), 0xFF33
// (input) and 0xFFBA (output).
// Own choices: the exact decode ranges.
module sw16_decoder (
  input  logic [15:1] addr,
  input  logic        rd_str,
  input  logic        wr_str,
  output logic        rom_hi_en,
  output logic        rom_lo_en,
  output logic        ram_hi_en,
  output logic        ram_lo_en,
  output logic        ram_we,
  output logic        ram_oe,
  output logic        outport_en,
  output logic        inport_en
);
  logic rd, wr, rom_sel, ram_sel, io_sel;

  assign rd      = rd_str && !wr_str;
  assign wr      = wr_str && !rd_str;
  assign rom_sel = (addr[15:11] == 5'b00000);
  assign ram_sel = (addr[15:11] == 5'b00001);
  assign io_sel  = (addr[15:8] == 8'hFF);

  assign rom_hi_en  = rom_sel && rd;
  assign rom_lo_en  = rom_sel && rd;
  assign ram_hi_en  = ram_sel && (rd || wr);
  assign ram_lo_en  = ram_sel && (rd || wr);
  assign ram_we     = ram_sel && wr;
  assign ram_oe     = ram_sel && rd;
  assign outport_en = io_sel && addr[7] && wr;
  assign inport_en  = io_sel && !addr[7] && rd;
endmodule
