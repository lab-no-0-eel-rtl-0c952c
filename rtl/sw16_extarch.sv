// sw16_extarch: Sweet16 external architecture (sw16extarch): program ROM,
// data RAM, input port, output port and the memory-map decoder.
//
// Each memory is built from two byte-wide halves addressed by addr[10:1];
// the HI half carries data bits 15:8 (the even byte), the LO half bits
// 7:0, so words are big endian. The decoder enables at most one device;
// the read data of the enabled device is returned on data_in (devices that
// are not enabled drive 0 and the drivers are OR-ed, a two-state stand-in
// for the original shared tri-state bus). RAM and output-port writes happen
// on the rising clock edge while the write strobe is asserted. Address
// bit 0 (the byte within a word) is ignored.
//
// From the Sweet16 lab design: the external architecture: decoder, two ROM
// lanes, two RAM lanes, input and output ports on one data bus.
// Own choices: an OR of gated device outputs in place of the tri-state bus.
module sw16_extarch #(
  parameter int unsigned DEPTH_LOG2 = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] addr,
  input  logic [15:0] data_out,   // from the CPU
  output logic [15:0] data_in,    // to the CPU
  input  logic        rd_str,
  input  logic        wr_str,
  input  logic [15:0] inport,
  output logic [15:0] outport
);
  logic rom_hi_en, rom_lo_en, ram_hi_en, ram_lo_en, ram_we, ram_oe;
  logic outport_en, inport_en;
  logic [7:0]  rom_hi, rom_lo, ram_hi, ram_lo;
  logic [15:0] in_data;
  logic [DEPTH_LOG2-1:0] waddr;

  assign waddr = addr[DEPTH_LOG2:1];

  sw16_decoder u_dec (
    .addr(addr[15:1]), .rd_str, .wr_str,
    .rom_hi_en, .rom_lo_en, .ram_hi_en, .ram_lo_en, .ram_we, .ram_oe,
    .outport_en, .inport_en);

  sw16_rom_1kx8 #(.DEPTH_LOG2(DEPTH_LOG2), .HI(1'b1)) u_rom_hi (
    .addr(waddr), .en(rom_hi_en), .data(rom_hi));
  sw16_rom_1kx8 #(.DEPTH_LOG2(DEPTH_LOG2), .HI(1'b0)) u_rom_lo (
    .addr(waddr), .en(rom_lo_en), .data(rom_lo));

  sw16_ram_1kx8 #(.DEPTH_LOG2(DEPTH_LOG2)) u_ram_hi (
    .clk, .addr(waddr), .en(ram_hi_en), .oe(ram_oe), .we(ram_we),
    .data_in(data_out[15:8]), .data_out(ram_hi));
  sw16_ram_1kx8 #(.DEPTH_LOG2(DEPTH_LOG2)) u_ram_lo (
    .clk, .addr(waddr), .en(ram_lo_en), .oe(ram_oe), .we(ram_we),
    .data_in(data_out[7:0]), .data_out(ram_lo));

  sw16_inport u_in (.pins(inport), .en(inport_en), .data(in_data));

  sw16_outport u_out (.clk, .rst, .en(outport_en), .data(data_out), .pins(outport));

  assign data_in = {rom_hi, rom_lo} | {ram_hi, ram_lo} | in_data;

  a_one_device: assert property (@(posedge clk) disable iff (rst)
        (32'(rom_hi_en) + 32'(ram_hi_en) + 32'(inport_en) + 32'(outport_en)) <= 1);
endmodule
