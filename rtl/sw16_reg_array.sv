// sw16_reg_array: the 20x16 register array of the register ALU.
//
// Sixteen general registers (0..15) and four more used by the
// microprogram (16 PC, 17 SP, 18 and 19 scratch). Two read ports, A and
// B, are combinational; the write port C is written on the rising clock
// edge when we is high. wnb ("word, not byte") selects a full 16-bit write
// (1) or a write of the low byte only that leaves the high byte unchanged
// (0); the byte rule is this design's choice, the source only names the
// input. A synchronous reset clears every register. Addresses 20..31 read
// zero and ignore writes.
//
// From the Sweet16 lab design: a 20x16 register array with read ports A and B
// and a word/byte write (WnB).
// Own choices: asynchronous reads, writes on the rising edge, the byte write
// changing the low byte only, reset clearing all registers.
module sw16_reg_array #(
  parameter int unsigned NREGS = 20
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  a_addr,
  input  logic [4:0]  b_addr,
  input  logic [4:0]  c_addr,
  input  logic        we,
  input  logic        wnb,
  input  logic [15:0] c_data,
  output logic [15:0] a_data,
  output logic [15:0] b_data
);
  logic [15:0] regs [NREGS];
  logic [7:0]  c_old_hi;  // high byte of the register being written
  logic [7:0]  hi_byte;

  assign a_data = (32'(a_addr) < NREGS) ? regs[a_addr] : '0;
  assign b_data = (32'(b_addr) < NREGS) ? regs[b_addr] : '0;
  assign c_old_hi = (32'(c_addr) < NREGS) ? regs[c_addr][15:8] : 8'h00;

  // High byte of the written word: new data for word writes, old for bytes.
  sw16_mux #(.W(8), .N(2)) u_hi_mux (
    .d({c_data[15:8], c_old_hi}), .sel(wnb), .y(hi_byte));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && (32'(c_addr) < NREGS)) begin
      regs[c_addr] <= {hi_byte, c_data[7:0]};
    end
  end
endmodule
