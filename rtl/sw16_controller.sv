// sw16_controller: the Sweet16 controller (sw16cont).
//
// The microprogram sequencer (sw16_upcont) addresses the microprogram
// memory (sw16_upm); the addressed 56-bit word is clocked into the
// pipeline register, whose 42 command bits drive the datapath and whose 14
// sequencer bits feed back into the sequencer. In the decode cycle the
// instruction on the internal data bus is loaded into the instruction
// register (IR) and its opcode byte, through the MapROM, selects the
// instruction's microroutine. The branch condition named by IR.r1 is
// evaluated here on the macro flags for the sequencer's conditional jump.
//
// Timing: one microword per clock. Synchronous reset loads a no-operation
// into the pipeline register and clears the IR.
//
// From the Sweet16 lab design: the controller made of sequencer, MapROM,
// microprogram memory, pipeline register and instruction register.
// Own choices: pipeline register reset to all-zero and the sequencer to word
// 0xFF.
module sw16_controller
  import sw16_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] bus,      // internal data bus (instruction word in decode)
  input  flags_t      flags,
  input  logic        uc,
  input  logic        us,
  output cmd_t        cmd,
  output logic [15:0] ir,
  output logic [7:0]  up_addr,
  output logic [13:0] up_seq
);
  uword_t     pl, upm_word;
  logic [7:0] map_addr, next_addr, cur_addr;
  logic       ir_ld;
  logic [3:0] conds;

  assign conds = {cc_true(ir[7:4], flags), us, ~uc, uc};

  sw16_maprom u_map (.opcode(bus[15:8]), .uaddr(map_addr));

  sw16_upcont u_seq (
    .clk, .rst, .seq(pl.seq), .map_addr, .conds, .ir_r2(ir[3:0]),
    .next_addr, .cur_addr, .ir_ld);

  sw16_upm u_upm (.addr(next_addr), .data(upm_word));

  // Pipeline register.
  always_ff @(posedge clk)
    if (rst) pl <= '0;
    else     pl <= upm_word;

  sw16_reg16 #(.W(16)) u_ir (.clk, .rst, .ld(ir_ld), .d(bus), .q(ir));

  assign cmd     = pl.cmd;
  assign up_addr = cur_addr;
  assign up_seq  = pl.seq;
endmodule
