// sw16_upcont: microprogram sequencer (next-address logic) of the Sweet16
// controller.
//
// It decides, every clock, which microprogram word comes next, from the
// sequencer field of the word now in the pipeline register: continue,
// jump, conditional jump, jump through the MapROM (decode), subroutine
// call and return, and counted loops. Conditions are the micro carry, its
// complement, the micro sign and the branch condition of the current
// instruction. The loop counter is loaded from the microword or from the
// instruction's r2 field (n-1, with 0 meaning 16); SQ_LOOP repeats the
// target while the counter is non-zero, so a load of n runs n+1 times.
// The subroutine stack holds DEPTH return addresses.
//
// Interface/timing: next_addr is combinational and addresses the
// microprogram memory; cur_addr, the counter and the stack update on the
// rising edge. ir_ld is high in the decode cycle (SQ_MAP) so the
// instruction register loads together with the MapROM jump. After reset
// cur_addr is 0xFF and the pipeline register holds a no-operation, so the
// first word executed is word 0. The sequencer field encoding is this
// design's own.
//
// From the Sweet16 lab design: a microsequencer with jumps, conditional jumps,
// a map jump, subroutine call/return and a loop counter.
// Own choices: the sequencer field encoding, 4-entry return stack, the loop-
// count rule and the condition set.
module sw16_upcont
  import sw16_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  seq_t       seq,
  input  logic [7:0] map_addr,
  input  logic [3:0] conds,    // indexed by cond_e
  input  logic [3:0] ir_r2,
  output logic [7:0] next_addr,
  output logic [7:0] cur_addr,
  output logic       ir_ld
);
  localparam int unsigned SPW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [7:0]     cnt;
  logic [7:0]     stack [DEPTH];
  logic [SPW-1:0] sp;
  logic [7:0]     inc_addr;

  assign inc_addr = cur_addr + 8'd1;
  assign ir_ld    = (seq.op == SQ_MAP);

  always_comb begin
    case (seq.op)
      SQ_JUMP:  next_addr = seq.addr;
      SQ_CJUMP: next_addr = conds[seq.cond] ? seq.addr : inc_addr;
      SQ_MAP:   next_addr = map_addr;
      SQ_CALL:  next_addr = seq.addr;
      SQ_RET:   next_addr = stack[sp - SPW'(1)];
      SQ_LOOP:  next_addr = (cnt != 8'd0) ? seq.addr : inc_addr;
      default:  next_addr = inc_addr;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_addr <= 8'hFF;
      cnt      <= '0;
      sp       <= '0;
      for (int i = 0; i < int'(DEPTH); i++) stack[i] <= '0;
    end else begin
      cur_addr <= next_addr;
      case (seq.op)
        SQ_LDCNT:    cnt <= seq.addr;
        SQ_LDCNT_IR: cnt <= (ir_r2 == 4'd0) ? 8'd15 : 8'(ir_r2 - 4'd1);
        SQ_LOOP:     if (cnt != 8'd0) cnt <= cnt - 8'd1;
        SQ_CALL: begin
          stack[sp] <= inc_addr;
          sp <= sp + SPW'(1);
        end
        SQ_RET:      sp <= sp - SPW'(1);
        default: ;
      endcase
    end
  end
endmodule
