// sw16_maprom: opcode-to-microprogram-address map (the MapROM).
//
// A 256 x 8 read-only table: the opcode byte of the instruction on the data
// bus selects the first microprogram word of that instruction's routine.
// Opcodes with no routine map to the fetch routine, so they execute as
// no-operations. Combinational; the entries are listed in map() below.
//
// From the Sweet16 lab design: a MapROM translating the opcode into the
// microroutine start address.
// Own choices: the microroutine addresses and unknown opcodes mapping to the
// fetch routine.
module sw16_maprom
  import sw16_pkg::*;
(
  input  logic [7:0] opcode,
  output logic [7:0] uaddr
);
  function automatic logic [7:0] map(input logic [7:0] op);
    case (op)
      OP_LDSPR: return UA_LDSPR;
      OP_CLRC:  return UA_CLRC;
      OP_RET:   return UA_RET;
      OP_RORC:  return UA_RORC;
      OP_B:     return UA_B;
      OP_CALL:  return UA_CALL;
      OP_JMP:   return UA_JMP;
      OP_CALLX: return UA_CALLX;
      OP_JMPX:  return UA_JMPX;
      OP_STA:   return UA_STA;
      OP_STAX:  return UA_STAX;
      OP_LDA:   return UA_LDA;
      OP_LDAX:  return UA_LDAX;
      OP_ADDR:  return UA_ADDR;
      OP_LDR:   return UA_LDR;
      OP_UMULR: return UA_UMULR;
      OP_UDIVR: return UA_UDIVR;
      OP_ADCLR: return UA_ADCLR;
      OP_ADDI:  return UA_ADDI;
      OP_LSUBI: return UA_LSUBI;
      OP_LDI:   return UA_LDI;
      OP_UMULI: return UA_UMULI;
      OP_GFO:   return UA_GFO;
      default:  return UA_FETCH;
    endcase
  endfunction
  assign uaddr = map(opcode);
endmodule
