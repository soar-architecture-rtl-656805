// soar_decode: SOAR instruction decoder (combinational).
//
// Splits a 32-bit instruction word into its fields and classifies it. Formats:
//   I<31:30> = 00 : call (I<28> = 0) or jump (I<28> = 1); I<29> is the SI bit and
//                   I<27:0> the word address of the target.
//   I<31:30> = 01 : I<29> tag bit, I<28:23> opcode, I<22:18> D (or COND for skip/trap),
//                   I<17:13> S1, I<12> immediate bit, I<11:7> S2 or I<11:0> constant C.
//                   Stores split their constant SC into I<22:18> (SC<11:7>) and I<6:0>.
//   I<31>    = 1  : illegal opcode.
// A 12-bit constant keeps its top four bits as the tag of the 32-bit value and sign-extends
// bit 7 over bits 27:8. Opcodes the instruction set leaves unused decode as K_ILL. The
// internal opcodes (TRAP, SKIP, LOADi, STOREi) decode as their internal kinds only when
// `internal` is set, which the pipeline does for the operations it forces itself; fetched
// from memory they execute as nop (the architecture leaves their use undefined; nop is this
// design's choice).
module soar_decode
  import soar_pkg::*;
(
  input  word_t ir,
  input  logic  internal,
  output dec_t  dec
);
  logic [5:0]  op;
  logic [11:0] c12;

  assign op  = ir[28:23];
  assign c12 = (op == OP_STORE || op == OP_STOREM) ? {ir[22:18], ir[6:0]} : ir[11:0];

  always_comb begin
    dec           = '0;
    dec.kind      = K_NOP;
    dec.aluop     = A_PASS;
    dec.tag_en    = ir[29];
    dec.opc       = op;
    dec.opc8      = ir[30:23];
    dec.d         = ir[22:18];
    dec.s1        = ir[17:13];
    dec.s2        = ir[11:7];
    dec.imm       = ir[12];
    dec.c32       = {c12[11:8], {20{c12[7]}}, c12[7:0]};
    dec.target    = ir[27:0];
    dec.ret_w     = op[0];
    dec.ret_n     = op[1];
    dec.ret_i     = op[2];
    dec.seq       = op[2:0];

    if (ir[31]) begin
      dec.kind = K_ILL;
    end else if (!ir[30]) begin
      dec.kind = ir[28] ? K_JUMP : K_CALL;
    end else begin
      unique casez (op)
        OP_NOP:   dec.kind = K_NOP;
        OP_ITRAP: dec.kind = internal ? K_ITRAP : K_NOP;
        OP_ISKIP: dec.kind = internal ? K_ISKIP : K_NOP;
        6'o1?:    dec.kind = K_RET;
        OP_SKIP:  dec.kind = K_SKIP;
        6'o21, 6'o22, 6'o23, 6'o24, 6'o25, 6'o26, 6'o27:
                  begin dec.kind = K_TRAPI; dec.aluop = A_SUB; end
        OP_STORE: dec.kind = K_STORE;
        OP_STOREM: dec.kind = K_STOREM;
        OP_LOAD, OP_LOADC: dec.kind = K_LOAD;
        OP_LOADM: dec.kind = K_LOADM;
        OP_SRL:   begin dec.kind = K_SHIFT; dec.aluop = A_SRL; end
        OP_SRA:   begin dec.kind = K_SHIFT; dec.aluop = A_SRA; end
        OP_XOR:   begin dec.kind = K_ALU;   dec.aluop = A_XOR; end
        OP_AND:   begin dec.kind = K_ALU;   dec.aluop = A_AND; end
        OP_OR:    begin dec.kind = K_ALU;   dec.aluop = A_OR;  end
        OP_ADD, OP_SLA:
                  begin dec.kind = K_ALU;   dec.aluop = A_ADD; end
        OP_SUB:   begin dec.kind = K_ALU;   dec.aluop = A_SUB; end
        OP_INSERT:  begin dec.kind = K_BYTE; dec.aluop = A_INS; end
        OP_EXTRACT: begin dec.kind = K_BYTE; dec.aluop = A_EXT; end
        6'o6?:    dec.kind = internal ? K_ILOAD  : K_NOP;
        6'o7?:    dec.kind = internal ? K_ISTORE : K_NOP;
        default:  dec.kind = K_ILL;
      endcase
      if (dec.kind == K_SKIP) dec.aluop = A_SUB;
    end
  end
endmodule
