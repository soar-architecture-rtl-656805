// tb_soar_decode: self-checking test of the SOAR instruction decoder.
//
// Instructions built with the testbench encoders are decoded and the class, ALU operation,
// fields and expanded constant are compared with expectations written from the instruction
// set: every opcode 0..63 is classified (unused opcodes illegal, internal opcodes nop unless
// forced by the pipeline), constant expansion is checked on worked values (small integers
// -1, -128, 127, a 32-bit -1, a tag-only constant), the split store constant is reassembled,
// call/jump targets and SI bits and the ret option bits are checked. Combinational unit.
module tb_soar_decode;
  import soar_pkg::*;
  import soar_asm_pkg::*;

  word_t ir;
  logic  internal;
  dec_t  dec;
  int    checks = 0, failures = 0;

  soar_decode dut (.ir(ir), .internal(internal), .dec(dec));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s ir=%h kind=%s alu=%s c32=%h", what, ir, dec.kind.name(),
               dec.aluop.name(), dec.c32);
    end
  endtask

  function automatic kind_e expect_kind(input int op, input bit intl);
    case (op)
      'o04: return K_NOP;
      'o05: return intl ? K_ITRAP : K_NOP;
      'o06: return intl ? K_ISKIP : K_NOP;
      'o20: return K_SKIP;
      'o30: return K_STORE;
      'o32: return K_STOREM;
      'o34, 'o35: return K_LOAD;
      'o36: return K_LOADM;
      'o40, 'o42: return K_SHIFT;
      'o44, 'o46, 'o47, 'o50, 'o51, 'o52: return K_ALU;
      'o54, 'o56: return K_BYTE;
      default: begin
        if (op >= 'o10 && op <= 'o17) return K_RET;
        if (op >= 'o21 && op <= 'o27) return K_TRAPI;
        if (op >= 'o60 && op <= 'o67) return intl ? K_ILOAD : K_NOP;
        if (op >= 'o70) return intl ? K_ISTORE : K_NOP;
        return K_ILL;
      end
    endcase
  endfunction

  initial begin
    #100000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      internal = 1'(i);
      for (int op = 0; op < 64; op++) begin
        ir = rr(6'(op), 1'b0, 3, 4, 5);
        #1 check(dec.kind == expect_kind(op, 1'(i)), $sformatf("class of opcode %o", op));
      end
    end
    internal = 0;
    ir = rr(OP_ADD, 1, 9, 10, 11);
    #1 check(dec.aluop == A_ADD && dec.tag_en && dec.d == 9 && dec.s1 == 10 && dec.s2 == 11 &&
             !dec.imm && dec.opc == OP_ADD && dec.opc8 == 8'hE8, "add fields");
    ir = rr(OP_SLA, 0, 1, 2, 2);
    #1 check(dec.aluop == A_ADD && !dec.tag_en && dec.opc == OP_SLA, "sla executes as add");
    ir = rr(OP_SUB, 0, 1, 2, 3); #1 check(dec.aluop == A_SUB, "sub");
    ir = rr(OP_XOR, 0, 1, 2, 3); #1 check(dec.aluop == A_XOR, "xor");
    ir = rr(OP_AND, 0, 1, 2, 3); #1 check(dec.aluop == A_AND, "and");
    ir = rr(OP_OR, 0, 1, 2, 3);  #1 check(dec.aluop == A_OR, "or");
    ir = rr(OP_SRL, 0, 1, 2, 3); #1 check(dec.aluop == A_SRL, "srl");
    ir = rr(OP_SRA, 0, 1, 2, 3); #1 check(dec.aluop == A_SRA, "sra");
    ir = rr(OP_INSERT, 0, 1, 2, 3);  #1 check(dec.aluop == A_INS, "insert");
    ir = rr(OP_EXTRACT, 0, 1, 2, 3); #1 check(dec.aluop == A_EXT, "extract");
    // constants
    ir = ri(OP_ADD, 1, 1, 2, k8(-1));   #1 check(dec.imm && dec.c32 == 32'h7FFF_FFFF, "0#-1");
    ir = ri(OP_ADD, 1, 1, 2, k8(-128)); #1 check(dec.c32 == 32'h7FFF_FF80, "small -128");
    ir = ri(OP_ADD, 1, 1, 2, k8(127));  #1 check(dec.c32 == 32'h0000_007F, "small 127");
    ir = ri(OP_ADD, 0, 1, 2, u8(-1));   #1 check(dec.c32 == 32'hFFFF_FFFF, "32-bit -1");
    ir = ri(OP_ADD, 0, 1, 2, 12'h080);  #1 check(dec.c32 == 32'h0FFF_FF80, "tag 0 with -128");
    ir = ri(OP_ADD, 0, 1, 2, 12'hB00);  #1 check(dec.c32 == 32'hB000_0000, "nil constant");
    // store constant split over D and the low bits
    ir = st(OP_STORE, 1, 6, 7, 12'hA5C);
    #1 check(dec.kind == K_STORE && dec.s2 == 6 && dec.s1 == 7 && dec.c32 == 32'hA000_005C,
             "store SC");
    ir = st(OP_STORE, 0, 6, 7, 12'h013);
    #1 check(dec.c32 == 32'h0000_0013, "store SC positive");
    // call / jump
    ir = call(1'b0, 28'h123_4567);
    #1 check(dec.kind == K_CALL && dec.target == 28'h123_4567 && !dec.tag_en, "call");
    ir = jump(1'b1, 28'h0AB_CDEF);
    #1 check(dec.kind == K_JUMP && dec.target == 28'h0AB_CDEF && dec.tag_en, "jump SI");
    // ret options
    for (int o = 0; o < 8; o++) begin
      ir = ret(1'b1, o[2], o[1], o[0], 15, k8(0));
      #1 check(dec.kind == K_RET && dec.ret_i == o[2] && dec.ret_n == o[1] && dec.ret_w == o[0],
               "ret options");
    end
    // skip / trap conditions
    ir = sk(OP_SKIP, 1, C_NE, 14, k8(0));
    #1 check(dec.kind == K_SKIP && dec.d == C_NE && dec.aluop == A_SUB, "skip");
    ir = sk(6'o23, 0, C_ALWAYS, 0, k8(0));
    #1 check(dec.kind == K_TRAPI && dec.aluop == A_SUB, "trap3");
    // bit 31 set: illegal whatever the rest
    ir = 32'hC000_0000 | rr(OP_ADD, 0, 1, 2, 3);
    #1 check(dec.kind == K_ILL, "I<31> illegal");
    internal = 1;
    ir = rr(6'o63, 0, 3, 0, 0);
    #1 check(dec.kind == K_ILOAD && dec.seq == 3, "LOAD3 sequence number");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
