// tb_soar_tag_check: self-checking test of the tag-trap and Generation Scavenge logic.
//
// The expectations are the rows of the trap tables written out case by case:
//   ALU (and skip/trap, shift, byte): Rs1 int and RC int -> no trap; either oop -> TT;
//     a constant RC counts as an int; overflow -> TT.
//   load: int+int -> TT, int+const -> TT, int+oop -> ok, oop+int -> ok, oop+const -> ok,
//     oop+oop -> TT.
//   store: int base -> TT; oop base with a context value -> GS; oop base with a younger oop ->
//     GS; older or same-age oop or an int -> no trap.
//   ret: oop return address -> GS.
// Untagged instructions and load/store-multiple never trap. Each case is tried with random
// payload bits below the tags. Combinational unit.
module tb_soar_tag_check;
  import soar_pkg::*;

  kind_e kind;
  logic  tag_en, imm, alu_ovf, tt, gs;
  word_t rs1, rs2;
  int    checks = 0, failures = 0;

  soar_tag_check dut (.kind(kind), .tag_en(tag_en), .imm(imm), .rs1(rs1), .rs2(rs2),
                      .alu_ovf(alu_ovf), .tt(tt), .gs(gs));

  function automatic word_t mk(input logic [3:0] tag);
    word_t w;
    w = $urandom;
    if (tag == 4'h0) w[31] = 1'b0;
    else w[31:28] = tag;
    return w;
  endfunction

  task automatic t(input kind_e k, input bit tg, input bit im, input logic [3:0] a,
                   input logic [3:0] b, input bit ov, input bit ett, input bit egs);
    for (int n = 0; n < 8; n++) begin
      kind = k; tag_en = tg; imm = im; rs1 = mk(a); rs2 = mk(b); alu_ovf = ov;
      #1;
      checks++;
      if (tt !== ett || gs !== egs) begin
        failures++;
        $display("FAIL %s tag=%0d imm=%0d rs1=%h rs2=%h ovf=%0d tt=%0d/%0d gs=%0d/%0d",
                 k.name(), tg, im, rs1, rs2, ov, tt, ett, gs, egs);
      end
    end
  endtask

  localparam logic [3:0] I = 4'h0, AS = TAG_ASSISTANT, AO = TAG_ASSOCIATE, FU = TAG_FULL,
                         EM = TAG_EMERITUS, CX = TAG_CONTEXT;

  initial begin
    #100000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // ALU-like classes (Table of ALU tag traps)
    foreach (alu_kinds[j]) begin
      t(alu_kinds[j], 1, 0, I, I, 0, 0, 0);
      t(alu_kinds[j], 1, 0, I, FU, 0, 1, 0);
      t(alu_kinds[j], 1, 0, EM, I, 0, 1, 0);
      t(alu_kinds[j], 1, 0, AS, AO, 0, 1, 0);
      t(alu_kinds[j], 1, 1, I, FU, 0, 0, 0);   // constant RC is an integer
      t(alu_kinds[j], 1, 0, I, I, 1, 1, 0);    // overflow
      t(alu_kinds[j], 0, 0, EM, CX, 1, 0, 0);  // untagged never traps
    end
    // load
    t(K_LOAD, 1, 0, I, I, 0, 1, 0);
    t(K_LOAD, 1, 1, I, I, 0, 1, 0);
    t(K_LOAD, 1, 0, I, FU, 0, 0, 0);
    t(K_LOAD, 1, 0, FU, I, 0, 0, 0);
    t(K_LOAD, 1, 1, FU, I, 0, 0, 0);
    t(K_LOAD, 1, 0, FU, EM, 0, 1, 0);
    t(K_LOAD, 0, 0, I, I, 0, 0, 0);
    // store: rs2 is the value stored, rs1 the base object
    t(K_STORE, 1, 1, I, FU, 0, 1, 0);
    t(K_STORE, 1, 1, I, I, 0, 1, 0);
    t(K_STORE, 1, 1, FU, I, 0, 0, 0);
    t(K_STORE, 1, 1, FU, CX, 0, 0, 1);
    t(K_STORE, 1, 1, EM, AS, 0, 0, 1);       // younger stored into older
    t(K_STORE, 1, 1, EM, FU, 0, 0, 1);
    t(K_STORE, 1, 1, AO, AS, 0, 0, 1);
    t(K_STORE, 1, 1, AS, EM, 0, 0, 0);       // older stored into younger
    t(K_STORE, 1, 1, FU, FU, 0, 0, 0);       // same age
    t(K_STORE, 1, 1, CX, AS, 0, 0, 0);       // into a context: age 0
    t(K_STORE, 1, 1, CX, CX, 0, 0, 1);       // context stored anywhere
    t(K_STORE, 0, 1, EM, CX, 0, 0, 0);
    // ret
    t(K_RET, 1, 1, I, I, 0, 0, 0);
    t(K_RET, 1, 1, FU, I, 0, 0, 1);
    t(K_RET, 0, 1, FU, I, 0, 0, 0);
    // multiples never check
    t(K_LOADM, 1, 1, I, I, 0, 0, 0);
    t(K_STOREM, 1, 1, I, CX, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  kind_e alu_kinds [5] = '{K_ALU, K_SHIFT, K_BYTE, K_SKIP, K_TRAPI};
endmodule
