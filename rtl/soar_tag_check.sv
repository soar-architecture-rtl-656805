// soar_tag_check: tag trap (TT) and Generation Scavenge trap (GS) conditions (combinational).
//
// Inputs are the instruction class, the tag bit of the instruction, the two operands and
// whether RC is the constant. An operand is a small integer ("int") when bit 31 is 0 and an
// object pointer ("oop") otherwise; a context pointer has tag 1111. The rules:
//   ALU, shift, byte, skip and trapN: TT if Rs1 is oop, or RC is register Rs2 and Rs2 is oop
//     (a constant always counts as an integer); TT also on tagged add/sub/sla overflow, which
//     the ALU reports as alu_ovf (also the overflow of Rs1 - RC for skip and trap).
//   load/loadc: TT if (Rs1 int and (Rs2 int or RC is the constant)) or
//     (RC is Rs2 and Rs1 oop and Rs2 oop).
//   store: TT if the base Rs1 is int; otherwise GS if the stored value Rs2 is a context, or
//     is an oop younger than Rs1. The offset SC never matters.
//   ret: GS if Rs1 is an oop (a return address must look like a small integer).
// Checks apply only when the tag bit is set; load-multiple and store-multiple never check.
// Age order follows the tag names: Assistant (1000) < Associate (1001) < Full (1010) <
// Emeritus (1011), the younger object having the smaller tag. A context or an undefined tag
// as the object stored into is taken as the youngest (age 0), so storing into a context
// never raises GS on age; that reading is this design's choice.
// Lint note: only the tag bits 31:28 of the operands matter, so the linter reports bits 27:0 of
// rs1 and rs2 unused.
module soar_tag_check
  import soar_pkg::*;
(
  input  kind_e kind,
  input  logic  tag_en,
  input  logic  imm,
  input  word_t rs1,
  input  word_t rs2,
  input  logic  alu_ovf,
  output logic  tt,
  output logic  gs
);
  logic a_oop, b_oop, a_int, b_int, b_ctx, younger;
  logic [1:0] age_a, age_b;

  assign a_oop = rs1[31];
  assign b_oop = rs2[31];
  assign a_int = !a_oop;
  assign b_int = !b_oop;
  assign b_ctx = rs2[31:28] == TAG_CONTEXT;
  assign age_a = (rs1[31:30] == 2'b10) ? rs1[29:28] : 2'd0;
  assign age_b = rs2[29:28];
  assign younger = b_oop && !b_ctx && (age_b < age_a);

  always_comb begin
    tt = 1'b0;
    gs = 1'b0;
    if (tag_en) begin
      unique case (kind)
        K_ALU, K_SHIFT, K_BYTE, K_SKIP, K_TRAPI:
          tt = a_oop || (!imm && b_oop) || alu_ovf;
        K_LOAD:
          tt = (a_int && (b_int || imm)) || (!imm && a_oop && b_oop);
        K_STORE: begin
          tt = a_int;
          gs = a_oop && (b_ctx || younger);
        end
        K_RET:
          gs = a_oop;
        default: ;
      endcase
    end
  end
endmodule
