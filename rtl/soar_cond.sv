// soar_cond: condition evaluation for the SOAR skip and trap instructions (combinational).
//
// The condition compares Rs1 (a) with RC (b) as Rs1 - RC would. COND is the instruction's
// five-bit D field; bit 0 negates the condition, bits 4:1 select it (codes in octal):
//   00/01 NEVER/ALWAYS   02/03 LT/GE    04/05 EQ/NE    06/07 LE/GT     (two's complement)
//   12/13 LTU/GEU = IN0/OUT0 (0 <= Rs1 < RC)   16/17 LEU/GTU         (unsigned)
//   22/23 IN1/OUT1 (1 <= Rs1 <= RC, unsigned)
// Codes the table does not list select a false base condition (their odd partner is then
// true); that is this design's choice. In tagged mode the operands are 31-bit small integers:
// bit 30 is extended over bit 31 before comparing, which keeps both the signed and the
// unsigned order of the 31-bit values.
module soar_cond
  import soar_pkg::*;
(
  input  logic [4:0] cond,
  input  logic       tag_en,
  input  word_t      a,
  input  word_t      b,
  output logic       taken
);
  word_t ae, be;
  logic  eq, lt, ltu, base;

  assign ae  = tag_en ? {a[30], a[30:0]} : a;
  assign be  = tag_en ? {b[30], b[30:0]} : b;
  assign eq  = (ae == be);
  assign lt  = ($signed(ae) < $signed(be));
  assign ltu = (ae < be);

  always_comb begin
    unique case (cond[4:1])
      4'd1:    base = lt;
      4'd2:    base = eq;
      4'd3:    base = lt | eq;
      4'd5:    base = ltu;
      4'd7:    base = ltu | eq;
      4'd9:    base = (ae != '0) && (ltu | eq);
      default: base = 1'b0;
    endcase
    taken = base ^ cond[0];
  end
endmodule
