// soar_alu: SOAR ALU, one-bit shifter and byte insert/extract unit (combinational).
//
// a is the S1 operand (A bus), b the second operand RC (register S2 or the expanded
// constant). In tagged mode (tag bit of the instruction set) the operands are small integers:
// add and sub work on the 31-bit values in bits 30:0, keep the result's tag bit 31 at zero and
// report overflow when the true result lies outside -2^30 .. 2^30-1; srl inserts zeros at bits
// 31 and 30; sra takes bit 30 as the sign and keeps bit 31 at zero. In untagged mode all 32 bits
// are data, srl inserts a zero at bit 31, sra copies bit 31 and overflow is never reported.
// sla is executed as add of a register to itself (the decoder maps it to A_ADD), so its
// overflow is the add overflow. insert clears the result and places a<7:0> in byte b<1:0>;
// extract returns byte b<1:0> of a in bits 7:0. Bytes are numbered from the right.
module soar_alu
  import soar_pkg::*;
(
  input  aluop_e op,
  input  logic   tag_en,
  input  word_t  a,
  input  word_t  b,
  output word_t  y,
  output logic   ovf
);
  word_t ae, be, sum;

  // In tagged mode bit 30 is the sign: extend it over bit 31 before the 32-bit add.
  assign ae = tag_en ? {a[30], a[30:0]} : a;
  assign be = tag_en ? {b[30], b[30:0]} : b;

  always_comb begin
    sum = '0;
    y   = '0;
    ovf = 1'b0;
    unique case (op)
      A_ADD, A_SUB: begin
        sum = (op == A_ADD) ? ae + be : ae - be;
        if (tag_en) begin
          y   = {1'b0, sum[30:0]};
          ovf = sum[31] ^ sum[30];
        end else begin
          y   = sum;
        end
      end
      A_XOR: y = a ^ b;
      A_AND: y = a & b;
      A_OR:  y = a | b;
      A_SRL: y = tag_en ? {2'b00, a[30:1]} : {1'b0, a[31:1]};
      A_SRA: y = tag_en ? {1'b0, a[30], a[30:1]} : {a[31], a[31:1]};
      A_INS: y = word_t'(a[7:0]) << {b[1:0], 3'b000};
      A_EXT: y = word_t'(8'(a >> {b[1:0], 3'b000}));
      A_PASS: y = a;
      default: y = a;
    endcase
  end
endmodule
