// soar_asm_pkg: instruction encoders used by the SOAR testbenches to build programs.
//
// Each function returns one 32-bit instruction word in the SOAR formats: the basic format
// {01, tag, opcode<6>, D<5>, S1<5>, imm, S2<5>/C<12>}, the store format with its split
// constant SC, the skip/trap format with COND in the D field, and the call/jump format
// {00, SI, jump, address<28>}. tag = 1 is the tagged form, tag = 0 the '%' form.
// Constants: k8(v) encodes a small integer -128..127 (tag bits 0000 for v >= 0, 0111 for
// v < 0 so the expanded value is the 31-bit small integer); u8(v) encodes a 32-bit integer
// -128..127 (tag bits 1111 for v < 0).
package soar_asm_pkg;
  import soar_pkg::*;

  function automatic logic [11:0] k8(input int v);
    return {(v < 0) ? 4'h7 : 4'h0, 8'(v)};
  endfunction

  function automatic logic [11:0] u8(input int v);
    return {(v < 0) ? 4'hF : 4'h0, 8'(v)};
  endfunction

  // register-register form
  function automatic word_t rr(input logic [5:0] op, input bit tag, input int d, input int s1,
                               input int s2);
    return {2'b01, tag, op, 5'(d), 5'(s1), 1'b0, 5'(s2), 7'd0};
  endfunction

  // register-constant form
  function automatic word_t ri(input logic [5:0] op, input bit tag, input int d, input int s1,
                               input logic [11:0] c);
    return {2'b01, tag, op, 5'(d), 5'(s1), 1'b1, c};
  endfunction

  // store Rs2,(Rs1)SC  and storem
  function automatic word_t st(input logic [5:0] op, input bit tag, input int s2, input int s1,
                               input logic [11:0] sc);
    return {2'b01, tag, op, sc[11:7], 5'(s1), 1'b1, 5'(s2), sc[6:0]};
  endfunction

  // skip / trapN with a constant
  function automatic word_t sk(input logic [5:0] op, input bit tag, input logic [4:0] cond,
                               input int s1, input logic [11:0] c);
    return {2'b01, tag, op, cond, 5'(s1), 1'b1, c};
  endfunction

  function automatic word_t call(input bit si, input logic [27:0] a);
    return {2'b00, si, 1'b0, a};
  endfunction

  function automatic word_t jump(input bit si, input logic [27:0] a);
    return {2'b00, si, 1'b1, a};
  endfunction

  // ret[i][n][w] Rs1,C
  function automatic word_t ret(input bit tag, input bit i, input bit n, input bit w,
                                input int s1, input logic [11:0] c);
    return {2'b01, tag, 3'b001, i, n, w, 5'd0, 5'(s1), 1'b1, c};
  endfunction

  function automatic word_t nop();
    return {2'b01, 1'b0, OP_NOP, 23'd0};
  endfunction

  // Condition codes (octal)
  localparam logic [4:0] C_NEVER = 5'o00, C_ALWAYS = 5'o01, C_LT = 5'o02, C_GE = 5'o03,
                         C_EQ = 5'o04, C_NE = 5'o05, C_LE = 5'o06, C_GT = 5'o07,
                         C_LTU = 5'o12, C_GEU = 5'o13, C_LEU = 5'o16, C_GTU = 5'o17,
                         C_IN1 = 5'o22, C_OUT1 = 5'o23;
endpackage
