// soar_trap_unit: trap priority selection and trap vector address (combinational).
//
// req has one bit per trap condition, indexed by its vector number:
//   0 ILL illegal opcode   1 TT tag trap      2 SWI software interrupt   3 WO window overflow
//   4 WU window underflow  5 DPF data page fault  6 TI trap instruction  7 GS generation
//   scavenge   8 IPF instruction page fault   9 IO I/O interrupt.
// The vector numbers are also the priority order, highest first, so the lowest set bit wins.
// The trap address concatenates the trap base TB<31:10>, the four vector bits and the six
// opcode bits I<28:23> of the instruction charged with the trap:
//   addr = {TB<31:10>, vector<3:0>, opcode<5:0>}
// which places, for instance, the tag trap of add (opcode 50 octal) at TB + 0150 (octal).
module soar_trap_unit
  import soar_pkg::*;
(
  input  logic [NTRAPS-1:0] req,
  input  logic [21:0]       tb,
  input  logic [5:0]        opc,
  output logic              taken,
  output vector_e           vec,
  output word_t             addr
);
  always_comb begin
    taken = |req;
    vec   = V_ILL;
    for (int i = NTRAPS - 1; i >= 0; i--)
      if (req[i]) vec = vector_e'(i);
    addr = {tb, vec, opc};
  end
endmodule
