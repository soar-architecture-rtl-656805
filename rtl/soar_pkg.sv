// soar_pkg: types and constants shared by the SOAR (Smalltalk On A RISC) processor.
//
// SOAR words are 32 bits. The top four bits of a word are a tag: a small integer has bit 31
// clear and a 31-bit two's-complement value in bits 30:0; any other object pointer (OOP) has a
// four-bit tag starting with 1 and a 28-bit word address. Opcodes are the six bits I<28:23>;
// the values below are the octal codes of the SOAR instruction set, and the internal opcodes
// (TRAP, SKIP, LOADi, STOREi) are the ones the pipeline forces into its operate stage.
// The register numbering (LOW r0-r7, HIGH r8-r15, SPECIAL r16-r23, GLOBAL r24-r31), the
// tag codes, the trap vector numbers and the reset PC follow the architecture definition.
// The physical register index layout (window*8 + k, globals at 64..71) is this design's choice.
// Lint note: the four tenure tags and the base codes of the ret (10-17) and trap (21-27)
// opcode groups are named here for reference; the logic decodes those groups by bit pattern,
// so the linter reports these constants as unused.
package soar_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned ALEN      = 28;   // word address width
  localparam int unsigned NWINDOWS  = 8;    // register windows on chip
  localparam int unsigned WINREGS   = 8;    // registers per window
  localparam int unsigned NGLOBALS  = 8;    // r24..r31
  localparam int unsigned NPHYS     = NWINDOWS * WINREGS + NGLOBALS;  // 72
  localparam int unsigned PIDX_W    = 7;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [PIDX_W-1:0] pidx_t;

  // Value written into r0..r5 by ret with the N option (tag 1011, address 0).
  localparam word_t NIL_VALUE = 32'hB000_0000;
  // Reset value of the PC.
  localparam word_t RESET_PC  = 32'h0FFF_FFF0;

  // Tags (bits 31:28).
  localparam logic [3:0] TAG_ASSISTANT = 4'b1000;
  localparam logic [3:0] TAG_ASSOCIATE = 4'b1001;
  localparam logic [3:0] TAG_FULL      = 4'b1010;
  localparam logic [3:0] TAG_EMERITUS  = 4'b1011;
  localparam logic [3:0] TAG_CONTEXT   = 4'b1111;

  // Opcodes I<28:23> for I<31:30> = 01 (octal values of the instruction set table).
  localparam logic [5:0] OP_NOP     = 6'o04;
  localparam logic [5:0] OP_ITRAP   = 6'o05;
  localparam logic [5:0] OP_ISKIP   = 6'o06;
  localparam logic [5:0] OP_RET     = 6'o10;  // 10..17: bit0 W, bit1 N, bit2 I
  localparam logic [5:0] OP_SKIP    = 6'o20;
  localparam logic [5:0] OP_TRAP1   = 6'o21;  // 21..27
  localparam logic [5:0] OP_STORE   = 6'o30;
  localparam logic [5:0] OP_STOREM  = 6'o32;
  localparam logic [5:0] OP_LOAD    = 6'o34;
  localparam logic [5:0] OP_LOADC   = 6'o35;
  localparam logic [5:0] OP_LOADM   = 6'o36;
  localparam logic [5:0] OP_SRL     = 6'o40;
  localparam logic [5:0] OP_SRA     = 6'o42;
  localparam logic [5:0] OP_XOR     = 6'o44;
  localparam logic [5:0] OP_AND     = 6'o46;
  localparam logic [5:0] OP_OR      = 6'o47;
  localparam logic [5:0] OP_ADD     = 6'o50;
  localparam logic [5:0] OP_SLA     = 6'o51;
  localparam logic [5:0] OP_SUB     = 6'o52;
  localparam logic [5:0] OP_INSERT  = 6'o54;
  localparam logic [5:0] OP_EXTRACT = 6'o56;
  localparam logic [5:0] OP_ILOAD0  = 6'o60;  // 60..67
  localparam logic [5:0] OP_ISTORE0 = 6'o70;  // 70..77

  // Special register numbers.
  localparam logic [4:0] R_RZERO = 5'd16;
  localparam logic [4:0] R_PC    = 5'd17;
  localparam logic [4:0] R_SHB   = 5'd18;
  localparam logic [4:0] R_SHA   = 5'd19;
  localparam logic [4:0] R_SWP   = 5'd20;
  localparam logic [4:0] R_TB    = 5'd21;
  localparam logic [4:0] R_CWP   = 5'd22;
  localparam logic [4:0] R_PSW   = 5'd23;

  // Instruction classes produced by the decoder.
  typedef enum logic [4:0] {
    K_NOP, K_ALU, K_SHIFT, K_BYTE, K_LOAD, K_LOADM, K_STORE, K_STOREM,
    K_SKIP, K_TRAPI, K_RET, K_CALL, K_JUMP, K_ILL,
    K_ILOAD, K_ISTORE, K_ISKIP, K_ITRAP
  } kind_e;

  // ALU / shifter / byte unit operations.
  typedef enum logic [3:0] {
    A_ADD, A_SUB, A_XOR, A_AND, A_OR, A_SRL, A_SRA, A_INS, A_EXT, A_PASS
  } aluop_e;

  // Trap vector numbers, in priority order (lowest number wins).
  typedef enum logic [3:0] {
    V_ILL = 4'd0, V_TT = 4'd1, V_SWI = 4'd2, V_WO = 4'd3, V_WU = 4'd4,
    V_DPF = 4'd5, V_TI = 4'd6, V_GS = 4'd7, V_IPF = 4'd8, V_IO = 4'd9
  } vector_e;
  localparam int unsigned NTRAPS = 10;

  // Decoded instruction.
  typedef struct packed {
    kind_e      kind;
    aluop_e     aluop;
    logic       tag_en;    // I<29>: tag bit (SI bit for call/jump)
    logic [5:0] opc;       // I<28:23>
    logic [7:0] opc8;      // I<30:23>, as kept in PSW<15:8>
    logic [4:0] d;         // I<22:18>: destination or condition
    logic [4:0] s1;        // I<17:13>
    logic [4:0] s2;        // I<11:7>
    logic       imm;       // I<12>: RC is the constant
    word_t      c32;       // C expanded to 32 bits (SC for stores)
    logic [27:0] target;   // call/jump word address
    logic       ret_w, ret_n, ret_i;
    logic [2:0] seq;       // i of the internal LOADi/STOREi
  } dec_t;

  // Register decode: logical register to physical index for window pointer cwp.
  // LOWs (r0-r7) live in window cwp-1, HIGHs (r8-r15) in window cwp, GLOBALs after the windows.
  function automatic pidx_t phys_of(input logic [4:0] r, input logic [2:0] cwp);
    logic [2:0] w;
    if (r[4]) return pidx_t'(64 + int'(r[2:0]));
    w = r[3] ? cwp : cwp - 3'd1;
    return {1'b0, w, r[2:0]};
  endfunction

  function automatic logic is_special(input logic [4:0] r);
    return r inside {[R_RZERO:R_PSW]};
  endfunction

endpackage
