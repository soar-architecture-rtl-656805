// soar_core: the SOAR processor — a three-stage pipeline for a tagged, register-windowed RISC.
//
// One clock cycle is one SOAR machine cycle (the chip's three clock phases are folded into a
// single edge). Every instruction passes three stages:
//   fetch   : the word at pc_q is read from the bus in the same cycle (data_in) and becomes
//             the next operate-stage instruction (CPIPE1).
//   operate : ex_q holds the instruction (CPIPE1s). Its registers are read, with forwarding of
//             the result waiting in the write stage (registers are compared by physical index;
//             SPECIAL registers are never forwarded), the ALU runs, tags and conditions are
//             checked and traps are detected.
//   write   : wb_* (CPIPE2s/DSTs) writes the result into the register file, or into a SPECIAL
//             register, at the end of the cycle. A SPECIAL register written by one instruction
//             is therefore seen by the second instruction after it, not the first.
// Multi-cycle instructions force internal opcodes into the operate stage, as the architecture
// describes:
//   load/store      : the operate cycle computes the address into mal_q; the next cycle carries
//                     LOAD0/STORE0 and uses the bus for the data access, while the instruction
//                     fetched meanwhile waits in hold_q (CPIPE1m). Two cycles per load/store.
//   loadm/storem    : LOADd..LOAD0 / STOREs2..STORE0, one data access per register, address
//                     stepping down by RC from Rs1-RC. Registers + 1 cycles.
//   ret             : the target Rs1+RC goes to the PC; the word fetched meanwhile is dropped
//                     and a nop takes its place. Two cycles.
//   satisfied skip  : the word fetched meanwhile is replaced by the internal SKIP.
//   trap            : the charged instruction is cancelled, interrupts are disabled (freezing
//                     the shadow registers), the internal TRAP follows it, writes the address
//                     plus one of the charged instruction into r7, and sends the PC to
//                     {TB<31:10>, vector, opcode}; the word fetched during TRAP is dropped and
//                     the handler's first instruction is fetched the cycle after.
//                     The opcode in the vector address comes from the shadow register
//                     PSW<13:8>: while interrupts are enabled that is the charged instruction's
//                     own opcode, but a trap taken with interrupts disabled (inside a handler,
//                     or after reset) vectors with the opcode last shadowed, as the
//                     architecture warns.
// Fast Shuffle: a call or jump is recognised while it is fetched and its target becomes the
// next fetch address at once, so calls and jumps cost one cycle. fshcntl_n is driven low in
// the next instruction fetch cycle so that an external register/multiplexer (soar_fsh_ext)
// can drive the target onto the system address bus; the core also drives the same address.
// A fetched call/jump is not shuffled when the skip in the operate stage is satisfied, or when
// the operate stage traps, returns or runs TRAP.
// Pointer-to-register: a load/store effective address that falls in the on-chip window slots
// below SWP reads/writes the register instead of memory (checked in the data cycle; the bus
// then does a read that is ignored). loadm/storem skip this check.
// Bus (all active-low controls as on the chip): addr and the controls are driven from
// registers only; data_in is sampled in the same cycle. rd_wr_n low = write, i_d_n high =
// instruction fetch. wait_n low freezes the whole processor for that cycle (waitack_n echoes
// it). page_n low during a fetch marks an instruction page fault, during a data access a data
// page fault. io_n low requests an I/O interrupt, taken when interrupts are enabled (PSW<6>)
// and the operate stage holds an instruction fetched from memory.
// Reset (rst_n low): PSW <- 0, PC <- 0FFFFFF0 hex, as the architecture defines; pipeline
// empty, CWP, SWP and TB zero (this design's choice).
// This design's choices beyond the architecture: internal TRAP/SKIP/LOADi/STOREi fetched from
// memory run as nop; an I/O interrupt is not taken while an internal opcode is in the operate
// stage; a data page fault is charged to the load/store that started the access (its opcode
// selects the vector, r7 gets its address plus one); shadow registers load only for
// instructions fetched from memory; writes to r16 and r17 are ignored.
// Lint note: the decoded call/jump target (dec.target) is not read here, because Fast Shuffle
// takes the target straight from the fetched word; the linter reports those bits unused.
module soar_core
  import soar_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output word_t addr,
  input  word_t data_in,
  output word_t data_out,
  output logic  data_oe,
  output logic  rd_wr_n,
  output logic  i_d_n,
  output logic  fshcntl_n,
  input  logic  wait_n,
  output logic  waitack_n,
  input  logic  page_n,
  input  logic  io_n
);
  typedef struct packed {
    logic  valid;
    logic  internal;
    logic  ipf;
    word_t ir;
    word_t pc;
  } slot_t;

  localparam word_t NOP_WORD = {2'b01, 1'b0, OP_NOP, 23'd0};

  // ---------------------------------------------------------------- state
  word_t       pc_q;
  slot_t       ex_q, hold_q;
  logic        wb_we_q, wb_sp_q;
  pidx_t       wb_idx_q;
  logic [4:0]  wb_reg_q;
  word_t       wb_data_q;
  word_t       mal_q, step_q, mem_pc_q, trap_addr_q, trap_r7_q;
  logic [5:0]  mem_opc_q, last_opc_q;
  logic        mem_ptr_en_q, fsh_q;
  // SPECIAL registers
  logic [7:0]  psw_opc_q;
  logic        psw_i_q, ie_q, swi_q;
  logic [4:0]  psw_d_q;
  logic [2:0]  cwp_q;
  logic [27:0] swp_q;
  logic [21:0] tb_q;
  word_t       sha_q, shb_q;

  // ---------------------------------------------------------------- operate stage decode
  word_t ex_ir;
  dec_t  dec;
  assign ex_ir = ex_q.valid ? ex_q.ir : NOP_WORD;

  soar_decode u_dec (.ir(ex_ir), .internal(ex_q.internal), .dec(dec));

  logic is_iload, is_istore, data_cycle, real_insn;
  assign is_iload   = dec.kind == K_ILOAD;
  assign is_istore  = dec.kind == K_ISTORE;
  assign data_cycle = is_iload || is_istore;
  assign real_insn  = ex_q.valid && !ex_q.internal && !ex_q.ipf;

  pidx_t p_s1, p_s2, p_d, p_ptr;
  logic  wo, wu, ptr_hit;
  soar_window_ctl u_win (
    .cwp(cwp_q), .swp(swp_q), .s1(dec.s1), .s2(dec.s2), .d(dec.d), .ea(mal_q[27:0]),
    .p_s1(p_s1), .p_s2(p_s2), .p_d(p_d), .wo(wo), .wu(wu), .ptr_hit(ptr_hit), .p_ptr(p_ptr));

  logic ptr_used;
  assign ptr_used = data_cycle && mem_ptr_en_q && ptr_hit;

  // ---------------------------------------------------------------- register file
  pidx_t ra, rb, rf_wa;
  word_t rda, rdb, rf_wd;
  logic  rf_we, nil_en, nil_req, ex_ptr_we;
  logic [2:0] nil_win;

  assign ra = is_iload ? p_ptr : p_s1;
  assign rb = p_s2;

  soar_regfile u_rf (
    .clk(clk), .ra(ra), .rda(rda), .rb(rb), .rdb(rdb),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd), .nil_en(nil_en), .nil_win(nil_win));

  // Forwarding from the write stage.
  logic  fwd_a, fwd_b;
  word_t reg_a, reg_b;
  assign fwd_a = wb_we_q && (wb_idx_q == ra);
  assign fwd_b = wb_we_q && (wb_idx_q == rb);
  assign reg_a = fwd_a ? wb_data_q : rda;
  assign reg_b = fwd_b ? wb_data_q : rdb;

  word_t pc_plus1;
  assign pc_plus1 = ex_q.pc + 32'd1;

  // A bus: S1 may name a SPECIAL register. B bus: a SPECIAL register reads as zero.
  word_t op_a, op_b, rc;
  always_comb begin
    op_a = reg_a;
    if (is_special(dec.s1) && !is_iload) begin
      unique case (dec.s1)
        R_RZERO: op_a = '0;
        R_PC:    op_a = {4'b0000, pc_plus1[27:0]};
        R_SHB:   op_a = shb_q;
        R_SHA:   op_a = sha_q;
        R_SWP:   op_a = {4'b0000, swp_q};
        R_TB:    op_a = {tb_q, 10'd0};
        R_CWP:   op_a = {25'd0, cwp_q, 4'd0};
        R_PSW:   op_a = {16'd0, psw_opc_q, psw_i_q, ie_q, swi_q, psw_d_q};
        default: op_a = '0;
      endcase
    end
    op_b = is_special(dec.s2) ? '0 : reg_b;
    rc   = (dec.imm || dec.kind == K_STORE || dec.kind == K_STOREM) ? dec.c32 : op_b;
  end

  // ---------------------------------------------------------------- datapath units
  word_t alu_y;
  logic  alu_ovf, cond_taken, tt, gs;
  soar_alu u_alu (.op(dec.aluop), .tag_en(dec.tag_en), .a(op_a), .b(rc), .y(alu_y), .ovf(alu_ovf));
  soar_cond u_cond (.cond(dec.d), .tag_en(dec.tag_en), .a(op_a), .b(rc), .taken(cond_taken));
  soar_tag_check u_tag (
    .kind(dec.kind), .tag_en(dec.tag_en), .imm(dec.imm), .rs1(op_a),
    .rs2(dec.kind == K_STORE ? op_b : rc), .alu_ovf(alu_ovf), .tt(tt), .gs(gs));

  // Address arithmetic is 28 bits wide: addresses are word addresses in bits 27:0.
  logic [ALEN-1:0] sum_ar, diff_ar;
  word_t       target_ret;
  assign sum_ar     = op_a[ALEN-1:0] + rc[ALEN-1:0];
  assign diff_ar    = op_a[ALEN-1:0] - rc[ALEN-1:0];
  assign target_ret = {4'b0000, sum_ar};

  // ---------------------------------------------------------------- traps
  logic [NTRAPS-1:0] req;
  logic              trap_now;
  vector_e           trap_vec;
  word_t             trap_addr;
  logic [5:0]        trap_opc;
  always_comb begin
    req = '0;
    if (ex_q.valid && ex_q.ipf) begin
      req[V_IPF] = 1'b1;
    end else if (ex_q.valid) begin
      req[V_ILL] = dec.kind == K_ILL;
      req[V_TT]  = tt;
      req[V_SWI] = (dec.kind == K_CALL || dec.kind == K_JUMP) && dec.tag_en && swi_q;
      req[V_WO]  = dec.kind == K_CALL && wo;
      req[V_WU]  = dec.kind == K_RET && dec.ret_w && wu;
      req[V_DPF] = data_cycle && !ptr_used && !page_n;
      req[V_TI]  = dec.kind == K_TRAPI && cond_taken;
      req[V_GS]  = gs;
      req[V_IO]  = real_insn && ie_q && !io_n;
    end
    // With interrupts disabled the shadow opcode is frozen, and a trap vectors with it.
    if (!ie_q)           trap_opc = psw_opc_q[5:0];
    else if (req[V_IPF]) trap_opc = last_opc_q;
    else                 trap_opc = data_cycle ? mem_opc_q : dec.opc;
  end

  soar_trap_unit u_trap (.req(req), .tb(tb_q), .opc(trap_opc),
                         .taken(trap_now), .vec(trap_vec), .addr(trap_addr));

  // ---------------------------------------------------------------- fetch
  slot_t fetched;
  logic  f_is_cj;
  assign fetched  = '{valid: 1'b1, internal: 1'b0, ipf: !page_n, ir: data_in, pc: pc_q};
  assign f_is_cj  = !data_in[31] && !data_in[30] && page_n;

  // ---------------------------------------------------------------- bus
  assign addr      = data_cycle ? mal_q : pc_q;
  assign i_d_n     = !data_cycle;
  assign rd_wr_n   = !(is_istore && !ptr_used);
  assign data_oe   = is_istore && !ptr_used;
  assign data_out  = op_b;
  assign fshcntl_n = !(fsh_q && !data_cycle);
  assign waitack_n = wait_n;

  // ---------------------------------------------------------------- next state
  slot_t ex_d, hold_d;
  word_t pc_d;
  logic  fsh_d;
  logic  wb_we_d, wb_sp_d;
  pidx_t wb_idx_d;
  logic [4:0] wb_reg_d;
  word_t wb_data_d;
  logic  mal_ld, step_ld;
  word_t mal_d, step_d;
  logic  mem_ld;           // load mem_opc/mem_pc/ptr_en
  logic  mem_ptr_en_d;
  logic [2:0] cwp_d;
  logic  set_ie, clr_ie, shadow_ld;

  function automatic slot_t internal_slot(input logic [5:0] opc, input logic [4:0] d,
                                          input logic [4:0] s2, input word_t pc);
    return '{valid: 1'b1, internal: 1'b1, ipf: 1'b0,
             ir: {2'b01, 1'b0, opc, d, 5'd0, 1'b0, s2, 7'd0}, pc: pc};
  endfunction

  always_comb begin
    ex_d      = ex_q;
    hold_d    = hold_q;
    pc_d      = pc_q;
    fsh_d     = fsh_q;
    wb_we_d   = 1'b0;
    wb_sp_d   = 1'b0;
    wb_idx_d  = p_d;
    wb_reg_d  = dec.d;
    wb_data_d = alu_y;
    mal_ld    = 1'b0;
    mal_d     = mal_q - step_q;
    step_ld   = 1'b0;
    step_d    = rc;
    mem_ld    = 1'b0;
    mem_ptr_en_d = 1'b0;
    cwp_d     = cwp_q;
    set_ie    = 1'b0;
    clr_ie    = 1'b0;
    nil_req   = 1'b0;
    nil_win   = cwp_q - 3'd1;
    ex_ptr_we = 1'b0;
    shadow_ld = real_insn && ie_q;

    // Normal sequential flow: the fetched word moves to the operate stage.
    if (!data_cycle) begin
      ex_d  = fetched;
      pc_d  = f_is_cj ? {4'b0000, data_in[27:0]} : pc_q + 32'd1;
      fsh_d = f_is_cj;
    end

    if (trap_now) begin
      ex_d   = internal_slot(OP_ITRAP, 5'd0, 5'd0, ex_q.pc);
      hold_d = '0;
      pc_d   = pc_q;
      fsh_d  = 1'b0;
      clr_ie = 1'b1;
    end else begin
      unique case (dec.kind)
        K_ITRAP: begin
          wb_we_d   = 1'b1;
          wb_idx_d  = phys_of(5'd7, cwp_q);
          wb_data_d = trap_r7_q;
          pc_d      = trap_addr_q;
          ex_d      = '0;
          fsh_d     = 1'b0;
        end
        K_RET: begin
          pc_d  = target_ret;
          ex_d  = '0;
          fsh_d = 1'b0;
          if (dec.ret_w) cwp_d = cwp_q + 3'd1;
          nil_req = dec.ret_n;
          nil_win = dec.ret_w ? cwp_q : cwp_q - 3'd1;
          set_ie  = dec.ret_i;
        end
        K_CALL: begin
          wb_we_d   = 1'b1;
          wb_idx_d  = phys_of(5'd7, cwp_q);
          wb_data_d = pc_plus1;
          cwp_d     = cwp_q - 3'd1;
        end
        K_SKIP: begin
          if (cond_taken) begin
            ex_d  = internal_slot(OP_ISKIP, 5'd0, 5'd0, pc_q);
            pc_d  = pc_q + 32'd1;
            fsh_d = 1'b0;
          end
        end
        K_ALU, K_SHIFT, K_BYTE: begin
          if (is_special(dec.d)) wb_sp_d = 1'b1;
          else                   wb_we_d = 1'b1;
        end
        K_LOAD, K_LOADM, K_STORE, K_STOREM: begin
          hold_d  = fetched;
          mal_ld  = 1'b1;
          mem_ld  = 1'b1;
          step_ld = 1'b1;
          unique case (dec.kind)
            K_LOAD: begin
              ex_d  = internal_slot(OP_ILOAD0, dec.d, 5'd0, ex_q.pc);
              mal_d = {4'b0000, sum_ar};
              mem_ptr_en_d = 1'b1;
            end
            K_LOADM: begin
              ex_d  = internal_slot(OP_ILOAD0 | {3'b000, dec.d[2:0]}, {2'b00, dec.d[2:0]},
                                    5'd0, ex_q.pc);
              mal_d = {4'b0000, diff_ar};
            end
            K_STORE: begin
              ex_d  = internal_slot(OP_ISTORE0, 5'd0, dec.s2, ex_q.pc);
              mal_d = {4'b0000, sum_ar};
              mem_ptr_en_d = 1'b1;
            end
            default: begin // K_STOREM
              ex_d  = internal_slot(OP_ISTORE0 | {3'b000, dec.s2[2:0]}, 5'd0,
                                    {2'b00, dec.s2[2:0]}, ex_q.pc);
              mal_d = {4'b0000, diff_ar};
            end
          endcase
        end
        K_ILOAD, K_ISTORE: begin
          if (is_iload) begin
            wb_we_d   = !is_special(dec.d);
            wb_data_d = ptr_used ? reg_a : data_in;
          end else begin
            ex_ptr_we = ptr_used;
          end
          if (dec.seq != 3'd0) begin
            ex_d = is_iload
                 ? internal_slot(OP_ILOAD0 | {3'b000, dec.seq - 3'd1}, {2'b00, dec.seq - 3'd1},
                                 5'd0, ex_q.pc)
                 : internal_slot(OP_ISTORE0 | {3'b000, dec.seq - 3'd1}, 5'd0,
                                 {2'b00, dec.seq - 3'd1}, ex_q.pc);
            mal_ld = 1'b1;
          end else begin
            ex_d   = hold_q;
            hold_d = '0;
          end
        end
        default: ;  // nop, internal SKIP, jump, trapN not taken, bubbles
      endcase
    end
  end

  // Register file write port: the write stage, or a pointer-to-register store in its data
  // cycle (the write stage is then idle: it holds the store or a STOREi).
  // A return with the N option nils r0-r5 of its new LOW window in the same edge.
  assign nil_en = wait_n && nil_req;
  assign rf_we = wait_n && (ex_ptr_we || wb_we_q);
  assign rf_wa = ex_ptr_we ? p_ptr : wb_idx_q;
  assign rf_wd = ex_ptr_we ? op_b  : wb_data_q;

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q         <= RESET_PC;
      ex_q         <= '0;
      hold_q       <= '0;
      wb_we_q      <= 1'b0;
      wb_sp_q      <= 1'b0;
      wb_idx_q     <= '0;
      wb_reg_q     <= '0;
      wb_data_q    <= '0;
      mal_q        <= '0;
      step_q       <= '0;
      mem_pc_q     <= '0;
      mem_opc_q    <= '0;
      mem_ptr_en_q <= 1'b0;
      trap_addr_q  <= '0;
      trap_r7_q    <= '0;
      last_opc_q   <= '0;
      fsh_q        <= 1'b0;
      psw_opc_q    <= '0;
      psw_i_q      <= 1'b0;
      ie_q         <= 1'b0;
      swi_q        <= 1'b0;
      psw_d_q      <= '0;
      cwp_q        <= '0;
      swp_q        <= '0;
      tb_q         <= '0;
      sha_q        <= '0;
      shb_q        <= '0;
    end else if (wait_n) begin
      pc_q      <= pc_d;
      ex_q      <= ex_d;
      hold_q    <= hold_d;
      fsh_q     <= fsh_d;
      wb_we_q   <= wb_we_d && !trap_now;
      wb_sp_q   <= wb_sp_d && !trap_now;
      wb_idx_q  <= wb_idx_d;
      wb_reg_q  <= wb_reg_d;
      wb_data_q <= wb_data_d;
      if (mal_ld)  mal_q  <= mal_d;
      if (step_ld) step_q <= step_d;
      if (mem_ld) begin
        mem_pc_q     <= ex_q.pc;
        mem_opc_q    <= dec.opc;
        mem_ptr_en_q <= mem_ptr_en_d;
      end
      if (trap_now) begin
        trap_addr_q <= trap_addr;
        trap_r7_q   <= (data_cycle ? mem_pc_q : ex_q.pc) + 32'd1;
      end
      if (real_insn) last_opc_q <= dec.opc;

      // SPECIAL register writes from the write stage ...
      if (wb_sp_q) begin
        unique case (wb_reg_q)
          R_SHB: shb_q <= wb_data_q;
          R_SHA: sha_q <= wb_data_q;
          R_SWP: swp_q <= wb_data_q[27:0];
          R_TB:  tb_q  <= wb_data_q[31:10];
          R_CWP: cwp_q <= wb_data_q[6:4];
          R_PSW: begin
            psw_opc_q <= wb_data_q[15:8];
            psw_i_q   <= wb_data_q[7];
            ie_q      <= wb_data_q[6];
            swi_q     <= wb_data_q[5];
            psw_d_q   <= wb_data_q[4:0];
          end
          default: ;  // r16 is constant zero; the PC cannot be written
        endcase
      end
      // ... then the operate stage, which is later in program order.
      if (!trap_now && cwp_d != cwp_q) cwp_q <= cwp_d;
      if (shadow_ld) begin
        sha_q     <= op_a;
        shb_q     <= rc;
        psw_opc_q <= dec.opc8;
        psw_d_q   <= dec.d;
      end
      if (set_ie && !trap_now) ie_q <= 1'b1;
      if (clr_ie)              ie_q <= 1'b0;
    end
  end

  // The two register-file write sources never collide.
  a_one_writer: assert property (@(posedge clk) !(ex_ptr_we && wb_we_q));
  // A data cycle never coincides with a pending Fast Shuffle being consumed.
  a_fsh_fetch: assert property (@(posedge clk) !fshcntl_n |-> i_d_n);
  // The vector taken is one of the conditions raised.
  a_trap_vec: assert property (@(posedge clk) trap_now |-> req[trap_vec]);
endmodule
