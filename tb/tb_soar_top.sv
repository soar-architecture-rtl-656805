// tb_soar_top: end-to-end test of the SOAR processor with its Fast Shuffle circuit and a
// memory, running a Smalltalk-style call/return workload with software window handlers.
//
// Workload. The main procedure (P1) sets up the trap base, the saved-window pointer and CWP = 7,
// then calls a recursive procedure F(8) = 8 + F(7) + ... + F(0), so nine procedure activations
// P2..P10 sit on top of P1. With eight windows this gives three window overflows on the way down
// and three underflows on the way up, as in the architecture's worked call/return sequence.
// The overflow handler spills a window with store-multiple, the underflow handler refills it
// with load-multiple, both written from the handler algorithm of the architecture description.
// Afterwards the program exercises, and stores results of: pointer-to-register load/store,
// memory load (first access hits a data page fault), extract, shifts, skip taken/not taken over
// a jump, tag traps (oop operand, sla overflow), a Generation Scavenge store trap, a tagged
// store and load through an object pointer, trap1, an illegal opcode, a software interrupt on
// a tagged jump, an I/O interrupt, an instruction page fault, and a return with nil.
//
// Memory model: words at any address, read combinationally at sys_addr (so a wrong Fast Shuffle
// multiplexer fetches the wrong word), written at the clock edge of a cycle with rd_wr_n low
// and wait_n high. wait_n is low on random cycles throughout. page_n is low once for one
// instruction fetch address and once for one data address. io_n goes low when the program
// writes a request address and high when the handler writes the acknowledge address.
//
// Checks: the result words, the spilled window images, unchanged memory under the cancelled
// store; trap counts per vector; cycle counts: the vector's jump operates three cycles after
// the trapping instruction (trap, TRAP slot, bubble while the vector is fetched) and the
// handler's first instruction one cycle after the jump (four in all), a load or
// store spends exactly one extra data cycle, load-multiple of D spends D+1 data cycles, a
// return leaves one bubble and then executes the target, a call executes its target in the
// next cycle (Fast Shuffle); waitack_n echoes wait_n; and every mechanism is counted, an unseen
// mechanism counting as a failure.
module tb_soar_top;
  import soar_pkg::*;
  import soar_asm_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  word_t sys_addr, soar_addr, data_in, data_out;
  logic  data_oe, rd_wr_n, i_d_n, fshcntl_n, wait_n, waitack_n, page_n, io_n;

  soar_top dut (.clk(clk), .rst_n(rst_n), .sys_addr(sys_addr), .soar_addr(soar_addr),
                .data_in(data_in), .data_out(data_out), .data_oe(data_oe), .rd_wr_n(rd_wr_n),
                .i_d_n(i_d_n), .fshcntl_n(fshcntl_n), .wait_n(wait_n), .waitack_n(waitack_n),
                .page_n(page_n), .io_n(io_n));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------------ memory
  word_t mem [word_t];
  function automatic word_t rd(input word_t a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction

  // address map
  localparam word_t MAIN = 32'h020, F = 32'h100, G = 32'h140, TBASE = 32'h400;
  localparam word_t WOF = 32'h700, WUF = 32'h710, TTH = 32'h720, GSH = 32'h730, TIH = 32'h738,
                    ILLH = 32'h740, SWIH = 32'h748, IOH = 32'h750, IPFH = 32'h758,
                    DPFH = 32'h760, FAILR = 32'h7F0;
  localparam word_t RES = 32'h200, DATA = 32'h300, IOREQ = 32'h270, IOACK = 32'h271,
                    FAILA = 32'h27E, DONE = 32'h27F;
  localparam int RTB = 21, RSWP = 20, RCWP = 22, RPSW = 23, RSHA = 19, RZ = 16;

  word_t pcw;
  function automatic void e(input word_t w);
    mem[pcw] = w;
    pcw++;
  endfunction
  function automatic word_t vec_addr(input vector_e v, input int opc);
    return TBASE + word_t'(int'(v) * 64 + opc);
  endfunction

  word_t a_call_main, a_gs, a_trap1, a_ill, a_swi, a_ipf, a_dpf, a_io_lo, a_io_hi, a_call_f;
  word_t ipf_addr, dpf_addr;

  task automatic build();
    pcw = RESET_PC; e(jump(0, MAIN[27:0]));
    // trap vectors: a jump to the handler at each used slot
    pcw = vec_addr(V_ILL, 'o01);  e(jump(0, ILLH[27:0]));
    pcw = vec_addr(V_TT, 'o50);   e(jump(0, TTH[27:0]));
    pcw = vec_addr(V_TT, 'o51);   e(jump(0, TTH[27:0]));
    pcw = vec_addr(V_SWI, 'o40);  e(jump(0, SWIH[27:0]));
    pcw = vec_addr(V_WO, 'o00);   e(jump(0, WOF[27:0]));
    pcw = vec_addr(V_WU, 'o11);   e(jump(0, WUF[27:0]));
    pcw = vec_addr(V_DPF, 'o34);  e(jump(0, DPFH[27:0]));
    pcw = vec_addr(V_TI, 'o21);   e(jump(0, TIH[27:0]));
    pcw = vec_addr(V_GS, 'o30);   e(jump(0, GSH[27:0]));
    for (int o = 0; o < 64; o++) begin
      pcw = vec_addr(V_IPF, o); e(jump(0, IPFH[27:0]));
      pcw = vec_addr(V_IO, o);  e(jump(0, IOH[27:0]));
    end
    // window overflow: CWP-1, spill the LOW registers (the oldest on-chip window) below SWP
    pcw = WOF;
    e(ri(OP_SUB, 0, RCWP, RCWP, 12'h010));
    e(ri(OP_ADD, 0, 31, RSWP, 12'h000));
    e(ri(OP_SUB, 0, RSWP, RSWP, 12'h010));
    e(st(OP_STOREM, 0, 7, 31, 12'h001));
    e(ret(0, 1, 0, 1, 15, u8(-1)));              // re-execute the call
    // window underflow: reach the spilled window as LOWs, refill it, restore CWP and SWP
    pcw = WUF;
    e(ri(OP_ADD, 0, RCWP, RCWP, 12'h020));
    e(ri(OP_ADD, 0, 31, RSWP, 12'h010));
    e(ri(OP_LOADM, 0, 7, 31, 12'h001));
    e(ri(OP_SUB, 0, RCWP, RCWP, 12'h020));
    e(ri(OP_ADD, 0, RSWP, RSWP, 12'h010));
    e(ret(0, 1, 0, 0, 7, u8(-1)));               // re-execute the return
    // tag trap: record SHA and PSW at RES+24+n / RES+28+n, count in r29, continue after
    pcw = TTH;
    e(rr(OP_ADD, 0, 31, 30, 29));
    e(ri(OP_ADD, 0, 28, RSHA, 12'h000));
    e(st(OP_STORE, 0, 28, 31, 12'h018));
    e(ri(OP_ADD, 0, 28, RPSW, 12'h000));
    e(st(OP_STORE, 0, 28, 31, 12'h01C));
    e(ri(OP_ADD, 0, 29, 29, 12'h001));
    e(ret(0, 1, 0, 0, 7, u8(0)));
    pcw = GSH;  e(st(OP_STORE, 0, 7, 30, 12'd32)); e(ret(0, 1, 0, 0, 7, u8(0)));
    pcw = TIH;  e(st(OP_STORE, 0, 7, 30, 12'd34)); e(ret(0, 1, 0, 0, 7, u8(0)));
    pcw = ILLH; e(st(OP_STORE, 0, 7, 30, 12'd35)); e(ret(0, 1, 0, 0, 7, u8(0)));
    pcw = SWIH;
    e(ri(OP_ADD, 0, RPSW, RZ, 12'h040));         // clear the request, keep IE
    e(nop());
    e(st(OP_STORE, 0, 7, 30, 12'd36));
    e(ret(0, 1, 0, 0, 7, u8(-1)));               // re-execute the jump
    pcw = IOH;
    e(st(OP_STORE, 0, RZ, 30, 12'h071));         // acknowledge the device
    e(st(OP_STORE, 0, 7, 30, 12'd37));
    e(ret(0, 1, 0, 0, 7, u8(-1)));
    pcw = IPFH; e(st(OP_STORE, 0, 7, 30, 12'd39)); e(ret(0, 1, 0, 0, 7, u8(-1)));
    pcw = DPFH; e(st(OP_STORE, 0, 7, 30, 12'd40)); e(ret(0, 1, 0, 0, 7, u8(-1)));
    pcw = FAILR; e(st(OP_STORE, 0, RZ, 30, 12'h07E)); e(jump(0, FAILR[27:0] + 28'd1));

    // F(n): n arrives in r14 and the result leaves in r14
    pcw = F;
    e(sk(OP_SKIP, 1, C_NE, 14, k8(0)));
    e(ret(1, 0, 0, 1, 15, k8(0)));               // F(0) = 0
    e(ri(OP_SUB, 1, 6, 14, k8(1)));
    a_call_f = pcw;
    e(call(0, F[27:0]));
    e(rr(OP_ADD, 1, 14, 6, 14));
    e(ret(1, 0, 0, 1, 15, k8(0)));
    // G: return 5 and nil the caller's r0-r5
    pcw = G;
    e(ri(OP_ADD, 1, 14, RZ, k8(5)));
    e(ret(1, 0, 1, 1, 15, k8(0)));

    // ---------------------------------------------------------------- main (P1)
    pcw = MAIN;
    e(ri(OP_ADD, 0, 24, RZ, 12'h004));
    e(ri(OP_INSERT, 0, 24, 24, 12'h001));        // 0x400
    e(ri(OP_ADD, 0, RTB, 24, 12'h000));
    e(ri(OP_ADD, 0, 24, RZ, 12'h00F));
    e(ri(OP_INSERT, 0, 24, 24, 12'h001));        // 0xF00
    e(ri(OP_ADD, 0, RSWP, 24, 12'h000));
    e(ri(OP_ADD, 0, RCWP, RZ, 12'h070));         // CWP = 7
    e(ri(OP_ADD, 0, 30, RZ, 12'h002));
    e(ri(OP_INSERT, 0, 30, 30, 12'h001));        // r30 = RES
    e(ri(OP_ADD, 0, 29, RZ, 12'h000));
    for (int k = 0; k < 8; k++) e(ri(OP_ADD, 1, 8 + k, RZ, k8(11 + k)));
    e(ri(OP_ADD, 1, 6, RZ, k8(8)));
    a_call_main = pcw;
    e(call(0, F[27:0]));
    e(st(OP_STORE, 0, 6, 30, 12'd0));
    e(ri(OP_ADD, 0, 24, RCWP, 12'h000)); e(st(OP_STORE, 0, 24, 30, 12'd1));
    e(ri(OP_ADD, 0, 24, RSWP, 12'h000)); e(st(OP_STORE, 0, 24, 30, 12'd2));
    for (int k = 0; k < 8; k++) e(st(OP_STORE, 0, 8 + k, 30, 12'(8 + k)));
    // pointer to this context's registers: SWP - ((SWP - CWP) & 0x70)
    e(ri(OP_ADD, 0, 24, RCWP, 12'h000));
    e(rr(OP_SUB, 0, 24, RSWP, 24));
    e(ri(OP_AND, 0, 24, 24, 12'h070));
    e(rr(OP_SUB, 0, 24, RSWP, 24));
    e(ri(OP_LOAD, 0, 25, 24, 12'd13));           // r25 <- r13 through memory address
    e(ri(OP_ADD, 0, 26, RZ, 12'h05A));
    e(st(OP_STORE, 0, 26, 24, 12'd12));          // r12 <- 0x5A through memory address
    e(ri(OP_ADD, 0, 27, 12, 12'h000));
    e(st(OP_STORE, 0, 25, 30, 12'd16));
    e(st(OP_STORE, 0, 27, 30, 12'd17));
    // memory load (data page fault first), load-use
    e(ri(OP_ADD, 0, 24, RZ, 12'h003));
    e(ri(OP_INSERT, 0, 24, 24, 12'h001));        // r24 = DATA
    a_dpf = pcw;
    e(ri(OP_LOAD, 0, 25, 24, 12'h000));
    e(ri(OP_ADD, 0, 26, 25, 12'h001));
    e(st(OP_STORE, 0, 26, 30, 12'd18));
    e(ri(OP_EXTRACT, 0, 25, 25, 12'h002));
    e(ri(OP_SRL, 0, 26, 26, 12'h000));
    e(st(OP_STORE, 0, 25, 30, 12'd19));
    e(st(OP_STORE, 0, 26, 30, 12'd20));
    e(ri(OP_SUB, 1, 25, RZ, k8(10)));
    e(ri(OP_SRA, 1, 25, 25, 12'h000));
    e(st(OP_STORE, 0, 25, 30, 12'd21));
    // skip over a jump (must not be taken), then a skip not satisfied
    e(sk(OP_SKIP, 0, C_EQ, RZ, u8(0)));
    e(jump(0, FAILR[27:0]));
    e(sk(OP_SKIP, 0, C_NE, RZ, u8(0)));
    e(ri(OP_ADD, 0, 25, RZ, 12'h077));
    e(st(OP_STORE, 0, 25, 30, 12'd22));
    // tag traps
    e(ri(OP_ADD, 0, 25, RZ, 12'hA03));
    e(rr(OP_ADD, 1, 26, 25, 8));                 // oop operand
    e(ri(OP_ADD, 0, 25, RZ, 12'h200));
    e(rr(OP_SLA, 1, 26, 25, 25));                // 2^29 shifted left overflows
    // Generation Scavenge: context stored into an Emeritus object
    e(ri(OP_ADD, 0, 25, RZ, 12'hB00));
    e(rr(OP_OR, 0, 25, 25, 24));                 // 0xB0000300
    e(ri(OP_ADD, 0, 26, RZ, 12'hF00));
    a_gs = pcw;
    e(st(OP_STORE, 1, 26, 25, 12'h005));
    e(st(OP_STORE, 1, 8, 25, 12'h006));          // integer stored: no trap
    e(ri(OP_LOAD, 1, 27, 25, 12'h006));
    e(st(OP_STORE, 0, 27, 30, 12'd33));
    // trap instructions and an illegal opcode
    e(sk(6'o21, 0, C_NEVER, RZ, u8(0)));
    a_trap1 = pcw;
    e(sk(6'o21, 0, C_ALWAYS, RZ, u8(0)));
    a_ill = pcw;
    e(rr(6'o01, 0, 0, 0, 0));
    // software interrupt: requested in PSW, ignored by %jump, taken by a tagged jump
    e(ri(OP_ADD, 0, RPSW, RZ, 12'h060));
    e(nop());
    e(jump(0, pcw[27:0] + 28'd1));
    a_swi = pcw;
    e(jump(1, pcw[27:0] + 28'd1));
    // I/O interrupt while counting to eight
    e(ri(OP_ADD, 0, 24, RZ, 12'h000));
    e(st(OP_STORE, 0, RZ, 30, 12'h070));
    a_io_lo = pcw;
    for (int k = 0; k < 8; k++) e(ri(OP_ADD, 0, 24, 24, 12'h001));
    a_io_hi = pcw;
    e(st(OP_STORE, 0, 24, 30, 12'd38));
    // instruction page fault on a plain instruction
    a_ipf = pcw;
    e(ri(OP_ADD, 0, 25, RZ, 12'h011));
    e(st(OP_STORE, 0, 25, 30, 12'd44));
    // return with nil
    for (int k = 0; k < 6; k++) e(ri(OP_ADD, 0, k, RZ, 12'(k + 1)));
    e(call(0, G[27:0]));
    e(st(OP_STORE, 0, 0, 30, 12'd41));
    e(st(OP_STORE, 0, 5, 30, 12'd42));
    e(st(OP_STORE, 0, 6, 30, 12'd43));
    e(st(OP_STORE, 0, 29, 30, 12'd45));
    e(st(OP_STORE, 0, RZ, 30, 12'h07F));         // done
    e(jump(0, pcw[27:0]));
    check(pcw < F, "main fits below F");

    mem[DATA]       = 32'h1234_5678;
    mem[DATA + 5]   = 32'h0000_CAFE;
    ipf_addr = a_ipf;
    dpf_addr = DATA;
  endtask

  // ------------------------------------------------------------------ bus and environment
  bit ipf_done = 0, dpf_done = 0, io_req = 0, done = 0, fail_seen = 0;
  int seen_ipf_fault = 0, seen_dpf_fault = 0;

  always_comb begin
    data_in = rd(sys_addr);
    page_n  = 1'b1;
    if (i_d_n && !ipf_done && sys_addr == ipf_addr) page_n = 1'b0;
    if (!i_d_n && !dpf_done && sys_addr == dpf_addr) page_n = 1'b0;
  end
  assign io_n = !io_req;

  always @(negedge clk) wait_n <= !rst_n || ($urandom_range(0, 7) != 0);

  always @(posedge clk) if (rst_n && wait_n) begin
    if (!page_n && i_d_n)  ipf_done <= 1;
    if (!page_n && !i_d_n) dpf_done <= 1;
    if (!rd_wr_n && page_n) begin
      mem[sys_addr] = data_out;
      if (dbg) $display("write M[%h] = %h", sys_addr, data_out);
      if (sys_addr == IOREQ) io_req <= 1;
      if (sys_addr == IOACK) io_req <= 0;
      if (sys_addr == DONE)  done <= 1;
      if (sys_addr == FAILA) fail_seen <= 1;
    end
  end

  // ------------------------------------------------------------------ monitor
  int cyc = 0, n_wait = 0, n_fsh = 0, n_fwd = 0, n_skip = 0, n_load = 0, n_store = 0, n_ptr = 0;
  int n_loadm = 0, n_storem = 0, n_nil = 0, n_call = 0, n_ret = 0, n_tagged = 0, n_rstr = 0;
  int n_trap [NTRAPS];
  bit dbg = 0;
  initial dbg = $test$plusargs("dbg");
  int    h_due = -1, r_due = -1, c_due = -1, l_due = -1, m_left = -1, m_seen = 0;
  word_t h_pc, h_tgt, r_pc, c_pc;

  always @(posedge clk) if (rst_n) begin
    check(waitack_n == wait_n, "waitack echoes wait");
    check(fshcntl_n || sys_addr[31:28] == 4'h0, "fast shuffle address");
    if (!fshcntl_n) check(sys_addr == soar_addr, "fast shuffle register matches the core");
    if (!wait_n) n_wait++;
    else begin
      kind_e k;
      k = dut.u_core.dec.kind;
      cyc++;
      if (dbg) $display("%0d ex=%h v=%0d k=%s fetch@%h=%h cwp=%0d swp=%h trap=%0d", cyc,
                        dut.u_core.ex_q.pc, dut.u_core.ex_q.valid, k.name(), sys_addr, data_in,
                        dut.u_core.cwp_q, dut.u_core.swp_q, dut.u_core.trap_now);
      if (!fshcntl_n) n_fsh++;
      if (dut.u_core.ex_q.valid && (dut.u_core.fwd_a || dut.u_core.fwd_b)) n_fwd++;
      if (dut.u_core.ptr_used) n_ptr++;
      if (dut.u_core.nil_en) n_nil++;
      if (dut.u_core.ex_q.valid && dut.u_core.dec.tag_en && !dut.u_core.ex_q.internal) n_tagged++;
      // pending latency checks
      if (cyc == h_due) check(dut.u_core.ex_q.valid && dut.u_core.ex_q.pc == h_pc,
                              $sformatf("trap vector jump at %h after 3 cycles", h_pc));
      if (cyc == h_due + 1) check(dut.u_core.ex_q.valid && dut.u_core.ex_q.pc == h_tgt,
                                  $sformatf("trap handler entry at %h after 4 cycles", h_tgt));
      if (cyc == r_due - 1) check(!dut.u_core.ex_q.valid, "bubble after ret");
      if (cyc == r_due) check(dut.u_core.ex_q.pc == r_pc, "ret target after one bubble");
      if (cyc == c_due) check(dut.u_core.ex_q.valid && dut.u_core.ex_q.pc == c_pc,
                              "call target in the next cycle");
      if (cyc == l_due) check(k == K_ILOAD || k == K_ISTORE, "load/store data cycle follows");
      if (m_left >= 0) begin
        if (k == K_ILOAD || k == K_ISTORE) m_seen++;
        else begin
          check(m_seen == m_left, $sformatf("multiple: %0d data cycles, expected %0d", m_seen,
                                             m_left));
          m_left = -1;
        end
      end
      if (dut.u_core.trap_now) begin
        n_trap[dut.u_core.trap_vec]++;
        h_due = cyc + 3;
        h_pc  = dut.u_core.trap_addr;
        h_tgt = {4'b0000, rd(dut.u_core.trap_addr)[27:0]};
      end else begin
        unique case (k)
          K_SKIP:  if (dut.u_core.cond_taken) n_skip++;
          K_LOAD:  begin n_load++;  l_due = cyc + 1; end
          K_STORE: begin n_store++; l_due = cyc + 1; end
          K_LOADM, K_STOREM: begin
            if (k == K_LOADM) n_loadm++; else n_storem++;
            m_left = (k == K_LOADM) ? int'(dut.u_core.dec.d[2:0]) + 1
                                    : int'(dut.u_core.dec.s2[2:0]) + 1;
            m_seen = 0;
          end
          K_RET:  begin n_ret++; r_due = cyc + 2; r_pc = dut.u_core.target_ret; end
          K_CALL: begin n_call++; c_due = cyc + 1; c_pc = {4'h0, dut.u_core.dec.target}; end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------------ run and final checks
  initial begin
    #2000000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic expect_mem(input word_t a, input word_t v, input string what);
    check(rd(a) == v, $sformatf("%s: M[%h] = %h, expected %h", what, a, rd(a), v));
  endtask

  task automatic at_least(input int n, input string what);
    $display("  %-28s %0d", what, n);
    check(n > 0, $sformatf("mechanism never happened: %s", what));
  endtask

  initial begin
    foreach (n_trap[i]) n_trap[i] = 0;
    build();
    wait_n = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done || fail_seen);
    repeat (4) @(posedge clk);
    check(!fail_seen, "program reached the failure routine");

    expect_mem(RES + 0, 32'd36, "F(8)");
    expect_mem(RES + 1, 32'h70, "CWP back to 7");
    expect_mem(RES + 2, 32'hF00, "SWP back to its start");
    for (int k = 0; k < 8; k++) expect_mem(RES + 8 + k, 32'(11 + k), "P1 registers after refill");
    for (int k = 0; k < 8; k++) expect_mem(32'hEF8 + k, 32'(11 + k), "first spilled window");
    expect_mem(32'hEEE, 32'd8, "second spilled window r14");
    expect_mem(32'hEEF, a_call_main + 1, "second spilled window r15");
    expect_mem(32'hEDE, 32'd7, "third spilled window r14");
    expect_mem(32'hEDF, a_call_f + 1, "third spilled window r15");
    expect_mem(RES + 16, 32'd16, "pointer-to-register load");
    expect_mem(RES + 17, 32'h5A, "pointer-to-register store");
    expect_mem(RES + 18, 32'h1234_5679, "load and load-use");
    expect_mem(RES + 19, 32'h34, "extract");
    expect_mem(RES + 20, 32'h091A_2B3C, "srl");
    expect_mem(RES + 21, 32'h7FFF_FFFB, "tagged sra of -10");
    expect_mem(RES + 22, 32'h77, "skip not satisfied");
    expect_mem(RES + 24, 32'hA000_0003, "SHA at the oop tag trap");
    expect_mem(RES + 28, 32'h0000_E81A, "PSW at the oop tag trap");
    expect_mem(RES + 25, 32'h2000_0000, "SHA at the sla overflow");
    expect_mem(RES + 29, 32'h0000_E91A, "PSW at the sla overflow");
    expect_mem(RES + 45, 32'd2, "tag trap handler runs");
    expect_mem(RES + 32, a_gs + 1, "GS trap r7");
    expect_mem(DATA + 5, 32'h0000_CAFE, "GS store cancelled");
    expect_mem(DATA + 6, 32'd11, "tagged store");
    expect_mem(RES + 33, 32'd11, "tagged load");
    expect_mem(RES + 34, a_trap1 + 1, "trap1 r7");
    expect_mem(RES + 35, a_ill + 1, "illegal opcode r7");
    expect_mem(RES + 36, a_swi + 1, "software interrupt r7");
    check(rd(RES + 37) > a_io_lo - 2 && rd(RES + 37) <= a_io_hi + 1, "I/O interrupt r7");
    expect_mem(RES + 38, 32'd8, "count across the I/O interrupt");
    expect_mem(RES + 39, a_ipf + 1, "instruction page fault r7");
    expect_mem(RES + 44, 32'h11, "instruction after page fault");
    expect_mem(RES + 40, a_dpf + 1, "data page fault r7");
    expect_mem(RES + 41, NIL_VALUE, "retn nils r0");
    expect_mem(RES + 42, NIL_VALUE, "retn nils r5");
    expect_mem(RES + 43, 32'd5, "retn keeps r6");

    check(n_trap[V_WO] == 3, $sformatf("window overflows %0d, expected 3", n_trap[V_WO]));
    check(n_trap[V_WU] == 3, $sformatf("window underflows %0d, expected 3", n_trap[V_WU]));
    check(n_trap[V_TT] == 2, "two tag traps");
    check(n_trap[V_GS] == 1 && n_trap[V_TI] == 1 && n_trap[V_ILL] == 1 && n_trap[V_SWI] == 1 &&
          n_trap[V_IO] == 1 && n_trap[V_IPF] == 1 && n_trap[V_DPF] == 1, "one of each other trap");

    $display("mechanism counts over %0d cycles:", cyc);
    at_least(n_fsh, "fast shuffle fetches");
    at_least(n_fwd, "operand forwarding");
    at_least(n_skip, "satisfied skips");
    at_least(n_load, "loads");
    at_least(n_store, "stores");
    at_least(n_ptr, "pointer-to-register accesses");
    at_least(n_loadm, "load-multiple");
    at_least(n_storem, "store-multiple");
    at_least(n_call, "calls");
    at_least(n_ret, "returns");
    at_least(n_nil, "returns with nil");
    at_least(n_wait, "wait cycles");
    at_least(n_tagged, "tagged instructions");
    at_least(n_trap[V_WO], "window overflow traps");
    at_least(n_trap[V_WU], "window underflow traps");
    at_least(n_trap[V_TT], "tag traps");
    at_least(n_trap[V_GS], "generation scavenge traps");
    at_least(n_trap[V_TI], "trap instructions");
    at_least(n_trap[V_ILL], "illegal opcode traps");
    at_least(n_trap[V_SWI], "software interrupts");
    at_least(n_trap[V_IO], "I/O interrupts");
    at_least(n_trap[V_IPF], "instruction page faults");
    at_least(n_trap[V_DPF], "data page faults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
