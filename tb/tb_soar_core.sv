// tb_soar_core: cycle-count and hazard test of the SOAR pipeline (soar_core alone).
//
// A program built with the testbench encoders runs from a memory that answers at the core's
// own address bus (no Fast Shuffle circuit: the core drives the target address itself). The
// program is divided into sections; each section ends with a marker store to a marker address,
// and the testbench records the clock cycle of every marker write. The cycles between two
// markers must equal the documented cost of the section plus the two cycles of the marker
// store itself:
//   ten dependent adds            10   (one cycle each, with forwarding)
//   load + add using the result    3   (load and store take two cycles)
//   two stores                     4
//   call + retw                    3   (call one cycle with Fast Shuffle, ret two cycles)
//   satisfied skip over a nop      2   (skip one cycle, plus one when the next is skipped)
//   skip not satisfied + nop       2
//   jump                           1   (Fast Shuffle)
//   loadm of four registers        5   (registers + 1)
//   storem of two registers        3
//   trap1 taken to a vector jump
//     to a one-instruction reti    6   (trap 1, internal TRAP 1, vector fetch bubble 1,
//                                       vector jump 1, reti 2, then the marker)
//   trap2 not taken                1
// Values are also checked: the dependent chain result, the loaded value used at once, the
// loadm registers, the storem image, the rule that a SPECIAL register written by one
// instruction is seen by the second instruction after it and not the first, and the r7
// written by the trap. Before the timed part, a trap1 taken while interrupts are still disabled
// after reset must vector with the shadowed opcode (zero), not its own, and its handler's
// reti enables interrupts for the rest. wait_n and page_n are held high and io_n inactive.
module tb_soar_core;
  import soar_pkg::*;
  import soar_asm_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  word_t addr, data_in, data_out;
  logic  data_oe, rd_wr_n, i_d_n, fshcntl_n, waitack_n;

  soar_core dut (.clk(clk), .rst_n(rst_n), .addr(addr), .data_in(data_in), .data_out(data_out),
                 .data_oe(data_oe), .rd_wr_n(rd_wr_n), .i_d_n(i_d_n), .fshcntl_n(fshcntl_n),
                 .wait_n(1'b1), .waitack_n(waitack_n), .page_n(1'b1), .io_n(1'b1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  word_t mem [word_t];
  function automatic word_t rd(input word_t a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction
  assign data_in = rd(addr);

  localparam word_t MAIN = 32'h010, P = 32'h0C0, TBASE = 32'h400, RES = 32'h200,
                    DATA = 32'h300, MARK = 32'h280;
  localparam int RZ = 16, RSWP = 20, RTB = 21, RCWP = 22;
  localparam int NSECT = 11;
  localparam int COST [NSECT] = '{10, 3, 4, 3, 2, 2, 1, 5, 3, 6, 1};

  word_t pcw, a_trap;
  int    nmark = 0;
  function automatic void e(input word_t w);
    mem[pcw] = w;
    pcw++;
  endfunction
  function automatic void marker();
    e(st(OP_STORE, 0, RZ, 30, 12'(nmark)));
    nmark++;
  endfunction

  task automatic build();
    pcw = RESET_PC; e(jump(0, MAIN[27:0]));
    pcw = P; e(ret(0, 0, 0, 1, 15, u8(0)));                 // retw r15,0
    pcw = TBASE + 32'(V_TI * 64 + 'o21); e(jump(0, 28'h0D0));
    pcw = 32'h0D0; e(ret(0, 1, 0, 0, 7, u8(0)));            // reti r7,0
    pcw = TBASE + 32'(V_TI * 64); e(jump(0, 28'h0D8));
    pcw = 32'h0D8;                                          // r25 <- 0x66, reti r7,0
    e(ri(OP_ADD, 0, 25, RZ, 12'h066)); e(ret(0, 1, 0, 0, 7, u8(0)));
    pcw = MAIN;
    e(ri(OP_ADD, 0, 24, RZ, 12'h004));
    e(ri(OP_INSERT, 0, 24, 24, 12'h001));
    e(ri(OP_ADD, 0, RTB, 24, 12'h000));                     // TB = 0x400
    e(ri(OP_ADD, 0, RCWP, RZ, 12'h040));                    // CWP = 4
    e(ri(OP_ADD, 0, RSWP, RZ, 12'h000));                    // SWP = 0: no window traps
    e(ri(OP_ADD, 0, 30, RZ, 12'h002));
    e(ri(OP_INSERT, 0, 30, 30, 12'h001));                   // r30 = 0x200
    e(ri(OP_ADD, 0, 29, RZ, 12'h003));
    e(ri(OP_INSERT, 0, 29, 29, 12'h001));                   // r29 = 0x300
    e(ri(OP_ADD, 0, 1, RZ, 12'h000));
    e(ri(OP_ADD, 0, 30, 30, 12'h000));
    // interrupts are still disabled after reset: trap1 vectors with the shadowed opcode (0)
    e(sk(6'o21, 0, C_ALWAYS, RZ, u8(0)));
    e(st(OP_STORE, 0, RZ, 30, 12'h07F));                    // marker base, not timed
    // markers are written at MARK + n (r30 + 0x80 would not fit: use r30 moved up)
    e(ri(OP_ADD, 0, 30, 30, 12'h040));
    e(ri(OP_ADD, 0, 30, 30, 12'h040));                      // r30 = 0x280
    marker();
    for (int k = 0; k < 10; k++) e(ri(OP_ADD, 0, 1, 1, 12'h001));
    marker();
    e(ri(OP_LOAD, 0, 2, 29, 12'h000));
    e(ri(OP_ADD, 0, 3, 2, 12'h001));
    marker();
    e(st(OP_STORE, 0, 3, 29, 12'h001));
    e(st(OP_STORE, 0, 1, 29, 12'h002));
    marker();
    e(call(0, P[27:0]));
    marker();
    e(sk(OP_SKIP, 0, C_ALWAYS, RZ, u8(0)));
    e(nop());
    marker();
    e(sk(OP_SKIP, 0, C_NEVER, RZ, u8(0)));
    e(nop());
    marker();
    e(jump(0, pcw[27:0] + 28'd1));
    marker();
    e(ri(OP_LOADM, 0, 3, 29, 12'h004));                     // r3..r0 <- M[DATA-4], ...-16
    marker();
    e(st(OP_STOREM, 0, 1, 29, u8(-16)));                    // r1, r0 -> M[DATA+16], M[DATA+32]
    marker();
    a_trap = pcw;
    e(sk(6'o21, 0, C_ALWAYS, RZ, u8(0)));
    marker();
    e(sk(6'o22, 0, C_NEVER, RZ, u8(0)));
    marker();
    // special register hazard: SWP written, read by the next two instructions
    e(ri(OP_ADD, 0, RSWP, RZ, 12'h050));
    e(ri(OP_ADD, 0, 4, RSWP, 12'h000));
    e(ri(OP_ADD, 0, 5, RSWP, 12'h000));
    e(ri(OP_ADD, 0, 6, 7, 12'h000));
    e(st(OP_STORE, 0, 1, 29, 12'h040));
    e(st(OP_STORE, 0, 2, 29, 12'h041));
    e(st(OP_STORE, 0, 3, 29, 12'h042));
    e(st(OP_STORE, 0, 4, 29, 12'h043));
    e(st(OP_STORE, 0, 5, 29, 12'h044));
    e(st(OP_STORE, 0, 6, 29, 12'h045));
    e(st(OP_STORE, 0, 25, 29, 12'h046));
    e(st(OP_STORE, 0, RZ, 29, 12'h07F));                    // done
    e(jump(0, pcw[27:0]));
    mem[DATA] = 32'd41;
    for (int k = 1; k <= 4; k++) mem[DATA - 32'(4 * k)] = 32'h1000 + k;
  endtask

  int cyc = 0;
  int mark_cyc [$];
  bit done = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    check(waitack_n, "waitack follows wait");
    if (!rd_wr_n) begin
      mem[addr] = data_out;
      if (addr >= MARK && addr < MARK + 32'h20) mark_cyc.push_back(cyc);
      if (addr == DATA + 32'h07F) done <= 1;
    end
  end

  initial begin
    #1000000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    build();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done);
    repeat (3) @(posedge clk);
    check(mark_cyc.size() == NSECT + 1, $sformatf("%0d markers", mark_cyc.size()));
    for (int s = 0; s < NSECT && s + 1 < mark_cyc.size(); s++)
      check(mark_cyc[s + 1] - mark_cyc[s] == COST[s] + 2,
            $sformatf("section %0d took %0d cycles, expected %0d", s,
                      mark_cyc[s + 1] - mark_cyc[s] - 2, COST[s]));
    check(rd(DATA + 1) == 32'd42, "load used by the next instruction, then stored");
    check(rd(DATA + 2) == 32'd10, "chain of ten dependent adds");
    // loadm: r3 <- M[DATA-4], r2 <- M[DATA-8], r1 <- M[DATA-12], r0 <- M[DATA-16]
    check(rd(DATA + 32'h42) == 32'h1001 && rd(DATA + 32'h41) == 32'h1002 &&
          rd(DATA + 32'h40) == 32'h1003, "loadm register values");
    // storem r1, r0 -> M[DATA+16], M[DATA+32] (SC = -16)
    check(rd(DATA + 16) == 32'h1003 && rd(DATA + 32) == 32'h1004, "storem image");
    check(rd(DATA + 32'h45) == a_trap + 1, "r7 after the trap");
    check(rd(DATA + 32'h46) == 32'h66, "trap with interrupts disabled used the shadow opcode");
    check(rd(DATA + 32'h43) == 32'h0, "SPECIAL write not seen by the next instruction");
    check(rd(DATA + 32'h44) == 32'h50, "SPECIAL write seen by the second instruction after");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
