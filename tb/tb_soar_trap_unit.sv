// tb_soar_trap_unit: self-checking test of the trap priority encoder and vector address.
//
// Every single request is checked for its vector number, then random request sets must select
// the lowest-numbered (highest-priority) request. The address must be TB<31:10> followed by
// the vector and the opcode; two worked cases are checked as absolute octal offsets from TB:
// the tag trap of add (opcode 50) at TB + 0150 and the window overflow of call at TB + 0300.
// Combinational unit, checked after a 1 ns settle.
module tb_soar_trap_unit;
  import soar_pkg::*;

  logic [NTRAPS-1:0] req;
  logic [21:0]       tb;
  logic [5:0]        opc;
  logic              taken;
  vector_e           vec;
  word_t             addr;
  int                checks = 0, failures = 0;

  soar_trap_unit dut (.req(req), .tb(tb), .opc(opc), .taken(taken), .vec(vec), .addr(addr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s req=%b vec=%0d addr=%h", what, req, vec, addr);
    end
  endtask

  initial begin
    #100000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    tb = 22'h00_0001;   // TB = 0x400
    req = '0; opc = '0;
    #1 check(!taken, "no request");
    for (int i = 0; i < NTRAPS; i++) begin
      req = NTRAPS'(1) << i; opc = 6'(i * 5);
      #1 check(taken && int'(vec) == i && addr == {tb, 4'(i), 6'(i * 5)}, "single");
    end
    req = NTRAPS'(1) << V_TT; opc = OP_ADD;
    #1 check(addr == 32'h400 + 32'o150, "add tag trap at TB+0150");
    req = NTRAPS'(1) << V_WO; opc = 6'o00;
    #1 check(addr == 32'h400 + 32'o300, "call overflow at TB+0300");
    for (int n = 0; n < 2000; n++) begin
      int lo;
      req = NTRAPS'($urandom);
      tb  = 22'($urandom);
      opc = 6'($urandom);
      lo  = -1;
      for (int i = NTRAPS - 1; i >= 0; i--) if (req[i]) lo = i;
      #1;
      if (lo < 0) check(!taken, "random none");
      else check(taken && int'(vec) == lo && addr == {tb, 4'(lo), opc}, "random priority");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
