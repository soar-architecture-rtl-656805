// tb_soar_regfile: self-checking test of the windowed register file storage.
//
// A shadow array in the testbench mirrors every write. Each cycle performs a random write
// (sometimes none) and sometimes a nil of registers 0..5 of a random window; after the clock
// edge both read ports are checked against the shadow at random addresses. A write and a nil
// to the same register in one edge must leave the nil value. Reads are combinational, writes
// take effect at the rising edge (one-cycle write latency is checked by reading the written
// address just before and just after the edge).
module tb_soar_regfile;
  import soar_pkg::*;

  logic       clk = 1'b0;
  pidx_t      ra, rb, wa;
  word_t      rda, rdb, wd;
  logic       we, nil_en;
  logic [2:0] nil_win;
  word_t      shadow [NPHYS];
  int         checks = 0, failures = 0;

  soar_regfile dut (.clk(clk), .ra(ra), .rda(rda), .rb(rb), .rdb(rdb), .we(we), .wa(wa),
                    .wd(wd), .nil_en(nil_en), .nil_win(nil_win));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s ra=%0d rda=%h rb=%0d rdb=%h", what, ra, rda, rb, rdb);
    end
  endtask

  initial begin
    #1000000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    we = 0; nil_en = 0; wa = '0; wd = '0; nil_win = '0; ra = '0; rb = '0;
    // fill every register
    for (int i = 0; i < NPHYS; i++) begin
      @(negedge clk);
      we = 1; wa = pidx_t'(i); wd = $urandom; shadow[i] = wd;
      ra = pidx_t'(i); #1;
      if (i > 0) check(rda == 32'h0 || rda != wd, "no write before the edge");
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < NPHYS; i++) begin
      ra = pidx_t'(i); rb = pidx_t'(NPHYS - 1 - i); #1;
      check(rda == shadow[i] && rdb == shadow[NPHYS - 1 - i], "fill readback");
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we      = ($urandom_range(0, 3) != 0);
      wa      = pidx_t'($urandom_range(0, NPHYS - 1));
      wd      = $urandom;
      nil_en  = ($urandom_range(0, 7) == 0);
      nil_win = 3'($urandom);
      if (n % 50 == 0) begin we = 1; nil_en = 1; wa = {1'b0, nil_win, 3'd2}; end
      @(posedge clk);
      if (we) shadow[wa] = wd;
      if (nil_en) for (int k = 0; k < 6; k++) shadow[{1'b0, nil_win, 3'(k)}] = NIL_VALUE;
      #1;
      we = 0; nil_en = 0;
      ra = pidx_t'($urandom_range(0, NPHYS - 1));
      rb = (n % 2 == 0) ? wa : pidx_t'($urandom_range(0, NPHYS - 1));
      #1 check(rda == shadow[ra] && rdb == shadow[rb], "random readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
