// tb_soar_window_ctl: self-checking test of register decode, window checks and the
// pointer-to-register comparator.
//
// Register decode: for every CWP and register r0-r15, r24-r31 the physical index must be
// window*8 + k with LOWs in window CWP-1 and HIGHs in window CWP, globals at 64+.
// Window checks: overflow exactly when CWP-1 = SWP<6:4>, underflow exactly when
// CWP+1 = SWP<6:4> (all 64 combinations).
// Pointer-to-register: with SWP = 0xF00 and 0xEE0, the context addresses of the on-chip
// windows (16-word slots below SWP) plus 8..15 must hit and name window A<6:4>, register
// A<2:0>; words 0..7 of a context, SWP itself and higher addresses, and addresses below the
// eight slots must miss. Random addresses are checked against an integer model.
module tb_soar_window_ctl;
  import soar_pkg::*;

  logic [2:0]  cwp;
  logic [27:0] swp, ea;
  logic [4:0]  s1, s2, d;
  pidx_t       p_s1, p_s2, p_d, p_ptr;
  logic        wo, wu, ptr_hit;
  int          checks = 0, failures = 0;

  soar_window_ctl dut (.cwp(cwp), .swp(swp), .s1(s1), .s2(s2), .d(d), .ea(ea), .p_s1(p_s1),
                       .p_s2(p_s2), .p_d(p_d), .wo(wo), .wu(wu), .ptr_hit(ptr_hit),
                       .p_ptr(p_ptr));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s cwp=%0d swp=%h ea=%h s1=%0d p_s1=%0d wo=%0d wu=%0d hit=%0d p_ptr=%0d",
               what, cwp, swp, ea, s1, p_s1, wo, wu, ptr_hit, p_ptr);
    end
  endtask

  function automatic bit model_hit(input logic [27:0] sw, input logic [27:0] a);
    longint slot_lo, slot_hi;
    slot_hi = longint'(sw) - 16;      // highest on-chip slot base
    slot_lo = longint'(sw) - 128;     // lowest on-chip slot base
    return a[3] && (longint'({a[27:4], 4'h0}) >= slot_lo) && (longint'({a[27:4], 4'h0}) <= slot_hi);
  endfunction

  initial begin
    #100000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    ea = '0; swp = '0; s2 = '0; d = '0;
    for (int c = 0; c < 8; c++) begin
      cwp = 3'(c);
      for (int r = 0; r < 32; r++) begin
        if (r >= 16 && r < 24) continue;
        s1 = 5'(r); s2 = 5'(r); d = 5'(r);
        #1;
        if (r < 8)       check(p_s1 == pidx_t'(((c + 7) % 8) * 8 + r) && p_d == p_s1, "LOW");
        else if (r < 16) check(p_s1 == pidx_t'(c * 8 + r - 8) && p_s2 == p_s1, "HIGH");
        else             check(p_s1 == pidx_t'(64 + r - 24), "GLOBAL");
      end
      for (int sw = 0; sw < 8; sw++) begin
        swp = {21'h0, 3'(sw), 4'h0};
        #1;
        check(wo == (((c + 7) % 8) == sw), "overflow");
        check(wu == (((c + 1) % 8) == sw), "underflow");
      end
    end
    // SWP = F00: windows 0..7 have contexts at F00-80+... (slot i covers window i)
    foreach (swp_list[i]) begin
      swp = swp_list[i];
      for (int slot = 1; slot <= 8; slot++) begin
        for (int k = 0; k < 16; k++) begin
          ea = swp - 28'(16 * slot) + 28'(k);
          #1;
          if (k >= 8) check(ptr_hit && p_ptr == {1'b0, ea[6:4], 3'(k - 8)}, "ptr hit");
          else        check(!ptr_hit, "ptr low half");
        end
      end
      for (int k = 0; k < 16; k++) begin
        ea = swp + 28'(k); #1 check(!ptr_hit, "at SWP");
        ea = swp - 28'(144) + 28'(k); #1 check(!ptr_hit, "below slots");
      end
    end
    for (int n = 0; n < 3000; n++) begin
      swp = 28'($urandom) & 28'hFFF_FFF0;
      ea  = (n % 2 == 0) ? swp - 28'($urandom_range(0, 200)) : 28'($urandom);
      #1 check(ptr_hit == model_hit(swp, ea), "random ptr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [27:0] swp_list [2] = '{28'hF00, 28'hEE0};
endmodule
