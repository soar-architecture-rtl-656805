// soar_window_ctl: register decode and window checks of the SOAR register windows
// (combinational).
//
// Register decode turns the logical register numbers of an instruction into physical
// register-file indices. LOW registers r0-r7 are window CWP-1, HIGH registers r8-r15 are
// window CWP, GLOBAL registers r24-r31 are shared; a physical window index is window*8 + k and
// the globals sit at 64..71. (SPECIAL registers r16-r23 are not in the register file; their
// index here is meaningless.)
//
// Window overflow (taken by call) is ((CWP - 1) mod 8) == SWP<6:4>; window underflow (taken by
// a return that changes the window) is ((CWP + 1) mod 8) == SWP<6:4>. cwp is the three-bit
// window number held in CWP<6:4>.
//
// Pointer-to-register: a 28-bit effective address A names an on-chip register when A<3> = 1 and
// (SWP<27:4> - A<27:4> - 1)<27:7> = 0, i.e. A lies in one of the eight 16-word context slots
// below SWP. The register is then word A<2:0> of window A<6:4> (the HIGH half of that window's
// context: words 8-15 of a context object are its registers).
// Lint note: the comparison works on 16-word slots, so SWP<3:0> and the low three bits of the
// slot distance are not used; the linter reports them.
module soar_window_ctl
  import soar_pkg::*;
(
  input  logic [2:0]  cwp,
  input  logic [27:0] swp,
  input  logic [4:0]  s1,
  input  logic [4:0]  s2,
  input  logic [4:0]  d,
  input  logic [27:0] ea,
  output pidx_t       p_s1,
  output pidx_t       p_s2,
  output pidx_t       p_d,
  output logic        wo,
  output logic        wu,
  output logic        ptr_hit,
  output pidx_t       p_ptr
);
  logic [23:0] win_dist;

  assign p_s1 = phys_of(s1, cwp);
  assign p_s2 = phys_of(s2, cwp);
  assign p_d  = phys_of(d, cwp);

  assign wo = (cwp - 3'd1) == swp[6:4];
  assign wu = (cwp + 3'd1) == swp[6:4];

  assign win_dist    = swp[27:4] - ea[27:4] - 24'd1;
  assign ptr_hit = ea[3] && (win_dist[23:3] == '0);
  assign p_ptr   = {1'b0, ea[6:4], ea[2:0]};
endmodule
