// soar_regfile: SOAR windowed register file storage.
//
// 72 words of 32 bits: eight register windows of eight registers (physical index window*8+k)
// and eight global registers (64..71). The logical-to-physical mapping is done by
// soar_window_ctl. Two asynchronous read ports (the A and B buses) and one write port written on
// the rising clock edge. The nil port clears registers 0..5 of one window to the nil object
// (tag 1011, address 0) in the same edge, as a return with the N option does to the LOW
// registers of the window it returns to; when both hit the same register the nil wins, since
// the return follows the writing instruction. There is no reset: the register contents are
// undefined until software writes them, as on the chip. Reads return the stored value; the
// pipeline forwards results still in flight itself.
module soar_regfile
  import soar_pkg::*;
(
  input  logic       clk,
  input  pidx_t      ra,
  output word_t      rda,
  input  pidx_t      rb,
  output word_t      rdb,
  input  logic       we,
  input  pidx_t      wa,
  input  word_t      wd,
  input  logic       nil_en,
  input  logic [2:0] nil_win
);
  word_t regs [NPHYS];

  assign rda = (int'(ra) < NPHYS) ? regs[ra] : '0;
  assign rdb = (int'(rb) < NPHYS) ? regs[rb] : '0;

  always_ff @(posedge clk) begin
    if (we && int'(wa) < NPHYS) regs[wa] <= wd;
    if (nil_en)
      for (int k = 0; k < 6; k++) regs[PIDX_W'({nil_win, 3'(k)})] <= NIL_VALUE;
  end
endmodule
