// soar_fsh_ext: the external Fast Shuffle circuit placed between SOAR and memory.
//
// A 28-bit register loads bits 27:0 of the data bus at the clock edge that ends every
// instruction fetch (i_d_n high marks an instruction fetch), so it always holds the word
// address field of the last instruction fetched. A multiplexer drives the system address
// bus: when SOAR asserts fshcntl_n (active low) the address comes from the register, i.e.
// the target of the call or jump fetched in the previous instruction cycle; otherwise SOAR's
// own address bus drives it. The register's contents are only used after a fetch has loaded
// it, so it has no reset. Wait cycles (wait_n low) leave it unchanged. The upper four bits of
// the system address are zero when the register drives the bus.
// Lint note: data bits 31:28 (the opcode side of the word) are not latched, so the linter
// reports them unused.
module soar_fsh_ext
  import soar_pkg::*;
(
  input  logic  clk,
  input  logic  i_d_n,
  input  logic  fshcntl_n,
  input  logic  wait_n,
  input  word_t data,
  input  word_t soar_addr,
  output word_t sys_addr
);
  logic [27:0] target_q;

  always_ff @(posedge clk)
    if (i_d_n && wait_n) target_q <= data[27:0];

  assign sys_addr = fshcntl_n ? soar_addr : {4'b0000, target_q};
endmodule
