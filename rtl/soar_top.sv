// soar_top: a SOAR processor with the external Fast Shuffle circuit, as wired for memory.
//
// soar_core is the processor chip; soar_fsh_ext is the register and multiplexer placed between
// the chip and memory so that the target of a call or jump, latched from the data bus while the
// instruction is fetched, can address the very next fetch. sys_addr is the address memory
// sees. The chip's bidirectional data pins are split into data_in (memory to chip) and
// data_out/data_oe (chip to memory); the tri-state drivers and the write-strobe gate of the
// memory interface, the clock phase generator and the power pins are outside this RTL.
// A memory reads combinationally at sys_addr in the same cycle and writes data_out at the
// clock edge ending a cycle with rd_wr_n low (and wait_n high). All control pins are active
// low, as on the chip.
module soar_top
  import soar_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output word_t sys_addr,
  output word_t soar_addr,
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
  soar_core u_core (
    .clk(clk), .rst_n(rst_n), .addr(soar_addr), .data_in(data_in), .data_out(data_out),
    .data_oe(data_oe), .rd_wr_n(rd_wr_n), .i_d_n(i_d_n), .fshcntl_n(fshcntl_n),
    .wait_n(wait_n), .waitack_n(waitack_n), .page_n(page_n), .io_n(io_n));

  soar_fsh_ext u_fsh (
    .clk(clk), .i_d_n(i_d_n), .fshcntl_n(fshcntl_n), .wait_n(wait_n), .data(data_in),
    .soar_addr(soar_addr), .sys_addr(sys_addr));
endmodule
