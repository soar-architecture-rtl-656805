// tb_soar_fsh_ext: self-checking test of the external Fast Shuffle register and multiplexer.
//
// Random bus cycles are driven: instruction fetches (i_d_n high) put a random word on the
// data bus, data cycles put unrelated data there, and some cycles are wait cycles. A model
// keeps the address field of the last word fetched outside wait cycles. With fshcntl_n high
// the system address must equal the processor address in the same cycle; with fshcntl_n low
// it must be the latched field with zero upper bits (the register has one cycle of latency:
// it shows the word fetched in the previous, non-waiting instruction cycle).
module tb_soar_fsh_ext;
  import soar_pkg::*;

  logic        clk = 1'b0;
  logic        i_d_n, fshcntl_n, wait_n;
  word_t       data, soar_addr, sys_addr;
  logic [27:0] model;
  bit          model_valid = 0;
  int          checks = 0, failures = 0, shuffles = 0;

  soar_fsh_ext dut (.clk(clk), .i_d_n(i_d_n), .fshcntl_n(fshcntl_n), .wait_n(wait_n),
                    .data(data), .soar_addr(soar_addr), .sys_addr(sys_addr));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    i_d_n = 1; fshcntl_n = 1; wait_n = 1; data = '0; soar_addr = '0; model = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      i_d_n     = ($urandom_range(0, 3) != 0);
      wait_n    = ($urandom_range(0, 5) != 0);
      data      = $urandom;
      soar_addr = $urandom;
      fshcntl_n = !(model_valid && $urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (fshcntl_n ? (sys_addr != soar_addr) : (sys_addr != {4'b0000, model})) begin
        failures++;
        $display("FAIL n=%0d fsh=%0d sys=%h soar=%h model=%h", n, fshcntl_n, sys_addr,
                 soar_addr, model);
      end
      if (!fshcntl_n) shuffles++;
      @(posedge clk);
      if (i_d_n && wait_n) begin model = data[27:0]; model_valid = 1; end
    end
    checks++;
    if (shuffles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
