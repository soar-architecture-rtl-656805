// tb_soar_alu: self-checking test of the SOAR ALU, shifter and byte unit.
//
// A reference model written with 64-bit integer arithmetic (not the bit tricks of the design)
// predicts every result: tagged add/sub work on the signed 31-bit values and must flag overflow
// exactly when the true result leaves -2^30 .. 2^30-1; untagged operations are plain 32-bit.
// Directed corner cases (the range limits, byte positions) are followed by random vectors.
// The unit is combinational, so each vector is applied and checked after a 1 ns settle.
module tb_soar_alu;
  import soar_pkg::*;

  aluop_e op;
  logic   tag_en;
  word_t  a, b, y;
  logic   ovf;
  int     checks = 0, failures = 0;

  soar_alu dut (.op(op), .tag_en(tag_en), .a(a), .b(b), .y(y), .ovf(ovf));

  function automatic longint s31(input word_t v);
    return longint'($signed(v[30:0]));
  endfunction

  task automatic run(input aluop_e o, input logic t, input word_t x, input word_t z);
    word_t  ey;
    logic   eo;
    longint r;
    op = o; tag_en = t; a = x; b = z;
    #1;
    eo = 1'b0;
    unique case (o)
      A_ADD, A_SUB: begin
        if (t) begin
          r  = (o == A_ADD) ? s31(x) + s31(z) : s31(x) - s31(z);
          eo = (r < -(64'sd1 <<< 30)) || (r > (64'sd1 <<< 30) - 1);
          ey = {1'b0, 31'(r)};
        end else begin
          ey = (o == A_ADD) ? x + z : x - z;
        end
      end
      A_XOR: ey = x ^ z;
      A_AND: ey = x & z;
      A_OR:  ey = x | z;
      A_SRL: ey = t ? word_t'({1'b0, x[30:0]} >> 1) : x >> 1;
      A_SRA: ey = t ? {1'b0, 31'(s31(x) >>> 1)} : word_t'($signed(x) >>> 1);
      A_INS: ey = word_t'(x[7:0]) << (8 * int'(z[1:0]));
      A_EXT: ey = word_t'(x[8*int'(z[1:0]) +: 8]);
      default: ey = x;
    endcase
    checks++;
    if (y !== ey || ovf !== eo) begin
      failures++;
      $display("FAIL op=%s tag=%0d a=%h b=%h y=%h/%h ovf=%0d/%0d", o.name(), t, x, z, y, ey,
               ovf, eo);
    end
  endtask

  initial begin
    #100000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // tagged range corners: 2^30-1 + 1 overflows, -2^30 - 1 overflows
    run(A_ADD, 1, 32'h3FFF_FFFF, 32'h0000_0001);
    run(A_ADD, 1, 32'h3FFF_FFFE, 32'h0000_0001);
    run(A_SUB, 1, 32'h4000_0000, 32'h0000_0001);
    run(A_SUB, 1, 32'h4000_0001, 32'h0000_0001);
    run(A_ADD, 1, 32'h7FFF_FFFF, 32'h7FFF_FFFF);  // -1 + -1
    run(A_ADD, 0, 32'hFFFF_FFFF, 32'h0000_0001);  // untagged wraps silently
    // sla is add of a register to itself: 2^29 doubled overflows
    run(A_ADD, 1, 32'h2000_0000, 32'h2000_0000);
    run(A_ADD, 1, 32'h1000_0000, 32'h1000_0000);
    // shifts of negative numbers
    run(A_SRA, 1, 32'h7FFF_FFF0, 32'h0);
    run(A_SRA, 0, 32'h8000_0010, 32'h0);
    run(A_SRL, 1, 32'h7FFF_FFF0, 32'h0);
    run(A_SRL, 0, 32'h8000_0010, 32'h0);
    // all byte positions
    for (int k = 0; k < 4; k++) begin
      run(A_INS, 0, 32'h1234_56A5, word_t'(k));
      run(A_EXT, 0, 32'h1234_56A5, word_t'(k));
    end
    for (int n = 0; n < 4000; n++) begin
      aluop_e o;
      word_t  x, z;
      o = aluop_e'($urandom_range(0, 8));
      x = $urandom;
      z = $urandom;
      if (n % 3 == 0) begin x[31] = 1'b0; z[31] = 1'b0; end
      run(o, 1'($urandom), x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
