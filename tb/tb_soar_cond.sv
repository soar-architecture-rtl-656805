// tb_soar_cond: self-checking test of the SOAR skip/trap condition evaluator.
//
// The reference compares the operands as integers: signed codes use the 32-bit (untagged) or
// 31-bit (tagged) two's-complement values, unsigned codes the same bit patterns as unsigned
// numbers. Every condition code 0..31 is tried on directed pairs (equal, adjacent, extreme
// values, zero) and on random pairs; odd codes must be the negation of their even partner.
// Combinational unit: each vector is checked after a 1 ns settle.
module tb_soar_cond;
  import soar_pkg::*;

  logic [4:0] cond;
  logic       tag_en, taken;
  word_t      a, b;
  int         checks = 0, failures = 0;

  soar_cond dut (.cond(cond), .tag_en(tag_en), .a(a), .b(b), .taken(taken));

  function automatic logic expect_cond(input logic [4:0] c, input logic t, input word_t x,
                                       input word_t z);
    longint sx, sz, ux, uz;
    logic   base;
    if (t) begin
      sx = longint'($signed(x[30:0]));
      sz = longint'($signed(z[30:0]));
      // unsigned order of 31-bit values with bit 30 as the top bit, extended over bit 31
      ux = longint'({x[30], x[30:0]});
      uz = longint'({z[30], z[30:0]});
    end else begin
      sx = longint'($signed(x));
      sz = longint'($signed(z));
      ux = longint'(x);
      uz = longint'(z);
    end
    case (c[4:1])
      4'd1: base = sx < sz;
      4'd2: base = ux == uz;
      4'd3: base = sx <= sz;
      4'd5: base = ux < uz;
      4'd7: base = ux <= uz;
      4'd9: base = (ux != 0) && (ux <= uz);
      default: base = 1'b0;
    endcase
    return base ^ c[0];
  endfunction

  task automatic run(input logic t, input word_t x, input word_t z);
    for (int c = 0; c < 32; c++) begin
      cond = 5'(c); tag_en = t; a = x; b = z;
      #1;
      checks++;
      if (taken !== expect_cond(5'(c), t, x, z)) begin
        failures++;
        $display("FAIL cond=%o tag=%0d a=%h b=%h taken=%0d", c, t, x, z, taken);
      end
    end
  endtask

  initial begin
    #1000000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    static word_t v [8] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h3FFF_FFFF,
                     32'h4000_0000, 32'h0000_0005};
    foreach (v[i]) foreach (v[j]) begin
      run(1'b0, v[i], v[j]);
      run(1'b1, v[i] & 32'h7FFF_FFFF, v[j] & 32'h7FFF_FFFF);
    end
    // IN1 at the limits: 1 <= Rs1 <= RC
    run(1'b0, 32'd0, 32'd10);
    run(1'b0, 32'd1, 32'd10);
    run(1'b0, 32'd10, 32'd10);
    run(1'b0, 32'd11, 32'd10);
    for (int n = 0; n < 500; n++) begin
      word_t x, z;
      x = $urandom; z = (n % 4 == 0) ? x + word_t'($urandom_range(0, 2)) - 1 : $urandom;
      run(1'($urandom), x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
