// tb_dr_nand2: drives the gate through reset -> valid -> reset phases in
// which the input rails rise and fall one at a time in random order. Checks
// that the output is reset when both inputs are reset, equals NAND when both
// are valid, is never both-rails-high, and that each output rail changes at
// most once per phase (monotonic).
module tb_dr_nand2;
  import st_pkg::*;
  logic rst_n;
  dr_t a, b, y;
  int checks = 0, failures = 0;
  int rises;

  dr_nand2 dut (.rst_n(rst_n), .a(a), .b(b), .y(y));

  initial begin
    rst_n = 0; a = '0; b = '0;
    #1 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      automatic logic va = 1'($urandom), vb = 1'($urandom);
      automatic logic first_a = 1'($urandom);
      automatic dr_t y0;
      // evaluate phase, one input at a time
      if (first_a) a = dr_enc(va); else b = dr_enc(vb);
      #1 y0 = y;
      checks++;
      if (y.t & y.f) begin failures++; $display("ERROR both rails high"); end
      if (first_a) b = dr_enc(vb); else a = dr_enc(va);
      #1 checks += 2;
      if (!(y.t ^ y.f) || y.t !== ~(va & vb)) begin
        failures++; $display("ERROR NAND(%b,%b) gives t=%b f=%b", va, vb, y.t, y.f);
      end
      if ((y0.t & ~y.t) | (y0.f & ~y.f)) begin failures++; $display("ERROR non-monotonic evaluate"); end
      // reset phase
      if (first_a) a = '0; else b = '0;
      #1 y0 = y;
      if (first_a) b = '0; else a = '0;
      #1 checks += 2;
      if (y !== '0) begin failures++; $display("ERROR output not reset"); end
      if ((~y0.t & y.t) | (~y0.f & y.f)) begin failures++; $display("ERROR non-monotonic reset"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("ERROR watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
