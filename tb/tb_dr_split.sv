// tb_dr_split: exhaustive check of the split operator's status combination.
module tb_dr_split;
  logic av, ar, bv, br, sv, sr;
  int checks = 0, failures = 0;

  dr_split dut (.a_valid(av), .a_rst(ar), .b_valid(bv), .b_rst(br), .s_valid(sv), .s_rst(sr));

  initial begin
    for (int k = 0; k < 16; k++) begin
      {av, ar, bv, br} = 4'(k);
      #1 checks += 2;
      if (sv !== (av & bv)) begin failures++; $display("ERROR s_valid for %b", k[3:0]); end
      if (sr !== (ar & br)) begin failures++; $display("ERROR s_rst for %b", k[3:0]); end
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
