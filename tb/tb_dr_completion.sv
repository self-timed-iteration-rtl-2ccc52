// tb_dr_completion: random dual-rail words (each pair reset, 0 or 1) are
// applied and valid/rst compared with a count of the valid pairs.
module tb_dr_completion;
  import st_pkg::*;
  localparam int W = 8;
  dr_t [W-1:0] x;
  logic valid, rst;
  int checks = 0, failures = 0;

  dr_completion dut (.x(x), .valid(valid), .rst(rst));

  initial begin
    for (int k = 0; k < 2000; k++) begin
      automatic int nvalid = 0;
      automatic int mode = $urandom % 3;   // bias towards all-valid / all-reset
      for (int i = 0; i < W; i++) begin
        automatic int s = (mode == 0) ? 1 + $urandom % 2 : (mode == 1) ? 0 : $urandom % 3;
        x[i].t = (s == 1);
        x[i].f = (s == 2);
        if (s != 0) nvalid++;
      end
      #1;
      checks += 2;
      if (valid !== (nvalid == W)) begin failures++; $display("ERROR valid for %h", x); end
      if (rst !== (nvalid == 0))   begin failures++; $display("ERROR rst for %h", x); end
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
